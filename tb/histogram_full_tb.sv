// histogram_full_tb: the histogram generator at its default size, a
// 256 x 256 image of 8-bit pixels counted by a 3 x 3 window.
//
// Two images are counted: one of uniformly random pixels and one smooth
// image (a diagonal ramp with a little noise, where neighbouring pixels often
// repeat, as in a photograph). Every one of the 256 bins is read back and
// compared with a histogram counted here from the image; the sum of the bins
// must equal the image size, the window must shift once per word plus three
// times, and a run may take at most one clock per pixel beyond its shifts.
module histogram_full_tb;
  localparam int unsigned W      = hist_pkg::PIX_W;
  localparam int unsigned T      = hist_pkg::ROWS;
  localparam int unsigned N      = hist_pkg::BLOCKS;
  localparam int unsigned PIXELS = hist_pkg::IMG_PIXELS;
  localparam int unsigned WORDS  = (PIXELS + T - 1) / T;
  localparam int unsigned AW     = hist_pkg::bits_for(WORDS);
  localparam int unsigned CNTW   = hist_pkg::bits_for(PIXELS);
  localparam int unsigned BINS   = 2 ** W;

  logic                clk = 1'b0;
  logic                rst_n = 1'b0;
  logic                img_we = 1'b0;
  logic [AW-1:0]       img_waddr = '0;
  logic [T-1:0][W-1:0] img_wdata = '0;
  logic                start = 1'b0;
  logic                busy, done;
  logic                hist_rd_en = 1'b0;
  logic [W-1:0]        hist_rd_addr = '0;
  logic [CNTW-1:0]     hist_rd_data;

  int checks = 0, failures = 0;
  int run_cycles = 0, run_shifts = 0;

  histogram_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && dut.u_ctrl.run) begin
    run_cycles++;
    if (dut.q) run_shifts++;
  end

  logic [W-1:0] img [PIXELS];
  int           ref_hist [BINS];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic make_image(input int kind);
    for (int n = 0; n < PIXELS; n++) begin
      int x = n % 256, y = n / 256;
      if (kind == 0) img[n] = W'($urandom);
      else           img[n] = W'((x + y) / 2 + (($urandom % 8 == 0) ? 1 : 0));
    end
    foreach (ref_hist[b]) ref_hist[b] = 0;
    for (int n = 0; n < PIXELS; n++) ref_hist[img[n]]++;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < 2; r++) begin
      int sum;
      sum = 0;
      make_image(r);
      for (int a = 0; a < WORDS; a++) begin
        @(negedge clk);
        img_we    = 1'b1;
        img_waddr = AW'(a);
        for (int i = 0; i < T; i++)
          img_wdata[i] = (a * T + i < PIXELS) ? img[a * T + i] : '0;
      end
      @(negedge clk);
      img_we = 1'b0;
      start  = 1'b1;
      @(negedge clk);
      start = 1'b0;
      run_cycles = 0;
      run_shifts = 0;
      wait (done);
      $display("image %0d: %0d counting clocks for %0d pixels", r, run_cycles, PIXELS);
      check(run_shifts == WORDS + N, $sformatf("%0d shifts", run_shifts));
      check(run_cycles <= WORDS + N + PIXELS, $sformatf("%0d counting clocks", run_cycles));
      for (int b = 0; b < BINS; b++) begin
        @(negedge clk);
        hist_rd_en   = 1'b1;
        hist_rd_addr = W'(b);
        @(negedge clk);
        hist_rd_en = 1'b0;
        sum += int'(hist_rd_data);
        check(hist_rd_data == CNTW'(ref_hist[b]),
              $sformatf("image %0d bin %0d: got %0d expected %0d", r, b, hist_rd_data, ref_hist[b]));
      end
      check(sum == PIXELS, $sformatf("bins sum to %0d", sum));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
