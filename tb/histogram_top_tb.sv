// histogram_top_tb: end-to-end test of the histogram generator at a reduced
// size (4-bit pixels, 3 x 3 window, a 40-pixel image whose last word is only
// partly filled).
//
// Several images are loaded and counted back to back on the same instance:
// random, uniform (every clock repeats the previous bin, which exercises the
// R3 bypass of the storing unit), a ramp and sparse values. After each run
// every bin is read back and compared with a histogram counted here directly
// from the image. The test also checks the number of window shifts (one per
// image word plus N to fill and empty the window), that every run needs at
// most one clock per pixel beyond those shifts, and that each mechanism of the
// design happened at least once: window shift, window hold, selection from
// block N and from block N-1, the R3 bypass, the fill phase t and a partly
// filled last word.
module histogram_top_tb;
  localparam int unsigned W      = 4;
  localparam int unsigned T      = 3;
  localparam int unsigned N      = 3;
  localparam int unsigned PIXELS = 40;
  localparam int unsigned WORDS  = (PIXELS + T - 1) / T;
  localparam int unsigned AW     = hist_pkg::bits_for(WORDS);
  localparam int unsigned CNTW   = hist_pkg::bits_for(PIXELS);
  localparam int unsigned BINS   = 2 ** W;
  localparam int unsigned RUNS   = 8;

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
  int n_shift = 0, n_hold = 0, n_sel_last = 0, n_sel_prev = 0, n_bypass = 0, n_fill = 0;
  int run_cycles = 0, run_shifts = 0;

  histogram_top #(.W(W), .T(T), .N(N), .PIXELS(PIXELS)) dut (.*);

  always #5 clk = ~clk;

  // watchdog
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters, sampled from inside the design
  always @(posedge clk) if (rst_n) begin
    if (dut.u_ctrl.run) begin
      run_cycles++;
      if (dut.q) begin
        n_shift++; run_shifts++;
        if (|dut.k[N-2]) n_sel_prev++;
      end else begin
        n_hold++; n_sel_last++;
      end
      if (dut.t) n_fill++;
    end
    if (dut.upd_d && !dut.mem_enable) n_bypass++;
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
    for (int n = 0; n < PIXELS; n++)
      case (kind % 4)
        0: img[n] = W'($urandom);
        1: img[n] = W'(kind);
        2: img[n] = W'(n);
        default: img[n] = ($urandom % 4 == 0) ? W'($urandom) : W'(7);
      endcase
    foreach (ref_hist[b]) ref_hist[b] = 0;
    for (int n = 0; n < PIXELS; n++) ref_hist[img[n]]++;
  endtask

  task automatic load_image();
    for (int a = 0; a < WORDS; a++) begin
      @(negedge clk);
      img_we    = 1'b1;
      img_waddr = AW'(a);
      for (int i = 0; i < T; i++)
        img_wdata[i] = (a * T + i < PIXELS) ? img[a * T + i] : W'($urandom);
    end
    @(negedge clk);
    img_we = 1'b0;
  endtask

  task automatic run_and_check(input int r);
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    run_cycles = 0;
    run_shifts = 0;
    check(busy && !done, "busy after start");
    wait (done);
    check(run_shifts == WORDS + N, $sformatf("run %0d: %0d shifts, expected %0d", r, run_shifts, WORDS + N));
    check(run_cycles <= WORDS + N + PIXELS, $sformatf("run %0d: %0d counting clocks", r, run_cycles));
    for (int b = 0; b < BINS; b++) begin
      @(negedge clk);
      hist_rd_en   = 1'b1;
      hist_rd_addr = W'(b);
      @(negedge clk);
      hist_rd_en = 1'b0;
      check(hist_rd_data == CNTW'(ref_hist[b]),
            $sformatf("run %0d bin %0d: got %0d expected %0d", r, b, hist_rd_data, ref_hist[b]));
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < RUNS; r++) begin
      make_image(r);
      load_image();
      run_and_check(r);
    end
    check(n_shift > 0, "window shift never happened");
    check(n_hold > 0, "window hold never happened");
    check(n_sel_last > 0, "selection from block N never happened");
    check(n_sel_prev > 0, "selection from block N-1 never happened");
    check(n_bypass > 0, "R3 bypass never happened");
    check(n_fill > 0, "fill phase never happened");
    check(PIXELS % T != 0, "image has no partly filled last word");
    $display("shifts=%0d holds=%0d sel_last=%0d sel_prev=%0d bypass=%0d fill=%0d",
             n_shift, n_hold, n_sel_last, n_sel_prev, n_bypass, n_fill);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
