// histogram_joint_tb: the generator used for a joint histogram of two images.
//
// Each window pixel is the pair {a, b} of the pixels at the same position in
// two 8-bit images, so the generator runs with 16-bit pixels and 65536 bins,
// and bin (a, b) counts the positions where the first image has a and the
// second has b. Two 8 x 8 images are used: the second is a shifted,
// quantised copy of the first with some noise, as for two registered views of
// one scene. Every one of the 65536 bins is read back and compared with a
// joint histogram counted here.
module histogram_joint_tb;
  localparam int unsigned W      = 16;
  localparam int unsigned T      = 3;
  localparam int unsigned N      = 3;
  localparam int unsigned PIXELS = 64;
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

  histogram_top #(.W(W), .T(T), .N(N), .PIXELS(PIXELS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] img_a [PIXELS];
  logic [7:0] img_b [PIXELS];
  int         ref_hist [BINS];
  int         nonzero;

  initial begin
    for (int n = 0; n < PIXELS; n++)
      img_a[n] = 8'($urandom % 6) * 8'd40;
    for (int n = 0; n < PIXELS; n++)
      img_b[n] = (img_a[(n + 1) % PIXELS] / 8'd64) + (($urandom % 5 == 0) ? 8'd1 : 8'd0);
    foreach (ref_hist[b]) ref_hist[b] = 0;
    for (int n = 0; n < PIXELS; n++) ref_hist[{img_a[n], img_b[n]}]++;

    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int a = 0; a < WORDS; a++) begin
      @(negedge clk);
      img_we    = 1'b1;
      img_waddr = AW'(a);
      for (int i = 0; i < T; i++)
        img_wdata[i] = (a * T + i < PIXELS) ? {img_a[a * T + i], img_b[a * T + i]} : '0;
    end
    @(negedge clk);
    img_we = 1'b0;
    start  = 1'b1;
    @(negedge clk);
    start = 1'b0;
    wait (done);
    nonzero = 0;
    for (int b = 0; b < BINS; b++) begin
      @(negedge clk);
      hist_rd_en   = 1'b1;
      hist_rd_addr = W'(b);
      @(negedge clk);
      hist_rd_en = 1'b0;
      if (ref_hist[b] != 0) nonzero++;
      checks++;
      if (hist_rd_data != CNTW'(ref_hist[b])) begin
        failures++;
        $display("FAIL: bin (%0d,%0d): got %0d expected %0d", b / 256, b % 256, hist_rd_data, ref_hist[b]);
      end
    end
    $display("%0d occupied joint bins", nonzero);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
