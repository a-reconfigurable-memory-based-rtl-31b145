// processing_block_tb: random test of one processing block against a model
// of its status bits. Each clock the test picks P (often one of the block's
// own pixels, so that matches are frequent), checks K = pending and not equal
// to P, and checks C_r = number of pending pixels equal to P. On the clock the
// status bits must take K (q low) or the neighbour's K (q high), and nothing
// while en is low; init must clear them.
module processing_block_tb;
  localparam int unsigned W = 8, T = 3;
  localparam int unsigned CW = hist_pkg::bits_for(T);
  logic clk = 1'b0, rst_n = 1'b0, init = 1'b0, en = 1'b0, q = 1'b0;
  logic [T-1:0][W-1:0] pix;
  logic [W-1:0] p;
  logic [T-1:0] k_prev, k, d, d_model, k_model;
  logic [CW-1:0] c_r;
  int c_model;
  int checks = 0, failures = 0;

  processing_block #(.W(W), .T(T)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    pix = '0; p = '0; k_prev = '0;
    d_model = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      check(d === d_model, $sformatf("D %b expected %b", d, d_model));
      init   = ($urandom % 200 == 0);
      en     = ($urandom % 8 != 0);
      q      = ($urandom % 3 == 0);
      k_prev = T'($urandom);
      for (int i = 0; i < T; i++) pix[i] = W'($urandom % 6);
      p = ($urandom % 4 != 0) ? pix[$urandom % T] : W'($urandom % 6);
      #1;
      c_model = 0;
      for (int i = 0; i < T; i++) begin
        k_model[i] = d_model[i] && (pix[i] != p);
        if (d_model[i] && pix[i] == p) c_model++;
      end
      check(k === k_model, $sformatf("K %b expected %b", k, k_model));
      check(int'(c_r) == c_model, $sformatf("C_r %0d expected %0d", c_r, c_model));
      if (init)    d_model = '0;
      else if (en) d_model = q ? k_prev : k_model;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
