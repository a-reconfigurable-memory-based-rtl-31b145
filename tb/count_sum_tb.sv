// count_sum_tb: random partial counts, c_control and t; one clock later C
// must be the sum of the counts of the blocks whose c_control bit or t was
// set, with P and the update flag delayed alongside.
module count_sum_tb;
  localparam int unsigned W = 8, T = 3, N = 3;
  localparam int unsigned CW = hist_pkg::bits_for(T);
  localparam int unsigned SUMW = hist_pkg::bits_for(T * N);
  logic clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0][CW-1:0] c_r;
  logic [N-1:0] c_control;
  logic t, upd, upd_d;
  logic [W-1:0] p, p_d;
  logic [SUMW-1:0] c;
  int exp_c, exp_p, exp_u;
  int checks = 0, failures = 0;

  count_sum #(.W(W), .T(T), .N(N)) dut (.*);
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
    c_r = '0; c_control = '0; t = 0; p = '0; upd = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      for (int r = 0; r < N; r++) c_r[r] = CW'($urandom % (T + 1));
      c_control = N'($urandom);
      t   = ($urandom % 4 == 0);
      p   = W'($urandom);
      upd = 1'($urandom);
      exp_c = 0;
      for (int r = 0; r < N; r++) if (c_control[r] || t) exp_c += int'(c_r[r]);
      exp_p = int'(p);
      exp_u = int'(upd);
      @(negedge clk);
      check(int'(c) == exp_c, $sformatf("C %0d expected %0d", c, exp_c));
      check(int'(p_d) == exp_p && int'(upd_d) == exp_u, "P/upd not delayed with C");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
