// selection_unit_tb: random test of the selection unit. q must be the NOR of
// K[.][N]; after each clock P must be the pixel of block N in the row that the
// first set bit of K[.][N] (window held) or of K[.][N-1] (window shifted)
// pointed to, row 0 if that vector was empty.
module selection_unit_tb;
  localparam int unsigned W = 8, T = 3;
  localparam int unsigned SW = $clog2(T);
  logic clk = 1'b0, rst_n = 1'b0, init = 1'b0, en = 1'b0;
  logic [T-1:0] k_last, k_prev;
  logic [T-1:0][W-1:0] pix_last;
  logic q;
  logic [SW-1:0] s;
  logic [W-1:0] p;
  int s_model;
  int checks = 0, failures = 0;

  selection_unit #(.W(W), .T(T)) dut (.*);
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

  function automatic int first_one(input logic [T-1:0] v);
    for (int i = 0; i < T; i++) if (v[i]) return i;
    return 0;
  endfunction

  initial begin
    k_last = '0; k_prev = '0; pix_last = '0;
    s_model = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    en = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      for (int i = 0; i < T; i++) pix_last[i] = W'($urandom);
      k_last = ($urandom % 3 == 0) ? '0 : T'($urandom);
      k_prev = T'($urandom);
      init   = ($urandom % 100 == 0);
      #1;
      check(s == SW'(s_model), $sformatf("S %0d expected %0d", s, s_model));
      check(p === pix_last[s_model], $sformatf("P %h expected %h", p, pix_last[s_model]));
      check(q === (k_last == '0), $sformatf("q %b for K %b", q, k_last));
      if (init) s_model = 0;
      else      s_model = (k_last == '0) ? first_one(k_prev) : first_one(k_last);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
