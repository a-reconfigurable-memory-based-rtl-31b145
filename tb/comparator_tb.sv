// comparator_tb: exhaustive test of the pixel comparator at 8 bits: every
// pair (pixel, P) must give 0 on equality and 1 otherwise.
module comparator_tb;
  localparam int unsigned W = 8;
  logic [W-1:0] data_in, p;
  logic         comp_out;
  int checks = 0, failures = 0;

  comparator #(.W(W)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 2 ** W; a++)
      for (int b = 0; b < 2 ** W; b++) begin
        data_in = W'(a);
        p       = W'(b);
        #1;
        checks++;
        if (comp_out !== (a != b)) begin
          failures++;
          $display("FAIL: %0d vs %0d gave %0d", a, b, comp_out);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
