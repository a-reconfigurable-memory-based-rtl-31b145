// pixel_column_tb: random shift/hold sequence on one pixel column; the column
// must take its input on a shift and keep its value otherwise.
module pixel_column_tb;
  localparam int unsigned W = 8, T = 3;
  logic clk = 1'b0, shift = 1'b0;
  logic [T-1:0][W-1:0] pix_in = '0, pix_out, model;
  int checks = 0, failures = 0;

  pixel_column #(.W(W), .T(T)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    shift = 1'b1;
    pix_in = {T{W'(8'h5a)}};
    model = pix_in;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      checks++;
      if (pix_out !== model) begin
        failures++;
        $display("FAIL cycle %0d: %h expected %h", n, pix_out, model);
      end
      shift  = 1'($urandom);
      pix_in = {$urandom, $urandom};
      if (shift) model = pix_in;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
