// image_memory_tb: loads a 3-pixel-wide frame store of 20 pixels (7 words,
// the last one partly used), reads every address in random order, including
// the address just past the end, and checks data and row-valid flags one clock later.
module image_memory_tb;
  localparam int unsigned W = 8, T = 3, PIXELS = 20;
  localparam int unsigned WORDS = (PIXELS + T - 1) / T;
  localparam int unsigned AW = hist_pkg::bits_for(WORDS);
  logic clk = 1'b0, we = 0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  logic [T-1:0][W-1:0] wdata = '0, rdata;
  logic [T-1:0] rvalid;
  logic [T-1:0][W-1:0] model [WORDS];
  int checks = 0, failures = 0;

  image_memory #(.W(W), .T(T), .PIXELS(PIXELS)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < WORDS; a++) begin
      @(negedge clk);
      we = 1; waddr = AW'(a);
      for (int i = 0; i < T; i++) wdata[i] = W'($urandom);
      model[a] = wdata;
    end
    @(negedge clk);
    we = 0;
    for (int n = 0; n < 200; n++) begin
      int a;
      a = $urandom % (WORDS + 1);
      raddr = AW'(a);
      @(negedge clk);
      for (int i = 0; i < T; i++) begin
        bit v;
        v = (a * T + i) < PIXELS;
        checks++;
        if (rvalid[i] !== v || (a < WORDS && rdata[i] !== model[a][i])) begin
          failures++;
          $display("FAIL: word %0d row %0d: %h/%b", a, i, rdata[i], rvalid[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
