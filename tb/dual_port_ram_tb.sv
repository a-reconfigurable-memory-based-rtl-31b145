// dual_port_ram_tb: random writes on port A and reads on port B against an
// array model; reads show the word one clock later, return the old word when
// the same address is written on the same edge, and hold while ENB is low.
module dual_port_ram_tb;
  localparam int unsigned DEPTH = 256, DW = 17, AW = 8;
  logic clk = 1'b0;
  logic ena = 0, enb = 0;
  logic [AW-1:0] addra = '0, addrb = '0;
  logic [DW-1:0] dina = '0, doutb;
  logic [DW-1:0] model [DEPTH];
  logic [DW-1:0] exp_q;
  int checks = 0, failures = 0;

  dual_port_ram #(.DEPTH(DEPTH), .DW(DW)) dut (
    .clka(clk), .ena, .addra, .dina, .clkb(clk), .enb, .addrb, .doutb);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      ena = 1; addra = AW'(a); dina = DW'(a * 3 + 1); model[a] = dina;
    end
    @(negedge clk);
    ena = 0;
    exp_q = '0;
    for (int n = 0; n < 5000; n++) begin
      ena   = 1'($urandom);
      addra = AW'($urandom % 16);
      dina  = DW'($urandom);
      enb   = (n == 0) || ($urandom % 4 != 0);
      addrb = AW'($urandom % 16);
      if (enb) exp_q = model[addrb];
      @(negedge clk);
      if (ena) model[addra] = dina;
      begin
        checks++;
        if (doutb !== exp_q) begin
          failures++;
          $display("FAIL: read %h expected %h", doutb, exp_q);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
