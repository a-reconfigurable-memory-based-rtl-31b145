// storing_unit_tb: clears the histogram, streams random updates
// histogram[P] += C (one per clock, often several in a row to the same bin,
// with gaps), reads every bin back and compares it with a model; then clears
// again and repeats, so the clear sweep is checked too. mem_enable is derived
// here as the design's controller derives it: low when an update hits the same
// bin as the update one clock before.
module storing_unit_tb;
  localparam int unsigned W = 8, CNTW = 17, SUMW = 4;
  localparam int unsigned BINS = 2 ** W;
  logic clk = 1'b0, rst_n = 1'b0;
  logic clear = 0, clear_busy, upd = 0, mem_enable = 1, rd_en = 0;
  logic [W-1:0] p = '0, rd_addr = '0, prev_p = '0;
  logic prev_upd = 0;
  logic [SUMW-1:0] c = '0;
  logic [CNTW-1:0] data_out;
  int model [BINS];
  int checks = 0, failures = 0, bypasses = 0;

  storing_unit #(.W(W), .CNTW(CNTW), .SUMW(SUMW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic do_clear();
    @(negedge clk);
    clear = 1;
    @(negedge clk);
    clear = 0;
    check(clear_busy, "clear_busy after clear");
    while (clear_busy) @(negedge clk);
    foreach (model[b]) model[b] = 0;
  endtask

  task automatic stream(input int n_upd);
    for (int n = 0; n < n_upd; n++) begin
      upd = ($urandom % 5 != 0);
      p   = ($urandom % 3 == 0) ? prev_p : W'($urandom % 12);
      c   = SUMW'($urandom % 10);
      mem_enable = !(prev_upd && prev_p == p);
      if (upd && !mem_enable) bypasses++;
      if (upd) model[p] += int'(c);
      @(negedge clk);
      prev_upd = upd;
      prev_p   = p;
    end
    upd = 0;
    prev_upd = 0;
    repeat (3) @(negedge clk);
  endtask

  task automatic read_all();
    for (int b = 0; b < BINS; b++) begin
      rd_en = 1; rd_addr = W'(b);
      @(negedge clk);
      rd_en = 0;
      check(int'(data_out) == model[b], $sformatf("bin %0d: %0d expected %0d", b, data_out, model[b]));
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    do_clear();
    stream(2000);
    read_all();
    do_clear();
    stream(500);
    read_all();
    check(bypasses > 0, "bypass never exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
