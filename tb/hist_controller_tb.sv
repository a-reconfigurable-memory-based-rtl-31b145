// hist_controller_tb: drives the controller with a random q (as the selection
// unit would) and a clear sweep of a few clocks, and checks against a model:
// the start/clear/run sequence, mem_ads and the prefetch address, the
// c_control flags moving with each shift, the fill flag t, the end of the run
// after WORDS + N shifts, the two drain clocks before done, and mem_enable
// (low only when an update repeats the bin of the update just before it).
module hist_controller_tb;
  import hist_pkg::*;
  localparam int unsigned W = 4, T = 3, N = 3, PIXELS = 10;
  localparam int unsigned WORDS = (PIXELS + T - 1) / T;
  localparam int unsigned AW = hist_pkg::bits_for(WORDS);
  logic clk = 1'b0, rst_n = 1'b0, start = 0, q = 0, clear_busy = 0;
  logic [W-1:0] p_d = '0;
  logic upd_d = 0;
  state_t state;
  logic init, clear, run, shift, t, mem_enable, done;
  logic [AW-1:0] mem_ads, mem_raddr;
  logic [N-1:0] c_control;
  int checks = 0, failures = 0;
  int m_ads, m_shifts, clr_cnt;
  logic [N-1:0] m_cc;
  logic m_t, prev_upd;
  logic [W-1:0] prev_p;

  hist_controller #(.W(W), .T(T), .N(N), .PIXELS(PIXELS)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // a storing unit's clear sweep, shortened to 6 clocks
  always @(posedge clk) begin
    if (clear) begin clear_busy <= 1; clr_cnt <= 6; end
    else if (clr_cnt > 1) clr_cnt <= clr_cnt - 1;
    else clear_busy <= 0;
  end

  // mem_enable against random updates, throughout
  always @(negedge clk) begin
    prev_upd = upd_d;
    prev_p   = p_d;
    upd_d    = 1'($urandom);
    p_d      = W'($urandom % 3);
    #1;
    check(mem_enable === !(prev_upd && prev_p == p_d), "mem_enable");
  end

  initial begin
    prev_upd = 0; prev_p = '0; clr_cnt = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < 3; r++) begin
      @(negedge clk);
      start = 1;
      #1;
      check(init && clear, "init/clear with start");
      @(negedge clk);
      start = 0;
      check(state == ST_CLEAR && t && !done, "clear state after start");
      while (clear_busy) @(negedge clk);
      @(negedge clk);
      check(state == ST_RUN, "run after clear");
      m_ads = 0; m_shifts = 0; m_cc = '0; m_t = 1;
      while (state == ST_RUN) begin
        q = ($urandom % 2 == 0);
        #1;
        check(int'(mem_ads) == m_ads, $sformatf("mem_ads %0d expected %0d", mem_ads, m_ads));
        check(c_control == m_cc, $sformatf("c_control %b expected %b", c_control, m_cc));
        check(t == m_t, "t");
        check(shift == q, "shift = q while running");
        if (m_cc[N-1]) m_t = 0;
        if (q) begin
          m_cc = (m_cc << 1) | N'(m_ads < WORDS);
          if (m_ads < WORDS) m_ads++;
          m_shifts++;
        end
        check(int'(mem_raddr) == m_ads, "prefetch address");
        @(negedge clk);
      end
      check(m_shifts == WORDS + N, $sformatf("%0d shifts, expected %0d", m_shifts, WORDS + N));
      check(state == ST_DRAIN && !done, "drain after run");
      @(negedge clk);
      check(state == ST_DRAIN && !done, "second drain clock");
      @(negedge clk);
      check(state == ST_IDLE && done, "done after drain");
      repeat (3) @(negedge clk);
      check(done, "done held");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
