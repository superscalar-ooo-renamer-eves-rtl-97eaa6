// tb_eves_safestride: self-checking test of the SafeStride rate monitor.
//
// Directed: with no misses prediction stays on; one miss against fewer than
// 1024 confident predictions switches it off, and it comes back on after the
// 1024th correct one. Random: a model of both counters, including the halving
// every PERIOD retirements (shortened to 5000 here), is compared every cycle.
module tb_eves_safestride;
  localparam int WIDTH = 4, PERIOD = 5000;
  logic clk = 0, rst_n = 0, miss = 0, hit = 0, disable_vp;
  logic [2:0] retire_n = 0;
  logic [15:0] misses;
  logic [31:0] events;

  eves_safestride #(.MISS_BITS(16), .RATE_SHIFT(10), .PERIOD(PERIOD), .WIDTH(WIDTH)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_halve = 0, n_off = 0;
  longint m_miss = 0, m_ev = 0, m_p = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic tick(input bit mi, input bit hi, input int rn);
    miss = mi; hit = hi; retire_n = 3'(rn);
    @(posedge clk); #1;
    if (mi && m_miss != 65535) m_miss++;
    if (mi || hi) m_ev++;
    m_p += rn;
    if (m_p >= PERIOD) begin m_p -= PERIOD; m_miss /= 2; m_ev /= 2; n_halve++; end
    check(misses == m_miss && events == m_ev, "counters");
    check(disable_vp == (m_miss * 1024 > m_ev), "disable");
    if (disable_vp) n_off++;
  endtask

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < 100; i++) tick(0, 1, 0);
    check(!disable_vp, "on with no misses");
    tick(1, 0, 0);
    check(disable_vp, "off after one miss in 101");
    for (int i = 0; i < 922; i++) tick(0, 1, 0);
    check(disable_vp, "still off at 1024 events");
    tick(0, 1, 0);
    check(!disable_vp, "back on at 1025 events");
    for (int i = 0; i < 40000; i++)
      tick($urandom_range(0, 599) == 0, 1'($urandom), $urandom_range(0, WIDTH));
    check(n_halve > 10 && n_off > 0, "coverage");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
