// tb_eves_cooldown: self-checking test of the 128-retire cooldown.
//
// After a trigger the gate must stay active until exactly 128 instructions
// have retired, counting retirements of 0..WIDTH per cycle; a new trigger
// while it runs reloads 128. A counter model is compared every cycle, and the
// number of retirements from trigger to release is measured directly.
module tb_eves_cooldown;
  localparam int WIDTH = 4;
  logic clk = 0, rst_n = 0, trigger = 0, active;
  logic [2:0] retire_n = 0;
  logic [7:0] remaining;

  eves_cooldown #(.COOLDOWN(128), .WIDTH(WIDTH)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, m = 0, since = 0, releases = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      check(active == (m != 0) && int'(remaining) == m, "counter");
      trigger = ($urandom_range(0, 199) == 0);
      retire_n = 3'($urandom_range(0, WIDTH));
      if (trigger) begin m = 128; since = 0; end
      else begin
        if (m > 0) begin
          since += retire_n;
          if (m <= retire_n) begin
            // released: at least 128 retirements, fewer than 128 + WIDTH
            check(since >= 128 && since < 128 + WIDTH, "release after 128 retires");
            releases++;
          end
        end
        m = (m > retire_n) ? m - retire_n : 0;
      end
    end
    check(releases > 10, "coverage");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
