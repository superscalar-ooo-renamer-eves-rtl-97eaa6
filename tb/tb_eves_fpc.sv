// tb_eves_fpc: self-checking test of the probabilistic counter gate.
//
// A reference LFSR (x^16 + x^14 + x^13 + x^11 + 1, seed 16'hACE1) runs beside
// the block; for each bucket inc_en must equal (sample % denom == 0) with the
// 4/2/2 denominators, and be always high with the layer off. The test also
// measures the permission rate per bucket over many steps (about 1/4 and 1/2)
// and checks the LFSR's period of 65535.
module tb_eves_fpc;
  import vp_pkg::*;
  logic clk = 0, rst_n = 0, eves_en = 1, step = 0, inc_en;
  vtype_e vtype = VT_INTALU;
  logic [15:0] sample;

  eves_fpc dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int allowed [3], tried [3];
  logic [15:0] ref_lfsr;

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
    int denom [3];
    int period;
    denom[0] = 4; denom[1] = 2; denom[2] = 2;
    ref_lfsr = 16'hACE1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    period = 0;
    for (int i = 0; i < 150000; i++) begin
      @(negedge clk);
      vtype = vtype_e'($urandom_range(0, 2));
      eves_en = ($urandom_range(0, 9) != 0);
      step = 1'($urandom);
      #1;
      check(sample == ref_lfsr, "lfsr state");
      check(inc_en == (!eves_en || (ref_lfsr % denom[int'(vtype)]) == 0), "inc_en");
      if (eves_en) begin
        tried[int'(vtype)]++;
        if (inc_en) allowed[int'(vtype)]++;
      end
      if (step) begin
        ref_lfsr = {ref_lfsr[14:0], ref_lfsr[15] ^ ref_lfsr[13] ^ ref_lfsr[12] ^ ref_lfsr[10]};
        period++;
        if (ref_lfsr == 16'hACE1 && period != 65535) failures++;
      end
    end
    check(period >= 65535, "ran a full period");
    check(allowed[0] * 100 / tried[0] inside {[22:28]}, "INTALU rate about 1/4");
    check(allowed[1] * 100 / tried[1] inside {[46:54]}, "FPALU rate about 1/2");
    check(allowed[2] * 100 / tried[2] inside {[46:54]}, "LOAD rate about 1/2");
    $display("rates %0d/%0d %0d/%0d %0d/%0d", allowed[0], tried[0], allowed[1], tried[1], allowed[2], tried[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
