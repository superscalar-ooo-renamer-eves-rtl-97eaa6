// tb_prf: self-checking test of the physical register file.
//
// An array model holds the values and ready bits. Random cycles write values
// (which set the ready bit), clear ready bits, and now and then set every
// ready bit; all read ports read random registers and are compared with the
// model every cycle. Same-register conflicts are resolved as documented:
// all_ready over write over clear, higher write port over lower.
module tb_prf;
  localparam int N_PHYS = 320, XLEN = 64, NRD = 12, NWR = 8, NCLR = 4;
  localparam int PW = $clog2(N_PHYS);

  logic clk = 0, rst_n = 0;
  logic [NRD-1:0][PW-1:0] rd_addr = '0;
  logic [NRD-1:0][XLEN-1:0] rd_data;
  logic [NRD-1:0] rd_ready;
  logic [NWR-1:0] wr_en = 0;
  logic [NWR-1:0][PW-1:0] wr_addr = '0;
  logic [NWR-1:0][XLEN-1:0] wr_data = '0;
  logic [NCLR-1:0] clr_en = 0;
  logic [NCLR-1:0][PW-1:0] clr_addr = '0;
  logic all_ready = 0;

  prf #(.N_PHYS(N_PHYS), .XLEN(XLEN), .NRD(NRD), .NWR(NWR), .NCLR(NCLR)) dut (.*);

  always #5 clk = ~clk;

  logic [XLEN-1:0] mval [N_PHYS];
  bit mrdy [N_PHYS];
  int checks = 0, failures = 0, n_notready = 0;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < N_PHYS; p++) begin mval[p] = 0; mrdy[p] = 1; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 5000; cyc++) begin
      @(negedge clk);
      for (int r = 0; r < NRD; r++) begin
        checks++;
        if (rd_data[r] !== mval[rd_addr[r]] || rd_ready[r] !== mrdy[rd_addr[r]]) begin
          failures++;
          if (failures < 10) $display("FAIL read port %0d reg %0d at %0t", r, rd_addr[r], $time);
        end
        if (!rd_ready[r]) n_notready++;
      end
      // next cycle's stimulus; small address range to force conflicts
      for (int c = 0; c < NCLR; c++) begin
        clr_en[c] = 1'($urandom); clr_addr[c] = PW'($urandom_range(0, 39));
      end
      for (int w = 0; w < NWR; w++) begin
        wr_en[w] = ($urandom_range(0, 3) == 0); wr_addr[w] = PW'($urandom_range(0, 39));
        wr_data[w] = {$urandom, $urandom};
      end
      all_ready = ($urandom_range(0, 49) == 0);
      for (int r = 0; r < NRD; r++) rd_addr[r] = PW'($urandom_range(0, 41));
      for (int c = 0; c < NCLR; c++) if (clr_en[c]) mrdy[clr_addr[c]] = 0;
      for (int w = 0; w < NWR; w++) if (wr_en[w]) begin mval[wr_addr[w]] = wr_data[w]; mrdy[wr_addr[w]] = 1; end
      if (all_ready) for (int p = 0; p < N_PHYS; p++) mrdy[p] = 1;
    end
    checks++;
    if (n_notready == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
