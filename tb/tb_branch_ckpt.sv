// tb_branch_ckpt: self-checking test of the branch mask and checkpoint pool.
//
// A model keeps the GBM and, per branch ID, the snapshot written with it.
// Random cycles checkpoint up to WIDTH branches (random shadow maps and
// free-list heads), resolve a random in-flight branch correctly or as a
// mispredict, or squash. Checked every cycle: the GBM, the lowest free IDs and
// the free count; on a mispredict, the restored shadow map, free-list head and
// phase, and the GBM the branch's snapshot leaves behind (with bits of
// branches resolved since then already cleared).
module tb_branch_ckpt;
  localparam int N_BRANCH = 64, N_LOG = 64, N_PHYS = 320, WIDTH = 4;
  localparam int FL_SIZE = N_PHYS - N_LOG;
  localparam int PW = $clog2(N_PHYS), FW = $clog2(FL_SIZE), BW = $clog2(N_BRANCH);

  logic clk = 0, rst_n = 0;
  logic [N_BRANCH-1:0] gbm;
  logic [WIDTH-1:0][BW-1:0] free_ids;
  logic [$clog2(N_BRANCH+1)-1:0] free_cnt;
  logic [WIDTH-1:0] ck_valid = 0;
  logic [WIDTH-1:0][N_LOG-1:0][PW-1:0] ck_rmt = '0;
  logic [WIDTH-1:0][FW-1:0] ck_fl_head = '0;
  logic [WIDTH-1:0] ck_fl_phase = 0;
  logic [WIDTH-1:0][N_BRANCH-1:0] ck_gbm = '0;
  logic res_valid = 0, res_correct = 0, squash = 0;
  logic [BW-1:0] res_id = 0;
  logic [N_LOG-1:0][PW-1:0] rs_rmt;
  logic [FW-1:0] rs_fl_head;
  logic rs_fl_phase;

  branch_ckpt #(.N_BRANCH(N_BRANCH), .N_LOG(N_LOG), .N_PHYS(N_PHYS), .WIDTH(WIDTH)) dut (.*);

  always #5 clk = ~clk;

  logic [N_BRANCH-1:0] m_gbm;
  logic [N_LOG-1:0][PW-1:0] m_rmt [N_BRANCH];
  logic [FW-1:0] m_head [N_BRANCH];
  logic m_phase [N_BRANCH];
  logic [N_BRANCH-1:0] m_sgbm [N_BRANCH];
  int checks = 0, failures = 0, n_misp = 0, n_corr = 0, n_full = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic compare();
    int n;
    n = 0;
    check(gbm == m_gbm, "gbm");
    for (int b = 0; b < N_BRANCH; b++)
      if (!m_gbm[b]) begin
        if (n < WIDTH) check(int'(free_ids[n]) == b, "free_ids");
        n++;
      end
    check(int'(free_cnt) == n, "free_cnt");
  endtask

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    m_gbm = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 10000; cyc++) begin
      int r;
      @(negedge clk);
      compare();
      if (m_gbm == '1) n_full++;
      r = $urandom_range(0, 99);
      ck_valid = 0; res_valid = 0; squash = 0;
      if (r == 0) begin
        squash = 1; m_gbm = '0;
      end else begin
        logic [N_BRANCH-1:0] clr, g;
        int nb, n, ids[$];
        clr = '0;
        ids.delete();
        if (m_gbm != '0 && r < 45) begin
          int b;
          do b = $urandom_range(0, N_BRANCH - 1); while (!m_gbm[b]);
          res_valid = 1; res_id = BW'(b); res_correct = (r >= 12);
        end
        #1;
        if (res_valid && !res_correct) begin
          check(rs_rmt == m_rmt[res_id] && rs_fl_head == m_head[res_id] &&
                rs_fl_phase == m_phase[res_id], "restore snapshot");
          m_gbm = m_sgbm[res_id] & ~(N_BRANCH'(1) << res_id);
          n_misp++;
        end else begin
          if (res_valid) begin
            clr = N_BRANCH'(1) << res_id;
            n_corr++;
          end
          g = m_gbm;
          for (int b = 0; b < N_BRANCH; b++) if (!g[b]) ids.push_back(b);
          nb = $urandom_range(0, WIDTH);
          if (nb > ids.size()) nb = ids.size();
          for (int b = 0; b < N_BRANCH; b++) m_sgbm[b] &= ~clr;
          for (int k = 0; k < nb; k++) begin
            ck_valid[k] = 1;
            for (int l = 0; l < N_LOG; l++) ck_rmt[k][l] = PW'($urandom_range(0, N_PHYS - 1));
            ck_fl_head[k] = FW'($urandom); ck_fl_phase[k] = 1'($urandom);
            ck_gbm[k] = m_gbm | g;
            m_rmt[ids[k]] = ck_rmt[k]; m_head[ids[k]] = ck_fl_head[k];
            m_phase[ids[k]] = ck_fl_phase[k]; m_sgbm[ids[k]] = ck_gbm[k] & ~clr;
            g[ids[k]] = 1;
          end
          m_gbm = g & ~clr;
        end
      end
    end
    check(n_misp > 0 && n_corr > 0 && n_full > 0, "coverage");
    $display("mispredicts=%0d correct=%0d full=%0d", n_misp, n_corr, n_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
