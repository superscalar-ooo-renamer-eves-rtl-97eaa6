// branch_ckpt: global branch mask (GBM) and the branch checkpoint pool.
//
// Every in-flight branch owns one GBM bit; the bit number is its branch ID and
// the index of its checkpoint. A checkpoint holds the shadow RMT, the free-list
// head and head phase, and the GBM as it stood when the branch was renamed
// (without the branch's own bit). The active-list tail is not saved: it is
// rebuilt from the branch's AL index.
//
// Interface and timing (state changes on the rising clock edge):
//   * free_ids[k] is the k-th lowest free ID, free_cnt how many are free
//     (combinational). A renaming bundle gives its k-th branch free_ids[k] and
//     writes ck_*[k] with ck_valid[k]; the ID's GBM bit is set.
//   * res_valid with res_correct clears bit res_id in the GBM and in every
//     stored checkpoint GBM. With res_correct low, rs_* present checkpoint
//     res_id combinationally and the GBM becomes its saved mask without bit
//     res_id (the caller restores the RMT and free-list head from rs_*).
//   * squash clears the GBM.
// The caller does not checkpoint in a cycle that restores. The behaviour
// follows the design description; clearing resolved bits in the stored masks
// is this design's addition so that a restore cannot revive a finished branch.
module branch_ckpt #(
  parameter int unsigned N_BRANCH = vp_pkg::N_BRANCH,
  parameter int unsigned N_LOG    = vp_pkg::N_LOG,
  parameter int unsigned N_PHYS   = vp_pkg::N_PHYS,
  parameter int unsigned WIDTH    = vp_pkg::WIDTH,
  localparam int unsigned FL_SIZE = N_PHYS - N_LOG,
  localparam int unsigned PW = $clog2(N_PHYS),
  localparam int unsigned FW = $clog2(FL_SIZE),
  localparam int unsigned BW = $clog2(N_BRANCH)
) (
  input  logic                                clk,
  input  logic                                rst_n,
  output logic [N_BRANCH-1:0]                 gbm,
  output logic [WIDTH-1:0][BW-1:0]            free_ids,
  output logic [$clog2(N_BRANCH+1)-1:0]       free_cnt,
  // checkpoint writes
  input  logic [WIDTH-1:0]                    ck_valid,
  input  logic [WIDTH-1:0][N_LOG-1:0][PW-1:0] ck_rmt,
  input  logic [WIDTH-1:0][FW-1:0]            ck_fl_head,
  input  logic [WIDTH-1:0]                    ck_fl_phase,
  input  logic [WIDTH-1:0][N_BRANCH-1:0]      ck_gbm,
  // resolution
  input  logic                                res_valid,
  input  logic [BW-1:0]                       res_id,
  input  logic                                res_correct,
  output logic [N_LOG-1:0][PW-1:0]            rs_rmt,
  output logic [FW-1:0]                       rs_fl_head,
  output logic                                rs_fl_phase,
  input  logic                                squash
);

  logic [N_LOG-1:0][PW-1:0] sh_rmt   [N_BRANCH];
  logic [FW-1:0]            sh_head  [N_BRANCH];
  logic                     sh_phase [N_BRANCH];
  logic [N_BRANCH-1:0]      sh_gbm   [N_BRANCH];

  // Lowest free IDs.
  always_comb begin
    int unsigned n;
    n = 0;
    free_ids = '0;
    for (int b = 0; b < N_BRANCH; b++)
      if (!gbm[b]) begin
        for (int k = 0; k < WIDTH; k++)
          if (n == k) free_ids[k] = BW'(b);
        n++;
      end
    free_cnt = $bits(free_cnt)'(n);
  end

  assign rs_rmt      = sh_rmt[res_id];
  assign rs_fl_head  = sh_head[res_id];
  assign rs_fl_phase = sh_phase[res_id];

  logic [N_BRANCH-1:0] clr_mask;
  assign clr_mask = (res_valid && res_correct) ? (N_BRANCH'(1) << res_id) : '0;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      gbm <= '0;
      for (int b = 0; b < N_BRANCH; b++) begin
        sh_rmt[b] <= '0; sh_head[b] <= '0; sh_phase[b] <= 1'b0; sh_gbm[b] <= '0;
      end
    end else if (squash) begin
      gbm <= '0;
    end else if (res_valid && !res_correct) begin
      gbm <= sh_gbm[res_id] & ~(N_BRANCH'(1) << res_id);
    end else begin
      logic [N_BRANCH-1:0] g;
      g = gbm & ~clr_mask;
      for (int b = 0; b < N_BRANCH; b++) sh_gbm[b] <= sh_gbm[b] & ~clr_mask;
      for (int k = 0; k < WIDTH; k++)
        if (ck_valid[k]) begin
          sh_rmt[free_ids[k]]   <= ck_rmt[k];
          sh_head[free_ids[k]]  <= ck_fl_head[k];
          sh_phase[free_ids[k]] <= ck_fl_phase[k];
          sh_gbm[free_ids[k]]   <= ck_gbm[k] & ~clr_mask;
          g[free_ids[k]] = 1'b1;
        end
      gbm <= g;
    end
  end

  always @(posedge clk)
    if (rst_n && res_valid && !squash)
      assert (gbm[res_id]) else $error("branch_ckpt: resolving a branch that is not in flight");

endmodule
