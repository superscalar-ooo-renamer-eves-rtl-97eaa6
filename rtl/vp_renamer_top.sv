// vp_renamer_top: rename, dispatch, writeback and retire core of an
// out-of-order pipeline with stride value prediction under VR-1 recovery.
//
// It joins the register renamer, the physical register file, the stride value
// predictor (SVP), the value prediction queue (VPQ) and the three parts of the
// confidence layer (probabilistic counter gate, cooldown, SafeStride). The
// fetch/decode front end, the issue queue and the execution lanes are outside:
// their signals are this module's ports.
//
// Per cycle:
//   * Rename/dispatch: the incoming bundle (in_*) is renamed and written into
//     the active list in one cycle when in_ready is high. Each slot that writes
//     a register and has a value-prediction type (in_vtype != VT_NONE) looks up
//     the SVP and takes a VPQ entry. Its prediction is used when the entry is
//     confident (counter saturated), value prediction is on (vp_en) and, with
//     the confidence layer on (eves_en), neither the cooldown nor SafeStride
//     holds predictions off. A used prediction is written into the register
//     file at dispatch and marked ready, so consumers can issue at once;
//     other destinations have their ready bit cleared. out_* carry the renamed
//     bundle to the issue queue.
//   * Writeback (wb_*): values are written to the register file, the active
//     list marks the instruction complete, and the VPQ compares the value with
//     a used prediction; a mismatch sets the instruction's value-mispredict
//     bit.
//   * Branch resolve (res_*): a correct branch frees its mask bit; a
//     mispredicted one restores the renamer in one cycle and then the VPQ drops
//     its younger entries one per cycle, undoing their SVP instance counts.
//     Rename waits while that walk runs.
//   * Retire: the leading completed, fault-free active-list entries retire,
//     at most one of them value-prediction eligible (the SVP has one training
//     port). That one trains the SVP with its actual value, its confidence
//     increment gated by the probabilistic counter for its type. A head that
//     completed with an exception or load violation instead causes a full
//     squash without retiring: the renamer returns to the committed state,
//     every register becomes ready, the VPQ empties and all SVP instance
//     counts clear. A value-mispredicted instruction (VR-1) retires and trains
//     like any other, since its register holds the correct result, and the
//     same full squash removes everything behind it; it also starts the
//     cooldown and counts a miss in SafeStride (squash_vm).
// The structure follows the design description; folding rename and dispatch
// into one cycle, writing used predictions into the register file and the
// one-eligible-retire-per-cycle rule are this design's choices, as is retiring
// the value-mispredicted instruction itself before the squash (re-fetching it
// would meet the same untrained prediction again).
module vp_renamer_top #(
  parameter int unsigned WIDTH       = vp_pkg::WIDTH,
  parameter int unsigned N_LOG       = vp_pkg::N_LOG,
  parameter int unsigned N_PHYS      = vp_pkg::N_PHYS,
  parameter int unsigned AL_SIZE     = vp_pkg::AL_SIZE,
  parameter int unsigned N_BRANCH    = vp_pkg::N_BRANCH,
  parameter int unsigned VPQ_SIZE    = vp_pkg::VPQ_SIZE,
  parameter int unsigned SVP_ENTRIES = vp_pkg::SVP_ENTRIES,
  parameter int unsigned XLEN        = vp_pkg::XLEN,
  parameter int unsigned PC_BITS     = vp_pkg::PC_BITS,
  parameter int unsigned COOLDOWN    = vp_pkg::COOLDOWN,
  parameter int unsigned SS_PERIOD   = vp_pkg::SS_PERIOD,
  localparam int unsigned LW = $clog2(N_LOG),
  localparam int unsigned PW = $clog2(N_PHYS),
  localparam int unsigned AW = $clog2(AL_SIZE),
  localparam int unsigned BW = $clog2(N_BRANCH),
  localparam int unsigned CW = $clog2(WIDTH + 1),
  localparam int unsigned NRD = 3 * WIDTH
) (
  input  logic                               clk,
  input  logic                               rst_n,
  input  logic                               vp_en,
  input  logic                               eves_en,
  // decoded bundle
  input  logic [WIDTH-1:0]                   in_valid,
  input  logic [WIDTH-1:0][2:0]              in_src_valid,
  input  logic [WIDTH-1:0][2:0][LW-1:0]      in_src_log,
  input  logic [WIDTH-1:0]                   in_dst_valid,
  input  logic [WIDTH-1:0][LW-1:0]           in_dst_log,
  input  logic [WIDTH-1:0]                   in_ckpt,
  input  logic [WIDTH-1:0]                   in_load,
  input  logic [WIDTH-1:0]                   in_store,
  input  logic [WIDTH-1:0]                   in_branch,
  input  vp_pkg::vtype_e [WIDTH-1:0]         in_vtype,
  input  logic [WIDTH-1:0][PC_BITS-1:0]      in_pc,
  output logic                               in_ready,
  output logic                               stall_reg,
  output logic                               stall_branch,
  output logic                               stall_dispatch,
  output logic                               stall_vpq,
  // renamed bundle to the issue queue
  output logic [WIDTH-1:0]                   out_valid,
  output logic [WIDTH-1:0][2:0][PW-1:0]      out_src_phys,
  output logic [WIDTH-1:0][PW-1:0]           out_dst_phys,
  output logic [WIDTH-1:0][AW-1:0]           out_al_idx,
  output logic [WIDTH-1:0][BW-1:0]           out_branch_id,
  output logic [WIDTH-1:0][N_BRANCH-1:0]     out_branch_mask,
  output logic [WIDTH-1:0]                   out_vp_used,
  output logic [WIDTH-1:0][XLEN-1:0]         out_vp_value,
  // register read
  input  logic [NRD-1:0][PW-1:0]             rd_addr,
  output logic [NRD-1:0][XLEN-1:0]           rd_data,
  output logic [NRD-1:0]                     rd_ready,
  // writeback lanes
  input  logic [WIDTH-1:0]                   wb_valid,
  input  logic [WIDTH-1:0][AW-1:0]           wb_al_idx,
  input  logic [WIDTH-1:0]                   wb_dst_valid,
  input  logic [WIDTH-1:0][PW-1:0]           wb_phys,
  input  logic [WIDTH-1:0][XLEN-1:0]         wb_value,
  output logic [WIDTH-1:0]                   wb_val_misp,
  // branch resolve and faults
  input  logic                               res_valid,
  input  logic [AW-1:0]                      res_al_idx,
  input  logic [BW-1:0]                      res_id,
  input  logic                               res_correct,
  input  logic                               exc_valid,
  input  logic [AW-1:0]                      exc_idx,
  input  logic                               lv_valid,
  input  logic [AW-1:0]                      lv_idx,
  // retire and recovery
  output logic [CW-1:0]                      retire_n,
  output logic                               squash_out,
  output logic                               squash_vm,
  output logic                               vpq_busy,
  output logic                               train_valid,
  output logic                               cooldown_active,
  output logic                               ss_disable,
  output logic [N_LOG-1:0][PW-1:0]           amt_map
);

  import vp_pkg::*;

  // ------------------------------------------------------------ signals
  logic ren_go, ren_fire;
  logic [WIDTH-1:0][PW-1:0] dst_phys;
  logic [WIDTH-1:0][AW-1:0] al_idx;
  logic [WIDTH-1:0] head_valid, head_dst_valid, head_vp, head_vm;
  logic [WIDTH-1:0][LW-1:0] head_log;
  logic [WIDTH-1:0][PW-1:0] head_phys;
  logic [WIDTH-1:0][PC_BITS-1:0] head_pc;
  logic [CW-1:0] retire_ok_n, commit_n;
  logic squash_req, squash;  // squash_vm is an output
  logic [AW-1:0] al_head;
  logic [WIDTH-1:0] vm_valid;

  logic [WIDTH-1:0] elig, pr_hit, pr_alloc, confident, used;
  logic [WIDTH-1:0][XLEN-1:0] pr_value;
  logic [WIDTH-1:0][CONF_BITS-1:0] pr_conf;
  logic [$clog2(VPQ_SIZE+1)-1:0] vpq_free;
  logic [WIDTH-1:0] wb_match, wb_misp;
  logic hd_valid, hd_used, hd_counted;
  logic [AW-1:0] hd_al_idx;
  logic [PC_BITS-1:0] hd_pc, un_pc;
  logic [1:0] hd_vtype;
  logic [XLEN-1:0] hd_actual;
  logic un_valid, rb_start;
  logic tr_valid, tr_inc_en;
  logic cd_active, ss_off;

  // ------------------------------------------------------------ dispatch side
  always_comb begin
    int unsigned need;
    need = 0;
    for (int k = 0; k < WIDTH; k++) begin
      elig[k] = vp_en && in_valid[k] && in_dst_valid[k] && in_vtype[k] != VT_NONE;
      if (elig[k]) need++;
    end
    stall_vpq = need > int'(vpq_free);
  end

  always_comb
    for (int k = 0; k < WIDTH; k++) begin
      confident[k] = pr_hit[k] && (pr_conf[k] == '1);
      used[k] = elig[k] && confident[k] && !(eves_en && (cd_active || ss_off));
    end

  assign ren_go   = (in_valid != '0) && !stall_vpq && !vpq_busy;
  assign in_ready = ren_fire;
  assign pr_alloc = elig & {WIDTH{ren_fire}};

  renamer #(.WIDTH(WIDTH), .N_LOG(N_LOG), .N_PHYS(N_PHYS), .AL_SIZE(AL_SIZE),
            .N_BRANCH(N_BRANCH), .PC_BITS(PC_BITS)) u_ren (
    .clk, .rst_n,
    .ren_valid(in_valid), .ren_src_valid(in_src_valid), .ren_src_log(in_src_log),
    .ren_dst_valid(in_dst_valid), .ren_dst_log(in_dst_log), .ren_ckpt(in_ckpt),
    .ren_load(in_load), .ren_store(in_store), .ren_branch(in_branch), .ren_vp(elig),
    .ren_pc(in_pc), .ren_go, .ren_fire, .stall_reg, .stall_branch, .stall_dispatch,
    .src_phys(out_src_phys), .dst_phys, .al_idx, .branch_id(out_branch_id),
    .branch_mask(out_branch_mask),
    .cmp_valid(wb_valid), .cmp_idx(wb_al_idx), .vm_valid, .vm_idx(wb_al_idx),
    .exc_valid, .exc_idx, .lv_valid, .lv_idx,
    .res_valid, .res_al_idx, .res_id, .res_correct,
    .head_valid, .head_dst_valid, .head_log, .head_phys, .head_vp, .head_vm, .head_pc,
    .retire_ok_n, .squash_req, .commit_n, .squash, .al_head, .gbm(), .amt_map,
    .al_used());

  assign out_valid    = in_valid & {WIDTH{ren_fire}};
  assign out_dst_phys = dst_phys;
  assign out_al_idx   = al_idx;
  assign out_vp_used  = used & {WIDTH{ren_fire}};
  assign out_vp_value = pr_value;

  // ------------------------------------------------------------ register file
  logic [2*WIDTH-1:0] wr_en;
  logic [2*WIDTH-1:0][PW-1:0] wr_addr;
  logic [2*WIDTH-1:0][XLEN-1:0] wr_data;
  logic [WIDTH-1:0] clr_en;
  always_comb
    for (int k = 0; k < WIDTH; k++) begin
      wr_en[k]           = wb_valid[k] && wb_dst_valid[k];
      wr_addr[k]         = wb_phys[k];
      wr_data[k]         = wb_value[k];
      wr_en[WIDTH + k]   = ren_fire && used[k];
      wr_addr[WIDTH + k] = dst_phys[k];
      wr_data[WIDTH + k] = pr_value[k];
      clr_en[k]          = ren_fire && in_valid[k] && in_dst_valid[k] && !used[k];
    end

  prf #(.N_PHYS(N_PHYS), .XLEN(XLEN), .NRD(NRD), .NWR(2 * WIDTH), .NCLR(WIDTH)) u_prf (
    .clk, .rst_n, .rd_addr, .rd_data, .rd_ready,
    .wr_en, .wr_addr, .wr_data, .clr_en, .clr_addr(dst_phys), .all_ready(squash));

  // ------------------------------------------------------------ value prediction
  svp #(.ENTRIES(SVP_ENTRIES), .WIDTH(WIDTH), .XLEN(XLEN), .PC_BITS(PC_BITS)) u_svp (
    .clk, .rst_n,
    .pr_valid(elig), .pr_pc(in_pc), .pr_hit, .pr_value, .pr_conf, .pr_alloc,
    .tr_valid, .tr_pc(hd_pc), .tr_value(hd_actual), .tr_inc_en, .tr_counted(hd_counted),
    .tr_hit(), .un_valid, .un_pc, .squash);

  logic [WIDTH-1:0][1:0] al_vtype;
  always_comb for (int k = 0; k < WIDTH; k++) al_vtype[k] = in_vtype[k];

  assign rb_start = res_valid && !res_correct && !squash;

  vpq #(.SIZE(VPQ_SIZE), .WIDTH(WIDTH), .AL_SIZE(AL_SIZE), .XLEN(XLEN), .PC_BITS(PC_BITS)) u_vpq (
    .clk, .rst_n,
    .al_valid(pr_alloc), .al_al_idx(al_idx), .al_pc(in_pc), .al_vtype, .al_pred(pr_value),
    .al_used(used), .al_counted(pr_hit), .free_cnt(vpq_free),
    .wb_valid, .wb_al_idx, .wb_value, .wb_match, .wb_misp,
    .hd_valid, .hd_al_idx, .hd_pc, .hd_vtype, .hd_used, .hd_counted, .hd_actual,
    .pop(tr_valid), .rb_start, .rb_al_head(al_head), .rb_br_idx(res_al_idx),
    .un_valid, .un_pc, .busy(vpq_busy), .squash);

  assign vm_valid    = wb_valid & wb_match & wb_misp;
  assign wb_val_misp = vm_valid;

  // ------------------------------------------------------------ retire
  always_comb begin
    int unsigned nvp;
    logic stop;
    nvp = 0;
    stop = 1'b0;
    commit_n = '0;
    tr_valid = 1'b0;
    if (!squash_req)
      for (int k = 0; k < WIDTH; k++) begin
        if (k >= int'(retire_ok_n)) stop = 1'b1;
        if (!stop && head_vp[k]) begin
          if (nvp == 1) stop = 1'b1;
          else nvp++;
        end
        if (!stop) commit_n = CW'(k + 1);
      end
    tr_valid = (nvp != 0);
    // VR-1: a value-mispredicted instruction retires (its result is correct)
    // and everything behind it is squashed in the same cycle
    squash_vm = 1'b0;
    for (int k = 0; k < WIDTH; k++)
      if (k < int'(commit_n) && head_vm[k]) squash_vm = 1'b1;
    squash = squash_req || squash_vm;
  end

  always @(posedge clk)
    if (rst_n && tr_valid)
      assert (hd_valid) else $error("vp_renamer_top: retiring an eligible instruction with no VPQ entry");

  // ------------------------------------------------------------ confidence layer
  eves_fpc u_fpc (
    .clk, .rst_n, .eves_en, .step(tr_valid), .vtype(vtype_e'(hd_vtype)),
    .inc_en(tr_inc_en), .sample());

  eves_cooldown #(.COOLDOWN(COOLDOWN), .WIDTH(WIDTH)) u_cd (
    .clk, .rst_n, .trigger(squash_vm), .retire_n(commit_n), .active(cd_active), .remaining());

  eves_safestride #(.PERIOD(SS_PERIOD), .WIDTH(WIDTH)) u_ss (
    .clk, .rst_n, .miss(squash_vm), .hit(tr_valid && !squash_vm), .retire_n(commit_n),
    .disable_vp(ss_off), .misses(), .events());

  assign retire_n        = commit_n;
  assign squash_out      = squash;
  assign train_valid     = tr_valid;
  assign cooldown_active = cd_active;
  assign ss_disable      = ss_off;

endmodule
