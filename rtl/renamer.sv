// renamer: register renaming for a WIDTH-wide out-of-order core.
//
// Eight structures cooperate: the speculative map (RMT), the committed map
// (AMT), the free list and active list (circular buffers with phase bits), the
// global branch mask with its checkpoints, and the physical register file with
// its ready bits. The register file sits next to this module (see prf) so that
// other pipeline stages can reach its ports; everything else is here.
//
// Rename + dispatch (one cycle): a bundle arrives in slots 0..n-1 (valid slots
// contiguous from slot 0). Slot k's sources (A, B, D) read the RMT as updated
// by the destinations of slots 0..k-1, so dependences inside the bundle are
// honoured. Each destination takes the next free-list register; each branch
// flagged ren_ckpt takes the next free branch ID and a checkpoint of the RMT
// and free-list head as they stand after its own destination. Every slot gets
// the GBM (plus earlier branches of the bundle) as its branch mask and an
// active-list entry. The bundle is taken (ren_fire) when ren_go is high and no
// stall_reg / stall_branch / stall_dispatch, recovery or squash is pending.
//
// Branch resolve: correct -> the branch's GBM bit is freed. Mispredict -> the
// RMT, free-list head and GBM come back from the checkpoint and the active-list
// tail moves to the slot after the branch, all on the next edge.
//
// Retire: retire_ok_n counts the leading head entries that are complete and
// carry no exception, load-violation or branch-mispredict bit; an entry with
// the value-mispredict bit (head_vm) may be counted but ends the run, because
// its own result is correct. squash_req says the head is complete with an
// exception, load violation or branch mispredict. The caller answers with
// commit_n (at most retire_ok_n): each committed destination updates the AMT
// and its previous mapping goes back to the free-list tail. And/or with
// squash: RMT := AMT (including this cycle's commits), GBM cleared, active
// list emptied, free list rebuilt from the AMT (the caller marks every
// register ready). An exception or load-violation head is not committed; a
// value-mispredicted one is committed in the same cycle as the squash.
//
// The structures and both recovery paths follow the design description;
// folding rename and dispatch into one cycle is this design's choice.
module renamer #(
  parameter int unsigned WIDTH    = vp_pkg::WIDTH,
  parameter int unsigned N_LOG    = vp_pkg::N_LOG,
  parameter int unsigned N_PHYS   = vp_pkg::N_PHYS,
  parameter int unsigned AL_SIZE  = vp_pkg::AL_SIZE,
  parameter int unsigned N_BRANCH = vp_pkg::N_BRANCH,
  parameter int unsigned PC_BITS  = vp_pkg::PC_BITS,
  localparam int unsigned FL_SIZE = N_PHYS - N_LOG,
  localparam int unsigned LW = $clog2(N_LOG),
  localparam int unsigned PW = $clog2(N_PHYS),
  localparam int unsigned AW = $clog2(AL_SIZE),
  localparam int unsigned FW = $clog2(FL_SIZE),
  localparam int unsigned BW = $clog2(N_BRANCH),
  localparam int unsigned CW = $clog2(WIDTH + 1)
) (
  input  logic                             clk,
  input  logic                             rst_n,
  // rename / dispatch bundle
  input  logic [WIDTH-1:0]                 ren_valid,
  input  logic [WIDTH-1:0][2:0]            ren_src_valid,
  input  logic [WIDTH-1:0][2:0][LW-1:0]    ren_src_log,
  input  logic [WIDTH-1:0]                 ren_dst_valid,
  input  logic [WIDTH-1:0][LW-1:0]         ren_dst_log,
  input  logic [WIDTH-1:0]                 ren_ckpt,
  input  logic [WIDTH-1:0]                 ren_load,
  input  logic [WIDTH-1:0]                 ren_store,
  input  logic [WIDTH-1:0]                 ren_branch,
  input  logic [WIDTH-1:0]                 ren_vp,
  input  logic [WIDTH-1:0][PC_BITS-1:0]    ren_pc,
  input  logic                             ren_go,
  output logic                             ren_fire,
  output logic                             stall_reg,
  output logic                             stall_branch,
  output logic                             stall_dispatch,
  output logic [WIDTH-1:0][2:0][PW-1:0]    src_phys,
  output logic [WIDTH-1:0][PW-1:0]         dst_phys,
  output logic [WIDTH-1:0][AW-1:0]         al_idx,
  output logic [WIDTH-1:0][BW-1:0]         branch_id,
  output logic [WIDTH-1:0][N_BRANCH-1:0]   branch_mask,
  // writeback / fault signalling
  input  logic [WIDTH-1:0]                 cmp_valid,
  input  logic [WIDTH-1:0][AW-1:0]         cmp_idx,
  input  logic [WIDTH-1:0]                 vm_valid,
  input  logic [WIDTH-1:0][AW-1:0]         vm_idx,
  input  logic                             exc_valid,
  input  logic [AW-1:0]                    exc_idx,
  input  logic                             lv_valid,
  input  logic [AW-1:0]                    lv_idx,
  // branch resolve
  input  logic                             res_valid,
  input  logic [AW-1:0]                    res_al_idx,
  input  logic [BW-1:0]                    res_id,
  input  logic                             res_correct,
  // retire
  output logic [WIDTH-1:0]                 head_valid,
  output logic [WIDTH-1:0]                 head_dst_valid,
  output logic [WIDTH-1:0][LW-1:0]         head_log,
  output logic [WIDTH-1:0][PW-1:0]         head_phys,
  output logic [WIDTH-1:0]                 head_vp,
  output logic [WIDTH-1:0]                 head_vm,
  output logic [WIDTH-1:0][PC_BITS-1:0]    head_pc,
  output logic [CW-1:0]                    retire_ok_n,
  output logic                             squash_req,
  input  logic [CW-1:0]                    commit_n,
  input  logic                             squash,
  output logic [AW-1:0]                    al_head,
  output logic [N_BRANCH-1:0]              gbm,
  output logic [N_LOG-1:0][PW-1:0]         amt_map,
  output logic [$clog2(AL_SIZE+1)-1:0]     al_used
);

  // ---------------------------------------------------------------- maps
  logic [N_LOG-1:0][PW-1:0] rmt, amt;
  assign amt_map = amt;

  // ---------------------------------------------------------------- sub-blocks
  logic [WIDTH-1:0][PW-1:0] fl_head_regs;
  logic [$clog2(FL_SIZE+1)-1:0] fl_free;
  logic [CW-1:0] fl_pop_n, fl_push_n;
  logic [WIDTH-1:0][PW-1:0] fl_push_regs;
  logic [FW-1:0] fl_head, rs_fl_head;
  logic          fl_head_phase, rs_fl_phase;
  logic [N_LOG-1:0][PW-1:0] amt_next, rs_rmt;

  logic [WIDTH-1:0][BW-1:0] free_ids;
  logic [$clog2(N_BRANCH+1)-1:0] br_free;
  logic [WIDTH-1:0] ck_valid;
  logic [WIDTH-1:0][N_LOG-1:0][PW-1:0] ck_rmt;
  logic [WIDTH-1:0][FW-1:0] ck_fl_head;
  logic [WIDTH-1:0] ck_fl_phase;
  logic [WIDTH-1:0][N_BRANCH-1:0] ck_gbm;

  logic [CW-1:0] disp_n;
  logic [$clog2(AL_SIZE+1)-1:0] al_free;
  logic [WIDTH-1:0] h_complete, h_exc, h_lv, h_brm;


  logic mispredict;
  assign mispredict = res_valid && !res_correct && !squash;

  free_list #(.N_PHYS(N_PHYS), .N_LOG(N_LOG), .WIDTH(WIDTH)) u_fl (
    .clk, .rst_n,
    .pop_n(fl_pop_n), .head_regs(fl_head_regs), .free_cnt(fl_free),
    .push_n(fl_push_n), .push_regs(fl_push_regs),
    .restore_en(mispredict), .restore_head(rs_fl_head), .restore_phase(rs_fl_phase),
    .rebuild_en(squash), .amt_map(amt_next),
    .head(fl_head), .head_phase(fl_head_phase));

  branch_ckpt #(.N_BRANCH(N_BRANCH), .N_LOG(N_LOG), .N_PHYS(N_PHYS), .WIDTH(WIDTH)) u_bc (
    .clk, .rst_n, .gbm, .free_ids, .free_cnt(br_free),
    .ck_valid, .ck_rmt, .ck_fl_head, .ck_fl_phase, .ck_gbm,
    .res_valid(res_valid && !squash), .res_id, .res_correct,
    .rs_rmt, .rs_fl_head, .rs_fl_phase, .squash);

  active_list #(.AL_SIZE(AL_SIZE), .WIDTH(WIDTH), .N_LOG(N_LOG), .N_PHYS(N_PHYS),
                .PC_BITS(PC_BITS)) u_al (
    .clk, .rst_n,
    .disp_n, .disp_dst_valid(ren_dst_valid), .disp_log(ren_dst_log), .disp_phys(dst_phys),
    .disp_load(ren_load), .disp_store(ren_store), .disp_branch(ren_branch), .disp_vp(ren_vp),
    .disp_pc(ren_pc), .disp_idx(al_idx), .free_cnt(al_free),
    .cmp_valid, .cmp_idx, .vm_valid, .vm_idx, .exc_valid, .exc_idx, .lv_valid, .lv_idx,
    .rollback_en(mispredict), .rollback_idx(res_al_idx),
    .head_valid, .head_idx(), .head_dst_valid, .head_log, .head_phys,
    .head_complete(h_complete), .head_exc(h_exc), .head_lv(h_lv), .head_brm(h_brm),
    .head_vm, .head_load(), .head_store(), .head_branch(),
    .head_vp, .head_pc, .commit_n, .squash, .al_head, .used_cnt(al_used));

  // ---------------------------------------------------------------- rename
  function automatic logic [FW:0] fl_advance(input logic [FW-1:0] p, input logic ph,
                                            input int unsigned n);
    int unsigned s;
    s = int'(p) + n;
    if (s >= FL_SIZE) return {~ph, FW'(s - FL_SIZE)};
    return {ph, FW'(s)};
  endfunction

  logic [N_LOG-1:0][PW-1:0] rmt_ren;
  int unsigned need_regs, need_br, n_valid;
  logic [N_BRANCH-1:0] res_clr;
  assign res_clr = (res_valid && res_correct) ? (N_BRANCH'(1) << res_id) : '0;

  always_comb begin
    logic [N_BRANCH-1:0] mask;
    rmt_ren   = rmt;
    need_regs = 0;
    need_br   = 0;
    n_valid   = 0;
    mask      = gbm;
    src_phys  = '0;
    dst_phys  = '0;
    branch_id = '0;
    branch_mask = '0;
    ck_rmt = '0; ck_fl_head = '0; ck_fl_phase = '0; ck_gbm = '0;
    for (int k = 0; k < WIDTH; k++) begin
      if (ren_valid[k]) begin
        n_valid++;
        for (int s = 0; s < 3; s++)
          if (ren_src_valid[k][s]) src_phys[k][s] = rmt_ren[ren_src_log[k][s]];
        branch_mask[k] = mask & ~res_clr;
        if (ren_dst_valid[k]) begin
          dst_phys[k] = fl_head_regs[need_regs];
          rmt_ren[ren_dst_log[k]] = fl_head_regs[need_regs];
          need_regs++;
        end
        if (ren_ckpt[k]) begin
          branch_id[k] = free_ids[need_br];
          ck_rmt[need_br] = rmt_ren;
          {ck_fl_phase[need_br], ck_fl_head[need_br]} =
              fl_advance(fl_head, fl_head_phase, need_regs);
          ck_gbm[need_br] = mask;
          mask[free_ids[need_br]] = 1'b1;
          need_br++;
        end
      end
    end
    stall_reg      = need_regs > int'(fl_free);
    stall_branch   = need_br > int'(br_free);
    stall_dispatch = n_valid > int'(al_free);
    ren_fire = ren_go && (n_valid != 0) && !stall_reg && !stall_branch && !stall_dispatch &&
               !(res_valid && !res_correct) && !squash;
    fl_pop_n = ren_fire ? CW'(need_regs) : '0;
    disp_n   = ren_fire ? CW'(n_valid) : '0;
    for (int b = 0; b < WIDTH; b++) ck_valid[b] = ren_fire && (b < need_br);
  end

  // ---------------------------------------------------------------- retire
  always_comb begin
    logic stop;
    stop = 1'b0;
    retire_ok_n = '0;
    for (int k = 0; k < WIDTH; k++) begin
      if (!head_valid[k] || !h_complete[k] || h_exc[k] || h_lv[k] || h_brm[k])
        stop = 1'b1;
      if (!stop) retire_ok_n = CW'(k + 1);
      // a value-mispredicted entry holds its correct result: it may retire,
      // but nothing after it in the same cycle
      if (head_vm[k]) stop = 1'b1;
    end
    squash_req = head_valid[0] && h_complete[0] && (h_exc[0] || h_lv[0] || h_brm[0]);
  end

  always_comb begin
    int unsigned p;
    amt_next = amt;
    fl_push_regs = '0;
    p = 0;
    for (int k = 0; k < WIDTH; k++)
      if (k < int'(commit_n) && head_dst_valid[k]) begin
        fl_push_regs[p] = amt_next[head_log[k]];
        amt_next[head_log[k]] = head_phys[k];
        p++;
      end
    fl_push_n = CW'(p);
  end

  // ---------------------------------------------------------------- map state
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int l = 0; l < N_LOG; l++) begin
        rmt[l] <= PW'(l);
        amt[l] <= PW'(l);
      end
    end else begin
      amt <= amt_next;
      if (squash)          rmt <= amt_next;
      else if (mispredict) rmt <= rs_rmt;
      else if (ren_fire)   rmt <= rmt_ren;
    end
  end

  always @(posedge clk)
    if (rst_n && !squash)
      assert (int'(commit_n) <= int'(retire_ok_n))
        else $error("renamer: committing an entry that is not ready to retire");

endmodule
