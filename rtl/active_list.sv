// active_list: the reorder buffer of the renamer, a circular buffer with
// phase bits.
//
// Each entry records one dispatched instruction in program order: whether it
// writes a destination, its logical and physical destination, the kind flags
// (load, store, branch, value-prediction eligible), its PC, and the status
// bits set while it is in flight (completed, exception, load violation,
// branch mispredict, value mispredict). Head and tail carry phase bits:
// equal pointers with equal phases mean empty, with opposite phases full.
//
// Interface and timing (state changes on the rising clock edge):
//   * Dispatch writes disp_n entries at the tail; disp_idx[k] is the index the
//     k-th one receives (valid in the same cycle, from the current tail).
//   * cmp_*, vm_* (one port per writeback lane), exc_* and lv_* set status bits
//     of the addressed entry.
//   * rollback_en moves the tail to the slot after rollback_idx: everything
//     younger than a mispredicted branch is dropped. The branch's own br_misp
//     bit is left clear, as recovery is already done.
//   * head_* show the WIDTH oldest entries (head_valid[k] when the k-th exists);
//     commit_n retires that many. squash empties the list.
// Behaviour follows the design description; the field list beyond the four
// fault bits is this design's choice.
module active_list #(
  parameter int unsigned AL_SIZE = vp_pkg::AL_SIZE,
  parameter int unsigned WIDTH   = vp_pkg::WIDTH,
  parameter int unsigned N_LOG   = vp_pkg::N_LOG,
  parameter int unsigned N_PHYS  = vp_pkg::N_PHYS,
  parameter int unsigned PC_BITS = vp_pkg::PC_BITS,
  localparam int unsigned AW = $clog2(AL_SIZE),
  localparam int unsigned LW = $clog2(N_LOG),
  localparam int unsigned PW = $clog2(N_PHYS),
  localparam int unsigned CW = $clog2(WIDTH + 1)
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // dispatch
  input  logic [CW-1:0]                disp_n,
  input  logic [WIDTH-1:0]             disp_dst_valid,
  input  logic [WIDTH-1:0][LW-1:0]     disp_log,
  input  logic [WIDTH-1:0][PW-1:0]     disp_phys,
  input  logic [WIDTH-1:0]             disp_load,
  input  logic [WIDTH-1:0]             disp_store,
  input  logic [WIDTH-1:0]             disp_branch,
  input  logic [WIDTH-1:0]             disp_vp,
  input  logic [WIDTH-1:0][PC_BITS-1:0] disp_pc,
  output logic [WIDTH-1:0][AW-1:0]     disp_idx,
  output logic [$clog2(AL_SIZE+1)-1:0] free_cnt,
  // status updates
  input  logic [WIDTH-1:0]             cmp_valid,
  input  logic [WIDTH-1:0][AW-1:0]     cmp_idx,
  input  logic [WIDTH-1:0]             vm_valid,
  input  logic [WIDTH-1:0][AW-1:0]     vm_idx,
  input  logic                         exc_valid,
  input  logic [AW-1:0]                exc_idx,
  input  logic                         lv_valid,
  input  logic [AW-1:0]                lv_idx,
  // branch mispredict
  input  logic                         rollback_en,
  input  logic [AW-1:0]                rollback_idx,
  // retire
  output logic [WIDTH-1:0]             head_valid,
  output logic [WIDTH-1:0][AW-1:0]     head_idx,
  output logic [WIDTH-1:0]             head_dst_valid,
  output logic [WIDTH-1:0][LW-1:0]     head_log,
  output logic [WIDTH-1:0][PW-1:0]     head_phys,
  output logic [WIDTH-1:0]             head_complete,
  output logic [WIDTH-1:0]             head_exc,
  output logic [WIDTH-1:0]             head_lv,
  output logic [WIDTH-1:0]             head_brm,
  output logic [WIDTH-1:0]             head_vm,
  output logic [WIDTH-1:0]             head_load,
  output logic [WIDTH-1:0]             head_store,
  output logic [WIDTH-1:0]             head_branch,
  output logic [WIDTH-1:0]             head_vp,
  output logic [WIDTH-1:0][PC_BITS-1:0] head_pc,
  input  logic [CW-1:0]                commit_n,
  input  logic                         squash,
  output logic [AW-1:0]                al_head,
  output logic [$clog2(AL_SIZE+1)-1:0] used_cnt
);

  typedef struct packed {
    logic               dst_valid;
    logic [LW-1:0]      log_reg;
    logic [PW-1:0]      phys_reg;
    logic               load;
    logic               store;
    logic               branch;
    logic               vp;
    logic [PC_BITS-1:0] pc;
  } al_entry_t;

  al_entry_t          ent [AL_SIZE];
  logic [AL_SIZE-1:0] completed, exc, lv, brm, vm;
  logic [AW-1:0]      head, tail;
  logic               head_phase, tail_phase;

  function automatic logic [AW-1:0] slot(input logic [AW-1:0] p, input int unsigned k);
    int unsigned s;
    s = int'(p) + k;
    if (s >= AL_SIZE) s -= AL_SIZE;
    return AW'(s);
  endfunction

  function automatic logic [AW:0] advance(input logic [AW-1:0] p, input logic ph,
                                         input int unsigned n);
    int unsigned s;
    s = int'(p) + n;
    if (s >= AL_SIZE) return {~ph, AW'(s - AL_SIZE)};
    return {ph, AW'(s)};
  endfunction

  always_comb begin
    if (head_phase == tail_phase) used_cnt = $bits(used_cnt)'(int'(tail) - int'(head));
    else                          used_cnt = $bits(used_cnt)'(AL_SIZE - int'(head) + int'(tail));
    free_cnt = $bits(free_cnt)'(AL_SIZE - int'(used_cnt));
    al_head  = head;
    for (int k = 0; k < WIDTH; k++) begin
      logic [AW-1:0] s;
      s = slot(head, k);
      disp_idx[k]       = slot(tail, k);
      head_valid[k]     = k < int'(used_cnt);
      head_idx[k]       = s;
      head_dst_valid[k] = ent[s].dst_valid;
      head_log[k]       = ent[s].log_reg;
      head_phys[k]      = ent[s].phys_reg;
      head_load[k]      = ent[s].load;
      head_store[k]     = ent[s].store;
      head_branch[k]    = ent[s].branch;
      head_vp[k]        = ent[s].vp;
      head_pc[k]        = ent[s].pc;
      head_complete[k]  = completed[s];
      head_exc[k]       = exc[s];
      head_lv[k]        = lv[s];
      head_brm[k]       = brm[s];
      head_vm[k]        = vm[s];
    end
  end

  // Tail after a rollback: the slot after the branch, with the phase the
  // branch slot has (head phase if it lies at or after the head, else the
  // opposite), toggled if the step wraps.
  logic [AW:0] rb_tail;
  always_comb begin
    logic ph;
    ph = (rollback_idx >= head) ? head_phase : ~head_phase;
    rb_tail = advance(rollback_idx, ph, 1);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      head <= '0; tail <= '0; head_phase <= 1'b0; tail_phase <= 1'b0;
      completed <= '0; exc <= '0; lv <= '0; brm <= '0; vm <= '0;
      for (int s = 0; s < AL_SIZE; s++) ent[s] <= '0;
    end else if (squash) begin
      head <= '0; tail <= '0; head_phase <= 1'b0; tail_phase <= 1'b0;
    end else begin
      // status updates first; a fresh allocation below clears its own slot
      for (int k = 0; k < WIDTH; k++) begin
        if (cmp_valid[k]) completed[cmp_idx[k]] <= 1'b1;
        if (vm_valid[k])  vm[vm_idx[k]] <= 1'b1;
      end
      if (exc_valid) exc[exc_idx] <= 1'b1;
      if (lv_valid)  lv[lv_idx]   <= 1'b1;
      for (int k = 0; k < WIDTH; k++) begin
        if (k < int'(disp_n)) begin
          logic [AW-1:0] s;
          s = slot(tail, k);
          ent[s] <= '{dst_valid: disp_dst_valid[k], log_reg: disp_log[k],
                      phys_reg: disp_phys[k], load: disp_load[k], store: disp_store[k],
                      branch: disp_branch[k], vp: disp_vp[k], pc: disp_pc[k]};
          completed[s] <= 1'b0; exc[s] <= 1'b0; lv[s] <= 1'b0; brm[s] <= 1'b0; vm[s] <= 1'b0;
        end
      end
      if (rollback_en) {tail_phase, tail} <= rb_tail;
      else             {tail_phase, tail} <= advance(tail, tail_phase, int'(disp_n));
      {head_phase, head} <= advance(head, head_phase, int'(commit_n));
    end
  end

  always @(posedge clk)
    if (rst_n && !squash) begin
      if (!rollback_en) assert (int'(disp_n) <= int'(free_cnt)) else $error("active_list: dispatch overflow");
      assert (int'(commit_n) <= int'(used_cnt)) else $error("active_list: commit underflow");
    end

endmodule
