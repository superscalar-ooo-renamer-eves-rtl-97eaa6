// vpq: value prediction queue.
//
// Holds every in-flight instruction that is eligible for value prediction, in
// program order, in a circular buffer with phase bits. An entry records the
// instruction's active-list index (the search key), its PC, type, the
// predicted value, whether the prediction was used (confident and not gated
// off), whether the predictor counted it as an in-flight instance, and, once
// it has executed, the actual value.
//
// Interface and timing:
//   * Allocate: slots with al_valid set get consecutive entries at the tail
//     (slot order) on the edge; free_cnt tells the caller how many fit.
//   * Writeback (WIDTH ports): each port searches the queue for wb_al_idx, an
//     associative match. wb_misp is high, in the same cycle, when the matching
//     entry's prediction was used and differs from wb_value. The actual value
//     is stored on the edge.
//   * Retire: hd_* show the oldest entry; pop removes it.
//   * Branch mispredict: rb_start with the active-list head and the branch's
//     index counts the entries younger than the branch. They are then removed
//     from the tail one per cycle; each one that the predictor counted is
//     shown on un_valid/un_pc so its instance count can be undone. busy is high
//     while entries remain to be removed. A further rb_start during the walk
//     (an older branch) recounts from the current contents. Ages are taken
//     modulo AL_SIZE, which must be a power of two.
//   * squash empties the queue.
// The association by active-list index and the drain on retire and squash
// follow the design description; the one-entry-per-cycle rollback walk is this
// design's choice.
module vpq #(
  parameter int unsigned SIZE    = vp_pkg::VPQ_SIZE,
  parameter int unsigned WIDTH   = vp_pkg::WIDTH,
  parameter int unsigned AL_SIZE = vp_pkg::AL_SIZE,
  parameter int unsigned XLEN    = vp_pkg::XLEN,
  parameter int unsigned PC_BITS = vp_pkg::PC_BITS,
  localparam int unsigned QW = $clog2(SIZE),
  localparam int unsigned AW = $clog2(AL_SIZE)
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // allocate
  input  logic [WIDTH-1:0]              al_valid,
  input  logic [WIDTH-1:0][AW-1:0]      al_al_idx,
  input  logic [WIDTH-1:0][PC_BITS-1:0] al_pc,
  input  logic [WIDTH-1:0][1:0]         al_vtype,
  input  logic [WIDTH-1:0][XLEN-1:0]    al_pred,
  input  logic [WIDTH-1:0]              al_used,
  input  logic [WIDTH-1:0]              al_counted,
  output logic [$clog2(SIZE+1)-1:0]     free_cnt,
  // writeback validation
  input  logic [WIDTH-1:0]              wb_valid,
  input  logic [WIDTH-1:0][AW-1:0]      wb_al_idx,
  input  logic [WIDTH-1:0][XLEN-1:0]    wb_value,
  output logic [WIDTH-1:0]              wb_match,
  output logic [WIDTH-1:0]              wb_misp,
  // retire
  output logic                          hd_valid,
  output logic [AW-1:0]                 hd_al_idx,
  output logic [PC_BITS-1:0]            hd_pc,
  output logic [1:0]                    hd_vtype,
  output logic                          hd_used,
  output logic                          hd_counted,
  output logic [XLEN-1:0]               hd_actual,
  input  logic                          pop,
  // rollback after a branch mispredict
  input  logic                          rb_start,
  input  logic [AW-1:0]                 rb_al_head,
  input  logic [AW-1:0]                 rb_br_idx,
  output logic                          un_valid,
  output logic [PC_BITS-1:0]            un_pc,
  output logic                          busy,
  input  logic                          squash
);

  typedef struct packed {
    logic [AW-1:0]      al_idx;
    logic [PC_BITS-1:0] pc;
    logic [1:0]         vtype;
    logic [XLEN-1:0]    pred;
    logic               used;
    logic               counted;
  } vpq_entry_t;

  vpq_entry_t       ent [SIZE];
  logic [XLEN-1:0]  actual [SIZE];
  logic [SIZE-1:0]  live;             // entry is between head and tail
  logic [QW-1:0]    head, tail;
  logic             head_phase, tail_phase;
  logic [QW:0]      rb_cnt;
  logic [$clog2(SIZE+1)-1:0] used_cnt;

  function automatic logic [QW:0] advance(input logic [QW-1:0] p, input logic ph,
                                         input int unsigned n);
    int unsigned s;
    s = int'(p) + n;
    if (s >= SIZE) return {~ph, QW'(s - SIZE)};
    return {ph, QW'(s)};
  endfunction

  always_comb begin
    if (head_phase == tail_phase) used_cnt = $bits(used_cnt)'(int'(tail) - int'(head));
    else                          used_cnt = $bits(used_cnt)'(SIZE - int'(head) + int'(tail));
    free_cnt = $bits(free_cnt)'(SIZE - int'(used_cnt));
  end

  // associative search by active-list index
  always_comb begin
    for (int k = 0; k < WIDTH; k++) begin
      wb_match[k] = 1'b0;
      wb_misp[k]  = 1'b0;
      for (int e = 0; e < SIZE; e++)
        if (wb_valid[k] && live[e] && ent[e].al_idx == wb_al_idx[k]) begin
          wb_match[k] = 1'b1;
          wb_misp[k]  = ent[e].used && (ent[e].pred != wb_value[k]);
        end
    end
  end

  assign hd_valid   = used_cnt != 0;
  assign hd_al_idx  = ent[head].al_idx;
  assign hd_pc      = ent[head].pc;
  assign hd_vtype   = ent[head].vtype;
  assign hd_used    = ent[head].used;
  assign hd_counted = ent[head].counted;
  assign hd_actual  = actual[head];

  // rollback: youngest entry and the count of entries younger than the branch
  logic [QW-1:0] last;
  logic [QW:0]   younger;
  assign last = (tail == 0) ? QW'(SIZE - 1) : tail - 1'b1;
  always_comb begin
    logic [AW-1:0] br_age;
    br_age  = rb_br_idx - rb_al_head;
    younger = '0;
    for (int e = 0; e < SIZE; e++)
      if (live[e] && AW'(ent[e].al_idx - rb_al_head) > br_age) younger++;
  end
  assign busy     = rb_cnt != 0;
  assign un_valid = busy && ent[last].counted;
  assign un_pc    = ent[last].pc;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      head <= '0; tail <= '0; head_phase <= 1'b0; tail_phase <= 1'b0;
      live <= '0; rb_cnt <= '0;
      for (int e = 0; e < SIZE; e++) begin
        ent[e] <= '0; actual[e] <= '0;
      end
    end else if (squash) begin
      head <= '0; tail <= '0; head_phase <= 1'b0; tail_phase <= 1'b0;
      live <= '0; rb_cnt <= '0;
    end else begin
      int unsigned n;
      logic [QW:0] t;
      logic [SIZE-1:0] lv;
      lv = live;
      // writeback values
      for (int k = 0; k < WIDTH; k++)
        for (int e = 0; e < SIZE; e++)
          if (wb_valid[k] && live[e] && ent[e].al_idx == wb_al_idx[k]) actual[e] <= wb_value[k];
      // retire
      if (pop && hd_valid) begin
        lv[head] = 1'b0;
        {head_phase, head} <= advance(head, head_phase, 1);
      end
      // tail: rollback walk or allocation
      t = {tail_phase, tail};
      if (busy) begin
        lv[last] = 1'b0;
        t = {(tail == 0) ? ~tail_phase : tail_phase, last};
        rb_cnt <= rb_cnt - 1'b1;
      end
      if (rb_start) begin
        // an older branch mispredicting during a walk extends it; the entry
        // removed this cycle is one of those counted
        rb_cnt <= (busy && younger != 0) ? younger - 1'b1 : younger;
      end else if (!busy) begin
        n = 0;
        for (int k = 0; k < WIDTH; k++)
          if (al_valid[k]) begin
            logic [QW:0] p;
            p = advance(tail, tail_phase, n);
            ent[p[QW-1:0]] <= '{al_idx: al_al_idx[k], pc: al_pc[k], vtype: al_vtype[k],
                                pred: al_pred[k], used: al_used[k], counted: al_counted[k]};
            actual[p[QW-1:0]] <= '0;
            lv[p[QW-1:0]] = 1'b1;
            n++;
          end
        t = advance(tail, tail_phase, n);
      end
      {tail_phase, tail} <= t;
      live <= lv;
    end
  end

  always @(posedge clk)
    if (rst_n && !squash && !busy && !rb_start)
      assert ($countones(al_valid) <= int'(free_cnt)) else $error("vpq: allocation overflow");

endmodule
