// free_list: circular FIFO of free physical register numbers.
//
// The list holds FL_SIZE = N_PHYS - N_LOG entries, exactly the registers that
// are not named by the committed map. Head and tail are slot indices with a
// phase bit each; the phase toggles whenever a pointer wraps. head == tail
// with equal phases means empty, with opposite phases full, so no slot is
// wasted and no separate count register is kept.
//
// Interface and timing (all state changes on the rising clock edge):
//   * Rename pops pop_n registers; head_regs[k] shows the k-th register the
//     pop will hand out, combinationally from the current head.
//   * Commit pushes push_n registers (push_regs[0..push_n-1]) at the tail.
//   * restore_en reloads head and head phase from a branch checkpoint (branch
//     mispredict); it takes priority over a pop in the same cycle.
//   * rebuild_en (full squash) rescans the committed map amt_map: every
//     register it does not name is written, in ascending order, into slots
//     0..FL_SIZE-1 and the list becomes full. Reset does the same with the
//     identity map. Rebuild overrides every other request.
// The recovery rules follow the design description; the one-cycle scan and
// the ascending order are this design's choices.
module free_list #(
  parameter int unsigned N_PHYS = vp_pkg::N_PHYS,
  parameter int unsigned N_LOG  = vp_pkg::N_LOG,
  parameter int unsigned WIDTH  = vp_pkg::WIDTH,
  localparam int unsigned FL_SIZE = N_PHYS - N_LOG,
  localparam int unsigned PW = $clog2(N_PHYS),
  localparam int unsigned FW = $clog2(FL_SIZE),
  localparam int unsigned CW = $clog2(WIDTH + 1)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // pop (rename)
  input  logic [CW-1:0]          pop_n,
  output logic [WIDTH-1:0][PW-1:0] head_regs,
  output logic [$clog2(FL_SIZE+1)-1:0] free_cnt,
  // push (commit)
  input  logic [CW-1:0]          push_n,
  input  logic [WIDTH-1:0][PW-1:0] push_regs,
  // checkpoint restore (branch mispredict)
  input  logic                   restore_en,
  input  logic [FW-1:0]          restore_head,
  input  logic                   restore_phase,
  // full-squash rebuild from the committed map
  input  logic                   rebuild_en,
  input  logic [N_LOG-1:0][PW-1:0] amt_map,
  // current head, for checkpoints
  output logic [FW-1:0]          head,
  output logic                   head_phase
);

  logic [PW-1:0] fl [FL_SIZE];
  logic [FW-1:0] tail;
  logic          tail_phase;

  // Advance a pointer by n slots, toggling the phase on a wrap.
  function automatic logic [FW:0] advance(input logic [FW-1:0] p, input logic ph,
                                         input int unsigned n);
    int unsigned s;
    s = int'(p) + n;
    if (s >= FL_SIZE) return {~ph, FW'(s - FL_SIZE)};
    return {ph, FW'(s)};
  endfunction

  function automatic logic [FW-1:0] slot(input logic [FW-1:0] p, input int unsigned k);
    int unsigned s;
    s = int'(p) + k;
    if (s >= FL_SIZE) s -= FL_SIZE;
    return FW'(s);
  endfunction

  always_comb begin
    for (int k = 0; k < WIDTH; k++) head_regs[k] = fl[slot(head, k)];
    if (head_phase == tail_phase) free_cnt = $bits(free_cnt)'(int'(tail) - int'(head));
    else                          free_cnt = $bits(free_cnt)'(FL_SIZE - int'(head) + int'(tail));
  end

  // Registers named by the committed map, used by the rebuild scan.
  logic [N_PHYS-1:0] in_map;
  always_comb begin
    in_map = '0;
    for (int l = 0; l < N_LOG; l++) in_map[amt_map[l]] = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int s = 0; s < FL_SIZE; s++) fl[s] <= PW'(N_LOG + s);
      head <= '0; head_phase <= 1'b0;
      tail <= '0; tail_phase <= 1'b1;
    end else if (rebuild_en) begin
      int unsigned c;
      c = 0;
      for (int p = 0; p < N_PHYS; p++) begin
        if (!in_map[p] && c < FL_SIZE) begin
          fl[c] <= PW'(p);
          c++;
        end
      end
      head <= '0; head_phase <= 1'b0;
      tail <= '0; tail_phase <= 1'b1;
    end else begin
      for (int k = 0; k < WIDTH; k++)
        if (k < int'(push_n)) fl[slot(tail, k)] <= push_regs[k];
      {tail_phase, tail} <= advance(tail, tail_phase, int'(push_n));
      if (restore_en) begin
        head <= restore_head; head_phase <= restore_phase;
      end else begin
        {head_phase, head} <= advance(head, head_phase, int'(pop_n));
      end
    end
  end

  // A pop may never take more than is free, and a push never overfill.
  always @(posedge clk)
    if (rst_n && !rebuild_en) begin
      if (!restore_en) assert (int'(pop_n) <= int'(free_cnt)) else $error("free_list: pop underflow");
      assert (int'(free_cnt) + int'(push_n) <= FL_SIZE) else $error("free_list: push overflow");
    end

endmodule
