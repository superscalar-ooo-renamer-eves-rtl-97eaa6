// svp: stride value predictor.
//
// A direct-mapped, PC-indexed table. Each entry keeps a tag, a CONF_BITS-wide
// confidence counter, the last retired value, the stride and the number of
// in-flight instances of the instruction. The prediction for the next instance
// is last_value + (inflight + 1) * stride, so several unretired instances of
// one instruction each get their own value. An entry is confident when its
// counter is saturated (31 for five bits).
//
// Interface and timing:
//   * Predict (combinational, WIDTH ports): pr_hit, pr_value, pr_conf for
//     pr_pc. Slots earlier in the same bundle with the same index that are
//     allocated count as extra in-flight instances. pr_alloc marks lookups that
//     were dispatched; each increments the entry's instance count on the edge.
//   * Train (one port, at retire): tr_value == last_value + stride increments
//     the counter if tr_inc_en (the probabilistic gate of the confidence
//     layer) allows it, otherwise the counter resets to 0; the stride becomes
//     tr_value - last_value, last_value becomes tr_value and the instance count
//     drops by one if the retiring instance was counted (tr_counted). A tag
//     miss replaces the entry (counter 0, stride 0, no instances).
//   * un_valid/un_pc drops one instance (an instance squashed by a branch).
//   * squash zeroes every instance count (no instruction is left in flight).
// The prediction formula and 5-bit counter follow the design description; the
// table organisation, tag width and instance counter width are this design's
// choices.
module svp #(
  parameter int unsigned ENTRIES   = vp_pkg::SVP_ENTRIES,
  parameter int unsigned WIDTH     = vp_pkg::WIDTH,
  parameter int unsigned XLEN      = vp_pkg::XLEN,
  parameter int unsigned PC_BITS   = vp_pkg::PC_BITS,
  parameter int unsigned CONF_BITS = vp_pkg::CONF_BITS,
  parameter int unsigned TAG_BITS  = 12,
  parameter int unsigned INST_BITS = 8,
  localparam int unsigned IW = $clog2(ENTRIES)
) (
  input  logic                             clk,
  input  logic                             rst_n,
  // predict
  input  logic [WIDTH-1:0]                 pr_valid,
  input  logic [WIDTH-1:0][PC_BITS-1:0]    pr_pc,
  output logic [WIDTH-1:0]                 pr_hit,
  output logic [WIDTH-1:0][XLEN-1:0]       pr_value,
  output logic [WIDTH-1:0][CONF_BITS-1:0]  pr_conf,
  input  logic [WIDTH-1:0]                 pr_alloc,
  // train
  input  logic                             tr_valid,
  input  logic [PC_BITS-1:0]               tr_pc,
  input  logic [XLEN-1:0]                  tr_value,
  input  logic                             tr_inc_en,
  input  logic                             tr_counted,
  output logic                             tr_hit,
  // undo one instance
  input  logic                             un_valid,
  input  logic [PC_BITS-1:0]               un_pc,
  input  logic                             squash
);

  logic [TAG_BITS-1:0]  tag    [ENTRIES];
  logic                 vld    [ENTRIES];
  logic [CONF_BITS-1:0] conf   [ENTRIES];
  logic [XLEN-1:0]      rvalue [ENTRIES];
  logic [XLEN-1:0]      stride [ENTRIES];
  logic [INST_BITS-1:0] inst   [ENTRIES];

  function automatic logic [IW-1:0] idx_of(input logic [PC_BITS-1:0] pc);
    return pc[2 +: IW];
  endfunction
  function automatic logic [TAG_BITS-1:0] tag_of(input logic [PC_BITS-1:0] pc);
    return pc[2 + IW +: TAG_BITS];
  endfunction

  // predictions
  always_comb begin
    for (int k = 0; k < WIDTH; k++) begin
      logic [IW-1:0] i;
      logic [XLEN-1:0] n;
      i = idx_of(pr_pc[k]);
      pr_hit[k] = pr_valid[k] && vld[i] && tag[i] == tag_of(pr_pc[k]);
      n = XLEN'(inst[i]) + 1;
      for (int j = 0; j < k; j++)
        if (pr_alloc[j] && pr_hit[j] && idx_of(pr_pc[j]) == i) n = n + 1;
      pr_value[k] = rvalue[i] + n * stride[i];
      pr_conf[k]  = pr_hit[k] ? conf[i] : '0;
    end
  end

  logic [IW-1:0] ti, ui;
  assign ti     = idx_of(tr_pc);
  assign ui     = idx_of(un_pc);
  assign tr_hit = tr_valid && vld[ti] && tag[ti] == tag_of(tr_pc);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int e = 0; e < ENTRIES; e++) begin
        tag[e] <= '0; vld[e] <= 1'b0; conf[e] <= '0;
        rvalue[e] <= '0; stride[e] <= '0; inst[e] <= '0;
      end
    end else begin
      // instance counts: +1 per allocated hit, -1 per train or undo
      for (int e = 0; e < ENTRIES; e++) begin
        int cnt;
        cnt = squash ? 0 : int'(inst[e]);
        if (!squash) begin
          for (int k = 0; k < WIDTH; k++)
            if (pr_alloc[k] && pr_hit[k] && idx_of(pr_pc[k]) == IW'(e)) cnt++;
          if (tr_hit && tr_counted && ti == IW'(e) && cnt > 0) cnt--;
          if (un_valid && vld[e] && tag[e] == tag_of(un_pc) && ui == IW'(e) && cnt > 0) cnt--;
        end
        if (cnt > (1 << INST_BITS) - 1) cnt = (1 << INST_BITS) - 1;
        if (tr_valid && !tr_hit && ti == IW'(e)) cnt = 0;
        inst[e] <= INST_BITS'(cnt);
      end
      if (tr_valid) begin
        if (tr_hit) begin
          if (tr_value == rvalue[ti] + stride[ti]) begin
            if (tr_inc_en && conf[ti] != '1) conf[ti] <= conf[ti] + 1'b1;
          end else begin
            conf[ti] <= '0;
          end
          stride[ti] <= tr_value - rvalue[ti];
          rvalue[ti] <= tr_value;
        end else begin
          vld[ti] <= 1'b1; tag[ti] <= tag_of(tr_pc); conf[ti] <= '0;
          rvalue[ti] <= tr_value; stride[ti] <= '0;
        end
      end
    end
  end

endmodule
