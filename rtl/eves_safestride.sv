// eves_safestride: global miss-rate monitor that switches stride prediction
// off for workloads on which it keeps failing.
//
// Two counters: misses (MISS_BITS = 16 bits, saturating) counts confident
// value mispredictions; events counts every prediction opportunity checked at
// retire (hit: a prediction-eligible instruction retired; miss: a confident
// mispredict). Prediction is disabled while misses * 2^RATE_SHIFT > events,
// i.e. while the miss rate is above 1/1024. Events keep counting while
// prediction is off, so the rate recovers. So that one bad phase does not
// switch prediction off for good, both counters are also halved every PERIOD
// (1,000,000) retired instructions.
//
// Interface and timing: miss, hit and retire_n are sampled on the rising edge;
// disable is combinational from the registered counters.
// The 16-bit counter, the 1/1024 threshold and the halving period follow the
// design description; counting the rate against prediction-eligible
// retirements, and the width of the event counter, are this design's reading
// of it.
module eves_safestride #(
  parameter int unsigned MISS_BITS  = vp_pkg::SS_MISS_BITS,
  parameter int unsigned RATE_SHIFT = vp_pkg::SS_SHIFT,
  parameter int unsigned PERIOD     = vp_pkg::SS_PERIOD,
  parameter int unsigned EV_BITS    = 32,
  parameter int unsigned WIDTH      = vp_pkg::WIDTH,
  localparam int unsigned CW = $clog2(WIDTH + 1),
  localparam int unsigned PWD = $clog2(PERIOD + WIDTH + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 miss,
  input  logic                 hit,
  input  logic [CW-1:0]        retire_n,
  output logic                 disable_vp,
  output logic [MISS_BITS-1:0] misses,
  output logic [EV_BITS-1:0]   events
);

  logic [PWD-1:0] period_cnt;

  assign disable_vp = ({misses, RATE_SHIFT'(0)} > (MISS_BITS + RATE_SHIFT)'(events));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      misses <= '0; events <= '0; period_cnt <= '0;
    end else begin
      logic [MISS_BITS-1:0] m;
      logic [EV_BITS-1:0]   e;
      logic [PWD-1:0]       p;
      m = misses; e = events;
      if (miss && m != '1) m = m + 1'b1;
      if ((miss || hit) && e != '1) e = e + 1'b1;
      p = period_cnt + PWD'(retire_n);
      if (int'(p) >= PERIOD) begin
        p = PWD'(int'(p) - PERIOD);
        m = m >> 1;
        e = e >> 1;
      end
      misses <= m; events <= e; period_cnt <= p;
    end
  end

endmodule
