// eves_fpc: forward probabilistic counter gate with per-type denominators.
//
// A 16-bit linear-feedback shift register (Fibonacci form, taps 16, 14, 13,
// 11, seed 16'hACE1) steps once for every predictor training. The current
// sample allows the confidence counter of the trained entry to increment only
// when sample % denom == 0, where denom depends on the instruction's bucket:
// integer ALU (long-latency operations included), floating-point ALU or load.
// With denominators 4/2/2 an integer entry needs about 4 x 31 = 124 correct
// trainings instead of 31 to become confident, which is the point of the
// mechanism. When eves_en is low every increment is allowed (baseline
// predictor).
//
// Interface and timing: inc_en is combinational from the current LFSR state
// and vtype; the LFSR advances on the rising edge when step is high.
// The mechanism and the 4/2/2 denominators follow the design description; the
// polynomial and seed are this design's choice.
module eves_fpc #(
  parameter int unsigned DENOM_INTALU = vp_pkg::DENOM_INTALU,
  parameter int unsigned DENOM_FPALU  = vp_pkg::DENOM_FPALU,
  parameter int unsigned DENOM_LOAD   = vp_pkg::DENOM_LOAD,
  parameter logic [15:0] SEED         = 16'hACE1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           eves_en,
  input  logic           step,
  input  vp_pkg::vtype_e vtype,
  output logic           inc_en,
  output logic [15:0]    sample
);

  logic [15:0] lfsr;
  assign sample = lfsr;

  always_ff @(posedge clk) begin
    if (!rst_n)    lfsr <= SEED;
    else if (step) lfsr <= {lfsr[14:0], lfsr[15] ^ lfsr[13] ^ lfsr[12] ^ lfsr[10]};
  end

  always_comb begin
    int unsigned denom;
    case (vtype)
      vp_pkg::VT_FPALU: denom = DENOM_FPALU;
      vp_pkg::VT_LOAD:  denom = DENOM_LOAD;
      default:          denom = DENOM_INTALU;
    endcase
    inc_en = !eves_en || ((int'(lfsr) % denom) == 0);
  end

endmodule
