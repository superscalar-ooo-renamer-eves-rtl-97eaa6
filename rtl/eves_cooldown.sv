// eves_cooldown: global gate that pauses value prediction after a confident
// misprediction.
//
// One counter for the whole core. A confident value mispredict (trigger)
// loads it with COOLDOWN (128); every retired instruction then takes one off
// until it reaches zero. While it is non-zero, active is high and no
// prediction may be used, which rides out the bursts of mispredictions that
// follow a program phase change.
//
// Interface and timing: trigger and retire_n are sampled on the rising edge;
// active is the registered counter's non-zero flag. A trigger wins over the
// retirements of the same cycle. The mechanism and the 128-retire length
// follow the design description.
module eves_cooldown #(
  parameter int unsigned COOLDOWN = vp_pkg::COOLDOWN,
  parameter int unsigned WIDTH    = vp_pkg::WIDTH,
  localparam int unsigned CW = $clog2(WIDTH + 1),
  localparam int unsigned KW = $clog2(COOLDOWN + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          trigger,
  input  logic [CW-1:0] retire_n,
  output logic          active,
  output logic [KW-1:0] remaining
);

  always_ff @(posedge clk) begin
    if (!rst_n)                          remaining <= '0;
    else if (trigger)                    remaining <= KW'(COOLDOWN);
    else if (int'(remaining) > int'(retire_n)) remaining <= remaining - KW'(retire_n);
    else                                 remaining <= '0;
  end

  assign active = remaining != 0;

endmodule
