// puf_switch: behavioural model of one 2-input/2-output switch of a delay PUF.
//
// This is not synthesizable logic: the switch is an analog path segment whose
// only interesting property is its delay, and the model reproduces that delay
// with simulation time. A rising (or falling) edge on an input appears on the
// outputs after the element delay of the route it takes. With sel = 0 the
// switch is straight (top in to top out, bottom in to bottom out); with
// sel = 1 it is crossed (top in to bottom out, bottom in to top out).
//
// Each switch has four delays, one per route: top-top and bottom-bottom for
// the straight state, top-bottom and bottom-top for the crossed one. They are
// drawn once, at time zero, from the chip's manufacturing variation (see
// puf_pkg::element_delay) using the chip seed SEED and the position STAGE, and
// are held in d_tt, d_bb, d_tb and d_bt (picoseconds) for inspection. EXTRA_PS
// is added to the straight top delay to model a faulty or very slow switch.
//
// Timing: transport delay per route. An input edge is sent only along the
// route sel selects at that moment, and the output multiplexer follows sel
// without delay, so sel (the challenge) must be stable from before the rising
// launch edge until the falling edge has left the switch; between races all
// routes are low and the challenge may change. Four delays per switch, their
// Gaussian spread and the straight/crossed behaviour follow the published
// structure; the zero-delay select, the outlier placement and the transport
// (rather than inertial) delays are this model's choices.
module puf_switch
  import puf_pkg::*;
#(
  parameter int unsigned SEED     = 1,         // chip row seed
  parameter int unsigned STAGE    = 0,         // position in the row, 0 = first after launch
  parameter real         MEAN_PS  = MU_PS,     // nominal element delay
  parameter real         SD_PS    = SIGMA_PS,  // element delay spread
  parameter real         RHO      = 0.0,       // correlation of neighbouring elements
  parameter real         EXTRA_PS = 0.0        // extra delay on the straight top route
) (
  input  logic ti,   // top path in
  input  logic bi,   // bottom path in
  input  logic sel,  // challenge bit: 0 straight, 1 crossed
  output logic to,   // top path out
  output logic bo    // bottom path out
);
  timeunit 1ps;
  timeprecision 1fs;

  real d_tt, d_bb, d_tb, d_bt;

  initial begin
    d_tt = element_delay(SEED, 4 * STAGE + int'(SW_TT), MEAN_PS, SD_PS, RHO) + EXTRA_PS;
    d_bb = element_delay(SEED, 4 * STAGE + int'(SW_BB), MEAN_PS, SD_PS, RHO);
    d_tb = element_delay(SEED, 4 * STAGE + int'(SW_TB), MEAN_PS, SD_PS, RHO);
    d_bt = element_delay(SEED, 4 * STAGE + int'(SW_BT), MEAN_PS, SD_PS, RHO);
  end

  // Delayed copies of each input along each of its two routes.
  logic t_straight, t_cross;
  logic b_straight, b_cross;

  initial begin
    t_straight = 1'b0;
    t_cross    = 1'b0;
    b_straight = 1'b0;
    b_cross    = 1'b0;
  end

  always @(ti) begin
    if (!sel) t_straight <= #(d_tt) ti;
    else t_cross <= #(d_tb) ti;
  end

  always @(bi) begin
    if (!sel) b_straight <= #(d_bb) bi;
    else b_cross <= #(d_bt) bi;
  end

  always_comb begin
    to = sel ? b_cross : t_straight;
    bo = sel ? t_cross : b_straight;
  end

endmodule
