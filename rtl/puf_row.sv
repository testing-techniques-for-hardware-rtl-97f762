// puf_row: behavioural model of one delay-based (arbiter) PUF row.
//
// A rising edge on launch enters both the top and the bottom path. It passes
// N switches in series; challenge bit ch[i] sets switch i straight (0) or
// crossed (1). Because of manufacturing variation the two paths differ in
// delay by a few tens of picoseconds, and the arbiter at the end reports which
// edge won: resp = 1 if the top path was faster. The same challenge gives the
// same answer on one chip and different answers on different chips, which is
// what makes the row a physically unclonable function. A chip is selected by
// SEED; RHO correlates neighbouring element delays; OUTLIER_STAGE (1..N, 0 for
// none) puts OUTLIER_PS of extra delay into one switch; ST_PS and HT_PS give
// the arbiter setup and hold times.
//
// This is not synthesizable logic but a timing model made of puf_switch and
// puf_arbiter instances. Operation: hold ch stable, raise launch, and read
// resp after the path delay, about N times 0.5 ns plus the arbiter's
// clock-to-output delay; then lower launch and wait as long again before the
// next challenge. The series structure is the published one; everything about
// the launch sequence is this model's choice.
module puf_row
  import puf_pkg::*;
#(
  parameter int unsigned N             = N_STAGES,  // switches, one per challenge bit
  parameter int unsigned SEED          = 1,         // chip row seed
  parameter real         MEAN_PS       = MU_PS,     // nominal element delay
  parameter real         SD_PS         = SIGMA_PS,  // element delay spread
  parameter real         RHO           = 0.0,       // correlation of neighbouring elements
  parameter int unsigned OUTLIER_STAGE = 0,         // switch (1..N) with a delay outlier, 0 none
  parameter real         OUTLIER_PS    = 0.0,       // size of the outlier
  parameter real         ST_PS         = 0.0,       // arbiter setup time
  parameter real         HT_PS         = 0.0        // arbiter hold time
) (
  input  logic         launch,  // edge that starts the race
  input  logic [N-1:0] ch,      // challenge, bit 0 at the launch end
  output logic         resp     // 1 if the top path was faster
);
  timeunit 1ps;
  timeprecision 1fs;

  logic [N:0] top, bot;

  assign top[0] = launch;
  assign bot[0] = launch;

  for (genvar i = 0; i < N; i++) begin : g_sw
    puf_switch #(
      .SEED    (SEED),
      .STAGE   (i),
      .MEAN_PS (MEAN_PS),
      .SD_PS   (SD_PS),
      .RHO     (RHO),
      .EXTRA_PS((OUTLIER_STAGE == i + 1) ? OUTLIER_PS : 0.0)
    ) u_sw (
      .ti (top[i]),
      .bi (bot[i]),
      .sel(ch[i]),
      .to (top[i+1]),
      .bo (bot[i+1])
    );
  end

  puf_arbiter #(
    .ST_PS(ST_PS),
    .HT_PS(HT_PS)
  ) u_arb (
    .a(top[N]),
    .b(bot[N]),
    .q(resp)
  );

endmodule
