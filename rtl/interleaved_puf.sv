// interleaved_puf: the interleaved delay-based PUF with R response bits.
//
// A single arbiter-PUF row can be modelled from a few thousand challenge/
// response pairs, and its responses are predictable from the position of a
// flipped challenge bit. This structure hides the rows behind each other. It
// has R+1 rows (R even) that all see the same N-bit challenge, but every
// second row sees it in reverse order: bit i of an even row is wired to bit
// N-1-i of the odd rows, so a bit that sits next to the arbiter in one row
// sits at the launch end of the next. The R+1 arbiter bits go through a
// leave-one-out network of R XOR gates with R inputs each (xor_combiner), so
// each response mixes R rows.
//
// An optional XOR input network (challenge_xform) can be put in front of all
// rows with xform_en = 1; with it each challenge bit sets the final position
// of one switch directly. With xform_en = 0 the challenge goes to the rows
// unchanged, as in the drawing of this structure.
//
// Interface and timing: hold challenge and xform_en stable, raise launch; arb
// and resp settle about N x 0.5 ns later (32 ns at N = 64). Lower launch and
// wait as long again before the next challenge. The rows are behavioural
// timing models (puf_row); the challenge network, the reversal wiring and the
// output XORs are ordinary combinational logic. The row count, the reversal
// and the leave-one-out XORs follow the published structure; the run-time
// xform_en select, the row seeds and the choice of which row each XOR omits
// are this design's own.
module interleaved_puf
  import puf_pkg::*;
#(
  parameter int unsigned N         = N_STAGES,  // challenge bits
  parameter int unsigned R         = 4,         // response bits, R+1 rows, R even
  parameter int unsigned CHIP_SEED = 1,         // selects one manufactured chip
  parameter real         MEAN_PS   = MU_PS,     // nominal element delay
  parameter real         SD_PS     = SIGMA_PS,  // element delay spread
  parameter real         RHO       = 0.0,       // correlation of neighbouring elements
  parameter real         ST_PS     = 0.0,       // arbiter setup time
  parameter real         HT_PS     = 0.0        // arbiter hold time
) (
  input  logic         launch,     // edge that starts every row's race
  input  logic         xform_en,   // 1: pass the challenge through the XOR network
  input  logic [N-1:0] challenge,  // user challenge
  output logic [R:0]   arb,        // arbiter bit of each row
  output logic [R-1:0] resp        // response bits
);
  timeunit 1ps;
  timeprecision 1fs;

  initial assert (R % 2 == 0 && R >= 2)
    else $error("interleaved_puf: R must be even and at least 2");

  logic [N-1:0] c_xf, c_row;
  logic [N-1:0] row_ch [R+1];

  challenge_xform #(.N(N)) u_xform (
    .c(challenge),
    .d(c_xf)
  );

  assign c_row = xform_en ? c_xf : challenge;

  for (genvar r = 0; r <= R; r++) begin : g_row
    // Even rows take the challenge in order, odd rows reversed.
    for (genvar i = 0; i < N; i++) begin : g_bit
      if (r % 2 == 0) begin : g_fwd
        assign row_ch[r][i] = c_row[i];
      end else begin : g_rev
        assign row_ch[r][i] = c_row[N-1-i];
      end
    end

    puf_row #(
      .N      (N),
      .SEED   (CHIP_SEED * 1000 + r),
      .MEAN_PS(MEAN_PS),
      .SD_PS  (SD_PS),
      .RHO    (RHO),
      .ST_PS  (ST_PS),
      .HT_PS  (HT_PS)
    ) u_row (
      .launch(launch),
      .ch    (row_ch[r]),
      .resp  (arb[r])
    );
  end

  xor_combiner #(.R(R)) u_comb (
    .a   (arb),
    .resp(resp)
  );

endmodule
