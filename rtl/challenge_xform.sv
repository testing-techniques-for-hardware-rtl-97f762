// challenge_xform: XOR input network that places the user's challenge in front
// of a delay-PUF row.
//
// In a switch chain, whether the delay of switch i ends up on the top or the
// bottom path at the arbiter depends on the parity of the challenge bits of
// switch i and of every switch after it. This network undoes that prefix
// parity: it computes
//     d[i] = c[i] ^ c[i+1]   for i < N-1,      d[N-1] = c[N-1],
// so that the parity d[i] ^ d[i+1] ^ ... ^ d[N-1] equals c[i]. Each user bit
// c[i] then sets the final position of switch i on its own. Bit 0 is the
// first switch after the launch point, bit N-1 the one next to the arbiter.
//
// The equations are the published ones; the figure drawn for this network
// permutes its output labels, and this design follows the equations.
// Purely combinational: N-1 two-input XOR gates, no clock, no state.
module challenge_xform #(
  parameter int unsigned N = 64  // challenge bits per row
) (
  input  logic [N-1:0] c,  // user challenge
  output logic [N-1:0] d   // challenge applied to the switches
);
  timeunit 1ps;
  timeprecision 1fs;

  always_comb begin
    for (int unsigned i = 0; i + 1 < N; i++) d[i] = c[i] ^ c[i+1];
    d[N-1] = c[N-1];
  end

endmodule
