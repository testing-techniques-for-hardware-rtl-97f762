// xor_combiner: leave-one-out output network of the interleaved PUF.
//
// R+1 arbiter bits a[0..R] come in and R response bits leave. Response bit j is
// the XOR of the R arbiter bits other than a[j], so every response mixes R rows
// and no two responses mix the same set; a[R] enters every response. Mixing
// rows this way flattens the transition statistics of the single rows and
// hides which arbiter values produced a response, since two arbiter patterns
// always give the same output.
//
// The structure (R+1 rows, R gates of R inputs, one row left out per gate) is
// the published one; which row each gate leaves out is this design's choice.
// Purely combinational.
module xor_combiner #(
  parameter int unsigned R = 4  // response bits; R+1 arbiter inputs
) (
  input  logic [R:0]   a,    // arbiter outputs of rows 0..R
  output logic [R-1:0] resp  // response bits
);
  timeunit 1ps;
  timeprecision 1fs;

  always_comb begin
    for (int unsigned j = 0; j < R; j++) begin
      resp[j] = 1'b0;
      for (int unsigned k = 0; k <= R; k++)
        if (k != j) resp[j] ^= a[k];
    end
  end

endmodule
