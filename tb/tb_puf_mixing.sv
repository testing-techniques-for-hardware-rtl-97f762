// tb_puf_mixing: interleaved PUFs that mix 2 and 8 rows, side by side.
//
// Two instances (R = 2 and 8, so 3 and 9 rows of 64 switches, ideal
// arbiters, no XOR input network) see the same challenges in two experiments:
//   - single-bit flips: NBASE random base challenges and, for each, the
//     challenges one bit away at the eight positions at each end of the
//     challenge; it estimates how often resp[0] changes at either end;
//   - Hamming distance: NPAIR random challenge pairs at each distance in
//     HD_LIST; per distance it estimates how often resp[0] changes.
// Every evaluation checks each response against the parity of the arbiter
// bits with one row left out. The flip experiment must show that mixing more
// rows brings the change probability at the two ends of the challenge closer
// to one half (a single row is near 0 at one end and near 1 at the other, and
// mixing two rows pairs a forward with a reversed row, which makes flips at
// both ends likely); the distance experiment must give a change probability
// near one half for large distances when eight rows are mixed. The sizes
// are cut down (the middle positions and most distances are skipped) to
// keep the run near a minute.
module tb_puf_mixing;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int unsigned N = 64;
  localparam real SETTLE = 40_000.0;
  localparam int NBASE = 12;
  localparam int NPAIR = 20;
  localparam int NHD = 3;
  localparam int HD_LIST [NHD] = '{1, 32, 64};

  logic launch;
  logic [N-1:0] challenge;
  logic [2:0] arb2;
  logic [1:0] resp2;
  logic [8:0] arb8;
  logic [7:0] resp8;
  int checks = 0, failures = 0;

  interleaved_puf #(.R(2), .CHIP_SEED(21)) dut2 (
    .launch(launch), .xform_en(1'b0), .challenge(challenge), .arb(arb2), .resp(resp2));
  interleaved_puf #(.R(8), .CHIP_SEED(81)) dut8 (
    .launch(launch), .xform_en(1'b0), .challenge(challenge), .arb(arb8), .resp(resp8));

  // One evaluation; returns resp[0] of the two instances as {R8, R2}.
  task automatic apply(input logic [N-1:0] v, output logic [1:0] r0);
    challenge = v;
    #1000;
    launch = 1'b1;
    #(SETTLE);
    for (int j = 0; j < 2; j++) begin
      checks++;
      if (resp2[j] !== ((^arb2) ^ arb2[j])) begin
        failures++;
        $display("FAIL R=2 resp[%0d]", j);
      end
    end
    for (int j = 0; j < 8; j++) begin
      checks++;
      if (resp8[j] !== ((^arb8) ^ arb8[j])) begin
        failures++;
        $display("FAIL R=8 resp[%0d]", j);
      end
    end
    r0 = {resp8[0], resp2[0]};
    launch = 1'b0;
    #(SETTLE);
  endtask

  // Random challenge at Hamming distance h from v.
  function automatic logic [N-1:0] at_distance(input logic [N-1:0] v, input int h);
    logic [N-1:0] m;
    int placed;
    m = '0;
    placed = 0;
    while (placed < h) begin
      int p;
      p = $urandom_range(N - 1);
      if (!m[p]) begin
        m[p] = 1'b1;
        placed++;
      end
    end
    return v ^ m;
  endfunction

  int flips [2][N];
  int hd_flips [2][NHD];

  initial begin
    real dev [2];
    real p_hd_big;
    launch = 1'b0;
    challenge = '0;
    for (int s = 0; s < 2; s++) begin
      for (int i = 0; i < N; i++) flips[s][i] = 0;
      for (int h = 0; h < NHD; h++) hd_flips[s][h] = 0;
    end
    #(SETTLE);
    for (int k = 0; k < NBASE; k++) begin
      logic [N-1:0] v;
      logic [1:0] r0, r1;
      v = {$urandom(), $urandom()};
      apply(v, r0);
      for (int i = 0; i < N; i++) begin
        if (i >= 8 && i < N - 8) continue;
        apply(v ^ (N'(1) << i), r1);
        for (int s = 0; s < 2; s++) if (r1[s] != r0[s]) flips[s][i]++;
      end
    end
    for (int h = 0; h < NHD; h++)
      for (int k = 0; k < NPAIR; k++) begin
        logic [N-1:0] v;
        logic [1:0] r0, r1;
        v = {$urandom(), $urandom()};
        apply(v, r0);
        apply(at_distance(v, HD_LIST[h]), r1);
        for (int s = 0; s < 2; s++) if (r1[s] != r0[s]) hd_flips[s][h]++;
      end
    // Distance from 1/2 of the change probability, pooled over the 8 bits
    // at each end of the challenge, averaged over the two ends.
    for (int s = 0; s < 2; s++) begin
      real p_first, p_last;
      p_first = 0.0;
      p_last = 0.0;
      for (int i = 0; i < 8; i++) begin
        p_first += real'(flips[s][i]) / (8.0 * NBASE);
        p_last += real'(flips[s][N-1-i]) / (8.0 * NBASE);
      end
      dev[s] = ((p_first > 0.5 ? p_first - 0.5 : 0.5 - p_first) +
                (p_last > 0.5 ? p_last - 0.5 : 0.5 - p_last)) / 2.0;
    end
    $display("single-bit flips, |P(change) - 0.5| at the challenge ends:");
    $display("  mixing 2 rows %4.2f, 8 rows %4.2f", dev[0], dev[1]);
    $display("Hamming distance : P(resp[0] changes) mixing 2 / 8 rows");
    for (int h = 0; h < NHD; h++)
      $display("  %2d : %4.2f %4.2f", HD_LIST[h], real'(hd_flips[0][h]) / NPAIR,
               real'(hd_flips[1][h]) / NPAIR);
    checks++;
    if (!(dev[1] < dev[0])) begin
      failures++;
      $display("FAIL mixing 8 rows is not flatter than mixing 2");
    end
    p_hd_big = real'(hd_flips[1][1] + hd_flips[1][2]) / (2.0 * NPAIR);
    checks++;
    if (p_hd_big < 0.3 || p_hd_big > 0.7) begin
      failures++;
      $display("FAIL 8-row mixing at large distances changes with probability %4.2f", p_hd_big);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
