// tb_interleaved_puf_full: the interleaved PUF at its default size (64
// challenge bits, five rows, four responses, ideal arbiters) running the
// single-bit-flip transition experiment.
//
// For each of NBASE random base challenges, and once with the XOR input
// network off and once on, the base challenge and the 64 challenges that
// differ from it in exactly one bit are applied. Every launch is checked: each
// row's arbiter bit against a prediction from that row's element delays, and
// each response against the parity of the arbiter bits with one row left out.
// From the results the testbench estimates, per flipped bit position, how
// often a single row's bit (row 0, a plain arbiter PUF) and the first
// interleaved response change. Checked against the behaviour the structure is
// known for: without the XOR network a flip next to the arbiter changes the
// row's bit far more often than a flip at the launch end; with it the
// dependence on the position disappears; mixing rows makes the response's
// dependence on the position flatter than a single row's; and each response
// bit is 1 for a fair share of the challenges. A watchdog ends the run.
module tb_interleaved_puf_full;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int unsigned N = 64;
  localparam int unsigned R = 4;
  localparam real SETTLE = 40_000.0;
  localparam int NBASE = 50;

  logic launch, xform_en;
  logic [N-1:0] challenge;
  logic [R:0] arb;
  logic [R-1:0] resp;
  int checks = 0, failures = 0;

  interleaved_puf dut (
    .launch(launch), .xform_en(xform_en), .challenge(challenge), .arb(arb), .resp(resp)
  );

  real d [R+1][N][4];
  for (genvar r = 0; r <= R; r++) begin : g_r
    for (genvar i = 0; i < N; i++) begin : g_i
      initial begin
        #1;
        d[r][i] = '{dut.g_row[r].u_row.g_sw[i].u_sw.d_tt, dut.g_row[r].u_row.g_sw[i].u_sw.d_bb,
                    dut.g_row[r].u_row.g_sw[i].u_sw.d_tb, dut.g_row[r].u_row.g_sw[i].u_sw.d_bt};
      end
    end
  end

  function automatic real race_dt(input int r, input logic [N-1:0] c);
    real t, b;
    t = 0.0;
    b = 0.0;
    for (int i = 0; i < N; i++) begin
      real nt, nb;
      if (!c[i]) begin
        nt = t + d[r][i][0];
        nb = b + d[r][i][1];
      end else begin
        nt = b + d[r][i][3];
        nb = t + d[r][i][2];
      end
      t = nt;
      b = nb;
    end
    return b - t;
  endfunction

  function automatic logic [N-1:0] row_challenge(input int r, input logic [N-1:0] c, input logic en);
    logic [N-1:0] x, y;
    for (int i = 0; i < N; i++) x[i] = (en && i < N - 1) ? (c[i] ^ c[i+1]) : c[i];
    for (int i = 0; i < N; i++) y[i] = (r % 2 == 1) ? x[N-1-i] : x[i];
    return y;
  endfunction

  int n_launch = 0;
  int n_one [R];

  task automatic apply(input logic [N-1:0] v, input logic en, output logic [R:0] a_o,
                       output logic [R-1:0] r_o);
    logic [R:0] exp;
    challenge = v;
    xform_en = en;
    #1000;
    for (int r = 0; r <= R; r++) exp[r] = race_dt(r, row_challenge(r, v, en)) > 0.0;
    launch = 1'b1;
    #(SETTLE);
    checks++;
    if (arb !== exp) begin
      failures++;
      $display("FAIL arbiters %b, expected %b (c=%h xform=%b)", arb, exp, v, en);
    end
    for (int j = 0; j < R; j++) begin
      checks++;
      if (resp[j] !== ((^arb) ^ arb[j])) begin
        failures++;
        $display("FAIL resp[%0d]=%b with arbiters %b", j, resp[j], arb);
      end
      if (resp[j]) n_one[j]++;
    end
    n_launch++;
    a_o = arb;
    r_o = resp;
    launch = 1'b0;
    #(SETTLE);
  endtask

  // Transition counts per mode and flipped bit: row 0's bit and resp[0].
  int flips_row [2][N];
  int flips_int [2][N];
  real p_row [2][N];
  real p_int [2][N];

  function automatic real mean_range(input real p [N], input int lo, input int hi);
    real s;
    s = 0.0;
    for (int i = lo; i <= hi; i++) s += p[i];
    return s / (hi - lo + 1);
  endfunction

  function automatic real spread(input real p [N]);
    real lo, hi;
    lo = p[0];
    hi = p[0];
    for (int i = 1; i < N; i++) begin
      if (p[i] < lo) lo = p[i];
      if (p[i] > hi) hi = p[i];
    end
    return hi - lo;
  endfunction

  task automatic expect_true(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    real row_off_first, row_off_last, row_on_first, row_on_last;
    launch = 1'b0;
    xform_en = 1'b0;
    challenge = '0;
    for (int j = 0; j < R; j++) n_one[j] = 0;
    for (int m = 0; m < 2; m++)
      for (int i = 0; i < N; i++) begin
        flips_row[m][i] = 0;
        flips_int[m][i] = 0;
      end
    #(SETTLE);
    for (int m = 0; m < 2; m++)
      for (int k = 0; k < NBASE; k++) begin
        logic [N-1:0] v;
        logic [R:0] a0, a1;
        logic [R-1:0] r0, r1;
        v = {$urandom(), $urandom()};
        apply(v, m[0], a0, r0);
        for (int i = 0; i < N; i++) begin
          apply(v ^ (N'(1) << i), m[0], a1, r1);
          if (a1[0] != a0[0]) flips_row[m][i]++;
          if (r1[0] != r0[0]) flips_int[m][i]++;
        end
      end
    for (int m = 0; m < 2; m++)
      for (int i = 0; i < N; i++) begin
        p_row[m][i] = real'(flips_row[m][i]) / NBASE;
        p_int[m][i] = real'(flips_int[m][i]) / NBASE;
      end
    $display("flipped bit : P(row 0 changes) off/on, P(resp[0] changes) off/on");
    for (int i = 0; i < N; i += 7)
      $display("  %2d : %4.2f %4.2f   %4.2f %4.2f", i, p_row[0][i], p_row[1][i], p_int[0][i], p_int[1][i]);
    row_off_first = mean_range(p_row[0], 0, 7);
    row_off_last = mean_range(p_row[0], N - 8, N - 1);
    row_on_first = mean_range(p_row[1], 0, 7);
    row_on_last = mean_range(p_row[1], N - 8, N - 1);
    $display("row 0 without XOR network: first 8 bits %4.2f, last 8 bits %4.2f", row_off_first, row_off_last);
    $display("row 0 with XOR network:    first 8 bits %4.2f, last 8 bits %4.2f", row_on_first, row_on_last);
    $display("spread over bit positions: row %4.2f, interleaved %4.2f (XOR network off)",
             spread(p_row[0]), spread(p_int[0]));
    expect_true(row_off_last - row_off_first > 0.4,
                "without the XOR network, flips near the arbiter should dominate");
    expect_true(row_on_last - row_on_first < 0.2 && row_on_first - row_on_last < 0.2,
                "with the XOR network the transition probability should not depend on the position");
    expect_true(spread(p_int[0]) < spread(p_row[0]),
                "the interleaved response should be flatter than a single row");
    for (int j = 0; j < R; j++) begin
      real p1;
      p1 = real'(n_one[j]) / n_launch;
      $display("P(resp[%0d] = 1) = %4.2f over %0d challenges", j, p1, n_launch);
      expect_true(p1 > 0.2 && p1 < 0.8, $sformatf("resp[%0d] strongly biased", j));
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
