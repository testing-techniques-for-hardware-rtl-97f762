// tb_interleaved_puf: end-to-end test of the interleaved PUF.
//
// The full 64-bit, five-row, four-response structure is run with non-ideal
// arbiters (30 ps setup, 10 ps hold) so that every mechanism of the design
// occurs: the XOR input network switched on and off, the bit reversal on odd
// rows, metastable arbiter decisions and the leave-one-out output XORs. For
// every challenge the testbench predicts each row's arbiter bit from the
// element delays of that row's switches, walking the path of the challenge
// the row should see (transformed or not, reversed on odd rows); a prediction
// inside the setup/hold window is counted as metastable and not checked. The
// responses are checked against the parity of the arbiter bits with one row
// left out, and the metastable count against the arbiters' own counters. Each
// mechanism is counted, and one that never happened is a failure. A watchdog
// ends the run if it hangs.
module tb_interleaved_puf;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int unsigned N = 64;
  localparam int unsigned R = 4;
  localparam real ST = 30.0;
  localparam real HT = 10.0;
  localparam real SETTLE = 40_000.0;
  localparam int NCHAL = 120;

  logic launch, xform_en;
  logic [N-1:0] challenge;
  logic [R:0] arb;
  logic [R-1:0] resp;
  int checks = 0, failures = 0;

  interleaved_puf #(.N(N), .R(R), .CHIP_SEED(3), .ST_PS(ST), .HT_PS(HT)) dut (
    .launch(launch), .xform_en(xform_en), .challenge(challenge), .arb(arb), .resp(resp)
  );

  real d [R+1][N][4];
  int unsigned meta_model [R+1];
  for (genvar r = 0; r <= R; r++) begin : g_r
    for (genvar i = 0; i < N; i++) begin : g_i
      initial begin
        #1;
        d[r][i] = '{dut.g_row[r].u_row.g_sw[i].u_sw.d_tt, dut.g_row[r].u_row.g_sw[i].u_sw.d_bb,
                    dut.g_row[r].u_row.g_sw[i].u_sw.d_tb, dut.g_row[r].u_row.g_sw[i].u_sw.d_bt};
      end
    end
    assign meta_model[r] = dut.g_row[r].u_row.u_arb.metastable;
  end

  // Top-minus-bottom arrival difference (positive: bottom later) of row r.
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

  // The challenge row r should see.
  function automatic logic [N-1:0] row_challenge(input int r, input logic [N-1:0] c, input logic en);
    logic [N-1:0] x, y;
    for (int i = 0; i < N; i++) x[i] = (en && i < N - 1) ? (c[i] ^ c[i+1]) : c[i];
    for (int i = 0; i < N; i++) y[i] = (r % 2 == 1) ? x[N-1-i] : x[i];
    return y;
  endfunction

  int n_xf_on = 0, n_xf_off = 0, n_rev_checked = 0, n_meta = 0, n_loo_split = 0, n_mode_diff = 0;
  int n_one [R];
  int n_zero [R];

  task automatic apply(input logic [N-1:0] v, input logic en, output logic [R:0] got);
    logic [R:0] exp;
    logic [R:0] known;
    challenge = v;
    xform_en = en;
    #1000;
    for (int r = 0; r <= R; r++) begin
      real dt;
      dt = race_dt(r, row_challenge(r, v, en));
      known[r] = (dt > ST) || (dt < -HT);
      exp[r] = (dt > ST);
      if (!known[r]) n_meta++;
    end
    launch = 1'b1;
    #(SETTLE);
    for (int r = 0; r <= R; r++)
      if (known[r]) begin
        checks++;
        if (arb[r] !== exp[r]) begin
          failures++;
          $display("FAIL row %0d arbiter %b, expected %b (c=%h xform=%b)", r, arb[r], exp[r], v, en);
        end else if (r % 2 == 1) n_rev_checked++;
      end
    for (int j = 0; j < R; j++) begin
      checks++;
      if (resp[j] !== ((^arb) ^ arb[j])) begin
        failures++;
        $display("FAIL resp[%0d]=%b with arbiters %b", j, resp[j], arb);
      end
      if (resp[j]) n_one[j]++;
      else n_zero[j]++;
    end
    if (resp != {R{resp[0]}}) n_loo_split++;
    if (en) n_xf_on++;
    else n_xf_off++;
    got = arb;
    launch = 1'b0;
    #(SETTLE);
  endtask

  initial begin
    logic [R:0] a_off, a_on;
    int sum_meta;
    launch = 1'b0;
    xform_en = 1'b0;
    challenge = '0;
    for (int j = 0; j < R; j++) begin
      n_one[j] = 0;
      n_zero[j] = 0;
    end
    #(SETTLE);
    for (int k = 0; k < NCHAL; k++) begin
      logic [N-1:0] v;
      v = {$urandom(), $urandom()};
      apply(v, 1'b0, a_off);
      apply(v, 1'b1, a_on);
      if (a_off != a_on) n_mode_diff++;
    end
    sum_meta = 0;
    for (int r = 0; r <= R; r++) sum_meta += int'(meta_model[r]);
    checks++;
    if (sum_meta != n_meta) begin
      failures++;
      $display("FAIL arbiters report %0d metastable decisions, reference %0d", sum_meta, n_meta);
    end
    $display("launches: xform off %0d, on %0d; odd-row bits checked %0d; metastable %0d",
             n_xf_off, n_xf_on, n_rev_checked, n_meta);
    $display("responses not all equal %0d; XOR network changed the arbiter bits %0d times",
             n_loo_split, n_mode_diff);
    if (n_xf_off == 0) begin failures++; $display("FAIL mechanism never seen: xform off"); end
    if (n_xf_on == 0) begin failures++; $display("FAIL mechanism never seen: xform on"); end
    if (n_rev_checked == 0) begin failures++; $display("FAIL mechanism never seen: reversed row"); end
    if (n_meta == 0) begin failures++; $display("FAIL mechanism never seen: metastability"); end
    if (n_loo_split == 0) begin failures++; $display("FAIL mechanism never seen: leave-one-out"); end
    if (n_mode_diff == 0) begin failures++; $display("FAIL mechanism never seen: mode switch effect"); end
    for (int j = 0; j < R; j++) begin
      checks++;
      if (n_one[j] == 0 || n_zero[j] == 0) begin
        failures++;
        $display("FAIL resp[%0d] stuck (ones %0d, zeros %0d)", j, n_one[j], n_zero[j]);
      end
    end
    checks += 6;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
