// puf_pkg: constants and helper functions shared by the delay-based PUF models.
//
// The numbers here are the nominal figures of the delay-based PUF: 64 challenge
// bits per row, and switch element delays drawn from a Gaussian with a mean of
// 0.5 ns and a standard deviation of 4 ps (a 65 nm process).
//
// The functions give every simulated chip its own, repeatable set of element
// delays. A chip is identified by an integer seed. Each switch element owns an
// index e = 4*stage + k, where k selects one of the four delays of a switch
// (see sw_delay_e). The element delays along a row form a first-order
// autoregressive sequence,
//     z[0] = g[0],   z[e] = rho * z[e-1] + sqrt(1 - rho^2) * g[e],
// with g[e] independent standard normals, so the correlation between elements
// e and e' is rho^|e-e'|: an exponential correlogram with rho = exp(-alpha).
// rho = 0 gives independent delays. The standard normals are approximated by
// the sum of twelve uniform numbers minus six (Irwin-Hall), and the uniform
// numbers come from a 32-bit xorshift generator seeded by a hash of the chip
// seed and the element index. The correlated sequence and the hash are this
// design's own choices; only the Gaussian parameters and the exponential
// correlogram are the published model.
//
// Nothing in this package is synthesizable logic except the constants and the
// types; the real-valued functions are used by the behavioural models only.
package puf_pkg;
  timeunit 1ps;
  timeprecision 1fs;

  // Challenge bits (and switches) per row.
  localparam int unsigned N_STAGES = 64;
  // Nominal element delay and its spread, in picoseconds.
  localparam real MU_PS = 500.0;
  localparam real SIGMA_PS = 4.0;

  // The four delays of one switch.
  typedef enum logic [1:0] {
    SW_TT = 2'd0,  // top input to top output (straight)
    SW_BB = 2'd1,  // bottom input to bottom output (straight)
    SW_TB = 2'd2,  // top input to bottom output (crossed)
    SW_BT = 2'd3   // bottom input to top output (crossed)
  } sw_delay_e;

  // A set of four element delays, in picoseconds.
  typedef struct {
    real tt;
    real bb;
    real tb;
    real bt;
  } sw_delays_t;

  // One step of a 32-bit xorshift generator; the state must never be zero.
  function automatic int unsigned xorshift32(input int unsigned s);
    int unsigned x;
    x = s;
    x = x ^ (x << 13);
    x = x ^ (x >> 17);
    x = x ^ (x << 5);
    return x;
  endfunction

  // Mixes a chip seed and an element index into a non-zero generator state.
  function automatic int unsigned seed_hash(input int unsigned seed, input int unsigned idx);
    int unsigned h;
    h = seed * 32'h9E37_79B9 ^ (idx + 32'h7F4A_7C15) * 32'h85EB_CA6B;
    h = h ^ (h >> 16);
    h = h * 32'h2C1B_3C6D;
    h = h ^ (h >> 15);
    if (h == 0) h = 32'h1234_5678;
    return h;
  endfunction

  // Approximately standard normal number for (seed, idx), from twelve uniforms.
  function automatic real std_normal(input int unsigned seed, input int unsigned idx);
    int unsigned s;
    real acc;
    s = seed_hash(seed, idx);
    acc = 0.0;
    for (int j = 0; j < 12; j++) begin
      s = xorshift32(s);
      acc += real'(s) / 4294967296.0;
    end
    return acc - 6.0;
  endfunction

  // Delay, in picoseconds, of element idx of the chip row identified by seed.
  function automatic real element_delay(input int unsigned seed, input int unsigned idx,
                                        input real mu, input real sigma, input real rho);
    real z;
    real k;
    if (rho == 0.0) return mu + sigma * std_normal(seed, idx);
    k = $sqrt(1.0 - rho * rho);
    z = std_normal(seed, 0);
    for (int unsigned e = 1; e <= idx; e++) z = rho * z + k * std_normal(seed, e);
    return mu + sigma * z;
  endfunction

endpackage
