// puf_pkg: types, constants and elaboration-time helper functions shared by
// the secure PUF and the delay characterization circuit.
//
// The delay models need one fixed, per-instance set of "manufacturing"
// delays. They are drawn here from a deterministic hash of (seed, index), so
// that every instance is a different but reproducible chip. A Gaussian sample
// is approximated by the sum of twelve uniform samples minus six; delays are
// then mu + sigma * sample, in picoseconds. The hash and the Gaussian
// approximation are choices of this design; the Gaussian, independent,
// identically distributed delay model follows the source analysis.
//
// normal_cdf() is the arbiter characteristic: the probability that a
// flip-flop takes the new value when its data changed x standard deviations
// before the clock edge (a Gaussian CDF, here in its logistic approximation).
package puf_pkg;
  timeunit 1ps;
  timeprecision 1fs;

  // Kind of challenge transformation G in the input network.
  typedef enum logic {
    NET_XOR  = 1'b0,   // one-to-one XOR network
    NET_WIRE = 1'b1    // wire-only network, N/2 inputs
  } in_net_e;

  // Index offsets that keep the delay samples of different elements apart.
  localparam int unsigned SW_BASE  = 32'd0;
  localparam int unsigned INV_BASE = 32'd1000000;

  function automatic int unsigned mix32(int unsigned x);
    int unsigned h;
    h = x;
    h = h ^ (h >> 16);
    h = h * 32'h7feb352d;
    h = h ^ (h >> 15);
    h = h * 32'h846ca68b;
    h = h ^ (h >> 16);
    return h;
  endfunction

  // Uniform sample in [0, 1).
  function automatic real unit_uniform(int unsigned seed, int unsigned idx);
    return real'(mix32(mix32(seed * 32'h9e3779b9 + 32'h632be5ab) ^ idx)) / 4294967296.0;
  endfunction

  // Approximately standard normal sample.
  function automatic real std_normal(int unsigned seed, int unsigned idx);
    real s;
    s = 0.0;
    for (int unsigned k = 0; k < 12; k++) s += unit_uniform(seed, idx * 12 + k);
    return s - 6.0;
  endfunction

  function automatic real gauss_delay(real mu, real sigma, int unsigned seed, int unsigned idx);
    real d;
    d = mu + sigma * std_normal(seed, idx);
    return (d < 0.0) ? 0.0 : d;
  endfunction

  // Delay of link `which` of switch `stage`: 0 = in0->out0, 1 = in0->out1,
  // 2 = in1->out0, 3 = in1->out1.
  function automatic real switch_delay(real mu, real sigma, int unsigned seed,
                                       int unsigned stage, int unsigned which);
    return gauss_delay(mu, sigma, seed, SW_BASE + stage * 4 + which);
  endfunction

  // Rise (edge = 0) or fall (edge = 1) delay of inverter `k` of the delay
  // element that follows switch `stage` on path `path` (0 top, 1 bottom).
  function automatic real inverter_delay(real mu, real sigma, int unsigned seed,
                                         int unsigned stage, int unsigned path,
                                         int unsigned k, int unsigned edge_sel);
    return gauss_delay(mu, sigma, seed,
                       INV_BASE + ((stage * 2 + path) * 64 + k) * 2 + edge_sel);
  endfunction

  function automatic real normal_cdf(real x);
    return 1.0 / (1.0 + $exp(-1.702 * x));
  endfunction

endpackage
