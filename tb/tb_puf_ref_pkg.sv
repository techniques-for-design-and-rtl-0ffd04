// tb_puf_ref_pkg: reference models for the testbenches. They compute, in
// zero time and without the RTL, what the PUF hardware should do:
//  * chain_arrival(): arrival times of an edge at the two ends of a delay
//    chain, walking the switches and inverters one by one with the
//    per-instance delays (the "database" of a characterized chip);
//  * g_xor()/g_wire(): the input network equations written with 1-based
//    arrays exactly as they are stated;
//  * rotate_row(): the interconnect permutation;
//  * z_out(): the output network equation.
package tb_puf_ref_pkg;
  import puf_pkg::*;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int MAXN = 256;

  // Arrival times (ps after the launch edge) at top and bottom path ends.
  function automatic void chain_arrival(
      int unsigned n, int unsigned ninv, int unsigned seed,
      real mu_sw, real sig_sw, real mu_inv, real sig_inv,
      logic [MAXN-1:0] c, bit rising, output real t_top, output real t_bot);
    real tt, tb_, nt, nb;
    bit  edge_rise;
    tt = 0.0;
    tb_ = 0.0;
    for (int unsigned k = 0; k < n; k++) begin
      if (c[k] == 1'b0) begin
        nt = tt  + switch_delay(mu_sw, sig_sw, seed, k, 0);
        nb = tb_ + switch_delay(mu_sw, sig_sw, seed, k, 3);
      end else begin
        nt = tb_ + switch_delay(mu_sw, sig_sw, seed, k, 2);
        nb = tt  + switch_delay(mu_sw, sig_sw, seed, k, 1);
      end
      edge_rise = rising;
      for (int unsigned j = 0; j < ninv; j++) begin
        // a rising input makes the inverter output fall (fall delay)
        nt += inverter_delay(mu_inv, sig_inv, seed, k, 0, j, edge_rise ? 1 : 0);
        nb += inverter_delay(mu_inv, sig_inv, seed, k, 1, j, edge_rise ? 1 : 0);
        edge_rise = !edge_rise;
      end
      tt  = nt;
      tb_ = nb;
    end
    t_top = tt;
    t_bot = tb_;
  endfunction

  // XOR input network, 1-based: cc[1..n], dd[1..n].
  function automatic logic [MAXN-1:0] g_xor(int unsigned n, logic [MAXN-1:0] d);
    logic dd [1:MAXN];
    logic cc [1:MAXN];
    logic [MAXN-1:0] c;
    for (int i = 1; i <= int'(n); i++) dd[i] = d[i-1];
    cc[(n + 2) / 2] = dd[1];
    for (int i = 1; i <= int'(n) - 1; i += 2) cc[(i + 1) / 2] = dd[i] ^ dd[i+1];
    for (int i = 2; i <= int'(n) - 2; i += 2) cc[(int'(n) + i + 2) / 2] = dd[i] ^ dd[i+1];
    c = '0;
    for (int i = 1; i <= int'(n); i++) c[i-1] = cc[i];
    return c;
  endfunction

  function automatic logic [MAXN-1:0] g_wire(int unsigned n, logic [MAXN-1:0] d);
    logic [MAXN-1:0] c;
    c = '0;
    for (int i = 1; i <= int'(n) / 2; i++) begin
      c[i-1] = d[i-1];
      c[i-1+int'(n)/2] = d[i-1];
    end
    return c;
  endfunction

  // Row m (0-based): rotate left by... row m bit i = x[i-m mod n].
  function automatic logic [MAXN-1:0] rotate_row(int unsigned n, int unsigned m,
                                                   logic [MAXN-1:0] x);
    logic [MAXN-1:0] c;
    c = '0;
    for (int unsigned i = 0; i < n; i++) begin
      int signed src;
      src = int'(i) - int'(m);
      while (src < 0) src += int'(n);
      c[i] = x[src];
    end
    return c;
  endfunction

  // Output network, 1-based: o_j = XOR_{i=1..x} r_{(j+s+i) mod q}, r_0 = r_q.
  function automatic logic [MAXN-1:0] z_out(int unsigned q, int unsigned qp,
                                             int unsigned x, int unsigned s,
                                             logic [MAXN-1:0] r);
    logic rr [0:MAXN];
    logic [MAXN-1:0] o;
    for (int i = 1; i <= int'(q); i++) rr[i] = r[i-1];
    rr[0] = rr[q];
    o = '0;
    for (int j = 1; j <= int'(qp); j++)
      for (int i = 1; i <= int'(x); i++)
        o[j-1] ^= rr[(j + int'(s) + i) % int'(q)];
    return o;
  endfunction
endpackage
