// dpi_ref_pkg: testbench reference models of the two chunk classifiers,
// written as plain integer arithmetic (no pipelining, no bit tricks) so that
// they check the RTL independently of how it is built.
//   nn_flag : ternary network 512-32-64-64-1, 4-bit ReLU (shift 2, clamp
//             15), logit > 0; weights from dpi_pkg::tern_w / tern_b
//   sr_flag : z = -0.5 + 1.5 exp(u) - v in Q.10 fixed point, z > 1.0
// Call init() once before use; it caches the weight tables.
package dpi_ref_pkg;
  import dpi_pkg::*;

  int w1[32][512], w2[64][32], w3[64][64], wo[64], b1[32], b2[64], b3[64], bo;

  function automatic void init();
    for (int o = 0; o < 32; o++) begin
      b1[o] = tern_b(SEED_L1, o);
      for (int i = 0; i < 512; i++) w1[o][i] = tern_w(SEED_L1, o, i);
    end
    for (int o = 0; o < 64; o++) begin
      b2[o] = tern_b(SEED_L2, o);
      b3[o] = tern_b(SEED_L3, o);
      for (int i = 0; i < 32; i++) w2[o][i] = tern_w(SEED_L2, o, i);
      for (int i = 0; i < 64; i++) w3[o][i] = tern_w(SEED_L3, o, i);
      wo[o] = tern_w(SEED_OUT, 0, o);
    end
    bo = tern_b(SEED_OUT, 0);
  endfunction

  function automatic int qrelu(input int s);
    if (s <= 0) return 0;
    return ((s >>> 2) > 15) ? 15 : (s >>> 2);
  endfunction

  function automatic bit nn_flag(input logic [511:0] x);
    int a1[32], a2[64], a3[64];
    int s;
    for (int o = 0; o < 32; o++) begin
      s = b1[o];
      for (int i = 0; i < 512; i++) if (x[i]) s += w1[o][i];
      a1[o] = qrelu(s);
    end
    for (int o = 0; o < 64; o++) begin
      s = b2[o];
      for (int i = 0; i < 32; i++) s += w2[o][i] * a1[i];
      a2[o] = qrelu(s);
    end
    for (int o = 0; o < 64; o++) begin
      s = b3[o];
      for (int i = 0; i < 64; i++) s += w3[o][i] * a2[i];
      a3[o] = qrelu(s);
    end
    s = bo;
    for (int i = 0; i < 64; i++) s += wo[i] * a3[i];
    return s > 0;
  endfunction

  function automatic bit sr_flag(input logic [511:0] x);
    int u, v, e;
    u = -32; v = 16;
    for (int k = 0; k < 8; k++) begin
      if (x[mix32(7, 0, k) % 512]) u += int'(mix32(57, 0, k) % 128) - 64;
      if (x[mix32(7, 1, k) % 512]) v += int'(mix32(57, 1, k) % 128) - 64;
    end
    u = (u < -512) ? -512 : (u > 511) ? 511 : u;
    e = int'($floor($exp(real'(u) / 128.0) * 1024.0 + 0.5));
    return (((e * 384) >>> 8) + ((v * -256) >>> 5) - 512) > 1024;
  endfunction
endpackage
