// sr_model: symbolic-regression classifier of one 512-bit payload chunk,
// the light-weight alternative to the ternary network.
//
// After operator pruning the published model keeps exp() as its only unary
// operator, uses two multipliers and a look-up table, reads a small, pruned
// subset of the input bits, and ends in a sigmoid that is folded into a
// threshold on the logit. The trained expression itself is not published,
// so this module implements the following expression form, which has
// exactly those ingredients:
//     u = BU + sum_k AU[k] * x[IU[k]]        (NU pruned inputs)
//     v = BV + sum_k AV[k] * x[IV[k]]        (NV pruned inputs)
//     z = C0 + C1 * exp(u) + C2 * v
//     flag = (z > T_HAT)
// u and v are signed fixed point with 7 fraction bits (the exp_lut input
// format); exp(u) comes from exp_lut in Q6.10; C0, C1, C2 are Q8.8; z and
// T_HAT are in Q.10. The stand-in constants come from dpi_pkg::mix32 with
// SEED, and the default threshold is chosen so that both verdicts occur.
//
// Pipeline, 6 cycles, one chunk per cycle (II = 1):
//   1. half sums of u and v     2. u and v
//   3. exp(u) table read        4. the two products
//   5. z                        6. threshold comparison
module sr_model #(
  parameter int unsigned NU     = 8,
  parameter int unsigned NV     = 8,
  parameter int unsigned SEED   = 7,
  parameter int signed   T_HAT  = 1 << 10
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [511:0]  in_chunk,
  input  logic          in_last,
  output logic          out_valid,
  output logic          out_flag,
  output logic          out_last,
  output logic signed [31:0] out_logit
);
  localparam int unsigned LATENCY = 6;

  // ---------------- stand-in model constants ----------------
  function automatic int unsigned sel_idx(input int unsigned which, input int unsigned k);
    return dpi_pkg::mix32(SEED, which, k) % 512;
  endfunction
  // weight in units of 2**-7, in [-64, 63] (i.e. [-0.5, 0.5))
  function automatic int sel_w(input int unsigned which, input int unsigned k);
    logic [31:0] h;
    h = dpi_pkg::mix32(SEED + 32'd50, which, k);
    return int'(h % 128) - 64;
  endfunction

  localparam int signed BU = -32;     // -0.25
  localparam int signed BV = 16;      //  0.125
  localparam int signed C0 = -128;    // -0.5  (Q8.8)
  localparam int signed C1 = 384;     //  1.5  (Q8.8)
  localparam int signed C2 = -256;    // -1.0  (Q8.8)

  // ---------------- stage 1-2: sparse weighted sums ----------------
  logic signed [15:0] uh_d [2], vh_d [2];
  logic signed [15:0] uh_q [2], vh_q [2];
  logic signed [15:0] u_q, v_q, v_q3;

  always_comb begin
    for (int h = 0; h < 2; h++) begin
      uh_d[h] = '0;
      vh_d[h] = '0;
      for (int k = h * NU / 2; k < (h + 1) * NU / 2; k++)
        if (in_chunk[sel_idx(0, k)]) uh_d[h] = uh_d[h] + 16'(sel_w(0, k));
      for (int k = h * NV / 2; k < (h + 1) * NV / 2; k++)
        if (in_chunk[sel_idx(1, k)]) vh_d[h] = vh_d[h] + 16'(sel_w(1, k));
    end
  end

  // ---------------- stage 3: exp ----------------
  logic [15:0] e_q;
  exp_lut #(.ADDR_W(10), .IN_W(16), .IN_FRAC(7), .OUT_W(16), .OUT_FRAC(10)) u_exp (
    .clk, .x(u_q), .y(e_q));

  // ---------------- stage 4-6: products, sum, comparison ----------------
  logic signed [31:0] p1_q, p2_q, z_q;

  always_ff @(posedge clk) begin
    uh_q  <= uh_d;
    vh_q  <= vh_d;
    u_q   <= uh_q[0] + uh_q[1] + 16'(BU);
    v_q   <= vh_q[0] + vh_q[1] + 16'(BV);
    v_q3  <= v_q;
    // Q6.10 * Q8.8 -> Q.18, back to Q.10 ; Q.7 * Q8.8 -> Q.15, back to Q.10
    p1_q  <= ($signed({16'd0, e_q}) * 32'(C1)) >>> 8;
    p2_q  <= (32'(v_q3) * 32'(C2)) >>> 5;
    z_q   <= p1_q + p2_q + (32'(C0) <<< 2);
    out_logit <= z_q;
    out_flag  <= (z_q > 32'(T_HAT));
  end

  // ---------------- valid / last sideband ----------------
  logic [LATENCY-1:0] vpipe, lpipe;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vpipe <= '0;
    else        vpipe <= {vpipe[LATENCY-2:0], in_valid};
  end
  always_ff @(posedge clk) lpipe <= {lpipe[LATENCY-2:0], in_last};
  assign out_valid = vpipe[LATENCY-1];
  assign out_last  = lpipe[LATENCY-1];
endmodule
