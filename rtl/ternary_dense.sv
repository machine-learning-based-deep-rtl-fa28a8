// ternary_dense: one fully-parallel dense layer with ternary weights and a
// quantized ReLU, as used in the hidden layers of the DPI network.
//
// Every multiplication is a ternary one (weight -1, 0 or +1), so a product is
// the input itself, its negation or nothing, and the layer reduces to adder
// trees. All N_OUT neurons are evaluated in parallel, so a new input vector
// is accepted every cycle (initiation interval 1), which the line-rate
// requirement demands.
//
// Pipeline, 3 cycles from in_* to out_*:
//   1. partial sums over groups of GROUP inputs
//   2. sum of the partial sums plus the bias
//   3. ReLU, arithmetic right shift by SHIFT, saturation to OUT_W bits
// The weights are fixed at elaboration from dpi_pkg::tern_w(SEED,..) and
// dpi_pkg::tern_b(SEED,..), the way a generated model hard-codes them.
// Activation width, shift and group size are this design's choices; the
// document only states ternary weights and quantized ReLU.
//
// in_user/out_user is a sideband (packet-last flag) that travels with the data.
module ternary_dense #(
  parameter int unsigned N_IN   = 512,
  parameter int unsigned N_OUT  = 32,
  parameter int unsigned IN_W   = 1,    // input activation width (unsigned)
  parameter int unsigned OUT_W  = 4,    // output activation width (unsigned)
  parameter int unsigned SHIFT  = 2,    // requantization shift
  parameter int unsigned GROUP  = 32,   // inputs per stage-1 partial sum
  parameter int unsigned SEED   = 1,
  parameter int unsigned USER_W = 1,
  parameter int unsigned ACC_W  = 16
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           in_valid,
  input  logic [N_IN-1:0][IN_W-1:0]      in_data,
  input  logic [USER_W-1:0]              in_user,
  output logic                           out_valid,
  output logic [N_OUT-1:0][OUT_W-1:0]    out_data,
  output logic [USER_W-1:0]              out_user
);
  localparam int unsigned NG = (N_IN + GROUP - 1) / GROUP;
  localparam int signed   QMAX = (1 << OUT_W) - 1;
  // a partial sum spans -GROUP*(2**IN_W-1) .. +GROUP*(2**IN_W-1)
  localparam int unsigned PS_W = $clog2(GROUP * ((1 << IN_W) - 1) + 1) + 1;

  typedef logic [N_OUT-1:0][N_IN-1:0] mask_t;

  function automatic mask_t gen_mask(input int sign);
    mask_t m;
    for (int o = 0; o < N_OUT; o++)
      for (int i = 0; i < N_IN; i++)
        m[o][i] = (dpi_pkg::tern_w(SEED, o, i) == sign);
    return m;
  endfunction

  localparam mask_t W_POS = gen_mask(1);
  localparam mask_t W_NEG = gen_mask(-1);

  // ---------------- stage 1: partial sums ----------------
  // Inputs padded to a whole number of groups; padding bits are zero.
  logic [NG*GROUP-1:0][IN_W-1:0] in_pad;
  assign in_pad = (NG*GROUP*IN_W)'(in_data);

  // Ternary dot product of one group of inputs with neuron o's weights.
  function automatic logic signed [PS_W-1:0] group_sum(
      input logic [GROUP-1:0][IN_W-1:0] x, input int o, input int g);
    logic signed [PS_W-1:0] s;
    s = '0;
    for (int k = 0; k < GROUP; k++)
      if (g * GROUP + k < N_IN) begin
        if (W_POS[o][g*GROUP+k])      s = s + PS_W'(x[k]);
        else if (W_NEG[o][g*GROUP+k]) s = s - PS_W'(x[k]);
      end
    return s;
  endfunction

  logic [N_OUT-1:0][NG-1:0][PS_W-1:0]  psum_d, psum_q;
  logic [N_OUT-1:0][ACC_W-1:0]         acc_d, acc_q;
  logic [N_OUT-1:0][OUT_W-1:0]         act_d;
  logic                                v1, v2;
  logic [USER_W-1:0]                   u1, u2;

  for (genvar o = 0; o < N_OUT; o++) begin : g_neuron
    for (genvar g = 0; g < NG; g++) begin : g_group
      assign psum_d[o][g] = group_sum(in_pad[g*GROUP +: GROUP], o, g);
    end

    // ---------------- stage 2: total plus bias ----------------
    always_comb begin
      logic signed [ACC_W-1:0] a;
      a = ACC_W'(dpi_pkg::tern_b(SEED, o));
      for (int g = 0; g < NG; g++)
        a = a + ACC_W'($signed(psum_q[o][g]));
      acc_d[o] = a;
    end

    // ---------------- stage 3: quantized ReLU ----------------
    always_comb begin
      logic signed [ACC_W-1:0] a, s;
      a = $signed(acc_q[o]);
      s = a >>> SHIFT;
      if (a <= 0)                 act_d[o] = '0;
      else if (s > ACC_W'(QMAX))  act_d[o] = OUT_W'(QMAX);
      else                        act_d[o] = OUT_W'(s);
    end
  end

  always_ff @(posedge clk) begin
    psum_q   <= psum_d;
    acc_q    <= acc_d;
    out_data <= act_d;
    u1       <= in_user;
    u2       <= u1;
    out_user <= u2;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1        <= 1'b0;
      v2        <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      v1        <= in_valid;
      v2        <= v1;
      out_valid <= v2;
    end
  end
endmodule
