// ternary_output: the single-neuron output layer of the DPI network with the
// sigmoid folded into its threshold.
//
// The trained network ends in sigmoid(z) >= t. Because the sigmoid is
// monotonic, this equals z >= ln(t/(1-t)), so the layer only computes the
// integer logit z (a ternary dot product plus bias) and compares it with the
// fixed, pre-transformed threshold T_HAT. No exponential or division is
// needed, and the comparison fits in one LUT-level stage.
//
// Pipeline, 2 cycles: partial sums over groups of GROUP inputs; total plus
// bias and the comparison. The flag is 1 ("executable / malicious chunk")
// when z > T_HAT. Weights come from dpi_pkg::tern_w(SEED,0,i); T_HAT in the
// accumulator's integer scale is this design's choice.
module ternary_output #(
  parameter int unsigned N_IN   = 64,
  parameter int unsigned IN_W   = 4,
  parameter int unsigned GROUP  = 16,
  parameter int unsigned SEED   = 4,
  parameter int signed   T_HAT  = 0,
  parameter int unsigned USER_W = 1,
  parameter int unsigned ACC_W  = 16
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      in_valid,
  input  logic [N_IN-1:0][IN_W-1:0] in_data,
  input  logic [USER_W-1:0]         in_user,
  output logic                      out_valid,
  output logic                      out_flag,
  output logic signed [ACC_W-1:0]   out_logit,
  output logic [USER_W-1:0]         out_user
);
  localparam int unsigned NG = (N_IN + GROUP - 1) / GROUP;
  localparam int unsigned PS_W = $clog2(GROUP * ((1 << IN_W) - 1) + 1) + 1;

  typedef logic [N_IN-1:0] mask_t;

  function automatic mask_t gen_mask(input int sign);
    mask_t m;
    for (int i = 0; i < N_IN; i++)
      m[i] = (dpi_pkg::tern_w(SEED, 0, i) == sign);
    return m;
  endfunction

  localparam mask_t W_POS = gen_mask(1);
  localparam mask_t W_NEG = gen_mask(-1);
  localparam logic signed [ACC_W-1:0] BIAS = ACC_W'(dpi_pkg::tern_b(SEED, 0));

  logic signed [PS_W-1:0]  psum_d [NG];
  logic signed [PS_W-1:0]  psum_q [NG];
  logic signed [ACC_W-1:0] logit_d;
  logic                    v1;
  logic [USER_W-1:0]       u1;

  always_comb begin
    for (int g = 0; g < NG; g++) begin
      psum_d[g] = '0;
      for (int k = 0; k < GROUP; k++)
        if (g * GROUP + k < N_IN) begin
          if (W_POS[g*GROUP+k])
            psum_d[g] = psum_d[g] + PS_W'(in_data[g*GROUP+k]);
          else if (W_NEG[g*GROUP+k])
            psum_d[g] = psum_d[g] - PS_W'(in_data[g*GROUP+k]);
        end
    end
  end

  always_comb begin
    logit_d = BIAS;
    for (int g = 0; g < NG; g++)
      logit_d = logit_d + ACC_W'(psum_q[g]);
  end

  always_ff @(posedge clk) begin
    psum_q    <= psum_d;
    out_logit <= logit_d;
    out_flag  <= (logit_d > ACC_W'(T_HAT));
    u1        <= in_user;
    out_user  <= u1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1        <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      v1        <= in_valid;
      out_valid <= v1;
    end
  end
endmodule
