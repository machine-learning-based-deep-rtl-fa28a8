// ternary_nn: the ternary-weight neural network that classifies one 512-bit
// payload chunk as executable (flag=1) or not (flag=0).
//
// Architecture as published: 512 binary inputs (the raw bits of one bus
// beat), hidden layers of 32, 64 and 64 neurons with ternary weights and
// quantized ReLU, and one output neuron whose sigmoid is replaced by a
// comparison with a logit threshold. Every layer is fully parallel, so one
// chunk enters per clock cycle (II = 1), and the whole network has a fixed
// latency of 11 cycles (3 + 3 + 3 + 2), matching the published figure.
//
// Interface: in_valid/in_chunk/in_last enter together; LATENCY cycles later
// out_valid/out_flag/out_last leave together. There is no back-pressure:
// the network never stalls. out_logit exposes the comparator input.
// The 4-bit activations, requantization shifts and threshold are this
// design's choices; weights are the stand-in pattern of dpi_pkg.
module ternary_nn #(
  parameter int unsigned N_IN   = dpi_pkg::NN_IN,
  parameter int unsigned N_H1   = dpi_pkg::NN_H1,
  parameter int unsigned N_H2   = dpi_pkg::NN_H2,
  parameter int unsigned N_H3   = dpi_pkg::NN_H3,
  parameter int unsigned ABITS  = dpi_pkg::NN_ABITS,
  parameter int unsigned SHIFT1 = 2,
  parameter int unsigned SHIFT2 = 2,
  parameter int unsigned SHIFT3 = 2,
  parameter int signed   T_HAT  = 0
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic [N_IN-1:0]         in_chunk,
  input  logic                    in_last,
  output logic                    out_valid,
  output logic                    out_flag,
  output logic                    out_last,
  output logic signed [15:0]      out_logit
);
  logic                       v1, v2, v3;
  logic                       l1, l2, l3;
  logic [N_H1-1:0][ABITS-1:0] a1;
  logic [N_H2-1:0][ABITS-1:0] a2;
  logic [N_H3-1:0][ABITS-1:0] a3;

  ternary_dense #(.N_IN(N_IN), .N_OUT(N_H1), .IN_W(1), .OUT_W(ABITS),
                  .SHIFT(SHIFT1), .GROUP(32), .SEED(dpi_pkg::SEED_L1)) u_l1 (
    .clk, .rst_n, .in_valid(in_valid), .in_data(in_chunk), .in_user(in_last),
    .out_valid(v1), .out_data(a1), .out_user(l1));

  ternary_dense #(.N_IN(N_H1), .N_OUT(N_H2), .IN_W(ABITS), .OUT_W(ABITS),
                  .SHIFT(SHIFT2), .GROUP(8), .SEED(dpi_pkg::SEED_L2)) u_l2 (
    .clk, .rst_n, .in_valid(v1), .in_data(a1), .in_user(l1),
    .out_valid(v2), .out_data(a2), .out_user(l2));

  ternary_dense #(.N_IN(N_H2), .N_OUT(N_H3), .IN_W(ABITS), .OUT_W(ABITS),
                  .SHIFT(SHIFT3), .GROUP(8), .SEED(dpi_pkg::SEED_L3)) u_l3 (
    .clk, .rst_n, .in_valid(v2), .in_data(a2), .in_user(l2),
    .out_valid(v3), .out_data(a3), .out_user(l3));

  ternary_output #(.N_IN(N_H3), .IN_W(ABITS), .GROUP(16), .SEED(dpi_pkg::SEED_OUT),
                   .T_HAT(T_HAT)) u_out (
    .clk, .rst_n, .in_valid(v3), .in_data(a3), .in_user(l3),
    .out_valid(out_valid), .out_flag(out_flag), .out_logit(out_logit),
    .out_user(out_last));
endmodule
