// dpi_rdma_top: machine-learning deep packet inspection (DPI) as a side
// channel of a RoCEv2 receive pipeline.
//
// The stack's receive stream is tapped, never stalled. The payload extractor
// strips each packet's headers and ICRC and feeds its payload, one 512-bit
// chunk per cycle, to the classifier; the packet's QPN goes straight to the
// decision aggregator. The classifier flags chunks that look like
// executable code. The aggregator turns chunk flags into one verdict per
// packet (malicious if THRESH or more chunks were flagged), and the extended
// header-processing step combines that verdict with the stack's own
// header/CRC result: ACK and write the payload only if both pass, else NAK
// and discard. Because the classifier runs in parallel with the stack's
// 44-cycle pipeline, its latency (11 + 64 cycles for a 4096-byte packet
// plus a few cycles of overhead) is hidden and the verdict is normally
// ready before the stack asks for it.
//
// Two classifiers are built: the ternary neural network (the main model,
// model_sel = 0) and the symbolic-regression model (model_sel = 1). Both
// keep II = 1. A change of model_sel takes effect only when no chunk is in
// flight, so results never overtake each other (this switch is this
// design's choice; the published system picks a model at build time).
//
// The stack itself (MAC, header processing, CRC, host DMA) is outside this
// design: its stream enters on s_*, its per-packet header result on hdr_*
// (valid/ready), and the response leaves on resp_*.
module dpi_rdma_top
  import dpi_pkg::*;
#(
  parameter int unsigned THRESH = 1
) (
  input  logic                clk,
  input  logic                rst_n,
  // tap of the receive stream (beat = s_tvalid && s_tready)
  input  logic                s_tvalid,
  input  logic                s_tready,
  input  logic [BUS_W-1:0]    s_tdata,
  input  logic [BUS_W/8-1:0]  s_tkeep,
  input  logic                s_tlast,
  // classifier choice: 0 ternary network, 1 symbolic regression
  input  logic                model_sel,
  output logic                active_model,
  // stack's per-packet header-processing result
  input  logic                hdr_valid,
  input  hdr_result_t         hdr,
  output logic                hdr_ready,
  // ACK/NAK decision
  output logic                resp_valid,
  output response_t           resp,
  // observation
  output logic                verdict_valid,
  output dpi_verdict_t        verdict,
  output logic                qpn_mismatch,
  output logic                queue_overflow,
  output logic [31:0]         stall_cycles
);
  // ---------------- payload extraction ----------------
  logic      meta_valid, chunk_valid, chunk_last;
  pkt_meta_t meta;
  chunk_t    chunk_data;

  payload_extractor u_extract (
    .clk, .rst_n, .s_tvalid, .s_tready, .s_tdata, .s_tkeep, .s_tlast,
    .meta_valid, .meta, .chunk_valid, .chunk_data, .chunk_last, .queue_overflow);

  // ---------------- model selection ----------------
  logic [7:0] inflight;
  logic       ml_valid, ml_flag, ml_last;
  logic       nn_valid, nn_flag, nn_last, sr_valid, sr_flag, sr_last;
  logic signed [15:0] nn_logit;
  logic signed [31:0] sr_logit;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active_model <= 1'b0;
      inflight     <= '0;
    end else begin
      inflight <= inflight + 8'(chunk_valid) - 8'(ml_valid);
      if (inflight == '0 && !chunk_valid) active_model <= model_sel;
    end
  end

  ternary_nn u_nn (
    .clk, .rst_n, .in_valid(chunk_valid && !active_model), .in_chunk(chunk_data),
    .in_last(chunk_last), .out_valid(nn_valid), .out_flag(nn_flag), .out_last(nn_last),
    .out_logit(nn_logit));

  sr_model u_sr (
    .clk, .rst_n, .in_valid(chunk_valid && active_model), .in_chunk(chunk_data),
    .in_last(chunk_last), .out_valid(sr_valid), .out_flag(sr_flag), .out_last(sr_last),
    .out_logit(sr_logit));

  always_comb begin
    ml_valid = nn_valid || sr_valid;
    ml_flag  = nn_valid ? nn_flag : sr_flag;
    ml_last  = nn_valid ? nn_last : sr_last;
  end

  // ---------------- aggregation and final decision ----------------
  logic [7:0] flagged_chunks;

  decision_aggregator #(.THRESH(THRESH)) u_agg (
    .clk, .rst_n, .meta_valid, .meta, .ml_valid, .ml_flag, .ml_last,
    .verdict_valid, .verdict, .flagged_chunks);

  ext_header_proc u_ehp (
    .clk, .rst_n, .verdict_valid, .verdict, .hdr_valid, .hdr, .hdr_ready,
    .resp_valid, .resp, .qpn_mismatch, .stall_cycles);

  // the logits and per-packet flag counts are observation points only
  logic unused_obs;
  assign unused_obs = ^{nn_logit, sr_logit, flagged_chunks};

  a_one_model: assert property (@(posedge clk) disable iff (!rst_n) !(nn_valid && sr_valid))
    else $error("dpi_rdma_top: both models produced a result in the same cycle");
endmodule
