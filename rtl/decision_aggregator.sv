// decision_aggregator: turns the per-chunk verdicts of the DPI model into one
// verdict per packet and pairs it with the packet's QPN.
//
// A packet is malicious when at least THRESH of its chunks were flagged; the
// default THRESH = 1 rejects a packet as soon as any chunk is flagged, as in
// the published design, and a larger value trades detection for fewer false
// positives. The model's results arrive in packet order with a flag on each
// packet's last chunk, so a single counter suffices: it adds the flags and,
// on the last chunk, pushes the packet verdict into a verdict FIFO.
// Packet records {QPN, has_payload} from the extractor wait in a meta FIFO.
// The head record is released when it has no payload (verdict: clean, the
// model never sees such a packet) or when a verdict is available, so
// verdicts leave strictly in packet order, one per cycle at most.
//
// Timing: a verdict leaves 1 cycle after the last chunk's result (or after
// its record reaches the head). No back-pressure: the FIFOs are sized for
// the packets that can be in flight during the model latency (assertions in
// sync_fifo flag an overflow). FIFO depths are this design's choice.
module decision_aggregator
  import dpi_pkg::*;
#(
  parameter int unsigned THRESH     = 1,
  parameter int unsigned META_DEPTH = 32,
  parameter int unsigned VERD_DEPTH = 32
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          meta_valid,
  input  pkt_meta_t     meta,
  input  logic          ml_valid,
  input  logic          ml_flag,
  input  logic          ml_last,
  output logic          verdict_valid,
  output dpi_verdict_t  verdict,
  output logic [7:0]    flagged_chunks   // flagged chunks of the last finished packet
);
  logic [7:0] cnt, cnt_next;
  logic       mf_valid, vf_valid, vf_data, mf_pop, vf_pop;
  pkt_meta_t  mf_data;
  logic       unused_full_m, unused_full_v;
  logic [$clog2(META_DEPTH):0] unused_cnt_m;
  logic [$clog2(VERD_DEPTH):0] unused_cnt_v;

  always_comb begin
    cnt_next = cnt + 8'(ml_flag);
    if (cnt == 8'hFF) cnt_next = cnt;   // saturate
  end

  sync_fifo #(.WIDTH($bits(pkt_meta_t)), .DEPTH(META_DEPTH)) u_meta (
    .clk, .rst_n, .wr_en(meta_valid), .wr_data(meta), .full(unused_full_m),
    .rd_en(mf_pop), .rd_valid(mf_valid), .rd_data(mf_data), .count(unused_cnt_m));

  sync_fifo #(.WIDTH(1), .DEPTH(VERD_DEPTH)) u_verd (
    .clk, .rst_n, .wr_en(ml_valid && ml_last), .wr_data(cnt_next >= 8'(THRESH)),
    .full(unused_full_v), .rd_en(vf_pop), .rd_valid(vf_valid), .rd_data(vf_data),
    .count(unused_cnt_v));

  always_comb begin
    mf_pop = mf_valid && (!mf_data.has_payload || vf_valid);
    vf_pop = mf_valid && mf_data.has_payload && vf_valid;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt            <= '0;
      verdict_valid  <= 1'b0;
      verdict        <= '0;
      flagged_chunks <= '0;
    end else begin
      if (ml_valid) begin
        cnt <= ml_last ? 8'd0 : cnt_next;
        if (ml_last) flagged_chunks <= cnt_next;
      end
      verdict_valid <= mf_pop;
      if (mf_pop) begin
        verdict.qpn       <= mf_data.qpn;
        verdict.malicious <= mf_data.has_payload && vf_data;
      end
    end
  end

  // every model result must belong to a packet with payload that is waiting
  a_result_has_owner: assert property (@(posedge clk) disable iff (!rst_n)
      vf_pop |-> mf_data.has_payload)
    else $error("decision_aggregator: verdict without a payload packet");
endmodule
