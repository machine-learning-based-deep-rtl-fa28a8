// ext_header_proc: the extended header-processing step, where the stack's
// own per-packet result and the DPI verdict meet and the response is chosen.
//
// The stack delivers, per received packet and in order, {QPN, PSN, hdr_ok}
// (hdr_ok = header checks and CRC passed) on a valid/ready handshake near the
// end of its pipeline. DPI verdicts {QPN, malicious} arrive, also in packet
// order, from the decision aggregator and wait in a FIFO. When both are
// present the response is issued one cycle later:
//   ack = hdr_ok && !malicious   -> ACK, payload is written to host memory
//   otherwise                    -> NAK, payload is discarded
// dpi_reject marks NAKs caused by the DPI verdict alone.
// If the verdict is not yet there, hdr_ready stays low and the stack waits
// (stall_cycles counts such cycles). At the published sizes the verdict is
// always earlier, so the stall never happens; it is a safeguard of this
// design. qpn_mismatch flags a verdict whose QPN differs from the stack's
// (the packet is then NAKed). Handshake details are this design's choice.
module ext_header_proc
  import dpi_pkg::*;
#(
  parameter int unsigned VERD_DEPTH = 32
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          verdict_valid,
  input  dpi_verdict_t  verdict,
  input  logic          hdr_valid,
  input  hdr_result_t   hdr,
  output logic          hdr_ready,
  output logic          resp_valid,
  output response_t     resp,
  output logic          qpn_mismatch,
  output logic [31:0]   stall_cycles
);
  logic         vf_valid, unused_full;
  dpi_verdict_t vf_data;
  logic [$clog2(VERD_DEPTH):0] unused_cnt;
  logic         fire, match;

  sync_fifo #(.WIDTH($bits(dpi_verdict_t)), .DEPTH(VERD_DEPTH)) u_verd (
    .clk, .rst_n, .wr_en(verdict_valid), .wr_data(verdict), .full(unused_full),
    .rd_en(fire), .rd_valid(vf_valid), .rd_data(vf_data), .count(unused_cnt));

  assign hdr_ready = vf_valid;
  assign fire      = hdr_valid && vf_valid;
  assign match     = (vf_data.qpn == hdr.qpn);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      resp_valid   <= 1'b0;
      resp         <= '0;
      qpn_mismatch <= 1'b0;
      stall_cycles <= '0;
    end else begin
      resp_valid <= fire;
      if (fire) begin
        resp.qpn        <= hdr.qpn;
        resp.psn        <= hdr.psn;
        resp.ack        <= hdr.hdr_ok && !vf_data.malicious && match;
        resp.dpi_reject <= hdr.hdr_ok && vf_data.malicious;
        if (!match) qpn_mismatch <= 1'b1;
      end
      if (hdr_valid && !vf_valid) stall_cycles <= stall_cycles + 32'd1;
    end
  end

  a_hdr_stable: assert property (@(posedge clk) disable iff (!rst_n)
      hdr_valid && !hdr_ready |=> hdr_valid && $stable(hdr))
    else $error("ext_header_proc: header result changed while waiting");
endmodule
