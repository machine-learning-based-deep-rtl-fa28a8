// payload_extractor: taps the RoCEv2 receive stream and turns each packet's
// payload into a sequence of 512-bit chunks for the DPI model.
//
// The extractor watches the stack's 512-bit AXI4-Stream (a beat counts when
// s_tvalid && s_tready) without ever stalling it. From the first beat of a
// frame it reads the BTH opcode, the destination QPN and the IPv4 total
// length. The opcode gives the header length H (Ethernet+IPv4+UDP+BTH = 54
// bytes, +16 for a RETH, +4 for an AETH); the IP length gives the end of the
// payload (IP total length + 14 - 4, i.e. in front of the 4-byte ICRC).
// Payload byte k sits at frame byte H+k, so chunk j is built from the upper
// bytes of one beat and the lower bytes of the next with a byte-granular
// funnel shift; bytes past the payload end (the ICRC, the last partial
// chunk's padding) are forced to zero.
//
// Outputs:
//   meta_*  : one record per packet {QPN, has_payload}, on its first beat
//   chunk_* : payload chunks in order, chunk_last on each packet's last one
// A beat can complete two chunks (the end of one spanning chunk and a short
// final chunk); a 4-entry queue absorbs that, since a packet never yields
// more chunks than beats. Chunk rate is therefore one per cycle (II=1).
// The document specifies the function (strip headers and checksum, forward
// the payload and the QPN); the header parsing details, the use of the IP
// length and the zero padding are this design's choices. Frames are assumed
// to be RoCEv2 over IPv4 without options or VLAN tag.
module payload_extractor
  import dpi_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  // receive stream tap
  input  logic                 s_tvalid,
  input  logic                 s_tready,
  input  logic [BUS_W-1:0]     s_tdata,
  input  logic [BUS_W/8-1:0]   s_tkeep,
  input  logic                 s_tlast,
  // per-packet metadata to the decision aggregator
  output logic                 meta_valid,
  output pkt_meta_t            meta,
  // payload chunks to the ML model
  output logic                 chunk_valid,
  output chunk_t               chunk_data,
  output logic                 chunk_last,
  // diagnostics
  output logic                 queue_overflow
);
  localparam int unsigned NB = BUS_W / 8;   // 64 bytes per beat
  localparam int unsigned QD = 4;

  logic beat;
  assign beat = s_tvalid && s_tready;

  // ---------------- per-packet state ----------------
  logic [7:0]  beat_idx;
  logic [7:0]  opcode_q;
  logic [15:0] pay_end_q;

  logic [7:0]  opcode;
  logic [15:0] pay_end;
  logic [15:0] h, plen, nch, ofs, bofs, k;
  logic        first;

  always_comb begin
    first   = (beat_idx == '0);
    opcode  = first ? s_tdata[BTH_OFS*8 +: 8] : opcode_q;
    // IPv4 total length: frame bytes 16 (MSB) and 17 (LSB)
    pay_end = first ? ({s_tdata[16*8 +: 8], s_tdata[17*8 +: 8]} + 16'd14 - 16'(ICRC_LEN))
                    : pay_end_q;
    h       = 16'(hdr_len(opcode));
    plen    = (pay_end > h) ? pay_end - h : 16'd0;
    nch     = (plen + 16'(NB - 1)) / 16'(NB);
    ofs     = h % 16'(NB);
    bofs    = h / 16'(NB);
    k       = 16'(beat_idx);
  end

  // ---------------- chunk formation ----------------
  logic [BUS_W-1:0]   prev;
  // bytes ofs .. ofs+NB-1 of the 2*NB-byte word {hi, lo}
  function automatic chunk_t funnel(input chunk_t hi, input chunk_t lo, input logic [15:0] sh);
    return BUS_W'({hi, lo} >> (sh * 8));
  endfunction

  logic               comb_ok, tail_ok;
  logic [15:0]        j_comb, j_tail;
  chunk_t             c_comb, c_tail;

  function automatic chunk_t mask_payload(input chunk_t c, input logic [15:0] j,
                                          input logic [15:0] len);
    chunk_t m;
    for (int b = 0; b < NB; b++)
      m[b*8 +: 8] = ((32'(j) * NB + b) < 32'(len)) ? c[b*8 +: 8] : 8'h00;
    return m;
  endfunction

  always_comb begin
    j_comb   = k - bofs - 16'd1;
    j_tail   = nch - 16'd1;
    // chunk j_comb started in the previous beat and has payload in this one
    comb_ok  = (k >= bofs + 16'd1) && (j_comb < nch) && (pay_end > k * 16'(NB));
    // the last chunk starts in this beat and the payload also ends in it
    tail_ok  = (nch != '0) && (k == bofs + nch - 16'd1) &&
               (pay_end <= (k + 16'd1) * 16'(NB));
    c_comb   = mask_payload(funnel(s_tdata, prev, ofs), j_comb, plen);
    c_tail   = mask_payload(funnel('0, s_tdata, ofs), j_tail, plen);
  end

  // ---------------- chunk queue (up to two writes per cycle) ----------------
  typedef struct packed {
    chunk_t data;
    logic   last;
  } qent_t;

  qent_t       q_mem [QD];
  logic [2:0]  q_wr, q_rd;
  logic [2:0]  q_cnt;
  logic        push_a, push_b;
  qent_t       ent_a, ent_b;

  always_comb begin
    push_a = beat && (comb_ok || tail_ok);
    push_b = beat && comb_ok && tail_ok;
    ent_a  = comb_ok ? qent_t'{c_comb, (j_comb == nch - 16'd1)} : qent_t'{c_tail, 1'b1};
    ent_b  = qent_t'{c_tail, 1'b1};
    q_cnt  = q_wr - q_rd;
  end

  logic pop;
  assign pop         = (q_cnt != '0);
  assign chunk_valid = pop;
  assign chunk_data  = q_mem[q_rd[1:0]].data;
  assign chunk_last  = q_mem[q_rd[1:0]].last;

  always_ff @(posedge clk) begin
    if (push_a) q_mem[q_wr[1:0]] <= ent_a;
    if (push_b) q_mem[q_wr[1:0] + 2'd1] <= ent_b;
    if (beat) begin
      prev <= s_tdata;
      if (first) begin
        opcode_q  <= opcode;
        pay_end_q <= pay_end;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      beat_idx       <= '0;
      q_wr           <= '0;
      q_rd           <= '0;
      meta_valid     <= 1'b0;
      meta           <= '0;
      queue_overflow <= 1'b0;
    end else begin
      q_wr <= q_wr + 3'(push_a) + 3'(push_b);
      q_rd <= q_rd + 3'(pop);
      if (q_cnt + 3'(push_a) + 3'(push_b) - 3'(pop) > 3'(QD)) queue_overflow <= 1'b1;
      meta_valid <= beat && first;
      if (beat && first) begin
        meta.qpn         <= {s_tdata[47*8 +: 8], s_tdata[48*8 +: 8], s_tdata[49*8 +: 8]};
        meta.has_payload <= (nch != '0);
      end
      if (beat) beat_idx <= s_tlast ? 8'd0 : ((beat_idx == 8'hFF) ? beat_idx : beat_idx + 8'd1);
    end
  end

  // s_tkeep is implied by the IP length; it is kept on the port for a complete tap.
  logic unused_keep;
  assign unused_keep = ^s_tkeep;

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) !queue_overflow)
    else $error("payload_extractor: chunk queue overflow");
endmodule
