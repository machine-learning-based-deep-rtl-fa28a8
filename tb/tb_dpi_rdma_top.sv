// tb_dpi_rdma_top: end-to-end testbench of the DPI side channel at its
// default (published) sizes: 512-bit bus, 4096-byte MTU, 11-cycle ternary
// network, 6-cycle SR model, 44-cycle stack pipeline.
//
// RoCEv2 frames (RDMA WRITE/SEND/READ-response, ACKs without payload,
// frames up to the full MTU, some with a corrupted ICRC) stream through the
// tap back to back while a behavioural stack model produces the header
// results 44 cycles after each frame. For every packet the testbench works
// out the verdict itself (integer re-computation of the selected model over
// the payload chunks, "any chunk flagged" rule) and checks the ACK/NAK, the
// DPI-reject bit, QPN and PSN. It also checks that the DPI verdict is
// always ready before the stack asks for it (no stall, latency hidden), and
// counts each mechanism: ACK, DPI NAK, CRC NAK, packets without payload,
// MTU-sized packets, beats completing two chunks, packets rejected on a
// later chunk only, and switches between the two models.
module tb_dpi_rdma_top;
  import dpi_pkg::*;
  import roce_frame_pkg::*;
  import dpi_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #2 clk = ~clk;

  logic         s_tvalid = 0, s_tready = 1, s_tlast = 0;
  logic [511:0] s_tdata = '0;
  logic [63:0]  s_tkeep = '0;
  logic         model_sel = 0, active_model;
  logic         hdr_valid, hdr_ready, resp_valid, verdict_valid;
  logic         qpn_mismatch, queue_overflow;
  hdr_result_t  hdr;
  response_t    resp;
  dpi_verdict_t verdict;
  logic [31:0]  stall_cycles;

  dpi_rdma_top dut (.*);

  rdma_rx_stack_model #(.PIPE_LAT(44)) stack (
    .clk, .rst_n, .s_tvalid, .s_tready, .s_tdata, .s_tkeep, .s_tlast,
    .hdr_valid, .hdr, .hdr_ready);

  // ---------------- scoreboard ----------------
  typedef struct { logic [23:0] qpn; logic [23:0] psn; bit ok; bit mal; } pkt_t;
  pkt_t exp_q[$];
  longint cycle = 0, last_beat_q[$];
  int checks = 0, failures = 0, nresp = 0, max_wait = 0;
  int n_ack = 0, n_dpi_nak = 0, n_crc_nak = 0, n_nopl = 0, n_mtu = 0, n_double = 0;
  int n_late_flag = 0, n_switch = 0, n_sr_pkts = 0, n_nn_pkts = 0;
  logic prev_model = 0;

  always @(posedge clk) begin
    cycle++;
    if (rst_n) begin
      if (dut.u_extract.push_b) n_double++;
      if (active_model != prev_model) n_switch++;
      prev_model = active_model;
      if (s_tvalid && s_tready && s_tlast) last_beat_q.push_back(cycle);
      if (verdict_valid) begin
        int w;
        w = int'(cycle - last_beat_q.pop_front());
        if (w > max_wait) max_wait = w;
      end
      if (resp_valid) begin
        pkt_t e;
        e = exp_q.pop_front();
        checks++;
        if (resp.qpn !== e.qpn || resp.psn !== e.psn || resp.ack !== (e.ok && !e.mal) ||
            resp.dpi_reject !== (e.ok && e.mal)) begin
          failures++;
          $display("ERROR: packet %0d qpn %h: ack %0b rej %0b, expected ok %0b mal %0b",
                   nresp, resp.qpn, resp.ack, resp.dpi_reject, e.ok, e.mal);
        end
        if (resp.ack) n_ack++; else if (resp.dpi_reject) n_dpi_nak++; else n_crc_nak++;
        nresp++;
      end
    end
  end

  // ---------------- stimulus ----------------
  int pkt_no = 0;

  task automatic send(input byte unsigned opcode, input int plen, input int kind,
                      input bit bad);
    bytes_t pl, f;
    chunk_q_t cq;
    bit mal, first_flag;
    int qpn;
    for (int i = 0; i < plen; i++) begin
      byte unsigned b;
      b = byte'($urandom);
      if (kind == 1) b &= byte'($urandom) & byte'($urandom);   // sparse
      if (kind == 2) b = (i % 97 < 3) ? 8'hFF : 8'h00;         // almost empty
      pl.push_back(b);
    end
    qpn = 24'h1000 + pkt_no;
    f   = build_frame(opcode, qpn, pkt_no, pl, bad);
    cq  = payload_chunks(pl);
    mal = 0;
    foreach (cq[j]) begin
      bit fl;
      fl = active_model ? sr_flag(cq[j]) : nn_flag(cq[j]);
      if (fl && !mal && j > 0) n_late_flag++;
      mal |= fl;
    end
    if (active_model) n_sr_pkts++; else n_nn_pkts++;
    if (plen == 0) n_nopl++;
    if (plen == MTU) n_mtu++;
    exp_q.push_back('{qpn[23:0], 24'(pkt_no), !bad, mal});
    pkt_no++;
    for (int b = 0; b * 64 < f.size(); b++) begin
      logic [511:0] d;
      logic [63:0] kp;
      d = '0; kp = '0;
      for (int i = 0; i < 64; i++)
        if (b * 64 + i < f.size()) begin d[i*8 +: 8] = f[b*64 + i]; kp[i] = 1'b1; end
      s_tvalid <= 1; s_tdata <= d; s_tkeep <= kp; s_tlast <= ((b + 1) * 64 >= f.size());
      @(posedge clk);
    end
  endtask

  task automatic idle(input int n);
    s_tvalid <= 0;
    repeat (n) @(posedge clk);
  endtask

  task automatic traffic(input int n);
    byte unsigned ops[5] = '{OP_WRITE_ONLY, OP_WRITE_MID, OP_SEND_ONLY, OP_RRESP_ONLY,
                             OP_WRITE_LAST};
    for (int k = 0; k < n; k++) begin
      int plen, kind;
      case ($urandom % 6)
        0:       plen = 0;
        1:       plen = 1 + $urandom % 64;
        2:       plen = MTU;
        default: plen = 1 + $urandom % 700;
      endcase
      kind = $urandom % 3;
      send(plen == 0 ? OP_ACK : ops[$urandom % 5], plen, kind, ($urandom % 7 == 0));
    end
  endtask

  initial begin
    init();

    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // ternary network: directed cases, then random traffic
    send(OP_WRITE_ONLY, MTU, 0, 0);
    send(OP_ACK, 0, 0, 0);
    send(OP_WRITE_MID, 100, 2, 0);
    send(OP_SEND_ONLY, 10, 1, 1);
    traffic(25);
    // switch to the symbolic-regression model
    model_sel <= 1;
    idle(30);
    checks++;
    if (active_model !== 1'b1) begin failures++; $display("ERROR: model switch to SR"); end
    traffic(25);
    // and back
    model_sel <= 0;
    idle(30);
    checks++;
    if (active_model !== 1'b0) begin failures++; $display("ERROR: model switch to NN"); end
    traffic(10);
    idle(200);

    checks++;
    if (nresp != pkt_no || exp_q.size() != 0) begin
      failures++; $display("ERROR: %0d responses for %0d packets", nresp, pkt_no);
    end
    checks++;
    if (stall_cycles != 0 || max_wait >= 44) begin
      failures++;
      $display("ERROR: DPI latency not hidden: %0d stall cycles, verdict %0d cycles after last beat",
               stall_cycles, max_wait);
    end
    checks++;
    if (qpn_mismatch || queue_overflow) begin failures++; $display("ERROR: mismatch/overflow"); end
    begin
      int cnt[9];
      string nm[9];
      cnt = '{n_ack, n_dpi_nak, n_crc_nak, n_nopl, n_mtu, n_double, n_late_flag,
                     n_switch, n_sr_pkts};
      nm = '{"ACK", "DPI NAK", "CRC NAK", "no-payload packet", "MTU packet",
                       "two-chunk beat", "late-chunk rejection", "model switch", "SR packet"};
      foreach (cnt[i]) begin
        checks++;
        $display("  %-22s %0d", nm[i], cnt[i]);
        if (cnt[i] == 0) begin failures++; $display("ERROR: %s never happened", nm[i]); end
      end
    end
    $display("packets %0d (NN %0d, SR %0d), longest verdict wait after last beat %0d cycles",
             pkt_no, n_nn_pkts, n_sr_pkts, max_wait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("ERROR: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
