// tb_dpi_line_rate: workload testbench in the style of an RDMA WRITE
// benchmark (latency ping-pong and bandwidth batches) run on the DPI side
// channel with the ternary network selected, at the default sizes.
//
//   ping-pong : for each message size, PINGS times, one RDMA WRITE message
//               is sent on an idle link and the time from its last beat to its response
//               is measured. With the DPI hidden behind the stack pipeline
//               this time must be the same for every size and every packet.
//   batch     : for each message size a batch of messages is sent with the
//               stream valid on every cycle, no gap between frames (faster
//               than a 100G link could deliver: 64 B x 250 MHz = 128 Gb/s).
//               Messages above the 4096-byte MTU are split into WRITE
//               FIRST / MIDDLE / LAST packets. Every response is checked
//               against a software re-computation of the verdict, the
//               response of each packet must still arrive the same fixed
//               number of cycles after its last beat, the header handshake
//               must never stall, and no queue may overflow.
//
// The testbench prints a table of message size, packets, cycles, payload
// rate at 250 MHz and the number of DPI rejections. Batches of 1000 messages
// and one-sided WRITEs follow the usual benchmark practice; the larger sizes
// use shorter batches to keep the simulation short. The message sizes, the
// 10 ping-pong exchanges per size and the random payloads are this
// testbench's own choice.
module tb_dpi_line_rate;
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
  typedef struct { logic [23:0] qpn; logic [23:0] psn; bit mal; } pkt_t;
  pkt_t   exp_q[$];
  longint cycle = 0, last_beat_q[$], last_resp = 0;
  int     checks = 0, failures = 0, nresp = 0, n_rej = 0;
  int     resp_lat = -1, lat_errors = 0;

  always @(posedge clk) begin
    cycle++;
    if (rst_n) begin
      if (s_tvalid && s_tready && s_tlast) last_beat_q.push_back(cycle);
      if (resp_valid) begin
        pkt_t e;
        int   lat;
        e   = exp_q.pop_front();
        lat = int'(cycle - last_beat_q.pop_front());
        if (resp_lat < 0) resp_lat = lat;
        if (lat != resp_lat) begin
          lat_errors++;
          if (lat_errors < 5)
            $display("ERROR: packet %0d answered %0d cycles after its last beat, expected %0d",
                     nresp, lat, resp_lat);
        end
        checks++;
        if (resp.qpn !== e.qpn || resp.psn !== e.psn || resp.ack !== !e.mal ||
            resp.dpi_reject !== e.mal) begin
          failures++;
          $display("ERROR: packet %0d qpn %h: ack %0b rej %0b, expected malicious %0b",
                   nresp, resp.qpn, resp.ack, resp.dpi_reject, e.mal);
        end
        if (resp.dpi_reject) n_rej++;
        last_resp = cycle;
        nresp++;
      end
    end
  end

  // ---------------- stimulus ----------------
  int psn = 0;

  task automatic send_pkt(input byte unsigned opcode, input int qpn, input int plen);
    bytes_t pl, f;
    chunk_q_t cq;
    bit mal;
    for (int i = 0; i < plen; i++) pl.push_back(byte'($urandom) & byte'($urandom));
    f   = build_frame(opcode, qpn, psn, pl, 1'b0);
    cq  = payload_chunks(pl);
    mal = 0;
    foreach (cq[j]) if (!mal) mal = nn_flag(cq[j]);
    exp_q.push_back('{24'(qpn), 24'(psn), mal});
    psn++;
    for (int b = 0; b * 64 < f.size(); b++) begin
      logic [511:0] d;
      logic [63:0]  kp;
      d = '0; kp = '0;
      for (int i = 0; i < 64; i++)
        if (b * 64 + i < f.size()) begin d[i*8 +: 8] = f[b*64 + i]; kp[i] = 1'b1; end
      s_tvalid <= 1; s_tdata <= d; s_tkeep <= kp; s_tlast <= ((b + 1) * 64 >= f.size());
      @(posedge clk);
    end
  endtask

  // one RDMA WRITE message, split at the MTU; returns the packet count
  task automatic send_msg(input int qpn, input int size, output int npkt);
    int left;
    left = size;
    npkt = 0;
    while (npkt == 0 || left > 0) begin
      byte unsigned op;
      int len;
      len = (left > MTU) ? MTU : left;
      if (npkt == 0) op = (left > MTU) ? OP_WRITE_FIRST : OP_WRITE_ONLY;
      else           op = (left > MTU) ? OP_WRITE_MID : OP_WRITE_LAST;
      send_pkt(op, qpn, len);
      left -= len;
      npkt++;
    end
  endtask

  task automatic idle(input int n);
    s_tvalid <= 0;
    repeat (n) @(posedge clk);
  endtask

  task automatic drain();
    s_tvalid <= 0;
    while (exp_q.size() != 0) @(posedge clk);
    repeat (5) @(posedge clk);
  endtask

  localparam int NSIZE = 5;
  localparam int PINGS = 10;
  int sizes[NSIZE]   = '{64, 1024, 4096, 16384, 65536};
  int batches[NSIZE] = '{1000, 1000, 100, 25, 8};

  initial begin
    int np;
    sizes   = '{64, 1024, 4096, 16384, 65536};
    batches = '{1000, 1000, 100, 25, 8};
    init();
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);

    $display("ping-pong (one message on an idle link)");
    for (int s = 0; s < NSIZE; s++) begin
      for (int r = 0; r < PINGS; r++) begin
        send_msg(24'h100 + s, sizes[s], np);
        drain();
      end
      $display("  %6d B x %0d  %3d packet(s) each  response %0d cycles after last beat",
               sizes[s], PINGS, np, resp_lat);
    end

    $display("batch (stream valid every cycle)");
    $display("  %6s %6s %7s %8s %10s %9s", "size", "msgs", "packets", "cycles", "Gb/s@250M",
             "DPI NAKs");
    for (int s = 0; s < NSIZE; s++) begin
      longint t0;
      int pk, rej0, n;
      t0 = cycle; pk = 0; rej0 = n_rej;
      for (int m = 0; m < batches[s]; m++) begin
        send_msg(24'h200 + m % 16, sizes[s], n);
        pk += n;
      end
      drain();
      // payload rate over the time from the first beat to the last response
      $display("  %6d %6d %7d %8d %10.1f %9d", sizes[s], batches[s], pk, last_resp - t0,
               real'(sizes[s]) * batches[s] * 8.0 / (real'(last_resp - t0) * 4.0),
               n_rej - rej0);
    end

    checks++;
    if (nresp != psn) begin failures++; $display("ERROR: %0d responses for %0d packets", nresp, psn); end
    checks++;
    if (lat_errors != 0) begin failures++; $display("ERROR: %0d packets answered late", lat_errors); end
    checks++;
    if (stall_cycles != 0) begin failures++; $display("ERROR: %0d stall cycles", stall_cycles); end
    checks++;
    if (qpn_mismatch || queue_overflow) begin failures++; $display("ERROR: mismatch/overflow"); end
    checks++;
    if (n_rej == 0 || n_rej == nresp) begin
      failures++; $display("ERROR: workload exercises only one verdict (%0d of %0d)", n_rej, nresp);
    end
    $display("packets %0d, DPI NAKs %0d, response latency %0d cycles after last beat",
             nresp, n_rej, resp_lat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("ERROR: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
