// tb_payload_extractor: self-checking testbench of the payload extractor.
//
// Sends RoCEv2 frames of every header variant (BTH only, BTH+RETH,
// BTH+AETH, no payload) with payload sizes around the 64-byte chunk
// boundaries up to the 4096-byte MTU, back to back and with random stream
// stalls (s_tready low, s_tvalid low). Every chunk, its last flag and every
// packet's QPN/has_payload record are compared with chunks cut directly from
// the payload bytes. Also counts beats that complete two chunks.
module tb_payload_extractor;
  import dpi_pkg::*;
  import roce_frame_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #2 clk = ~clk;

  logic         s_tvalid, s_tready, s_tlast;
  logic [511:0] s_tdata;
  logic [63:0]  s_tkeep;
  logic         meta_valid, chunk_valid, chunk_last, queue_overflow;
  pkt_meta_t    meta;
  chunk_t       chunk_data;

  payload_extractor dut (.*);

  int checks = 0, failures = 0;
  int n_pkts = 0, n_double = 0, n_chunks = 0;
  typedef struct { logic [511:0] d; bit last; } exp_chunk_t;
  exp_chunk_t exp_c[$];
  pkt_meta_t  exp_m[$];

  always @(posedge clk) if (rst_n) begin
    if (dut.push_b) n_double++;
    if (chunk_valid) begin
      exp_chunk_t e;
      n_chunks++;
      checks++;
      if (exp_c.size() == 0) begin
        failures++; $display("ERROR: unexpected chunk");
      end else begin
        e = exp_c.pop_front();
        if (chunk_data !== e.d || chunk_last !== e.last) begin
          failures++;
          $display("ERROR: chunk %0d mismatch (last %0b exp %0b)", n_chunks, chunk_last, e.last);
        end
      end
    end
    if (meta_valid) begin
      pkt_meta_t m;
      checks++;
      if (exp_m.size() == 0) begin
        failures++; $display("ERROR: unexpected meta");
      end else begin
        m = exp_m.pop_front();
        if (meta !== m) begin
          failures++; $display("ERROR: meta %h expected %h", meta, m);
        end
      end
    end
  end

  task automatic send(input byte unsigned opcode, input int unsigned qpn, input int plen,
                      input bit stalls);
    bytes_t pl, f;
    chunk_q_t cq;
    for (int i = 0; i < plen; i++) pl.push_back(byte'($urandom));
    f  = build_frame(opcode, qpn, n_pkts, pl);
    cq = payload_chunks(pl);
    foreach (cq[i]) exp_c.push_back('{cq[i], i == cq.size() - 1});
    exp_m.push_back('{qpn[23:0], plen != 0});
    n_pkts++;
    for (int b = 0; b * 64 < f.size(); b++) begin
      logic [511:0] d;
      logic [63:0] kp;
      d = '0; kp = '0;
      for (int i = 0; i < 64; i++)
        if (b * 64 + i < f.size()) begin d[i*8 +: 8] = f[b*64 + i]; kp[i] = 1'b1; end
      s_tdata  <= d;
      s_tkeep  <= kp;
      s_tlast  <= ((b + 1) * 64 >= f.size());
      s_tvalid <= 1'b1;
      s_tready <= 1'b1;
      if (stalls && ($urandom % 4 == 0)) begin
        // a cycle where the beat is offered but not taken
        s_tready <= 1'b0;
        @(posedge clk);
        s_tready <= 1'b1;
      end
      @(posedge clk);
      if (stalls && ($urandom % 4 == 0)) begin
        s_tvalid <= 1'b0;
        @(posedge clk);
      end
    end
  endtask

  task automatic idle(input int n);
    s_tvalid <= 1'b0;
    repeat (n) @(posedge clk);
  endtask

  initial begin
    byte unsigned ops[6] = '{OP_WRITE_ONLY, OP_WRITE_MID, OP_RRESP_ONLY, OP_SEND_ONLY,
                             OP_WRITE_FIRST, OP_RRESP_LAST};
    int sizes[12] = '{1, 2, 6, 10, 63, 64, 65, 128, 129, 1000, 4095, 4096};
    s_tvalid = 0; s_tready = 1; s_tlast = 0; s_tdata = '0; s_tkeep = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    // every header variant against every size, back to back
    foreach (ops[o]) foreach (sizes[s]) send(ops[o], 32'h100 + o, sizes[s], 1'b0);
    // packets without payload
    send(OP_ACK, 32'hABCDE, 0, 1'b0);
    send(OP_READ_REQ, 32'h12345, 0, 1'b0);
    send(OP_WRITE_MID, 32'h7, 0, 1'b0);
    idle(3);
    // random traffic with stalls
    for (int n = 0; n < 120; n++)
      send(ops[$urandom % 6], $urandom % (1 << 24), $urandom % 600, 1'b1);
    idle(20);
    checks++;
    if (exp_c.size() != 0 || exp_m.size() != 0) begin
      failures++; $display("ERROR: %0d chunks / %0d metas never came", exp_c.size(), exp_m.size());
    end
    checks++;
    if (n_double == 0) begin failures++; $display("ERROR: no double-chunk beat exercised"); end
    checks++;
    if (queue_overflow) begin failures++; $display("ERROR: chunk queue overflow"); end
    $display("packets %0d chunks %0d double-chunk beats %0d", n_pkts, n_chunks, n_double);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("ERROR: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
