// tb_ext_header_proc: self-checking testbench of the extended
// header-processing step.
//
// Streams per-packet DPI verdicts and stack header results for the same
// packets, sometimes verdict first (the normal case) and sometimes header
// result first (the block must hold the stack with hdr_ready low). Checks
// every response against ack = hdr_ok && !malicious, the dpi_reject bit, the
// PSN/QPN, the stall counter, and finally that a verdict for the wrong QPN
// raises qpn_mismatch and turns into a NAK.
module tb_ext_header_proc;
  import dpi_pkg::*;

  localparam int NPKT = 300;

  logic clk = 1'b0, rst_n = 1'b0;
  always #2 clk = ~clk;

  logic verdict_valid = 0, hdr_valid = 0, hdr_ready, resp_valid, qpn_mismatch;
  dpi_verdict_t verdict = '0;
  hdr_result_t  hdr = '0;
  response_t    resp;
  logic [31:0]  stall_cycles;

  ext_header_proc dut (.*);

  typedef struct { logic [23:0] qpn; logic [23:0] psn; bit ok; bit mal; } pkt_t;
  pkt_t pkts[NPKT + 1];
  int checks = 0, failures = 0, nresp = 0, sent_v = 0, tb_stalls = 0;
  int n_ack = 0, n_dpi_nak = 0, n_hdr_nak = 0;

  always @(posedge clk) if (rst_n) begin
    if (hdr_valid && !hdr_ready) tb_stalls++;
    if (verdict_valid) sent_v++;
    if (resp_valid) begin
      pkt_t e;
      e = pkts[nresp];
      checks++;
      if (resp.qpn !== e.qpn || resp.psn !== e.psn || resp.ack !== (e.ok && !e.mal) ||
          resp.dpi_reject !== (e.ok && e.mal)) begin
        failures++;
        $display("ERROR: resp %0d ack %0b rej %0b, expected ok %0b mal %0b", nresp,
                 resp.ack, resp.dpi_reject, e.ok, e.mal);
      end
      if (resp.ack) n_ack++; else if (resp.dpi_reject) n_dpi_nak++; else n_hdr_nak++;
      nresp++;
    end
  end

  initial begin
    for (int p = 0; p <= NPKT; p++) begin
      pkts[p].qpn = 24'($urandom); pkts[p].psn = 24'(p);
      pkts[p].ok  = ($urandom % 5 != 0); pkts[p].mal = ($urandom % 3 == 0);
    end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    fork
      begin : verdicts
        for (int p = 0; p < NPKT; p++) begin
          verdict_valid <= 1; verdict <= '{pkts[p].qpn, pkts[p].mal};
          @(posedge clk);
          if (p % 50 > 40) begin verdict_valid <= 0; repeat (8) @(posedge clk); end
          else if ($urandom % 2) begin verdict_valid <= 0; @(posedge clk); end
        end
        verdict_valid <= 0;
      end
      begin : headers
        repeat (4) @(posedge clk);
        for (int p = 0; p < NPKT; p++) begin
          hdr_valid <= 1; hdr <= '{pkts[p].qpn, pkts[p].psn, pkts[p].ok};
          @(posedge clk);
          while (!hdr_ready) @(posedge clk);
          if ($urandom % 3 == 0) begin hdr_valid <= 0; @(posedge clk); end
        end
        hdr_valid <= 0;
      end
    join
    repeat (5) @(posedge clk);
    checks++;
    if (nresp != NPKT) begin failures++; $display("ERROR: %0d responses", nresp); end
    checks++;
    if (stall_cycles != 32'(tb_stalls) || tb_stalls == 0) begin
      failures++; $display("ERROR: stall count %0d, testbench saw %0d", stall_cycles, tb_stalls);
    end
    checks++;
    if (qpn_mismatch) begin failures++; $display("ERROR: spurious QPN mismatch"); end
    // a verdict whose QPN does not match the stack's packet
    verdict_valid <= 1; verdict <= '{24'h000001, 1'b0};
    @(posedge clk);
    verdict_valid <= 0;
    hdr_valid <= 1; hdr <= '{24'h000002, 24'h0, 1'b1};
    pkts[nresp] = '{24'h000002, 24'h0, 1'b0, 1'b0};  // expect a plain NAK
    @(posedge clk);
    hdr_valid <= 0;
    @(posedge clk);
    checks++;
    if (!qpn_mismatch || resp.ack) begin failures++; $display("ERROR: mismatch not caught"); end
    @(posedge clk);
    $display("ack %0d dpi-nak %0d hdr-nak %0d stalls %0d", n_ack, n_dpi_nak, n_hdr_nak, tb_stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("ERROR: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
