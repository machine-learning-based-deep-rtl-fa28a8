// tb_decision_aggregator: self-checking testbench of the decision aggregator.
//
// Two instances, THRESH = 1 (the published rule: one flagged chunk rejects
// the packet) and THRESH = 2, receive the same random packet records (with
// and without payload) and the same stream of per-chunk model results,
// delivered later and with gaps as a pipelined model would. Every verdict's
// QPN, order and malicious bit is compared with the count of flagged chunks
// worked out by the testbench.
module tb_decision_aggregator;
  import dpi_pkg::*;

  localparam int NPKT = 400;

  logic clk = 1'b0, rst_n = 1'b0;
  always #2 clk = ~clk;

  logic meta_valid = 0, ml_valid = 0, ml_flag = 0, ml_last = 0;
  pkt_meta_t meta = '0;
  logic v1_valid, v2_valid;
  dpi_verdict_t v1, v2;
  logic [7:0] f1, f2;

  decision_aggregator #(.THRESH(1)) dut1 (.clk, .rst_n, .meta_valid, .meta, .ml_valid,
    .ml_flag, .ml_last, .verdict_valid(v1_valid), .verdict(v1), .flagged_chunks(f1));
  decision_aggregator #(.THRESH(2)) dut2 (.clk, .rst_n, .meta_valid, .meta, .ml_valid,
    .ml_flag, .ml_last, .verdict_valid(v2_valid), .verdict(v2), .flagged_chunks(f2));

  typedef struct { logic [23:0] qpn; bit has_pl; int nch; bit flags[$]; int nflag; } pkt_t;
  pkt_t pkts[NPKT];
  int checks = 0, failures = 0, out1 = 0, out2 = 0, sent_meta = 0;
  int n_mal1 = 0, n_mal2_only1 = 0, n_nopl = 0;

  always @(posedge clk) if (rst_n) begin
    if (v1_valid) begin
      checks++;
      if (v1.qpn !== pkts[out1].qpn || v1.malicious !== (pkts[out1].nflag >= 1)) begin
        failures++; $display("ERROR: T1 pkt %0d got %h/%0b exp %h %0d %0b", out1, v1.qpn, v1.malicious, pkts[out1].qpn, pkts[out1].nflag, pkts[out1].has_pl);
      end
      if (v1.malicious) n_mal1++;
      if (pkts[out1].nflag == 1) n_mal2_only1++;
      if (!pkts[out1].has_pl) n_nopl++;
      out1++;
    end
    if (v2_valid) begin
      checks++;
      if (v2.qpn !== pkts[out2].qpn || v2.malicious !== (pkts[out2].nflag >= 2)) begin
        failures++; $display("ERROR: T2 pkt %0d got %h/%0b", out2, v2.qpn, v2.malicious);
      end
      out2++;
    end
  end

  initial begin
    for (int p = 0; p < NPKT; p++) begin
      pkts[p].qpn    = 24'($urandom);
      pkts[p].has_pl = ($urandom % 5 != 0);
      pkts[p].nch    = pkts[p].has_pl ? 1 + $urandom % 8 : 0;
      pkts[p].nflag  = 0;
      for (int c = 0; c < pkts[p].nch; c++) begin
        bit f;
        f = ($urandom % 6 == 0);
        pkts[p].flags.push_back(f);
        pkts[p].nflag += int'(f);
      end
    end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    fork
      // packet records, at most 20 ahead of the verdicts
      begin
      for (int p = 0; p < NPKT; p++) begin
        while (p - out1 > 20) begin meta_valid <= 0; @(posedge clk); end
        meta_valid <= 1; meta <= '{pkts[p].qpn, pkts[p].has_pl};
        @(posedge clk);
        if ($urandom % 3 == 0) begin meta_valid <= 0; @(posedge clk); end
      end
      meta_valid <= 0;
      end
      // model results, trailing the records by at least 11 cycles
      begin
        repeat (11) @(posedge clk);
        for (int p = 0; p < NPKT; p++)
          for (int c = 0; c < pkts[p].nch; c++) begin
            while (sent_meta <= p) begin ml_valid <= 0; @(posedge clk); end
            ml_valid <= 1; ml_flag <= pkts[p].flags[c]; ml_last <= (c == pkts[p].nch - 1);
            @(posedge clk);
            if ($urandom % 4 == 0) begin ml_valid <= 0; @(posedge clk); end
          end
        ml_valid <= 0;
      end
    join
    repeat (10) @(posedge clk);
    checks++;
    if (out1 != NPKT || out2 != NPKT) begin
      failures++; $display("ERROR: %0d / %0d verdicts of %0d", out1, out2, NPKT);
    end
    checks++;
    if (n_mal1 == 0 || n_mal2_only1 == 0 || n_nopl == 0) begin
      failures++; $display("ERROR: a case was not exercised");
    end
    $display("malicious %0d, single-flag packets %0d, no-payload %0d", n_mal1, n_mal2_only1, n_nopl);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (meta_valid) sent_meta <= sent_meta + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("ERROR: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
