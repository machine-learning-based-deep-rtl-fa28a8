// tb_sr_model: self-checking testbench of the symbolic-regression model.
//
// Streams random chunks back to back (II = 1) and with gaps, and compares
// each logit, flag and last bit with the expression evaluated in the
// testbench (exp() from the simulator's real arithmetic, rounded to the
// table format), including the 6-cycle latency and both verdicts.
module tb_sr_model;
  localparam int NVEC = 400;
  localparam int SEED = 7;

  logic clk = 1'b0, rst_n = 1'b0;
  always #2 clk = ~clk;

  logic in_valid = 0, in_last = 0;
  logic [511:0] in_chunk = '0;
  logic out_valid, out_flag, out_last;
  logic signed [31:0] out_logit;

  sr_model dut (.*);

  typedef struct { int z; bit last; } exp_t;
  exp_t q[$];
  int   t_in_q[$];
  int checks = 0, failures = 0, cycle = 0, n1 = 0, n0 = 0, nout = 0;

  always @(posedge clk) cycle <= cycle + 1;
  always @(posedge clk) if (rst_n && in_valid) t_in_q.push_back(cycle);

  function automatic int ref_z(input logic [511:0] x);
    int u, v, e, ui;
    u = -32; v = 16;
    for (int k = 0; k < 8; k++) begin
      int unsigned iu, iv;
      iu = dpi_pkg::mix32(SEED, 0, k) % 512;
      iv = dpi_pkg::mix32(SEED, 1, k) % 512;
      if (x[iu]) u += int'(dpi_pkg::mix32(SEED + 50, 0, k) % 128) - 64;
      if (x[iv]) v += int'(dpi_pkg::mix32(SEED + 50, 1, k) % 128) - 64;
    end
    ui = (u < -512) ? -512 : (u > 511) ? 511 : u;
    e  = int'($floor($exp(real'(ui) / 128.0) * 1024.0 + 0.5));
    return ((e * 384) >>> 8) + ((v * -256) >>> 5) + (-128 * 4);
  endfunction

  always @(posedge clk) if (rst_n && out_valid) begin
    exp_t e;
    int t;
    nout++;
    checks++;
    if (q.size() == 0) begin failures++; $display("ERROR: unexpected output"); end
    else begin
      e = q.pop_front();
      t = t_in_q.pop_front();
      if (out_logit !== e.z || out_flag !== (e.z > 1024) || out_last !== e.last) begin
        failures++; $display("ERROR: z %0d flag %0b, expected %0d", out_logit, out_flag, e.z);
      end
      checks++;
      if (cycle - t != 6) begin failures++; $display("ERROR: latency %0d", cycle - t); end
      if (out_flag) n1++; else n0++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int n = 0; n < NVEC; n++) begin
      logic [511:0] c;
      for (int w = 0; w < 16; w++) c[w*32 +: 32] = $urandom;
      if (n % 3 == 1) for (int w = 0; w < 16; w++) c[w*32 +: 32] &= $urandom & $urandom;
      if (n == 0) c = '0;
      if (n == 1) c = '1;
      in_valid <= 1; in_chunk <= c; in_last <= (n % 4 == 3);
      q.push_back('{ref_z(c), (n % 4 == 3)});
      @(posedge clk);
      if (n % 37 == 36) begin in_valid <= 0; repeat (3) @(posedge clk); end
    end
    in_valid <= 0;
    repeat (12) @(posedge clk);
    checks++;
    if (nout != NVEC) begin failures++; $display("ERROR: %0d outputs", nout); end
    checks++;
    if (n1 == 0 || n0 == 0) begin failures++; $display("ERROR: one verdict only (%0d/%0d)", n1, n0); end
    $display("flagged %0d clean %0d", n1, n0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("ERROR: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
