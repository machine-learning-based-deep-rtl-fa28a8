// tb_ternary_nn: self-checking testbench of the ternary DPI network.
//
// Streams NVEC chunks back to back (one per cycle, proving II = 1), plus a
// few with gaps, into ternary_nn and compares every flag and logit with a
// plain integer re-computation of the network from the weight functions of
// dpi_pkg. Also checks that each result appears exactly 11 cycles after its
// chunk and that both verdicts occur.
module tb_ternary_nn;
  import dpi_pkg::*;

  localparam int NVEC = 200;

  logic clk = 1'b0, rst_n = 1'b0;
  always #2 clk = ~clk;

  logic         in_valid, in_last;
  logic [511:0] in_chunk;
  logic         out_valid, out_flag, out_last;
  logic signed [15:0] out_logit;

  ternary_nn dut (.*);

  int checks = 0, failures = 0, cycle = 0;
  int n_flag1 = 0, n_flag0 = 0, n_out = 0;

  typedef struct { int logit; bit flag; bit last; int t_in; } exp_t;
  exp_t q[$];
  int   t_in_q[$];   // cycle at which each chunk was sampled by the DUT

  always @(posedge clk) if (rst_n && in_valid) t_in_q.push_back(cycle);

  always @(posedge clk) cycle <= cycle + 1;

  function automatic int qrelu(input int s, input int sh);
    if (s <= 0) return 0;
    return ((s >>> sh) > 15) ? 15 : (s >>> sh);
  endfunction

  function automatic int ref_logit(input logic [511:0] x);
    int a1[32], a2[64], a3[64];
    int s;
    for (int o = 0; o < 32; o++) begin
      s = tern_b(SEED_L1, o);
      for (int i = 0; i < 512; i++) s += tern_w(SEED_L1, o, i) * int'(x[i]);
      a1[o] = qrelu(s, 2);
    end
    for (int o = 0; o < 64; o++) begin
      s = tern_b(SEED_L2, o);
      for (int i = 0; i < 32; i++) s += tern_w(SEED_L2, o, i) * a1[i];
      a2[o] = qrelu(s, 2);
    end
    for (int o = 0; o < 64; o++) begin
      s = tern_b(SEED_L3, o);
      for (int i = 0; i < 64; i++) s += tern_w(SEED_L3, o, i) * a2[i];
      a3[o] = qrelu(s, 2);
    end
    s = tern_b(SEED_OUT, 0);
    for (int i = 0; i < 64; i++) s += tern_w(SEED_OUT, 0, i) * a3[i];
    return s;
  endfunction

  function automatic logic [511:0] rand_chunk(input int k);
    logic [511:0] c;
    for (int w = 0; w < 16; w++) c[w*32 +: 32] = $urandom;
    // vary the density of ones so both verdicts appear
    case (k % 4)
      1: for (int w = 0; w < 16; w++) c[w*32 +: 32] &= $urandom;
      2: for (int w = 0; w < 16; w++) c[w*32 +: 32] |= $urandom;
      default: ;
    endcase
    if (k == 0) c = '0;
    if (k == 1) c = '1;
    return c;
  endfunction

  // scoreboard
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      exp_t e;
      n_out++;
      if (q.size() == 0) begin
        failures++; $display("ERROR: unexpected output");
      end else begin
        e = q.pop_front();
        checks++;
        if (out_logit !== 16'(e.logit) || out_flag !== e.flag || out_last !== e.last) begin
          failures++;
          $display("ERROR: logit %0d flag %0b last %0b, expected %0d %0b %0b",
                   out_logit, out_flag, out_last, e.logit, e.flag, e.last);
        end
        checks++;
        e.t_in = t_in_q.pop_front();
        if (cycle - e.t_in != 11) begin
          failures++; $display("ERROR: latency %0d, expected 11", cycle - e.t_in);
        end
        if (out_flag) n_flag1++; else n_flag0++;
      end
    end
  end

  initial begin
    in_valid = 0; in_last = 0; in_chunk = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int k = 0; k < NVEC; k++) begin
      logic [511:0] c;
      exp_t e;
      c = rand_chunk(k);
      e.logit = ref_logit(c);
      e.flag  = (e.logit > 0);
      e.last  = (k % 3 == 2);
      #0;
      in_valid <= 1; in_chunk <= c; in_last <= e.last;
      q.push_back(e);
      @(posedge clk);
      if (k % 50 == 49) begin
        in_valid <= 0;
        repeat (5) @(posedge clk);
      end
    end
    in_valid <= 0;
    repeat (20) @(posedge clk);
    checks++;
    if (n_out != NVEC || q.size() != 0) begin
      failures++; $display("ERROR: %0d outputs for %0d inputs", n_out, NVEC);
    end
    checks++;
    if (n_flag1 == 0 || n_flag0 == 0) begin
      failures++; $display("ERROR: only one verdict seen (%0d flagged, %0d clean)", n_flag1, n_flag0);
    end
    $display("flagged %0d clean %0d", n_flag1, n_flag0);
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
