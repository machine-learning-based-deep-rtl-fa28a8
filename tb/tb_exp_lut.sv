// tb_exp_lut: self-checking testbench of the exp() look-up table.
//
// Sweeps every table entry plus out-of-range inputs, and compares the
// registered output one cycle later with exp() evaluated by the simulator
// (rounded to Q6.10, saturated) and with the clamping rule. Also checks that
// the table's worst error against the exact exp() stays within half an
// output LSB for in-range inputs.
module tb_exp_lut;
  logic clk = 1'b0;
  always #2 clk = ~clk;

  logic signed [15:0] x;
  logic [15:0] y;
  int checks = 0, failures = 0;

  exp_lut dut (.clk, .x, .y);

  function automatic int expect_y(input int xi);
    real v;
    int  c;
    c = (xi < -512) ? -512 : (xi > 511) ? 511 : xi;
    v = $exp(real'(c) / 128.0) * 1024.0;
    if (v > 65535.0) return 65535;
    return int'($floor(v + 0.5));
  endfunction

  initial begin
    int pts[$];
    for (int i = -512; i < 512; i++) pts.push_back(i);
    pts.push_back(-32768); pts.push_back(-600); pts.push_back(512);
    pts.push_back(700); pts.push_back(32767);
    foreach (pts[n]) begin
      x = 16'(pts[n]);
      @(posedge clk);
      #1;
      checks++;
      if (int'(y) != expect_y(pts[n])) begin
        failures++;
        $display("ERROR: exp(%0d/128) = %0d, expected %0d", pts[n], y, expect_y(pts[n]));
      end
      if (pts[n] >= -512 && pts[n] <= 511) begin
        real err;
        err = real'(y) - $exp(real'(pts[n]) / 128.0) * 1024.0;
        if (err > 0.5 || err < -0.5) begin
          failures++; $display("ERROR: table error %f LSB at %0d", err, pts[n]);
        end
      end
    end
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
