// exp_lut: exp(x) by table look-up, the way the symbolic-regression model
// evaluates its unary operator in a single cycle.
//
// The table holds DEPTH = 2**ADDR_W samples of exp() over the input range
// [-2**(ADDR_W-1), 2**(ADDR_W-1)) * 2**-IN_FRAC, i.e. [-4, 4) with the
// defaults (1024 entries, step 1/128). Entry a holds
//     round(exp((a - DEPTH/2) * 2**-IN_FRAC) * 2**OUT_FRAC),
// saturated to OUT_W bits. It is computed at elaboration, so it becomes an
// initialised ROM (block RAM on an FPGA). The input x is a signed fixed-point
// number with IN_FRAC fraction bits, so one input LSB is one table step;
// values outside the range are clamped to its ends (this design's choice).
// One registered read: y is valid one cycle after x.
// Table size follows the published guidance of 1,024 to 4,096 entries; the
// range and the fixed-point formats are this design's choices.
module exp_lut #(
  parameter int unsigned ADDR_W   = 10,
  parameter int unsigned IN_W     = 16,
  parameter int unsigned IN_FRAC  = 7,
  parameter int unsigned OUT_W    = 16,
  parameter int unsigned OUT_FRAC = 10
) (
  input  logic                    clk,
  input  logic signed [IN_W-1:0]  x,
  output logic        [OUT_W-1:0] y
);
  localparam int unsigned DEPTH = 1 << ADDR_W;
  localparam int signed   XLO   = -(1 << (ADDR_W - 1));
  localparam int signed   XHI   = (1 << (ADDR_W - 1)) - 1;

  typedef logic [OUT_W-1:0] rom_t [DEPTH];

  function automatic rom_t gen_rom();
    rom_t r;
    real  v;
    for (int a = 0; a < int'(DEPTH); a++) begin
      v = $exp(real'(a + XLO) / real'(1 << IN_FRAC)) * real'(1 << OUT_FRAC);
      if (v > real'((1 << OUT_W) - 1)) r[a] = OUT_W'((1 << OUT_W) - 1);
      else                              r[a] = OUT_W'($rtoi(v + 0.5));
    end
    return r;
  endfunction

  localparam rom_t ROM = gen_rom();

  logic [ADDR_W-1:0] addr;

  always_comb begin
    if (x < IN_W'(XLO))      addr = '0;
    else if (x > IN_W'(XHI)) addr = ADDR_W'(DEPTH - 1);
    else                     addr = ADDR_W'(x - IN_W'(XLO));
  end

  always_ff @(posedge clk) y <= ROM[addr];
endmodule
