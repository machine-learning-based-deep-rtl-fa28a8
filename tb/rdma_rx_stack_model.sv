// rdma_rx_stack_model: behavioural model (not synthesizable) of the RoCEv2
// receive pipeline that the DPI side channel is attached to.
//
// It watches the same 512-bit stream as the DPI logic, takes the QPN and
// PSN from each frame's BTH, judges the frame good when its last four bytes
// (the ICRC) read EE EE EE EE (the testbench's stand-in for a CRC check),
// and presents {QPN, PSN, ok} on hdr_* PIPE_LAT cycles after the frame's
// last beat, the depth of the stack's processing pipeline. It then holds
// the result until hdr_ready, as the real pipeline would wait for the
// extended header-processing step.
module rdma_rx_stack_model #(
  parameter int PIPE_LAT = 44
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 s_tvalid,
  input  logic                 s_tready,
  input  logic [511:0]         s_tdata,
  input  logic [63:0]          s_tkeep,
  input  logic                 s_tlast,
  output logic                 hdr_valid,
  output dpi_pkg::hdr_result_t hdr,
  input  logic                 hdr_ready
);
  typedef struct { dpi_pkg::hdr_result_t r; longint due; } ent_t;
  ent_t   pend[$];
  longint cycle = 0;
  bit     first = 1'b1;
  logic [23:0] qpn, psn;
  logic [31:0] last4;

  initial begin hdr_valid = 1'b0; hdr = '0; end

  always @(posedge clk) begin
    cycle++;
    if (!rst_n) begin
      hdr_valid <= 1'b0;
      first = 1'b1;
    end else begin
      if (hdr_valid && hdr_ready) void'(pend.pop_front());
      if (s_tvalid && s_tready) begin
        if (first) begin
          qpn = {s_tdata[47*8 +: 8], s_tdata[48*8 +: 8], s_tdata[49*8 +: 8]};
          psn = {s_tdata[51*8 +: 8], s_tdata[52*8 +: 8], s_tdata[53*8 +: 8]};
        end
        for (int b = 0; b < 64; b++)
          if (s_tkeep[b]) last4 = {last4[23:0], s_tdata[b*8 +: 8]};
        first = s_tlast;
        if (s_tlast) pend.push_back('{'{qpn, psn, last4 == 32'hEEEEEEEE}, cycle + PIPE_LAT});
      end
      if (pend.size() != 0 && pend[0].due <= cycle) begin
        hdr_valid <= 1'b1;
        hdr       <= pend[0].r;
      end else begin
        hdr_valid <= 1'b0;
      end
    end
  end
endmodule
