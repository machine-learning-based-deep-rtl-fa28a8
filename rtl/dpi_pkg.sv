// dpi_pkg: constants, types and model-parameter functions shared by the
// deep-packet-inspection (DPI) side channel of a RoCEv2 receive path.
//
// Bus geometry follows the 512-bit AXI4-Stream of the host shell (64 bytes
// per beat, 250 MHz for 100 Gb/s) and the 4096-byte MTU. The RoCEv2 header
// layout (Ethernet II, IPv4 without options, UDP, BTH, optional RETH/AETH and
// a trailing 4-byte ICRC) is standard InfiniBand/RoCEv2 and is this design's
// reading of "headers and checksum". Byte 0 of a frame travels in
// tdata[7:0] of the first beat.
//
// tern_w()/tern_b() give the weights and biases of the ternary network.
// The trained values are not published, so these functions return a fixed
// pseudo-random ternary pattern that stands in for them; to deploy a trained
// model replace the bodies of these two functions (or the SR constants in
// sr_model) with a table of the trained values. Everything else in the
// datapath is independent of the values.
package dpi_pkg;

  // ---------------- bus and packet geometry ----------------
  localparam int unsigned BUS_W     = 512;          // AXI4-Stream data width [bit]
  localparam int unsigned BUS_BYTES = BUS_W / 8;    // BW in bytes per cycle
  localparam int unsigned MTU       = 4096;         // payload bytes per packet (max)
  localparam int unsigned QPN_W     = 24;           // queue pair number
  localparam int unsigned PSN_W     = 24;           // packet sequence number

  // Byte offsets inside a RoCEv2 frame (Eth 14 + IPv4 20 + UDP 8 = 42).
  localparam int unsigned BTH_OFS   = 42;
  localparam int unsigned BTH_LEN   = 12;
  localparam int unsigned RETH_LEN  = 16;
  localparam int unsigned AETH_LEN  = 4;
  localparam int unsigned ICRC_LEN  = 4;

  // BTH opcodes (RC transport) used to find the length of the extension headers.
  localparam logic [7:0] OP_SEND_FIRST  = 8'h00;
  localparam logic [7:0] OP_SEND_MIDDLE = 8'h01;
  localparam logic [7:0] OP_SEND_LAST   = 8'h02;
  localparam logic [7:0] OP_SEND_ONLY   = 8'h04;
  localparam logic [7:0] OP_WRITE_FIRST = 8'h06;
  localparam logic [7:0] OP_WRITE_MID   = 8'h07;
  localparam logic [7:0] OP_WRITE_LAST  = 8'h08;
  localparam logic [7:0] OP_WRITE_ONLY  = 8'h0A;
  localparam logic [7:0] OP_READ_REQ    = 8'h0C;
  localparam logic [7:0] OP_RRESP_FIRST = 8'h0D;
  localparam logic [7:0] OP_RRESP_MID   = 8'h0E;
  localparam logic [7:0] OP_RRESP_LAST  = 8'h0F;
  localparam logic [7:0] OP_RRESP_ONLY  = 8'h10;
  localparam logic [7:0] OP_ACK         = 8'h11;

  // Header bytes in front of the payload for a given opcode.
  function automatic int unsigned hdr_len(input logic [7:0] opcode);
    int unsigned n;
    n = BTH_OFS + BTH_LEN;
    unique case (opcode)
      OP_WRITE_FIRST, OP_WRITE_ONLY, OP_READ_REQ:               n += RETH_LEN;
      OP_RRESP_FIRST, OP_RRESP_LAST, OP_RRESP_ONLY, OP_ACK:     n += AETH_LEN;
      default: ;
    endcase
    return n;
  endfunction

  // ---------------- shared types ----------------
  typedef logic [BUS_W-1:0] chunk_t;

  // Per-packet record from the extractor to the aggregator.
  typedef struct packed {
    logic [QPN_W-1:0] qpn;
    logic             has_payload;  // 0: no chunk of this packet goes to the model
  } pkt_meta_t;

  // Aggregated DPI verdict of one packet.
  typedef struct packed {
    logic [QPN_W-1:0] qpn;
    logic             malicious;
  } dpi_verdict_t;

  // Per-packet result of the stack's own header processing / CRC check.
  typedef struct packed {
    logic [QPN_W-1:0] qpn;
    logic [PSN_W-1:0] psn;
    logic             hdr_ok;
  } hdr_result_t;

  // Final response of the extended header-processing step.
  typedef struct packed {
    logic [QPN_W-1:0] qpn;
    logic [PSN_W-1:0] psn;
    logic             ack;          // 1: ACK and write payload, 0: NAK and discard
    logic             dpi_reject;   // NAK caused by the DPI verdict
  } response_t;

  // ---------------- ternary network geometry ----------------
  localparam int unsigned NN_IN  = 512;  // one bus beat, one input bit per feature
  localparam int unsigned NN_H1  = 32;
  localparam int unsigned NN_H2  = 64;
  localparam int unsigned NN_H3  = 64;
  localparam int unsigned NN_ABITS = 4;  // quantized-ReLU activation width
  localparam int unsigned NN_LATENCY = 11;

  // Seeds that select the stand-in weight pattern of each layer.
  localparam int unsigned SEED_L1  = 1;
  localparam int unsigned SEED_L2  = 2;
  localparam int unsigned SEED_L3  = 3;
  localparam int unsigned SEED_OUT = 4;

  function automatic logic [31:0] mix32(input logic [31:0] a, input logic [31:0] b,
                                        input logic [31:0] c);
    logic [31:0] h;
    h = a * 32'h9E3779B1 + b * 32'h85EBCA77 + c * 32'hC2B2AE3D + 32'h27D4EB2F;
    h = h ^ (h >> 16);
    h = h * 32'h7FEB352D;
    h = h ^ (h >> 15);
    h = h * 32'h846CA68B;
    h = h ^ (h >> 16);
    return h;
  endfunction

  // Ternary weight of input i into neuron o of the layer with this seed: -1, 0 or +1.
  function automatic int tern_w(input int unsigned seed, input int unsigned o,
                                input int unsigned i);
    logic [31:0] h;
    h = mix32(seed, o, i);
    case (h % 3)
      0:       return 0;
      1:       return 1;
      default: return -1;
    endcase
  endfunction

  // Integer bias of neuron o, in the accumulator's scale: -8 .. 7.
  function automatic int tern_b(input int unsigned seed, input int unsigned o);
    logic [3:0] h;
    h = 4'(mix32(seed + 32'h100, o, 32'hFFFF));
    return int'($signed(h));
  endfunction

endpackage
