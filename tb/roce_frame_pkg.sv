// roce_frame_pkg: testbench helpers that build RoCEv2 frames byte by byte
// (Ethernet II, IPv4 without options, UDP port 4791, BTH, optional
// RETH/AETH, payload, 4-byte ICRC) and cut them into 512-bit beats.
// The ICRC is not computed: a good frame carries EE EE EE EE, a corrupted
// one 00 00 00 00, which is what the behavioural stack model checks.
package roce_frame_pkg;
  typedef byte unsigned bytes_t[$];

  function automatic int unsigned ext_len(input byte unsigned opcode);
    case (opcode)
      8'h06, 8'h0A, 8'h0C:        return 16;   // RETH
      8'h0D, 8'h0F, 8'h10, 8'h11: return 4;    // AETH
      default:                    return 0;
    endcase
  endfunction

  function automatic bytes_t build_frame(input byte unsigned opcode, input int unsigned qpn,
                                         input int unsigned psn, input bytes_t payload,
                                         input bit bad_icrc = 1'b0);
    bytes_t f;
    int unsigned iplen;
    iplen = 20 + 8 + 12 + ext_len(opcode) + payload.size() + 4;
    // Ethernet
    for (int i = 0; i < 12; i++) f.push_back(byte'(8'h10 + i));
    f.push_back(8'h08); f.push_back(8'h00);
    // IPv4
    f.push_back(8'h45); f.push_back(8'h00);
    f.push_back(byte'(iplen >> 8)); f.push_back(byte'(iplen));
    for (int i = 0; i < 5; i++) f.push_back(8'h00);
    f.push_back(8'd17);                        // protocol UDP
    for (int i = 0; i < 10; i++) f.push_back(8'hA0 + byte'(i));
    // UDP
    f.push_back(8'hC0); f.push_back(8'h00); f.push_back(8'h12); f.push_back(8'hB7);
    f.push_back(byte'((iplen - 20) >> 8)); f.push_back(byte'(iplen - 20));
    f.push_back(8'h00); f.push_back(8'h00);
    // BTH
    f.push_back(opcode); f.push_back(8'h40); f.push_back(8'hFF); f.push_back(8'hFF);
    f.push_back(8'h00);
    f.push_back(byte'(qpn >> 16)); f.push_back(byte'(qpn >> 8)); f.push_back(byte'(qpn));
    f.push_back(8'h80);
    f.push_back(byte'(psn >> 16)); f.push_back(byte'(psn >> 8)); f.push_back(byte'(psn));
    for (int i = 0; i < int'(ext_len(opcode)); i++) f.push_back(8'h5A);
    foreach (payload[i]) f.push_back(payload[i]);
    for (int i = 0; i < 4; i++) f.push_back(bad_icrc ? 8'h00 : 8'hEE);   // ICRC
    return f;
  endfunction

  // 512-bit chunks of a payload, the last one zero padded.
  typedef logic [511:0] chunk_q_t[$];
  function automatic chunk_q_t payload_chunks(input bytes_t payload);
    chunk_q_t q;
    logic [511:0] c;
    for (int j = 0; j * 64 < payload.size(); j++) begin
      c = '0;
      for (int b = 0; b < 64; b++)
        if (j * 64 + b < payload.size()) c[b*8 +: 8] = payload[j*64 + b];
      q.push_back(c);
    end
    return q;
  endfunction
endpackage
