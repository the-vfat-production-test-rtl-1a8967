// vfat_pkt_pkg: test-side helpers for VFAT data packets.
// Builds the 192-bit packet of one triggered event in the VFAT layout:
// 1010 + BC[11:0], 1100 + EC[7:0] + Flags[3:0], 1110 + ChipID[11:0],
// 128 channel bits, then a 16-bit checksum. The checksum here is a CRC-16
// (polynomial 0x1021, start value 0xFFFF) over the first 176 bits; the
// platform stores the checksum but does not check it.
package vfat_pkt_pkg;

  typedef logic [191:0] pkt_t;

  function automatic logic [15:0] crc16(logic [175:0] d);
    logic [15:0] c = 16'hFFFF;
    for (int i = 175; i >= 0; i--) begin
      logic fb = c[15] ^ d[i];
      c = {c[14:0], 1'b0};
      if (fb) c ^= 16'h1021;
    end
    return c;
  endfunction

  function automatic pkt_t make_pkt(logic [11:0] bc, logic [7:0] ec, logic [3:0] flags,
                                    logic [11:0] chip, logic [127:0] data);
    logic [175:0] body = {4'b1010, bc, 4'b1100, ec, flags, 4'b1110, chip, data};
    return {body, crc16(body)};
  endfunction

  // word k (0..11) of a packet, in transmission order
  function automatic logic [15:0] pkt_word(pkt_t p, int k);
    return p[191 - 16*k -: 16];
  endfunction

  function automatic logic [127:0] rand_data();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

endpackage
