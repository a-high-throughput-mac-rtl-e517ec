// tb_ref_pkg: reference models used by the testbenches, written independently
// of the design: the 802.11 CRC-32 computed MSB-first on bit-reversed data,
// the delimiter CRC-8, and small helpers.
package tb_ref_pkg;
  function automatic logic [7:0] rev8(logic [7:0] b);
    for (int i = 0; i < 8; i++) rev8[i] = b[7-i];
  endfunction
  function automatic logic [31:0] rev32(logic [31:0] w);
    for (int i = 0; i < 32; i++) rev32[i] = w[31-i];
  endfunction

  // FCS of a byte array: non-reflected CRC-32 on bit-reversed bytes, then
  // reflected and inverted; byte k of the FCS is bits 8k+7:8k of the result.
  function automatic logic [31:0] fcs_of(logic [7:0] d [], int n);
    logic [31:0] c = 32'hFFFF_FFFF;
    for (int k = 0; k < n; k++) begin
      c ^= {rev8(d[k]), 24'h0};
      for (int i = 0; i < 8; i++) c = c[31] ? ((c << 1) ^ 32'h04C1_1DB7) : (c << 1);
    end
    return ~rev32(c);
  endfunction

  // Delimiter CRC-8 (x^8+x^2+x+1, preset ones, inverted) over the 16 bits
  // {length, reserved}, bit 0 first, written as polynomial division.
  function automatic logic [7:0] crc8_of(logic [15:0] v);
    logic [23:0] r;
    r = 24'h0;
    for (int i = 0; i < 16; i++) r[23-i] = v[i];
    r[23:16] ^= 8'hFF;
    for (int i = 23; i >= 8; i--) if (r[i]) r[i -: 9] ^= 9'h107;
    return ~r[7:0];
  endfunction
endpackage
