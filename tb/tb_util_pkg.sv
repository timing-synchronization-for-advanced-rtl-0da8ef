// tb_util_pkg: reference functions for the testbenches, written independently of the RTL.
package tb_util_pkg;
  // CRC-16-CCITT (poly 0x1021, preset 0xFFFF) over bits 127..16 of a packet, computed
  // byte-wise with the table-free shift form.
  function automatic logic [15:0] ref_crc(input logic [127:0] p);
    logic [15:0] c = 16'hFFFF;
    for (int b = 15; b >= 2; b--) begin
      logic [7:0] d = p[b*8 +: 8];
      c = c ^ {d, 8'h00};
      for (int k = 0; k < 8; k++)
        c = c[15] ? ((c << 1) ^ 16'h1021) : (c << 1);
    end
    return c;
  endfunction

  function automatic logic [127:0] ref_seal(input logic [127:0] p);
    return {p[127:16], ref_crc(p)};
  endfunction
endpackage
