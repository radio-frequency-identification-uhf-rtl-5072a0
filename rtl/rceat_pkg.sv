// rceat_pkg: sizes and the CRC function shared by the RCEAT identifier.
//
// A tag message is 32 bits: the 16-bit tag ID in bits [31:16] and the 16-bit
// CRC of that ID in bits [15:0]. Tags are handled in groups of four per read
// cycle. The CRC is CRC-16 with generator x^16 + x^12 + x^5 + 1 (0x1021),
// register cleared to zero, ID shifted in most significant bit first, no bit
// reflection and no final inversion. The 16/16/32 split and the group of four
// follow the source design; the CRC variant is the one that reproduces the
// error-free example messages it prints (e.g. ID 0x0010 -> CRC 0x1231).
package rceat_pkg;

  parameter int unsigned NTAG  = 4;   // tags per read cycle
  parameter int unsigned ID_W  = 16;  // tag ID width
  parameter int unsigned CRC_W = 16;  // CRC field width
  parameter int unsigned MSG_W = ID_W + CRC_W;

  parameter logic [CRC_W-1:0] CRC_POLY = 16'h1021;
  parameter logic [CRC_W-1:0] CRC_INIT = 16'h0000;

  // Bit-serial CRC of one ID, unrolled into combinational logic.
  function automatic logic [CRC_W-1:0] crc_of(input logic [ID_W-1:0] id);
    logic [CRC_W-1:0] c;
    logic             fb;
    c = CRC_INIT;
    for (int i = ID_W - 1; i >= 0; i--) begin
      fb = id[i] ^ c[CRC_W-1];
      c  = {c[CRC_W-2:0], 1'b0};
      if (fb) c = c ^ CRC_POLY;
    end
    return c;
  endfunction

endpackage
