// font_rom: character generator ROM, 12 rows of 8 pixels per ASCII code.
//
// Address = code * 12 + row (codes 0..127, 1536 bytes); bit 7 of a byte is
// the leftmost pixel.  The read is synchronous, as in a block RAM: dout
// holds the byte addressed on the previous clock edge.  The contents are
// loaded from INIT_FILE (hexadecimal, one byte per line), a 5x7 dot-matrix
// font drawn in rows 2..8 of each 8x12 cell and columns 1..5 (bits 6..2);
// codes below 0x20 and 0x7F are blank.  The path is relative to the
// directory the simulator or synthesis tool runs in.
//
// Origin: depth 1536 (128 codes x 12 rows) and the synchronous read follow the
// original report; the glyphs in font_rom.hex are this design's own 5x7 font.
// The file is read by a path relative to the project root.
module font_rom #(
  parameter int    DEPTH     = 1536,
  parameter string INIT_FILE = "rtl/font_rom.hex"
) (
  input  logic                     clk,
  input  logic [$clog2(DEPTH)-1:0] addr,
  output logic [7:0]               dout
);
  logic [7:0] mem [DEPTH];

  initial $readmemh(INIT_FILE, mem);

  always_ff @(posedge clk)
    dout <= mem[addr];
endmodule
