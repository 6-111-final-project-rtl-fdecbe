// char_string_display: draws one line of text at a fixed screen position.
//
// cstring holds NCHAR ASCII characters, the first one in the top byte (as
// a SystemVerilog string literal packs them).  The text box has its top
// left corner at (cx+1, cy); each character cell is 16 x 24 screen pixels,
// an 8 x 12 font glyph shown at double size.  For the current
// (hcount, vcount) the module finds the character and glyph row, reads the
// row from its font_rom, and outputs COLOR where the glyph pixel is set and
// BG_COLOR where it is clear; bit 7 of the character code shows the glyph
// inverted.  Outside the box the pixel is 0, so the outputs of several
// displays and of the rectangle generator can be ORed together.
// Timing: the font ROM has one clock of latency, and the position-derived
// terms are delayed to match, so pixel corresponds to the (hcount, vcount)
// of the previous clock.  With the pixel counter advancing every second
// clock, pixel is valid for the current position on the second clock of
// each pixel time.
//
// COLOR and BG_COLOR default to 0 (black on black), as in the original, so
// the block on its own draws nothing; every instance sets both.
//
// Origin: ports, parameters and the 2x scaled 8x12 cell follow the original
// report's character display; the one-clock ROM alignment and reverse video
// for bit 7 are choices of this design.
module char_string_display #(
  parameter int          NCHAR    = 26,
  parameter logic [2:0]  COLOR    = 3'd0,
  parameter logic [2:0]  BG_COLOR = 3'd0,
  parameter string       FONT_FILE = "rtl/font_rom.hex"
) (
  input  logic               vclock,
  input  logic [9:0]         hcount,
  input  logic [9:0]         vcount,
  input  logic [NCHAR*8-1:0] cstring,
  input  logic [9:0]         cx,
  input  logic [9:0]         cy,
  output logic [2:0]         pixel
);
  logic [9:0]  hoff, voff;
  logic [5:0]  index;        // character position from the left
  logic [7:0]  char_code;
  logic [10:0] font_addr;
  logic [7:0]  font_byte;
  logic        in_box, in_box_q, reverse_q;
  logic [2:0]  h_q;

  assign hoff  = hcount - 10'd1 - cx;
  assign voff  = vcount - cy;
  assign index = hoff[9:4];

  always_comb begin
    char_code = '0;
    if (int'(index) < NCHAR)
      char_code = cstring[(NCHAR - 1 - int'(index)) * 8 +: 8];
  end

  assign font_addr = 11'(char_code[6:0] * 12) + 11'(voff[4:1]);

  assign in_box = (hcount > cx) && (vcount >= cy) &&
                  (int'(hcount) <= int'(cx) + NCHAR * 16) &&
                  (int'(vcount) < int'(cy) + 24);

  font_rom #(.INIT_FILE(FONT_FILE)) u_font (
    .clk(vclock), .addr(font_addr), .dout(font_byte)
  );

  always_ff @(posedge vclock) begin
    in_box_q  <= in_box && (int'(index) < NCHAR);
    reverse_q <= char_code[7];
    h_q       <= hoff[3:1];
  end

  assign pixel = !in_box_q ? 3'd0 :
                 (font_byte[3'd7 - h_q] ^ reverse_q) ? COLOR : BG_COLOR;
endmodule
