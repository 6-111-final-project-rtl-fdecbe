// char_string_display_tb: draws a 3-character string (the last one with
// bit 7 set, shown inverted) at (20, 10) and scans the area around it,
// holding each position for two clocks as the raster does.  On the second
// clock the pixel must be COLOR / BG_COLOR according to the glyph bit
// (read by the test from the same font table), each glyph pixel doubled in
// both directions, and 0 outside the 48 x 24 box.
//
// Checks every pixel of a string box against the font file contents.
module char_string_display_tb;
  localparam logic [2:0] FG = 3'd1, BG = 3'd6;
  logic clk = 0;
  logic [9:0] hcount = 0, vcount = 0;
  logic [2:0] pixel;
  logic [23:0] cstring = {"H", "i", 8'h80 | 8'("-")};
  logic [7:0] font [1536];
  int checks = 0, failures = 0, fg_seen = 0, bg_seen = 0;

  char_string_display #(.NCHAR(3), .COLOR(FG), .BG_COLOR(BG)) dut (
    .vclock(clk), .hcount, .vcount, .pixel, .cstring, .cx(10'd20), .cy(10'd10));
  always #20 clk = ~clk;

  function automatic logic [2:0] expected(int x, int y);
    int dx, dy, idx;
    logic [7:0] ch, row;
    dx = x - 21; dy = y - 10;
    if (dx < 0 || dx >= 48 || dy < 0 || dy >= 24) return 3'd0;
    idx = dx / 16;
    ch  = cstring[(2 - idx) * 8 +: 8];
    row = font[int'(ch[6:0]) * 12 + dy / 2];
    return (row[7 - (dx % 16) / 2] ^ ch[7]) ? FG : BG;
  endfunction

  initial begin
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2:0] e;
    $readmemh("rtl/font_rom.hex", font);
    for (int y = 0; y < 40; y++)
      for (int x = 0; x < 90; x++) begin
        @(negedge clk) begin hcount = 10'(x); vcount = 10'(y); end
        @(negedge clk);
        e = expected(x, y);
        checks++;
        if (pixel !== e) begin
          failures++;
          if (failures < 10) $display("(%0d,%0d): pixel %0d expected %0d", x, y, pixel, e);
        end
        if (e == FG) fg_seen++;
        if (e == BG) bg_seen++;
      end
    checks++;
    if (fg_seen < 50 || bg_seen < 50) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
