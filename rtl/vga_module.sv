// vga_module: sync and pixel counters for the interlaced 640x480 LCD.
//
// The 25 MHz clock is divided by two: hcount advances on every second clock
// (12.5 MHz pixel rate) and wraps from HSRES to 0, so a line is HSRES+1
// pixel times.  hsync (active low) is low from hcount = HSBEG to HSEND.
// Lines are scanned interlaced: vcount steps by 2 at the end of each line,
// first through the even lines 0, 2, ..., VSRES (plus one more pair when
// vertical is high), then through the odd lines 1, 3, ..., VSRES-1, then
// back to 0.  vsync (active low) is low from vcount = VSBEG to VSEND, which
// falls in the even field only.  vreset pulses for one clock at the end of
// the even field.  Pixels with hcount > 639 or vcount > 479 are blanking.
// Timing numbers are the document's; the reset input and the meaning given
// to vertical (lengthen the even field by one line pair) are this design's.
module vga_module #(
  parameter int HSBEG = 666,
  parameter int HSEND = 733,
  parameter int HSRES = 802,
  parameter int VSBEG = 486,
  parameter int VSEND = 494,
  parameter int VSRES = 524
) (
  input  logic       clk,
  input  logic       reset,
  input  logic       vertical,
  output logic       hsync,
  output logic       vsync,
  output logic [9:0] hcount,
  output logic [9:0] vcount,
  output logic       vreset
);
  logic pcount;
  logic pixel_en;   // high on the clock where hcount advances
  logic hreset;

  assign pixel_en = ~pcount;
  assign hreset   = pixel_en && (hcount == 10'(HSRES));
  assign vreset   = hreset && !vcount[0] &&
                    (int'(vcount) >= VSRES + int'(vertical));

  always_ff @(posedge clk) begin
    if (reset) begin
      pcount <= 1'b0;
      hcount <= '0;
      vcount <= '0;
      hsync  <= 1'b1;
      vsync  <= 1'b1;
    end else begin
      pcount <= ~pcount;
      if (pixel_en) begin
        hcount <= hreset ? '0 : hcount + 1'b1;
        if (hcount == 10'(HSBEG)) hsync <= 1'b0;
        else if (hcount == 10'(HSEND)) hsync <= 1'b1;
      end
      if (hreset) begin
        if (vreset)                      vcount <= 10'd1;
        else if (vcount == 10'(VSRES-1)) vcount <= '0;
        else                             vcount <= vcount + 10'd2;
        if (vcount == 10'(VSBEG)) vsync <= 1'b0;
        else if (vcount == 10'(VSEND)) vsync <= 1'b1;
      end
    end
  end
endmodule
