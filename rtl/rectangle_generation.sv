// rectangle_generation: background of the GUI and the bar graph.
//
// Purely combinational: for the current (hcount, vcount) it returns the
// colour of the first matching shape, in this priority order:
//   1. teal frame lines: header band and title bars, the horizontal rules
//      at lines 0-1, 25-27 and 192-196, the divider at columns 321-324;
//   2. blue bars: seven bars side by side, BARWIDTH pixels wide, bar k
//      shows byte k of sensor_display as its height above the bottom edge
//      (top at line 474 - value, bottom at line 479);
//   3. white panel areas of the location and settings boxes and of the
//      results area;
//   4. black everywhere else, which includes the whole blanking interval
//      (hcount > 639 or vcount > 479).
// All coordinates are the document's.  Byte 0 is the left bar.
module rectangle_generation
  import soil_pkg::*;
#(
  parameter int BARWIDTH = 90
) (
  input  logic [STREAM_W-1:0] sensor_display,
  input  logic [9:0]          hcount,
  input  logic [9:0]          vcount,
  output logic [2:0]          pixel
);
  localparam logic [9:0] W = 10'd639;   // last visible column
  localparam logic [9:0] H = 10'd479;   // last visible line

  typedef struct packed { logic [9:0] x0, x1, y0, y1; } rect_t;

  // teal lines and title bars
  localparam int NT = 6;
  localparam rect_t TEAL [NT] = '{
    '{0,   112, 2,   25},  '{512, W,   2,   25},
    '{0,   W,   0,   1},   '{0,   W,   25,  27},
    '{0,   W,   192, 196}, '{321, 324, 28,  191}
  };
  // white panels
  localparam int NW = 14;
  localparam rect_t WHITE [NW] = '{
    '{0,   320, 52,  64},  '{0,   320, 88,  93},  '{0,   320, 118, 123},
    '{0,   320, 146, 151}, '{0,   320, 176, 191}, '{325, W,   52,  63},
    '{325, W,   88,  93},  '{325, W,   116, 137}, '{325, W,   162, 191},
    '{613, W,   64,  89},  '{613, W,   94,  133}, '{613, W,   138, 162},
    '{0,   W,   220, H},   '{113, W,   197, 219}
  };

  function automatic logic in_rect(rect_t r, int x, int y);
    return x >= int'(r.x0) && x <= int'(r.x1) && y >= int'(r.y0) && y <= int'(r.y1);
  endfunction

  always_comb begin
    int  x, y, left, right, top;
    logic teal, bar, white;
    x = int'(hcount);
    y = int'(vcount);
    teal = 1'b0;
    for (int i = 0; i < NT; i++) teal |= in_rect(TEAL[i], x, y);
    bar = 1'b0;
    for (int k = 0; k < DEPTHS; k++) begin
      left  = (k == 0) ? 0 : k * BARWIDTH + 1;
      right = (k == DEPTHS - 1) ? (k + 1) * BARWIDTH + 2 : (k + 1) * BARWIDTH;
      top   = int'(H) - 5 - int'(sensor_display[k*SAMPLE_W +: SAMPLE_W]);
      bar  |= (x >= left && x <= right && y >= top && y <= int'(H));
    end
    white = 1'b0;
    for (int i = 0; i < NW; i++) white |= in_rect(WHITE[i], x, y);
    if (teal)       pixel = COL_TEAL;
    else if (bar)   pixel = COL_BAR;
    else if (white) pixel = COL_WHITE;
    else            pixel = COL_BLACK;
  end
endmodule
