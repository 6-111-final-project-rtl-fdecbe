// rectangle_generation_tb: compares the pixel colour with a reference model
// of the screen layout at 30000 random positions with random bar heights,
// plus fixed points: the top of each bar, the pixel just above it, the
// blanking area and each kind of shape.
//
// Compares every pixel against an independent model of the layout.
module rectangle_generation_tb;
  logic [55:0] sd;
  logic [9:0] hcount, vcount;
  logic [2:0] pixel;
  int checks = 0, failures = 0;

  rectangle_generation dut (.sensor_display(sd), .hcount, .vcount, .pixel);

  function automatic bit btw(int v, int lo, int hi);
    return v >= lo && v <= hi;
  endfunction

  // Reference: teal (6) frame, blue (4) bars, white (7) panels, else black.
  function automatic logic [2:0] ref_pixel(int x, int y, logic [55:0] s);
    if (btw(y, 2, 25) && (x <= 112 || btw(x, 512, 639))) return 3'd6;
    if (btw(x, 0, 639) && (y <= 1 || btw(y, 25, 27) || btw(y, 192, 196))) return 3'd6;
    if (btw(y, 28, 191) && btw(x, 321, 324)) return 3'd6;
    for (int k = 0; k < 7; k++) begin
      int lo, hi;
      lo = k * 90 + (k > 0);
      hi = (k + 1) * 90 + (k == 6 ? 2 : 0);
      if (btw(x, lo, hi) && btw(y, 474 - int'(s[k*8 +: 8]), 479)) return 3'd4;
    end
    if (x <= 320 && (btw(y, 52, 64) || btw(y, 88, 93) || btw(y, 118, 123) ||
                     btw(y, 146, 151) || btw(y, 176, 191))) return 3'd7;
    if (btw(x, 325, 639) && (btw(y, 52, 63) || btw(y, 88, 93) ||
                                btw(y, 116, 137) || btw(y, 162, 191))) return 3'd7;
    if (btw(x, 613, 639) && (btw(y, 64, 89) || btw(y, 94, 133) ||
                                btw(y, 138, 162))) return 3'd7;
    if (btw(x, 0, 639) && btw(y, 220, 479)) return 3'd7;
    if (btw(x, 113, 639) && btw(y, 197, 219)) return 3'd7;
    return 3'd0;
  endfunction

  task automatic probe(int x, int y);
    logic [2:0] e;
    hcount = 10'(x); vcount = 10'(y);
    #1;
    e = ref_pixel(x, y, sd);
    checks++;
    if (pixel !== e) begin
      failures++;
      if (failures < 10) $display("(%0d,%0d) sd=%h: %0d expected %0d", x, y, sd, pixel, e);
    end
  endtask

  initial begin
    sd = 56'h00_10_40_80_C0_FF_01;
    for (int k = 0; k < 7; k++) begin
      probe(k * 90 + 45, 474 - int'(sd[k*8 +: 8]));       // top row of bar: blue
      probe(k * 90 + 45, 473 - int'(sd[k*8 +: 8]));       // just above: white
      probe(k * 90 + 45, 479);
    end
    probe(700, 100); probe(100, 500); probe(10, 10); probe(322, 100); probe(50, 58);
    probe(630, 70);  probe(400, 70);
    for (int i = 0; i < 30000; i++) begin
      if (i % 100 == 0) sd = {8'($urandom), 8'($urandom), 8'($urandom), 8'($urandom),
                              8'($urandom), 8'($urandom), 8'($urandom)};
      probe($urandom_range(0, 802), $urandom_range(0, 524));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
