// vga_module_tb: runs two frames and checks the raster: a line is
// (802+1) pixel times of 2 clocks, hsync is low for 733-666 pixel times,
// hcount advances every second clock, the even field covers lines
// 0,2,...,524 (263 lines) and the odd field 1,3,...,523 (262 lines), vsync
// is low for 4 lines once per frame, vreset pulses once per frame; with
// vertical high the even field gains one line.
//
// Checks sync pulse positions and the even/odd line order of both fields.
module vga_module_tb;
  logic clk = 0, reset = 1, vertical = 0;
  logic hsync, vsync, vreset;
  logic [9:0] hcount, vcount;
  int checks = 0, failures = 0;

  vga_module dut (.clk, .reset, .vertical, .hsync, .vsync, .hcount, .vcount, .vreset);
  always #20 clk = ~clk;

  task automatic check(int got, int exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%t %s: got %0d expected %0d", $time, what, got, exp);
    end
  endtask

  // raster monitor
  int cyc, hs_fall, hs_low_start, vs_low_start, n_vreset, n_vsync, bad_step;
  int line_len_err, hs_width_err, vs_width_err, max_h;
  int lines_even, lines_odd;
  logic hs_q = 1, vs_q = 1;
  logic [9:0] h_q = 0, v_q = 0;
  int field_lines;
  always @(posedge clk) if (!reset) begin
    cyc++;
    if (int'(hcount) > max_h) max_h = int'(hcount);
    if (hcount != h_q && !(hcount == h_q + 1 || hcount == 0)) bad_step++;
    if (hs_q && !hsync) begin
      if (hs_fall > 0 && cyc - hs_fall != 1606) line_len_err++;
      hs_fall = cyc;
      hs_low_start = cyc;
    end
    if (!hs_q && hsync && cyc - hs_low_start != 134) hs_width_err++;
    if (vs_q && !vsync) begin n_vsync++; vs_low_start = cyc; end
    if (!vs_q && vsync && cyc - vs_low_start != 4 * 1606) vs_width_err++;
    if (vreset) n_vreset++;
    if (vcount != v_q) begin
      if (vcount[0] == 0) lines_even++; else lines_odd++;
    end
    hs_q = hsync; vs_q = vsync; h_q = hcount; v_q = vcount;
  end

  initial begin
    #200ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    reset = 0;
    // one complete frame from the start of the even field
    repeat (1606 * 525) @(negedge clk);
    check(vcount, 0, "back at line 0 after a frame");
    check(lines_even, 263, "even lines in frame (2..524 and the return to 0)");
    check(lines_odd, 262, "odd lines in frame");
    check(n_vreset, 1, "vreset per frame");
    check(n_vsync, 1, "vsync per frame");
    check(line_len_err, 0, "line length 1606 clocks");
    check(hs_width_err, 0, "hsync width 134 clocks");
    check(vs_width_err, 0, "vsync width 4 lines");
    check(max_h, 802, "last pixel of a line");
    check(bad_step, 0, "hcount steps");
    // vertical = 1: one more even line
    vertical = 1;
    lines_even = 0; lines_odd = 0; n_vreset = 0;
    repeat (1606 * 526) @(negedge clk);
    check(vcount, 0, "frame of 526 lines");
    check(lines_even, 264, "even lines with vertical");
    check(n_vreset, 1, "vreset with vertical");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
