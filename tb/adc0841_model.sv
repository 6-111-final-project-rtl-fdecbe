// adc0841_model: behavioural model of an ADC0841-type 8-bit converter,
// for simulation only (the real part is an analog chip).
//
// Bus: active-low cs_n, wr_n, rd_n; active-low intr_n; 8-bit data bus db.
// The part gates WR with CS, so a write ends (and a conversion starts)
// when either of cs_n and wr_n rises after both were low: intr_n
// goes high and CONV_CYCLES clocks later the analog input (vin, given as
// the code it converts to) is latched and intr_n falls.  The start of a
// read (rd_n and cs_n both low) resets intr_n high; db shows the latched result while
// rd_n and cs_n are low and 0 otherwise.  All edges are seen on the
// rising edge of clk.  conversions counts finished conversions.
//
// Behavioural model only (not synthesizable intent): conversion time is a
// parameter, the real part's timing is taken from its data sheet in outline.
module adc0841_model #(
  parameter int CONV_CYCLES = 1000
) (
  input  logic       clk,
  input  logic       cs_n,
  input  logic       wr_n,
  input  logic       rd_n,
  input  logic [7:0] vin,
  output logic       intr_n,
  output logic [7:0] db,
  output int         conversions
);
  logic       wr_q = 1'b0, rd_q = 1'b0;   // write / read strobe seen last clock
  logic [7:0] result = '0;
  int         busy = 0;

  initial begin
    intr_n      = 1'b1;
    conversions = 0;
  end

  always @(posedge clk) begin
    wr_q <= !cs_n && !wr_n;
    rd_q <= !cs_n && !rd_n;
    if (wr_q && !(!cs_n && !wr_n)) begin
      intr_n <= 1'b1;
      busy   <= CONV_CYCLES;
    end else if (busy > 1) begin
      busy <= busy - 1;
    end else if (busy == 1) begin
      busy        <= 0;
      result      <= vin;
      intr_n      <= 1'b0;
      conversions <= conversions + 1;
    end
    if (!cs_n && !rd_n && !rd_q) intr_n <= 1'b1;
  end

  assign db = (!cs_n && !rd_n) ? result : 8'h00;
endmodule
