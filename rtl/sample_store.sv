// sample_store: the numbered sample records of the unit.
//
// The unit keeps NUM_SAMPLES records, one per sample number.  sample_num is
// the active number: each press of the next-sample button (next_sample is
// the synchronised button level; the press is detected here) moves it on by
// one, wrapping from NUM_SAMPLES-1 to 0.  When a measurement finishes
// (meas_ready, one clock) the record of the active number is written with
// the measurement and the GPS position, date and time of that moment, and
// marked stored; a later measurement on the same number replaces it.  The
// outputs show the record of the active number: stored is its flag, and
// shown_meas and shown_info are its contents.  While the number holds
// nothing, shown_meas is zero (flat bars) and shown_info is the live GPS
// information, so the position box follows the receiver until a sample is
// taken.  Records are lost on reset.
// The record count and the store / review / replace behaviour follow the
// document; the record layout and the view of an empty number are
// this design's.
module sample_store
  import soil_pkg::*;
#(
  parameter int NUM_SAMPLES = 32
) (
  input  logic                          clk,
  input  logic                          reset,
  input  logic                          next_sample,
  input  logic                          meas_ready,
  input  logic [STREAM_W-1:0]           measurement,
  input  gps_info_t                     live_info,
  output logic [$clog2(NUM_SAMPLES)-1:0] sample_num,
  output logic                          stored,
  output logic [STREAM_W-1:0]           shown_meas,
  output gps_info_t                     shown_info
);
  typedef struct packed {
    gps_info_t           info;
    logic [STREAM_W-1:0] meas;
  } record_t;

  record_t                mem   [NUM_SAMPLES];
  logic [NUM_SAMPLES-1:0] valid;
  logic                   next_q;

  always_ff @(posedge clk) begin
    if (reset) begin
      sample_num <= '0;
      valid      <= '0;
      next_q     <= 1'b1;
    end else begin
      next_q <= next_sample;
      if (next_sample && !next_q)
        sample_num <= (sample_num == ($bits(sample_num))'(NUM_SAMPLES - 1)) ? '0
                                                                           : sample_num + 1'b1;
      if (meas_ready) valid[sample_num] <= 1'b1;
    end
  end

  // record memory, no reset (guarded by valid)
  always_ff @(posedge clk)
    if (meas_ready) mem[sample_num] <= '{info: live_info, meas: measurement};

  assign stored     = valid[sample_num];
  assign shown_meas = stored ? mem[sample_num].meas : '0;
  assign shown_info = stored ? mem[sample_num].info : live_info;
endmodule
