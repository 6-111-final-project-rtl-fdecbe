// sensor_control: runs one write / convert / read cycle of the ADC.
//
// The ADC (an ADC0841-type part) has active-low CS, WR and RD strobes and an
// active-low INTR output that falls when a conversion is finished and rises
// again when the result is read.  A one-cycle initiate pulse starts the
// sequence:
//   ADDR    first enable pulse: CS low
//   WR      next pulse: WR low (starts the conversion)
//   WR_END  next pulse: CS and WR high, timebase stopped (active low)
//   CONV    wait for INTR low, restart the timebase; next pulse: CS low
//   RD_SET  next pulse with INTR low: RD low
//   RD      next pulse with INTR high again: capture the data bus
//   RD_HOLD next pulse with INTR high: RD high
//   DONE    next pulse with INTR high: CS high, result on sensor_data and
//           sensor_ready high for one clock, back to idle
// "enable" is the pulse train from sensor_clock, which runs while active is
// high; each step is therefore one enable period (20 us at the defaults).
// sensor_data holds the last result until the next one.  Reset returns the
// strobes to their inactive high level.  The order of the steps follows the
// document; advancing on the pulse itself instead of one pulse later is this
// design's choice.
module sensor_control (
  input  logic       clk,
  input  logic       reset,
  input  logic       enable,
  input  logic       initiate,
  input  logic       intr,
  input  logic [7:0] sensor_in,
  output logic       cs,
  output logic       wr,
  output logic       rd,
  output logic       active,
  output logic       sensor_ready,
  output logic [7:0] sensor_data
);
  typedef enum logic [3:0] {
    S_IDLE, S_ADDR, S_WR, S_WR_END, S_CONV, S_RD_SET, S_RD, S_RD_HOLD, S_DONE
  } state_t;

  state_t     state;
  logic [7:0] captured;

  always_ff @(posedge clk) begin
    if (reset) begin
      state        <= S_IDLE;
      cs           <= 1'b1;
      wr           <= 1'b1;
      rd           <= 1'b1;
      active       <= 1'b0;
      sensor_ready <= 1'b0;
      sensor_data  <= '0;
      captured     <= '0;
    end else begin
      sensor_ready <= 1'b0;
      unique case (state)
        S_IDLE: begin
          cs <= 1'b1;
          wr <= 1'b1;
          rd <= 1'b1;
          active <= initiate;
          if (initiate) state <= S_ADDR;
        end
        S_ADDR:
          if (enable) begin
            cs    <= 1'b0;
            state <= S_WR;
          end
        S_WR:
          if (enable) begin
            wr    <= 1'b0;
            state <= S_WR_END;
          end
        S_WR_END:
          if (enable) begin
            cs     <= 1'b1;
            wr     <= 1'b1;
            active <= 1'b0;
            state  <= S_CONV;
          end
        S_CONV:
          if (!intr) begin
            active <= 1'b1;
            if (enable) begin
              cs    <= 1'b0;
              state <= S_RD_SET;
            end
          end
        S_RD_SET:
          if (enable && !intr) begin
            rd    <= 1'b0;
            state <= S_RD;
          end
        S_RD:
          if (enable && intr) begin
            captured <= sensor_in;
            state    <= S_RD_HOLD;
          end
        S_RD_HOLD:
          if (enable && intr) begin
            rd    <= 1'b1;
            state <= S_DONE;
          end
        S_DONE:
          if (enable && intr) begin
            cs           <= 1'b1;
            active       <= 1'b0;
            sensor_data  <= captured;
            sensor_ready <= 1'b1;
            state        <= S_IDLE;
          end
        default: state <= S_IDLE;
      endcase
    end
  end

  // Strobe rules of the ADC bus: a write or read strobe only with CS low.
  a_wr_needs_cs: assert property (@(posedge clk) disable iff (reset) !wr |-> !cs);
  a_rd_needs_cs: assert property (@(posedge clk) disable iff (reset) !rd |-> !cs);
  a_no_wr_and_rd: assert property (@(posedge clk) disable iff (reset) !(!wr && !rd));
endmodule
