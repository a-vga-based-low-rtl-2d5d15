// sampler10b: frame controller of controlADC.
//
// Waits in IDLE, holding the sample counter cleared, until a rising edge of
// the trigger pulse. It then enables the sampling clocks (RUN). When the
// counter reports that the last sample (SAMPLES-1) has started, it disables
// the clocks and waits FLUSH_CYCLES clocks (FLUSH) so the final conversion is
// written under its own address, then clears the counter and returns to
// IDLE. Trigger edges that arrive outside IDLE are ignored. busy is high in
// RUN and FLUSH.
//
// Starting a frame on a trigger, enabling CLK_generator and resetting the
// counter after 640 samples follow the original design; the flush wait, the state
// encoding and ignoring triggers during a frame are this design's choices.
module sampler10b
#(
  parameter int unsigned SAMPLES      = osc_pkg::SAMPLES,
  parameter int unsigned FLUSH_CYCLES = 100
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              trigger,
  input  logic [osc_pkg::ADDR_W-1:0] sample_no,
  output logic              sample_clk_en,
  output logic              reset_counter,
  output logic              busy
);
  localparam int unsigned FW = $clog2(FLUSH_CYCLES + 1);
  localparam int unsigned AW = osc_pkg::ADDR_W;

  osc_pkg::frame_state_e  state;
  logic          trig_d;
  logic [FW-1:0] flush_cnt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= osc_pkg::FR_IDLE;
      trig_d    <= 1'b0;
      flush_cnt <= '0;
    end else begin
      trig_d <= trigger;
      unique case (state)
        osc_pkg::FR_IDLE: if (trigger && !trig_d) state <= osc_pkg::FR_RUN;
        osc_pkg::FR_RUN: if (sample_no == AW'(SAMPLES - 1)) begin
          state     <= osc_pkg::FR_FLUSH;
          flush_cnt <= FW'(FLUSH_CYCLES);
        end
        osc_pkg::FR_FLUSH: begin
          flush_cnt <= flush_cnt - 1'b1;
          if (flush_cnt == FW'(1)) state <= osc_pkg::FR_IDLE;
        end
        default: state <= osc_pkg::FR_IDLE;
      endcase
    end
  end

  always_comb begin
    sample_clk_en = (state == osc_pkg::FR_RUN);
    reset_counter = (state == osc_pkg::FR_IDLE);
    busy          = (state != osc_pkg::FR_IDLE);
  end
endmodule
