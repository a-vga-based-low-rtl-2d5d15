// data2mem: stores each finished ADC conversion in the sample memory.
//
// The ADC pulls notINT low when a conversion is done. notINT is
// asynchronous, so it passes a two-flip-flop synchroniser; its falling edge
// starts a three-cycle write:
//   cycle 1 (SETUP): address_out <= address_in (sampleNo), data_out <=
//                    data_in (ADC data), address_mux high (memory takes the
//                    sampler address, the display sees "busy");
//   cycle 2 (PULSE): mem_we high, the RAM writes at the end of this cycle;
//   cycle 3:         address_mux and mem_we low again.
// Address and data are therefore stable a full cycle before and during the
// write enable. The three-cycle sequence is the original design's; the synchroniser
// is this design's addition. The ADC data is captured two clocks after
// notINT falls, when it is long valid.
module data2mem
  import osc_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              not_int,
  input  logic [ADDR_W-1:0] address_in,
  input  logic [DATA_W-1:0] data_in,
  output logic              address_mux,
  output logic [ADDR_W-1:0] address_out,
  output logic [DATA_W-1:0] data_out,
  output logic              mem_we
);
  write_state_e state;
  logic [2:0]   int_sync;   // [0],[1] synchroniser, [2] previous value
  logic         int_fall;

  always_comb int_fall = int_sync[2] && !int_sync[1];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      int_sync    <= 3'b111;
      state       <= WR_IDLE;
      address_mux <= 1'b0;
      mem_we      <= 1'b0;
      address_out <= '0;
      data_out    <= '0;
    end else begin
      int_sync <= {int_sync[1:0], not_int};
      unique case (state)
        WR_IDLE: if (int_fall) begin
          state       <= WR_SETUP;
          address_out <= address_in;
          data_out    <= data_in;
          address_mux <= 1'b1;
        end
        WR_SETUP: begin
          state  <= WR_PULSE;
          mem_we <= 1'b1;
        end
        WR_PULSE: begin
          state       <= WR_IDLE;
          mem_we      <= 1'b0;
          address_mux <= 1'b0;
        end
        default: state <= WR_IDLE;
      endcase
    end
  end

  // Write-sequence rules: the enable rises one clock after the sampler takes
  // the address bus, only while it holds it, and lasts one clock.
  a_we_needs_mux: assert property (@(posedge clk) disable iff (!rst_n)
    mem_we |-> address_mux);
  a_we_one_clock: assert property (@(posedge clk) disable iff (!rst_n)
    mem_we |=> !mem_we);
  a_mux_then_we: assert property (@(posedge clk) disable iff (!rst_n)
    $rose(address_mux) |=> mem_we);
endmodule
