// control_adc: drives the ADC's notWE line for one sampling frame.
//
// On a trigger, sampler10b enables clk_generator; the encoder turns the
// one-hot time/div switches into the mux8in select; the chosen sampling
// clock clocks the sample_counter and fires the monostable, which sends a
// 1 us active-low pulse to notWE. After SAMPLES sampling edges the frame ends.
// sample_no is the index of the conversion in progress (0..SAMPLES-1) and is
// used as the memory address of that sample. This structure is the
// original design's; busy is an extra observation output.
//
// Timing: the first notWE pulse starts 4 clocks after the trigger edge is
// seen; successive pulses are one sampling period apart.
module control_adc
#(
  parameter int unsigned SAMPLES      = osc_pkg::SAMPLES,
  parameter int unsigned PULSE_CYCLES = osc_pkg::PULSE_CYCLES,
  parameter int unsigned FLUSH_CYCLES = 100,
  parameter int unsigned DIVS [osc_pkg::NUM_RATES] = osc_pkg::RATE_DIV
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 trigger,
  input  logic [osc_pkg::NUM_RATES-1:0] time_div,
  output logic [osc_pkg::ADDR_W-1:0]    sample_no,
  output logic                 not_we,
  output logic                 busy
);
  logic                 sample_clk_en, reset_counter;
  logic [osc_pkg::NUM_RATES-1:0] clks;
  logic [2:0]           clk_sel;
  logic                 sample_clk;

  sampler10b #(.SAMPLES(SAMPLES), .FLUSH_CYCLES(FLUSH_CYCLES)) u_sampler10b (
    .clk, .rst_n, .trigger, .sample_no,
    .sample_clk_en, .reset_counter, .busy
  );

  clk_generator #(.N(osc_pkg::NUM_RATES), .DIVS(DIVS)) u_clk_generator (
    .clk, .rst_n, .en(sample_clk_en), .clk_out(clks)
  );

  encoder u_encoder (.sel_bits(time_div), .sel(clk_sel));

  mux8in u_mux8in (.in({2'b00, clks}), .sel(clk_sel), .out(sample_clk));

  monostable #(.PULSE_CYCLES(PULSE_CYCLES)) u_monostable (
    .clk, .rst_n, .trig(sample_clk), .not_pulse(not_we)
  );

  sample_counter #(.WIDTH(osc_pkg::ADDR_W)) u_counter (
    .clk, .rst_n, .clear(reset_counter), .tick(sample_clk), .count(sample_no)
  );
endmodule
