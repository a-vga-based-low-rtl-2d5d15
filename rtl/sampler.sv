// sampler: the sampling half of the controller, controlADC and data2mem side
// by side.
//
// control_adc pulses the ADC's notWE SAMPLES times per trigger at the
// time/div rate and keeps the sample index; data2mem waits for each notINT
// falling edge and writes the ADC word to memory at that index with the
// three-cycle address_mux / mem_we sequence. The two run independently, as
// in the original design; they share only sample_no. busy is high while a frame is
// being taken.
module sampler
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
  input  logic [osc_pkg::DATA_W-1:0]    adc_data,
  input  logic                 adc_not_int,
  output logic                 adc_not_we,
  output logic                 addr_mux_sel,
  output logic [osc_pkg::ADDR_W-1:0]    address_out,
  output logic [osc_pkg::DATA_W-1:0]    data_out,
  output logic                 mem_we,
  output logic                 busy
);
  logic [osc_pkg::ADDR_W-1:0] sample_no;

  control_adc #(.SAMPLES(SAMPLES), .PULSE_CYCLES(PULSE_CYCLES),
                .FLUSH_CYCLES(FLUSH_CYCLES), .DIVS(DIVS)) u_control_adc (
    .clk, .rst_n, .trigger, .time_div, .sample_no, .not_we(adc_not_we), .busy
  );

  data2mem u_data2mem (
    .clk, .rst_n, .not_int(adc_not_int), .address_in(sample_no), .data_in(adc_data),
    .address_mux(addr_mux_sel), .address_out, .data_out, .mem_we
  );
endmodule
