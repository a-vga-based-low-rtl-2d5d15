// osc_top: the CPLD controller of a low-cost oscilloscope that draws its
// trace on a standard VGA monitor.
//
// Three parts run concurrently from one 25 MHz clock:
//   sampler   - on a trigger pulse, takes SAMPLES samples from an external
//               ADC0820-type converter (notWE start pulses out, notINT and 8
//               data bits back) at the time/div rate and writes each one to
//               memory at its sample index;
//   memory    - 1024 x 8 RAM whose address bus normally follows the display
//               column and is taken by the sampler for each three-cycle write;
//   displayer - scans 640 x 480 at 60 Hz, reads the sample for each column
//               and lights the blue pixel at that sample's height, plus a
//               green graticule.
// The ADC's notRD pin is tied low on the board (stand-alone mode) and is not
// driven here. VGA outputs lag the scan position by one clock; a sample
// appears on screen in the first frame scanned after its write.
module osc_top
  import osc_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 trigger,
  input  logic [NUM_RATES-1:0] time_div,
  input  logic [DATA_W-1:0]    adc_data,
  input  logic                 adc_not_int,
  output logic                 adc_not_we,
  output logic                 vga_red,
  output logic                 vga_green,
  output logic                 vga_blue,
  output logic                 vga_hsync,
  output logic                 vga_vsync,
  output logic                 sampling
);
  logic              addr_mux_sel, mem_we;
  logic [ADDR_W-1:0] addr_sampler, addr_display;
  logic [DATA_W-1:0] wr_data, rd_data;

  sampler u_sampler (
    .clk, .rst_n, .trigger, .time_div, .adc_data, .adc_not_int, .adc_not_we,
    .addr_mux_sel, .address_out(addr_sampler), .data_out(wr_data), .mem_we,
    .busy(sampling)
  );

  memory u_memory (
    .clk, .addr_mux_sel, .addr_sampler, .addr_display, .we(mem_we),
    .din(wr_data), .dout(rd_data)
  );

  displayer u_displayer (
    .clk, .rst_n, .data_in(rd_data), .busy(addr_mux_sel), .mem_addr(addr_display),
    .red(vga_red), .green(vga_green), .blue(vga_blue),
    .hsync(vga_hsync), .vsync(vga_vsync)
  );
endmodule
