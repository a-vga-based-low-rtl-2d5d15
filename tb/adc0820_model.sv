// adc0820_model: behavioural model of an ADC0820-style 8-bit converter in
// stand-alone (WR-RD) mode, for testbenches only; not synthesizable.
//
// A falling edge on not_we clears not_int (high) and samples the analogue
// input, here the 8-bit code vin. CONV_NS after not_we rises, the code
// appears on data and not_int goes low, where it stays until the next
// not_we falling edge. Each conversion's code is also logged in conv_log in
// order, and n_conv counts the conversions started, so a testbench can work
// out what should land in memory.
`timescale 1ns/1ps
module adc0820_model #(
  parameter int CONV_NS = 600,
  parameter int LOG_LEN = 4096
) (
  input  logic       not_we,
  input  logic [7:0] vin,
  output logic [7:0] data,
  output logic       not_int
);
  logic [7:0] held;
  logic [7:0] conv_log [LOG_LEN];
  int         n_conv = 0;
  int         n_done = 0;

  initial begin
    data    = 8'h00;
    not_int = 1'b1;
  end

  always @(negedge not_we) begin
    not_int = 1'b1;
    held    = vin;
    if (n_conv < LOG_LEN) conv_log[n_conv] = vin;
    n_conv++;
  end

  always @(posedge not_we) begin
    automatic int k = n_conv;
    #(CONV_NS);
    if (k == n_conv) begin
      data    = held;
      not_int = 1'b0;
      n_done++;
    end
  end
endmodule
