// tb_sampler: the sampler with the ADC model. For two frames (fastest and
// a slower time/div setting) it checks that exactly SAMPLES writes occur,
// that write k goes to address k and carries the code the ADC converted for
// sample k, and that the write rate equals the sampling rate. Uses
// SAMPLES=24.
`timescale 1ns/1ps
module tb_sampler;
  localparam int S = 24;
  localparam int unsigned DIVS [6] = '{50, 125, 250, 500, 1250, 2500};
  logic clk = 0, rst_n = 0, trigger = 0;
  logic [5:0] time_div;
  logic [7:0] adc_data, vin;
  logic adc_not_int, adc_not_we, addr_mux_sel, mem_we, busy;
  logic [9:0] address_out;
  logic [7:0] data_out;
  int checks = 0, failures = 0;

  sampler #(.SAMPLES(S)) dut (.clk, .rst_n, .trigger, .time_div, .adc_data, .adc_not_int,
    .adc_not_we, .addr_mux_sel, .address_out, .data_out, .mem_we, .busy);

  adc0820_model adc (.not_we(adc_not_we), .vin, .data(adc_data), .not_int(adc_not_int));

  always #20 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  // the analogue input changes every 300 ns
  always #300 vin = 8'($urandom);

  int cyc = 0, n_wr, base, bad_addr, bad_data, bad_rate, last_wr;
  int div_now;
  always @(posedge clk) begin
    cyc++;
    if (rst_n && mem_we) begin
      if (address_out != 10'(n_wr)) bad_addr++;
      if (data_out != adc.conv_log[base + n_wr]) bad_data++;
      if (n_wr > 0 && cyc - last_wr != div_now) bad_rate++;
      last_wr = cyc;
      n_wr++;
    end
  end

  initial begin
    vin = 8'h80;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (5) @(posedge clk);
    foreach (DIVS[r]) begin
      if (r != 0 && r != 3) continue;
      time_div = 6'(1 << r);
      div_now = DIVS[r];
      n_wr = 0; bad_addr = 0; bad_data = 0; bad_rate = 0;
      base = adc.n_conv;
      @(negedge clk) trigger = 1;
      repeat (30) @(negedge clk);
      trigger = 0;
      while (busy) @(posedge clk);
      repeat (200) @(posedge clk);
      chk(n_wr == S, $sformatf("rate %0d: %0d writes", r, n_wr));
      chk(adc.n_conv - base == S, "one conversion per sample");
      chk(bad_addr == 0, $sformatf("rate %0d: address errors %0d", r, bad_addr));
      chk(bad_data == 0, $sformatf("rate %0d: data errors %0d", r, bad_data));
      chk(bad_rate == 0, $sformatf("rate %0d: write spacing errors %0d", r, bad_rate));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
