// tb_data2mem: sends notINT falling edges with random data and addresses
// and checks the three-cycle write: address_mux high for 2 clocks, mem_we
// high for 1 clock in the second, address/data stable across it, and the
// latency from the notINT edge (synchroniser included).
`timescale 1ns/1ps
module tb_data2mem;
  logic clk = 0, rst_n = 0, not_int = 1;
  logic [9:0] address_in;
  logic [7:0] data_in;
  logic address_mux, mem_we;
  logic [9:0] address_out;
  logic [7:0] data_out;
  int checks = 0, failures = 0;

  data2mem dut (.clk, .rst_n, .not_int, .address_in, .data_in,
                .address_mux, .address_out, .data_out, .mem_we);

  always #20 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  // trace of the outputs for cycles after the edge
  logic [20:0] trace_mux, trace_we;
  logic [9:0] a_exp;
  logic [7:0] d_exp;
  initial begin
    address_in = 0; data_in = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (5) @(posedge clk);
    for (int n = 0; n < 200; n++) begin
      a_exp = 10'($urandom);
      d_exp = 8'($urandom);
      @(negedge clk);
      address_in = a_exp;
      data_in    = d_exp;
      #($urandom_range(0, 1) ? $urandom_range(1, 15) : $urandom_range(25, 39));  // asynchronous edge, away from the clock edge
      not_int = 0;
      for (int c = 0; c < 8; c++) begin
        @(posedge clk); #1;
        trace_mux[c] = address_mux;
        trace_we[c]  = mem_we;
        if (mem_we) begin
          chk(address_out == a_exp && data_out == d_exp, "address/data during mem_we");
          chk(address_mux, "address_mux high during mem_we");
        end
        // once captured, change the inputs; the outputs must hold
        if (address_mux) begin
          address_in = ~a_exp;
          data_in = ~d_exp;
        end
      end
      chk(trace_mux[7:0] == 8'b0000_1100 || trace_mux[7:0] == 8'b0001_1000,
          $sformatf("address_mux sequence %b", trace_mux[7:0]));
      chk(trace_we[7:0] == (trace_mux[7:0] & (trace_mux[7:0] >> 1)) << 1 || trace_we[7:0] == {trace_mux[6:0] & trace_mux[7:1], 1'b0},
          $sformatf("mem_we in second cycle %b", trace_we[7:0]));
      chk($countones(trace_we[7:0]) == 1, "mem_we one clock");
      not_int = $urandom_range(0, 1);   // sometimes stays low: no new write
      repeat (10) @(posedge clk);
      #1 chk(!address_mux && !mem_we, "idle after write");
      not_int = 1;
      repeat (3) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
