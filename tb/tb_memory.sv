// tb_memory: the memory module with its address mux. Writes go to the
// sampler address when addr_mux_sel is high; reads follow the display
// address when it is low. Random traffic against a reference array,
// including writes while the display address points elsewhere.
`timescale 1ns/1ps
module tb_memory;
  logic clk = 0, addr_mux_sel = 0, we = 0;
  logic [9:0] addr_sampler = 0, addr_display = 0;
  logic [7:0] din = 0, dout;
  logic [7:0] shadow [1024];
  int checks = 0, failures = 0;

  memory dut (.clk, .addr_mux_sel, .addr_sampler, .addr_display, .we, .din, .dout);

  always #20 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    // fill through the sampler side
    for (int a = 0; a < 1024; a++) begin
      @(negedge clk);
      addr_mux_sel = 1; we = 1; addr_sampler = 10'(a); addr_display = 10'(1023 - a);
      din = 8'($urandom);
      shadow[a] = din;
    end
    @(negedge clk) begin we = 0; addr_mux_sel = 0; end
    // read through the display side
    for (int a = 0; a < 1024; a++) begin
      addr_display = 10'(a);
      addr_sampler = 10'($urandom);
      #1 chk(dout == shadow[a], $sformatf("display read %0d", a));
    end
    // random mix
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      addr_mux_sel = 1'($urandom);
      we = addr_mux_sel & 1'($urandom);
      addr_sampler = 10'($urandom);
      addr_display = 10'($urandom);
      din = 8'($urandom);
      #1 chk(dout == shadow[addr_mux_sel ? addr_sampler : addr_display], "read via mux");
      if (we) shadow[addr_sampler] = din;
      @(posedge clk);
    end
    @(negedge clk) begin we = 0; addr_mux_sel = 0; end
    for (int a = 0; a < 1024; a++) begin
      addr_display = 10'(a);
      #1 chk(dout == shadow[a], $sformatf("final read %0d", a));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
