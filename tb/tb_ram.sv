// tb_ram: writes all 1024 words, reads them back combinationally, then
// mixes random writes and reads against a reference array; checks that a
// read with we low changes nothing.
`timescale 1ns/1ps
module tb_ram;
  logic clk = 0, we = 0;
  logic [9:0] addr = 0;
  logic [7:0] din = 0, dout;
  logic [7:0] shadow [1024];
  int checks = 0, failures = 0;

  ram dut (.clk, .we, .addr, .din, .dout);

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
    for (int a = 0; a < 1024; a++) begin
      @(negedge clk);
      we = 1; addr = 10'(a); din = 8'(a * 37 + 5);
      shadow[a] = din;
    end
    @(negedge clk) we = 0;
    for (int a = 0; a < 1024; a++) begin
      addr = 10'(a);
      #1 chk(dout == shadow[a], $sformatf("read %0d = %h exp %h", a, dout, shadow[a]));
    end
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      we = 1'($urandom);
      addr = 10'($urandom);
      din = 8'($urandom);
      #1;
      chk(dout == shadow[addr], $sformatf("pre-edge read %0d", addr));
      if (we) shadow[addr] = din;
      @(posedge clk); #1;
      chk(dout == shadow[addr], $sformatf("post-edge read %0d", addr));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
