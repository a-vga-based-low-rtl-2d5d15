// tb_address_mux: random check of the two-way address select.
`timescale 1ns/1ps
module tb_address_mux;
  logic [9:0] addr_sampler, addr_display, addr;
  logic sel;
  int checks = 0, failures = 0;

  address_mux dut (.addr_sampler, .addr_display, .sel, .addr);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 500; n++) begin
      addr_sampler = 10'($urandom);
      addr_display = 10'($urandom);
      sel = 1'($urandom);
      #1;
      checks++;
      if (addr !== (sel ? addr_sampler : addr_display)) begin
        failures++;
        $display("FAIL sel=%b addr=%h", sel, addr);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
