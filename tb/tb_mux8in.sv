// tb_mux8in: exhaustive check of the 8:1 multiplexer.
`timescale 1ns/1ps
module tb_mux8in;
  logic [7:0] in;
  logic [2:0] sel;
  logic       out;
  int checks = 0, failures = 0;

  mux8in dut (.in, .sel, .out);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      for (int s = 0; s < 8; s++) begin
        in  = 8'(v);
        sel = 3'(s);
        #1;
        checks++;
        if (out !== ((v >> s) & 1)) begin
          failures++;
          $display("FAIL in=%b sel=%0d out=%b", in, sel, out);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
