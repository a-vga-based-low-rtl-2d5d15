// tb_encoder: exhaustive check of the time/div priority encoder against a
// reference loop over all 64 switch patterns.
`timescale 1ns/1ps
module tb_encoder;
  logic [5:0] sel_bits;
  logic [2:0] sel;
  int checks = 0, failures = 0;

  encoder dut (.sel_bits, .sel);

  function automatic logic [2:0] ref_enc(logic [5:0] b);
    for (int i = 0; i < 6; i++) if (b[i]) return 3'(i);
    return 3'd0;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 64; v++) begin
      sel_bits = 6'(v);
      #1;
      checks++;
      if (sel !== ref_enc(sel_bits)) begin
        failures++;
        $display("FAIL bits=%b sel=%0d exp=%0d", sel_bits, sel, ref_enc(sel_bits));
      end
    end
    // one-hot settings map to their own index
    for (int i = 0; i < 6; i++) begin
      sel_bits = 6'(1 << i);
      #1;
      checks++;
      if (sel != 3'(i)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
