// encoder: turns the six single-bit time/div switches into the 3-bit
// sampling-clock select of the mux8in.
//
// Purely combinational priority encoder: the lowest-numbered switch that is
// on wins, and with no switch on the select is 0 (the fastest rate). The
// original design names this block and its 6-in / 3-out widths; the priority rule
// is this design's choice.
module encoder (
  input  logic [5:0] sel_bits,
  output logic [2:0] sel
);
  always_comb begin
    priority casez (sel_bits)
      6'b?????1: sel = 3'd0;
      6'b????10: sel = 3'd1;
      6'b???100: sel = 3'd2;
      6'b??1000: sel = 3'd3;
      6'b?10000: sel = 3'd4;
      6'b100000: sel = 3'd5;
      default:   sel = 3'd0;
    endcase
  end
endmodule
