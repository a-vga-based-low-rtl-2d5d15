// tb_grid_generator: over the whole visible area, green exactly on the
// 11 vertical and 9 horizontal graticule lines (every 64 columns and 60
// rows plus the last column and row).
`timescale 1ns/1ps
module tb_grid_generator;
  logic [9:0] col, row;
  logic green;
  int checks = 0, failures = 0, n_green = 0;

  grid_generator dut (.col, .row, .green);

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit on_grid(int c, int r);
    return (c % 64 == 0) || (c == 639) || (r % 60 == 0) || (r == 479);
  endfunction

  initial begin
    for (int r = 0; r < 480; r++) begin
      for (int c = 0; c < 640; c++) begin
        col = 10'(c); row = 10'(r);
        #1;
        checks++;
        if (green) n_green++;
        if (green != on_grid(c, r)) begin
          failures++;
          if (failures < 10) $display("FAIL c=%0d r=%0d green=%b", c, r, green);
        end
      end
    end
    // 11 columns x 480 + 9 rows x 640 - 99 crossings
    checks++;
    if (n_green != 11 * 480 + 9 * 640 - 99) begin
      failures++;
      $display("FAIL green count %0d", n_green);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
