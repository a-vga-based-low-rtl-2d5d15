// tb_clk_generator: checks every sampling clock's period and duty cycle in
// system clocks, that the outputs are low while disabled, and that each
// output goes high one clock after enable.
`timescale 1ns/1ps
module tb_clk_generator;
  localparam int N = 6;
  localparam int unsigned DIVS [N] = '{50, 125, 250, 500, 1250, 2500};
  logic clk = 0, rst_n = 0, en = 0;
  logic [N-1:0] clk_out;
  int checks = 0, failures = 0;
  int cyc = 0;
  int rise_at [N][$];
  int high_len [N];
  int hcnt [N];
  logic [N-1:0] prev;

  clk_generator dut (.clk, .rst_n, .en, .clk_out);

  always #20 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  always @(posedge clk) begin
    cyc++;
    if (rst_n && en) for (int i = 0; i < N; i++) begin
      if (clk_out[i] && !prev[i]) rise_at[i].push_back(cyc);
      if (clk_out[i]) hcnt[i]++;
      if (!clk_out[i] && prev[i]) begin high_len[i] = hcnt[i]; hcnt[i] = 0; end
    end
    prev <= clk_out;
  end

  initial begin
    prev = '0;
    for (int i = 0; i < N; i++) begin hcnt[i] = 0; high_len[i] = 0; end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (5) @(posedge clk);
    #1 chk(clk_out == '0, "outputs low while disabled");
    @(negedge clk) en = 1;
    @(posedge clk); #1;
    chk(clk_out == '1, "all outputs high one clock after enable");
    repeat (3 * 2500 + 10) @(posedge clk);
    for (int i = 0; i < N; i++) begin
      chk(rise_at[i].size() >= 3, $sformatf("clk %0d has rising edges", i));
      if (rise_at[i].size() >= 3) begin
        chk(rise_at[i][1] - rise_at[i][0] == DIVS[i], $sformatf("clk %0d period %0d", i, rise_at[i][1] - rise_at[i][0]));
        chk(rise_at[i][2] - rise_at[i][1] == DIVS[i], $sformatf("clk %0d period 2", i));
      end
      chk(high_len[i] == DIVS[i] / 2, $sformatf("clk %0d high %0d", i, high_len[i]));
    end
    @(negedge clk) en = 0;
    @(posedge clk); #1;
    chk(clk_out == '0, "outputs low after disable");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
