// tb_prr_clock: checks the PRR clock source model. With CLK_en set, the
// output period must equal the fast clock (6 ns) when CLK_sel = 1 and the
// slow clock (20 ns) when CLK_sel = 0; with CLK_en clear there must be no
// edges. Across select and enable changes no high or low phase may be
// shorter than half the fast period (no glitches).
module tb_prr_clock;
  logic rst = 1, fast = 0, slow = 0, sel = 0, en = 0, clk_out;
  int checks = 0, failures = 0;
  realtime last_rise = 0, last_edge = 0, period = 0, min_phase = 1e9;
  int rises = 0;

  always #3  fast = ~fast;
  always #10 slow = ~slow;

  prr_clock dut (.rst(rst), .clk_fast(fast), .clk_slow(slow), .clk_sel(sel), .clk_en(en),
                 .clk_out(clk_out));

  always @(posedge clk_out) begin
    period = $realtime - last_rise;
    last_rise = $realtime;
    rises++;
  end
  always @(clk_out) begin
    if (!rst && last_edge > 0 && ($realtime - last_edge) < min_phase) min_phase = $realtime - last_edge;
    last_edge = $realtime;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #100000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    #50 rst = 0;
    for (int n = 0; n < 8; n++) begin
      int r0;
      sel = n[0]; en = 1;
      #(97 + 13 * n);
      #200;
      check(period == (sel ? 6.0 : 20.0), $sformatf("period %0t with sel=%b", period, sel));
      en = 0;
      #60;
      r0 = rises;
      #200;
      check(rises == r0, "no edges while disabled");
      check(clk_out == 0, "output low while disabled");
    end
    check(min_phase >= 3.0, $sformatf("shortest phase %0t", min_phase));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
