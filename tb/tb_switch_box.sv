// tb_switch_box: self-checking test of one switch box at the prototype sizes
// (KR=KL=2, KI=KO=1, W=32). Every cycle it drives random channel words,
// random full feedback and a random multiplexer setting, and compares
// (both just after the edge and again after the inputs have changed)
//   out_data[o]  with the input word selected by output o, one clock late
//                (the input register), or an idle word when unselected;
//   full_out[i]  with the OR of full_in of all outputs fed from input i,
//                one clock late.
module tb_switch_box;
  import vapres_pkg::*;
  localparam int W = 32, KR = 2, KL = 2, KI = 1, KO = 1;
  localparam int NIN = KR + KL + KO, NOUT = KR + KL + KI;
  localparam int SELW = $clog2(NIN + 1);

  logic clk = 0, rst = 1;
  logic [MUX_SEL_W-1:0] mux_sel = '0;
  logic [W:0] in_data [NIN];
  logic full_out [NIN];
  logic [W:0] out_data [NOUT];
  logic full_in [NOUT];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  switch_box #(.W(W), .KR(KR), .KL(KL), .KI(KI), .KO(KO)) dut (
    .clk(clk), .rst(rst), .mux_sel(mux_sel), .in_data(in_data), .full_out(full_out),
    .out_data(out_data), .full_in(full_in));

  initial begin
    #100000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [W:0] prev_in [NIN];
    logic exp_full [NIN];
    int used;
    for (int i = 0; i < NIN; i++) in_data[i] = '0;
    for (int o = 0; o < NOUT; o++) full_in[o] = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    used = 0;
    for (int cyc = 0; cyc < 2000; cyc++) begin
      @(negedge clk);
      // new stimulus
      for (int i = 0; i < NIN; i++) in_data[i] = {1'($urandom), 32'($urandom)};
      for (int o = 0; o < NOUT; o++) full_in[o] = 1'($urandom);
      if (cyc % 4 == 0) begin
        mux_sel = '0;
        for (int o = 0; o < NOUT; o++) mux_sel[o*SELW +: SELW] = SELW'($urandom_range(0, NIN));
      end
      // expected full feedback for the next edge
      for (int i = 0; i < NIN; i++) begin
        exp_full[i] = 0;
        for (int o = 0; o < NOUT; o++)
          if (int'(mux_sel[o*SELW +: SELW]) == i + 1) exp_full[i] |= full_in[o];
      end
      // outputs come from the input registers: new inputs must not show
      // before the clock edge
      #1;
      if (cyc > 0) begin
        for (int o = 0; o < NOUT; o++) begin
          int s;
          s = int'(mux_sel[o*SELW +: SELW]);
          checks++;
          if (out_data[o] !== (s == 0 ? '0 : prev_in[s-1])) begin
            failures++;
            $display("FAIL: cycle %0d out %0d changed before the clock edge", cyc, o);
          end
        end
      end
      for (int i = 0; i < NIN; i++) prev_in[i] = in_data[i];
      @(posedge clk); #1;
      for (int o = 0; o < NOUT; o++) begin
        int s;
        s = int'(mux_sel[o*SELW +: SELW]);
        checks++;
        if (out_data[o] !== (s == 0 ? '0 : prev_in[s-1])) begin
          failures++;
          $display("FAIL: cycle %0d out %0d sel %0d got %h", cyc, o, s, out_data[o]);
        end
        if (s != 0 && prev_in[s-1][W]) used++;
      end
      for (int i = 0; i < NIN; i++) begin
        checks++;
        if (full_out[i] !== exp_full[i]) begin
          failures++;
          $display("FAIL: cycle %0d full_out %0d got %b exp %b", cyc, i, full_out[i], exp_full[i]);
        end
      end
    end
    checks++;
    if (used < 100) begin failures++; $display("FAIL: too few valid words routed"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
