// tb_vapres_chain4: the four-PRR sample block (N=4, w=32, kr=kl=2,
// ki=ko=1) running a chain of filter modules, each in its own clock domain:
//   IOM -> PRR1 (x[n]+x[n-1]) -> PRR2 -> PRR3 -> PRR4 (each x[n]-x[n-1]) -> IOM
// Forward hops use right-flowing channel 0 between neighbours; the result
// returns to the IOM on left-flowing channel 0 through four switch boxes.
// PRR1 and PRR3 run on the slow clock, PRR2 and PRR4 on the fast one. The
// external sink stalls in long stretches. Every output is compared with a
// reference model of the four filters in series; no word may be dropped and
// the early-full feedback must have stalled a producer.
module tb_vapres_chain4;
  import vapres_pkg::*;
  localparam int NP = 4, NS = NP + 1, W = 32, N = 2500;

  logic clk = 0, fast = 0, slow = 0, rst = 0;
  logic dcr_read = 0, dcr_write = 0, dcr_ack;
  logic [9:0] dcr_abus = '0;
  logic [31:0] dcr_din = '0, dcr_dout;
  logic fsl_r_read [NS], fsl_r_ctrl [NS], fsl_r_exists [NS];
  logic fsl_t_write [NS], fsl_t_ctrl [NS], fsl_t_full [NS];
  logic [W-1:0] fsl_r_data [NS], fsl_t_data [NS];
  logic in_v = 0, in_r, out_v, out_r = 0;
  logic [W-1:0] in_d = '0, out_d;
  logic c_overflow [NS][1];
  int checks = 0, failures = 0;

  always #5 clk  = ~clk;
  always #4 fast = ~fast;
  always #9 slow = ~slow;

  vapres_top #(.N_PRR(NP)) dut (
    .clk(clk), .clk_fast(fast), .clk_slow(slow), .rst(rst),
    .dcr_read(dcr_read), .dcr_write(dcr_write), .dcr_abus(dcr_abus),
    .dcr_dbus_in(dcr_din), .dcr_dbus_out(dcr_dout), .dcr_ack(dcr_ack),
    .fsl_r_read(fsl_r_read), .fsl_r_data(fsl_r_data), .fsl_r_ctrl(fsl_r_ctrl),
    .fsl_r_exists(fsl_r_exists), .fsl_t_write(fsl_t_write), .fsl_t_data(fsl_t_data),
    .fsl_t_ctrl(fsl_t_ctrl), .fsl_t_full(fsl_t_full),
    .ext_in_valid(in_v), .ext_in_data(in_d), .ext_in_ready(in_r),
    .ext_out_valid(out_v), .ext_out_data(out_d), .ext_out_ready(out_r),
    .c_overflow(c_overflow));

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  int n_in, n_out, n_fb_stall, n_ovf, n_bad;

  initial begin
    #3000000; failures++; $display("FAIL: watchdog in=%0d out=%0d", n_in, n_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  logic [2:0] sel [NS][5];
  logic [7:0] ctl [NS];

  task automatic push(input int s);
    logic [23:0] m;
    m = '0;
    for (int o = 0; o < 5; o++) m[o*3 +: 3] = sel[s][o];
    @(negedge clk);
    dcr_abus = 10'(s); dcr_din = {m, ctl[s]}; dcr_write = 1;
    @(negedge clk);
    dcr_write = 0;
  endtask

  // monitoring words are read and discarded
  always @(negedge clk)
    for (int s = 0; s < NS; s++) fsl_r_read[s] <= !rst && fsl_r_exists[s];

  function automatic logic [W-1:0] xval(input int k);
    return 32'(k) * 32'd2654435761 ^ 32'(k >> 3);
  endfunction

  // reference: four filters in series, every state starting at zero
  logic [W-1:0] ref_out [N];
  initial begin
    logic [W-1:0] prev [NP];
    for (int j = 0; j < NP; j++) prev[j] = '0;
    for (int k = 0; k < N; k++) begin
      logic [W-1:0] v, nv;
      v = xval(k);
      for (int j = 0; j < NP; j++) begin
        nv = (j == 0) ? v + prev[j] : v - prev[j];
        prev[j] = v;
        v = nv;
      end
      ref_out[k] = v;
    end
  end

  logic in_r_q, out_v_q;
  logic [W-1:0] out_d_q;
  always @(negedge dut.mclk[0]) begin
    if (in_v && in_r_q) n_in++;
    if (out_v_q && out_r) begin
      if (n_out < N && out_d_q != ref_out[n_out]) begin
        n_bad++;
        if (n_bad < 5) $display("FAIL: output %0d is %h, expected %h", n_out, out_d_q, ref_out[n_out]);
      end
      n_out++;
    end
    in_r_q  = in_r;
    out_v_q = out_v;
    out_d_q = out_d;
    in_v  = (n_in < N) && ($urandom_range(0, 3) != 0);
    in_d  = xval(n_in);
    out_r = (($time / 10000) % 3 != 0) && ($urandom_range(0, 3) != 0);
  end

  for (genvar s = 0; s < NS; s++) begin : g_cnt
    always @(posedge clk) begin
      if (!rst && dut.u_rsb.g_slot[s].g_prod[0].u_prod.remote_full &&
          !dut.u_rsb.g_slot[s].g_prod[0].u_prod.empty) n_fb_stall++;
      if (!rst && c_overflow[s][0]) n_ovf++;
    end
  end

  initial begin
    for (int s = 0; s < NS; s++) begin
      fsl_t_write[s] = 0; fsl_t_ctrl[s] = 0; fsl_t_data[s] = '0; fsl_r_read[s] = 0;
      for (int o = 0; o < 5; o++) sel[s][o] = 0;
      // SM_en, FIFO_wen, FIFO_ren, CLK_en; odd PRRs slow, even PRRs and IOM fast
      ctl[s] = 8'h71 | ((s % 2 == 0) ? 8'h80 : 8'h00);
    end
    n_in = 0; n_out = 0; n_fb_stall = 0; n_ovf = 0; n_bad = 0;
    #1 rst = 1;
    repeat (5) @(posedge clk);
    rst = 0;
    // forward: slot s producer -> right channel 0 -> slot s+1 consumer
    for (int s = 0; s < NP; s++) begin
      sel[s][0]   = 5;
      sel[s+1][4] = 1;
    end
    // return: slot NP producer -> left channel 0 -> ... -> slot 0 consumer
    sel[NP][2] = 5;
    for (int s = 1; s < NP; s++) sel[s][2] = 3;
    sel[0][4] = 3;
    for (int s = NS - 1; s >= 0; s--) push(s);
    wait (n_out >= N);
    repeat (100) @(posedge clk);
    check(n_out == N, $sformatf("%0d outputs for %0d inputs", n_out, N));
    check(n_bad == 0, $sformatf("%0d outputs differ from the reference", n_bad));
    check(n_fb_stall > 0, $sformatf("early-full feedback stalls: %0d", n_fb_stall));
    check(n_ovf == 0, $sformatf("dropped words: %0d", n_ovf));
    check(dut.g_prr[1].u_filter.count == N && dut.g_prr[2].u_filter.count == N &&
          dut.g_prr[3].u_filter.count == N && dut.g_prr[4].u_filter.count == N,
          "every filter processed every sample");
    $display("mechanisms: feedback stalls=%0d outputs=%0d", n_fb_stall, n_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
