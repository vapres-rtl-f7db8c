// tb_vapres_top: end-to-end test of the VAPRES data processing region at its
// default sizes (IOM + two PRRs, 32-bit channels, kr=kl=2, ki=ko=1,
// 512-word FIFOs and FSLs). The testbench plays the processor (DCR writes
// and FSL reads/writes) and the external stream source and sink.
//
// It replays the hardware module switching procedure:
//   1  IOM -> filter A (PRR1) -> IOM: p0->c1 on right channel 0 and p1->c0
//      on left channel 0; PRR2 held in reset with its clock off.
//   2  filter A sends monitoring words on r1 (counted).
//   3  PRR2 is brought up (clock, reset release, slice macros), filter B is
//      told to wait for its state (CMD_LOAD) so it does not start early.
//   4  p0 is rerouted from c1 to c2 (SW2 first, then SW1 in one write) and
//      filter A is told to drain (CMD_DRAIN).
//   5/6 filter A emits end of stream toward the IOM and its state on r1.
//   7  the processor forwards the state to filter B over t2.
//   8  the IOM reports end of stream on r0.
//   9  p2 is routed to c0 and its FIFO_ren set.
// The external sink stalls in long stretches so the early-full feedback must
// hold back the producers (counted); PRR1's clock is switched from slow to
// fast mid-stream. Checks: every input word produces exactly one output, in
// order; outputs before the switch point m equal x[n]+x[n-1] (filter A),
// from m on x[n]-x[n-1] (filter B) with x[m-1] carried over by the state
// transfer; m equals filter A's saved sample count and the IOM's word count;
// no consumer ever drops a word; each mechanism happened at least once.
module tb_vapres_top;
  import vapres_pkg::*;
  localparam int NS = 3, W = 32, N = 3000;

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

  always #5 clk  = ~clk;   // static region, 100 MHz
  always #4 fast = ~fast;  // fast global clock
  always #9 slow = ~slow;  // slow global clock

  vapres_top dut (
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

  initial begin
    #3000000; failures++; $display("FAIL: watchdog in=%0d out=%0d st=%0d iom=%0d", n_in, n_out, st_a.size(), iom_msg.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // ---------------- processor model ----------------
  logic [2:0] sel [NS][5];
  logic [7:0] ctl [NS];
  localparam logic [7:0] SM = 8'h01, PRST = 8'h02, FRST = 8'h04, LRST = 8'h08,
                         WEN = 8'h10, REN = 8'h20, CEN = 8'h40, CSEL = 8'h80;

  task automatic push(input int s);
    logic [23:0] m;
    m = '0;
    for (int o = 0; o < 5; o++) m[o*3 +: 3] = sel[s][o];
    @(negedge clk);
    dcr_abus = 10'(s); dcr_din = {m, ctl[s]}; dcr_write = 1;
    @(negedge clk);
    dcr_write = 0;
  endtask

  task automatic fsl_send(input int s, input logic c, input logic [W-1:0] d);
    @(negedge clk);
    while (fsl_t_full[s]) @(negedge clk);
    fsl_t_write[s] = 1; fsl_t_ctrl[s] = c; fsl_t_data[s] = d;
    @(negedge clk);
    fsl_t_write[s] = 0;
  endtask

  // FSL receive side: messages sorted per slot
  int mon [NS];
  logic [W-1:0] st_a[$], iom_msg[$];
  always @(negedge clk) begin
    for (int s = 0; s < NS; s++) begin
      fsl_r_read[s] <= 0;
      if (!rst && fsl_r_exists[s]) begin
        fsl_r_read[s] <= 1;
        if (s == 0) iom_msg.push_back(fsl_r_data[s]);
        else if (!fsl_r_ctrl[s]) mon[s]++;
        else if (s == 1) st_a.push_back(fsl_r_data[s]);
      end
    end
  end

  // ---------------- external stream ----------------
  function automatic logic [W-1:0] xval(input int k);
    return 32'(k) * 32'd40503 + 32'd17;
  endfunction

  // Everything on the IOM side changes at the falling edge of the IOM clock
  // and is sampled by the design at the next rising edge, so a transfer is
  // counted one falling edge after it was offered.
  int n_in, n_out;
  logic [W-1:0] outs [N];
  logic in_r_q, out_v_q;
  logic [W-1:0] out_d_q;
  always @(negedge dut.mclk[0]) begin
    if (in_v && in_r_q) n_in++;
    if (out_v_q && out_r) begin
      if (n_out < N) outs[n_out] = out_d_q;
      n_out++;
    end
    in_r_q  = in_r;
    out_v_q = out_v;
    out_d_q = out_d;
    in_v  = (n_in < N) && ($urandom_range(0, 3) != 0);
    in_d  = xval(n_in);
    // long stalls of the sink make the fabric back up
    out_r = (($time / 12000) % 3 != 0) && ($urandom_range(0, 4) != 0);
  end

  // ---------------- mechanism counters ----------------
  int n_fb_stall, n_ovf, n_clk_switch, n_reroute;
  for (genvar s = 0; s < NS; s++) begin : g_cnt
    always @(posedge clk) begin
      if (!rst && dut.u_rsb.g_slot[s].g_prod[0].u_prod.remote_full &&
          !dut.u_rsb.g_slot[s].g_prod[0].u_prod.empty) n_fb_stall++;
      if (!rst && c_overflow[s][0]) n_ovf++;
    end
  end

  initial begin
    int m;
    logic [W-1:0] xa;
    for (int s = 0; s < NS; s++) begin
      fsl_t_write[s] = 0; fsl_t_ctrl[s] = 0; fsl_t_data[s] = '0; fsl_r_read[s] = 0;
      ctl[s] = '0; mon[s] = 0;
      for (int o = 0; o < 5; o++) sel[s][o] = 0;
    end
    n_in = 0; n_out = 0; n_fb_stall = 0; n_ovf = 0; n_clk_switch = 0; n_reroute = 0;
    #1 rst = 1;
    repeat (5) @(posedge clk);
    rst = 0;
    // step 1: p0 -> c1 (right channel 0), p1 -> c0 (left channel 0)
    sel[0][0] = 5;  sel[1][4] = 1;
    sel[1][2] = 5;  sel[0][4] = 3;
    ctl[0] = SM | WEN | REN | CEN | CSEL;
    ctl[1] = SM | WEN | REN | CEN;              // PRR1 on the slow clock
    ctl[2] = PRST;                              // PRR2 not loaded yet
    for (int s = 0; s < NS; s++) push(s);
    // step 2: let filter A run; switch its clock to fast on the way
    wait (n_out >= 600);
    ctl[1] |= CSEL; push(1); n_clk_switch++;
    wait (n_out >= 1000);
    // step 3: PRR2 comes up with filter B, which waits for its state
    ctl[2] = PRST | CEN | CSEL; push(2);
    repeat (4) @(posedge clk);
    ctl[2] = SM | WEN | CEN | CSEL; push(2);
    fsl_send(2, 1, {CMD_LOAD, 28'h0});
    // step 4: reroute p0 to c2 and ask filter A to drain
    sel[2][4] = 1; push(2);                     // c2 <- right channel 0
    sel[1][0] = 1; sel[1][4] = 0; push(1);      // SW1 passes right channel 0 on
    n_reroute++;
    fsl_send(1, 1, {CMD_DRAIN, 28'h0});
    // steps 5-7: filter A's state goes to filter B
    wait (st_a.size() == 2);
    fsl_send(2, 0, st_a[0]);
    fsl_send(2, 0, st_a[1]);
    // step 8: the IOM has seen end of stream
    wait (iom_msg.size() == 1);
    // step 9: p2 -> c0 on left channel 0
    sel[2][2] = 5; ctl[2] |= REN; push(2);
    sel[1][2] = 3; ctl[1] &= ~REN; push(1);
    n_reroute++;
    wait (n_out >= N);
    repeat (200) @(posedge clk);

    // ---------------- checks ----------------
    check(n_out == N, $sformatf("%0d outputs for %0d inputs", n_out, N));
    m = 0;
    while (m < N && outs[m] == xval(m) + (m == 0 ? 0 : xval(m - 1))) m++;
    check(m > 1000 && m < N, $sformatf("switch point %0d", m));
    for (int k = m; k < N; k++)
      if (outs[k] != xval(k) - xval(k - 1)) begin
        check(0, $sformatf("output %0d is %h, expected filter B %h", k, outs[k], xval(k) - xval(k - 1)));
        break;
      end
    check(1, "outputs follow filter A then filter B");
    check(st_a.size() == 2 && st_a[1] == 32'(m), $sformatf("filter A saved count %0d, switch at %0d", st_a[1], m));
    xa = xval(m - 1);
    check(st_a[0] == xa, "filter A saved x[m-1]");
    check(iom_msg.size() == 1 && iom_msg[0] == {IOM_EOS_MSG[31:16], 16'(m)},
          $sformatf("IOM end-of-stream message %h", iom_msg[0]));
    check(mon[1] > 0, $sformatf("filter A monitoring words: %0d", mon[1]));
    check(mon[2] > 0, $sformatf("filter B monitoring words: %0d", mon[2]));
    check(n_fb_stall > 0, $sformatf("early-full feedback stalls: %0d", n_fb_stall));
    check(n_ovf == 0, $sformatf("dropped words: %0d", n_ovf));
    check(n_clk_switch == 1 && n_reroute == 2, "clock switch and two reroutes done");
    $display("mechanisms: feedback stalls=%0d monitor A=%0d B=%0d reroutes=%0d clock switches=%0d state words=%0d eos messages=%0d switch point=%0d",
             n_fb_stall, mon[1], mon[2], n_reroute, n_clk_switch, st_a.size(), iom_msg.size(), m);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
