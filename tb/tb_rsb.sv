// tb_rsb: a three-slot reconfigurable streaming block (prototype sizes,
// 64-word FIFOs) with traffic sources and sinks standing in for modules.
// Software actions go through the DCR bus as a processor would.
//   - Channels: slot 0 -> slot 2 on right channel 0 (three switch boxes),
//     slot 2 -> slot 0 on left channel 1, slot 1 -> slot 1 through its own
//     switch box. Every word must arrive once and in order; each sink stalls
//     for long stretches so the early-full feedback must stop the producer
//     (counted), and no consumer may ever drop a word.
//   - Local clocks: slots 0 and 2 on the fast clock, slot 1 on the slow one;
//     the measured module clock periods are checked.
//   - Slice macros: while slot 2's SM_en is clear its module writes must not
//     reach the fabric; after setting it they must.
//   - FSLs: words written by the processor on t reach the module and words
//     written by the module on r reach the processor, in both directions.
//   - Minimum latency of a 3-switch-box channel is measured from the
//     producer's read to the consumer's FIFO write.
module tb_rsb;
  import vapres_pkg::*;
  localparam int NS = 3, W = 32, KR = 2, KL = 2, KI = 1, KO = 1, D = 64, NW = 600;
  localparam int SELW = 3;

  logic clk = 0, fast = 0, slow = 0, rst = 0;
  logic dcr_read = 0, dcr_write = 0, dcr_ack;
  logic [9:0] dcr_abus = '0;
  logic [31:0] dcr_din = '0, dcr_dout;
  logic pr_read [NS], pr_ctrl [NS], pr_exists [NS], pt_write [NS], pt_ctrl [NS], pt_full [NS];
  logic [W-1:0] pr_data [NS], pt_data [NS];
  logic mclk [NS], mrst [NS];
  logic m_p_wr_en [NS][KO], m_p_full [NS][KO], m_c_rd_en [NS][KI], m_c_empty [NS][KI];
  logic [W-1:0] m_p_data [NS][KO], m_c_data [NS][KI];
  logic m_r_write [NS], m_r_ctrl [NS], m_r_full [NS], m_t_read [NS], m_t_ctrl [NS], m_t_exists [NS];
  logic [W-1:0] m_r_data [NS], m_t_data [NS];
  logic c_overflow [NS][KI];
  int checks = 0, failures = 0;

  always #5 clk  = ~clk;    // 100 MHz static clock
  always #4 fast = ~fast;   // 125 MHz
  always #9 slow = ~slow;   // ~55 MHz

  rsb #(.N_SLOTS(NS), .N_IOM(1), .W(W), .KR(KR), .KL(KL), .KI(KI), .KO(KO),
        .FIFO_DEPTH(D), .FSL_DEPTH(16)) dut (
    .clk(clk), .clk_fast(fast), .clk_slow(slow), .rst(rst),
    .dcr_read(dcr_read), .dcr_write(dcr_write), .dcr_abus(dcr_abus), .dcr_dbus_in(dcr_din),
    .dcr_dbus_out(dcr_dout), .dcr_ack(dcr_ack),
    .pr_read(pr_read), .pr_data(pr_data), .pr_ctrl(pr_ctrl), .pr_exists(pr_exists),
    .pt_write(pt_write), .pt_data(pt_data), .pt_ctrl(pt_ctrl), .pt_full(pt_full),
    .mclk(mclk), .mrst(mrst),
    .m_p_wr_en(m_p_wr_en), .m_p_data(m_p_data), .m_p_full(m_p_full),
    .m_c_rd_en(m_c_rd_en), .m_c_data(m_c_data), .m_c_empty(m_c_empty),
    .m_r_write(m_r_write), .m_r_data(m_r_data), .m_r_ctrl(m_r_ctrl), .m_r_full(m_r_full),
    .m_t_read(m_t_read), .m_t_data(m_t_data), .m_t_ctrl(m_t_ctrl), .m_t_exists(m_t_exists),
    .c_overflow(c_overflow));

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #2000000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // ---------------- processor model ----------------
  logic [2:0] sel [NS][5];
  logic [7:0] ctl [NS];

  task automatic dcr_wr(input int slot, input logic [31:0] v);
    @(negedge clk);
    dcr_abus = 10'(slot); dcr_din = v; dcr_write = 1;
    @(negedge clk);
    dcr_write = 0;
    check(dcr_ack, "DCR write acknowledged");
  endtask

  task automatic dcr_rd(input int slot, output logic [31:0] v);
    @(negedge clk);
    dcr_abus = 10'(slot); dcr_read = 1; #1 v = dcr_dout;
    @(negedge clk);
    dcr_read = 0;
  endtask

  function automatic logic [31:0] word(input int s);
    logic [23:0] m;
    m = '0;
    for (int o = 0; o < 5; o++) m[o*SELW +: SELW] = sel[s][o];
    return {m, ctl[s]};
  endfunction

  task automatic push(input int s);
    logic [31:0] rb;
    dcr_wr(s, word(s));
    dcr_rd(s, rb);
    check(rb == word(s), $sformatf("slot %0d DCR read back %h", s, rb));
  endtask

  // ---------------- module models ----------------
  int sent [NS], rcvd [NS], src_of [NS], stalls_seen, ovf;
  bit run_src [NS], run_snk [NS];

  for (genvar s = 0; s < NS; s++) begin : g_mod
    // source: numbered words tagged with the slot
    always @(negedge mclk[s]) begin
      m_p_wr_en[s][0] <= 0;
      if (run_src[s] && !m_p_full[s][0] && sent[s] < NW && $urandom_range(0, 3) != 0) begin
        m_p_wr_en[s][0] <= 1;
        m_p_data[s][0]  <= {8'(s), 24'(sent[s])};
        sent[s] <= sent[s] + 1;
      end
    end
    // sink: checks order; stalls in long stretches
    always @(negedge mclk[s]) begin
      m_c_rd_en[s][0] <= 0;
      if (run_snk[s] && !m_c_empty[s][0] && (($time / 4000) % 2 == 0) && $urandom_range(0, 1) == 0) begin
        checks++;
        if (m_c_data[s][0] !== {8'(src_of[s]), 24'(rcvd[s])}) begin
          failures++;
          $display("FAIL: slot %0d got %h expected word %0d of slot %0d", s, m_c_data[s][0], rcvd[s], src_of[s]);
        end
        m_c_rd_en[s][0] <= 1;
        rcvd[s] <= rcvd[s] + 1;
      end
    end
    always @(posedge clk) if (!rst && c_overflow[s][0]) ovf++;
  end
  // early-full feedback reaching a producer while it has data
  for (genvar s = 0; s < NS; s++) begin : g_stall
    always @(posedge clk)
      if (!rst && dut.g_slot[s].g_prod[0].u_prod.remote_full && !dut.g_slot[s].g_prod[0].u_prod.empty)
        stalls_seen++;
  end

  // clock period measurement
  realtime t_last [NS], per [NS];
  for (genvar s = 0; s < NS; s++) begin : g_per
    always @(posedge mclk[s]) begin per[s] = $realtime - t_last[s]; t_last[s] = $realtime; end
  end

  task automatic fsl_test(input int ss);
      fork
        begin
          for (int i = 0; i < 10; i++) begin
            @(negedge clk);
            while (pt_full[ss]) @(negedge clk);
            pt_write[ss] = 1; pt_data[ss] = 32'hF000_0000 + 32'(ss * 100 + i); pt_ctrl[ss] = 1'(i);
            @(negedge clk); pt_write[ss] = 0;
          end
        end
        begin
          for (int i = 0; i < 10; i++) begin
            @(negedge mclk[ss]);
            while (!m_t_exists[ss]) @(negedge mclk[ss]);
            check(m_t_data[ss] == 32'hF000_0000 + 32'(ss * 100 + i) && m_t_ctrl[ss] == 1'(i),
                  "FSL t word at the module");
            m_t_read[ss] = 1; @(negedge mclk[ss]); m_t_read[ss] = 0;
          end
        end
        begin
          for (int i = 0; i < 10; i++) begin
            @(negedge mclk[ss]);
            while (m_r_full[ss]) @(negedge mclk[ss]);
            m_r_write[ss] = 1; m_r_data[ss] = 32'hB000_0000 + 32'(ss * 100 + i); m_r_ctrl[ss] = 1'(~i);
            @(negedge mclk[ss]); m_r_write[ss] = 0;
          end
        end
        begin
          for (int i = 0; i < 10; i++) begin
            @(negedge clk);
            while (!pr_exists[ss]) @(negedge clk);
            check(pr_data[ss] == 32'hB000_0000 + 32'(ss * 100 + i) && pr_ctrl[ss] == 1'(~i),
                  "FSL r word at the processor");
            pr_read[ss] = 1; @(negedge clk); pr_read[ss] = 0;
          end
        end
      join
  endtask

  initial begin
    logic [31:0] rb;
    int lat;
    for (int s = 0; s < NS; s++) begin
      pr_read[s] = 0; pt_write[s] = 0; pt_ctrl[s] = 0; pt_data[s] = '0;
      m_r_write[s] = 0; m_r_ctrl[s] = 0; m_r_data[s] = '0; m_t_read[s] = 0;
      m_p_wr_en[s][0] = 0; m_p_data[s][0] = '0; m_c_rd_en[s][0] = 0;
      sent[s] = 0; rcvd[s] = 0; run_src[s] = 0; run_snk[s] = 0;
      ctl[s] = '0;
      for (int o = 0; o < 5; o++) sel[s][o] = '0;
    end
    stalls_seen = 0; ovf = 0;
    #1 rst = 1;   // an edge, so that flops on gated module clocks reset too
    repeat (5) @(posedge clk);
    rst = 0;
    // routes: 0 -> 2 on right channel 0; 2 -> 0 on left channel 1; 1 -> 1
    sel[0][0] = 5;            // producer 0 onto right channel 0
    sel[1][0] = 1;            // pass right channel 0
    sel[2][4] = 1;            // right channel 0 into consumer 2
    sel[2][3] = 5;            // producer 2 onto left channel 1
    sel[1][3] = 4;            // pass left channel 1
    sel[0][4] = 4;            // left channel 1 into consumer 0
    sel[1][4] = 5;            // producer 1 into consumer 1
    src_of[0] = 2; src_of[1] = 1; src_of[2] = 0;
    // SM_en=b0 PRR_reset=b1 FIFO_reset=b2 FSL_reset=b3 wen=b4 ren=b5 clk_en=b6 clk_sel=b7
    ctl[0] = 8'b1111_0001;     // fast clock
    ctl[1] = 8'b0111_0001;     // slow clock
    ctl[2] = 8'b1111_0000;     // fast clock, slice macros closed
    for (int s = 0; s < NS; s++) push(s);
    #300;
    check(per[0] == 8.0 && per[2] == 8.0, "fast module clocks");
    check(per[1] == 18.0, $sformatf("slow module clock %0t", per[1]));
    // slice macros closed on slot 2: its writes must not arrive at slot 0
    run_src[2] = 1;
    #2000;
    check(sent[2] > 50, "slot 2 source active");
    check(dut.g_slot[2].g_prod[0].u_prod.empty, "closed slice macros block writes");
    run_src[2] = 0;
    #100;
    sent[2] = 0;
    ctl[2][0] = 1;
    push(2);
    // latency: first word of slot 0 to slot 2's consumer FIFO write
    run_src[0] = 1;
    @(posedge clk iff dut.g_slot[0].g_prod[0].u_prod.rd);
    lat = 0;
    while (!(dut.g_slot[2].g_cons[0].u_cons.in_q[W] && dut.g_slot[2].g_cons[0].u_cons.fifo_wen)) begin
      @(posedge clk); lat++;
    end
    check(lat == 4, $sformatf("3-switch-box channel latency %0d clocks", lat));
    for (int s = 0; s < NS; s++) begin run_src[s] = 1; run_snk[s] = 1; end
    // FSL traffic, both directions, meanwhile
    for (int s = 0; s < NS; s++) fsl_test(s);
    wait (rcvd[0] == NW && rcvd[1] == NW && rcvd[2] == NW);
    check(1, "all words received");
    check(stalls_seen > 0, $sformatf("early-full feedback stalled producers %0d times", stalls_seen));
    check(ovf == 0, $sformatf("%0d words dropped", ovf));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
