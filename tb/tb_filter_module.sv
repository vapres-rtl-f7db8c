// tb_filter_module: the example filter (C0=3, C1=2, MON_PERIOD=8,
// DRAIN_IDLE=4) with FIFO models on its ports and random full flags.
//   1. CMD_LOAD then x[n-1]=100 and count=50 over t: the state is restored.
//   2. 60 samples: every output must be 3*x[n] + 2*x[n-1], in order, with
//      x[-1] = 100; every monitoring word on r (control 0) must be the
//      largest sample since the previous one and cover at least 8 samples.
//   3. CMD_DRAIN with more samples still queued: all are filtered, then, not
//      before 4 idle clocks, the end-of-stream word appears on the producer
//      port, then the state x[n-1] and count=50+N on r with control 1.
//   4. The halted module consumes nothing more.
module tb_filter_module;
  import vapres_pkg::*;
  localparam int W = 32, N1 = 60, N2 = 25;
  logic clk = 0, rst = 1;
  logic c_re, c_empty, p_we, p_full = 0, r_w, r_c, r_full = 0, t_rd, t_c, t_ex;
  logic [W-1:0] c_d, p_d, r_d, t_d;
  logic [W-1:0] cq[$];
  logic [W:0] tq[$];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  filter_module #(.W(W), .C0(3), .C1(2), .MON_PERIOD(8), .DRAIN_IDLE(4)) dut (
    .clk(clk), .rst(rst), .c_rd_en(c_re), .c_data(c_d), .c_empty(c_empty),
    .p_wr_en(p_we), .p_data(p_d), .p_full(p_full),
    .r_write(r_w), .r_data(r_d), .r_ctrl(r_c), .r_full(r_full),
    .t_read(t_rd), .t_data(t_d), .t_ctrl(t_c), .t_exists(t_ex));

  assign c_empty = (cq.size() == 0);
  assign c_d     = c_empty ? '0 : cq[0];
  assign t_ex    = (tq.size() != 0);
  assign {t_c, t_d} = t_ex ? tq[0] : '0;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #100000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  logic [W-1:0] prev, mp;
  int mn, outs, mons, idle, states, eos_seen, consumed;
  logic [W-1:0] st[$];

  // per-cycle scoreboard, evaluated between clock edges
  task automatic step(input bit rnd);
    bit pop_c, pop_t;
    @(negedge clk);
    p_full = rnd && ($urandom_range(0, 3) == 0);
    r_full = rnd && ($urandom_range(0, 3) == 0);
    #1;
    if (c_re) begin
      check(!c_empty && !p_full && p_we, "pop and push together");
      check(p_d == 3 * c_d + 2 * prev, $sformatf("y=%h for x=%h prev=%h", p_d, c_d, prev));
      outs++; consumed++;
    end
    if (p_we && !c_re) begin
      check(p_d == EOS_WORD && !p_full, "only the end-of-stream word is pushed without a sample");
      check(idle >= 4, $sformatf("end of stream after %0d idle clocks", idle));
      eos_seen++;
    end
    idle = c_empty ? idle + 1 : 0;
    if (r_w) begin
      check(!r_full, "no FSL write while full");
      if (!r_c) begin
        check(r_d == mp && mn >= 8, $sformatf("monitor %h expected %h over %0d samples", r_d, mp, mn));
        mons++;
        mp = c_re ? c_d : '0; mn = c_re ? 1 : 0;
      end else begin
        check(eos_seen == 1, "state saved after the end-of-stream word");
        st.push_back(r_d); states++;
      end
    end else if (c_re) begin
      if (c_d > mp) mp = c_d;
      mn++;
    end
    if (c_re) prev = c_d;
    pop_c = c_re; pop_t = t_rd;
    @(posedge clk); #1;
    if (pop_c) void'(cq.pop_front());
    if (pop_t) void'(tq.pop_front());
  endtask

  initial begin
    prev = 100; mp = 0; mn = 0; outs = 0; mons = 0; idle = 0; states = 0; eos_seen = 0;
    consumed = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    tq.push_back({1'b1, CMD_LOAD, 28'h0});
    tq.push_back({1'b0, 32'd100});
    tq.push_back({1'b0, 32'd50});
    repeat (6) step(0);
    check(tq.size() == 0, "state words taken");
    for (int i = 0; i < N1; i++) cq.push_back($urandom_range(0, 1 << 20));
    while (cq.size() != 0) step(1);
    check(outs == N1, "first batch filtered");
    check(mons >= 5, $sformatf("%0d monitoring words", mons));
    for (int i = 0; i < N2; i++) cq.push_back($urandom_range(0, 1 << 20));
    tq.push_back({1'b1, CMD_DRAIN, 28'h0});
    for (int i = 0; i < 200 && states < 2; i++) step(1);
    check(outs == N1 + N2, "drained samples filtered");
    check(eos_seen == 1, "one end-of-stream word");
    check(states == 2, "two state words");
    if (states == 2) begin
      check(st[0] == prev, "saved x[n-1]");
      check(st[1] == 32'(50 + N1 + N2), $sformatf("saved count %0d", st[1]));
    end
    for (int i = 0; i < 5; i++) cq.push_back(32'(i));
    repeat (20) step(0);
    check(cq.size() == 5, "halted module consumes nothing");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
