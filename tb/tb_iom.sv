// tb_iom: the I/O module with simple FIFO models on its ports.
// Input side: random external offers against a producer port that is
// randomly full; every accepted word must reach the producer port in order.
// Output side: a consumer FIFO model holds a data stream with end-of-stream
// words inserted; the external output must show exactly the data words in
// order, with random ready stalls, and each end-of-stream word must produce
// one FSL message {E05D, words forwarded since the previous one} with the
// control bit set, also when the FSL is temporarily full.
module tb_iom;
  import vapres_pkg::*;
  localparam int W = 32;
  logic clk = 0, rst = 1;
  logic in_v = 0, in_r, out_v, out_r = 0;
  logic [W-1:0] in_d = '0, out_d;
  logic p_we, p_full = 0, c_re, c_empty, r_w, r_c, r_full = 0;
  logic [W-1:0] p_d, c_d, r_d;
  logic [W-1:0] cq[$], exp_out[$], exp_p[$];
  logic [W-1:0] exp_msg[$];
  int checks = 0, failures = 0, msgs = 0;

  always #5 clk = ~clk;

  iom #(.W(W)) dut (
    .clk(clk), .rst(rst), .ext_in_valid(in_v), .ext_in_data(in_d), .ext_in_ready(in_r),
    .ext_out_valid(out_v), .ext_out_data(out_d), .ext_out_ready(out_r),
    .p_wr_en(p_we), .p_data(p_d), .p_full(p_full),
    .c_rd_en(c_re), .c_data(c_d), .c_empty(c_empty),
    .r_write(r_w), .r_data(r_d), .r_ctrl(r_c), .r_full(r_full));

  assign c_empty = (cq.size() == 0);
  assign c_d     = c_empty ? '0 : cq[0];

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #100000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int cnt;
    // consumer stream: three segments separated by end of stream
    cnt = 0;
    for (int seg = 0; seg < 3; seg++) begin
      int len;
      len = 20 + 15 * seg;
      for (int i = 0; i < len; i++) begin
        logic [W-1:0] v;
        v = 32'h0100_0000 * (seg + 1) + 32'(i);
        cq.push_back(v); exp_out.push_back(v);
      end
      cq.push_back(EOS_WORD);
      exp_msg.push_back({IOM_EOS_MSG[31:16], 16'(len)});
    end
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int cyc = 0; cyc < 600; cyc++) begin
      @(negedge clk);
      in_v = 1'($urandom); in_d = $urandom;
      p_full = ($urandom_range(0, 3) == 0);
      out_r = ($urandom_range(0, 2) != 0);
      r_full = ($urandom_range(0, 3) == 0);
      #1;
      check(in_r == !p_full, "ext_in_ready follows producer full");
      if (p_we) begin
        check(in_v && !p_full && p_d == in_d, "producer write carries the offered word");
      end
      if (out_v && out_r) begin
        check(out_d == exp_out.pop_front(), "output word order");
      end
      if (r_w) begin
        check(!r_full && r_c, "message written only when FSL not full, control bit set");
        check(r_d == exp_msg.pop_front(), $sformatf("message %h", r_d));
        msgs++;
      end
      check(out_v == (!c_empty && c_d != EOS_WORD), "end-of-stream word never leaves");
      begin
        logic pop;
        pop = c_re;
        @(posedge clk); #1;
        if (pop) void'(cq.pop_front());
      end
    end
    check(exp_out.size() == 0, "all data words delivered");
    check(msgs == 3, $sformatf("%0d end-of-stream messages", msgs));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
