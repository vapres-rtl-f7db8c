// tb_consumer_interface: (1) with the module not reading, extended words
// stream in back to back; remote_full must rise when the free space reaches
// 2*MAX_HOPS+6 words (checked within two clocks), exactly DEPTH words are
// stored and the rest are dropped with overflow raised. (2) The module side
// (13 ns clock) drains the FIFO and must see the first DEPTH words in order.
// (3) Random valid bits and FIFO_wen with a reading module: only words whose
// valid bit is set and that leave the input register while FIFO_wen is set
// may arrive, in order.
module tb_consumer_interface;
  localparam int W = 32, DEPTH = 32, MAX_HOPS = 3;
  localparam int FULL_FREE = 2 * MAX_HOPS + 6;
  logic rst = 1, sclk = 0, mclk = 0;
  logic wen = 0, rfull, ovf, rd = 0, empty;
  logic [W:0] ch = '0;
  logic [W-1:0] mdata;
  logic [W-1:0] q[$];
  int checks = 0, failures = 0;

  always #5   sclk = ~sclk;
  always #6.5 mclk = ~mclk;

  consumer_interface #(.W(W), .DEPTH(DEPTH), .MAX_HOPS(MAX_HOPS)) dut (
    .rst(rst), .sw_clk(sclk), .fifo_wen(wen), .ch_in(ch), .remote_full(rfull), .overflow(ovf),
    .mod_clk(mclk), .mod_rd_en(rd), .mod_data(mdata), .mod_empty(empty));

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #200000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int sent, full_at, ovf_seen;
    repeat (3) @(posedge mclk);
    rst = 0;
    // (1) fill
    sent = 0; full_at = -1; ovf_seen = 0;
    wen = 1;
    for (int i = 0; i < DEPTH + 10; i++) begin
      @(negedge sclk);
      ch = {1'b1, 32'hC000_0000 + 32'(i)};
      sent++;
      @(posedge sclk); #0.1;
      if (rfull && full_at < 0) full_at = i;
      if (ovf) ovf_seen++;
    end
    @(negedge sclk); ch = '0;
    repeat (3) @(posedge sclk); #0.1;
    if (ovf) ovf_seen++;
    // word i is written one clock after it is driven (input register)
    check(full_at >= DEPTH - FULL_FREE && full_at <= DEPTH - FULL_FREE + 2,
          $sformatf("remote_full after word %0d, expected about %0d", full_at, DEPTH - FULL_FREE));
    check(ovf_seen == 10, $sformatf("%0d words dropped, expected 10", ovf_seen));
    // (2) drain
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge mclk);
      while (empty) @(negedge mclk);
      check(mdata == 32'hC000_0000 + 32'(i), $sformatf("drain word %0d is %h", i, mdata));
      rd = 1; @(posedge mclk); #0.1; rd = 0;
    end
    repeat (4) @(posedge mclk);
    check(empty, "empty after drain");
    check(!rfull, "remote_full released");
    // (3) random
    fork
      begin
        // FIFO_wen gates the word leaving the input register, i.e. the
        // word driven one clock earlier
        logic [W:0] prev;
        prev = '0;
        for (int i = 0; i < 400; i++) begin
          @(negedge sclk);
          wen = ($urandom_range(0, 5) != 0);
          if (prev[W] && wen) q.push_back(prev[W-1:0]);
          ch = {1'($urandom), 32'($urandom)};
          prev = ch;
        end
        @(negedge sclk); ch = '0; wen = 1;
        if (prev[W]) q.push_back(prev[W-1:0]);
      end
      begin
        for (int i = 0; i < 600; i++) begin
          @(negedge mclk);
          rd = 0;
          if (!empty) begin
            logic [W-1:0] e;
            e = q.pop_front();
            check(mdata == e, $sformatf("random word %h expected %h", mdata, e));
            rd = 1;
          end
          @(posedge mclk); #0.1;
        end
        rd = 0;
      end
    join
    check(q.size() == 0, "all random words delivered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
