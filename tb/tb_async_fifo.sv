// tb_async_fifo: self-checking test of the dual-clock FIFO.
// Writer at 10 ns, reader at 14 ns. Phase 1 fills the FIFO without reading
// and checks that exactly DEPTH words are accepted and that prog_full and
// full are raised; phase 2 drains it and checks order and empty; phase 3
// runs random writes and reads against a reference queue.
module tb_async_fifo;
  localparam int W = 16, DEPTH = 16, PFF = 4;
  logic rst = 1, wclk = 0, rclk = 0;
  logic wr_en = 0, rd_en = 0, full, pfull, empty;
  logic [W-1:0] wdata = '0, rdata;
  logic [$clog2(DEPTH):0] wcount;
  int checks = 0, failures = 0;
  logic [W-1:0] q[$];

  always #5 wclk = ~wclk;
  always #7 rclk = ~rclk;

  async_fifo #(.W(W), .DEPTH(DEPTH), .PROG_FULL_FREE(PFF)) dut (
    .rst(rst), .wr_clk(wclk), .wr_en(wr_en), .wr_data(wdata), .wr_full(full),
    .wr_prog_full(pfull), .wr_count(wcount),
    .rd_clk(rclk), .rd_en(rd_en), .rd_data(rdata), .rd_empty(empty));

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #200000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int accepted;
    accepted = 0;
    repeat (4) @(posedge wclk);
    rst = 0;
    repeat (4) @(posedge rclk);
    check(empty, "empty after reset");
    // phase 1: fill
    for (int i = 0; i < DEPTH + 4; i++) begin
      @(negedge wclk);
      wr_en = 1; wdata = W'(i * 3 + 1);
      if (!full) begin q.push_back(wdata); accepted++; end
      @(posedge wclk); #1;
    end
    @(negedge wclk); wr_en = 0;
    check(accepted == DEPTH, $sformatf("accepted %0d words, expected %0d", accepted, DEPTH));
    check(full, "full after filling");
    check(pfull, "prog_full after filling");
    check(wcount == DEPTH, "write count at depth");
    // phase 2: drain
    repeat (6) @(posedge rclk);
    while (q.size() > 0) begin
      @(negedge rclk);
      if (!empty) begin
        logic [W-1:0] e;
        e = q.pop_front();
        check(rdata == e, $sformatf("drain data %h expected %h", rdata, e));
        rd_en = 1;
      end else rd_en = 0;
      @(posedge rclk); #1; rd_en = 0;
    end
    repeat (4) @(posedge rclk);
    check(empty, "empty after draining");
    repeat (6) @(posedge wclk);
    check(!pfull && !full, "flags clear after draining");
    // phase 3: random traffic
    fork
      begin
        for (int i = 0; i < 400; i++) begin
          @(negedge wclk);
          wr_en = ($urandom_range(0, 2) != 0);
          wdata = W'($urandom);
          if (wr_en && !full) q.push_back(wdata);
          @(posedge wclk); #1;
        end
        @(negedge wclk); wr_en = 0;
      end
      begin
        int got;
        got = 0;
        for (int i = 0; i < 700; i++) begin
          @(negedge rclk);
          rd_en = 0;
          if (!empty && $urandom_range(0, 3) != 0) begin
            if (q.size() == 0) check(0, "read with empty model");
            else begin
              logic [W-1:0] e;
              e = q.pop_front();
              check(rdata == e, $sformatf("random data %h expected %h", rdata, e));
            end
            rd_en = 1; got++;
          end
          @(posedge rclk); #1;
        end
        rd_en = 0;
        check(got > 200, "random phase moved data");
      end
    join
    check(q.size() == 0, "all random words read");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
