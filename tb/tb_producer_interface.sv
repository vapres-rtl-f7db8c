// tb_producer_interface: the module side (7 ns clock) writes a numbered
// sequence with random gaps; the switch side (10 ns clock) toggles FIFO_ren
// and the remote-full feedback at random. At every switch clock edge the
// extended word must carry valid = FIFO_ren & !remote_full & data waiting,
// data bits zero when not valid, and the valid words must be the written
// sequence in order with none lost.
module tb_producer_interface;
  localparam int W = 32, DEPTH = 16, N = 300;
  logic rst = 1, mclk = 0, sclk = 0;
  logic wr_en = 0, full, ren = 0, rfull = 0;
  logic [W-1:0] wdata = '0;
  logic [W:0] ch;
  int checks = 0, failures = 0;
  int written = 0, got = 0, stalled = 0;

  always #3.5 mclk = ~mclk;
  always #5   sclk = ~sclk;

  producer_interface #(.W(W), .DEPTH(DEPTH)) dut (
    .rst(rst), .mod_clk(mclk), .mod_wr_en(wr_en), .mod_data(wdata), .mod_full(full),
    .sw_clk(sclk), .fifo_ren(ren), .remote_full(rfull), .ch_out(ch));

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #100000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // module side writer
  initial begin
    repeat (3) @(posedge sclk);
    rst = 0;
    while (written < N) begin
      @(negedge mclk);
      wr_en = 0;
      if ($urandom_range(0, 3) != 0 && !full) begin
        wr_en = 1; wdata = 32'h5000_0000 + 32'(written); written++;
      end
      @(posedge mclk); #0.1;
    end
    @(negedge mclk); wr_en = 0;
  end

  // switch side
  initial begin
    @(negedge rst);
    for (int cyc = 0; cyc < 4000 && got < N; cyc++) begin
      @(negedge sclk);
      ren   = ($urandom_range(0, 9) != 0);
      rfull = ($urandom_range(0, 4) == 0);
      @(posedge sclk);
      #0;
      if (ch[W]) begin
        check(ren && !rfull, "valid only with FIFO_ren and no remote full");
        check(ch[W-1:0] == 32'h5000_0000 + 32'(got), $sformatf("word %0d is %h", got, ch[W-1:0]));
        got++;
      end else begin
        check(ch[W-1:0] == 0, "idle word carries zero data");
        if (!ren || rfull) stalled++;
      end
    end
    check(got == N, $sformatf("received %0d of %0d words", got, N));
    check(stalled > 10, "stalls exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
