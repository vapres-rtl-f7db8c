// tb_fsl_link: streams words with random control bits from a 10 ns master
// to a 16 ns slave with random stalls on both sides, and checks data,
// control bit and order at the slave; also checks that FSL_M_Full stops the
// master after DEPTH words and that reset empties the link.
module tb_fsl_link;
  localparam int W = 32, DEPTH = 32;
  logic rst = 1, mclk = 0, sclk = 0;
  logic mw = 0, mc = 0, mfull, sr = 0, sc, sex;
  logic [W-1:0] md = '0, sd;
  logic [W:0] q[$];
  int checks = 0, failures = 0;

  always #5 mclk = ~mclk;
  always #8 sclk = ~sclk;

  fsl_link #(.W(W), .DEPTH(DEPTH)) dut (
    .rst(rst), .FSL_M_Clk(mclk), .FSL_M_Write(mw), .FSL_M_Data(md), .FSL_M_Control(mc),
    .FSL_M_Full(mfull), .FSL_S_Clk(sclk), .FSL_S_Read(sr), .FSL_S_Data(sd),
    .FSL_S_Control(sc), .FSL_S_Exists(sex));

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #200000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int n;
    repeat (3) @(posedge sclk);
    rst = 0;
    // fill until full
    n = 0;
    while (n < DEPTH + 5) begin
      @(negedge mclk);
      mw = 1; md = $urandom; mc = 1'($urandom);
      if (!mfull) q.push_back({mc, md});
      n++;
      @(posedge mclk); #1;
    end
    mw = 0;
    check(q.size() == DEPTH, "master stopped by full after DEPTH words");
    // stream with stalls
    fork
      begin
        for (int i = 0; i < 300; i++) begin
          @(negedge mclk);
          mw = 1'($urandom); md = $urandom; mc = 1'($urandom);
          if (mw && !mfull) q.push_back({mc, md});
          @(posedge mclk); #1;
        end
        mw = 0;
      end
      begin
        for (int i = 0; i < 500; i++) begin
          @(negedge sclk);
          sr = 0;
          if (sex && $urandom_range(0, 3) != 0) begin
            logic [W:0] e;
            e = q.pop_front();
            check({sc, sd} == e, $sformatf("got %b/%h expected %h", sc, sd, e));
            sr = 1;
          end
          @(posedge sclk); #1;
        end
        sr = 0;
      end
    join
    check(q.size() == 0, "all words delivered");
    // reset clears
    @(negedge mclk); mw = 1; md = 32'h1234; @(negedge mclk); mw = 0;
    repeat (5) @(posedge sclk);
    check(sex, "word visible");
    rst = 1; repeat (2) @(posedge sclk); rst = 0; #1;
    check(!sex, "reset empties the link");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
