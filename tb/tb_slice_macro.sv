// tb_slice_macro: checks that the slice macro passes every bit while enabled
// and forces every bit to zero while disabled, for random data.
module tb_slice_macro;
  localparam int W = 40;
  logic en;
  logic [W-1:0] a, y;
  int checks = 0, failures = 0;

  slice_macro #(.W(W)) dut (.en(en), .from_prr(a), .to_static(y));

  initial begin
    #100000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int n = 0; n < 500; n++) begin
      en = 1'($urandom);
      a = {8'($urandom), 32'($urandom)};
      #1;
      checks++;
      if (y !== (en ? a : '0)) begin
        failures++; $display("FAIL: en=%b a=%h y=%h", en, a, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
