// tb_prsocket: self-checking test of the PRSocket DCR. Writes random values
// to its own address and to other addresses, and checks the decoded control
// fields bit by bit against the published layout (bit 0 SM_en ... bit 7
// CLK_sel, bits 31..8 MUX_sel), the read-back value, the acknowledge one
// clock after an addressed access, and that foreign addresses leave it alone.
module tb_prsocket;
  import vapres_pkg::*;
  localparam logic [9:0] ADDR = 10'h025;
  logic clk = 0, rst = 1;
  logic dcr_read = 0, dcr_write = 0, ack;
  logic [9:0] abus = '0;
  logic [31:0] din = '0, dout, shadow;
  dcr_t ctrl;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  prsocket #(.AW(10), .ADDR(ADDR)) dut (
    .clk(clk), .rst(rst), .dcr_read(dcr_read), .dcr_write(dcr_write), .dcr_abus(abus),
    .dcr_dbus_in(din), .dcr_dbus_out(dout), .dcr_ack(ack), .ctrl(ctrl));

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic check_fields(input logic [31:0] v);
    check(ctrl.sm_en      == v[0], "SM_en is bit 0");
    check(ctrl.prr_reset  == v[1], "PRR_reset is bit 1");
    check(ctrl.fifo_reset == v[2], "FIFO_reset is bit 2");
    check(ctrl.fsl_reset  == v[3], "FSL_reset is bit 3");
    check(ctrl.fifo_wen   == v[4], "FIFO_wen is bit 4");
    check(ctrl.fifo_ren   == v[5], "FIFO_ren is bit 5");
    check(ctrl.clk_en     == v[6], "CLK_en is bit 6");
    check(ctrl.clk_sel    == v[7], "CLK_sel is bit 7");
    check(ctrl.mux_sel    == v[31:8], "MUX_sel is bits 31..8");
  endtask

  initial begin
    #100000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 0;
    check(32'(ctrl) == 0, "reset value zero");
    shadow = '0;
    for (int n = 0; n < 200; n++) begin
      logic mine;
      logic [31:0] v;
      @(negedge clk);
      mine = ($urandom_range(0, 2) != 0);
      v = $urandom;
      abus = mine ? ADDR : 10'($urandom_range(0, 1023));
      if (abus == ADDR) mine = 1;
      din = v; dcr_write = 1;
      @(negedge clk);
      dcr_write = 0;
      check(ack == mine, "write acknowledge");
      if (mine) shadow = v;
      check_fields(shadow);
      // read back
      abus = ADDR; dcr_read = 1; #1;
      check(dout == shadow, $sformatf("read back %h expected %h", dout, shadow));
      @(negedge clk);
      dcr_read = 0;
      check(ack == 1, "read acknowledge");
      #1 check(dout == 0, "bus released when not read");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
