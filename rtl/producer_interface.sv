// producer_interface: module-to-switch side of a VAPRES module interface.
//
// The hardware module writes W-bit words into an asynchronous FIFO in its own
// clock domain; the switch side reads them in the static (switch) clock
// domain. A word is read only when the PRSocket's FIFO_ren bit is set, the
// FIFO is not empty and the "remote FIFO full" feedback coming back along the
// streaming channel is low. Each word leaves extended by one MSB that marks
// it valid (the negated empty flag, qualified by the read enable), so idle
// cycles carry MSB = 0 and are never written downstream.
//
// Timing: ch_out is combinational from the FIFO head and the read decision;
// the switch box's input register samples it on the next switch clock edge.
// One word per switch clock at most. The FIFO depth (512) and the extension
// scheme follow the published design; first-word-fall-through reading is
// this design's choice.
module producer_interface #(
  parameter int unsigned W     = 32,
  parameter int unsigned DEPTH = 512
) (
  input  logic         rst,          // global or FIFO_reset, asynchronous
  // module side (module clock)
  input  logic         mod_clk,
  input  logic         mod_wr_en,
  input  logic [W-1:0] mod_data,
  output logic         mod_full,
  // switch side (switch clock)
  input  logic         sw_clk,
  input  logic         fifo_ren,     // PRSocket DCR FIFO_ren
  input  logic         remote_full,  // feedback from the consumer
  output logic [W:0]   ch_out        // {valid, data} into the switch box
);
  logic         empty, rd;
  logic [W-1:0] head;

  assign rd     = fifo_ren && !empty && !remote_full;
  assign ch_out = {rd, rd ? head : '0};

  async_fifo #(.W(W), .DEPTH(DEPTH), .PROG_FULL_FREE(1)) u_fifo (
    .rst          (rst),
    .wr_clk       (mod_clk),
    .wr_en        (mod_wr_en),
    .wr_data      (mod_data),
    .wr_full      (mod_full),
    .wr_prog_full (),
    .wr_count     (),
    .rd_clk       (sw_clk),
    .rd_en        (rd),
    .rd_data      (head),
    .rd_empty     (empty)
  );
endmodule
