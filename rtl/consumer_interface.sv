// consumer_interface: switch-to-module side of a VAPRES module interface.
//
// The extended word arriving from the switch box ({valid, data}) is first
// captured in a register clocked by the switch clock. Its MSB, ANDed with the
// PRSocket's FIFO_wen bit, writes the W data bits into an asynchronous FIFO
// that the hardware module reads in its own clock domain
// (first-word-fall-through: mod_data is valid while mod_empty is low).
// A word that arrives while the FIFO is full is dropped and flagged on
// overflow for one switch clock.
//
// To keep that from happening, remote_full is raised early: when the free
// space seen by the writer falls to FULL_FREE = 2*MAX_HOPS + 6 words. Words
// already travelling on the channel when the flag goes up (one register per
// switch box forward, one per switch box backward, plus the interface
// registers) then still fit. MAX_HOPS is the largest number of switch boxes
// a channel can cross; the fixed 6 covers the input register, the producer's
// combinational read, the registered FIFO flag and margin. The published rule
// ties the threshold to the FIFO size N and hop count d; this design uses the
// worst-case d of the block so that the threshold does not depend on the
// route.
module consumer_interface #(
  parameter int unsigned W        = 32,
  parameter int unsigned DEPTH    = 512,
  parameter int unsigned MAX_HOPS = 3
) (
  input  logic         rst,          // global or FIFO_reset, asynchronous
  // switch side (switch clock)
  input  logic         sw_clk,
  input  logic         fifo_wen,     // PRSocket DCR FIFO_wen
  input  logic [W:0]   ch_in,        // {valid, data} from the switch box
  output logic         remote_full,  // feedback toward the producer
  output logic         overflow,     // a valid word was dropped (FIFO full)
  // module side (module clock)
  input  logic         mod_clk,
  input  logic         mod_rd_en,
  output logic [W-1:0] mod_data,
  output logic         mod_empty
);
  localparam int unsigned FULL_FREE = 2 * MAX_HOPS + 6;

  logic [W:0] in_q;
  logic       full;

  always_ff @(posedge sw_clk or posedge rst) begin
    if (rst) in_q <= '0;
    else     in_q <= ch_in;
  end

  assign overflow = in_q[W] && fifo_wen && full;

  async_fifo #(.W(W), .DEPTH(DEPTH), .PROG_FULL_FREE(FULL_FREE)) u_fifo (
    .rst          (rst),
    .wr_clk       (sw_clk),
    .wr_en        (in_q[W] && fifo_wen),
    .wr_data      (in_q[W-1:0]),
    .wr_full      (full),
    .wr_prog_full (remote_full),
    .wr_count     (),
    .rd_clk       (mod_clk),
    .rd_en        (mod_rd_en),
    .rd_data      (mod_data),
    .rd_empty     (mod_empty)
  );
endmodule
