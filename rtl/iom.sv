// iom: I/O module of a reconfigurable streaming block.
//
// Connects external streaming pins to the block's inter-module
// communication. Input side: words offered on ext_in (valid/ready) are
// written into the IOM's producer interface; ext_in_ready is the negated
// producer FIFO full. Output side: words from the IOM's consumer interface
// (first-word-fall-through) are passed to ext_out (valid/ready). The
// end-of-stream word EOS_WORD (1010...10) is not passed on: the IOM pops it
// and writes a completion message to the processor over its FSL link instead
// (control bit set, {IOM_EOS_MSG[31:16], number of words forwarded since the
// previous end of stream}), waiting while that link is full.
//
// Everything runs in the IOM's own clock (its PRSocket clock). Throughput is
// one word per clock in each direction; there is no added latency beyond the
// FIFOs. Detecting end of stream and reporting it over the FSL follow the
// published switching procedure; the message format is this design's own.
module iom
  import vapres_pkg::*;
#(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst,
  // external input stream
  input  logic         ext_in_valid,
  input  logic [W-1:0] ext_in_data,
  output logic         ext_in_ready,
  // external output stream
  output logic         ext_out_valid,
  output logic [W-1:0] ext_out_data,
  input  logic         ext_out_ready,
  // producer interface port
  output logic         p_wr_en,
  output logic [W-1:0] p_data,
  input  logic         p_full,
  // consumer interface port
  output logic         c_rd_en,
  input  logic [W-1:0] c_data,
  input  logic         c_empty,
  // FSL master toward the processor
  output logic         r_write,
  output logic [W-1:0] r_data,
  output logic         r_ctrl,
  input  logic         r_full
);
  initial assert (W == 32) else $error("iom: the end-of-stream word is 32 bits");

  logic        is_eos;
  logic [15:0] fwd_count;

  assign ext_in_ready = !p_full;
  assign p_wr_en      = ext_in_valid && !p_full;
  assign p_data       = ext_in_data;

  assign is_eos        = (c_data == W'(EOS_WORD));
  assign ext_out_valid = !c_empty && !is_eos;
  assign ext_out_data  = c_data;
  assign r_write       = !c_empty && is_eos && !r_full;
  assign r_data        = {IOM_EOS_MSG[31:16], fwd_count};
  assign r_ctrl        = 1'b1;
  assign c_rd_en       = !c_empty && (is_eos ? !r_full : ext_out_ready);

  always_ff @(posedge clk or posedge rst) begin
    if (rst)                                fwd_count <= '0;
    else if (r_write)                       fwd_count <= '0;
    else if (ext_out_valid && ext_out_ready) fwd_count <= fwd_count + 16'd1;
  end
endmodule
