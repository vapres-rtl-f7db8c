// fsl_link: asynchronous Fast Simplex Link between the processor and a
// hardware module (or IOM).
//
// A unidirectional point-to-point FIFO carrying W data bits plus one control
// bit. The master writes with FSL_M_Write in its own clock domain and must
// not write while FSL_M_Full is high; the slave sees the head word on
// FSL_S_Data/FSL_S_Control whenever FSL_S_Exists is high and pops it with
// FSL_S_Read. The link is cleared by the asynchronous reset (global reset or
// the PRSocket's FSL_reset). Depth 512 matches the prototype; the signal
// names follow the usual FSL convention and the FIFO internals are this
// design's own.
module fsl_link #(
  parameter int unsigned W     = 32,
  parameter int unsigned DEPTH = 512
) (
  input  logic         rst,
  // master (writer)
  input  logic         FSL_M_Clk,
  input  logic         FSL_M_Write,
  input  logic [W-1:0] FSL_M_Data,
  input  logic         FSL_M_Control,
  output logic         FSL_M_Full,
  // slave (reader)
  input  logic         FSL_S_Clk,
  input  logic         FSL_S_Read,
  output logic [W-1:0] FSL_S_Data,
  output logic         FSL_S_Control,
  output logic         FSL_S_Exists
);
  logic empty;
  assign FSL_S_Exists = !empty;

  async_fifo #(.W(W+1), .DEPTH(DEPTH), .PROG_FULL_FREE(1)) u_fifo (
    .rst          (rst),
    .wr_clk       (FSL_M_Clk),
    .wr_en        (FSL_M_Write),
    .wr_data      ({FSL_M_Control, FSL_M_Data}),
    .wr_full      (FSL_M_Full),
    .wr_prog_full (),
    .wr_count     (),
    .rd_clk       (FSL_S_Clk),
    .rd_en        (FSL_S_Read),
    .rd_data      ({FSL_S_Control, FSL_S_Data}),
    .rd_empty     (empty)
  );
endmodule
