// vapres_pkg: types and constants shared by the VAPRES streaming fabric.
//
// The PRSocket device control register (DCR) layout follows the published
// bit assignment: bit 0 SM_en, 1 PRR_reset, 2 FIFO_reset, 3 FSL_reset,
// 4 FIFO_wen, 5 FIFO_ren, 6 CLK_en, 7 CLK_sel, bits 31..8 MUX_sel.
// The end-of-stream word is the alternating pattern 1010...10 (32 bits).
// The opcodes used by the example filter module on its FSL command link
// and the IOM's completion message are this design's own choices.
package vapres_pkg;

  localparam int unsigned MUX_SEL_W = 24;

  typedef struct packed {
    logic [MUX_SEL_W-1:0] mux_sel;    // 31..8
    logic                 clk_sel;    // 7
    logic                 clk_en;     // 6
    logic                 fifo_ren;   // 5
    logic                 fifo_wen;   // 4
    logic                 fsl_reset;  // 3
    logic                 fifo_reset; // 2
    logic                 prr_reset;  // 1
    logic                 sm_en;      // 0
  } dcr_t;

  // Special end-of-stream word: "10101...0" over 32 bits.
  localparam logic [31:0] EOS_WORD = 32'hAAAA_AAAA;

  // Command words sent to a hardware module over its FSL link (control bit
  // set); the opcode sits in bits 31..28.
  typedef enum logic [3:0] {
    CMD_NOP   = 4'h0,
    CMD_DRAIN = 4'h1,   // finish the stream: emit EOS, then save state
    CMD_LOAD  = 4'h2    // the next two data words restore the state
  } cmd_e;

  // Message the IOM writes to the processor when it sees end of stream.
  localparam logic [31:0] IOM_EOS_MSG = 32'hE05D_0000;

  // Width of one switch box multiplexer select field: 0 selects nothing,
  // v selects input port v-1.
  function automatic int unsigned sel_width(int unsigned n_in);
    return $clog2(n_in + 1);
  endfunction

endpackage
