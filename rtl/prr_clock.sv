// prr_clock: behavioural model of a PRR's local clock source.
//
// Models the two FPGA clock primitives behind each local clock domain: a
// BUFGMUX choosing between a fast and a slow global clock (select = the
// PRSocket's CLK_sel, 1 = fast) and a regional clock buffer (BUFR) whose
// clock enable is CLK_en. The multiplexer is modelled glitch-free: each
// input's enable changes only while that clock is low and only after the
// other input has been released, as the vendor primitive behaves. The buffer
// enable is sampled while the muxed clock is low, so the gated clock has no
// runt pulses. On an FPGA this block is the vendor primitives; the model
// exists so the design can be simulated with independent module clocks.
// Which select value picks which clock is this model's choice. The clock
// enable is held in a latch that is transparent while the muxed clock is low,
// as in a clock-gating cell; that latch is intended.
module prr_clock (
  input  logic rst,
  input  logic clk_fast,
  input  logic clk_slow,
  input  logic clk_sel,   // 1: fast, 0: slow
  input  logic clk_en,    // BUFR enable
  output logic clk_out
);
  logic ena_f, ena_s, ce_q, clk_mux;

  always_ff @(negedge clk_fast or posedge rst)
    if (rst) ena_f <= 1'b0;
    else     ena_f <= clk_sel && !ena_s;

  always_ff @(negedge clk_slow or posedge rst)
    if (rst) ena_s <= 1'b0;
    else     ena_s <= !clk_sel && !ena_f;

  assign clk_mux = (clk_fast && ena_f) || (clk_slow && ena_s);

  always_latch
    if (rst)           ce_q = 1'b0;
    else if (!clk_mux) ce_q = clk_en;

  assign clk_out = clk_mux && ce_q;
endmodule
