// prsocket: per-slot control register of a VAPRES reconfigurable streaming
// block.
//
// One 32-bit device control register (DCR) is a slave on the DCR bus behind
// the processor's PLB-to-DCR bridge. Its fields (vapres_pkg::dcr_t) drive the
// slice macro enable, the PRR/module reset, the module interface FIFO reset,
// the FSL reset, the consumer write enable, the producer read enable, the PRR
// clock enable and clock select, and the switch box multiplexer selects.
//
// Bus: a write with dcr_abus == ADDR loads dcr_dbus_in at the clock edge; a
// read with dcr_abus == ADDR returns the register on dcr_dbus_out (zero
// otherwise, so several sockets can be ORed). dcr_ack is asserted for one
// clock in the cycle after an addressed access. The register resets to all
// zeros: slice macros closed, clocks off, FIFOs not read or written, no
// channels routed. The bit layout is the published one; the simplified bus
// handshake and the reset value are this design's choices.
module prsocket
  import vapres_pkg::*;
#(
  parameter int unsigned   AW   = 10,
  parameter logic [AW-1:0] ADDR = '0
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          dcr_read,
  input  logic          dcr_write,
  input  logic [AW-1:0] dcr_abus,
  input  logic [31:0]   dcr_dbus_in,
  output logic [31:0]   dcr_dbus_out,
  output logic          dcr_ack,
  output dcr_t          ctrl
);
  logic hit;
  assign hit = (dcr_abus == ADDR);

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      ctrl    <= '0;
      dcr_ack <= 1'b0;
    end else begin
      if (dcr_write && hit) ctrl <= dcr_t'(dcr_dbus_in);
      dcr_ack <= hit && (dcr_read || dcr_write);
    end
  end

  assign dcr_dbus_out = (dcr_read && hit) ? 32'(ctrl) : '0;

  // a bus master never reads and writes in the same cycle
  a_rw_exclusive: assert property (@(posedge clk) disable iff (rst)
    !(dcr_read && dcr_write));
endmodule
