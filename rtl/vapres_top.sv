// vapres_top: data processing region of a VAPRES system.
//
// VAPRES lets a processor assemble a streaming application at run time out of
// hardware modules placed in partially reconfigurable regions (PRRs), each
// running in its own clock domain, and rewire the streaming channels between
// them without stopping the stream. This top holds the prototype
// configuration: one reconfigurable streaming block with N_PRR + 1 slots,
//   slot 0        I/O module (iom), external streaming pins
//   slot 1        PRR holding example filter A  (y = x[n] + x[n-1])
//   slot 2..N_PRR PRRs holding example filter B  (y = x[n] - x[n-1])
// and W = 32 bit channels, two channels each way between switch boxes, one
// input and one output port per slot, 512-word interface FIFOs and FSLs.
//
// The processor, its PLB-to-DCR bridge and the clock generators are outside:
// the DCR slave bus and the processor ends of every FSL pair (r: module to
// processor, t: processor to module, indexed by slot) are ports, and so are
// the static clock (switch boxes, DCR, processor side of the FSLs) and the
// fast and slow global clocks feeding each slot's clock multiplexer.
// Reconfiguring a PRR is not modelled: the modules are fixed, and a module is
// taken out of or put into service with its socket's PRR_reset, CLK_en and
// SM_en bits, as software does around a partial reconfiguration.
module vapres_top
  import vapres_pkg::*;
#(
  parameter int unsigned N_PRR      = 2,
  parameter int unsigned W          = 32,
  parameter int unsigned KR         = 2,
  parameter int unsigned KL         = 2,
  parameter int unsigned KI         = 1,
  parameter int unsigned KO         = 1,
  parameter int unsigned FIFO_DEPTH = 512,
  parameter int unsigned FSL_DEPTH  = 512,
  parameter int unsigned DCR_AW     = 10,
  parameter logic [DCR_AW-1:0] DCR_BASE = '0,
  localparam int unsigned NS = N_PRR + 1
) (
  input  logic              clk,
  input  logic              clk_fast,
  input  logic              clk_slow,
  input  logic              rst,
  // DCR slave bus (from the PLB-to-DCR bridge)
  input  logic              dcr_read,
  input  logic              dcr_write,
  input  logic [DCR_AW-1:0] dcr_abus,
  input  logic [31:0]       dcr_dbus_in,
  output logic [31:0]       dcr_dbus_out,
  output logic              dcr_ack,
  // processor ends of the FSL links, one pair per slot
  input  logic              fsl_r_read   [NS],
  output logic [W-1:0]      fsl_r_data   [NS],
  output logic              fsl_r_ctrl   [NS],
  output logic              fsl_r_exists [NS],
  input  logic              fsl_t_write  [NS],
  input  logic [W-1:0]      fsl_t_data   [NS],
  input  logic              fsl_t_ctrl   [NS],
  output logic              fsl_t_full   [NS],
  // external streams of the IOM
  input  logic              ext_in_valid,
  input  logic [W-1:0]      ext_in_data,
  output logic              ext_in_ready,
  output logic              ext_out_valid,
  output logic [W-1:0]      ext_out_data,
  input  logic              ext_out_ready,
  // status
  output logic              c_overflow   [NS][KI]
);
  logic         mclk      [NS];
  logic         mrst      [NS];
  logic         m_p_wr_en [NS][KO];
  logic [W-1:0] m_p_data  [NS][KO];
  logic         m_p_full  [NS][KO];
  logic         m_c_rd_en [NS][KI];
  logic [W-1:0] m_c_data  [NS][KI];
  logic         m_c_empty [NS][KI];
  logic         m_r_write [NS];
  logic [W-1:0] m_r_data  [NS];
  logic         m_r_ctrl  [NS];
  logic         m_r_full  [NS];
  logic         m_t_read  [NS];
  logic [W-1:0] m_t_data  [NS];
  logic         m_t_ctrl  [NS];
  logic         m_t_exists[NS];

  rsb #(
    .N_SLOTS (NS), .N_IOM (1), .W (W), .KR (KR), .KL (KL), .KI (KI), .KO (KO),
    .FIFO_DEPTH (FIFO_DEPTH), .FSL_DEPTH (FSL_DEPTH),
    .DCR_AW (DCR_AW), .DCR_BASE (DCR_BASE)
  ) u_rsb (
    .clk (clk), .clk_fast (clk_fast), .clk_slow (clk_slow), .rst (rst),
    .dcr_read (dcr_read), .dcr_write (dcr_write), .dcr_abus (dcr_abus),
    .dcr_dbus_in (dcr_dbus_in), .dcr_dbus_out (dcr_dbus_out), .dcr_ack (dcr_ack),
    .pr_read (fsl_r_read), .pr_data (fsl_r_data), .pr_ctrl (fsl_r_ctrl), .pr_exists (fsl_r_exists),
    .pt_write (fsl_t_write), .pt_data (fsl_t_data), .pt_ctrl (fsl_t_ctrl), .pt_full (fsl_t_full),
    .mclk (mclk), .mrst (mrst),
    .m_p_wr_en (m_p_wr_en), .m_p_data (m_p_data), .m_p_full (m_p_full),
    .m_c_rd_en (m_c_rd_en), .m_c_data (m_c_data), .m_c_empty (m_c_empty),
    .m_r_write (m_r_write), .m_r_data (m_r_data), .m_r_ctrl (m_r_ctrl), .m_r_full (m_r_full),
    .m_t_read (m_t_read), .m_t_data (m_t_data), .m_t_ctrl (m_t_ctrl), .m_t_exists (m_t_exists),
    .c_overflow (c_overflow)
  );

  // slot 0: I/O module on port 0 of its interfaces; its t link is not used
  iom #(.W(W)) u_iom (
    .clk (mclk[0]), .rst (mrst[0]),
    .ext_in_valid (ext_in_valid), .ext_in_data (ext_in_data), .ext_in_ready (ext_in_ready),
    .ext_out_valid (ext_out_valid), .ext_out_data (ext_out_data), .ext_out_ready (ext_out_ready),
    .p_wr_en (m_p_wr_en[0][0]), .p_data (m_p_data[0][0]), .p_full (m_p_full[0][0]),
    .c_rd_en (m_c_rd_en[0][0]), .c_data (m_c_data[0][0]), .c_empty (m_c_empty[0][0]),
    .r_write (m_r_write[0]), .r_data (m_r_data[0]), .r_ctrl (m_r_ctrl[0]), .r_full (m_r_full[0])
  );
  assign m_t_read[0] = 1'b0;

  // PRR slots: example filter modules on port 0 of their interfaces
  for (genvar s = 1; s < int'(NS); s++) begin : g_prr
    filter_module #(.W(W), .C0(1), .C1(s == 1 ? 1 : -1)) u_filter (
      .clk (mclk[s]), .rst (mrst[s]),
      .c_rd_en (m_c_rd_en[s][0]), .c_data (m_c_data[s][0]), .c_empty (m_c_empty[s][0]),
      .p_wr_en (m_p_wr_en[s][0]), .p_data (m_p_data[s][0]), .p_full (m_p_full[s][0]),
      .r_write (m_r_write[s]), .r_data (m_r_data[s]), .r_ctrl (m_r_ctrl[s]), .r_full (m_r_full[s]),
      .t_read (m_t_read[s]), .t_data (m_t_data[s]), .t_ctrl (m_t_ctrl[s]), .t_exists (m_t_exists[s])
    );
  end

  // unused extra ports of every slot are idle
  for (genvar s = 0; s < int'(NS); s++) begin : g_idle
    for (genvar k = 1; k < int'(KO); k++) begin : g_p
      assign m_p_wr_en[s][k] = 1'b0;
      assign m_p_data[s][k]  = '0;
    end
    for (genvar k = 1; k < int'(KI); k++) begin : g_c
      assign m_c_rd_en[s][k] = 1'b0;
    end
  end
endmodule
