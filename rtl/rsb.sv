// rsb: reconfigurable streaming block (RSB) of VAPRES.
//
// N_SLOTS slots sit side by side, slot 0 at the left. The first N_IOM slots
// host I/O modules (static logic), the rest host partially reconfigurable
// regions (PRRs). Each slot has
//   - a switch box of the linear inter-module communication array
//     (KR channels to the right, KL to the left, W+1 bits with valid MSB),
//   - KO producer and KI consumer module interfaces (asynchronous FIFOs of
//     FIFO_DEPTH words between the module clock and the switch clock),
//   - two asynchronous FSL links of FSL_DEPTH words: r toward the
//     processor and t toward the module,
//   - a PRSocket DCR at DCR address DCR_BASE + slot, whose bits drive the
//     slot's resets, FIFO read/write enables, clock enable and select, and
//     its switch box multiplexers,
//   - a local clock: fast or slow global clock through a glitch-free mux
//     and a gated regional buffer (mclk[slot]),
//   - for PRR slots, slice macros that force every strobe and data bit the
//     module drives toward the static region to zero while SM_en is low.
// Module resets: mrst[s] = rst | PRR_reset; interface FIFOs are cleared by
// rst | FIFO_reset, FSLs by rst | FSL_reset (all asynchronous).
//
// A streaming channel is set up by writing, in every switch box on the path,
// the MUX_sel field of the output port that continues the path (see
// switch_box for the numbering), then setting FIFO_ren in the producer's
// socket and FIFO_wen in the consumer's socket. Words then advance one switch
// box per switch clock; the consumer's early-full flag travels back the same
// way and stalls the producer, so no word is lost.
//
// The structure follows the published architecture; slot order, DCR
// addressing and the slice macro placement are this design's choices.
module rsb
  import vapres_pkg::*;
#(
  parameter int unsigned N_SLOTS    = 3,
  parameter int unsigned N_IOM      = 1,
  parameter int unsigned W          = 32,
  parameter int unsigned KR         = 2,
  parameter int unsigned KL         = 2,
  parameter int unsigned KI         = 1,
  parameter int unsigned KO         = 1,
  parameter int unsigned FIFO_DEPTH = 512,
  parameter int unsigned FSL_DEPTH  = 512,
  parameter int unsigned DCR_AW     = 10,
  parameter logic [DCR_AW-1:0] DCR_BASE = '0
) (
  input  logic              clk,        // static region / switch clock
  input  logic              clk_fast,
  input  logic              clk_slow,
  input  logic              rst,
  // DCR slave bus
  input  logic              dcr_read,
  input  logic              dcr_write,
  input  logic [DCR_AW-1:0] dcr_abus,
  input  logic [31:0]       dcr_dbus_in,
  output logic [31:0]       dcr_dbus_out,
  output logic              dcr_ack,
  // processor side of the FSL links (static clock)
  input  logic              pr_read   [N_SLOTS],
  output logic [W-1:0]      pr_data   [N_SLOTS],
  output logic              pr_ctrl   [N_SLOTS],
  output logic              pr_exists [N_SLOTS],
  input  logic              pt_write  [N_SLOTS],
  input  logic [W-1:0]      pt_data   [N_SLOTS],
  input  logic              pt_ctrl   [N_SLOTS],
  output logic              pt_full   [N_SLOTS],
  // module side, per slot (module clock mclk[s])
  output logic              mclk      [N_SLOTS],
  output logic              mrst      [N_SLOTS],
  input  logic              m_p_wr_en [N_SLOTS][KO],
  input  logic [W-1:0]      m_p_data  [N_SLOTS][KO],
  output logic              m_p_full  [N_SLOTS][KO],
  input  logic              m_c_rd_en [N_SLOTS][KI],
  output logic [W-1:0]      m_c_data  [N_SLOTS][KI],
  output logic              m_c_empty [N_SLOTS][KI],
  input  logic              m_r_write [N_SLOTS],
  input  logic [W-1:0]      m_r_data  [N_SLOTS],
  input  logic              m_r_ctrl  [N_SLOTS],
  output logic              m_r_full  [N_SLOTS],
  input  logic              m_t_read  [N_SLOTS],
  output logic [W-1:0]      m_t_data  [N_SLOTS],
  output logic              m_t_ctrl  [N_SLOTS],
  output logic              m_t_exists[N_SLOTS],
  // status
  output logic              c_overflow[N_SLOTS][KI]  // a consumer dropped a word
);
  localparam int unsigned NIN  = KR + KL + KO;
  localparam int unsigned NOUT = KR + KL + KI;
  // bits crossing a slice macro: producer strobes+data, consumer strobes,
  // FSL r strobe+data+control, FSL t strobe
  localparam int unsigned SMW  = KO * (W + 1) + KI + (W + 2) + 1;

  dcr_t        ctrl      [N_SLOTS];
  logic [31:0] dcr_rd    [N_SLOTS];
  logic        dcr_ack_s [N_SLOTS];

  logic [W:0]  sw_in     [N_SLOTS][NIN];
  logic        sw_fout   [N_SLOTS][NIN];
  logic [W:0]  sw_out    [N_SLOTS][NOUT];
  logic        sw_fin    [N_SLOTS][NOUT];

  // DCR read data and acknowledge of all sockets are ORed together
  always_comb begin
    dcr_dbus_out = '0;
    dcr_ack      = 1'b0;
    for (int s = 0; s < int'(N_SLOTS); s++) begin
      dcr_dbus_out = dcr_dbus_out | dcr_rd[s];
      dcr_ack      = dcr_ack | dcr_ack_s[s];
    end
  end

  for (genvar s = 0; s < int'(N_SLOTS); s++) begin : g_slot
    logic          fifo_rst, fsl_rst;
    logic [SMW-1:0] sm_in, sm_out;
    logic          p_wr_en [KO];
    logic [W-1:0]  p_data  [KO];
    logic          c_rd_en [KI];
    logic          r_write, r_ctrl, t_read;
    logic [W-1:0]  r_data;

    prsocket #(.AW(DCR_AW), .ADDR(DCR_AW'(DCR_BASE + s))) u_socket (
      .clk (clk), .rst (rst),
      .dcr_read (dcr_read), .dcr_write (dcr_write), .dcr_abus (dcr_abus),
      .dcr_dbus_in (dcr_dbus_in), .dcr_dbus_out (dcr_rd[s]), .dcr_ack (dcr_ack_s[s]),
      .ctrl (ctrl[s])
    );

    assign fifo_rst = rst || ctrl[s].fifo_reset;
    assign fsl_rst  = rst || ctrl[s].fsl_reset;
    assign mrst[s]  = rst || ctrl[s].prr_reset;

    prr_clock u_clk (
      .rst (rst), .clk_fast (clk_fast), .clk_slow (clk_slow),
      .clk_sel (ctrl[s].clk_sel), .clk_en (ctrl[s].clk_en), .clk_out (mclk[s])
    );

    // module-to-static signals, through slice macros on PRR slots
    always_comb begin
      for (int k = 0; k < int'(KO); k++)
        sm_in[k*(W+1) +: W+1] = {m_p_wr_en[s][k], m_p_data[s][k]};
      for (int k = 0; k < int'(KI); k++)
        sm_in[KO*(W+1) + k] = m_c_rd_en[s][k];
      sm_in[KO*(W+1) + KI +: W+2] = {m_r_write[s], m_r_ctrl[s], m_r_data[s]};
      sm_in[SMW-1] = m_t_read[s];
    end

    if (s >= int'(N_IOM)) begin : g_sm
      slice_macro #(.W(SMW)) u_sm (.en (ctrl[s].sm_en), .from_prr (sm_in), .to_static (sm_out));
    end else begin : g_nosm
      assign sm_out = sm_in;
    end

    always_comb begin
      for (int k = 0; k < int'(KO); k++)
        {p_wr_en[k], p_data[k]} = sm_out[k*(W+1) +: W+1];
      for (int k = 0; k < int'(KI); k++)
        c_rd_en[k] = sm_out[KO*(W+1) + k];
      {r_write, r_ctrl, r_data} = sm_out[KO*(W+1) + KI +: W+2];
      t_read = sm_out[SMW-1];
    end

    // module interfaces
    for (genvar k = 0; k < int'(KO); k++) begin : g_prod
      producer_interface #(.W(W), .DEPTH(FIFO_DEPTH)) u_prod (
        .rst (fifo_rst),
        .mod_clk (mclk[s]), .mod_wr_en (p_wr_en[k]), .mod_data (p_data[k]), .mod_full (m_p_full[s][k]),
        .sw_clk (clk), .fifo_ren (ctrl[s].fifo_ren),
        .remote_full (sw_fout[s][KR+KL+k]), .ch_out (sw_in[s][KR+KL+k])
      );
    end
    for (genvar k = 0; k < int'(KI); k++) begin : g_cons
      consumer_interface #(.W(W), .DEPTH(FIFO_DEPTH), .MAX_HOPS(N_SLOTS)) u_cons (
        .rst (fifo_rst),
        .sw_clk (clk), .fifo_wen (ctrl[s].fifo_wen), .ch_in (sw_out[s][KR+KL+k]),
        .remote_full (sw_fin[s][KR+KL+k]), .overflow (c_overflow[s][k]),
        .mod_clk (mclk[s]), .mod_rd_en (c_rd_en[k]),
        .mod_data (m_c_data[s][k]), .mod_empty (m_c_empty[s][k])
      );
    end

    // FSL links
    fsl_link #(.W(W), .DEPTH(FSL_DEPTH)) u_fsl_r (
      .rst (fsl_rst),
      .FSL_M_Clk (mclk[s]), .FSL_M_Write (r_write), .FSL_M_Data (r_data),
      .FSL_M_Control (r_ctrl), .FSL_M_Full (m_r_full[s]),
      .FSL_S_Clk (clk), .FSL_S_Read (pr_read[s]), .FSL_S_Data (pr_data[s]),
      .FSL_S_Control (pr_ctrl[s]), .FSL_S_Exists (pr_exists[s])
    );
    fsl_link #(.W(W), .DEPTH(FSL_DEPTH)) u_fsl_t (
      .rst (fsl_rst),
      .FSL_M_Clk (clk), .FSL_M_Write (pt_write[s]), .FSL_M_Data (pt_data[s]),
      .FSL_M_Control (pt_ctrl[s]), .FSL_M_Full (pt_full[s]),
      .FSL_S_Clk (mclk[s]), .FSL_S_Read (t_read), .FSL_S_Data (m_t_data[s]),
      .FSL_S_Control (m_t_ctrl[s]), .FSL_S_Exists (m_t_exists[s])
    );

    // switch box and its links to the neighbours
    switch_box #(.W(W), .KR(KR), .KL(KL), .KI(KI), .KO(KO)) u_sw (
      .clk (clk), .rst (rst), .mux_sel (ctrl[s].mux_sel),
      .in_data (sw_in[s]), .full_out (sw_fout[s]),
      .out_data (sw_out[s]), .full_in (sw_fin[s])
    );

    for (genvar c = 0; c < int'(KR); c++) begin : g_right
      // right-flowing channel c enters slot s from slot s-1
      if (s == 0) begin : g_edge
        assign sw_in[s][c] = '0;
      end else begin : g_link
        assign sw_in[s][c] = sw_out[s-1][c];
      end
      // feedback on right-flowing channel c leaving slot s, from slot s+1
      if (s == int'(N_SLOTS) - 1) begin : g_fedge
        assign sw_fin[s][c] = 1'b0;
      end else begin : g_flink
        assign sw_fin[s][c] = sw_fout[s+1][c];
      end
    end
    for (genvar c = 0; c < int'(KL); c++) begin : g_left
      // left-flowing channel c enters slot s from slot s+1
      if (s == int'(N_SLOTS) - 1) begin : g_edge
        assign sw_in[s][KR+c] = '0;
      end else begin : g_link
        assign sw_in[s][KR+c] = sw_out[s+1][KR+c];
      end
      if (s == 0) begin : g_fedge
        assign sw_fin[s][KR+c] = 1'b0;
      end else begin : g_flink
        assign sw_fin[s][KR+c] = sw_fout[s-1][KR+c];
      end
    end
  end
endmodule
