// switch_box: one stage of the VAPRES inter-module communication array.
//
// Ports (Fig. 7 naming): KR channels flow to the right and KL to the left
// between neighbouring switch boxes; KO producer ports come in from the
// paired module interface and KI consumer ports go out to it. Every input
// port has a register; every output port has a multiplexer choosing one of
// the registered inputs. Input ports are numbered
//   0 .. KR-1            right-flowing channels arriving from the left box
//   KR .. KR+KL-1        left-flowing channels arriving from the right box
//   KR+KL .. NIN-1       producer interfaces of the paired module
// and output ports
//   0 .. KR-1            right-flowing channels leaving to the right box
//   KR .. KR+KL-1        left-flowing channels leaving to the left box
//   KR+KL .. NOUT-1      consumer interfaces of the paired module.
// mux_sel holds one SELW-bit field per output port, output o in bits
// [o*SELW +: SELW]; 0 drives an idle word (valid bit 0), v selects input v-1.
// With the prototype sizes (2,2,1,1) that is 5 fields of 3 bits in the
// 24-bit MUX_sel of the PRSocket.
//
// Each channel word is W+1 bits, MSB = valid. Alongside every channel runs a
// FIFO-full feedback bit in the opposite direction: full_out of input i is
// the registered OR of full_in of all outputs currently fed from input i, so
// the feedback is pipelined backwards one register per switch box, matching
// the forward data pipeline.
//
// The register-per-input, mux-per-output structure follows the published
// design; the select encoding and port numbering are this design's choice.
module switch_box
  import vapres_pkg::*;
#(
  parameter int unsigned W  = 32,
  parameter int unsigned KR = 2,
  parameter int unsigned KL = 2,
  parameter int unsigned KI = 1,
  parameter int unsigned KO = 1,
  localparam int unsigned NIN  = KR + KL + KO,
  localparam int unsigned NOUT = KR + KL + KI,
  localparam int unsigned SELW = sel_width(NIN)
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic [MUX_SEL_W-1:0] mux_sel,
  input  logic [W:0]           in_data  [NIN],
  output logic                 full_out [NIN],   // feedback toward each input's source
  output logic [W:0]           out_data [NOUT],
  input  logic                 full_in  [NOUT]   // feedback from each output's sink
);
  initial assert (NOUT * SELW <= MUX_SEL_W)
    else $error("switch_box: %0d outputs need more than %0d MUX_sel bits", NOUT, MUX_SEL_W);

  logic [W:0]      in_q [NIN];
  logic [SELW-1:0] sel  [NOUT];

  always_comb begin
    for (int o = 0; o < int'(NOUT); o++) sel[o] = mux_sel[o*SELW +: SELW];
  end

  // input registers (data forward, full backward)
  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      for (int i = 0; i < int'(NIN); i++) begin
        in_q[i]     <= '0;
        full_out[i] <= 1'b0;
      end
    end else begin
      for (int i = 0; i < int'(NIN); i++) begin
        logic f;
        f = 1'b0;
        for (int o = 0; o < int'(NOUT); o++)
          if (int'(sel[o]) == i + 1) f = f | full_in[o];
        in_q[i]     <= in_data[i];
        full_out[i] <= f;
      end
    end
  end

  // output multiplexers
  always_comb begin
    for (int o = 0; o < int'(NOUT); o++) begin
      out_data[o] = '0;
      for (int i = 0; i < int'(NIN); i++)
        if (int'(sel[o]) == i + 1) out_data[o] = in_q[i];
    end
  end
endmodule
