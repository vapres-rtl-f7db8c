// filter_module: example hardware module for a VAPRES PRR, in its module
// wrapper.
//
// The "original module" is a two-tap digital filter
//     y[n] = C0 * x[n] + C1 * x[n-1]      (W-bit wrap-around arithmetic)
// whose state is the previous sample x[n-1] plus a dynamic variable, the
// number of samples processed so far. The wrapper connects it to the
// FIFO-based ports of the slot: it pops a sample from the consumer port and
// pushes the result to the producer port in the same clock when the consumer
// FIFO is not empty and the producer FIFO is not full (blocking read and
// blocking write).
//
// Processor link (FSL): every MON_PERIOD samples the module writes the
// largest input sample seen in that period on r (control bit 0) as
// monitoring information; it is skipped if r is full. Command words on t
// (control bit 1, opcode in bits 31..28, see vapres_pkg::cmd_e):
//   CMD_DRAIN  keep filtering until the consumer FIFO has been empty for
//              DRAIN_IDLE consecutive clocks, then push the end-of-stream word
//              on the producer port, then send the state on r (control bit 1):
//              x[n-1], then the sample count; then halt until reset.
//   CMD_LOAD   the next two data words on t are loaded as x[n-1] and the
//              sample count, so a replacement module continues where the
//              replaced one stopped.
// Filtering, monitoring, end of stream and state save/restore follow the
// published module switching procedure; the filter function, command
// encoding and drain rule are this design's own.
module filter_module
  import vapres_pkg::*;
#(
  parameter int unsigned W          = 32,
  parameter int          C0         = 1,
  parameter int          C1         = 1,
  parameter int unsigned MON_PERIOD = 64,
  parameter int unsigned DRAIN_IDLE = 16
) (
  input  logic         clk,
  input  logic         rst,
  // consumer port (input stream)
  output logic         c_rd_en,
  input  logic [W-1:0] c_data,
  input  logic         c_empty,
  // producer port (output stream)
  output logic         p_wr_en,
  output logic [W-1:0] p_data,
  input  logic         p_full,
  // FSL master toward the processor
  output logic         r_write,
  output logic [W-1:0] r_data,
  output logic         r_ctrl,
  input  logic         r_full,
  // FSL slave from the processor
  output logic         t_read,
  input  logic [W-1:0] t_data,
  input  logic         t_ctrl,
  input  logic         t_exists
);
  initial assert (W == 32) else $error("filter_module: the end-of-stream word is 32 bits");

  typedef enum logic [2:0] {
    S_RUN, S_DRAIN, S_EOS, S_SAVE0, S_SAVE1, S_HALT, S_LOAD0, S_LOAD1
  } state_e;

  state_e       state;
  logic [W-1:0] x_prev, count, peak;
  logic [$clog2(MON_PERIOD+1)-1:0] mon_cnt;
  logic [$clog2(DRAIN_IDLE+1)-1:0] idle_cnt;
  logic         active, fire, mon_send;
  logic [W-1:0] y;
  cmd_e         opcode;

  assign active   = (state == S_RUN) || (state == S_DRAIN);
  assign fire     = active && !c_empty && !p_full;
  assign y        = W'(C0) * c_data + W'(C1) * x_prev;
  assign opcode   = cmd_e'(t_data[W-1 -: 4]);
  assign mon_send = active && (32'(mon_cnt) >= MON_PERIOD) && !r_full;

  assign c_rd_en = fire;
  assign p_wr_en = fire || (state == S_EOS && !p_full);
  assign p_data  = (state == S_EOS) ? W'(EOS_WORD) : y;

  always_comb begin
    r_write = 1'b0;
    r_data  = peak;
    r_ctrl  = 1'b0;
    unique case (state)
      S_SAVE0: begin r_write = !r_full; r_data = x_prev; r_ctrl = 1'b1; end
      S_SAVE1: begin r_write = !r_full; r_data = count;  r_ctrl = 1'b1; end
      default:       r_write = mon_send;
    endcase
  end

  // command link: accept a command while running, data words while loading
  always_comb begin
    t_read = 1'b0;
    if (t_exists) begin
      unique case (state)
        S_RUN:            t_read = 1'b1;
        S_LOAD0, S_LOAD1: t_read = !t_ctrl;
        default:          t_read = 1'b0;
      endcase
    end
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      state    <= S_RUN;
      x_prev   <= '0;
      count    <= '0;
      peak     <= '0;
      mon_cnt  <= '0;
      idle_cnt <= '0;
    end else begin
      // filter datapath and monitoring
      if (fire) begin
        x_prev <= c_data;
        count  <= count + 1'b1;
      end
      if (mon_send) begin
        mon_cnt <= fire ? 1 : 0;
        peak    <= fire ? c_data : '0;
      end else if (fire) begin
        if (32'(mon_cnt) < MON_PERIOD) mon_cnt <= mon_cnt + 1'b1;
        if (c_data > peak) peak <= c_data;
      end

      unique case (state)
        S_RUN: begin
          idle_cnt <= '0;
          if (t_exists && t_ctrl) begin
            if (opcode == CMD_DRAIN)     state <= S_DRAIN;
            else if (opcode == CMD_LOAD) state <= S_LOAD0;
          end
        end
        S_DRAIN: begin
          if (!c_empty)                        idle_cnt <= '0;
          else if (32'(idle_cnt) < DRAIN_IDLE) idle_cnt <= idle_cnt + 1'b1;
          else                                 state    <= S_EOS;
        end
        S_EOS:   if (!p_full) state <= S_SAVE0;
        S_SAVE0: if (!r_full) state <= S_SAVE1;
        S_SAVE1: if (!r_full) state <= S_HALT;
        S_HALT:  ;
        S_LOAD0: if (t_read) begin x_prev <= t_data; state <= S_LOAD1; end
        S_LOAD1: if (t_read) begin count  <= t_data; state <= S_RUN;   end
        default: state <= S_RUN;
      endcase
    end
  end
endmodule
