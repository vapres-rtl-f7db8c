// async_fifo: dual-clock first-word-fall-through FIFO.
//
// Stands in for the BlockRAM FIFOs that isolate each local clock domain in
// VAPRES (module interfaces and FSL links, 512 words in the prototype).
// Write and read pointers are kept in binary and Gray code; each side sees
// the other's Gray pointer through a two-flop synchronizer, so full and empty
// are conservative and cross-domain latency is about three clocks of the
// receiving side. The head word is visible on rd_data whenever rd_empty is
// low (first-word fall-through); rd_en pops it. wr_en while full and rd_en
// while empty are ignored. The storage array has one write port and one
// registered read port, so it maps onto a dual-port block RAM; the read
// address is the next read pointer, which keeps first-word fall-through
// without a prefetch stage.
//
// wr_prog_full is registered in the write domain and is high when the free
// space seen by the writer is at most PROG_FULL_FREE words; the consumer
// interface uses it as its early "remote FIFO full" feedback. wr_count is the
// writer's (pessimistic) occupancy.
//
// rst is asynchronous and clears both sides; it must be held for a few
// cycles of both clocks. DEPTH must be a power of two.
module async_fifo #(
  parameter int unsigned W              = 33,
  parameter int unsigned DEPTH          = 512,
  parameter int unsigned PROG_FULL_FREE = 8
) (
  input  logic                       rst,
  // write side
  input  logic                       wr_clk,
  input  logic                       wr_en,
  input  logic [W-1:0]               wr_data,
  output logic                       wr_full,
  output logic                       wr_prog_full,
  output logic [$clog2(DEPTH):0]     wr_count,
  // read side
  input  logic                       rd_clk,
  input  logic                       rd_en,
  output logic [W-1:0]               rd_data,
  output logic                       rd_empty
);
  localparam int unsigned AW = $clog2(DEPTH);

  initial begin
    assert (DEPTH == (1 << AW)) else $error("async_fifo: DEPTH must be a power of two");
    assert (PROG_FULL_FREE < DEPTH) else $error("async_fifo: PROG_FULL_FREE too large");
  end

  logic [W-1:0] mem [DEPTH];

  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] rgray_w1, rgray_w2;   // read pointer seen by the writer
  logic [AW:0] wgray_r1, wgray_r2;   // write pointer seen by the reader

  function automatic logic [AW:0] bin2gray(logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  function automatic logic [AW:0] gray2bin(logic [AW:0] g);
    logic [AW:0] b;
    b[AW] = g[AW];
    for (int i = int'(AW) - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  // ---------------- write domain ----------------
  logic        wr_fire;
  logic [AW:0] wbin_nxt, rbin_w, used_nxt;

  assign wr_fire  = wr_en && !wr_full;
  assign wbin_nxt = wbin + (AW+1)'(wr_fire);
  assign rbin_w   = gray2bin(rgray_w2);
  assign used_nxt = wbin_nxt - rbin_w;

  always_ff @(posedge wr_clk) begin
    if (wr_fire) mem[wbin[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge wr_clk or posedge rst) begin
    if (rst) begin
      wbin         <= '0;
      wgray        <= '0;
      rgray_w1     <= '0;
      rgray_w2     <= '0;
      wr_full      <= 1'b0;
      wr_prog_full <= 1'b0;
      wr_count     <= '0;
    end else begin
      rgray_w1     <= rgray;
      rgray_w2     <= rgray_w1;
      wbin         <= wbin_nxt;
      wgray        <= bin2gray(wbin_nxt);
      wr_full      <= (used_nxt == (AW+1)'(DEPTH));
      wr_prog_full <= (used_nxt >= (AW+1)'(DEPTH - PROG_FULL_FREE));
      wr_count     <= used_nxt;
    end
  end

  // ---------------- read domain ----------------
  logic        rd_fire;
  logic [AW:0] rbin_nxt;

  assign rd_fire  = rd_en && !rd_empty;
  assign rbin_nxt = rbin + (AW+1)'(rd_fire);

  // Synchronous read port (block RAM style) addressed by the next read
  // pointer: the register always holds the word at the current head, and it
  // is refreshed every read clock, so a word written while the FIFO looked
  // empty is in place before the synchronized write pointer clears rd_empty.
  always_ff @(posedge rd_clk) begin
    rd_data <= mem[rbin_nxt[AW-1:0]];
  end

  always_ff @(posedge rd_clk or posedge rst) begin
    if (rst) begin
      rbin     <= '0;
      rgray    <= '0;
      wgray_r1 <= '0;
      wgray_r2 <= '0;
      rd_empty <= 1'b1;
    end else begin
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
      rbin     <= rbin_nxt;
      rgray    <= bin2gray(rbin_nxt);
      rd_empty <= (bin2gray(rbin_nxt) == wgray_r2);
    end
  end

endmodule
