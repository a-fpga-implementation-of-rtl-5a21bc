// csb: column sum block of one column section. It holds, for the block
// columns of its section, the received data memory (input buffer) and the two
// column sum memories that ping-pong between iterations, and it realises
// equation (1), Lq_j = sum of R_mj over the rows of column j plus the channel
// value, as an addition-accumulation.
//
// Memories (all P lanes wide, 15 words per block column of the section, asynchronous
// read like distributed RAM, synchronous write):
//   rx_mem  received LLRs, WR bits per lane, loaded from outside when idle;
//   mem0/1  column sums of R, WL bits per lane. Memory A (mem[sel]) holds the
//           sums of the previous iteration, memory B (mem[~sel]) accumulates
//           the current one; sel flips at the end of every iteration (swap).
// Word address = slot * 15 + word, slot = block column inside the section.
//
// Read side: in each cycle of a block the word (A + read index) mod 15 is
// read, Lq = sat(A + rx) is formed per lane (rx alone in the first iteration,
// a_vld = 0) and the reverse alignment block turns the words into row order
// for the reverse router (lq_grp, two cycles after the read).
// Write side: the alignment block turns the row-ordered R words from the
// router into column order; the word is added to the addressed word of B
// (read-modify-write), or written alone if the block is the first block row
// connected to that column (no read needed). Dummy lanes of word 14 are
// written as 0. The last word of each block is written in the first cycle of
// the next block. Receives the schedule (rd_*, o_*) from the controller.
//
// Decoded data memory: every word read in a pass also writes the hard
// decisions of its Lq (sign bits) into dec_mem at the same address, so after
// the last pass dec_mem holds the decisions whose parity was checked in it.
// q_slot / q_word read it asynchronously on a port of its own (q_hard); it is
// not disturbed by loading the next frame into rx_mem.
module csb
  import ldpc_pkg::*;
#(
  parameter int unsigned SEC = 0      // section number 0..8
) (
  input  logic   clk,
  input  logic   rst,
  // schedule
  input  logic   rd_en,
  input  blk_t   rd_blk,
  input  widx_t  rd_idx,
  input  logic   o_en,
  input  blk_t   o_blk,
  input  widx_t  o_g,
  input  logic   swap,
  input  logic   a_vld,
  // received data load
  input  logic   ld_en,
  input  logic [1:0] ld_slot,
  input  widx_t  ld_word,
  input  rword_t ld_data,
  // decoded data read
  input  logic [1:0] q_slot,
  input  widx_t  q_word,
  output logic [P-1:0] q_hard,
  // datapath
  output lword_t lq_grp,
  input  rword_t r_grp
);
  localparam off_tab_t  OFF   = off_table(SEC);
  localparam slot_tab_t SLOT  = slot_table(SEC);
  localparam flag_tab_t CONN  = conn_table(SEC);
  localparam flag_tab_t FIRST = first_table(SEC);

  localparam int unsigned DEPTH = WPB * sec_width(SEC);
  localparam int unsigned AW    = $clog2(DEPTH);
  typedef logic [AW-1:0] addr_t;

  rword_t rx_mem [DEPTH];
  lword_t mem0   [DEPTH];
  lword_t mem1   [DEPTH];
  logic [P-1:0] dec_mem [DEPTH];
  logic   sel;

  // ------------------------------------------------------------ read side
  addr_t  rd_addr;
  lword_t a_word, lq_word;
  logic [P-1:0] lq_hard;
  rword_t rx_word;
  widx_t  rd_a, o_a;
  sh_t    o_d;
  logic   o_on;

  always_comb begin
    rd_a = widx_t'(32'(OFF[rd_blk]) / P);
    rd_addr = addr_t'(32'(SLOT[rd_blk]) * WPB + 32'(wadd(rd_a, rd_idx)));
    rx_word = rx_mem[rd_addr];
    a_word  = sel ? mem1[rd_addr] : mem0[rd_addr];
    for (int unsigned l = 0; l < P; l++) begin
      lq_word[l] = a_vld ? sat_wl(int'($signed(a_word[l])) + int'($signed(rx_word[l])))
                         : WL'($signed(rx_word[l]));
      lq_hard[l] = lq_word[l][WL-1];
    end
    o_a  = widx_t'(32'(OFF[o_blk]) / P);
    o_d  = sh_t'(32'(OFF[o_blk]) % P);
    o_on = o_en && CONN[o_blk];
  end

  rev_align u_ralign (
    .clk, .rst,
    .rd_word (lq_word),
    .rd_first(rd_en && rd_idx == 0),
    .o_en    (o_on),
    .o_g, .o_a, .o_d,
    .grp     (lq_grp)
  );

  // ----------------------------------------------------------- write side
  logic   wb_en, wb_first;
  sh_t    wb_d;
  widx_t  wb_a;
  logic [1:0] wb_slot;
  logic   wr_en, wr_first;
  widx_t  wr_idx, wr_w, wr_a;
  logic [1:0] wr_slot;
  rword_t wr_data;
  addr_t  wr_addr;
  lword_t b_old, b_new;

  always_ff @(posedge clk) begin
    if (rst) begin
      wb_en <= 1'b0; wb_d <= '0; wb_a <= '0; wb_slot <= '0; wb_first <= 1'b0;
      sel   <= 1'b0;
    end else begin
      wb_en <= o_on && o_g == widx_t'(WPB - 1);
      if (o_on && o_g == widx_t'(WPB - 1)) begin
        wb_d <= o_d; wb_a <= o_a; wb_slot <= SLOT[o_blk]; wb_first <= FIRST[o_blk];
      end
      if (swap) sel <= ~sel;
    end
  end

  align u_align (
    .clk, .rst,
    .grp   (r_grp),
    .o_en  (o_on),
    .o_g, .o_a, .o_d,
    .wb_en, .wb_d,
    .wr_en, .wr_idx, .wr_data
  );

  always_comb begin
    wr_a     = wb_en ? wb_a     : o_a;
    wr_slot  = wb_en ? wb_slot  : SLOT[o_blk];
    wr_first = wb_en ? wb_first : FIRST[o_blk];
    wr_w     = wadd(wr_a, wr_idx);
    wr_addr  = addr_t'(32'(wr_slot) * WPB + 32'(wr_w));
    b_old    = sel ? mem0[wr_addr] : mem1[wr_addr];
    for (int unsigned l = 0; l < P; l++) begin
      if (wr_w == widx_t'(WPB - 1) && l >= LAST_LANES) b_new[l] = '0;
      else if (wr_first) b_new[l] = WL'($signed(wr_data[l]));
      else b_new[l] = sat_wl(int'($signed(b_old[l])) + int'($signed(wr_data[l])));
    end
  end

  always_ff @(posedge clk) begin
    if (wr_en && sel)  mem0[wr_addr] <= b_new;
    if (wr_en && !sel) mem1[wr_addr] <= b_new;
    if (rd_en) dec_mem[rd_addr] <= lq_hard;
    if (ld_en) rx_mem[addr_t'(32'(ld_slot) * WPB + 32'(ld_word))] <= ld_data;
  end

  assign q_hard = dec_mem[addr_t'(32'(q_slot) * WPB + 32'(q_word))];

endmodule
