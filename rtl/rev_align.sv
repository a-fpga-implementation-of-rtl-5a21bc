// rev_align: reverse alignment block of a column sum block (CSB). It turns
// column-ordered memory words (Lq values, WL = 7 bits) into row-ordered words
// for the reverse router: output group g holds, in lane l, the value of
// column (24g + l + offset) mod 337 of the block column being processed.
//
// How it works. With offset = 24*A + d (A = address offset, d = data offset)
// the memory words of a block are read one per cycle in the order
// A, A+1, ..., 14, 0, ..., A-1 (read index 0..14). Two registers keep the
// words of the previous two reads (P1, P2) and a head register H keeps the
// first word of the block, which is needed again at its end. Group g is
// produced two cycles after read g: 24 consecutive values are taken out of
// two 24-lane words X, Y by a per-lane concatenation mux (lanes >= s from X,
// lanes < s from Y) followed by the circular shifter rotating by s.
// Word 14 carries a single valid value; around it the stream is "gap closed":
// that value is merged in front of the next word, and after it the shift value
// changes from d to d-1 (modulo 24, borrowing one word). The last group
// (row 336 alone) is taken from a one-lane register E captured a cycle earlier,
// so the two registers are already free for the next block.
//
// Timing: o_* describe the output group of this cycle and lag the read of the
// same block by two cycles (group g of a block is output in the cycle of read
// g+2; groups 13 and 14 fall into the first two cycles of the next block).
// Output is combinational from the registers, rd_word and the controls.
//
// Follows the description: read order, two-cycle latency, head register,
// concatenate-and-shift, gap closing with a shift changed by one. Own choices:
// the exact register set (P1, P2, H, E) and the case split below.
module rev_align
  import ldpc_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  lword_t rd_word,   // word read from memory in this cycle
  input  logic   rd_first,  // this read is read index 0 of a block
  input  logic   o_en,      // an output group is due in this cycle
  input  widx_t  o_g,       // its group index 0..14
  input  widx_t  o_a,       // address offset of its block
  input  sh_t    o_d,       // data offset of its block
  output lword_t grp        // row-ordered group (lanes of group 14: only lane 0)
);
  lword_t p1, p2, hd;
  logic [WL-1:0] e_reg;

  lword_t x, y, z, rot, cur;
  sh_t    s;
  widx_t  idx14;

  always_ff @(posedge clk) begin
    if (rst) begin
      p1 <= '0; p2 <= '0; hd <= '0; e_reg <= '0;
    end else begin
      p1 <= rd_word;
      p2 <= p1;
      if (rd_first) hd <= rd_word;
      if (o_en && o_g == widx_t'(WPB - 2)) begin
        // column (offset - 1) mod M is the single row of the last group
        if (o_d != 0)      e_reg <= hd[o_d - 1];
        else if (o_a == 0) e_reg <= p1[0];
        else               e_reg <= p1[P-1];
      end
    end
  end

  always_comb begin
    idx14 = widx_t'(WPB - 1) - o_a;       // read index of word 14
    cur   = (o_g == widx_t'(WPB - 2)) ? hd : rd_word;
    x = p2; y = p1; s = o_d;
    if (o_g + 1 < idx14) begin
      x = p2; y = p1; s = o_d;
    end else if (o_g + 1 == idx14) begin
      // P1 is word 14: its single value precedes the next word
      x = p2;
      y = {cur[P-2:0], p1[0]};
      s = o_d;
    end else if (o_d != 0) begin
      // word 14 already passed: shift value one less
      x = p1; y = cur; s = o_d - 1;
    end else if (o_g == idx14) begin
      x = {p1[P-2:0], p2[0]}; y = '0; s = '0;
    end else begin
      x = p2; y = p1; s = sh_t'(P - 1);
    end
    for (int unsigned l = 0; l < P; l++) z[l] = (l >= s) ? x[l] : y[l];
  end

  circ_shifter #(.P(P), .W(WL)) u_shift (.din(z), .sh(s), .dout(rot));

  always_comb begin
    grp = rot;
    if (o_g == widx_t'(WPB - 1)) begin
      grp    = '0;
      grp[0] = e_reg;
    end
  end

endmodule
