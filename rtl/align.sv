// align: alignment block of a column sum block (CSB). It turns row-ordered
// groups of check-to-variable messages (R, WR = 6 bits) coming from the router
// into column-ordered memory words for accumulation: the word written for
// memory word w holds, in lane l, the message of row (24w + l - offset) mod 337.
//
// How it works. Groups 0..14 of a block arrive one per cycle. The memory words
// of the block are written in the order A+1, ..., 14, 0, ..., A-1 (write index
// 1..14, A = address offset) as soon as all their values have arrived: word
// index i needs groups i-1 and i (and i-2 once word 14 has passed, because of
// the gap closing). Word A (index 0) also needs the first and the last two
// groups: group 0 is kept in an external register G0 and word A is assembled
// and written in the following cycle, which is the first cycle of the next
// block, when no other word is written. Each word is formed by a per-lane
// concatenation mux and the circular shifter; the shift value is the
// p's complement of the reverse alignment's (24 - d), or 25 - d after word 14.
//
// Timing: a group arriving in a cycle with index g >= 1 gives a write in the
// same cycle (wr_en, wr_idx = g). wb_en (driven by the CSB one cycle after
// group 14) gives the deferred write of word A (wr_idx = 0). Combinational
// outputs from registers and the incoming group.
//
// Follows the description: write order, register for the first word, deferred
// write of the last word of the previous block, complement shift values.
// Own choices: the register set (Q1, Q2, G0) and the case split below.
module align
  import ldpc_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  rword_t grp,      // row-ordered group from the router
  input  logic   o_en,     // a group arrives in this cycle
  input  widx_t  o_g,      // its group index
  input  widx_t  o_a,      // address offset of its block
  input  sh_t    o_d,      // data offset of its block
  input  logic   wb_en,    // deferred write of word index 0 of the previous block
  input  sh_t    wb_d,     // data offset of the previous block
  output logic   wr_en,
  output widx_t  wr_idx,   // write index (word = (A + wr_idx) mod 15)
  output rword_t wr_data
);
  rword_t q1, q2, g0;
  rword_t x, y, z;
  sh_t    s;
  widx_t  idx14;

  always_ff @(posedge clk) begin
    if (rst) begin
      q1 <= '0; q2 <= '0; g0 <= '0;
    end else begin
      q1 <= grp;
      q2 <= q1;
      if (o_en && o_g == 0) g0 <= grp;
    end
  end

  always_comb begin
    idx14  = widx_t'(WPB - 1) - o_a;
    x = grp; y = q1; s = '0;
    wr_en  = 1'b0;
    wr_idx = o_g;
    if (wb_en) begin
      // word A: tail of group 13, the value of group 14, head of group 0
      wr_en  = 1'b1;
      wr_idx = '0;
      if (wb_d == 0) begin
        x = g0; s = '0;
      end else if (wb_d == 1) begin
        x = {g0[P-2:0], q1[0]}; s = '0;
      end else begin
        x = q2; y = {g0[P-2:0], q1[0]}; s = sh_t'(P + 1 - 32'(wb_d));
      end
    end else if (o_en && o_g != 0) begin
      wr_en = 1'b1;
      if (o_g <= idx14) begin
        if (o_d == 0) begin
          x = grp; s = '0;
        end else begin
          x = q1; y = grp; s = sh_t'(P - 32'(o_d));
        end
      end else begin
        if (o_d == 0) begin
          x = q1; y = grp; s = sh_t'(1);
        end else if (o_d == 1) begin
          x = q1; y = grp; s = '0;
        end else begin
          x = q2; y = q1; s = sh_t'(P + 1 - 32'(o_d));
        end
      end
    end
    for (int unsigned l = 0; l < P; l++) z[l] = (l >= s) ? x[l] : y[l];
  end

  circ_shifter #(.P(P), .W(WR)) u_shift (.din(z), .sh(s), .dout(wr_data));

endmodule
