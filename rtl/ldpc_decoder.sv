// ldpc_decoder: partly parallel decoder for the rate-1/2, 8088-bit irregular
// IPP LDPC code (m = 337, 12 x 24 block matrix H', parallel factor P = 24).
//
// Structure. Nine column sum blocks (CSBs), one per column section of H',
// keep the channel values and the column sums. In every cycle the controller
// names one group of 24 consecutive rows of one block row of H'. For that
// group each CSB delivers the row-ordered Lq values of its section; the
// reverse router hands them to the eight edge slots; 24 parallel adder blocks
// (PABs, one per row) subtract the old R messages read from the R memory and
// check the rows' parity; 24 parity check update blocks (PCUBs) compute the
// new R messages; the router returns them to the sections, whose alignment
// blocks accumulate them into the column sum memory of the current iteration.
// The same new R messages are written back to the R memory. The path from the
// reverse alignment registers to the column sum memory write is
// combinational, as in the described design (no pipeline registers around the
// PCUB).
//
// Interface.
//   load:   ld_en, ld_col (block column 0..23), ld_word (0..14) and ld_data
//           (24 LLRs of 6 bits, 2 fractional bits, positive = bit 0) write one
//           word of the received frame; word w lane l of block column t is
//           code bit 337t + 24w + l (lanes 1..23 of word 14 are unused).
//           Load only while busy = 0.
//   decode: start (one cycle, while idle); busy; done (one-cycle pulse);
//           converged (all parity checks held); iters (passes run, at most
//           MAX_ITER).
//   result: q_col, q_word select a word; q_hard gives its 24 hard decisions
//           from the decoded data memories (combinational; valid from done
//           until the next start, also while the next frame is loaded).
// Timing: 183 cycles per iteration; a frame takes iters x 183 cycles + 1.
module ldpc_decoder
  import ldpc_pkg::*;
#(
  parameter int unsigned MAX_ITER = 25
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         ld_en,
  input  logic [4:0]   ld_col,
  input  widx_t        ld_word,
  input  rword_t       ld_data,
  input  logic         start,
  output logic         busy,
  output logic         done,
  output logic         converged,
  output logic [$clog2(MAX_ITER+1)-1:0] iters,
  input  logic [4:0]   q_col,
  input  widx_t        q_word,
  output logic [P-1:0] q_hard
);
  // schedule
  logic       rd_en, o_en, swap, a_vld, par_fail;
  blk_t       rd_blk, o_blk;
  widx_t      rd_idx, o_g;
  logic [7:0] o_idx, rm_raddr;

  ldpc_ctrl #(.MAX_ITER(MAX_ITER)) u_ctrl (
    .clk, .rst, .start, .par_fail, .busy, .done, .converged, .iters,
    .rd_en, .rd_blk, .rd_idx, .o_en, .o_blk, .o_g, .o_idx, .rm_raddr, .swap, .a_vld
  );

  // column sum blocks
  lword_t [NSEC-1:0]     sec_lq;
  rword_t [NSEC-1:0]     sec_r;
  logic   [NSEC-1:0][P-1:0] sec_hard;

  for (genvar k = 0; k < NSEC; k++) begin : g_csb
    csb #(.SEC(k)) u_csb (
      .clk, .rst,
      .rd_en, .rd_blk, .rd_idx, .o_en, .o_blk, .o_g, .swap, .a_vld,
      .ld_en  (ld_en && sec_of_col(int'(ld_col)) == k),
      .ld_slot(2'(slot_in_sec(int'(ld_col)))),
      .ld_word,
      .ld_data,
      .q_slot (2'(slot_in_sec(int'(q_col)))),
      .q_word,
      .q_hard (sec_hard[k]),
      .lq_grp (sec_lq[k]),
      .r_grp  (sec_r[k])
    );
  end

  assign q_hard = sec_hard[sec_of_col(int'(q_col))];

  // reverse router -> PAB -> PCUB -> router
  lword_t [WMAX-1:0] slot_lq;
  logic   [WMAX-1:0] slot_vld;
  rword_t [WMAX-1:0] r_old, r_old_m, r_new;
  logic   [P-1:0]    lane_fail;
  logic   [NSEC-1:0] sec_vld;   // unused: each CSB has its own connection table

  rev_router u_rrouter (.blk(o_blk), .din(sec_lq), .dout(slot_lq), .slot_vld);

  r_mem u_rmem (
    .clk,
    .raddr(rm_raddr),
    .rdata(r_old),
    .we   (o_en),
    .waddr(o_idx),
    .wdata(r_new)
  );

  // no old messages exist in the first iteration
  assign r_old_m = a_vld ? r_old : '0;

  for (genvar l = 0; l < P; l++) begin : g_row
    logic [WMAX-1:0][WL-1:0] lq_l;
    logic [WMAX-1:0][WR-1:0] ro_l, q_l, rn_l;
    for (genvar e = 0; e < WMAX; e++) begin : g_e
      assign lq_l[e]     = slot_lq[e][l];
      assign ro_l[e]     = r_old_m[e][l];
      assign r_new[e][l] = rn_l[e];
    end
    pab u_pab (
      .lq      (lq_l),
      .r_old   (ro_l),
      .vld     (slot_vld),
      .row_vld (o_en && (o_g != widx_t'(WPB - 1) || l < LAST_LANES)),
      .q       (q_l),
      .par_fail(lane_fail[l])
    );
    pcub u_pcub (.q(q_l), .vld(slot_vld), .r(rn_l));
  end

  assign par_fail = |lane_fail;

  router u_router (.blk(o_blk), .din(r_new), .dout(sec_r), .sec_vld);

endmodule
