// ldpc_ctrl: decoder controller. It runs the decoding passes (iterations) and
// produces the common schedule that all blocks follow.
//
// One pass lasts PASS_CYCLES = 12 x 15 + 3 = 183 cycles, counted by c:
//   read stage    c = 0..179    block rd_blk = c / 15, read index c mod 15
//   group stage   c = 2..181    block o_blk, group o_g of (c - 2): reverse
//                               router, PAB, PCUB, router and alignment act on
//                               this group in the same cycle; o_idx = c - 2 is
//                               the R memory word, rm_raddr = c - 1 is issued
//                               one cycle ahead for its registered read
//   c = 182                     deferred write of the last word of block 11
// The block number selects all router multiplexers; it changes every
// ceil(m/p) = 15 cycles. par_fail (OR of the PAB parity checks of the group
// stage) is collected over the pass. At the end of a pass: if every parity
// check held, decoding stops without swapping, so the column sums that passed
// the check stay readable (early stopping, converged = 1); otherwise the
// column sum memories swap (a_vld = 1 from then on) and, unless MAX_ITER
// passes are done, the next pass starts at once.
//
// Interface: start (pulse, when idle) begins a frame; busy is high while
// decoding; done pulses for one cycle at the end; iters is the number of
// passes run and converged tells how decoding ended. The pass length (the
// document gives 15 x 12 + 2 = 182) carries one extra cycle because the last
// word of the last block is written after its last group (design choice).
module ldpc_ctrl
  import ldpc_pkg::*;
#(
  parameter int unsigned MAX_ITER = 25
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       start,
  input  logic       par_fail,
  output logic       busy,
  output logic       done,
  output logic       converged,
  output logic [$clog2(MAX_ITER+1)-1:0] iters,
  // schedule
  output logic       rd_en,
  output blk_t       rd_blk,
  output widx_t      rd_idx,
  output logic       o_en,
  output blk_t       o_blk,
  output widx_t      o_g,
  output logic [7:0] o_idx,
  output logic [7:0] rm_raddr,
  output logic       swap,
  output logic       a_vld
);
  logic [7:0] c;
  logic       fail_acc;
  logic       last;

  always_comb begin
    rd_en    = busy && c < 8'(J * WPB);
    rd_blk   = blk_t'(32'(c) / WPB);
    rd_idx   = widx_t'(32'(c) % WPB);
    o_en     = busy && c >= 8'd2 && c < 8'(J * WPB + 2);
    o_idx    = c - 8'd2;
    o_blk    = blk_t'(32'(o_idx) / WPB);
    o_g      = widx_t'(32'(o_idx) % WPB);
    rm_raddr = (c >= 8'd1) ? c - 8'd1 : 8'd0;
    last     = busy && c == 8'(PASS_CYCLES - 1);
    swap     = last && (fail_acc || par_fail);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      c <= '0; busy <= 1'b0; done <= 1'b0; converged <= 1'b0;
      iters <= '0; fail_acc <= 1'b0; a_vld <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy <= 1'b1; c <= '0; iters <= '0; fail_acc <= 1'b0;
          a_vld <= 1'b0; converged <= 1'b0;
        end
      end else begin
        fail_acc <= fail_acc | (o_en & par_fail);
        if (!last) c <= c + 8'd1;
        else begin
          iters    <= iters + 1'b1;
          c        <= '0;
          fail_acc <= 1'b0;
          if (!swap) begin
            busy <= 1'b0; done <= 1'b1; converged <= 1'b1;
          end else begin
            a_vld <= 1'b1;
            if (32'(iters) + 1 >= MAX_ITER) begin
              busy <= 1'b0; done <= 1'b1; converged <= 1'b0;
            end
          end
        end
      end
    end
  end

  // a new frame is only accepted when the decoder is idle
  assert property (@(posedge clk) disable iff (rst) start |-> !busy)
    else $error("start while busy is ignored");

endmodule
