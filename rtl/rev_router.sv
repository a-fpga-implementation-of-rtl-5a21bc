// rev_router: reverse router, the mirror of the router. It takes the
// row-ordered Lq words (WL = 7 bits per lane, wider than the router's 6 bits
// because they carry column sums) of the nine column sections and hands them
// to the eight PAB/PCUB edge slots through 9:1 multiplexers selected by the
// block number. slot_vld marks the slots a block row of weight 7 leaves empty.
// Purely combinational; the select tables come from ldpc_pkg.
module rev_router
  import ldpc_pkg::*;
(
  input  blk_t              blk,
  input  lword_t [NSEC-1:0] din,      // per section, P lanes
  output lword_t [WMAX-1:0] dout,     // per PCUB slot, P lanes
  output logic   [WMAX-1:0] slot_vld
);
  always_comb begin
    for (int unsigned e = 0; e < WMAX; e++) begin
      dout[e]     = din[sec_of_slot(int'(blk), e)];
      slot_vld[e] = slot_used(int'(blk), e);
      if (!slot_vld[e]) dout[e] = '0;
    end
  end
endmodule
