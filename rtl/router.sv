// router: connects the eight PCUB edge slots to the nine column sections.
// Because each block row of H' has at most one connection per section, the
// routing is fixed for the whole block (m rows, 15 cycles) and changes only
// with the block number: every section takes its P-lane word of R messages
// from one of the 8 slots through an 8:1 multiplexer selected by the block
// number. sec_vld tells a section whether the block uses it at all.
// Purely combinational; the select tables come from ldpc_pkg. With this
// design's H' sections 0..2 are used by every block row and always take slots
// 0..2, so those outputs are plain wires and their sec_vld bits constants.
module router
  import ldpc_pkg::*;
(
  input  blk_t              blk,
  input  rword_t [WMAX-1:0] din,      // per PCUB slot, P lanes
  output rword_t [NSEC-1:0] dout,     // per section, P lanes
  output logic   [NSEC-1:0] sec_vld
);
  always_comb begin
    for (int unsigned k = 0; k < NSEC; k++) begin
      dout[k]    = din[pslot_of_sec(int'(blk), k)];
      sec_vld[k] = conn(int'(blk), k);
      if (!sec_vld[k]) dout[k] = '0;
    end
  end
endmodule
