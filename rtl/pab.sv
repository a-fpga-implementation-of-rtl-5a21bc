// pab: parallel adder block for one row of H. It forms the variable-to-check
// messages Lq_mj = Lq_j - R_mj (saturated to WR = 6 bits) for the 7 or 8
// edges of the row, from the column totals Lq_j (WL = 7 bits, arriving from the
// reverse router) and the previous iteration's R_mj (from the R memory), and
// checks the row's parity equation on the hard decisions of Lq_j
// (bit = 1 when Lq_j < 0) for early stopping.
//
// Purely combinational. par_fail is 1 when the row is a real row
// (row_vld) and the XOR of the hard decisions of its real edges is 1.
// Unused edges (vld = 0) give q = 0 and take no part in the check.
// Saturation of the difference is this design's choice.
module pab
  import ldpc_pkg::*;
(
  input  logic [WMAX-1:0][WL-1:0] lq,
  input  logic [WMAX-1:0][WR-1:0] r_old,
  input  logic [WMAX-1:0]         vld,
  input  logic                    row_vld,
  output logic [WMAX-1:0][WR-1:0] q,
  output logic                    par_fail
);
  always_comb begin
    logic par;
    par = 1'b0;
    for (int unsigned e = 0; e < WMAX; e++) begin
      q[e] = vld[e] ? sat_wr(int'($signed(lq[e])) - int'($signed(r_old[e]))) : '0;
      par  = par ^ (vld[e] & lq[e][WL-1]);
    end
    par_fail = row_vld & par;
  end
endmodule
