// pcub: parity check update block. Computes the check-to-variable messages
// R_mj of one check node (one row of H) from its 7 or 8 variable-to-check
// messages Lq_mj, in the log-domain belief propagation form
//   R_mj = prod_{n != j} sign(Lq_mn) * Psi( sum_{n != j} Psi(|Lq_mn|) ).
//
// How it works. Each two's complement input is turned into sign and magnitude
// (|-32| saturates to 31), so that one 32-entry, 5-bit Psi table per input is
// enough (Psi is symmetric). The eight table outputs are summed; for every
// edge its own term is subtracted, the result is clipped to 31 and passed
// through a second 32 x 5 Psi table (Psi is its own inverse). The sign is the
// XOR of all input signs with the edge's own sign removed. The result goes
// back to two's complement. Unused inputs (rows of weight 7) are marked by
// vld = 0: they add nothing to the sum or the sign, and their outputs are 0.
// 16 tables of 32 x 5 bits per PCUB, as in the decoder description.
//
// Purely combinational, one check node per cycle. The table contents
// (2 fractional bits, see ldpc_pkg) are this design's choice.
module pcub
  import ldpc_pkg::*;
(
  input  logic [WMAX-1:0][WR-1:0] q,    // variable-to-check messages
  input  logic [WMAX-1:0]         vld,  // input is a real edge
  output logic [WMAX-1:0][WR-1:0] r     // check-to-variable messages
);
  logic [WMAX-1:0]      sgn;
  logic [WMAX-1:0][4:0] mag, psi_in, psi_out;
  logic [7:0]           total;
  logic                 sgn_all;

  always_comb begin
    total   = '0;
    sgn_all = 1'b0;
    for (int unsigned e = 0; e < WMAX; e++) begin
      sgn[e] = q[e][WR-1];
      if (q[e] == 6'b100000)  mag[e] = 5'd31;
      else if (sgn[e])        mag[e] = 5'(-q[e]);
      else                    mag[e] = q[e][4:0];
      psi_in[e] = vld[e] ? PSI_LUT[mag[e]] : 5'd0;
      total   = total + 8'(psi_in[e]);
      sgn_all = sgn_all ^ (vld[e] & sgn[e]);
    end
    for (int unsigned e = 0; e < WMAX; e++) begin
      logic [7:0] ext;
      logic [4:0] idx;
      ext = total - 8'(psi_in[e]);
      idx = (ext > 8'd31) ? 5'd31 : ext[4:0];
      psi_out[e] = PSI_LUT[idx];
      if (!vld[e])                  r[e] = '0;
      else if (sgn_all ^ sgn[e])    r[e] = WR'(-$signed({1'b0, psi_out[e]}));
      else                          r[e] = WR'({1'b0, psi_out[e]});
    end
  end

endmodule
