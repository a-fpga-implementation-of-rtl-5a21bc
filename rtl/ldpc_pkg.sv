// ldpc_pkg: shared constants, word types and code-structure tables of the
// rate-1/2, 8088-bit irregular partitioned-permutation (IPP) LDPC decoder.
//
// Code structure. The parity check matrix H is built from a small block matrix
// H' of J x K = 12 x 24 entries; every non-zero entry (s,t) of H' becomes an
// M x M (M = 337, prime) identity matrix circularly shifted by
//   offset(s,t) = b^s * a^t mod M,
// where a = 54 has multiplicative order K = 24 and b = 72 has order J = 12
// modulo 337. Row r of block row s is connected to column (r + offset) mod M
// of block column t. The 24 block columns are split into NSEC = 9 column
// sections; each block row has at most one connection per section, and
// 7 or 8 connections in all (maximum row weight WMAX = 8).
//
// The H' used here is this design's own choice (sections of width
// 4,4,4,2,2,2,2,2,2; every block row uses sections 0..2; block row s skips
// section 3 + (s mod 6), and rows 6..11 also skip section 3 + ((s+3) mod 6);
// the slot inside a section is (s + k) mod width). It keeps every structural
// property the decoder relies on: 9 sections, one connection per section per
// row, row weights 7 and 8, irregular column weights (3, 4 and 5).
//
// Memory layout. P = 24 consecutive rows are processed per clock cycle.
// A block column of M = 337 values is stored as WPB = ceil(M/P) = 15 words of
// P lanes; word w lane l holds column 24w + l. Word 14 holds only one valid
// lane (column 336); its other lanes are dummies. Likewise the 15th row group
// of a block row holds only row 336.
//
// Fixed point. Messages are two's complement with 2 fractional bits:
// received LLRs and check-to-variable messages R are 6 bits (WR), column sums
// and Lq are 7 bits (WL). A positive LLR means bit 0.
package ldpc_pkg;

  localparam int unsigned M      = 337;  // permutation size (prime)
  localparam int unsigned P      = 24;   // parallel factor (rows per cycle)
  localparam int unsigned J      = 12;   // block rows of H'
  localparam int unsigned K      = 24;   // block columns of H'
  localparam int unsigned NSEC   = 9;    // column sections (CSBs)
  localparam int unsigned WMAX   = 8;    // maximum row weight of H'
  localparam int unsigned WR     = 6;    // received data / R message width
  localparam int unsigned WL     = 7;    // column sum / Lq width
  localparam int unsigned WPB    = (M + P - 1) / P;  // words per block = 15
  localparam int unsigned GEN_A  = 54;   // order K modulo M
  localparam int unsigned GEN_B  = 72;   // order J modulo M
  localparam int unsigned MAXSW  = 4;    // widest section (block columns)
  localparam int unsigned SDEPTH = WPB * MAXSW;   // 60 words per section memory
  localparam int unsigned LAST_LANES = M - (WPB - 1) * P;  // 1 valid lane in word 14
  // clock cycles of one decoding pass: 12 blocks of 15 cycles, 2 cycles of
  // alignment latency and 1 cycle for the deferred last write
  localparam int unsigned PASS_CYCLES = J * WPB + 3;

  typedef logic [P-1:0][WR-1:0] rword_t;   // P messages of WR bits
  typedef logic [P-1:0][WL-1:0] lword_t;   // P column sums of WL bits
  typedef logic [$clog2(J)-1:0]    blk_t;  // block row number
  typedef logic [$clog2(WPB)-1:0]  widx_t; // word / group index 0..14
  typedef logic [$clog2(P)-1:0]    sh_t;   // shift value 0..23
  typedef logic [$clog2(SDEPTH)-1:0] saddr_t;

  // ---------------------------------------------------------------- H' shape
  function automatic int unsigned sec_width(int unsigned k);
    return (k < 3) ? 4 : 2;
  endfunction

  function automatic int unsigned sec_base(int unsigned k);
    return (k < 3) ? 4 * k : 12 + 2 * (k - 3);
  endfunction

  // block row s has a connection in section k
  function automatic bit conn(int unsigned s, int unsigned k);
    if (k < 3) return 1'b1;
    if (k == 3 + (s % 6)) return 1'b0;
    if (s >= 6 && k == 3 + ((s + 3) % 6)) return 1'b0;
    return 1'b1;
  endfunction

  // slot (block column inside the section) used by block row s in section k
  function automatic int unsigned slot_of(int unsigned s, int unsigned k);
    return (s + k) % sec_width(k);
  endfunction

  function automatic int unsigned col_of(int unsigned s, int unsigned k);
    return sec_base(k) + slot_of(s, k);
  endfunction

  function automatic int unsigned powmod(int unsigned x, int unsigned e);
    int unsigned r;
    r = 1;
    for (int unsigned i = 0; i < e; i++) r = (r * x) % M;
    return r;
  endfunction

  // circulant shift of entry (s, t) of H'
  function automatic int unsigned offset_of(int unsigned s, int unsigned t);
    return (powmod(GEN_B, s) * powmod(GEN_A, t)) % M;
  endfunction

  // block row s is the first (lowest) block row connected to its block column
  // in section k: its contribution starts the column sum instead of adding
  function automatic bit first_in_col(int unsigned s, int unsigned k);
    for (int unsigned q = 0; q < s; q++)
      if (conn(q, k) && slot_of(q, k) == slot_of(s, k)) return 1'b0;
    return 1'b1;
  endfunction

  // PCUB input slot e of block row s is fed by this section (connected
  // sections are packed into slots in increasing section order)
  function automatic int unsigned sec_of_slot(int unsigned s, int unsigned e);
    int unsigned n;
    n = 0;
    for (int unsigned k = 0; k < NSEC; k++)
      if (conn(s, k)) begin
        if (n == e) return k;
        n++;
      end
    return 0;
  endfunction

  function automatic bit slot_used(int unsigned s, int unsigned e);
    int unsigned n;
    n = 0;
    for (int unsigned k = 0; k < NSEC; k++) if (conn(s, k)) n++;
    return e < n;
  endfunction

  // PCUB slot that serves section k for block row s
  function automatic int unsigned pslot_of_sec(int unsigned s, int unsigned k);
    int unsigned n;
    n = 0;
    for (int unsigned q = 0; q < k; q++) if (conn(s, q)) n++;
    return n;
  endfunction

  // section that holds block column t, and the slot inside it
  function automatic int unsigned sec_of_col(int unsigned t);
    return (t < 12) ? t / 4 : 3 + (t - 12) / 2;
  endfunction

  function automatic int unsigned slot_in_sec(int unsigned t);
    return (t < 12) ? t % 4 : (t - 12) % 2;
  endfunction

  // ------------------------------------------------------------ arithmetic
  // Psi LUT: |x| -> round(4 * -ln(tanh(|x|/2))) with x in steps of 1/4;
  // Psi is its own inverse. Entry 0 (infinity) is clipped to 12 (3.0): a check
  // whose other inputs are all certain then returns 3.0 instead of the
  // largest magnitude, which keeps the 6-bit fixed-point decoder from locking
  // onto wrong decisions (a design choice; with 31 it fails to converge).
  localparam logic [4:0] PSI_LUT [32] = '{
    5'd12, 5'd8, 5'd6, 5'd4, 5'd3, 5'd2, 5'd2, 5'd1,
    5'd1,  5'd1, 5'd1, 5'd1, 5'd0, 5'd0, 5'd0, 5'd0,
    5'd0,  5'd0, 5'd0, 5'd0, 5'd0, 5'd0, 5'd0, 5'd0,
    5'd0,  5'd0, 5'd0, 5'd0, 5'd0, 5'd0, 5'd0, 5'd0
  };

  function automatic logic [WL-1:0] sat_wl(int v);
    if (v > 63) return 7'sd63;
    if (v < -64) return -7'sd64;
    return WL'(v);
  endfunction

  function automatic logic [WR-1:0] sat_wr(int v);
    if (v > 31) return 6'sd31;
    if (v < -32) return -6'sd32;
    return WR'(v);
  endfunction

  // ------------------------------------------------ per-section block tables
  // Elaborated once per column section; indexed by block row at run time.
  typedef logic [8:0] off_tab_t [J];
  typedef logic [1:0] slot_tab_t [J];
  typedef logic [J-1:0] flag_tab_t;

  function automatic off_tab_t off_table(int unsigned k);
    off_tab_t t;
    for (int unsigned s = 0; s < J; s++) t[s] = 9'(offset_of(s, col_of(s, k)));
    return t;
  endfunction

  function automatic slot_tab_t slot_table(int unsigned k);
    slot_tab_t t;
    for (int unsigned s = 0; s < J; s++) t[s] = 2'(slot_of(s, k));
    return t;
  endfunction

  function automatic flag_tab_t conn_table(int unsigned k);
    flag_tab_t t;
    for (int unsigned s = 0; s < J; s++) t[s] = conn(s, k);
    return t;
  endfunction

  function automatic flag_tab_t first_table(int unsigned k);
    flag_tab_t t;
    for (int unsigned s = 0; s < J; s++) t[s] = first_in_col(s, k);
    return t;
  endfunction

  // (a + b) mod WPB for a, b < WPB
  function automatic logic [3:0] wadd(logic [3:0] a, logic [3:0] b);
    logic [4:0] t;
    t = 5'(a) + 5'(b);
    return (t >= 5'(WPB)) ? 4'(t - 5'(WPB)) : t[3:0];
  endfunction

endpackage
