// tb_csb: self-checking testbench of one column sum block (section 3, two
// block columns, used by 9 of the 12 block rows). It loads random received
// values, then runs two decoding passes on the decoder's schedule, feeding
// random R groups from the "router":
//   pass 1 (no previous sums): every row-ordered Lq group must equal the
//          received values of columns (24g + l + offset) mod 337;
//   pass 2 (after the swap): it must equal sat(sum of pass-1 R + received),
//          where the sums are formed here column by column in block row
//          order with 7-bit saturation, the first block row of a column
//          starting the sum;
// and at the end the decoded-data port must return the signs of those Lq.
// Offsets are b^s * a^t mod 337 (a = 54, b = 72) computed here.
module tb_csb;
  import ldpc_pkg::*;

  localparam int SECN = 3;

  logic clk = 1'b0, rst;
  logic rd_en, o_en, swap, a_vld, ld_en;
  blk_t rd_blk, o_blk;
  widx_t rd_idx, o_g, ld_word, q_word;
  logic [1:0] ld_slot, q_slot;
  rword_t ld_data, r_grp;
  logic [P-1:0] q_hard;
  lword_t lq_grp;
  int checks = 0, failures = 0;

  csb #(.SEC(SECN)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int rx [2][M];
  int bsum [2][M];
  bit bstart [2][M];

  function automatic int pw(int x, int e);
    int r;
    r = 1;
    for (int i = 0; i < e; i++) r = (r * x) % M;
    return r;
  endfunction

  function automatic bit used(int s);
    return !(SECN == 3 + s % 6 || (s >= 6 && SECN == 3 + (s + 3) % 6));
  endfunction

  function automatic int sat7(int v);
    return v > 63 ? 63 : (v < -64 ? -64 : v);
  endfunction

  task automatic pass(bit second);
    for (int j = 0; j < 2; j++) for (int i = 0; i < M; i++) bstart[j][i] = 0;
    for (int c = 0; c < PASS_CYCLES; c++) begin
      @(negedge clk);
      rd_en = c < 180; rd_blk = blk_t'(c / 15); rd_idx = widx_t'(c % 15);
      o_en = c >= 2 && c < 182; o_blk = blk_t'((c - 2) / 15); o_g = widx_t'((c - 2) % 15);
      swap = !second && c == PASS_CYCLES - 1;
      a_vld = second;
      r_grp = rword_t'({$urandom, $urandom, $urandom, $urandom, $urandom});
      #1;
      if (o_en && used(int'(o_blk))) begin
        int s, slot, off;
        s = int'(o_blk);
        slot = (s + SECN) % 2;
        off = (pw(72, s) * pw(54, 12 + 2 * (SECN - 3) + slot)) % M;
        for (int l = 0; l < P; l++) begin
          int r, col, exp_v;
          r = int'(o_g) * P + l;
          if (r < M) begin
            col = (r + off) % M;
            exp_v = second ? sat7(bsum[slot][col] + rx[slot][col]) : rx[slot][col];
            checks++;
            if (int'($signed(lq_grp[l])) != exp_v) begin
              failures++;
              if (failures < 8) $display("pass %0d blk %0d g %0d lane %0d: %0d vs %0d",
                                         second, s, o_g, l, $signed(lq_grp[l]), exp_v);
            end
            if (!second) begin
              int v;
              v = int'($signed(r_grp[l]));
              bsum[slot][col] = bstart[slot][col] ? sat7(bsum[slot][col] + v) : v;
              bstart[slot][col] = 1;
            end
          end
        end
      end
    end
  endtask

  initial begin
    rst = 1; rd_en = 0; o_en = 0; swap = 0; a_vld = 0; ld_en = 0;
    rd_blk = '0; o_blk = '0; rd_idx = '0; o_g = '0; ld_word = '0; q_word = '0;
    ld_slot = '0; q_slot = '0; ld_data = '0; r_grp = '0;
    for (int j = 0; j < 2; j++) for (int i = 0; i < M; i++) rx[j][i] = $urandom_range(0, 63) - 32;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int j = 0; j < 2; j++)
      for (int w = 0; w < WPB; w++) begin
        @(negedge clk);
        ld_en = 1; ld_slot = 2'(j); ld_word = widx_t'(w);
        for (int l = 0; l < P; l++) ld_data[l] = (w * P + l < M) ? WR'(rx[j][w * P + l]) : '0;
      end
    @(negedge clk);
    ld_en = 0;
    pass(0);
    pass(1);
    @(negedge clk);
    rd_en = 0; o_en = 0; swap = 0;
    for (int j = 0; j < 2; j++)
      for (int w = 0; w < WPB; w++) begin
        q_slot = 2'(j); q_word = widx_t'(w);
        #1;
        for (int l = 0; l < P; l++)
          if (w * P + l < M) begin
            checks++;
            if (q_hard[l] != (sat7(bsum[j][w * P + l] + rx[j][w * P + l]) < 0)) failures++;
          end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
