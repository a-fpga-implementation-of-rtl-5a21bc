// tb_rev_align: self-checking testbench of the reverse alignment block.
// Runs a sequence of blocks back to back, exactly as the decoder schedules
// them (reads one word per cycle, groups two cycles later), each block with
// its own random memory contents and offset; the offsets include the corner
// cases 0, 1, 23, 24, 335 and 336. Every valid output lane is compared with
// the column value picked directly by (24g + l + offset) mod 337.
module tb_rev_align;
  import ldpc_pkg::*;

  localparam int NBLK = 40;

  logic   clk = 1'b0;
  logic   rst;
  lword_t rd_word;
  logic   rd_first, o_en;
  widx_t  o_g, o_a;
  sh_t    o_d;
  lword_t grp;

  int checks = 0, failures = 0;
  int offs [NBLK];
  logic [WL-1:0] mem [NBLK][WPB][P];

  rev_align dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int corner [6] = '{0, 1, 23, 24, 335, 336};
    for (int b = 0; b < NBLK; b++) begin
      offs[b] = (b < 6) ? corner[b] : int'($urandom_range(0, M - 1));
      for (int w = 0; w < WPB; w++)
        for (int l = 0; l < P; l++) mem[b][w][l] = WL'($urandom);
    end
    rst = 1'b1; rd_word = '0; rd_first = 0; o_en = 0; o_g = '0; o_a = '0; o_d = '0;
    repeat (2) @(posedge clk);
    rst = 1'b0;
    for (int c = 0; c < NBLK * WPB + 2; c++) begin
      int rb, ri, ob, og;
      rb = c / WPB; ri = c % WPB;
      ob = (c - 2) / WPB; og = (c - 2) % WPB;
      @(negedge clk);
      rd_first = (c < NBLK * WPB) && (ri == 0);
      if (c < NBLK * WPB) begin
        int w;
        w = (offs[rb] / P + ri) % WPB;
        for (int l = 0; l < P; l++) rd_word[l] = mem[rb][w][l];
      end else rd_word = lword_t'({$urandom, $urandom, $urandom, $urandom, $urandom, $urandom});
      o_en = (c >= 2);
      if (c >= 2) begin
        o_g = widx_t'(og); o_a = widx_t'(offs[ob] / P); o_d = sh_t'(offs[ob] % P);
      end
      #1;
      if (c >= 2) begin
        for (int l = 0; l < P; l++) begin
          int r, col;
          r = og * P + l;
          if (r < M) begin
            col = (r + offs[ob]) % M;
            checks++;
            if (grp[l] !== mem[ob][col / P][col % P]) begin
              failures++;
              if (failures < 10)
                $display("mismatch blk %0d off %0d g %0d lane %0d: %0d vs %0d",
                         ob, offs[ob], og, l, grp[l], mem[ob][col / P][col % P]);
            end
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
