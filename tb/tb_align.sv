// tb_align: self-checking testbench of the alignment block. Blocks of random
// row-ordered groups are fed back to back as in the decoder (one group per
// cycle, deferred write of word A in the first cycle of the next block); the
// offsets include the corner cases 0, 1, 2, 23, 24, 335 and 336. Every
// written word is compared lane by lane with the message of row
// (24w + l - offset) mod 337, and each block must write each of its 15 words
// exactly once.
module tb_align;
  import ldpc_pkg::*;

  localparam int NBLK = 40;

  logic   clk = 1'b0;
  logic   rst;
  rword_t grp;
  logic   o_en, wb_en;
  widx_t  o_g, o_a;
  sh_t    o_d, wb_d;
  logic   wr_en;
  widx_t  wr_idx;
  rword_t wr_data;

  int checks = 0, failures = 0;
  int offs [NBLK];
  logic [WR-1:0] rows [NBLK][WPB * P];
  int writes [NBLK][WPB];

  align dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_word(int b, int idx);
    int w;
    w = (offs[b] / P + idx) % WPB;
    writes[b][w]++;
    for (int l = 0; l < P; l++) begin
      int col, r;
      col = w * P + l;
      if (col < M) begin
        r = (col - offs[b] + M) % M;
        checks++;
        if (wr_data[l] !== rows[b][r]) begin
          failures++;
          if (failures < 10)
            $display("mismatch blk %0d off %0d word %0d lane %0d: %0d vs %0d",
                     b, offs[b], w, l, wr_data[l], rows[b][r]);
        end
      end
    end
  endtask

  initial begin
    int corner [7] = '{0, 1, 2, 23, 24, 335, 336};
    for (int b = 0; b < NBLK; b++) begin
      offs[b] = (b < 7) ? corner[b] : int'($urandom_range(0, M - 1));
      for (int r = 0; r < WPB * P; r++) rows[b][r] = WR'($urandom);
      for (int w = 0; w < WPB; w++) writes[b][w] = 0;
    end
    rst = 1'b1; grp = '0; o_en = 0; wb_en = 0; o_g = '0; o_a = '0; o_d = '0; wb_d = '0;
    repeat (2) @(posedge clk);
    rst = 1'b0;
    for (int c = 0; c <= NBLK * WPB; c++) begin
      int b, g;
      b = c / WPB; g = c % WPB;
      @(negedge clk);
      o_en = (c < NBLK * WPB);
      wb_en = (c > 0) && (g == 0);
      if (c > 0) wb_d = sh_t'(offs[(c - 1) / WPB] % P);
      if (o_en) begin
        o_g = widx_t'(g); o_a = widx_t'(offs[b] / P); o_d = sh_t'(offs[b] % P);
        for (int l = 0; l < P; l++) grp[l] = rows[b][g * P + l];
      end else grp = rword_t'({$urandom, $urandom, $urandom, $urandom, $urandom});
      #1;
      if (wr_en) begin
        if (wb_en) begin
          checks++;
          if (wr_idx != 0) failures++;
          check_word(b - 1, 0);
        end else check_word(b, int'(wr_idx));
      end
    end
    for (int b = 0; b < NBLK; b++)
      for (int w = 0; w < WPB; w++) begin
        checks++;
        if (writes[b][w] != 1) begin
          failures++;
          $display("block %0d word %0d written %0d times", b, w, writes[b][w]);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
