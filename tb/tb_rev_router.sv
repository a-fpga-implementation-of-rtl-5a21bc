// tb_rev_router: self-checking testbench of the reverse router. For every
// block number random section words are applied; slot e must carry the word
// of the e-th connected section (block row s leaves out section 3 + s mod 6
// and, for s >= 6, also 3 + (s + 3) mod 6), so rows 0..5 fill 8 slots and
// rows 6..11 fill 7, the empty slot being marked and 0.
module tb_rev_router;
  import ldpc_pkg::*;

  blk_t blk;
  lword_t [NSEC-1:0] din;
  lword_t [WMAX-1:0] dout;
  logic [WMAX-1:0] slot_vld;
  logic clk = 1'b0;
  int checks = 0, failures = 0;

  rev_router dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 20; rep++)
      for (int s = 0; s < J; s++) begin
        int secs [$];
        @(negedge clk);
        blk = blk_t'(s);
        for (int k = 0; k < NSEC; k++)
          din[k] = lword_t'({$urandom, $urandom, $urandom, $urandom, $urandom, $urandom});
        #1;
        secs.delete();
        for (int k = 0; k < NSEC; k++)
          if (!(k == 3 + s % 6 || (s >= 6 && k == 3 + (s + 3) % 6))) secs.push_back(k);
        for (int e = 0; e < WMAX; e++) begin
          checks += 2;
          if (e < secs.size()) begin
            if (!slot_vld[e]) failures++;
            if (dout[e] !== din[secs[e]]) failures++;
          end else begin
            if (slot_vld[e]) failures++;
            if (dout[e] !== '0) failures++;
          end
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
