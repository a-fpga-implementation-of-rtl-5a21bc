// tb_router: self-checking testbench of the router. For every block number
// random slot words are applied; section k must receive the word of the slot
// that serves it (the connected sections of a block row fill slots 0, 1, ...
// in section order; block row s leaves out section 3 + s mod 6 and, for
// s >= 6, also section 3 + (s + 3) mod 6), and unused sections get 0.
module tb_router;
  import ldpc_pkg::*;

  blk_t blk;
  rword_t [WMAX-1:0] din;
  rword_t [NSEC-1:0] dout;
  logic [NSEC-1:0] sec_vld;
  logic clk = 1'b0;
  int checks = 0, failures = 0;

  router dut (.*);

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
        int n;
        @(negedge clk);
        blk = blk_t'(s);
        for (int e = 0; e < WMAX; e++)
          din[e] = rword_t'({$urandom, $urandom, $urandom, $urandom, $urandom});
        #1;
        n = 0;
        for (int k = 0; k < NSEC; k++) begin
          bit used;
          used = !(k == 3 + s % 6 || (s >= 6 && k == 3 + (s + 3) % 6));
          checks++;
          if (sec_vld[k] != used) failures++;
          checks++;
          if (used) begin
            if (dout[k] !== din[n]) failures++;
            n++;
          end else if (dout[k] !== '0) failures++;
        end
        checks++;
        if (n != ((s < 6) ? 8 : 7)) failures++;
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
