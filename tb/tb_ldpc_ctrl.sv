// tb_ldpc_ctrl: self-checking testbench of the decoder controller, with the
// iteration limit lowered to 4. It checks the schedule of every pass (read
// stage c = 0..179 with block c / 15 and index c mod 15, group stage two
// cycles later, R memory read address one cycle ahead), the pass length of
// 183 cycles, swapping only after failed passes, a_vld, and the three ways a
// frame ends: all checks hold in a pass (early stop), failure only in one
// late group of the first pass, and the iteration limit.
module tb_ldpc_ctrl;
  import ldpc_pkg::*;

  localparam int MAXI = 4;

  logic clk = 1'b0, rst, start, par_fail, busy, done, converged;
  logic [$clog2(MAXI+1)-1:0] iters;
  logic rd_en, o_en, swap, a_vld;
  blk_t rd_blk, o_blk;
  widx_t rd_idx, o_g;
  logic [7:0] o_idx, rm_raddr;
  int checks = 0, failures = 0;

  ldpc_ctrl #(.MAX_ITER(MAXI)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // fail_mode 0: every group fails; 1: fail in the first npass passes;
  // 2: only group (11, 14) of the first pass fails
  task automatic run(int fail_mode, int npass, int exp_iters, bit exp_conv);
    int c, pass, nswap, cycles;
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    c = 0; pass = 0; nswap = 0; cycles = 0;
    while (!done) begin
      // schedule checks for cycle c of the pass
      checks += 4;
      if (rd_en != (c < 180)) failures++;
      if (rd_en && (rd_blk != blk_t'(c / 15) || rd_idx != widx_t'(c % 15))) failures++;
      if (o_en != (c >= 2 && c < 182)) failures++;
      if (o_en && (o_blk != blk_t'((c - 2) / 15) || o_g != widx_t'((c - 2) % 15) ||
                   o_idx != 8'(c - 2) || rm_raddr != 8'(c - 1))) failures++;
      checks++;
      if (a_vld != (pass > 0)) failures++;
      case (fail_mode)
        0: par_fail = o_en;
        1: par_fail = o_en && pass < npass;
        default: par_fail = o_en && pass == 0 && o_blk == 11 && o_g == 14;
      endcase
      #1;
      if (swap) nswap++;
      @(negedge clk);
      cycles++;
      c++;
      if (c == PASS_CYCLES) begin c = 0; pass++; end
    end
    par_fail = 0;
    checks += 4;
    if (int'(iters) != exp_iters) begin failures++; $display("iters %0d exp %0d", iters, exp_iters); end
    if (converged != exp_conv) failures++;
    if (cycles != exp_iters * PASS_CYCLES) begin failures++; $display("cycles %0d", cycles); end
    if (nswap != (exp_conv ? exp_iters - 1 : exp_iters)) begin failures++; $display("swaps %0d", nswap); end
    @(negedge clk);
    checks++;
    if (busy || done) failures++;
  endtask

  initial begin
    rst = 1; start = 0; par_fail = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    run(0, 0, MAXI, 0);
    run(1, 2, 3, 1);
    run(2, 0, 2, 1);
    run(1, 0, 1, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
