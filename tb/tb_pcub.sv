// tb_pcub: self-checking testbench of the parity check update block. Random
// variable-to-check messages (including -32 and 0) and random edge masks of
// weight 7 and 8 are applied; every output is compared with the log-domain
// check node rule evaluated here from the Psi table formula
// round(4 * -ln(tanh(x/8))) (entry 0 clipped to 12), and the outputs of empty
// slots must be 0. One case is also worked out by hand.
module tb_pcub;
  import ldpc_pkg::*;

  logic [WMAX-1:0][WR-1:0] q, r;
  logic [WMAX-1:0] vld;
  logic clk = 1'b0;
  int checks = 0, failures = 0;
  int tbl [32];

  pcub dut (.q, .vld, .r);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int psi(int x);
    return tbl[x];
  endfunction

  task automatic check_all();
    int v [WMAX], ps [WMAX], tot, neg, exp_r;
    tot = 0; neg = 0;
    for (int e = 0; e < WMAX; e++) begin
      v[e] = int'($signed(q[e]));
      ps[e] = vld[e] ? psi((v[e] < -31) ? 31 : (v[e] < 0 ? -v[e] : v[e])) : 0;
      tot += ps[e];
      if (vld[e] && v[e] < 0) neg++;
    end
    for (int e = 0; e < WMAX; e++) begin
      int x, m, n;
      x = tot - ps[e];
      m = psi(x > 31 ? 31 : x);
      n = neg - ((vld[e] && v[e] < 0) ? 1 : 0);
      exp_r = !vld[e] ? 0 : ((n % 2) ? -m : m);
      checks++;
      if (int'($signed(r[e])) != exp_r) begin
        failures++;
        if (failures < 6) $display("edge %0d: %0d vs %0d", e, $signed(r[e]), exp_r);
      end
    end
  endtask

  initial begin
    tbl[0] = 12;
    for (int i = 1; i < 32; i++) begin
      real x;
      x = real'(i) / 4.0;
      tbl[i] = int'(4.0 * -$ln((1.0 - $exp(-x)) / (1.0 + $exp(-x))));
      if (tbl[i] > 31) tbl[i] = 31;
    end
    // hand case: seven inputs of +1.0 (4), one of -0.5 (-2), all used:
    // psi(4) = 3, psi(2) = 6; edge 0 sees 6*3 + 6 = 24 -> psi(24) = 0, sign -;
    // edge 7 sees 7*3 = 21 -> 0, sign +
    @(negedge clk);
    for (int e = 0; e < WMAX; e++) q[e] = 6'd4;
    q[7] = 6'h3e;
    vld = '1;
    #1;
    checks++;
    if (r[0] !== 6'd0 || r[7] !== 6'd0) failures++;
    check_all();
    // hand case: two used edges, +0.25 and -0.25: psi(1) = 8, psi(8) = 1,
    // so each edge gets magnitude 0.25 with the other edge's sign
    @(negedge clk);
    q = '0; vld = 8'b0000_0011; q[0] = 6'd1; q[1] = 6'h3f;
    #1;
    checks++;
    if (r[0] !== 6'h3f || r[1] !== 6'd1) begin
      failures++;
      $display("hand case 2: r0 %0d r1 %0d", $signed(r[0]), $signed(r[1]));
    end
    check_all();
    for (int rep = 0; rep < 3000; rep++) begin
      @(negedge clk);
      for (int e = 0; e < WMAX; e++) q[e] = WR'($urandom);
      if (rep % 50 == 0) q[$urandom_range(0, WMAX - 1)] = 6'b100000;
      vld = (rep % 2) ? 8'hff : 8'h7f;
      if (rep % 7 == 0) vld = 8'hfe;
      #1;
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
