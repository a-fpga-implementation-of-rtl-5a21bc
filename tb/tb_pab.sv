// tb_pab: self-checking testbench of the parallel adder block. Random column
// totals (7 bits) and old messages (6 bits) with random edge masks; each
// difference must equal the saturated Lq - R, empty edges give 0, and the
// parity flag must equal the XOR of the signs of the used column totals
// (only for a real row).
module tb_pab;
  import ldpc_pkg::*;

  logic [WMAX-1:0][WL-1:0] lq;
  logic [WMAX-1:0][WR-1:0] r_old, q;
  logic [WMAX-1:0] vld;
  logic row_vld, par_fail;
  logic clk = 1'b0;
  int checks = 0, failures = 0;

  pab dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 3000; rep++) begin
      int par;
      @(negedge clk);
      for (int e = 0; e < WMAX; e++) begin
        lq[e] = WL'($urandom);
        r_old[e] = WR'($urandom);
      end
      vld = (rep % 3 == 0) ? 8'h7f : 8'hff;
      row_vld = (rep % 5 != 0);
      #1;
      par = 0;
      for (int e = 0; e < WMAX; e++) begin
        int d, exp_q;
        d = int'($signed(lq[e])) - int'($signed(r_old[e]));
        exp_q = !vld[e] ? 0 : (d > 31 ? 31 : (d < -32 ? -32 : d));
        checks++;
        if (int'($signed(q[e])) != exp_q) begin
          failures++;
          if (failures < 5) $display("edge %0d: %0d vs %0d", e, $signed(q[e]), exp_q);
        end
        if (vld[e] && $signed(lq[e]) < 0) par ^= 1;
      end
      checks++;
      if (par_fail != (row_vld && par == 1)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
