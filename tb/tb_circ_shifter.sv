// tb_circ_shifter: self-checking testbench of the 24-lane circular shifter.
// Every shift value 0..23 is applied to random words of 7-bit lanes and each
// output lane is compared with din[(k + sh) mod 24].
module tb_circ_shifter;
  localparam int P = 24;
  localparam int W = 7;

  logic [P-1:0][W-1:0] din, dout;
  logic [4:0] sh;
  logic clk = 1'b0;
  int checks = 0, failures = 0;

  circ_shifter #(.P(P), .W(W)) dut (.din, .sh, .dout);

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
      for (int s = 0; s < P; s++) begin
        @(negedge clk);
        for (int l = 0; l < P; l++) din[l] = W'($urandom);
        sh = 5'(s);
        #1;
        for (int k = 0; k < P; k++) begin
          checks++;
          if (dout[k] !== din[(k + s) % P]) begin
            failures++;
            if (failures < 5) $display("sh %0d lane %0d: %0d vs %0d", s, k, dout[k], din[(k + s) % P]);
          end
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
