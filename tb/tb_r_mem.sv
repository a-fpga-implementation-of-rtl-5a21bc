// tb_r_mem: self-checking testbench of the R storage memory. It writes every
// one of the 180 words with random data while reading, checks the one-cycle
// read latency, then reads everything back in random order.
module tb_r_mem;
  import ldpc_pkg::*;

  localparam int D = J * WPB;

  logic clk = 1'b0;
  logic [7:0] raddr, waddr;
  rword_t [WMAX-1:0] rdata, wdata;
  logic we;
  rword_t [WMAX-1:0] model [D];
  int checks = 0, failures = 0;

  r_mem dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic rword_t [WMAX-1:0] rnd();
    rword_t [WMAX-1:0] v;
    for (int e = 0; e < WMAX; e++)
      v[e] = rword_t'({$urandom, $urandom, $urandom, $urandom, $urandom});
    return v;
  endfunction

  initial begin
    we = 0; raddr = '0; waddr = '0; wdata = '0;
    for (int a = 0; a < D; a++) begin
      @(negedge clk);
      we = 1; waddr = 8'(a); wdata = rnd(); model[a] = wdata;
      raddr = 8'(a);    // same-address read returns the old word
    end
    @(negedge clk);
    we = 0;
    for (int i = 0; i < 400; i++) begin
      int a;
      a = $urandom_range(0, D - 1);
      raddr = 8'(a);
      @(negedge clk);
      checks++;
      if (rdata !== model[a]) begin
        failures++;
        if (failures < 5) $display("word %0d differs", a);
      end
      // one cycle of latency: the new address is not visible before the edge
      raddr = 8'((a + 1) % D);
      #1;
      checks++;
      if (rdata !== model[a]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
