// tb_sp_ram -- self-checking testbench of the single-port RAM used for
// the PE memory banks (default size: 640 words of 8 bits).  Writes random
// words to random addresses, reads them back against a reference array,
// and checks read-first behaviour, one-cycle read latency and that rdata
// holds while the RAM is not enabled.
module tb_sp_ram;
  localparam int unsigned DEPTH = 640;
  localparam int unsigned WIDTH = 8;
  localparam int unsigned AW    = $clog2(DEPTH);

  logic clk = 1'b0, en = 1'b0, we = 1'b0;
  logic [AW-1:0] addr = '0;
  logic [WIDTH-1:0] wdata = '0, rdata;

  sp_ram dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [WIDTH-1:0] ref_mem [DEPTH];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    // fill every word
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk); en = 1; we = 1; addr = AW'(a); wdata = WIDTH'($urandom);
      ref_mem[a] = wdata;
    end
    @(negedge clk); en = 0; we = 0;
    // random reads and read-first writes
    for (int t = 0; t < 2000; t++) begin
      int unsigned a;
      logic [WIDTH-1:0] old;
      a = $urandom_range(DEPTH - 1, 0);
      @(negedge clk); en = 1; we = ($urandom_range(1, 0) == 1); addr = AW'(a);
      wdata = WIDTH'($urandom);
      old = ref_mem[a];
      if (we) ref_mem[a] = wdata;
      @(negedge clk); en = 0; we = 0;
      check(rdata == old, $sformatf("read of %0d", a));
      @(negedge clk);
      check(rdata == old, "rdata holds while idle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
