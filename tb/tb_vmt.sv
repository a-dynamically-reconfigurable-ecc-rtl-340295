// tb_vmt -- self-checking testbench of the virtual mapping table at its
// default size (PE = 8 read ports, 5120 entries of 3 bits).  Writes a bank
// number for every element, then reads PE random elements per cycle and
// compares with a reference copy; also checks the one-cycle read latency
// and old-value return on a same-cycle write.
module tb_vmt;
  localparam int unsigned PE   = 8;
  localparam int unsigned KMAX = 5120;
  localparam int unsigned BW   = $clog2(PE);
  localparam int unsigned DIW  = $clog2(KMAX);

  logic clk = 1'b0, we = 1'b0, rd_en = 1'b0;
  logic [DIW-1:0] waddr = '0;
  logic [BW-1:0] wdata = '0;
  logic [DIW-1:0] raddr [PE];
  logic [BW-1:0] rdata [PE];

  vmt dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [BW-1:0] ref_mem [KMAX];
  logic [BW-1:0] expv [PE];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    for (int j = 0; j < PE; j++) raddr[j] = '0;
    for (int d = 0; d < KMAX; d++) begin
      @(negedge clk); we = 1; waddr = DIW'(d); wdata = BW'($urandom);
      ref_mem[d] = wdata;
    end
    @(negedge clk); we = 0;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      rd_en = 1;
      for (int j = 0; j < PE; j++) begin
        raddr[j] = DIW'($urandom_range(KMAX - 1, 0));
        expv[j]  = ref_mem[raddr[j]];
      end
      // overwrite the element read by PE 0 in the same cycle
      we = (t % 3 == 0); waddr = raddr[0]; wdata = BW'($urandom);
      if (we) ref_mem[waddr] = wdata;
      @(negedge clk); rd_en = 0; we = 0;
      for (int j = 0; j < PE; j++)
        check(rdata[j] == expv[j], $sformatf("port %0d read", j));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
