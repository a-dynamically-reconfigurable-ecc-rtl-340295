// tb_cmd_gen -- self-checking testbench of the command generator at its
// default size (PE = 8, KMAX = 5120).
//
// Behavioural interleaver table and mapping table models answer its read
// ports with one cycle of latency.  For block lengths 40, 256 and 5120, in
// natural and interleaved order, it checks each command word (bank of the
// element of every PE) and address word (element mod n) against values
// computed here, the write flag, the step sequence 0..n-1 at one step per
// cycle, and the two-cycle distance from issue to command.  The worked
// example is included: at the first interleaved step of the 40-element
// block the addresses of elements 39 and 35 are 4 and 0.
module tb_cmd_gen;
  import ecc_pkg::*;

  localparam int unsigned PE   = 8;
  localparam int unsigned KMAX = 5120;
  localparam int unsigned BW   = $clog2(PE);
  localparam int unsigned DIW  = $clog2(KMAX);
  localparam int unsigned RW   = $clog2(KMAX / PE);

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, write = 1'b0;
  order_e order = ORDER_NAT;
  logic [RW:0] n_len = '0;
  logic busy, issue_valid, pi_rd_en, vmt_rd_en, cmd_valid, cmd_we;
  logic [RW-1:0] issue_step, pi_rd_addr, cmd_step;
  logic [DIW-1:0] pi_rd_data [PE];
  logic [DIW-1:0] vmt_raddr [PE];
  logic [BW-1:0] vmt_rdata [PE];
  logic [BW-1:0] cmd_bank [PE];
  logic [RW-1:0] cmd_addr [PE];

  cmd_gen dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int unsigned pi [KMAX];
  int unsigned bank [KMAX];
  int unsigned n;
  int unsigned cyc = 0;
  int unsigned issue_at [int unsigned];
  int unsigned next_step;
  bit wr_exp;
  always @(posedge clk) cyc++;

  // table models
  always_ff @(posedge clk) begin
    if (pi_rd_en)
      for (int j = 0; j < PE; j++) pi_rd_data[j] <= DIW'(pi[j * n + int'(pi_rd_addr)]);
    if (vmt_rd_en)
      for (int j = 0; j < PE; j++) vmt_rdata[j] <= BW'(bank[vmt_raddr[j]]);
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) begin
    if (issue_valid) issue_at[issue_step] = cyc;
    if (cmd_valid) begin
      int unsigned d;
      check(cmd_step == RW'(next_step), "step sequence");
      check(cyc - issue_at[cmd_step] == 2, "issue to command latency");
      check(cmd_we == wr_exp, "write flag");
      for (int j = 0; j < PE; j++) begin
        d = (order == ORDER_NAT) ? cmd_step + j * n : pi[cmd_step + j * n];
        check(cmd_bank[j] == BW'(bank[d]), "command word");
        check(cmd_addr[j] == RW'(d % n), "address word");
      end
      next_step++;
    end
  end

  task automatic sweep(order_e o, bit wr);
    int unsigned c0;
    @(negedge clk); order = o; write = wr; wr_exp = wr; start = 1'b1; next_step = 0;
    @(negedge clk); start = 1'b0;
    c0 = cyc;
    while (issue_valid) @(negedge clk);
    check(cyc - c0 == n, "n cycles per sweep");
    while (busy) @(negedge clk);
    check(next_step == n, "all steps produced");
  endtask

  task automatic setup(int unsigned k);
    int unsigned t, r;
    n = k / PE; n_len = (RW + 1)'(n);
    for (int unsigned p = 0; p < k; p++) begin pi[p] = p; bank[p] = $urandom_range(PE - 1, 0); end
    for (int unsigned p = k - 1; p > 0; p--) begin
      r = $urandom_range(p, 0); t = pi[p]; pi[p] = pi[r]; pi[r] = t;
    end
  endtask

  int unsigned first_step [PE] = '{39, 35, 34, 38, 36, 37, 32, 33};
  int unsigned lens [2] = '{256, 5120};

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    setup(40);
    for (int j = 0; j < PE; j++) begin
      // swap the example's elements into step 0
      int unsigned q;
      for (int p = 0; p < 40; p++) if (pi[p] == first_step[j]) q = p;
      pi[q] = pi[j * 5]; pi[j * 5] = first_step[j];
    end
    sweep(ORDER_NAT, 1'b1);
    // watch the first interleaved step explicitly
    fork
      sweep(ORDER_INT, 1'b0);
      begin
        while (!(cmd_valid && cmd_step == 0)) @(posedge clk);
        check(cmd_addr[0] == 4 && cmd_addr[1] == 0, "example addresses of 39 and 35");
      end
    join
    foreach (lens[x]) begin
      setup(lens[x]);
      sweep(ORDER_NAT, 1'b0);
      sweep(ORDER_INT, 1'b1);
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
