// tb_top_run -- testbench helper: the whole memory subsystem at
// parallelism PE (KMAX = 5120) with its own clock.  For K = 1024 (3GPP
// interleaver) and K = 5120 (random permutation) it loads the interleaver,
// maps, writes the block in natural order and reads it back in
// interleaved order, then writes in interleaved and reads in natural
// order, checking every word, the absence of network conflicts and the
// mapping error flag.  Totals are reported on its outputs.
module tb_top_run #(
  parameter int unsigned PE = 8
) (
  output int checks,
  output int failures,
  output bit finished
);
  import ecc_pkg::*;
  localparam int unsigned KMAX = 5120;
  localparam int unsigned DW   = 8;
  localparam int unsigned BW   = $clog2(PE);
  localparam int unsigned DIW  = $clog2(KMAX);
  localparam int unsigned KW   = $clog2(KMAX + 1);
  localparam int unsigned RW   = $clog2(KMAX / PE);

  logic clk = 1'b0, rst_n = 1'b0;
  logic [KW-1:0] k_len = '0;
  logic pi_we = 1'b0; logic [DIW-1:0] pi_waddr = '0, pi_wdata = '0;
  logic map_start = 1'b0, map_busy, map_done, map_err;
  logic acc_start = 1'b0; order_e acc_order = ORDER_NAT; logic acc_write = 1'b0;
  logic acc_busy, issue_valid; logic [RW-1:0] issue_step;
  logic [DW-1:0] pe_wdata [PE];
  logic rd_valid; logic [RW-1:0] rd_step; logic [DW-1:0] pe_rdata [PE];
  logic sw_cross [BW][PE/2];
  logic net_conflict;

  ecc_reconf_decoder #(.PE(PE), .KMAX(KMAX), .DW(DW)) dut (.*);

  always #5 clk = ~clk;

  int unsigned pi [KMAX];
  int unsigned n, salt, exp_salt;
  order_e cur_order = ORDER_NAT;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL (PE=%0d): %s", PE, what);
    end
  endtask

  function automatic logic [DW-1:0] val(int unsigned d, int unsigned s);
    return DW'(d * 29 + s * 7 + (d >> 5));
  endfunction

  function automatic int unsigned elem(order_e o, int unsigned i, int unsigned j);
    return (o == ORDER_NAT) ? i + j * n : pi[i + j * n];
  endfunction

  always_comb
    for (int j = 0; j < PE; j++)
      pe_wdata[j] = issue_valid ? val(elem(cur_order, int'(issue_step), j), salt) : '0;

  always @(posedge clk) if (rst_n) begin
    if (net_conflict) check(0, "network conflict");
    if (rd_valid)
      for (int j = 0; j < PE; j++)
        check(pe_rdata[j] == val(elem(cur_order, int'(rd_step), j), exp_salt), "read data");
  end

  task automatic sweep(order_e o, bit wr, int unsigned s);
    cur_order = o; salt = s;
    if (!wr) exp_salt = s;
    @(negedge clk); acc_order = o; acc_write = wr; acc_start = 1'b1;
    @(negedge clk); acc_start = 1'b0;
    while (acc_busy) @(negedge clk);
    repeat (3) @(negedge clk);
  endtask

  task automatic run(int unsigned k, int unsigned s);
    n = k / PE;
    k_len = KW'(k);
    for (int p = 0; p < k; p++) begin
      @(negedge clk); pi_we = 1'b1; pi_waddr = DIW'(p); pi_wdata = DIW'(pi[p]);
    end
    @(negedge clk); pi_we = 1'b0; map_start = 1'b1;
    @(negedge clk); map_start = 1'b0;
    while (!map_done) @(negedge clk);
    check(!map_err, "mapping error flag");
    sweep(ORDER_NAT, 1'b1, s);
    sweep(ORDER_INT, 1'b0, s);
    sweep(ORDER_INT, 1'b1, s + 1);
    sweep(ORDER_NAT, 1'b0, s + 1);
    $display("PE=%0d K=%0d done", PE, k);
  endtask

  initial begin
    checks = 0; failures = 0; finished = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    begin
      tb_umts_pkg::uq_t q;
      q = tb_umts_pkg::umts_pi(1024);
      foreach (q[y]) pi[y] = q[y];
    end
    run(1024, 1);
    begin
      int unsigned t, r;
      for (int unsigned p = 0; p < 5120; p++) pi[p] = p;
      for (int unsigned p = 5119; p > 0; p--) begin
        r = $urandom_range(p, 0); t = pi[p]; pi[p] = pi[r]; pi[r] = t;
      end
    end
    run(5120, 3);
    finished = 1;
  end
endmodule
