// tb_ecc_reconf_decoder -- end-to-end test of the reconfigurable memory
// subsystem at its default size (PE = 8, KMAX = 5120, 8-bit data).
//
// For three successive configurations (the 40-element worked example with
// the 3GPP interleaver, K = 5120 and K = 256 with random permutations) it
// loads the interleaver, runs the on-chip mapping, then
//   1. writes the block in natural order  (PE j, step i: element i + j*n),
//   2. reads it back in interleaved order (expects element pi(i + j*n)),
//   3. overwrites it in interleaved order,
//   4. reads it in natural order,
// comparing every word with values computed here from the element index.
// It also checks: no network conflict, no mapping error, read data three
// cycles after the issue, one step per cycle (a sweep takes n cycles),
// mapping latency within the published figure for K = 256 and 5120.
// Mechanisms counted (each must occur): reconfigurations, natural and
// interleaved sweeps, reads and writes, switches set straight and crossed
// in every stage, and requests ignored while the other unit is busy.
module tb_ecc_reconf_decoder;
  import ecc_pkg::*;

  localparam int unsigned PE   = PE_DEF;
  localparam int unsigned KMAX = KMAX_DEF;
  localparam int unsigned DW   = DW_DEF;
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
  logic net_conflict;
  logic sw_cross [BW][PE/2];

  ecc_reconf_decoder dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int unsigned pi [KMAX];
  int unsigned n;
  int unsigned salt;
  int unsigned cyc = 0;
  always @(posedge clk) cyc++;

  // mechanism counters
  int n_reconf = 0, n_nat = 0, n_int = 0, n_wr = 0, n_rd = 0, n_ignored = 0;
  int n_straight [BW], n_cross [BW];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [DW-1:0] val(int unsigned d, int unsigned s);
    return DW'((d * 37 + s * 11 + (d >> 3)) ^ (d >> 8));
  endfunction

  function automatic int unsigned elem(order_e o, int unsigned i, int unsigned j);
    return (o == ORDER_NAT) ? i + j * n : pi[i + j * n];
  endfunction

  // drive write data combinationally from the announced step
  order_e cur_order = ORDER_NAT;
  always_comb
    for (int j = 0; j < PE; j++)
      pe_wdata[j] = issue_valid ? val(elem(cur_order, int'(issue_step), j), salt) : '0;

  // read checks, latency and switch statistics
  int unsigned issue_cyc [int unsigned];
  int unsigned exp_salt = 0;
  always @(posedge clk) if (rst_n) begin
    if (issue_valid) issue_cyc[int'(issue_step)] = cyc;
    if (dut.cmd_valid)
      for (int s = 0; s < BW; s++)
        for (int k = 0; k < PE / 2; k++)
          if (sw_cross[s][k]) n_cross[s]++; else n_straight[s]++;
    if (net_conflict) check(0, "network conflict");
    if (rd_valid) begin
      check(cyc - issue_cyc[int'(rd_step)] == 3, "read latency 3 cycles");
      for (int j = 0; j < PE; j++)
        check(pe_rdata[j] == val(elem(cur_order, rd_step, j), exp_salt),
              $sformatf("read data PE %0d step %0d", j, rd_step));
    end
  end

  task automatic load_and_map(int unsigned k, int unsigned bound);
    int unsigned c0;
    n = k / PE;
    k_len = KW'(k);
    for (int p = 0; p < k; p++) begin
      @(negedge clk); pi_we = 1'b1; pi_waddr = DIW'(p); pi_wdata = DIW'(pi[p]);
    end
    @(negedge clk); pi_we = 1'b0;
    map_start = 1'b1; c0 = cyc;
    @(negedge clk); map_start = 1'b0;
    // a sweep requested now must be ignored
    acc_start = 1'b1;
    @(negedge clk); acc_start = 1'b0;
    check(!acc_busy, "sweep ignored while mapping");
    if (!acc_busy) n_ignored++;
    while (!map_done) @(negedge clk);
    $display("K=%0d: mapping took %0d cycles", k, cyc - c0);
    if (bound != 0) check(cyc - c0 <= bound, "mapping latency within published value");
    check(!map_err, "mapping error flag");
    n_reconf++;
  endtask

  task automatic sweep(order_e o, bit wr, int unsigned s);
    int unsigned c0, c1;
    cur_order = o; salt = s;
    if (!wr) exp_salt = s;
    @(negedge clk);
    acc_order = o; acc_write = wr; acc_start = 1'b1;
    @(negedge clk); acc_start = 1'b0;
    while (!issue_valid) @(negedge clk);
    c0 = cyc;
    // a mapping requested now must be ignored
    map_start = 1'b1;
    @(negedge clk); map_start = 1'b0;
    check(!map_busy, "mapping ignored during sweep");
    if (!map_busy) n_ignored++;
    while (issue_valid) @(negedge clk);
    c1 = cyc;
    check(c1 - c0 == n, "one time step per cycle");
    while (acc_busy) @(negedge clk);
    repeat (3) @(negedge clk);
    if (o == ORDER_NAT) n_nat++; else n_int++;
    if (wr) n_wr++; else n_rd++;
  endtask

  task automatic shuffle(int unsigned k);
    int unsigned t, r;
    for (int unsigned p = 0; p < k; p++) pi[p] = p;
    for (int unsigned p = k - 1; p > 0; p--) begin
      r = $urandom_range(p, 0);
      t = pi[p]; pi[p] = pi[r]; pi[r] = t;
    end
  endtask

  task automatic full_run(int unsigned k, int unsigned bound, int unsigned s);
    load_and_map(k, bound);
    sweep(ORDER_NAT, 1'b1, s);
    sweep(ORDER_INT, 1'b0, s);
    sweep(ORDER_INT, 1'b1, s + 1);
    sweep(ORDER_NAT, 1'b0, s + 1);
  endtask


  initial begin
    for (int s = 0; s < BW; s++) begin n_straight[s] = 0; n_cross[s] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // worked example: K = 40 with the 3GPP interleaver
    begin
      tb_umts_pkg::uq_t q;
      q = tb_umts_pkg::umts_pi(40);
      foreach (q[x]) pi[x] = q[x];
    end
    full_run(40, 0, 1);
    shuffle(5120);
    full_run(5120, 38400, 3);
    shuffle(256);
    full_run(256, 1900, 5);

    check(n_reconf == 3, "reconfigurations");
    check(n_nat > 0 && n_int > 0, "both orders swept");
    check(n_wr > 0 && n_rd > 0, "reads and writes");
    check(n_ignored > 0, "busy interlock exercised");
    for (int s = 0; s < BW; s++)
      check(n_straight[s] > 0 && n_cross[s] > 0, $sformatf("stage %0d straight and cross", s));
    $display("reconfigurations=%0d natural=%0d interleaved=%0d writes=%0d reads=%0d ignored=%0d",
             n_reconf, n_nat, n_int, n_wr, n_rd, n_ignored);
    for (int s = 0; s < BW; s++)
      $display("stage %0d: straight=%0d cross=%0d", s, n_straight[s], n_cross[s]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
