// tb_aomm_mapper -- self-checking testbench of the mapping unit.
//
// Runs the mapping unit at its default size (PE = 8, KMAX = 5120) for the
// 40-element worked example (3GPP turbo interleaver, K = 40), which must
// give exactly the published bank contents B0..B7, and for every block
// length of the published latency table (256 .. 5120) with the 3GPP
// interleaver (K <= 5114) and with a random permutation.  For each run it
// checks, with its own model of the butterfly: every element gets exactly
// one bank, every natural and every interleaved time step uses PE distinct
// banks and is routable through the butterfly without a switch conflict,
// err stays low, and the cycle count from start to done does not exceed
// the published latency at 100 MHz.  It also checks the placement rule
// against the worked values of the algorithm description.
module tb_aomm_mapper;
  import ecc_pkg::*;

  localparam int unsigned PE   = 8;
  localparam int unsigned KMAX = 5120;
  localparam int unsigned BW   = $clog2(PE);
  localparam int unsigned DIW  = $clog2(KMAX);
  localparam int unsigned KW   = $clog2(KMAX + 1);
  localparam int unsigned RW   = $clog2(KMAX / PE);

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [KW-1:0] k_len = '0;
  logic busy, done, err;
  logic pi_rd_en; logic [BW-1:0] pi_rd_bank; logic [RW-1:0] pi_rd_addr;
  logic [DIW-1:0] pi_rd_data;
  logic vmt_we; logic [DIW-1:0] vmt_waddr; logic [BW-1:0] vmt_wdata;

  aomm_mapper dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int unsigned pi [KMAX];
  int unsigned bank [KMAX];
  int unsigned wcount [KMAX];
  int unsigned n;

  // interleaver table model, one-cycle read latency
  always_ff @(posedge clk)
    if (pi_rd_en) pi_rd_data <= DIW'(pi[int'(pi_rd_bank) * n + int'(pi_rd_addr)]);

  always_ff @(posedge clk)
    if (vmt_we) begin
      bank[vmt_waddr]   <= int'(vmt_wdata);
      wcount[vmt_waddr] <= wcount[vmt_waddr] + 1;
    end

  task automatic dump_banks();
    for (int b = 0; b < PE; b++) begin
      $write("B%0d =", b);
      for (int d = 0; d < 40; d++) if (bank[d] == b) $write(" %0d", d);
      $display("");
    end
  endtask

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Butterfly reachability, written from the network description: in each
  // group of g ports, ports 2m and 2m+1 meet in one switch and must want
  // different halves; the switch then feeds position 2m (m < g/4) or
  // 2(m-g/4)+1 of the half-size group its element goes to.
  function automatic bit routable(int unsigned dst [PE]);
    int unsigned cur [PE], nxt [PE];
    int unsigned g, base, m, hb, hi;
    cur = dst;
    for (int s = 0; s < BW; s++) begin
      g  = PE >> s;
      hb = BW - 1 - s;
      for (int p = 0; p < PE; p += 2) begin
        base = p - (p % g);
        m    = (p - base) / 2;
        if (((cur[p] >> hb) & 1) == ((cur[p+1] >> hb) & 1)) return 0;
        for (int e = 0; e < 2; e++) begin
          hi = (cur[p+e] >> hb) & 1;
          if (g == 2) nxt[base + hi] = cur[p+e];
          else if (m < g / 4) nxt[base + hi * g / 2 + 2 * m] = cur[p+e];
          else nxt[base + hi * g / 2 + 2 * (m - g / 4) + 1] = cur[p+e];
        end
      end
      cur = nxt;
    end
    for (int p = 0; p < PE; p++) if (cur[p] != p) return 0;
    return 1;
  endfunction

  task automatic shuffle(int unsigned k);
    int unsigned t, r;
    for (int unsigned p = 0; p < k; p++) pi[p] = p;
    for (int unsigned p = k - 1; p > 0; p--) begin
      r = $urandom_range(p, 0);
      t = pi[p]; pi[p] = pi[r]; pi[r] = t;
    end
  endtask

  task automatic run(int unsigned k, int unsigned bound, string tag);
    int unsigned cyc;
    int unsigned dst [PE];
    bit okrow, okcnt;
    n = k / PE;
    for (int d = 0; d < KMAX; d++) begin bank[d] = 0; wcount[d] = 0; end
    @(negedge clk); k_len = KW'(k); start = 1'b1;
    @(negedge clk); start = 1'b0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    $display("%s: K=%0d mapped in %0d cycles (bound %0d)", tag, k, cyc, bound);
    check(!err, {tag, ": err flag"});
    check(bound == 0 || cyc <= bound, {tag, ": latency above published value"});
    okcnt = 1;
    for (int d = 0; d < k; d++) if (wcount[d] != 1) okcnt = 0;
    check(okcnt, {tag, ": every element mapped exactly once"});
    okrow = 1;
    for (int i = 0; i < n; i++) begin
      for (int j = 0; j < PE; j++) dst[j] = bank[i + j * n];
      if (!routable(dst)) okrow = 0;
    end
    check(okrow, {tag, ": natural steps conflict-free through butterfly"});
    okrow = 1;
    for (int i = 0; i < n; i++) begin
      for (int j = 0; j < PE; j++) dst[j] = bank[pi[i + j * n]];
      if (!routable(dst)) okrow = 0;
    end
    check(okrow, {tag, ": interleaved steps conflict-free through butterfly"});
  endtask

  // published bank contents of the 40-element example
  int unsigned fig7 [PE][5] = '{'{0, 37, 23, 29, 11}, '{2, 33, 19, 26, 10},
                                '{20, 1, 27, 8, 34}, '{35, 31, 17, 13, 4},
                                '{5, 21, 12, 28, 39}, '{15, 16, 7, 38, 24},
                                '{25, 6, 32, 18, 9}, '{30, 36, 22, 3, 14}};
  int unsigned lens [6]   = '{256, 1024, 2048, 3072, 4096, 5120};
  int unsigned bounds [6] = '{1900, 7600, 15300, 23000, 30700, 38400};

  initial begin
    // placement rule, worked values: SE6 -> 3 (first half), SE6 -> 7 and
    // SE0 -> 4 (second half) for partition size 8; SE0 -> 0 first half
    check(aomm_place(16'd6, 1'b0, 16'd8) == 16'd3, "place SE6 h0");
    check(aomm_place(16'd6, 1'b1, 16'd8) == 16'd7, "place SE6 h1");
    check(aomm_place(16'd0, 1'b1, 16'd8) == 16'd4, "place SE0 h1");
    check(aomm_place(16'd0, 1'b0, 16'd8) == 16'd0, "place SE0 h0");
    check(aomm_place(16'd6, 1'b0, 16'd4) == 16'd5, "place SE6 h0 size 4");

    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // 40-element example: the 3GPP interleaver for K = 40, whose first
    // interleaved step is 39,35,34,38,36,37,32,33
    begin
      tb_umts_pkg::uq_t q;
      q = tb_umts_pkg::umts_pi(40);
      foreach (q[x]) pi[x] = q[x];
    end
    run(40, 0, "example");
    dump_banks();
    begin
      bit same;
      same = 1;
      for (int b = 0; b < PE; b++)
        for (int e = 0; e < 5; e++) if (bank[fig7[b][e]] != b) same = 0;
      check(same, "40-element example reproduces the published bank contents");
    end

    foreach (lens[x]) begin
      if (lens[x] <= 5114) begin
        tb_umts_pkg::uq_t q;
        q = tb_umts_pkg::umts_pi(lens[x]);
        foreach (q[y]) pi[y] = q[y];
        run(lens[x], bounds[x], "3GPP");
      end
      shuffle(lens[x]);
      run(lens[x], bounds[x], "random");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
