// tb_map_run -- testbench helper: one mapping unit of parallelism PE with
// its own clock, interleaver table model and VMT capture.  It maps every
// block length of the published evaluation (256 .. 5120) with the 3GPP
// interleaver (random permutation for 5120, above the 3GPP range), checks
// each result for conflict-free, butterfly-routable natural and
// interleaved steps, checks the cycle count against the unit's own
// bound (K + 2) + log2(PE) * (2K + K/32 + chains + 2) with chains <= K/2,
// prints the cycle counts, and reports its totals on its outputs.
module tb_map_run #(
  parameter int unsigned PE = 8
) (
  output int checks,
  output int failures,
  output bit finished
);
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

  aomm_mapper #(.PE(PE), .KMAX(KMAX)) dut (.*);

  always #5 clk = ~clk;

  int unsigned pi [KMAX];
  int unsigned bank [KMAX];
  int unsigned n;

  always_ff @(posedge clk)
    if (pi_rd_en) pi_rd_data <= DIW'(pi[int'(pi_rd_bank) * n + int'(pi_rd_addr)]);
  always_ff @(posedge clk)
    if (vmt_we) bank[vmt_waddr] <= int'(vmt_wdata);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL (PE=%0d): %s", PE, what); end
  endtask

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

  task automatic run(int unsigned k);
    int unsigned cyc, bound;
    int unsigned dst [PE];
    bit ok;
    n = k / PE;
    for (int d = 0; d < KMAX; d++) bank[d] = PE;   // "unmapped"
    @(negedge clk); k_len = KW'(k); start = 1'b1;
    @(negedge clk); start = 1'b0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    bound = (k + 2) + BW * (2 * k + k / 32 + k / 2 + 2) + 2;
    $display("PE=%0d K=%0d: %0d cycles", PE, k, cyc);
    check(!err, "err flag");
    check(cyc <= bound, "cycle bound");
    ok = 1;
    for (int d = 0; d < k; d++) if (bank[d] >= PE) ok = 0;
    check(ok, "every element mapped");
    ok = 1;
    for (int i = 0; i < n; i++) begin
      for (int j = 0; j < PE; j++) dst[j] = bank[i + j * n];
      if (!routable(dst)) ok = 0;
      for (int j = 0; j < PE; j++) dst[j] = bank[pi[i + j * n]];
      if (!routable(dst)) ok = 0;
    end
    check(ok, "all steps routable");
  endtask

  int unsigned lens [6] = '{256, 1024, 2048, 3072, 4096, 5120};

  initial begin
    checks = 0; failures = 0; finished = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    foreach (lens[x]) begin
      if (lens[x] <= 5114) begin
        tb_umts_pkg::uq_t q;
        q = tb_umts_pkg::umts_pi(lens[x]);
        foreach (q[y]) pi[y] = q[y];
      end else begin
        int unsigned t, r;
        for (int unsigned p = 0; p < lens[x]; p++) pi[p] = p;
        for (int unsigned p = lens[x] - 1; p > 0; p--) begin
          r = $urandom_range(p, 0); t = pi[p]; pi[p] = pi[r]; pi[r] = t;
        end
      end
      run(lens[x]);
    end
    finished = 1;
  end
endmodule
