// tb_bfly_net -- self-checking testbench of the butterfly network (PE = 8).
//
// Forward and reverse instances share the destination word.  Checks:
//  * the worked example: PEs of one interleaved step hold elements
//    39,35,34,38,36,37,32,33 mapped to banks 4,3,2,5,7,0,6,1, and the
//    first natural step (elements 0,5,..,35) maps to banks 0,4,1,5,2,6,7,3;
//    both route without conflict, each word reaching its bank and coming
//    back to its PE through the reverse network;
//  * the identity (PE j -> bank j) conflicts, since neighbouring PEs share
//    a switch and cannot reach two banks of the same half;
//  * random permutations: conflict is raised exactly when this
//    testbench's own reachability model says so, and every routable one
//    delivers each word to its bank and back.
module tb_bfly_net;
  localparam int unsigned PE = 8;
  localparam int unsigned W  = 8;
  localparam int unsigned BW = $clog2(PE);

  logic [BW-1:0] dest [PE];
  logic [W-1:0]  din [PE], dout [PE], bin [PE], bout [PE];
  logic          sw_f [BW][PE/2], sw_r [BW][PE/2];
  logic          conflict, conflict_r;

  bfly_net #(.PE(PE), .W(W), .REVERSE(1'b0)) dut (
    .dest, .din, .dout, .sw_cross(sw_f), .conflict);
  bfly_net #(.PE(PE), .W(W), .REVERSE(1'b1)) dut_r (
    .dest, .din(bin), .dout(bout), .sw_cross(sw_r), .conflict(conflict_r));

  int checks = 0, failures = 0;
  int n_routable = 0, n_blocked = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  // reachability model written from the stage wiring: ports 2m, 2m+1 of a
  // group of g share a switch and go to position 2m (m < g/4) or
  // 2(m-g/4)+1 of the half chosen by the bank bit of that stage
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
    return 1;
  endfunction

  task automatic apply(int unsigned dst [PE], int unsigned tagv [PE], bit expect_ok, string what);
    for (int j = 0; j < PE; j++) begin
      dest[j] = BW'(dst[j]);
      din[j]  = W'(tagv[j]);
      bin[j]  = W'(8'hA0 + j);   // bank j returns A0+j
    end
    #1;
    check(conflict == !expect_ok, {what, ": conflict flag"});
    if (expect_ok) begin
      for (int j = 0; j < PE; j++) begin
        check(dout[dst[j]] == W'(tagv[j]), {what, ": word reaches its bank"});
        check(bout[j] == W'(8'hA0 + dst[j]), {what, ": read data back to PE"});
      end
    end
  endtask

  int unsigned ex_d [PE] = '{4, 3, 2, 5, 7, 0, 6, 1};
  int unsigned ex_v [PE] = '{39, 35, 34, 38, 36, 37, 32, 33};
  int unsigned nat_d [PE] = '{0, 4, 1, 5, 2, 6, 7, 3};
  int unsigned nat_v [PE] = '{0, 5, 10, 15, 20, 25, 30, 35};
  int unsigned id_d [PE] = '{0, 1, 2, 3, 4, 5, 6, 7};

  initial begin
    apply(ex_d, ex_v, 1, "interleaved example step");
    apply(nat_d, nat_v, 1, "natural example step");
    apply(id_d, nat_v, 0, "identity");
    for (int t = 0; t < 3000; t++) begin
      int unsigned p [PE], v [PE], tmp, r;
      bit ok;
      for (int j = 0; j < PE; j++) begin p[j] = j; v[j] = $urandom_range(255, 0); end
      for (int j = PE - 1; j > 0; j--) begin
        r = $urandom_range(j, 0); tmp = p[j]; p[j] = p[r]; p[r] = tmp;
      end
      ok = routable(p);
      if (ok) n_routable++; else n_blocked++;
      apply(p, v, ok, "random permutation");
    end
    check(n_routable > 0 && n_blocked > 0, "both outcomes exercised");
    $display("routable=%0d blocked=%0d", n_routable, n_blocked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
