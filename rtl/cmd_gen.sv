// cmd_gen -- translation of the virtual mapping into per-step command and
// address words.
//
// One sweep visits the n time steps of a block (n = K/PE), one step per
// cycle, driven by a simple step counter.  At step i PE j works on
//   natural order     : element d = i + j*n
//   interleaved order : element d = pi(i + j*n), read from the interleaver
//                       table (bank j, address i, all banks in parallel).
// For each PE it looks up the bank of d in the virtual mapping table (the
// command word is the concatenation of these banks) and computes the bank
// address d mod n (elements of one natural step share one address; in
// natural order this is simply the counter value).  d mod n is obtained
// without a divider: j' = number of k in 1..PE-1 with d >= k*n, then
// d - j'*n.  Both formulas are the published ones; the pipeline is this
// design's own.
//
// Pipeline: stage 0 (issue_valid/issue_step) = counter and interleaver
// read; stage 1 = element index, VMT read, d mod n; stage 2
// (cmd_valid ...) = command word cmd_bank[] and address word cmd_addr[].
// A sweep takes n cycles; start is ignored while busy.
module cmd_gen
  import ecc_pkg::*;
#(
  parameter int unsigned PE   = PE_DEF,
  parameter int unsigned KMAX = KMAX_DEF,
  localparam int unsigned BW   = $clog2(PE),
  localparam int unsigned DIW  = $clog2(KMAX),
  localparam int unsigned RW   = $clog2(KMAX / PE)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,       // pulse: begin a sweep
  input  order_e         order,
  input  logic           write,       // sweep writes (else reads) the banks
  input  logic [RW:0]    n_len,       // time steps per sweep, n = K/PE
  output logic           busy,
  // stage 0
  output logic           issue_valid,
  output logic [RW-1:0]  issue_step,
  output logic           pi_rd_en,
  output logic [RW-1:0]  pi_rd_addr,
  input  logic [DIW-1:0] pi_rd_data [PE],
  // stage 1
  output logic           vmt_rd_en,
  output logic [DIW-1:0] vmt_raddr [PE],
  input  logic [BW-1:0]  vmt_rdata [PE],
  // stage 2
  output logic           cmd_valid,
  output logic           cmd_we,
  output logic [RW-1:0]  cmd_step,
  output logic [BW-1:0]  cmd_bank [PE],
  output logic [RW-1:0]  cmd_addr [PE]
);

  logic          run;
  logic [RW:0]   cnt;
  order_e        ord_q;
  logic          wr_q;
  logic          s1_v, s1_we;
  logic [RW-1:0] s1_step;
  logic          s2_v, s2_we;
  logic [RW-1:0] s2_step;
  logic [RW-1:0] s2_addr [PE];
  logic [DIW-1:0] d1 [PE];
  logic [RW-1:0]  a1 [PE];

  assign issue_valid = run;
  assign issue_step  = RW'(cnt);
  assign pi_rd_en    = run && (ord_q == ORDER_INT);
  assign pi_rd_addr  = RW'(cnt);
  assign busy        = run || s1_v || s2_v;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run <= 1'b0; cnt <= '0; ord_q <= ORDER_NAT; wr_q <= 1'b0;
      s1_v <= 1'b0; s1_we <= 1'b0; s1_step <= '0;
      s2_v <= 1'b0; s2_we <= 1'b0; s2_step <= '0;
    end else begin
      if (!run) begin
        if (start && !busy) begin
          run <= 1'b1; cnt <= '0; ord_q <= order; wr_q <= write;
        end
      end else if (cnt == n_len - 1'b1) begin
        run <= 1'b0;
      end else begin
        cnt <= cnt + 1'b1;
      end
      s1_v <= run; s1_we <= wr_q; s1_step <= RW'(cnt);
      s2_v <= s1_v; s2_we <= s1_we; s2_step <= s1_step;
    end
  end

  // stage 1: element of each PE and its bank address
  logic          s1_int;
  always_ff @(posedge clk) s1_int <= (ord_q == ORDER_INT);

  always_comb begin
    for (int j = 0; j < PE; j++) begin
      logic [DIW-1:0] d;
      int unsigned    q;
      d = s1_int ? pi_rd_data[j] : DIW'(s1_step + j * n_len);
      q = 0;
      for (int k = 1; k < PE; k++) if (d >= DIW'(k * n_len)) q = k;
      d1[j] = d;
      a1[j] = RW'(d - DIW'(q * n_len));
    end
  end

  assign vmt_rd_en = s1_v;
  assign vmt_raddr = d1;

  always_ff @(posedge clk)
    if (s1_v) s2_addr <= a1;

  // stage 2
  assign cmd_valid = s2_v;
  assign cmd_we    = s2_we;
  assign cmd_step  = s2_step;
  assign cmd_bank  = vmt_rdata;
  assign cmd_addr  = s2_addr;

endmodule
