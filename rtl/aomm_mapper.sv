// aomm_mapper -- on-chip mapping unit (architecture-oriented memory mapping).
//
// Given a block length K and an interleaver pi (read from the interleaver
// table), it assigns every data element d < K to one of PE memory banks so
// that the PE elements used together at any time step -- in natural order
// (data i + j*n, n = K/PE) and in interleaved order (data pi(i + j*n)) --
// sit in distinct banks AND can be reached through the butterfly network
// (bfly_net) without a switch conflict.  The result is written into the
// virtual mapping table (vmt_*), one bank number per data element.
//
// How it works.  The "Euler matrix" has 2n rows (n natural time steps, then
// n interleaved ones) of PE locations; location = position at the network
// inputs.  Each element occurs twice, once per half.  The two elements that
// share a 2x2 switch in a row ("partners") must be sent to different halves
// of their partition.  One pass walks the closed chains
//     d -> partner of d in its interleaved row -> partner of that in its
//     natural row -> ...
// giving the elements alternately the first and the second half, and moves
// each element (both occurrences) to the new location given by the
// placement rule ecc_pkg::aomm_place.  The pass reads one matrix and writes
// the other (Euler Matrix / Euler Matrix Comp, swapped every pass).  After
// log2(PE) passes with partition sizes PE, PE/2, .., 2 the location of an
// element is its bank.  A chain starts at the first unplaced entry of the
// natural rows, row by row and location by location, and that element
// takes the first half; with this order the 40-element worked example
// gives exactly the published banks.  Matrix rows, placement rule, chain
// order and the alternating use of two matrices follow the published
// algorithm; the storage layout below is this design's own.
//
// Storage (all single-port RAMs, as in the published accelerator):
//   emn[0..1], emi[0..1] : natural / interleaved halves of the two matrices,
//                          word {row, loc} holds the element there;
//   locn, loci           : per element {row, location} in its natural /
//                          interleaved row;
//   vis                  : one flag per natural matrix position {row, loc}
//                          of the matrix being read, "placed in this pass"
//                          (flip-flops, scanned 32 at a time).
// Timing: init K+2 cycles (one pi read per cycle); each pass 2 cycles per
// element, one more per chain (fetching its first element) and one per
// exhausted 32-position scan word; about 7.1*K cycles in all for PE = 8.
// done pulses one cycle when the VMT is complete; err is set if a position
// is placed twice or the two occurrences of an element end in different
// banks (never expected).
// K must be a multiple of PE and at most KMAX; PE a power of two.
module aomm_mapper
  import ecc_pkg::*;
#(
  parameter int unsigned PE   = PE_DEF,
  parameter int unsigned KMAX = KMAX_DEF,
  localparam int unsigned BW   = $clog2(PE),          // bank / location bits
  localparam int unsigned DIW  = $clog2(KMAX),        // element index bits
  localparam int unsigned KW   = $clog2(KMAX + 1),    // block length bits
  localparam int unsigned NMAX = KMAX / PE,
  localparam int unsigned RW   = $clog2(NMAX),        // row (time step) bits
  localparam int unsigned MAW  = RW + BW,             // matrix address bits
  localparam int unsigned NSW  = (KMAX + 31) / 32     // scan words
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,      // pulse: map block length k_len
  input  logic [KW-1:0]   k_len,
  output logic            busy,
  output logic            done,       // pulse: VMT complete
  output logic            err,        // sticky inconsistency flag
  // interleaver table read port (1-cycle latency): pi(bank*n + addr)
  output logic            pi_rd_en,
  output logic [BW-1:0]   pi_rd_bank,
  output logic [RW-1:0]   pi_rd_addr,
  input  logic [DIW-1:0]  pi_rd_data,
  // virtual mapping table write port
  output logic            vmt_we,
  output logic [DIW-1:0]  vmt_waddr,
  output logic [BW-1:0]   vmt_wdata
);

  typedef enum logic [2:0] {S_IDLE, S_INIT, S_ISSUE, S_FETCH, S_VISIT} state_e;
  state_e state;

  // ---------------------------------------------------------------- RAMs
  logic           emn_en [2], emn_we [2], emi_en [2], emi_we [2];
  logic [MAW-1:0] emn_addr [2], emi_addr [2];
  logic [DIW-1:0] emn_wdata [2], emi_wdata [2], emn_rdata [2], emi_rdata [2];
  logic           locn_en, locn_we, loci_en, loci_we;
  logic [DIW-1:0] locn_addr, loci_addr;
  logic [MAW-1:0] locn_wdata, loci_wdata, locn_rdata, loci_rdata;

  for (genvar m = 0; m < 2; m++) begin : g_mat
    sp_ram #(.DEPTH(KMAX), .WIDTH(DIW)) u_emn (
      .clk, .en(emn_en[m]), .we(emn_we[m]), .addr(emn_addr[m]),
      .wdata(emn_wdata[m]), .rdata(emn_rdata[m]));
    sp_ram #(.DEPTH(KMAX), .WIDTH(DIW)) u_emi (
      .clk, .en(emi_en[m]), .we(emi_we[m]), .addr(emi_addr[m]),
      .wdata(emi_wdata[m]), .rdata(emi_rdata[m]));
  end
  sp_ram #(.DEPTH(KMAX), .WIDTH(MAW)) u_locn (
    .clk, .en(locn_en), .we(locn_we), .addr(locn_addr),
    .wdata(locn_wdata), .rdata(locn_rdata));
  sp_ram #(.DEPTH(KMAX), .WIDTH(MAW)) u_loci (
    .clk, .en(loci_en), .we(loci_we), .addr(loci_addr),
    .wdata(loci_wdata), .rdata(loci_rdata));

  // ----------------------------------------------------------- registers
  logic [KW-1:0]   k_q;
  logic [RW:0]     n_q;          // n = K / PE
  logic [BW:0]     psize;        // partition size of this pass
  logic [BW:0]     pass;         // pass index 0 .. BW-1
  logic            src;          // matrix read in this pass
  // init
  logic [RW:0]     ii;           // row (time step)
  logic [BW:0]     jj;           // location (PE index)
  logic [DIW-1:0]  pp;           // position p = jj*n + ii
  logic            init_fin;
  logic            iq_v;
  logic [RW-1:0]   ii_q;
  logic [BW-1:0]   jj_q;
  // walk
  logic [DIW-1:0]  d_cur, d0;
  logic            h_cur;        // half given to d_cur
  logic            side;         // 0: d_cur's partner is looked up in its interleaved row
  logic            walking;
  logic [DIW-1:0]  scan_w;
  logic [NSW*32-1:0] vis;

  // ------------------------------------------------- combinational helpers
  logic [DIW-1:0]  partner;
  logic [31:0]     scan_word;
  logic            scan_hit;
  logic [4:0]      scan_bit;
  logic [DIW-1:0]  scan_d;
  logic [DIW-1:0]  last_w;
  logic [RW-1:0]   nat_row, int_row;
  logic [BW-1:0]   loc_nat, loc_int, new_nat, new_int;
  logic            take_partner, take_scan;
  logic [DIW-1:0]  d_next;

  assign partner      = side ? emn_rdata[src] : emi_rdata[src];
  assign last_w       = DIW'((k_q - KW'(1)) >> 5);

  always_comb begin
    for (int b = 0; b < 32; b++) begin
      // positions at or above K count as already placed
      scan_word[b] = vis[32 * scan_w + b] || ((32 * scan_w + b) >= k_q);
    end
    scan_hit = ~&scan_word;
    scan_bit = '0;
    for (int b = 31; b >= 0; b--) if (!scan_word[b]) scan_bit = 5'(b);
    scan_d = DIW'(32 * scan_w + scan_bit);
  end

  // a chain ends when the partner found is the element it started from
  assign take_partner = (state == S_ISSUE) && walking && (partner != d0);
  assign take_scan    = (state == S_ISSUE) && !take_partner && scan_hit;
  assign d_next       = (state == S_FETCH) ? emn_rdata[src] : partner;

  assign {nat_row, loc_nat} = locn_rdata;
  assign {int_row, loc_int} = loci_rdata;
  assign new_nat = BW'(aomm_place(16'(loc_nat), h_cur, 16'(psize)));
  assign new_int = BW'(aomm_place(16'(loc_int), h_cur, 16'(psize)));

  // --------------------------------------------------------- RAM control
  always_comb begin
    for (int m = 0; m < 2; m++) begin
      emn_en[m] = 1'b0; emn_we[m] = 1'b0; emn_addr[m] = '0; emn_wdata[m] = '0;
      emi_en[m] = 1'b0; emi_we[m] = 1'b0; emi_addr[m] = '0; emi_wdata[m] = '0;
    end
    locn_en = 1'b0; locn_we = 1'b0; locn_addr = '0; locn_wdata = '0;
    loci_en = 1'b0; loci_we = 1'b0; loci_addr = '0; loci_wdata = '0;
    pi_rd_en = 1'b0; pi_rd_bank = '0; pi_rd_addr = '0;
    vmt_we = 1'b0; vmt_waddr = '0; vmt_wdata = '0;

    unique case (state)
      S_INIT: begin
        if (!init_fin) begin
          // natural occurrence of element p: row ii, location jj
          pi_rd_en   = 1'b1;
          pi_rd_bank = BW'(jj);
          pi_rd_addr = RW'(ii);
          emn_en[0] = 1'b1; emn_we[0] = 1'b1;
          emn_addr[0] = {RW'(ii), BW'(jj)}; emn_wdata[0] = pp;
          locn_en = 1'b1; locn_we = 1'b1; locn_addr = pp;
          locn_wdata = {RW'(ii), BW'(jj)};
        end
        if (iq_v) begin
          // interleaved occurrence of element pi(p): same row / location
          emi_en[0] = 1'b1; emi_we[0] = 1'b1;
          emi_addr[0] = {ii_q, jj_q}; emi_wdata[0] = pi_rd_data;
          loci_en = 1'b1; loci_we = 1'b1; loci_addr = pi_rd_data;
          loci_wdata = {ii_q, jj_q};
        end
      end
      S_ISSUE: begin
        if (take_partner) begin
          locn_en = 1'b1; locn_addr = d_next;
          loci_en = 1'b1; loci_addr = d_next;
        end else if (take_scan) begin
          // element at the first unplaced natural position starts a chain
          emn_en[src] = 1'b1; emn_addr[src] = MAW'(scan_d);
        end
      end
      S_FETCH: begin
        locn_en = 1'b1; locn_addr = d_next;
        loci_en = 1'b1; loci_addr = d_next;
      end
      S_VISIT: begin
        locn_en = 1'b1; locn_we = 1'b1; locn_addr = d_cur;
        locn_wdata = {nat_row, new_nat};
        loci_en = 1'b1; loci_we = 1'b1; loci_addr = d_cur;
        loci_wdata = {int_row, new_int};
        emn_en[!src] = 1'b1; emn_we[!src] = 1'b1;
        emn_addr[!src] = {nat_row, new_nat}; emn_wdata[!src] = d_cur;
        emi_en[!src] = 1'b1; emi_we[!src] = 1'b1;
        emi_addr[!src] = {int_row, new_int}; emi_wdata[!src] = d_cur;
        // partner lookup in the matrix of this pass
        if (!side) begin
          emi_en[src] = 1'b1; emi_addr[src] = {int_row, loc_int ^ BW'(1)};
        end else begin
          emn_en[src] = 1'b1; emn_addr[src] = {nat_row, loc_nat ^ BW'(1)};
        end
        if (pass == (BW + 1)'(BW - 1)) begin
          vmt_we = 1'b1; vmt_waddr = d_cur; vmt_wdata = new_nat;
        end
      end
      default: ;
    endcase
  end

  // ----------------------------------------------------------------- FSM
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      k_q <= '0; n_q <= '0; psize <= '0; pass <= '0; src <= 1'b0;
      ii <= '0; jj <= '0; pp <= '0; init_fin <= 1'b0;
      iq_v <= 1'b0; ii_q <= '0; jj_q <= '0;
      d_cur <= '0; d0 <= '0; h_cur <= 1'b0; side <= 1'b0; walking <= 1'b0;
      scan_w <= '0; vis <= '0;
      done <= 1'b0; err <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          k_q <= k_len;
          n_q <= (RW + 1)'(k_len >> BW);
          ii <= '0; jj <= '0; pp <= '0; init_fin <= 1'b0; iq_v <= 1'b0;
          err <= 1'b0;
          state <= S_INIT;
        end
        S_INIT: begin
          iq_v <= !init_fin;
          ii_q <= RW'(ii);
          jj_q <= BW'(jj);
          if (!init_fin) begin
            pp <= pp + DIW'(1);
            if (ii == n_q - 1'b1) begin
              ii <= '0;
              jj <= jj + 1'b1;
              if (jj == (BW + 1)'(PE - 1)) init_fin <= 1'b1;
            end else begin
              ii <= ii + 1'b1;
            end
          end else if (!iq_v) begin
            pass <= '0; psize <= (BW + 1)'(PE); src <= 1'b0;
            vis <= '0; scan_w <= '0; walking <= 1'b0;
            state <= S_ISSUE;
          end
        end
        S_ISSUE: begin
          if (take_partner) begin
            d_cur <= partner;
            h_cur <= !h_cur;
            side  <= !side;
            state <= S_VISIT;
          end else begin
            walking <= 1'b0;
            if (scan_hit) begin
              state <= S_FETCH;
            end else if (scan_w == last_w) begin
              if (pass == (BW + 1)'(BW - 1)) begin
                done  <= 1'b1;
                state <= S_IDLE;
              end else begin
                pass   <= pass + 1'b1;
                psize  <= psize >> 1;
                src    <= !src;
                vis    <= '0;
                scan_w <= '0;
              end
            end else begin
              scan_w <= scan_w + 1'b1;
            end
          end
        end
        S_FETCH: begin
          d_cur   <= d_next;
          d0      <= d_next;
          h_cur   <= 1'b0;
          side    <= 1'b0;
          walking <= 1'b1;
          state   <= S_VISIT;
        end
        S_VISIT: begin
          // a position of the matrix of this pass is placed
          if (vis[{nat_row, loc_nat}]) err <= 1'b1;
          vis[{nat_row, loc_nat}] <= 1'b1;
          if (pass == (BW + 1)'(BW - 1) && new_nat != new_int) err <= 1'b1;
          state <= S_ISSUE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

endmodule
