// ecc_reconf_decoder -- dynamically reconfigurable, conflict-free memory
// subsystem of a parallel (turbo / LDPC style) decoder.
//
// PE processing elements exchange their data with PE single-port memory
// banks through a butterfly network.  Every time step each PE touches one
// element, in natural or in interleaved order, and no two PEs may hit the
// same bank or collide inside the butterfly.  Instead of storing
// precomputed command and address ROMs for every block length, the design
// computes the mapping on chip whenever a new block length / interleaver
// is loaded (map_start), keeps only the bank of each element (virtual
// mapping table, K x log2(PE) bits) and expands it at run time into
// command words (bank per PE) and address words (element mod n).
//
// Blocks: interleaver table (PE banks of pi, loaded by the host),
// aomm_mapper (mapping unit), vmt (virtual mapping table), cmd_gen (step
// counter, command and address words), bfly_net (request network PE ->
// bank, and the same switch settings reversed for read data), PE data
// banks (sp_ram).  The PEs themselves (SISO decoders) are outside: their
// data ports are brought out.
//
// Use: set k_len (multiple of PE, <= KMAX, held while in use); write pi
// (pi_we, position pi_waddr, element pi_wdata); pulse map_start and wait
// for map_done (about 7.1*K cycles); then run sweeps with acc_start.  In a
// sweep, issue_valid/issue_step announce step i each cycle for n cycles
// and pe_wdata[j] is sampled in that cycle (for writes); the banks are
// accessed two cycles later; read data return on pe_rdata with rd_valid /
// rd_step three cycles after the issue.  sw_cross shows the switch
// settings of the request network in the access cycle (1 = crossed);
// net_conflict flags a butterfly conflict (never expected after mapping).
// A sweep started while the mapping unit is busy, or a mapping started
// during a sweep, is ignored; pi writes are accepted only when both are
// idle.
// Bank data width DW and this port protocol are this design's own.
module ecc_reconf_decoder
  import ecc_pkg::*;
#(
  parameter int unsigned PE   = PE_DEF,
  parameter int unsigned KMAX = KMAX_DEF,
  parameter int unsigned DW   = DW_DEF,
  localparam int unsigned BW   = $clog2(PE),
  localparam int unsigned DIW  = $clog2(KMAX),
  localparam int unsigned KW   = $clog2(KMAX + 1),
  localparam int unsigned NMAX = KMAX / PE,
  localparam int unsigned RW   = $clog2(NMAX)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [KW-1:0]  k_len,
  // interleaver load
  input  logic           pi_we,
  input  logic [DIW-1:0] pi_waddr,
  input  logic [DIW-1:0] pi_wdata,
  // reconfiguration
  input  logic           map_start,
  output logic           map_busy,
  output logic           map_done,
  output logic           map_err,
  // data sweeps
  input  logic           acc_start,
  input  order_e         acc_order,
  input  logic           acc_write,
  output logic           acc_busy,
  output logic           issue_valid,
  output logic [RW-1:0]  issue_step,
  input  logic [DW-1:0]  pe_wdata [PE],
  output logic           rd_valid,
  output logic [RW-1:0]  rd_step,
  output logic [DW-1:0]  pe_rdata [PE],
  output logic           sw_cross [BW][PE/2],  // request-network switch settings
  output logic           net_conflict
);

  logic [RW:0] n_len;
  assign n_len = (RW + 1)'(k_len >> BW);

  // ------------------------------------------------- mapping unit
  logic           m_pi_en;
  logic [BW-1:0]  m_pi_bank, m_pi_bank_q;
  logic [RW-1:0]  m_pi_addr;
  logic [DIW-1:0] m_pi_data;
  logic           vmt_we;
  logic [DIW-1:0] vmt_waddr;
  logic [BW-1:0]  vmt_wdata;

  aomm_mapper #(.PE(PE), .KMAX(KMAX)) u_mapper (
    .clk, .rst_n,
    .start(map_start && !acc_busy), .k_len,
    .busy(map_busy), .done(map_done), .err(map_err),
    .pi_rd_en(m_pi_en), .pi_rd_bank(m_pi_bank), .pi_rd_addr(m_pi_addr),
    .pi_rd_data(m_pi_data),
    .vmt_we, .vmt_waddr, .vmt_wdata);

  // ------------------------------------------------- command generator
  logic           c_pi_en;
  logic [RW-1:0]  c_pi_addr;
  logic [DIW-1:0] pi_rdata [PE];
  logic           vmt_rd_en;
  logic [DIW-1:0] vmt_raddr [PE];
  logic [BW-1:0]  vmt_rdata [PE];
  logic           cmd_valid, cmd_we;
  logic [RW-1:0]  cmd_step;
  logic [BW-1:0]  cmd_bank [PE];
  logic [RW-1:0]  cmd_addr [PE];

  cmd_gen #(.PE(PE), .KMAX(KMAX)) u_cmd (
    .clk, .rst_n,
    .start(acc_start && !map_busy), .order(acc_order), .write(acc_write),
    .n_len, .busy(acc_busy),
    .issue_valid, .issue_step,
    .pi_rd_en(c_pi_en), .pi_rd_addr(c_pi_addr), .pi_rd_data(pi_rdata),
    .vmt_rd_en, .vmt_raddr, .vmt_rdata,
    .cmd_valid, .cmd_we, .cmd_step, .cmd_bank, .cmd_addr);

  // ------------------------------------------------- virtual mapping table
  vmt #(.PE(PE), .KMAX(KMAX)) u_vmt (
    .clk, .we(vmt_we), .waddr(vmt_waddr), .wdata(vmt_wdata),
    .rd_en(vmt_rd_en), .raddr(vmt_raddr), .rdata(vmt_rdata));

  // ------------------------------------------------- interleaver table
  // position p lives in bank p / n at address p mod n
  logic [BW-1:0] h_bank;
  logic [RW-1:0] h_addr;
  always_comb begin
    int unsigned q;
    q = 0;
    for (int k = 1; k < PE; k++) if (pi_waddr >= DIW'(k * n_len)) q = k;
    h_bank = BW'(q);
    h_addr = RW'(pi_waddr - DIW'(q * n_len));
  end

  for (genvar j = 0; j < PE; j++) begin : g_pi
    logic          en, we;
    logic [RW-1:0] addr;
    always_comb begin
      en = 1'b0; we = 1'b0; addr = '0;
      if (map_busy) begin
        en = m_pi_en && (m_pi_bank == BW'(j)); addr = m_pi_addr;
      end else if (acc_busy) begin
        en = c_pi_en; addr = c_pi_addr;
      end else if (pi_we) begin
        en = (h_bank == BW'(j)); we = 1'b1; addr = h_addr;
      end
    end
    sp_ram #(.DEPTH(NMAX), .WIDTH(DIW)) u_pi (
      .clk, .en, .we, .addr, .wdata(pi_wdata), .rdata(pi_rdata[j]));
  end

  always_ff @(posedge clk) if (m_pi_en) m_pi_bank_q <= m_pi_bank;
  assign m_pi_data = pi_rdata[m_pi_bank_q];

  // ------------------------------------------------- write data alignment
  logic [DW-1:0] wd1 [PE], wd2 [PE];
  always_ff @(posedge clk) begin
    wd1 <= pe_wdata;
    wd2 <= wd1;
  end

  // ------------------------------------------------- request network
  typedef struct packed {
    logic [RW-1:0] addr;
    logic [DW-1:0] data;
  } req_t;
  localparam int unsigned RQW = $bits(req_t);

  logic [RQW-1:0] req_in [PE], req_out [PE];
  logic           req_cross [BW][PE/2];
  logic           req_conflict;

  always_comb
    for (int j = 0; j < PE; j++) req_in[j] = {cmd_addr[j], wd2[j]};

  bfly_net #(.PE(PE), .W(RQW), .REVERSE(1'b0)) u_net_req (
    .dest(cmd_bank), .din(req_in), .dout(req_out),
    .sw_cross(req_cross), .conflict(req_conflict));

  assign sw_cross = req_cross;

  // ------------------------------------------------- data banks
  logic [DW-1:0] bank_rdata [PE];
  for (genvar b = 0; b < PE; b++) begin : g_bank
    req_t r;
    assign r = req_t'(req_out[b]);
    sp_ram #(.DEPTH(NMAX), .WIDTH(DW)) u_bank (
      .clk, .en(cmd_valid), .we(cmd_we), .addr(r.addr), .wdata(r.data),
      .rdata(bank_rdata[b]));
  end

  // ------------------------------------------------- read-data network
  logic [BW-1:0] dest_q [PE];
  logic          rsp_cross [BW][PE/2];
  logic          rsp_conflict;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_valid <= 1'b0; rd_step <= '0;
    end else begin
      rd_valid <= cmd_valid && !cmd_we;
      rd_step  <= cmd_step;
    end
  end
  always_ff @(posedge clk) if (cmd_valid) dest_q <= cmd_bank;

  bfly_net #(.PE(PE), .W(DW), .REVERSE(1'b1)) u_net_rsp (
    .dest(dest_q), .din(bank_rdata), .dout(pe_rdata),
    .sw_cross(rsp_cross), .conflict(rsp_conflict));

  // both directions of an access must be routable
  assign net_conflict = (cmd_valid && req_conflict) || (rd_valid && rsp_conflict);

endmodule
