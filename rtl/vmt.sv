// vmt -- virtual mapping table: the bank number of every data element.
//
// K x log2(PE) bits, written once per reconfiguration by the mapping unit
// (one element per cycle) and read by the command generator, which looks
// up the PE elements of one time step concurrently.  The concurrent read
// is modelled as PE synchronous read ports on one array (in an FPGA: PE
// replicated copies, or a register file); the published design says only
// that the table is accessed concurrently.  Read data appear one cycle
// after rd_en.  A write and a read of the same element in one cycle return
// the old value.
module vmt
  import ecc_pkg::*;
#(
  parameter int unsigned PE   = PE_DEF,
  parameter int unsigned KMAX = KMAX_DEF,
  localparam int unsigned BW  = $clog2(PE),
  localparam int unsigned DIW = $clog2(KMAX)
) (
  input  logic           clk,
  input  logic           we,
  input  logic [DIW-1:0] waddr,
  input  logic [BW-1:0]  wdata,
  input  logic           rd_en,
  input  logic [DIW-1:0] raddr [PE],
  output logic [BW-1:0]  rdata [PE]
);

  logic [BW-1:0] mem [KMAX];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (rd_en)
      for (int j = 0; j < PE; j++) rdata[j] <= mem[raddr[j]];
  end

endmodule
