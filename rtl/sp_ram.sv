// sp_ram -- single-port synchronous RAM, one access per cycle.
//
// Used for the PE memory banks, for the interleaver table and for the
// matrices and location tables of the mapping unit (all of which the
// design keeps in single-port memories).  When en is high the word at addr
// is read and, if we is high, overwritten by wdata; rdata shows the old
// word (read-first) on the next cycle and holds while en is low.
// Contents are not reset.
module sp_ram #(
  parameter int unsigned DEPTH = 640,
  parameter int unsigned WIDTH = 8,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             en,
  input  logic             we,
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en) begin
      rdata <= mem[addr];
      if (we) mem[addr] <= wdata;
    end
  end

endmodule
