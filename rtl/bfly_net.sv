// bfly_net -- butterfly interconnect between the PEs and the memory banks.
//
// log2(PE) stages of PE/2 two-by-two switches.  In a group of g ports
// (g = PE at stage 0, halved at each stage) ports 2m and 2m+1 meet in one
// switch; its upper output feeds the first half of the group, its lower
// output the second half, at position bfly_subpos(m, g) there.  After the
// last stage, port b is memory bank b.  Each switch sets itself from the
// destination bank of its upper input (destination-tag routing): bit
// log2(PE)-1-s of the bank at stage s, 1 meaning "cross".  The mapping
// unit guarantees that the two inputs of a switch always differ in that
// bit; if they do not, conflict is raised and the routed words are
// undefined.  This is also why, as the published design notes, two PEs
// sharing a switch can never reach two banks of the same half.
//
// dest[j] is the bank wanted by PE j.  REVERSE = 0: din[j] comes from PE j
// and dout[b] goes to bank b (requests).  REVERSE = 1: din[b] comes from
// bank b and dout[j] goes back to PE j through the same switch settings
// (read data).  Purely combinational.  The wiring between stages follows
// the placement rule of the mapping algorithm; switch control and the two
// directions are this design's own.
module bfly_net
  import ecc_pkg::*;
#(
  parameter int unsigned PE      = PE_DEF,
  parameter int unsigned W       = 8,
  parameter bit          REVERSE = 1'b0,
  localparam int unsigned BW     = $clog2(PE)
) (
  input  logic [BW-1:0] dest  [PE],
  input  logic [W-1:0]  din   [PE],
  output logic [W-1:0]  dout  [PE],
  output logic          sw_cross [BW][PE/2],   // switch settings
  output logic          conflict
);

  logic [BW-1:0] tag [BW+1][PE];
  logic [W-1:0]  dat [BW+1][PE];

  // port indices of switch (s, k): inputs 2k, 2k+1; outputs up / lo
  function automatic int unsigned up_port(int unsigned s, int unsigned k);
    int unsigned g, base;
    g    = PE >> s;
    base = (2 * k) - ((2 * k) % g);
    return base + bfly_subpos(((2 * k) - base) / 2, g);
  endfunction

  always_comb begin
    tag[0]   = dest;
    conflict = 1'b0;
    for (int s = 0; s < BW; s++) begin
      for (int k = 0; k < PE / 2; k++) begin
        sw_cross[s][k] = tag[s][2*k][BW-1-s];
        if (tag[s][2*k][BW-1-s] == tag[s][2*k+1][BW-1-s]) conflict = 1'b1;
        tag[s+1][up_port(s, k)]                 = sw_cross[s][k] ? tag[s][2*k+1] : tag[s][2*k];
        tag[s+1][up_port(s, k) + (PE >> s) / 2] = sw_cross[s][k] ? tag[s][2*k]   : tag[s][2*k+1];
      end
    end
  end

  if (!REVERSE) begin : g_fwd
    always_comb begin
      dat[0] = din;
      for (int s = 0; s < BW; s++)
        for (int k = 0; k < PE / 2; k++) begin
          dat[s+1][up_port(s, k)]                 = sw_cross[s][k] ? dat[s][2*k+1] : dat[s][2*k];
          dat[s+1][up_port(s, k) + (PE >> s) / 2] = sw_cross[s][k] ? dat[s][2*k]   : dat[s][2*k+1];
        end
      dout = dat[BW];
    end
  end else begin : g_rev
    always_comb begin
      dat[BW] = din;
      for (int s = BW - 1; s >= 0; s--)
        for (int k = 0; k < PE / 2; k++) begin
          dat[s][2*k]   = sw_cross[s][k] ? dat[s+1][up_port(s, k) + (PE >> s) / 2] : dat[s+1][up_port(s, k)];
          dat[s][2*k+1] = sw_cross[s][k] ? dat[s+1][up_port(s, k)] : dat[s+1][up_port(s, k) + (PE >> s) / 2];
        end
      dout = dat[0];
    end
  end

endmodule
