// ecc_pkg -- sizes and helper functions shared by the reconfigurable
// memory-mapping subsystem of a parallel turbo/LDPC decoder.
//
// Defaults follow the hardware evaluation of the design: parallelism
// PE = 8 and block lengths up to 5120.  The data word width of the
// memory banks is this design's own choice (8 bits, one soft value).
//
// Two functions capture the butterfly topology that both the mapping unit
// and the network use:
//   aomm_place  : the placement rule applied in every partition pass of the
//                 mapping algorithm (new location of an element, given its
//                 current location, the half it is sent to and the size of
//                 its partition);
//   bfly_subpos : where switch m of a group of g network ports feeds the
//                 next (half-size) group.  aomm_place(loc,h,g) equals
//                 start + h*g/2 + bfly_subpos((loc-start)/2, g).
// Both expect power-of-two sizes; locations are at most 16 bits wide.
package ecc_pkg;

  parameter int unsigned PE_DEF   = 8;     // processing elements / RAM banks
  parameter int unsigned KMAX_DEF = 5120;  // largest block length
  parameter int unsigned DW_DEF   = 8;     // data word width (own choice)

  // Order in which the PEs sweep the block.
  typedef enum logic {
    ORDER_NAT = 1'b0,   // natural order: PE j, step i -> data i + j*n
    ORDER_INT = 1'b1    // interleaved order: PE j, step i -> data pi(i + j*n)
  } order_e;

  // Placement rule of one partition pass.  loc: current location (switch
  // element SE = loc with bit 0 cleared); h: 0 = first half of the
  // partition, 1 = second half; psize: partition size (power of two, >= 2).
  function automatic logic [15:0] aomm_place(logic [15:0] loc, logic h,
                                             logic [15:0] psize);
    logic [15:0] start, se, offset, half;
    start  = loc & ~(psize - 16'd1);
    se     = loc & ~16'd1;
    offset = psize >> 1;
    half   = start + offset;
    if (!h) return (se < half) ? se : se - offset + 16'd1;
    else    return (se < half) ? se + offset : se + 16'd1;
  endfunction

  // Position inside the next-stage group fed by switch m of a group of g
  // ports (g a power of two, >= 2).
  function automatic int unsigned bfly_subpos(int unsigned m, int unsigned g);
    if (g <= 2) return 0;
    return 2 * (m % (g / 4)) + m / (g / 4);
  endfunction

endpackage
