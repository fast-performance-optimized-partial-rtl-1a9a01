// pmc_pkg: types, constants and packet-format helpers shared by the
// partial match compression (PMC) link.
//
// The link compresses 38-bit L1->L2 physical addresses. An address is split,
// from MSB to LSB, into a tag field T, an index field I and an uncompressed
// low field U. The compression cache holds recent tags per set; a lookup
// ends in one of NPART+2 classes:
//   class 0          complete hit: the whole tag matched a stored tag
//   class 1..NPART   partial hit at partition j: tag bits [T-1:LSB_j] matched
//   class NPART+1    complete miss
// Partition LSBs are counted from the LSB of the tag field (LSB_0 = 0), and
// partitions are ordered from the widest (class 1) to the narrowest.
//
// Packet layout on the narrow bus, packed MSB first and cut into BUS_W-bit
// beats (the first beat carries the leftmost bits, the last beat is padded
// with zeros on the right):
//   complete hit : C_H=1 | I | W | U                       exactly one beat
//   partial hit  : C_H=0 | C | I | W | T_miss | U          T_miss = tag[LSB_j-1:0]
//   complete miss: C_H=0 | C=all ones | full address
// C is a CW-bit partition code, j-1 for partition j, CW = clog2(NPART+1),
// and is absent (CW = 0) when no partial partitions are configured.
// The field order follows the document; the exact placement of C after C_H
// and the zero padding of the last beat are this design's choices.
package pmc_pkg;

  // Width of the uncompressed L1->L2 address bus.
  localparam int unsigned ADDR_W = 38;

  // Largest number of partial-match partitions a configuration may use.
  localparam int unsigned MAX_PART = 8;

  // Lookup class: 0 = complete hit, 1..NPART = partial, NPART+1 = miss.
  typedef logic [3:0] pmc_class_t;

  // List of partition LSBs (relative to the tag LSB); entries past NPART
  // are ignored.
  typedef int unsigned lsb_list_t [MAX_PART];

  function automatic int unsigned ceil_div(input int unsigned a, input int unsigned b);
    return (a + b - 1) / b;
  endfunction

  // Ceiling of log2(n), 0 for n <= 1.
  function automatic int unsigned clog2(input int unsigned n);
    int unsigned r;
    r = 0;
    while ((1 << r) < n) r++;
    return r;
  endfunction

  // Width of the partition code C.
  function automatic int unsigned code_w(input int unsigned npart);
    return (npart == 0) ? 0 : clog2(npart + 1);
  endfunction

  // Number of bits in the packet of a given class.
  function automatic int unsigned pkt_bits(input int unsigned cls,
                                           input int unsigned npart,
                                           input lsb_list_t lsb,
                                           input int unsigned bus_w,
                                           input int unsigned idx_w,
                                           input int unsigned way_w,
                                           input int unsigned u_w);
    if (cls == 0) return bus_w;
    if (cls <= npart) return 1 + code_w(npart) + idx_w + way_w + lsb[cls-1] + u_w;
    return 1 + code_w(npart) + ADDR_W;
  endfunction

  // Bus beats (cycles) needed to send a packet of a given class.
  function automatic int unsigned pkt_beats(input int unsigned cls,
                                            input int unsigned npart,
                                            input lsb_list_t lsb,
                                            input int unsigned bus_w,
                                            input int unsigned idx_w,
                                            input int unsigned way_w,
                                            input int unsigned u_w);
    return ceil_div(pkt_bits(cls, npart, lsb, bus_w, idx_w, way_w, u_w), bus_w);
  endfunction

  // Longest packet of any class, rounded up to whole beats.
  function automatic int unsigned max_pkt_w(input int unsigned npart,
                                            input lsb_list_t lsb,
                                            input int unsigned bus_w,
                                            input int unsigned idx_w,
                                            input int unsigned way_w,
                                            input int unsigned u_w);
    int unsigned m;
    m = 1;
    for (int unsigned c = 0; c <= npart + 1; c++) begin
      if (pkt_beats(c, npart, lsb, bus_w, idx_w, way_w, u_w) > m)
        m = pkt_beats(c, npart, lsb, bus_w, idx_w, way_w, u_w);
    end
    return m * bus_w;
  endfunction


  // Packets are assembled and taken apart in a left-aligned vector of
  // PKT_MAX bits; a module keeps only its top PKT_W bits.
  localparam int unsigned PKT_MAX = 128;
  typedef logic [PKT_MAX-1:0] pkt_vec_t;

  function automatic logic [63:0] low_mask(input int unsigned w);
    return (w >= 64) ? '1 : ((64'd1 << w) - 64'd1);
  endfunction

  // Put the w low bits of v into bits [top-1 : top-w] of p.
  function automatic pkt_vec_t pkt_put(input pkt_vec_t p, input int unsigned top,
                                       input logic [63:0] v, input int unsigned w);
    pkt_vec_t f;
    f = {64'd0, v & low_mask(w)};
    return (w == 0) ? p : (p | (f << (top - w)));
  endfunction

  // Read bits [top-1 : top-w] of p.
  function automatic logic [63:0] pkt_get(input pkt_vec_t p, input int unsigned top,
                                          input int unsigned w);
    return (w == 0) ? 64'd0 : (64'(p >> (top - w)) & low_mask(w));
  endfunction

endpackage
