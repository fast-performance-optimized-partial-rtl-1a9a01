// pmc_partial_match: longest-match search over one set of the compression
// cache.
//
// For every way of the indexed set the incoming tag is compared with the
// stored tag over the whole tag field (complete hit) and over each supported
// partition, i.e. over tag bits [TAG_W-1:PART_LSB[j-1]] for partition j.
// Partitions are checked from the widest to the narrowest; the first one that
// matches in any valid way wins, so the reported class is always the longest
// supported match. Among several ways with the same match length the lowest
// numbered way is reported. No match at all is a complete miss
// (class NPART+1). The search is purely combinational.
//
// Following the document: complete hit / partial hit at the longest
// partition / complete miss, and "the entry that has the longest matching
// length is the hit entry". The tie-break to the lowest way and the masking
// of invalid entries are this design's choices.
module pmc_partial_match
  import pmc_pkg::*;
#(
  parameter int unsigned TAG_W    = 28,
  parameter int unsigned WAYS     = 2,
  parameter int unsigned NPART    = 1,
  parameter lsb_list_t   PART_LSB = '{11, 0, 0, 0, 0, 0, 0, 0},
  localparam int unsigned WAY_W   = (WAYS > 1) ? $clog2(WAYS) : 1
) (
  input  logic [TAG_W-1:0]             tag_i,      // tag of the incoming address
  input  logic [WAYS-1:0][TAG_W-1:0]   set_tag_i,  // stored tags of the indexed set
  input  logic [WAYS-1:0]              set_vld_i,  // valid bits of the indexed set
  output pmc_class_t                   cls_o,      // 0 hit, 1..NPART partial, NPART+1 miss
  output logic [WAY_W-1:0]             way_o       // way that gave the match (0 on a miss)
);

  // match[j][w]: way w matches over tag bits [TAG_W-1:lsb(j)], lsb(0) = 0.
  logic [NPART:0][WAYS-1:0] match;

  always_comb begin
    for (int unsigned j = 0; j <= NPART; j++) begin
      for (int unsigned w = 0; w < WAYS; w++) begin
        if (j == 0)
          match[j][w] = set_vld_i[w] && (set_tag_i[w] == tag_i);
        else
          match[j][w] = set_vld_i[w] &&
                        ((set_tag_i[w] >> PART_LSB[j-1]) == (tag_i >> PART_LSB[j-1]));
      end
    end
  end

  always_comb begin
    logic found;
    found = 1'b0;
    cls_o = pmc_class_t'(NPART + 1);
    way_o = '0;
    for (int unsigned j = 0; j <= NPART; j++) begin
      for (int unsigned w = 0; w < WAYS; w++) begin
        if (!found && match[j][w]) begin
          found = 1'b1;
          cls_o = pmc_class_t'(j);
          way_o = WAY_W'(w);
        end
      end
    end
  end

  initial begin
    assert (NPART <= MAX_PART) else $error("NPART exceeds MAX_PART");
    for (int unsigned j = 0; j < NPART; j++) begin
      assert (PART_LSB[j] > 0 && PART_LSB[j] < TAG_W)
        else $error("partition LSB out of range");
      if (j > 0) assert (PART_LSB[j] > PART_LSB[j-1])
        else $error("partition LSBs must increase");
    end
  end

endmodule
