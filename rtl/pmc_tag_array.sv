// pmc_tag_array: set-associative tag store with valid bits and true LRU.
//
// SETS x WAYS entries, each holding a TAG_W-bit tag, a valid bit and an
// LRU age (0 = most recently used, WAYS-1 = least recently used). The same
// module is the compression cache tag-RAM at the sending end and the
// register file at the receiving end; both ends apply identical updates, so
// their contents stay equal.
//
// Read: combinational, the whole set rd_idx_i (tags, valids) plus the LRU
// way of that set.
// Update (one per clock, at the rising edge when upd_i is high):
//   upd_wr_i = 0 : touch   - way upd_way_i becomes most recently used
//   upd_wr_i = 1 : replace - way upd_way_i gets tag upd_tag_i, becomes valid
//                            and most recently used
// Reset (synchronous, active low) clears all valid bits and gives way w the
// age WAYS-1-w, so way 0 is the first one replaced.
//
// The document fixes LRU replacement of the indexed set; the age encoding,
// per-entry valid bit and reset state are this design's choices. With
// 2 ways this is one valid and one LRU bit per entry, which reproduces the
// document's 480-bit cache for the 12-bit bus (8 sets x 2 ways x 30 bits).
module pmc_tag_array
  import pmc_pkg::*;
#(
  parameter int unsigned TAG_W   = 28,
  parameter int unsigned IDX_W   = 3,
  parameter int unsigned WAYS    = 2,
  localparam int unsigned SETS   = 1 << IDX_W,
  localparam int unsigned WAY_W  = (WAYS > 1) ? $clog2(WAYS) : 1,
  localparam int unsigned AGE_W  = WAY_W
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // read port
  input  logic [IDX_W-1:0]             rd_idx_i,
  output logic [WAYS-1:0][TAG_W-1:0]   rd_tag_o,
  output logic [WAYS-1:0]              rd_vld_o,
  output logic [WAY_W-1:0]             rd_lru_o,
  // update port
  input  logic                         upd_i,
  input  logic                         upd_wr_i,
  input  logic [IDX_W-1:0]             upd_idx_i,
  input  logic [WAY_W-1:0]             upd_way_i,
  input  logic [TAG_W-1:0]             upd_tag_i
);

  logic [TAG_W-1:0] tag_q [SETS][WAYS];
  logic [WAYS-1:0]  vld_q [SETS];
  logic [AGE_W-1:0] age_q [SETS][WAYS];

  always_comb begin
    rd_lru_o = '0;
    for (int unsigned w = 0; w < WAYS; w++) begin
      rd_tag_o[w] = tag_q[rd_idx_i][w];
      if (age_q[rd_idx_i][w] == AGE_W'(WAYS - 1)) rd_lru_o = WAY_W'(w);
    end
    rd_vld_o = vld_q[rd_idx_i];
  end

  // Tags carry no reset: they are only read where the valid bit is set.
  always_ff @(posedge clk) begin
    if (upd_i && upd_wr_i) tag_q[upd_idx_i][upd_way_i] <= upd_tag_i;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int unsigned s = 0; s < SETS; s++) begin
        vld_q[s] <= '0;
        for (int unsigned w = 0; w < WAYS; w++) age_q[s][w] <= AGE_W'(WAYS - 1 - w);
      end
    end else if (upd_i) begin
      if (upd_wr_i) vld_q[upd_idx_i][upd_way_i] <= 1'b1;
      for (int unsigned w = 0; w < WAYS; w++) begin
        if (WAY_W'(w) == upd_way_i)
          age_q[upd_idx_i][w] <= '0;
        else if (age_q[upd_idx_i][w] < age_q[upd_idx_i][upd_way_i])
          age_q[upd_idx_i][w] <= age_q[upd_idx_i][w] + 1'b1;
      end
    end
  end

endmodule
