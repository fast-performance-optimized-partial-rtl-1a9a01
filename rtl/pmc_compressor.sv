// pmc_compressor: sending end of the partial match compression (PMC) link.
//
// Each accepted address is split into tag, index and low field, and its set
// in the compression cache is searched for the longest supported match
// (pmc_partial_match). The packet for the resulting class is formed (see
// pmc_pkg for the layout), the cache is updated in the same cycle, and the
// packet is then driven onto the narrow bus, BUS_W bits per cycle, most
// significant bits first:
//   complete hit  - 1 beat, the hit way becomes most recently used;
//   partial hit   - C_H=0, partition code, I, W, unmatched tag bits, U;
//   complete miss - C_H=0, all-ones code, the whole address.
// On a partial hit or a miss the least recently used way of the set is
// replaced by the new tag, so the cache holds exactly what a plain bus
// expander cache would hold.
//
// Interface and timing: in_valid_i/in_ready_o is a valid/ready handshake;
// an address accepted at a rising edge has its first beat on bus_data_o in
// the following cycle (bus_valid_o high) and its remaining beats in the
// cycles after that. in_ready_o is high when at most one beat is left, so
// complete hits stream at one address per cycle and a packet of n beats
// holds off the next address for n-1 cycles (the transmission cycle
// penalty). The bus itself has no back-pressure. acc_cls_o reports the
// class of the address being accepted in this cycle.
//
// The lookup, replacement rule, packet contents and MSB-first transmission
// follow the document. The handshake, the bus valid strobe (not counted in
// the bus width) and the registered output are this design's choices.
module pmc_compressor
  import pmc_pkg::*;
#(
  parameter int unsigned BUS_W    = 12,
  parameter int unsigned IDX_W    = 3,
  parameter int unsigned TAG_W    = 28,
  parameter int unsigned WAYS     = 2,
  parameter int unsigned NPART    = 1,
  parameter lsb_list_t   PART_LSB = '{11, 0, 0, 0, 0, 0, 0, 0},
  localparam int unsigned WAY_W   = (WAYS > 1) ? $clog2(WAYS) : 1,
  localparam int unsigned U_W     = ADDR_W - TAG_W - IDX_W,
  localparam int unsigned CW      = code_w(NPART),
  localparam int unsigned PKT_W   = max_pkt_w(NPART, PART_LSB, BUS_W, IDX_W, WAY_W, U_W),
  localparam int unsigned NBEATS  = PKT_W / BUS_W,
  localparam int unsigned BCNT_W  = $clog2(NBEATS + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  // uncompressed address in
  input  logic              in_valid_i,
  output logic              in_ready_o,
  input  logic [ADDR_W-1:0] in_addr_i,
  // compressed bus out
  output logic              bus_valid_o,
  output logic [BUS_W-1:0]  bus_data_o,
  // class of the address accepted in this cycle
  output pmc_class_t        acc_cls_o
);

  logic [TAG_W-1:0] in_tag;
  logic [IDX_W-1:0] in_idx;
  logic [U_W-1:0]   in_u;
  assign {in_tag, in_idx, in_u} = in_addr_i;

  logic [WAYS-1:0][TAG_W-1:0] set_tag;
  logic [WAYS-1:0]            set_vld;
  logic [WAY_W-1:0]           lru_way, match_way;
  pmc_class_t                 cls;
  logic                       accept;

  pmc_tag_array #(.TAG_W(TAG_W), .IDX_W(IDX_W), .WAYS(WAYS)) u_cache (
    .clk, .rst_n,
    .rd_idx_i (in_idx),
    .rd_tag_o (set_tag),
    .rd_vld_o (set_vld),
    .rd_lru_o (lru_way),
    .upd_i    (accept),
    .upd_wr_i (cls != '0),
    .upd_idx_i(in_idx),
    .upd_way_i((cls == '0) ? match_way : lru_way),
    .upd_tag_i(in_tag)
  );

  pmc_partial_match #(.TAG_W(TAG_W), .WAYS(WAYS), .NPART(NPART), .PART_LSB(PART_LSB)) u_match (
    .tag_i    (in_tag),
    .set_tag_i(set_tag),
    .set_vld_i(set_vld),
    .cls_o    (cls),
    .way_o    (match_way)
  );

  // Packet and beat count for the current lookup.
  logic [PKT_W-1:0]  pkt_new;
  logic [BCNT_W-1:0] beats_new;

  always_comb begin
    pkt_vec_t    v;
    int unsigned pos;
    v   = '0;
    pos = PKT_MAX;
    beats_new = '0;
    if (cls == '0) begin
      v   = pkt_put(v, pos, 64'd1, 1);
      pos -= 1;
      v   = pkt_put(v, pos, 64'(in_idx), IDX_W);
      pos -= IDX_W;
      v   = pkt_put(v, pos, 64'(match_way), WAY_W);
      pos -= WAY_W;
      v   = pkt_put(v, pos, 64'(in_u), U_W);
      pos -= U_W;
    end else if (cls == pmc_class_t'(NPART + 1)) begin
      v   = pkt_put(v, pos, 64'd0, 1);
      pos -= 1;
      v   = pkt_put(v, pos, low_mask(CW), CW);
      pos -= CW;
      v   = pkt_put(v, pos, 64'(in_addr_i), ADDR_W);
      pos -= ADDR_W;
    end else begin
      v   = pkt_put(v, pos, 64'd0, 1);
      pos -= 1;
      v   = pkt_put(v, pos, 64'(cls - 1'b1), CW);
      pos -= CW;
      v   = pkt_put(v, pos, 64'(in_idx), IDX_W);
      pos -= IDX_W;
      v   = pkt_put(v, pos, 64'(match_way), WAY_W);
      pos -= WAY_W;
      for (int unsigned j = 1; j <= NPART; j++) begin
        if (cls == pmc_class_t'(j)) begin
          v   = pkt_put(v, pos, 64'(in_tag), PART_LSB[j-1]);
          pos -= PART_LSB[j-1];
        end
      end
      v   = pkt_put(v, pos, 64'(in_u), U_W);
      pos -= U_W;
    end
    for (int unsigned c = 0; c <= NPART + 1; c++)
      if (cls == pmc_class_t'(c))
        beats_new = BCNT_W'(pkt_beats(c, NPART, PART_LSB, BUS_W, IDX_W, WAY_W, U_W));
    pkt_new = v[PKT_MAX-1 -: PKT_W];
  end

  // Serializer.
  logic [PKT_W-1:0]  pkt_q;
  logic [BCNT_W-1:0] beats_q;

  assign in_ready_o  = (beats_q <= BCNT_W'(1));
  assign accept      = in_valid_i && in_ready_o;
  assign bus_valid_o = (beats_q != '0);
  assign bus_data_o  = pkt_q[PKT_W-1 -: BUS_W];
  assign acc_cls_o   = accept ? cls : '0;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      beats_q <= '0;
      pkt_q   <= '0;
    end else if (accept) begin
      beats_q <= beats_new;
      pkt_q   <= pkt_new;
    end else if (beats_q != '0) begin
      beats_q <= beats_q - 1'b1;
      pkt_q   <= pkt_q << BUS_W;
    end
  end

  // An offered address must stay put until it is taken.
  logic              held_q;
  logic [ADDR_W-1:0] held_addr_q;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      held_q <= 1'b0;
      held_addr_q <= '0;
    end else begin
      held_q <= in_valid_i && !in_ready_o;
      held_addr_q <= in_addr_i;
      if (held_q) assert (in_valid_i && in_addr_i == held_addr_q)
        else $error("address withdrawn or changed while stalled");
    end
  end

  initial begin
    assert (BUS_W == 1 + IDX_W + WAY_W + U_W)
      else $error("bus width must equal C_H + I + W + U");
    assert (TAG_W + IDX_W < ADDR_W) else $error("no U field left");
    assert (PKT_W <= PKT_MAX) else $error("packet wider than PKT_MAX");
  end

endmodule
