// pmc_decompressor: receiving end of the partial match compression link.
//
// Beats arriving on the narrow bus are collected into a packet buffer. The
// first beat of a packet tells its class: C_H=1 is a complete hit (one
// beat), otherwise the partition code that follows C_H gives the partial
// partition or, all ones, a complete miss, and with it the packet length.
// When the last beat of a packet is on the bus the full address is rebuilt
// in that cycle from the register file, a copy of the sender's tags:
//   complete hit  - tag of entry (I, W) | I | U
//   partial hit   - upper tag bits [TAG_W-1:LSB_j] of entry (I, W),
//                   received lower tag bits | I | U
//   complete miss - the address as received.
// The register file then gets the same update the sender's cache got: the
// hit way becomes most recently used, or the least recently used way of the
// set takes the new tag. Sender and receiver therefore stay in step without
// any extra signalling, as long as no beat is lost.
//
// Interface and timing: one beat per cycle on bus_valid_i/bus_data_i, no
// back-pressure. out_valid_o pulses for one cycle, with out_addr_o and
// out_cls_o, in the cycle after the last beat of a packet was received.
//
// Reconstruction and the mirrored update follow the document ("the
// decompresser will be updated at the receiving end accordingly"); the
// packet framing by C_H and code and the registered output are this
// design's choices.
module pmc_decompressor
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
  // compressed bus in
  input  logic              bus_valid_i,
  input  logic [BUS_W-1:0]  bus_data_i,
  // rebuilt address out
  output logic              out_valid_o,
  output logic [ADDR_W-1:0] out_addr_o,
  output pmc_class_t        out_cls_o
);

  logic [PKT_W-1:0]  buf_q;   // beats received so far, left aligned
  logic [BCNT_W-1:0] got_q;   // number of beats received so far

  // Current packet including the beat on the bus, and its decoded fields.
  logic [PKT_W-1:0]  merged;
  pkt_vec_t          cur;
  pmc_class_t        cls;
  logic [BCNT_W-1:0] need;
  logic              last;
  logic [IDX_W-1:0]  f_idx;
  logic [WAY_W-1:0]  f_way;
  logic [TAG_W-1:0]  f_tmiss;
  logic [U_W-1:0]    f_u;
  logic [ADDR_W-1:0] f_addr;
  logic [CW:0]       f_code;  // one spare bit so that CW = 0 still compiles

  always_comb begin
    int unsigned pos;
    merged = buf_q | (PKT_W'(bus_data_i) << (PKT_W - BUS_W * (int'(got_q) + 1)));
    cur    = {merged, {(PKT_MAX - PKT_W){1'b0}}};
    f_code = (CW + 1)'(pkt_get(cur, PKT_MAX - 1, CW));
    if (cur[PKT_MAX-1])
      cls = '0;
    else if (CW == 0 || f_code == (CW + 1)'(low_mask(CW)))
      cls = pmc_class_t'(NPART + 1);
    else
      cls = pmc_class_t'(f_code) + 1'b1;
    need = '0;
    for (int unsigned c = 0; c <= NPART + 1; c++)
      if (cls == pmc_class_t'(c))
        need = BCNT_W'(pkt_beats(c, NPART, PART_LSB, BUS_W, IDX_W, WAY_W, U_W));
    last = bus_valid_i && (got_q + 1'b1 == need);

    // Field extraction for the decoded class.
    f_idx   = '0;
    f_way   = '0;
    f_tmiss = '0;
    f_u     = '0;
    f_addr  = '0;
    pos     = PKT_MAX - 1;
    if (cls == '0) begin
      f_idx = IDX_W'(pkt_get(cur, pos, IDX_W));
      pos  -= IDX_W;
      f_way = WAY_W'(pkt_get(cur, pos, WAY_W));
      pos  -= WAY_W;
      f_u   = U_W'(pkt_get(cur, pos, U_W));
    end else if (cls == pmc_class_t'(NPART + 1)) begin
      pos   -= CW;
      f_addr = ADDR_W'(pkt_get(cur, pos, ADDR_W));
      f_idx  = f_addr[U_W +: IDX_W];
    end else begin
      pos  -= CW;
      f_idx = IDX_W'(pkt_get(cur, pos, IDX_W));
      pos  -= IDX_W;
      f_way = WAY_W'(pkt_get(cur, pos, WAY_W));
      pos  -= WAY_W;
      for (int unsigned j = 1; j <= NPART; j++) begin
        if (cls == pmc_class_t'(j)) begin
          f_tmiss = TAG_W'(pkt_get(cur, pos, PART_LSB[j-1]));
          pos    -= PART_LSB[j-1];
        end
      end
      f_u = U_W'(pkt_get(cur, pos, U_W));
    end
  end

  // Register file (mirror of the sender's compression cache).
  logic [WAYS-1:0][TAG_W-1:0] set_tag;
  logic [WAYS-1:0]            set_vld;
  logic [WAY_W-1:0]           lru_way;
  logic [TAG_W-1:0]           new_tag;
  logic [ADDR_W-1:0]          new_addr;

  always_comb begin
    logic [TAG_W-1:0] upper;
    upper    = '0;
    new_tag  = set_tag[f_way];
    new_addr = {new_tag, f_idx, f_u};
    if (cls == pmc_class_t'(NPART + 1)) begin
      new_tag  = f_addr[ADDR_W-1 -: TAG_W];
      new_addr = f_addr;
    end else if (cls != '0) begin
      for (int unsigned j = 1; j <= NPART; j++)
        if (cls == pmc_class_t'(j))
          upper = (set_tag[f_way] >> PART_LSB[j-1]) << PART_LSB[j-1];
      new_tag  = upper | f_tmiss;
      new_addr = {new_tag, f_idx, f_u};
    end
  end

  pmc_tag_array #(.TAG_W(TAG_W), .IDX_W(IDX_W), .WAYS(WAYS)) u_regfile (
    .clk, .rst_n,
    .rd_idx_i (f_idx),
    .rd_tag_o (set_tag),
    .rd_vld_o (set_vld),
    .rd_lru_o (lru_way),
    .upd_i    (last),
    .upd_wr_i (cls != '0),
    .upd_idx_i(f_idx),
    .upd_way_i((cls == '0) ? f_way : lru_way),
    .upd_tag_i(new_tag)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      buf_q       <= '0;
      got_q       <= '0;
      out_valid_o <= 1'b0;
      out_addr_o  <= '0;
      out_cls_o   <= '0;
    end else begin
      out_valid_o <= last;
      if (last) begin
        out_addr_o <= new_addr;
        out_cls_o  <= cls;
        buf_q      <= '0;
        got_q      <= '0;
      end else if (bus_valid_i) begin
        buf_q <= merged;
        got_q <= got_q + 1'b1;
      end
      // A hit or partial hit must name an entry the sender had filled.
      if (last && cls != pmc_class_t'(NPART + 1))
        assert (set_vld[f_way]) else $error("packet refers to an empty entry");
      if (bus_valid_i && got_q == '0 && !cur[PKT_MAX-1] && CW != 0 &&
          f_code != (CW + 1)'(low_mask(CW)))
        assert (f_code < (CW + 1)'(NPART)) else $error("unknown partition code");
    end
  end

endmodule
