// pmc_link: a complete partial match compressed (PMC) L1->L2 address link.
//
// Addresses of ADDR_W (38) bits enter the compressor with a valid/ready
// handshake, cross the narrow bus of BUS_W wires as one or more beats and
// leave the decompressor rebuilt, in order, one cycle after their last beat
// arrived. The default configuration is the 12-wire bus with a 2-way,
// 8-set compression cache of 28-bit tags (480 bits including valid and LRU
// bits) and one partial partition with LSB 11 besides the complete hit and
// complete miss; other rows of the document's partition table are reached
// by overriding the parameters.
//
// Timing: an address accepted at edge t appears on out_addr_o in cycle
// t + n + LAT + 1, where n is the number of beats of its class (1 for a
// complete hit, 2 for a partial hit and 4 for a complete miss by default).
// in_ready_o drops for n-1 cycles after an n-beat address: this stall is
// the transmission cycle penalty. tx_cls_o gives the class of the address
// accepted in the current cycle, rx_cls_o that of the address on the
// output.
module pmc_link
  import pmc_pkg::*;
#(
  parameter int unsigned BUS_W    = 12,
  parameter int unsigned IDX_W    = 3,
  parameter int unsigned TAG_W    = 28,
  parameter int unsigned WAYS     = 2,
  parameter int unsigned NPART    = 1,
  parameter lsb_list_t   PART_LSB = '{11, 0, 0, 0, 0, 0, 0, 0},
  parameter int unsigned LAT      = 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid_i,
  output logic              in_ready_o,
  input  logic [ADDR_W-1:0] in_addr_i,
  output pmc_class_t        tx_cls_o,
  output logic              out_valid_o,
  output logic [ADDR_W-1:0] out_addr_o,
  output pmc_class_t        rx_cls_o
);

  logic             tx_valid, rx_valid;
  logic [BUS_W-1:0] tx_data, rx_data;

  pmc_compressor #(
    .BUS_W(BUS_W), .IDX_W(IDX_W), .TAG_W(TAG_W), .WAYS(WAYS),
    .NPART(NPART), .PART_LSB(PART_LSB)
  ) u_comp (
    .clk, .rst_n,
    .in_valid_i, .in_ready_o, .in_addr_i,
    .bus_valid_o(tx_valid),
    .bus_data_o (tx_data),
    .acc_cls_o  (tx_cls_o)
  );

  pmc_bus_pipe #(.BUS_W(BUS_W), .LAT(LAT)) u_bus (
    .clk, .rst_n,
    .in_valid_i (tx_valid),
    .in_data_i  (tx_data),
    .out_valid_o(rx_valid),
    .out_data_o (rx_data)
  );

  pmc_decompressor #(
    .BUS_W(BUS_W), .IDX_W(IDX_W), .TAG_W(TAG_W), .WAYS(WAYS),
    .NPART(NPART), .PART_LSB(PART_LSB)
  ) u_decomp (
    .clk, .rst_n,
    .bus_valid_i(rx_valid),
    .bus_data_i (rx_data),
    .out_valid_o,
    .out_addr_o,
    .out_cls_o  (rx_cls_o)
  );

endmodule
