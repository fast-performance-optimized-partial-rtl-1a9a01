// pmc_bus_pipe: the narrow compressed address bus between L1 and L2.
//
// A long on-chip bus is split by flip-flops into LAT stages, so a beat
// driven in cycle t arrives in cycle t+LAT; one beat enters and one leaves
// every cycle. The valid strobe travels with the data. LAT is the bus
// latency in CPU cycles: the document evaluates latencies set by the wire
// delay of each compressed bus width, and how far the saved wiring area
// lets the wires be spaced apart to shorten it. The electrical side (wire
// spacing, crosstalk) is a layout matter and is not modelled; only the
// cycle latency is. Valid bits reset to 0; data bits carry no reset.
module pmc_bus_pipe #(
  parameter int unsigned BUS_W = 12,
  parameter int unsigned LAT   = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid_i,
  input  logic [BUS_W-1:0] in_data_i,
  output logic             out_valid_o,
  output logic [BUS_W-1:0] out_data_o
);

  logic [LAT-1:0]            vld_q;
  logic [LAT-1:0][BUS_W-1:0] dat_q;

  always_ff @(posedge clk) begin
    if (!rst_n) vld_q <= '0;
    else begin
      vld_q[0] <= in_valid_i;
      for (int unsigned s = 1; s < LAT; s++) vld_q[s] <= vld_q[s-1];
    end
  end

  always_ff @(posedge clk) begin
    dat_q[0] <= in_data_i;
    for (int unsigned s = 1; s < LAT; s++) dat_q[s] <= dat_q[s-1];
  end

  assign out_valid_o = vld_q[LAT-1];
  assign out_data_o  = dat_q[LAT-1];

  initial assert (LAT >= 1) else $error("LAT must be at least one cycle");

endmodule
