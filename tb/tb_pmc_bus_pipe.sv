// tb_pmc_bus_pipe: sends random beats with random valid through a bus of
// latency 3 and checks that each cycle's output equals what went in exactly
// 3 cycles earlier, valid included, and that valid is low after reset.
module tb_pmc_bus_pipe;

  localparam int BUS_W = 12;
  localparam int LAT   = 3;

  logic             clk;
  logic             rst_n;
  logic             in_valid, out_valid;
  logic [BUS_W-1:0] in_data, out_data;

  pmc_bus_pipe #(.BUS_W(BUS_W), .LAT(LAT)) u_dut (
    .clk, .rst_n,
    .in_valid_i(in_valid), .in_data_i(in_data),
    .out_valid_o(out_valid), .out_data_o(out_data)
  );

  initial begin
    clk = 0;
    forever #5 clk = ~clk;
  end

  int checks = 0, failures = 0;
  logic             hv [$];
  logic [BUS_W-1:0] hd [$];

  initial begin
    rst_n = 0;
    in_valid = 1;
    in_data = '0;
    repeat (4) @(posedge clk);
    @(negedge clk);
    checks++;
    if (out_valid) failures++;
    rst_n = 1;
    in_valid = 0;
    for (int k = 0; k < LAT - 1; k++) begin
      hv.push_back(1'b0);
      hd.push_back('0);
    end
    for (int n = 0; n < 2000; n++) begin
      in_valid = 1'($urandom());
      in_data = BUS_W'($urandom());
      hv.push_back(in_valid);
      hd.push_back(in_data);
      @(negedge clk);
      begin
        logic ev;
        logic [BUS_W-1:0] ed;
        ev = hv.pop_front();
        ed = hd.pop_front();
        if (n >= LAT - 1) begin
          checks++;
          if (out_valid != ev || (ev && out_data != ed)) begin
            failures++;
            if (failures < 10) $display("FAIL at %0d: %b %h expected %b %h", n, out_valid, out_data, ev, ed);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
