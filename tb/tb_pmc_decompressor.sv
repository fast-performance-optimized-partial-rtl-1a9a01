// tb_pmc_decompressor: checks the receiving end on the 10-wire bus
// configuration (4 sets x 2 ways, 30-bit tags, partitions at tag bits 9
// and 18).
//
// The reference model compresses an address stream; its packets are put on
// the bus beat by beat, with idle cycles between packets and, now and then,
// inside a packet. Each rebuilt address and its class must match, and must
// appear exactly one cycle after the last beat of its packet. Every class
// must occur.
module tb_pmc_decompressor;
  import pmc_pkg::*;
  import pmc_ref_pkg::*;

  localparam int BUS_W = 10;
  localparam int N_ADDR = 3000;

  logic              clk;
  logic              rst_n;
  logic              bus_valid;
  logic [BUS_W-1:0]  bus_data;
  logic              out_valid;
  logic [ADDR_W-1:0] out_addr;
  pmc_class_t        out_cls;

  pmc_decompressor #(
    .BUS_W(10), .IDX_W(2), .TAG_W(30), .WAYS(2), .NPART(2),
    .PART_LSB('{9, 18, 0, 0, 0, 0, 0, 0})
  ) u_dut (
    .clk, .rst_n,
    .bus_valid_i(bus_valid), .bus_data_i(bus_data),
    .out_valid_o(out_valid), .out_addr_o(out_addr), .out_cls_o(out_cls)
  );

  initial begin
    clk = 0;
    forever #5 clk = ~clk;
  end

  int checks, failures;
  int cnt_cls [4];
  initial begin
    checks = 0;
    failures = 0;
    cnt_cls = '{0, 0, 0, 0};
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    pmc_ref ref_m;
    bit bits[$];
    int cls, nb;
    logic [ADDR_W-1:0] a;
    ref_m = new(10, 2, 30, 2, 2, 9, 18);
    rst_n = 0;
    bus_valid = 0;
    bus_data = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < N_ADDR; n++) begin
      a = ref_m.gen();
      ref_m.compress(a, cls, bits);
      nb = bits.size() / BUS_W;
      for (int k = 0; k < nb; k++) begin
        if ($urandom_range(15) == 0) begin
          bus_valid = 0;
          @(negedge clk);
          check(!out_valid, "output before the last beat");
        end
        bus_valid = 1;
        for (int b = BUS_W - 1; b >= 0; b--) bus_data[b] = bits[k * BUS_W + (BUS_W - 1 - b)];
        @(negedge clk);
        if (k < nb - 1) check(!out_valid, "output before the last beat");
      end
      bus_valid = 0;
      bus_data = '0;
      check(out_valid, "no output one cycle after the last beat");
      check(out_addr == a, $sformatf("addr %h expected %h (class %0d)", out_addr, a, cls));
      check(int'(out_cls) == cls, $sformatf("class %0d expected %0d", out_cls, cls));
      cnt_cls[cls]++;
      // the next packet starts right away most of the time
      if ($urandom_range(3) == 0) begin
        @(negedge clk);
        check(!out_valid, "spurious output");
      end
    end
    $display("classes: hit=%0d p1=%0d p2=%0d miss=%0d", cnt_cls[0], cnt_cls[1], cnt_cls[2], cnt_cls[3]);
    for (int c = 0; c < 4; c++) check(cnt_cls[c] > 0, $sformatf("class %0d never occurred", c));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
