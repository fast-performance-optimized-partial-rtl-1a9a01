// tb_pmc_compressor: checks the sending end bit by bit on the 8-wire bus
// configuration (2 sets x 2 ways, 32-bit tags, partitions at tag bits 6, 14
// and 22, so codes 00/01/10 and 11 for a complete miss).
//
// Every beat on the bus is compared with the packet the reference model
// builds. The number of beats of each packet is compared with the partition
// table of the design (1 for a hit; 2, 3 and 4 for the three partitions; 6
// for a complete miss), and in_ready must stay low for exactly n-1 cycles
// after an n-beat packet. Every class must occur.
module tb_pmc_compressor;
  import pmc_pkg::*;
  import pmc_ref_pkg::*;

  localparam int BUS_W = 8;
  localparam int N_ADDR = 3000;
  localparam int EXP_BEATS [5] = '{1, 2, 3, 4, 6};

  logic              clk;
  logic              rst_n;
  logic              in_valid;
  logic              in_ready;
  logic [ADDR_W-1:0] in_addr;
  logic              bus_valid;
  logic [BUS_W-1:0]  bus_data;
  pmc_class_t        acc_cls;

  pmc_compressor #(
    .BUS_W(8), .IDX_W(1), .TAG_W(32), .WAYS(2), .NPART(3),
    .PART_LSB('{6, 14, 22, 0, 0, 0, 0, 0})
  ) u_dut (
    .clk, .rst_n,
    .in_valid_i(in_valid), .in_ready_o(in_ready), .in_addr_i(in_addr),
    .bus_valid_o(bus_valid), .bus_data_o(bus_data), .acc_cls_o(acc_cls)
  );

  initial begin
    clk = 0;
    forever #5 clk = ~clk;
  end

  int checks = 0, failures = 0;
  int cnt_cls [5] = '{0, 0, 0, 0, 0};
  bit exp_bits[$];
  int exp_pkt_beats[$];
  int beats_in_pkt;
  initial beats_in_pkt = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // Bus monitor: compare every beat with the expected bit stream.
  always @(posedge clk) begin
    if (rst_n && bus_valid) begin
      logic [BUS_W-1:0] e;
      if (exp_bits.size() < BUS_W) check(0, "unexpected beat");
      else begin
        for (int b = BUS_W - 1; b >= 0; b--) e[b] = exp_bits.pop_front();
        check(bus_data == e, $sformatf("beat %h expected %h", bus_data, e));
        beats_in_pkt++;
        if (beats_in_pkt == exp_pkt_beats[0]) begin
          void'(exp_pkt_beats.pop_front());
          beats_in_pkt = 0;
        end
      end
    end
  end

  initial begin
    pmc_ref ref_m;
    bit bits[$];
    int cls, waited, prev_beats;
    bit back_to_back;
    ref_m = new(8, 1, 32, 2, 3, 6, 14, 22);
    rst_n = 0;
    in_valid = 0;
    in_addr = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    prev_beats = 1;
    back_to_back = 0;
    for (int n = 0; n < N_ADDR; n++) begin
      if ($urandom_range(7) == 0) begin
        in_valid = 0;
        back_to_back = 0;
        @(negedge clk);
      end
      in_addr = ref_m.gen();
      in_valid = 1;
      ref_m.compress(in_addr, cls, bits);
      waited = 0;
      #1;
      while (!in_ready) begin
        waited++;
        @(negedge clk);
        #1;
      end
      if (back_to_back)
        check(waited == prev_beats - 1,
              $sformatf("waited %0d cycles after %0d-beat packet", waited, prev_beats));
      check(int'(acc_cls) == cls, $sformatf("class %0d expected %0d", acc_cls, cls));
      check(bits.size() == EXP_BEATS[cls] * BUS_W,
            $sformatf("class %0d packet of %0d bits", cls, bits.size()));
      foreach (bits[i]) exp_bits.push_back(bits[i]);
      exp_pkt_beats.push_back(EXP_BEATS[cls]);
      cnt_cls[cls]++;
      prev_beats = EXP_BEATS[cls];
      back_to_back = 1;
      @(negedge clk);
    end
    in_valid = 0;
    repeat (10) @(posedge clk);
    check(exp_bits.size() == 0, "beats missing at the end");
    $display("classes: hit=%0d p1=%0d p2=%0d p3=%0d miss=%0d",
             cnt_cls[0], cnt_cls[1], cnt_cls[2], cnt_cls[3], cnt_cls[4]);
    for (int c = 0; c < 5; c++) check(cnt_cls[c] > 0, $sformatf("class %0d never occurred", c));
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
