// tb_pmc_cfg_run: end-to-end run of one PMC link configuration, used by
// tb_pmc_configs.
//
// Offers N_ADDR addresses from the reference model's generator with random
// idle cycles, and checks for every address its class at both ends, the
// rebuilt address, its latency (EXP_BEATS[class] + LAT + 1 cycles from
// acceptance to output) and, when addresses follow back to back, that the
// sender stalls for EXP_BEATS-1 cycles. EXP_BEATS lists the bus cycles per
// class, hit first, complete miss last. done_o rises when the run is over;
// checks_o, failures_o and the per-class counts are valid from then on.
module tb_pmc_cfg_run
  import pmc_pkg::*;
  import pmc_ref_pkg::*;
#(
  parameter int        BUS_W     = 12,
  parameter int        IDX_W     = 3,
  parameter int        TAG_W     = 28,
  parameter int        NPART     = 1,
  parameter lsb_list_t PART_LSB  = '{11, 0, 0, 0, 0, 0, 0, 0},
  parameter int        EXP_BEATS [5] = '{1, 2, 4, 0, 0},
  parameter int        N_ADDR    = 1500
) (
  output logic done_o,
  output int   checks_o,
  output int   failures_o,
  output int   classes_seen_o
);

  localparam int LAT = 1;

  logic              clk;
  logic              rst_n;
  logic              in_valid, in_ready, out_valid;
  logic [ADDR_W-1:0] in_addr, out_addr;
  pmc_class_t        tx_cls, rx_cls;

  pmc_link #(
    .BUS_W(BUS_W), .IDX_W(IDX_W), .TAG_W(TAG_W), .WAYS(2),
    .NPART(NPART), .PART_LSB(PART_LSB), .LAT(LAT)
  ) u_link (
    .clk, .rst_n,
    .in_valid_i(in_valid), .in_ready_o(in_ready), .in_addr_i(in_addr),
    .tx_cls_o(tx_cls),
    .out_valid_o(out_valid), .out_addr_o(out_addr), .rx_cls_o(rx_cls)
  );

  initial begin
    clk = 0;
    forever #5 clk = ~clk;
  end

  longint cyc;
  initial cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int checks, failures;
  int cnt_cls [5];
  initial begin
    checks = 0;
    failures = 0;
    cnt_cls = '{0, 0, 0, 0, 0};
  end
  assign checks_o   = checks;
  assign failures_o = failures;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL (%0d-wire bus) @%0d: %s", BUS_W, cyc, what);
    end
  endtask

  typedef struct { logic [ADDR_W-1:0] addr; int cls; longint t; } exp_t;
  exp_t exp_q[$];

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      exp_t e;
      if (exp_q.size() == 0) check(0, "output with nothing outstanding");
      else begin
        e = exp_q.pop_front();
        check(out_addr == e.addr, $sformatf("addr %h expected %h", out_addr, e.addr));
        check(int'(rx_cls) == e.cls, "rx class");
        check(cyc - e.t == longint'(EXP_BEATS[e.cls]) + longint'(LAT) + 1,
              $sformatf("latency %0d for class %0d", cyc - e.t, e.cls));
      end
    end
  end

  initial begin
    pmc_ref ref_m;
    bit bits[$];
    int cls, beats_prev;
    longint t_prev, t_offer;
    done_o = 0;
    classes_seen_o = 0;
    ref_m = new(BUS_W, IDX_W, TAG_W, 2, NPART, int'(PART_LSB[0]), int'(PART_LSB[1]),
                int'(PART_LSB[2]));
    rst_n = 0;
    in_valid = 0;
    in_addr = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    t_prev = -100;
    beats_prev = 1;
    for (int n = 0; n < N_ADDR; n++) begin
      @(negedge clk);
      if ($urandom_range(9) == 0) begin
        in_valid = 0;
        @(negedge clk);
      end
      in_addr = ref_m.gen();
      in_valid = 1;
      ref_m.compress(in_addr, cls, bits);
      check(bits.size() == EXP_BEATS[cls] * BUS_W,
            $sformatf("class %0d takes %0d bus cycles, table gives %0d",
                      cls, bits.size() / BUS_W, EXP_BEATS[cls]));
      t_offer = cyc;
      #1;
      while (!in_ready) begin
        @(negedge clk);
        #1;
      end
      check(int'(tx_cls) == cls, $sformatf("tx class %0d expected %0d", tx_cls, cls));
      if (t_offer <= t_prev + 1)
        check(cyc - t_prev == longint'(beats_prev), "stall length");
      cnt_cls[cls]++;
      exp_q.push_back('{in_addr, cls, cyc});
      t_prev = cyc;
      beats_prev = EXP_BEATS[cls];
    end
    @(negedge clk);
    in_valid = 0;
    repeat (16) @(posedge clk);
    check(exp_q.size() == 0, "addresses lost");
    for (int c = 0; c <= NPART + 1; c++) begin
      check(cnt_cls[c] > 0, $sformatf("class %0d never occurred", c));
      if (cnt_cls[c] > 0) classes_seen_o++;
    end
    begin
      // average transmission cycle penalty: extra bus cycles per address
      real penalty;
      penalty = 0.0;
      for (int c = 0; c <= NPART + 1; c++) penalty += real'(cnt_cls[c] * (EXP_BEATS[c] - 1));
      $display("%0d-wire bus: %0d addresses, class counts %0d %0d %0d %0d %0d, %0.3f extra cycles per address",
               BUS_W, N_ADDR, cnt_cls[0], cnt_cls[1], cnt_cls[2], cnt_cls[3], cnt_cls[4],
               penalty / real'(N_ADDR));
    end
    done_o = 1;
  end

endmodule
