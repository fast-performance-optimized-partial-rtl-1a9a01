// tb_pmc_link: end-to-end test of the PMC address link at its default
// configuration (12-wire bus, 8 sets x 2 ways, 28-bit tags, partial
// partition at tag bit 11, bus latency 1).
//
// A stream of addresses with locality is offered with random idle cycles.
// The reference model predicts every address's class; the test checks
// that the class seen at both ends agrees, that each address comes out
// unchanged and in order, and that it comes out n + LAT + 1 cycles after
// it was accepted, where n is the number of bus cycles the partition table
// gives for its class (1 for a hit, 2 for a partial hit at LSB 11, 4 for a
// complete miss). It also checks that the sender stalls for exactly n-1
// cycles after an n-beat address, that hits stream at one per cycle, and
// that each mechanism (hit, partial hit, miss, stall, back-to-back hits)
// happened.
module tb_pmc_link;
  import pmc_pkg::*;
  import pmc_ref_pkg::*;

  localparam int N_ADDR = 4000;
  localparam int LAT    = 1;
  localparam int EXP_BEATS [3] = '{1, 2, 4};   // hit, partition LSB 11, miss

  logic              clk;
  logic              rst_n;
  logic              in_valid;
  logic              in_ready;
  logic [ADDR_W-1:0] in_addr;
  pmc_class_t        tx_cls, rx_cls;
  logic              out_valid;
  logic [ADDR_W-1:0] out_addr;

  pmc_link u_dut (
    .clk, .rst_n,
    .in_valid_i(in_valid), .in_ready_o(in_ready), .in_addr_i(in_addr),
    .tx_cls_o(tx_cls),
    .out_valid_o(out_valid), .out_addr_o(out_addr), .rx_cls_o(rx_cls)
  );

  initial begin
    clk = 0;
    forever #5 clk = ~clk;
  end

  int checks = 0, failures = 0;
  int cnt_cls [3] = '{0, 0, 0};
  int cnt_stall = 0, cnt_b2b = 0;
  longint cyc;
  initial cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  typedef struct { logic [ADDR_W-1:0] addr; int cls; longint t; } exp_t;
  exp_t exp_q[$];
  pmc_ref ref_m;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cyc, what);
    end
  endtask

  // Receiver side scoreboard.
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      exp_t e;
      if (exp_q.size() == 0) check(0, "output with nothing outstanding");
      else begin
        e = exp_q.pop_front();
        check(out_addr == e.addr, $sformatf("addr %h expected %h", out_addr, e.addr));
        check(int'(rx_cls) == e.cls, $sformatf("rx class %0d expected %0d", rx_cls, e.cls));
        check(cyc - e.t == longint'(EXP_BEATS[e.cls]) + longint'(LAT) + 1,
              $sformatf("latency %0d for class %0d", cyc - e.t, e.cls));
      end
    end
  end

  initial begin
    int cls, done;
    bit bits[$];
    bit prev_hit;
    longint t_prev, t_offer;
    int beats_prev;
    ref_m = new(12, 3, 28, 2, 1, 11);
    rst_n = 0;
    in_valid = 0;
    in_addr = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    done = 0;
    prev_hit = 0;
    t_prev = -100;
    beats_prev = 1;
    while (done < N_ADDR) begin
      @(negedge clk);
      if ($urandom_range(9) == 0) begin
        in_valid = 0;
        continue;
      end
      in_addr = ref_m.gen();
      in_valid = 1;
      ref_m.compress(in_addr, cls, bits);
      check(bits.size() / 12 == EXP_BEATS[cls], "reference packet length");
      t_offer = cyc;  // cycle in which the address is first offered
      // wait for the cycle in which it is taken, counting stall cycles
      #1;
      while (!in_ready) begin
        cnt_stall++;
        @(negedge clk);
        #1;
      end
      check(int'(tx_cls) == cls, $sformatf("tx class %0d expected %0d", tx_cls, cls));
      // an n-beat packet keeps the next address out for exactly n-1 cycles
      if (t_offer <= t_prev + 1)
        check(cyc - t_prev == longint'(beats_prev),
              $sformatf("accepted %0d cycles after a %0d-beat packet", cyc - t_prev, beats_prev));
      else
        check(cyc - t_prev >= longint'(beats_prev), "accepted while bus busy");
      if (cls == 0 && prev_hit && cyc == t_prev + 1) cnt_b2b++;
      prev_hit = (cls == 0);
      cnt_cls[cls]++;
      exp_q.push_back('{in_addr, cls, cyc});
      t_prev = cyc;
      beats_prev = EXP_BEATS[cls];
      done++;
    end
    @(negedge clk);
    in_valid = 0;
    repeat (12) @(posedge clk);
    check(exp_q.size() == 0, "addresses lost");
    $display("hits=%0d partial=%0d misses=%0d stall_cycles=%0d back_to_back_hits=%0d",
             cnt_cls[0], cnt_cls[1], cnt_cls[2], cnt_stall, cnt_b2b);
    check(cnt_cls[0] > 0, "no complete hit happened");
    check(cnt_cls[1] > 0, "no partial hit happened");
    check(cnt_cls[2] > 0, "no complete miss happened");
    check(cnt_stall > 0, "no stall happened");
    check(cnt_b2b > 0, "no back-to-back hits happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
