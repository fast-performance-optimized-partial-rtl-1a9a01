// tb_pmc_configs: runs the PMC link end to end in each compressed bus
// configuration of the design's partition table, all with 2-way caches and
// a 38-bit address:
//
//   bus  I  tag  partition LSBs   bus cycles: hit, partitions..., miss
//    8   1  32   6 14 22          1 2 3 4 6
//   10   2  30   9 18             1 3 3 5
//   12   3  28   11               1 2 4
//   14   2  26   13               1 2 3
//   16   2  24   15               1 2 3
//   18   1  22   17               1 2 3
//   19   1  21   18               1 2 3
//   20   1  20   -                1 2
//   24   1  16   -                1 2
//   32   1   8   -                1 2
//
// The cycle counts follow from the packet format (C_H, partition code, I,
// W, unmatched tag bits, U; or C_H, code and the whole address). They
// match the table the design was taken from everywhere except the first
// partition of the 10-wire bus, which the table gives as 2 cycles: with
// the way field sent, that packet has 21 bits and needs 3 cycles. The
// index width of the 18- and 19-wire buses is an assumption (1 bit).
module tb_pmc_configs;
  import pmc_pkg::*;

  localparam int NCFG = 10;
  logic done [NCFG];
  int   chk  [NCFG];
  int   fail [NCFG];
  int   seen [NCFG];

  tb_pmc_cfg_run #(.BUS_W(8),  .IDX_W(1), .TAG_W(32), .NPART(3),
    .PART_LSB('{6, 14, 22, 0, 0, 0, 0, 0}), .EXP_BEATS('{1, 2, 3, 4, 6}))
    u_b8  (.done_o(done[0]), .checks_o(chk[0]), .failures_o(fail[0]), .classes_seen_o(seen[0]));
  tb_pmc_cfg_run #(.BUS_W(10), .IDX_W(2), .TAG_W(30), .NPART(2),
    .PART_LSB('{9, 18, 0, 0, 0, 0, 0, 0}), .EXP_BEATS('{1, 3, 3, 5, 0}))
    u_b10 (.done_o(done[1]), .checks_o(chk[1]), .failures_o(fail[1]), .classes_seen_o(seen[1]));
  tb_pmc_cfg_run #(.BUS_W(12), .IDX_W(3), .TAG_W(28), .NPART(1),
    .PART_LSB('{11, 0, 0, 0, 0, 0, 0, 0}), .EXP_BEATS('{1, 2, 4, 0, 0}))
    u_b12 (.done_o(done[2]), .checks_o(chk[2]), .failures_o(fail[2]), .classes_seen_o(seen[2]));
  tb_pmc_cfg_run #(.BUS_W(14), .IDX_W(2), .TAG_W(26), .NPART(1),
    .PART_LSB('{13, 0, 0, 0, 0, 0, 0, 0}), .EXP_BEATS('{1, 2, 3, 0, 0}))
    u_b14 (.done_o(done[3]), .checks_o(chk[3]), .failures_o(fail[3]), .classes_seen_o(seen[3]));
  tb_pmc_cfg_run #(.BUS_W(16), .IDX_W(2), .TAG_W(24), .NPART(1),
    .PART_LSB('{15, 0, 0, 0, 0, 0, 0, 0}), .EXP_BEATS('{1, 2, 3, 0, 0}))
    u_b16 (.done_o(done[4]), .checks_o(chk[4]), .failures_o(fail[4]), .classes_seen_o(seen[4]));
  tb_pmc_cfg_run #(.BUS_W(18), .IDX_W(1), .TAG_W(22), .NPART(1),
    .PART_LSB('{17, 0, 0, 0, 0, 0, 0, 0}), .EXP_BEATS('{1, 2, 3, 0, 0}))
    u_b18 (.done_o(done[5]), .checks_o(chk[5]), .failures_o(fail[5]), .classes_seen_o(seen[5]));
  tb_pmc_cfg_run #(.BUS_W(19), .IDX_W(1), .TAG_W(21), .NPART(1),
    .PART_LSB('{18, 0, 0, 0, 0, 0, 0, 0}), .EXP_BEATS('{1, 2, 3, 0, 0}))
    u_b19 (.done_o(done[6]), .checks_o(chk[6]), .failures_o(fail[6]), .classes_seen_o(seen[6]));
  tb_pmc_cfg_run #(.BUS_W(20), .IDX_W(1), .TAG_W(20), .NPART(0),
    .PART_LSB('{0, 0, 0, 0, 0, 0, 0, 0}), .EXP_BEATS('{1, 2, 0, 0, 0}))
    u_b20 (.done_o(done[7]), .checks_o(chk[7]), .failures_o(fail[7]), .classes_seen_o(seen[7]));
  tb_pmc_cfg_run #(.BUS_W(24), .IDX_W(1), .TAG_W(16), .NPART(0),
    .PART_LSB('{0, 0, 0, 0, 0, 0, 0, 0}), .EXP_BEATS('{1, 2, 0, 0, 0}))
    u_b24 (.done_o(done[8]), .checks_o(chk[8]), .failures_o(fail[8]), .classes_seen_o(seen[8]));
  tb_pmc_cfg_run #(.BUS_W(32), .IDX_W(1), .TAG_W(8), .NPART(0),
    .PART_LSB('{0, 0, 0, 0, 0, 0, 0, 0}), .EXP_BEATS('{1, 2, 0, 0, 0}))
    u_b32 (.done_o(done[9]), .checks_o(chk[9]), .failures_o(fail[9]), .classes_seen_o(seen[9]));

  int checks, failures;

  initial begin
    bit all_done;
    all_done = 0;
    while (!all_done) begin
      #100;
      all_done = 1;
      for (int i = 0; i < NCFG; i++) if (!done[i]) all_done = 0;
    end
    checks = 0;
    failures = 0;
    for (int i = 0; i < NCFG; i++) begin
      checks += chk[i];
      failures += fail[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5000000;
    checks = 0;
    failures = 1;
    for (int i = 0; i < NCFG; i++) begin
      checks += chk[i];
      failures += fail[i];
    end
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
