// tb_pmc_partial_match: exhaustive-style random test of the longest-match
// search, on 4 ways, 32-bit tags and partitions at tag bits 6, 14 and 22.
//
// Stored tags are made from the incoming tag by flipping one chosen bit (or
// none) per way, so the length of the equal leading part of each way is
// known by construction. The expected class is the first of
// {full, [31:6], [31:14], [31:22]} that some valid way covers, and the
// expected way is the lowest valid way that covers it.
module tb_pmc_partial_match;
  import pmc_pkg::*;

  localparam int TAG_W = 32;
  localparam int WAYS  = 4;
  localparam int LSB [3] = '{6, 14, 22};

  logic [TAG_W-1:0]           tag;
  logic [WAYS-1:0][TAG_W-1:0] set_tag;
  logic [WAYS-1:0]            set_vld;
  pmc_class_t                 cls;
  logic [1:0]                 way;

  pmc_partial_match #(
    .TAG_W(TAG_W), .WAYS(WAYS), .NPART(3), .PART_LSB('{6, 14, 22, 0, 0, 0, 0, 0})
  ) u_dut (
    .tag_i(tag), .set_tag_i(set_tag), .set_vld_i(set_vld), .cls_o(cls), .way_o(way)
  );

  int checks = 0, failures = 0;
  int cnt_cls [5] = '{0, 0, 0, 0, 0};

  initial begin
    int eq_len [WAYS];
    int need, exp_cls, exp_way;
    for (int n = 0; n < 20000; n++) begin
      tag = {$urandom(), $urandom()};
      for (int w = 0; w < WAYS; w++) begin
        int p;
        set_vld[w] = ($urandom_range(4) != 0);
        p = $urandom_range(TAG_W);           // TAG_W means no bit flipped
        set_tag[w] = tag;
        if (p < TAG_W) begin
          set_tag[w][TAG_W - 1 - p] = ~tag[TAG_W - 1 - p];
          // bits below the flipped one are random
          for (int b = 0; b < TAG_W - 1 - p; b++) set_tag[w][b] = 1'($urandom());
        end
        eq_len[w] = p;
      end
      exp_cls = 4;
      exp_way = 0;
      for (int c = 0; c <= 3; c++) begin
        need = (c == 0) ? TAG_W : TAG_W - LSB[c-1];
        for (int w = WAYS - 1; w >= 0; w--)
          if (set_vld[w] && eq_len[w] >= need) begin
            exp_cls = c;
            exp_way = w;
          end
        if (exp_cls == c) break;
      end
      #1;
      checks++;
      if (int'(cls) != exp_cls || (exp_cls != 4 && int'(way) != exp_way)) begin
        failures++;
        if (failures < 10)
          $display("FAIL: class %0d way %0d, expected %0d %0d", cls, way, exp_cls, exp_way);
      end
      cnt_cls[exp_cls]++;
    end
    for (int c = 0; c < 5; c++) begin
      checks++;
      if (cnt_cls[c] == 0) failures++;
    end
    $display("classes: %0d %0d %0d %0d %0d", cnt_cls[0], cnt_cls[1], cnt_cls[2], cnt_cls[3], cnt_cls[4]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
