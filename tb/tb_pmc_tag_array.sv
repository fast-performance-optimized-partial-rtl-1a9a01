// tb_pmc_tag_array: random touch/replace traffic on a 4-set, 4-way tag
// array, checked against a model that keeps a use-order list per set (front
// = most recently used). After reset all entries are invalid and way 0 is
// the least recently used. Each cycle the read port, including the LRU way,
// is compared with the model.
module tb_pmc_tag_array;

  localparam int TAG_W = 20;
  localparam int IDX_W = 2;
  localparam int WAYS  = 4;
  localparam int SETS  = 1 << IDX_W;

  logic                       clk;
  logic                       rst_n;
  logic [IDX_W-1:0]           rd_idx;
  logic [WAYS-1:0][TAG_W-1:0] rd_tag;
  logic [WAYS-1:0]            rd_vld;
  logic [1:0]                 rd_lru;
  logic                       upd, upd_wr;
  logic [IDX_W-1:0]           upd_idx;
  logic [1:0]                 upd_way;
  logic [TAG_W-1:0]           upd_tag;

  pmc_tag_array #(.TAG_W(TAG_W), .IDX_W(IDX_W), .WAYS(WAYS)) u_dut (
    .clk, .rst_n,
    .rd_idx_i(rd_idx), .rd_tag_o(rd_tag), .rd_vld_o(rd_vld), .rd_lru_o(rd_lru),
    .upd_i(upd), .upd_wr_i(upd_wr), .upd_idx_i(upd_idx), .upd_way_i(upd_way),
    .upd_tag_i(upd_tag)
  );

  initial begin
    clk = 0;
    forever #5 clk = ~clk;
  end

  int checks = 0, failures = 0;
  logic [TAG_W-1:0] m_tag [SETS][WAYS];
  bit               m_vld [SETS][WAYS];
  int               order [SETS][$];   // way numbers, most recent first
  int               n_touch = 0, n_repl = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  task automatic use_way(int s, int w);
    foreach (order[s][i]) if (order[s][i] == w) begin
      order[s].delete(i);
      break;
    end
    order[s].push_front(w);
  endtask

  initial begin
    rst_n = 0;
    upd = 0; upd_wr = 0; upd_idx = '0; upd_way = '0; upd_tag = '0; rd_idx = '0;
    for (int s = 0; s < SETS; s++) begin
      for (int w = 0; w < WAYS; w++) begin
        m_vld[s][w] = 0;
        m_tag[s][w] = '0;
      end
      for (int w = WAYS - 1; w >= 0; w--) order[s].push_back(w);
    end
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 5000; n++) begin
      // check read port on a random set
      rd_idx = IDX_W'($urandom());
      #1;
      for (int w = 0; w < WAYS; w++) begin
        check(rd_vld[w] == m_vld[rd_idx][w], $sformatf("valid set %0d way %0d", rd_idx, w));
        if (m_vld[rd_idx][w]) check(rd_tag[w] == m_tag[rd_idx][w], "tag");
      end
      check(int'(rd_lru) == order[rd_idx][WAYS-1],
            $sformatf("lru %0d expected %0d", rd_lru, order[rd_idx][WAYS-1]));
      // random update
      upd = ($urandom_range(3) != 0);
      upd_wr = 1'($urandom());
      upd_idx = IDX_W'($urandom());
      upd_way = 2'($urandom());
      upd_tag = TAG_W'($urandom());
      @(negedge clk);
      if (upd) begin
        if (upd_wr) begin
          m_tag[upd_idx][upd_way] = upd_tag;
          m_vld[upd_idx][upd_way] = 1;
          n_repl++;
        end else n_touch++;
        use_way(upd_idx, upd_way);
      end
      upd = 0;
    end
    check(n_touch > 0 && n_repl > 0, "both update kinds used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
