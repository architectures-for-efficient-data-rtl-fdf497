// tb_bcam_block: loads one bitmapped CAM block with a group of eleven
// 7-item candidates over twelve item codes, streams random transactions back
// to back (one item per cycle), and checks every support against a subset
// test in the testbench. Also checks the two-edge latency from a
// transaction's last item to its support update.
module tb_bcam_block;
  import apriori_pkg::*;

  localparam int unsigned DEPTH = 16, NC = 16, MAX_K = 16;

  logic clk = 0, rst_n = 0;
  logic in_valid, in_last, cam_clear, cam_shift, bm_we, len_we, cnt_clear;
  logic [ITEM_W-1:0] data_in;
  logic [$clog2(DEPTH)-1:0] bm_addr;
  logic [NC-1:0] bm_data;
  logic [$clog2(NC)-1:0] len_idx;
  logic [$clog2(MAX_K+1)-1:0] len_val;
  logic [DATA_W-1:0] support [NC];
  int checks = 0, failures = 0;

  bcam_block #(.DEPTH(DEPTH), .NC(NC), .MAX_K(MAX_K)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  typedef int set_t[$];
  set_t cand[11];
  int   codes[$];
  int   sup[NC];

  function automatic bit subset(input int c[$], input int t[$]);
    foreach (c[i]) if (!(c[i] inside {t})) return 0;
    return 1;
  endfunction

  task automatic send_txn(input int t[$]);
    foreach (t[i]) begin
      in_valid = 1; in_last = (i == t.size() - 1); data_in = ITEM_W'(t[i]);
      @(negedge clk);
    end
    in_valid = 0; in_last = 0;
  endtask

  initial begin
    cand[0]  = '{249, 316, 395, 482, 743, 787, 819};
    cand[1]  = '{236, 249, 395, 482, 743, 787, 819};
    cand[2]  = '{249, 316, 395, 482, 743, 787, 804};
    cand[3]  = '{236, 249, 395, 482, 743, 787, 804};
    cand[4]  = '{236, 249, 316, 395, 482, 743, 787};
    cand[5]  = '{249, 319, 482, 620, 743, 787, 819};
    cand[6]  = '{249, 482, 620, 743, 787, 804, 819};
    cand[7]  = '{249, 316, 482, 620, 743, 787, 819};
    cand[8]  = '{236, 249, 482, 620, 743, 787, 819};
    cand[9]  = '{249, 482, 529, 620, 743, 787, 819};
    cand[10] = '{249, 319, 482, 620, 743, 787, 804};
    codes = '{236, 249, 316, 319, 395, 482, 529, 620, 743, 787, 804, 819};

    in_valid = 0; in_last = 0; data_in = '0; cam_clear = 0; cam_shift = 0; bm_we = 0;
    bm_addr = '0; bm_data = '0; len_we = 0; len_idx = '0; len_val = '0; cnt_clear = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    // CAM: shift the codes in; code j of n ends in entry n-1-j
    cam_clear = 1; @(negedge clk); cam_clear = 0;
    foreach (codes[j]) begin
      cam_shift = 1; data_in = ITEM_W'(codes[j]);
      @(negedge clk);
    end
    cam_shift = 0;
    // bitmap rows and candidate sizes
    foreach (codes[j]) begin
      logic [NC-1:0] r;
      r = '0;
      for (int c = 0; c < 11; c++) if (codes[j] inside {cand[c]}) r[c] = 1'b1;
      bm_we = 1; bm_addr = ($clog2(DEPTH))'(codes.size() - 1 - j); bm_data = r;
      @(negedge clk);
    end
    bm_we = 0;
    for (int c = 0; c < NC; c++) begin
      len_we = 1; len_idx = c[$clog2(NC)-1:0];
      len_val = (c < 11) ? ($clog2(MAX_K+1))'(cand[c].size()) : '0;
      @(negedge clk);
      sup[c] = 0;
    end
    len_we = 0;
    cnt_clear = 1; @(negedge clk); cnt_clear = 0;

    // latency: candidate 0 exactly
    begin
      int sup_before;
      sup_before = int'(support[0]);
      foreach (cand[0][i]) begin
        in_valid = 1; in_last = (i == cand[0].size() - 1); data_in = ITEM_W'(cand[0][i]);
        @(negedge clk);
      end
      in_valid = 0; in_last = 0;
      check(int'(support[0]) == sup_before, "support not yet updated after one edge");
      @(negedge clk);
      check(int'(support[0]) == sup_before + 1, "support updated two edges after last item");
      sup[0]++;
      for (int c = 1; c < 11; c++) if (subset(cand[c], cand[0])) sup[c]++;
    end

    // random transactions, back to back
    for (int n = 0; n < 300; n++) begin
      automatic int t[$] = {};
      foreach (codes[j]) if ($urandom_range(0, 99) < 80) t.push_back(codes[j]);
      for (int k = 0; k < 3; k++) t.push_back(1000 + 10 * k + $urandom_range(0, 9));
      t.shuffle();
      for (int c = 0; c < 11; c++) if (subset(cand[c], t)) sup[c]++;
      send_txn(t);
    end
    @(negedge clk);
    for (int c = 0; c < NC; c++) check(int'(support[c]) == sup[c], $sformatf("support %0d", c));
    begin
      int total = 0;
      for (int c = 0; c < 11; c++) total += sup[c];
      check(total > 30, "candidates were supported");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
