// tb_bcam_array: four bitmapped CAM blocks, each loaded with its own sixteen
// random candidates over its own twelve item codes, share one stream of
// random transactions. Every support is read back by block and index and
// compared with a subset test in the testbench.
module tb_bcam_array;
  import apriori_pkg::*;

  localparam int unsigned NB = 4, DEPTH = 16, NC = 16, MAX_K = 16;

  logic clk = 0, rst_n = 0;
  logic in_valid, in_last, cam_clear, cam_shift, bm_we, len_we, cnt_clear;
  logic [ITEM_W-1:0] data_in;
  logic [$clog2(NB)-1:0] cfg_blk, rd_blk;
  logic [$clog2(DEPTH)-1:0] bm_addr;
  logic [NC-1:0] bm_data;
  logic [$clog2(NC)-1:0] len_idx, rd_idx;
  logic [$clog2(MAX_K+1)-1:0] len_val;
  logic [DATA_W-1:0] rd_support;
  int checks = 0, failures = 0;

  bcam_array #(.N_BLOCKS(NB), .DEPTH(DEPTH), .NC(NC), .MAX_K(MAX_K)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  typedef int set_t[$];
  set_t cand[NB][NC];
  set_t codes[NB];
  int   sup[NB][NC];

  function automatic bit subset(input int c[$], input int t[$]);
    foreach (c[i]) if (!(c[i] inside {t})) return 0;
    return 1;
  endfunction

  initial begin
    in_valid = 0; in_last = 0; data_in = '0; cam_clear = 0; cam_shift = 0; bm_we = 0;
    bm_addr = '0; bm_data = '0; len_we = 0; len_idx = '0; len_val = '0; cnt_clear = 0;
    cfg_blk = '0; rd_blk = '0; rd_idx = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    for (int b = 0; b < NB; b++) begin
      // codes 0..39, twelve per block, overlapping between blocks
      codes[b] = {};
      for (int k = 0; k < 12; k++) codes[b].push_back(b * 7 + k * 2);
      for (int c = 0; c < NC; c++) begin
        cand[b][c] = {};
        foreach (codes[b][k]) if ($urandom_range(0, 11) < 3) cand[b][c].push_back(codes[b][k]);
        if (cand[b][c].size() == 0) cand[b][c].push_back(codes[b][0]);
        sup[b][c] = 0;
      end
      cfg_blk = b[$clog2(NB)-1:0];
      cam_clear = 1; @(negedge clk); cam_clear = 0;
      foreach (codes[b][j]) begin
        cam_shift = 1; data_in = ITEM_W'(codes[b][j]);
        @(negedge clk);
      end
      cam_shift = 0;
      foreach (codes[b][j]) begin
        logic [NC-1:0] r;
        r = '0;
        for (int c = 0; c < NC; c++) if (codes[b][j] inside {cand[b][c]}) r[c] = 1'b1;
        bm_we = 1; bm_addr = ($clog2(DEPTH))'(codes[b].size() - 1 - j); bm_data = r;
        @(negedge clk);
      end
      bm_we = 0;
      for (int c = 0; c < NC; c++) begin
        len_we = 1; len_idx = c[$clog2(NC)-1:0];
        len_val = ($clog2(MAX_K+1))'(cand[b][c].size());
        @(negedge clk);
      end
      len_we = 0;
    end
    cnt_clear = 1; @(negedge clk); cnt_clear = 0;

    for (int n = 0; n < 300; n++) begin
      automatic int t[$] = {};
      for (int v = 0; v < 48; v++) if ($urandom_range(0, 99) < 70) t.push_back(v);
      if (t.size() == 0) t.push_back(0);
      for (int b = 0; b < NB; b++)
        for (int c = 0; c < NC; c++) if (subset(cand[b][c], t)) sup[b][c]++;
      foreach (t[i]) begin
        in_valid = 1; in_last = (i == t.size() - 1); data_in = ITEM_W'(t[i]);
        @(negedge clk);
      end
      in_valid = 0; in_last = 0;
    end
    @(negedge clk);
    begin
      int total = 0;
      for (int b = 0; b < NB; b++)
        for (int c = 0; c < NC; c++) begin
          rd_blk = b[$clog2(NB)-1:0]; rd_idx = c[$clog2(NC)-1:0];
          #1 check(int'(rd_support) == sup[b][c], $sformatf("support %0d/%0d", b, c));
          total += sup[b][c];
        end
      check(total > 100, "candidates were supported");
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
