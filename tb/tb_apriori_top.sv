// tb_apriori_top: complete Apriori runs on both accelerators at their default
// sizes (560 systolic units, 88 bitmapped CAM blocks of 16 candidates).
//
// A database of 200 transactions over 40 item codes is generated with four
// planted 4-item patterns. The systolic side then runs the algorithm: support
// pass over the single items, candidate generation in generation mode,
// pruning (done here, on the host side), support passes for the 2- and
// 3-candidates, more than one pass where the candidates outnumber the units.
// The host output is randomly not ready, so injections meet stalls. The
// frequent itemsets found are compared with a brute-force count done in the
// testbench, generated candidates with the join rule, and each support
// with a direct count.
// The bitmapped CAM side counts the same 2- and 3-candidates, packed into
// blocks of at most 16 candidates over at most 16 item codes, and is checked
// against the same counts.
// Mechanisms counted, each must occur: injection, upstream stall, result
// parked in an item buffer, mode switch, load absorption, several support
// passes for one candidate level, frequency flag, CAM hits, blocks in use.
module tb_apriori_top;
  import apriori_pkg::*;

  // the top's default sizes
  localparam int unsigned N_UNITS = 560, MAX_K = 16, N_BLOCKS = 88, DEPTH = 16, NC = 16;
  localparam int unsigned N_ITEMS = 40, N_TXN = 200, MIN_SUP = 8;

  logic clk = 0, rst_n = 0;
  logic sy_s_valid, sy_s_ready, sy_mode_we, sy_mode_busy, sy_m_valid, sy_m_ready, sy_m_frequent;
  tok_kind_e sy_s_kind, sy_m_kind;
  logic [DATA_W-1:0] sy_s_data, sy_m_data, sy_min_support;
  mode_e sy_mode_req, sy_mode;
  logic [N_UNITS-1:0] sy_loaded;
  logic bc_valid, bc_last, bc_cam_clear, bc_cam_shift, bc_bm_we, bc_len_we, bc_cnt_clear;
  logic [ITEM_W-1:0] bc_data;
  logic [$clog2(N_BLOCKS)-1:0] bc_cfg_blk, bc_rd_blk;
  logic [$clog2(DEPTH)-1:0] bc_bm_addr;
  logic [NC-1:0] bc_bm_data;
  logic [$clog2(NC)-1:0] bc_len_idx, bc_rd_idx;
  logic [$clog2(MAX_K+1)-1:0] bc_len_val;
  logic [DATA_W-1:0] bc_rd_support;

  apriori_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  typedef int set_t[$];

  // ---------------- database ----------------
  set_t db[N_TXN];
  function automatic int code(input int i);
    return 100 + 7 * i;
  endfunction

  function automatic bit subset(input int c[$], input int t[$]);
    foreach (c[i]) if (!(c[i] inside {t})) return 0;
    return 1;
  endfunction

  function automatic int count_support(input int c[$]);
    int s = 0;
    for (int t = 0; t < N_TXN; t++) if (subset(c, db[t])) s++;
    return s;
  endfunction

  function automatic string key(input int c[$]);
    string s = "";
    foreach (c[i]) s = {s, $sformatf("%0d,", c[i])};
    return s;
  endfunction

  // ---------------- systolic host interface ----------------
  token_t tx_q[$];
  token_t rx_q[$];
  int     n_inject = 0, n_up_stall = 0, n_park = 0, n_mode_switch = 0, n_absorb = 0;
  int     n_multi_pass = 0, n_freq_flag = 0, n_cam_hit = 0, n_blocks_used = 0;
  int     ready_pct = 100;

  always_ff @(posedge clk) begin
    if (rst_n && sy_m_valid && sy_m_ready) begin
      rx_q.push_back('{valid: 1'b1, kind: sy_m_kind, data: sy_m_data});
      if (sy_m_kind == TK_RESULT) n_inject++;
      if (sy_m_frequent) n_freq_flag++;
    end
    if (rst_n && dut.arr_in_tok.valid && dut.arr_out_stall) n_up_stall++;
    sy_m_ready <= ($urandom_range(0, 99) < ready_pct);
  end
  // host sender: a registered valid/ready source fed from tx_q
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sy_s_valid <= 1'b0;
      sy_s_kind  <= TK_ITEM;
      sy_s_data  <= '0;
    end else if (!sy_s_valid || sy_s_ready) begin
      if (tx_q.size() > 0) begin
        token_t t;
        t = tx_q.pop_front();
        sy_s_valid <= 1'b1;
        sy_s_kind  <= t.kind;
        sy_s_data  <= t.data;
      end else begin
        sy_s_valid <= 1'b0;
      end
    end
  end
  for (genvar u = 0; u < N_UNITS; u++) begin : g_mon
    always_ff @(posedge clk) if (rst_n) begin
      if (dut.u_sy_array.g_unit[u].u_unit.gen && dut.u_sy_array.g_unit[u].u_unit.in_stall) n_park++;
      if (dut.u_sy_array.g_unit[u].u_unit.u_ctrl.accept && dut.u_sy_array.g_unit[u].u_unit.absorb)
        n_absorb++;
    end
  end

  function automatic token_t mk(input tok_kind_e k, input int d);
    return '{valid: 1'b1, kind: k, data: DATA_W'(d)};
  endfunction

  task automatic push_set(input int s[$]);
    foreach (s[i]) tx_q.push_back(mk((i == s.size() - 1) ? TK_LAST : TK_ITEM, s[i]));
  endtask

  // wait until everything sent has gone through and the array is quiet
  task automatic drain();
    int quiet = 0;
    while (quiet < N_UNITS + 8) begin
      @(posedge clk);
      if (tx_q.size() != 0 || sy_s_valid || sy_m_valid) quiet = 0;
      else if (sy_m_ready) quiet++;     // a stalled array is frozen
    end
  endtask

  task automatic set_mode(input mode_e m);
    @(negedge clk);
    sy_mode_req = m; sy_mode_we = 1;
    @(negedge clk);
    sy_mode_we = 0;
    while (sy_mode_busy) @(negedge clk);
    check(sy_mode == m, "mode switched");
    n_mode_switch++;
  endtask

  task automatic load_sets(input set_t sets[$]);
    set_mode(MODE_LOAD);
    tx_q.push_back(mk(TK_CLEAR, 0));
    foreach (sets[i]) push_set(sets[i]);
    drain();
    rx_q = {};
    for (int u = 0; u < N_UNITS; u++) check(sy_loaded[u] == (u < sets.size()), "unit loaded");
  endtask

  // support of every candidate, in passes of at most N_UNITS candidates
  task automatic systolic_support(input set_t cands[$], output int sup[$]);
    int passes = 0;
    sup = {};
    for (int base = 0; base < cands.size(); base += N_UNITS) begin
      set_t chunk[$];
      int   n_res;
      chunk = {};
      for (int i = base; i < cands.size() && i < base + N_UNITS; i++) chunk.push_back(cands[i]);
      load_sets(chunk);
      set_mode(MODE_SUPPORT);
      for (int t = 0; t < N_TXN; t++) push_set(db[t]);
      tx_q.push_back(mk(TK_FLUSH, 0));
      drain();
      // transactions come back unchanged, then the flush, then the results
      // of the last unit first
      begin
        int p = 0, ok = 1;
        for (int t = 0; t < N_TXN; t++)
          foreach (db[t][i]) begin
            if (p >= rx_q.size() || rx_q[p].data != DATA_W'(db[t][i])) ok = 0;
            p++;
          end
        check(ok == 1, "database streamed through unchanged");
        check(p < rx_q.size() && rx_q[p].kind == TK_FLUSH, "flush token returned");
        n_res = rx_q.size() - p - 1;
        check(n_res == chunk.size(), "one support result per loaded unit");
        for (int i = 0; i < chunk.size(); i++) sup.push_back(0);
        for (int r = 0; r < n_res && r < chunk.size(); r++)
          sup[base + chunk.size() - 1 - r] = int'(rx_q[p + 1 + r].data);
      end
      rx_q = {};
      passes++;
    end
    if (passes > 1) n_multi_pass++;
  endtask

  // generation: units hold l (in chunks), all of l streams past
  task automatic systolic_generate(input set_t l[$], output set_t cands[$]);
    cands = {};
    for (int base = 0; base < l.size(); base += N_UNITS) begin
      set_t chunk[$], cur;
      chunk = {};
      for (int i = base; i < l.size() && i < base + N_UNITS; i++) chunk.push_back(l[i]);
      load_sets(chunk);
      set_mode(MODE_GENERATE);
      foreach (l[i]) push_set(l[i]);
      drain();
      cur = {};
      foreach (rx_q[p]) begin
        if (rx_q[p].kind == TK_RESULT) begin
          set_t c;
          c = cur;
          c.push_back(int'(rx_q[p].data));
          cands.push_back(c);
        end else begin
          if (rx_q[p].kind == TK_ITEM && p > 0 && rx_q[p-1].kind != TK_ITEM) cur = {};
          if (rx_q[p].kind == TK_LAST && p > 0 && rx_q[p-1].kind != TK_ITEM) cur = {};
          if (rx_q[p].kind == TK_ITEM || rx_q[p].kind == TK_LAST) cur.push_back(int'(rx_q[p].data));
        end
      end
      rx_q = {};
    end
  endtask

  // reference join of l (sorted sets, equal size): all pairs with equal
  // prefix, ordered as (smaller last, larger last)
  function automatic void ref_join(input set_t l[$], output set_t c[$]);
    c = {};
    foreach (l[a]) foreach (l[b]) begin
      bit same = 1;
      for (int i = 0; i < l[a].size() - 1; i++) if (l[a][i] != l[b][i]) same = 0;
      if (same && l[a][l[a].size()-1] < l[b][l[b].size()-1]) begin
        set_t n;
        n = l[a];
        n.push_back(l[b][l[b].size()-1]);
        c.push_back(n);
      end
    end
  endfunction

  // pruning (host side): every m-subset must be frequent
  function automatic void prune(input set_t c[$], input set_t l[$], output set_t p[$]);
    bit in_l[string];
    foreach (l[i]) in_l[key(l[i])] = 1;
    p = {};
    foreach (c[i]) begin
      bit keep = 1;
      for (int drop = 0; drop < c[i].size(); drop++) begin
        set_t s;
        s = {};
        foreach (c[i][j]) if (j != drop) s.push_back(c[i][j]);
        if (!in_l.exists(key(s))) keep = 0;
      end
      if (keep) p.push_back(c[i]);
    end
  endfunction

  function automatic void sort_sets(ref set_t s[$]);
    s.sort() with (key(item));
  endfunction

  // ---------------- bitmapped CAM host side ----------------
  task automatic bcam_support(input set_t cands[$], output int sup[$]);
    int blk_of[$], slot_of[$];
    int blk = 0, nslot = 0;
    set_t blk_codes[$];
    set_t none;
    none = {};
    blk_codes = {};
    blk_codes.push_back(none);
    // pack: at most NC candidates and DEPTH distinct codes per block
    foreach (cands[i]) begin
      set_t u;
      u = blk_codes[blk];
      foreach (cands[i][j]) if (!(cands[i][j] inside {u})) u.push_back(cands[i][j]);
      if (nslot == NC || u.size() > DEPTH) begin
        blk++; nslot = 0;
        blk_codes.push_back(none);
        u = cands[i];
      end
      blk_codes[blk] = u;
      blk_of.push_back(blk);
      slot_of.push_back(nslot);
      nslot++;
    end
    check(blk < N_BLOCKS, "candidates fit the CAM blocks");
    n_blocks_used = blk + 1;
    // load every block
    for (int b = 0; b <= blk; b++) begin
      @(negedge clk);
      bc_cfg_blk = b[$clog2(N_BLOCKS)-1:0];
      bc_cam_clear = 1; @(negedge clk); bc_cam_clear = 0;
      foreach (blk_codes[b][j]) begin
        bc_cam_shift = 1; bc_data = ITEM_W'(blk_codes[b][j]);
        @(negedge clk);
      end
      bc_cam_shift = 0;
      foreach (blk_codes[b][j]) begin
        logic [NC-1:0] r;
        r = '0;
        foreach (cands[i]) if (blk_of[i] == b && (blk_codes[b][j] inside {cands[i]})) r[slot_of[i]] = 1'b1;
        bc_bm_we = 1; bc_bm_data = r;
        bc_bm_addr = ($clog2(DEPTH))'(blk_codes[b].size() - 1 - j);
        @(negedge clk);
      end
      bc_bm_we = 0;
      for (int s = 0; s < NC; s++) begin
        bc_len_we = 1; bc_len_idx = s[$clog2(NC)-1:0]; bc_len_val = '0;
        foreach (cands[i]) if (blk_of[i] == b && slot_of[i] == s)
          bc_len_val = ($clog2(MAX_K+1))'(cands[i].size());
        @(negedge clk);
      end
      bc_len_we = 0;
    end
    bc_cnt_clear = 1; @(negedge clk); bc_cnt_clear = 0;
    // stream the database, one item per cycle
    begin
      int cycles = 0, items = 0;
      for (int t = 0; t < N_TXN; t++)
        foreach (db[t][i]) begin
          bc_valid = 1; bc_last = (i == db[t].size() - 1); bc_data = ITEM_W'(db[t][i]);
          @(negedge clk);
          cycles++; items++;
          if (dut.u_bcam.g_blk[0].u_blk.hit) n_cam_hit++;
        end
      bc_valid = 0; bc_last = 0;
      check(cycles == items, "one item per cycle");
    end
    repeat (3) @(negedge clk);
    sup = {};
    foreach (cands[i]) begin
      bc_rd_blk = blk_of[i][$clog2(N_BLOCKS)-1:0];
      bc_rd_idx = slot_of[i][$clog2(NC)-1:0];
      #1 sup.push_back(int'(bc_rd_support));
    end
  endtask

  // ---------------- the run ----------------
  set_t l1[$], l2[$], l3[$], c2[$], c3[$], c3p[$], rj[$], singles[$];
  int   sup1[$], sup2[$], sup3[$], bsup2[$], bsup3[$];

  initial begin
    sy_mode_we = 0; sy_mode_req = MODE_LOAD; sy_min_support = DATA_W'(MIN_SUP);
    bc_valid = 0; bc_last = 0; bc_data = '0; bc_cfg_blk = '0; bc_cam_clear = 0;
    bc_cam_shift = 0; bc_bm_we = 0; bc_bm_addr = '0; bc_bm_data = '0; bc_len_we = 0;
    bc_len_idx = '0; bc_len_val = '0; bc_cnt_clear = 0; bc_rd_blk = '0; bc_rd_idx = '0;

    // database: four planted patterns plus sparse noise, items sorted
    for (int t = 0; t < N_TXN; t++) begin
      bit has[N_ITEMS];
      for (int i = 0; i < N_ITEMS; i++) has[i] = ($urandom_range(0, 99) < 8);
      for (int p = 0; p < 4; p++)
        if ($urandom_range(0, 99) < 25)
          for (int k = 0; k < 4; k++) if ($urandom_range(0, 99) < 90) has[p * 9 + k * 2] = 1;
      db[t] = {};
      for (int i = 0; i < N_ITEMS; i++) if (has[i]) db[t].push_back(code(i));
      if (db[t].size() == 0) db[t].push_back(code(t % N_ITEMS));
    end

    repeat (3) @(negedge clk);
    rst_n = 1;
    ready_pct = 70;

    // generation 1: single items
    singles = {};
    for (int i = 0; i < N_ITEMS; i++) singles.push_back('{code(i)});
    systolic_support(singles, sup1);
    l1 = {};
    foreach (singles[i]) begin
      check(sup1[i] == count_support(singles[i]), $sformatf("support of item %0d", i));
      if (sup1[i] >= MIN_SUP) l1.push_back(singles[i]);
    end

    // generation 2
    systolic_generate(l1, c2);
    ref_join(l1, rj);
    sort_sets(c2); sort_sets(rj);
    check(c2.size() == rj.size(), $sformatf("%0d 2-candidates generated", c2.size()));
    for (int i = 0; i < c2.size() && i < rj.size(); i++) check(key(c2[i]) == key(rj[i]), "2-candidate");
    systolic_support(c2, sup2);
    l2 = {};
    foreach (c2[i]) begin
      check(sup2[i] == count_support(c2[i]), "support of 2-candidate");
      if (sup2[i] >= MIN_SUP) l2.push_back(c2[i]);
    end
    // the 2-candidates on the bitmapped CAM side
    bcam_support(c2, bsup2);
    foreach (c2[i]) check(bsup2[i] == count_support(c2[i]), "CAM support of 2-candidate");

    // generation 3
    sort_sets(l2);
    systolic_generate(l2, c3);
    ref_join(l2, rj);
    sort_sets(c3); sort_sets(rj);
    check(c3.size() == rj.size(), $sformatf("%0d 3-candidates generated", c3.size()));
    for (int i = 0; i < c3.size() && i < rj.size(); i++) check(key(c3[i]) == key(rj[i]), "3-candidate");
    prune(c3, l2, c3p);
    systolic_support(c3p, sup3);
    l3 = {};
    foreach (c3p[i]) begin
      check(sup3[i] == count_support(c3p[i]), "support of 3-candidate");
      if (sup3[i] >= MIN_SUP) l3.push_back(c3p[i]);
    end
    bcam_support(c3p, bsup3);
    foreach (c3p[i]) check(bsup3[i] == count_support(c3p[i]), "CAM support of 3-candidate");

    // brute force: the frequent 2- and 3-itemsets
    begin
      int n2 = 0, n3 = 0;
      for (int a = 0; a < N_ITEMS; a++)
        for (int b = a + 1; b < N_ITEMS; b++) begin
          if (count_support('{code(a), code(b)}) >= MIN_SUP) n2++;
          for (int c = b + 1; c < N_ITEMS; c++)
            if (count_support('{code(a), code(b), code(c)}) >= MIN_SUP) n3++;
        end
      check(l2.size() == n2, $sformatf("frequent 2-itemsets: %0d found, %0d exist", l2.size(), n2));
      check(l3.size() == n3, $sformatf("frequent 3-itemsets: %0d found, %0d exist", l3.size(), n3));
      check(n3 > 0, "database has frequent 3-itemsets");
    end

    $display("L1=%0d C2=%0d L2=%0d C3=%0d pruned=%0d L3=%0d", l1.size(), c2.size(), l2.size(),
             c3.size(), c3p.size(), l3.size());
    $display("injections=%0d upstream_stalls=%0d parked=%0d mode_switches=%0d absorbed=%0d",
             n_inject, n_up_stall, n_park, n_mode_switch, n_absorb);
    $display("multi_pass_levels=%0d frequent_flags=%0d cam_hits=%0d cam_blocks=%0d",
             n_multi_pass, n_freq_flag, n_cam_hit, n_blocks_used);
    check(n_inject > 0, "injection happened");
    check(n_up_stall > 0, "upstream stall happened");
    check(n_park > 0, "result parked in item buffer");
    check(n_mode_switch > 0, "mode switch happened");
    check(n_absorb > 0, "candidate load happened");
    check(n_multi_pass > 0, "a level needed several support passes");
    check(n_freq_flag > 0, "frequency flag raised");
    check(n_cam_hit > 0, "CAM hits happened");
    check(n_blocks_used > 1, "several CAM blocks used");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
