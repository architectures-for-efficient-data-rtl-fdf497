// tb_workload_quest: support counting on synthetic market-basket data of the
// kind the engines were evaluated on (T10I4 and T40I10 style: average
// transaction length T, average pattern length I, 1000 item codes), at the
// top's default sizes but with far fewer transactions than the 100,000 of
// the benchmarks. For each configuration it runs level 1 (all 1000 items:
// two systolic passes, 63 CAM blocks) and level 2 (candidates generated on
// the systolic array from the frequent items, at most MAX_C2 of them counted)
// at a minimum support of 5 %, and checks every support on both engines
// against a direct count. It also checks that each systolic support pass
// leaves the array as one dense burst of items + 1 + results cycles, and that
// the CAM side takes one cycle per item, and prints the cycle totals.
//
// Data generator: NPAT patterns of random length around I over the 1000
// codes, each with a random weight; a transaction is filled with patterns
// picked by weight (each item kept with 90 % probability) plus random single
// items until it reaches a length drawn around T; items are sorted and unique.
module tb_workload_quest;
  import apriori_pkg::*;

  localparam int unsigned N_UNITS = 560, MAX_K = 16, N_BLOCKS = 88, DEPTH = 16, NC = 16;
  localparam int unsigned N_ITEMS = 1000, N_TXN = 300, NPAT = 60, MAX_C2 = 1120;

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

  set_t db[N_TXN];
  int   db_tokens;
  int   cyc = 0, first_out = -1, last_out = -1;
  bit   span_ok;
  longint sys_cycles = 0, cam_cycles = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (sy_m_valid && sy_m_ready) begin
      if (first_out < 0) first_out <= cyc;
      last_out <= cyc;
    end
  end

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

  task automatic make_db(input int tlen, input int plen);
    set_t pats[NPAT];
    int   wsum = 0;
    int   w[NPAT];
    db_tokens = 0;
    for (int p = 0; p < NPAT; p++) begin
      int n;
      n = $urandom_range(plen / 2 + 1, plen + plen / 2);
      pats[p] = {};
      for (int k = 0; k < n; k++) pats[p].push_back($urandom_range(0, N_ITEMS - 1));
      w[p] = $urandom_range(1, 10);
      wsum += w[p];
    end
    for (int t = 0; t < N_TXN; t++) begin
      bit has[N_ITEMS];
      int n, target;
      target = $urandom_range(tlen / 2 + 1, tlen + tlen / 2);
      n = 0;
      for (int i = 0; i < N_ITEMS; i++) has[i] = 0;
      while (n < target) begin
        if ($urandom_range(0, 3) != 0) begin
          int r, p;
          r = $urandom_range(0, wsum - 1);
          p = 0;
          while (r >= w[p]) begin r -= w[p]; p++; end
          foreach (pats[p][k]) if ($urandom_range(0, 9) != 0 && !has[pats[p][k]]) begin
            has[pats[p][k]] = 1; n++;
          end
        end else begin
          int i;
          i = $urandom_range(0, N_ITEMS - 1);
          if (!has[i]) begin has[i] = 1; n++; end
        end
      end
      db[t] = {};
      for (int i = 0; i < N_ITEMS; i++) if (has[i]) db[t].push_back(i);
      db_tokens += db[t].size();
    end
  endtask

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
    span_ok = 1;
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
      first_out = -1; last_out = -1;
      drain();
      // the pass leaves the array as one dense burst: items + flush + results
      if (last_out - first_out + 1 != db_tokens + 1 + chunk.size()) span_ok = 0;
      sys_cycles += longint'(last_out - first_out + 1);
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
      cam_cycles += longint'(cycles);
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
  task automatic run_config(input string name, input int tlen, input int plen);
    set_t singles[$], l1[$], c2[$], c2c[$], rj[$];
    int   sup1[$], bsup1[$], sup2[$], bsup2[$];
    int   min_sup, n_l2;
    make_db(tlen, plen);
    min_sup = (N_TXN * 5 + 99) / 100;
    sy_min_support = DATA_W'(min_sup);
    sys_cycles = 0; cam_cycles = 0;

    singles = {};
    for (int i = 0; i < N_ITEMS; i++) singles.push_back('{i});
    systolic_support(singles, sup1);
    check(span_ok, {name, ": level-1 passes take items + 1 + results cycles"});
    bcam_support(singles, bsup1);
    l1 = {};
    foreach (singles[i]) begin
      int r;
      r = count_support(singles[i]);
      check(sup1[i] == r && bsup1[i] == r, $sformatf("%s: support of item %0d", name, i));
      if (r >= min_sup) l1.push_back(singles[i]);
    end

    systolic_generate(l1, c2);
    ref_join(l1, rj);
    sort_sets(c2); sort_sets(rj);
    check(c2.size() == rj.size(), $sformatf("%s: %0d 2-candidates generated", name, c2.size()));
    for (int i = 0; i < c2.size() && i < rj.size(); i++) check(key(c2[i]) == key(rj[i]), "2-candidate");
    c2c = {};
    foreach (c2[i]) if (i < MAX_C2) c2c.push_back(c2[i]);
    systolic_support(c2c, sup2);
    check(span_ok, {name, ": level-2 passes take items + 1 + results cycles"});
    bcam_support(c2c, bsup2);
    n_l2 = 0;
    foreach (c2c[i]) begin
      int r;
      r = count_support(c2c[i]);
      check(sup2[i] == r, "systolic support of 2-candidate");
      check(bsup2[i] == r, "CAM support of 2-candidate");
      if (r >= min_sup) n_l2++;
    end
    $display("%s: %0d transactions, %0d items streamed, min support %0d", name, N_TXN, db_tokens, min_sup);
    $display("%s: L1=%0d C2=%0d counted=%0d frequent among counted=%0d", name, l1.size(), c2.size(),
             c2c.size(), n_l2);
    $display("%s: support passes: systolic %0d output cycles, bitmapped CAM %0d stream cycles",
             name, sys_cycles, cam_cycles);
  endtask

  initial begin
    sy_mode_we = 0; sy_mode_req = MODE_LOAD; sy_min_support = '0;
    bc_valid = 0; bc_last = 0; bc_data = '0; bc_cfg_blk = '0; bc_cam_clear = 0;
    bc_cam_shift = 0; bc_bm_we = 0; bc_bm_addr = '0; bc_bm_data = '0; bc_len_we = 0;
    bc_len_idx = '0; bc_len_val = '0; bc_cnt_clear = 0; bc_rd_blk = '0; bc_rd_idx = '0;
    ready_pct = 100;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_config("T10I4", 10, 4);
    run_config("T40I10", 40, 10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
