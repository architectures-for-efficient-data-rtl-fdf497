// tb_sys_array: an 8-unit systolic array under random end-of-array stalls.
// Loads one candidate per unit, runs a support pass over random transactions
// and a generation pass over a list of frequent 2-itemsets, and compares the
// complete output stream with the stream predicted by the subset test and
// the join rule (results of later units come first, right after the set or
// the flush token that caused them).
module tb_sys_array;
  import apriori_pkg::*;

  localparam int unsigned N = 8;

  logic   clk = 0, rst_n = 0;
  mode_e  mode;
  token_t in_tok, out_tok;
  logic   out_stall, in_stall;
  logic [N-1:0] loaded;
  int     checks = 0, failures = 0;

  sys_array #(.N_UNITS(N), .MAX_K(4)) dut (.*);

  always #5 clk = ~clk;

  token_t to_send[$], got[$], expect_q[$];
  int     stall_pct = 25;
  int     inj_stall_events = 0, park_events = 0;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic token_t mk(input tok_kind_e k, input int d);
    return '{valid: 1'b1, kind: k, data: DATA_W'(d)};
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) in_tok <= TOKEN_IDLE;
    else if (!in_tok.valid || !out_stall)
      in_tok <= (to_send.size() > 0) ? to_send.pop_front() : TOKEN_IDLE;
  end
  always_ff @(posedge clk) begin
    if (rst_n && out_tok.valid && !in_stall) got.push_back(out_tok);
    in_stall <= ($urandom_range(0, 99) < stall_pct);
  end
  // count injections that stalled upstream, and results parked in a buffer
  for (genvar u = 0; u < N; u++) begin : g_mon
    always_ff @(posedge clk) if (rst_n) begin
      if (dut.g_unit[u].u_unit.gen) inj_stall_events++;
      if (dut.g_unit[u].u_unit.gen && dut.g_unit[u].u_unit.in_stall) park_events++;
    end
  end

  task automatic drain();
    int quiet = 0;
    while (quiet < 2 * N + 4) begin
      @(posedge clk);
      if (to_send.size() == 0 && !in_tok.valid && !out_tok.valid) quiet++; else quiet = 0;
    end
  endtask

  task automatic compare(input string what);
    check(got.size() == expect_q.size(), {what, ": token count"});
    for (int i = 0; i < got.size() && i < expect_q.size(); i++)
      check(got[i] == expect_q[i], $sformatf("%s: token %0d", what, i));
    got = {};
    expect_q = {};
  endtask

  task automatic push_set(input int s[$], input bit expected);
    foreach (s[i]) begin
      to_send.push_back(mk((i == s.size() - 1) ? TK_LAST : TK_ITEM, s[i]));
      if (expected) expect_q.push_back(mk((i == s.size() - 1) ? TK_LAST : TK_ITEM, s[i]));
    end
  endtask

  typedef int set_t[$];
  set_t cand[N];
  int   sup[N];

  function automatic bit subset(input int c[$], input int t[$]);
    foreach (c[i]) if (!(c[i] inside {t})) return 0;
    return 1;
  endfunction

  initial begin
    mode = MODE_LOAD;
    in_stall = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;

    // ---- support ----
    to_send.push_back(mk(TK_CLEAR, 0));
    expect_q.push_back(mk(TK_CLEAR, 0));
    for (int u = 0; u < N; u++) begin
      automatic int a = $urandom_range(0, 4), b = $urandom_range(5, 8), c = $urandom_range(9, 11);
      cand[u] = (u % 2) ? '{a, b} : '{a, b, c};
      push_set(cand[u], 0);
      sup[u] = 0;
    end
    drain();
    check(loaded == '1, "all units loaded");
    compare("load");
    mode = MODE_SUPPORT;
    for (int n = 0; n < 150; n++) begin
      automatic int t[$] = {};
      for (int v = 0; v < 12; v++) if ($urandom_range(0, 99) < 55) t.push_back(v);
      if (t.size() == 0) t.push_back(0);
      for (int u = 0; u < N; u++) if (subset(cand[u], t)) sup[u]++;
      push_set(t, 1);
    end
    to_send.push_back(mk(TK_FLUSH, 0));
    expect_q.push_back(mk(TK_FLUSH, 0));
    for (int u = N - 1; u >= 0; u--) expect_q.push_back(mk(TK_RESULT, sup[u]));
    drain();
    compare("support pass");

    // ---- generation: frequent 2-itemsets, in lexicographic order ----
    mode = MODE_LOAD;
    begin
      set_t l2[N];
      l2[0] = '{1, 3}; l2[1] = '{1, 4}; l2[2] = '{1, 7}; l2[3] = '{2, 5};
      l2[4] = '{2, 6}; l2[5] = '{3, 4}; l2[6] = '{3, 9}; l2[7] = '{5, 6};
      to_send.push_back(mk(TK_CLEAR, 0));
      expect_q.push_back(mk(TK_CLEAR, 0));
      for (int u = 0; u < N; u++) push_set(l2[u], 0);
      drain();
      compare("load l2");
      mode = MODE_GENERATE;
      for (int k = 0; k < N; k++) begin
        push_set(l2[k], 1);
        for (int u = N - 1; u >= 0; u--)
          if (l2[u][0] == l2[k][0] && l2[k][1] < l2[u][1])
            expect_q.push_back(mk(TK_RESULT, l2[u][1]));
      end
      drain();
      compare("generation pass");
    end

    // ---- unstalled pass: n items + r results in n + r cycles ----
    stall_pct = 0;
    mode = MODE_SUPPORT;
    drain();
    begin
      int first = -1, lastc = -1, outs = 0, n_items = 0;
      for (int n = 0; n < 20; n++) begin
        push_set('{1, 3, 4, 5, 7}, 0);
        n_items += 5;
      end
      to_send.push_back(mk(TK_FLUSH, 0));
      n_items++;
      for (int cyc = 0; cyc < 400; cyc++) begin
        @(posedge clk); #1;
        if (out_tok.valid) begin
          outs++;
          if (first < 0) first = cyc;
          lastc = cyc;
        end
      end
      check(outs == n_items + N, "all tokens and results leave");
      check(lastc - first + 1 == n_items + N, "pass takes items + results cycles");
      got = {};
    end

    check(inj_stall_events > 0, "injections happened");
    check(park_events > 0, "a result was parked in an item buffer");
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
