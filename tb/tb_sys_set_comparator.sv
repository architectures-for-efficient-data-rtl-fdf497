// tb_sys_set_comparator: loads candidates into the set comparator and checks
// its support count (against a subset test done in the testbench) and its
// generation-mode join (against the join rule) for random sorted sets.
module tb_sys_set_comparator;
  import apriori_pkg::*;

  localparam int unsigned MAX_K = 8;

  logic   clk = 0, rst_n = 0;
  mode_e  mode;
  token_t tok, gen_tok;
  logic   accept, absorb, gen, loaded;
  logic [DATA_W-1:0] support;
  int     checks = 0, failures = 0;
  int     gen_seen = 0;
  logic [DATA_W-1:0] gen_last;

  sys_set_comparator #(.MAX_K(MAX_K)) dut (.*);

  always #5 clk = ~clk;
  assign accept = tok.valid;

  always @(posedge clk) if (gen) begin gen_seen++; gen_last = gen_tok.data; end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic send(input tok_kind_e k, input int d);
    tok = '{valid: 1'b1, kind: k, data: DATA_W'(d)};
    @(negedge clk);
    tok = TOKEN_IDLE;
  endtask

  task automatic send_set(input int s[$]);
    foreach (s[i]) send((i == s.size() - 1) ? TK_LAST : TK_ITEM, s[i]);
  endtask

  function automatic bit subset(input int c[$], input int t[$]);
    foreach (c[i]) if (!(c[i] inside {t})) return 0;
    return 1;
  endfunction

  function automatic void rand_set(output int s[$], input int n, input int maxv);
    s = {};
    for (int v = 0; v <= maxv; v++) if ($urandom_range(0, maxv) < n) s.push_back(v);
  endfunction

  int cand[$], t[$], ref_sup, g0;
  logic saw_absorb;

  initial begin
    tok = TOKEN_IDLE;
    mode = MODE_LOAD;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    // ---- load and support count ----
    send(TK_CLEAR, 0);
    cand = '{3, 7, 9};
    saw_absorb = 1;
    foreach (cand[i]) begin
      tok = '{valid: 1'b1, kind: (i == 2) ? TK_LAST : TK_ITEM, data: DATA_W'(cand[i])};
      #1 saw_absorb &= absorb;
      @(negedge clk);
    end
    tok = TOKEN_IDLE;
    check(saw_absorb, "load tokens absorbed");
    check(loaded, "loaded after last item");
    tok = '{valid: 1'b1, kind: TK_ITEM, data: 1};
    #1 check(!absorb, "loaded unit does not absorb");
    tok = TOKEN_IDLE;

    mode = MODE_SUPPORT;
    ref_sup = 0;
    for (int n = 0; n < 300; n++) begin
      rand_set(t, 6 + n % 6, 15);
      if (t.size() == 0) t.push_back(3);
      send_set(t);
      if (subset(cand, t)) ref_sup++;
    end
    check(support == DATA_W'(ref_sup), "support count");
    check(ref_sup > 0, "some transactions contain the candidate");
    g0 = gen_seen;
    send(TK_FLUSH, 0);
    @(negedge clk);
    check(gen_seen == g0 + 1, "flush injects one result");
    check(gen_last == DATA_W'(ref_sup), "flush result carries support");

    // ---- generation mode ----
    mode = MODE_LOAD;
    send(TK_CLEAR, 0);
    check(!loaded && support == 0, "clear empties the unit");
    cand = '{2, 5, 8};
    send_set(cand);
    mode = MODE_GENERATE;
    begin
      int sets[$][$];
      int expect_gen;
      sets.push_back('{2, 5, 6});     // join: result 8
      sets.push_back('{2, 5, 8});     // itself: no
      sets.push_back('{2, 4, 6});     // prefix differs
      sets.push_back('{2, 5, 9});     // last item larger: no
      sets.push_back('{2, 5});        // too short
      sets.push_back('{2, 5, 6, 7});  // too long
      sets.push_back('{1, 5, 6});     // prefix differs
      sets.push_back('{2, 5, 0});     // join: result 8
      for (int r = 0; r < 200; r++) begin
        int s[$];
        rand_set(s, 3, 9);
        sets.push_back(s);
      end
      foreach (sets[k]) begin
        int s[$];
        s = sets[k];
        if (s.size() == 0) continue;
        expect_gen = (s.size() == 3 && s[0] == 2 && s[1] == 5 && s[2] < 8);
        g0 = gen_seen;
        send_set(s);
        @(negedge clk);
        check(gen_seen == g0 + expect_gen, $sformatf("generate for set %0d", k));
        if (expect_gen) check(gen_last == 8, "generated item");
      end
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
