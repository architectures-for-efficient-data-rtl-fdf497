// tb_sys_unit: one systolic unit between a testbench upstream register and a
// randomly stalling downstream. Checks that loading absorbs the candidate,
// that a support pass forwards every transaction unchanged and appends the
// support after the flush token, and that generation mode appends the
// joined item right after the matching set.
module tb_sys_unit;
  import apriori_pkg::*;

  logic   clk = 0, rst_n = 0;
  mode_e  mode_in, mode_out;
  token_t in_tok, out_tok;
  logic   out_stall, in_stall, loaded;
  logic [DATA_W-1:0] support;
  int     checks = 0, failures = 0;

  sys_unit #(.MAX_K(4)) dut (.*);

  always #5 clk = ~clk;

  token_t to_send[$], got[$], expect_q[$];
  int     stall_pct = 30;
  int     stalled_cycles = 0;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic token_t mk(input tok_kind_e k, input int d);
    return '{valid: 1'b1, kind: k, data: DATA_W'(d)};
  endfunction

  // upstream register: holds while the unit stalls
  always_ff @(posedge clk) begin
    if (!rst_n) in_tok <= TOKEN_IDLE;
    else if (!in_tok.valid || !out_stall)
      in_tok <= (to_send.size() > 0) ? to_send.pop_front() : TOKEN_IDLE;
  end
  // downstream: random stall, collect what is taken
  always_ff @(posedge clk) begin
    if (rst_n && out_tok.valid && !in_stall) got.push_back(out_tok);
    in_stall <= ($urandom_range(0, 99) < stall_pct);
    if (in_stall && out_stall) stalled_cycles++;
  end

  task automatic run_until_drained();
    int quiet = 0;
    while (quiet < 10) begin
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

  int t[$];
  int sup;

  initial begin
    mode_in = MODE_LOAD;
    in_stall = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;

    // load {4, 9}
    to_send = '{mk(TK_CLEAR, 0), mk(TK_ITEM, 4), mk(TK_LAST, 9)};
    expect_q = '{mk(TK_CLEAR, 0)};
    run_until_drained();
    check(loaded, "candidate loaded");
    compare("load");

    // support pass: 100 random transactions
    mode_in = MODE_SUPPORT;
    sup = 0;
    for (int n = 0; n < 100; n++) begin
      t = {};
      for (int v = 0; v < 12; v++) if ($urandom_range(0, 1)) t.push_back(v);
      if (t.size() == 0) t.push_back(1);
      if ((4 inside {t}) && (9 inside {t})) sup++;
      foreach (t[i]) begin
        to_send.push_back(mk((i == t.size() - 1) ? TK_LAST : TK_ITEM, t[i]));
        expect_q.push_back(mk((i == t.size() - 1) ? TK_LAST : TK_ITEM, t[i]));
      end
    end
    to_send.push_back(mk(TK_FLUSH, 0));
    expect_q.push_back(mk(TK_FLUSH, 0));
    expect_q.push_back(mk(TK_RESULT, sup));
    run_until_drained();
    compare("support pass");
    check(support == DATA_W'(sup), "support counter");

    // generation: unit holds {4, 9}; stream {4,6} {4,9} {3,5} {4,2}
    mode_in = MODE_GENERATE;
    to_send = '{mk(TK_ITEM, 4), mk(TK_LAST, 6), mk(TK_ITEM, 4), mk(TK_LAST, 9),
                mk(TK_ITEM, 3), mk(TK_LAST, 5), mk(TK_ITEM, 4), mk(TK_LAST, 2)};
    expect_q = '{mk(TK_ITEM, 4), mk(TK_LAST, 6), mk(TK_RESULT, 9),
                 mk(TK_ITEM, 4), mk(TK_LAST, 9),
                 mk(TK_ITEM, 3), mk(TK_LAST, 5),
                 mk(TK_ITEM, 4), mk(TK_LAST, 2), mk(TK_RESULT, 9)};
    run_until_drained();
    compare("generation");
    check(mode_out == mode_in, "mode passed on");
    check(stalled_cycles > 0, "downstream stall propagated");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
