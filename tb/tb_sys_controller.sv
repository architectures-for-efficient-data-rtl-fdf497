// tb_sys_controller: checks the systolic array controller on its own. The
// array side is driven by the testbench: a random stall on the feed, and
// tokens appearing at the array end. Checks feed order under stall, the
// return path and the frequency flag, and the drain-then-switch mode change
// (mode_busy lasts N_UNITS+3 cycles when the array is quiet, restarts when
// a token is still leaving, and is extended by cycles the host stalls).
module tb_sys_controller;
  import apriori_pkg::*;

  localparam int unsigned N = 8;

  logic clk = 0, rst_n = 0;
  logic s_valid, s_ready, mode_we, mode_busy, m_valid, m_ready, m_frequent;
  tok_kind_e s_kind, m_kind;
  logic [DATA_W-1:0] s_data, min_support, m_data;
  mode_e mode_req, arr_mode;
  token_t arr_in_tok, arr_out_tok;
  logic arr_out_stall, arr_in_stall;
  int checks = 0, failures = 0;

  sys_controller #(.N_UNITS(N)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  int sent[$], taken[$];
  int feed_stalls = 0;

  // array side of the feed: take the token when not stalling
  always_ff @(posedge clk) if (rst_n) begin
    if (arr_in_tok.valid && !arr_out_stall) taken.push_back(int'(arr_in_tok.data));
    if (arr_in_tok.valid && arr_out_stall) feed_stalls++;
  end

  initial begin
    s_valid = 0; s_kind = TK_ITEM; s_data = '0; mode_we = 0; mode_req = MODE_LOAD;
    min_support = 32'd10; m_ready = 1; arr_out_stall = 0; arr_out_tok = TOKEN_IDLE;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    // feed 200 tokens under random stall
    begin
      int n = 0;
      while (n < 200) begin
        s_valid = ($urandom_range(0, 3) != 0);
        s_data  = DATA_W'(n);
        arr_out_stall = ($urandom_range(0, 2) == 0);
        #1;
        if (s_valid && s_ready) begin sent.push_back(n); n++; end
        @(negedge clk);
      end
      s_valid = 0; arr_out_stall = 0;
      repeat (3) @(negedge clk);
    end
    check(taken.size() == 200, "all fed tokens reach the array");
    for (int i = 0; i < 200 && i < taken.size(); i++)
      check(taken[i] == sent[i], "feed order");
    check(feed_stalls > 0, "feed stalled");

    // return path and frequency flag (mode is LOAD: never frequent)
    arr_out_tok = '{valid: 1'b1, kind: TK_RESULT, data: 32'd12};
    m_ready = 0;
    #1;
    check(m_valid && m_kind == TK_RESULT && m_data == 32'd12, "return path");
    check(arr_in_stall, "host not ready stalls the array");
    check(!m_frequent, "no flag outside support mode");
    m_ready = 1;
    arr_out_tok = TOKEN_IDLE;
    @(negedge clk);

    // mode switch on a quiet array
    begin
      int busy = 0;
      mode_req = MODE_SUPPORT; mode_we = 1;
      @(negedge clk);
      mode_we = 0;
      s_valid = 1;
      while (mode_busy) begin
        busy++;
        check(!s_ready, "no input while draining");
        @(negedge clk);
      end
      s_valid = 0;
      check(busy == N + 3, $sformatf("drain wait %0d cycles", busy));
      check(arr_mode == MODE_SUPPORT, "new mode applied");
    end
    @(negedge clk);  // the token offered when input reopened goes in
    // frequency flag in support mode
    arr_out_tok = '{valid: 1'b1, kind: TK_RESULT, data: 32'd12};
    #1 check(m_frequent, "12 >= 10 is frequent");
    arr_out_tok = '{valid: 1'b1, kind: TK_RESULT, data: 32'd9};
    #1 check(!m_frequent, "9 < 10 is not frequent");
    arr_out_tok = '{valid: 1'b1, kind: TK_ITEM, data: 32'd99};
    #1 check(!m_frequent, "items are not flagged");
    arr_out_tok = TOKEN_IDLE;
    @(negedge clk);

    // mode switch with a token still leaving: the wait restarts
    begin
      int busy = 0;
      mode_req = MODE_GENERATE; mode_we = 1;
      @(negedge clk);
      mode_we = 0;
      while (mode_busy) begin
        busy++;
        arr_out_tok = (busy == 4) ? '{valid: 1'b1, kind: TK_ITEM, data: 32'd1} : TOKEN_IDLE;
        @(negedge clk);
      end
      check(busy == 4 + N + 3, $sformatf("restarted drain wait %0d cycles", busy));
      check(arr_mode == MODE_GENERATE, "generate mode applied");
    end

    // mode switch while the host stalls the array for 20 cycles: the stalled
    // cycles do not count towards the drain
    begin
      int busy = 0;
      mode_req = MODE_LOAD; mode_we = 1;
      @(negedge clk);
      mode_we = 0;
      while (mode_busy) begin
        busy++;
        m_ready = !(busy >= 3 && busy < 23);
        @(negedge clk);
      end
      m_ready = 1;
      check(busy == 20 + N + 3, $sformatf("drain wait with host stall %0d cycles", busy));
      check(arr_mode == MODE_LOAD, "load mode applied");
    end

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
