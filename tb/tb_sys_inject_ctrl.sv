// tb_sys_inject_ctrl: checks the injection controller against its stall
// truth table, cycle by cycle, under random downstream stalls and random
// result requests, and checks the n + r cycle count of an unstalled pass.
module tb_sys_inject_ctrl;
  import apriori_pkg::*;

  logic   clk = 0, rst_n = 0;
  token_t in_tok, out_tok, gen_tok;
  logic   out_stall, in_stall, gen, absorb, accept, stall_mem;
  int     checks = 0, failures = 0;

  sys_inject_ctrl dut (.*);

  always #5 clk = ~clk;

  // reference state
  token_t m_out, m_buf;
  logic   m_mem;
  logic   m_ostall;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // reference: the table rows written out one by one
  always_comb begin
    unique case ({in_stall, m_mem, gen})
      3'b000:         m_ostall = 1'b0;
      3'b001:         m_ostall = 1'b1;
      3'b100:         m_ostall = 1'b1;
      3'b010, 3'b011: m_ostall = 1'b1;
      3'b101:         m_ostall = 1'b1;
      default:        m_ostall = 1'b1;   // 11x
    endcase
  end

  always_ff @(posedge clk) if (rst_n) begin
    case ({in_stall, m_mem, gen})
      3'b000: m_out <= (in_tok.valid && !absorb) ? in_tok : TOKEN_IDLE;
      3'b001: m_out <= gen_tok;
      3'b010, 3'b011: begin m_out <= m_buf; m_mem <= 1'b0; end
      3'b101: begin m_buf <= gen_tok; m_mem <= 1'b1; end
      default: ;
    endcase
  end

  int unsigned seq = 0;
  int          gen_count = 0, park_count = 0, stall_count = 0;

  initial begin
    in_tok   = TOKEN_IDLE;
    gen_tok  = TOKEN_IDLE;
    gen      = 0;
    absorb   = 0;
    in_stall = 0;
    m_out    = TOKEN_IDLE;
    m_buf    = TOKEN_IDLE;
    m_mem    = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;

    // phase 1: random stimulus, compare every cycle
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      check(out_stall == m_ostall, "out_stall");
      check(out_tok == m_out, "out_tok");
      check(stall_mem == m_mem, "stall_mem");
      check(accept == (in_tok.valid && !m_ostall), "accept");
      // stimulus for the next edge
      if (!(in_tok.valid && out_stall)) begin
        if ($urandom_range(0, 3) != 0) begin
          in_tok = '{valid: 1'b1, kind: TK_ITEM, data: DATA_W'(seq)};
          seq++;
        end else begin
          in_tok = TOKEN_IDLE;
        end
      end
      in_stall = ($urandom_range(0, 3) == 0);
      absorb   = ($urandom_range(0, 15) == 0);
      gen      = !m_mem && ($urandom_range(0, 5) == 0);
      gen_tok  = '{valid: 1'b1, kind: TK_RESULT, data: DATA_W'($urandom)};
      if (gen) gen_count++;
      if (gen && in_stall) park_count++;
      if (in_stall) stall_count++;
      #1;
      check(out_stall == m_ostall, "out_stall comb");
    end
    check(park_count > 0, "a result was parked in the item buffer");

    // phase 2: unstalled pass of 20 items with a result after every 4th:
    // 25 tokens must leave in 25 consecutive cycles
    @(negedge clk);
    in_tok = TOKEN_IDLE; gen = 0; in_stall = 0; absorb = 0;
    repeat (4) @(negedge clk);
    fork
      begin
        int sent = 0;
        while (sent < 20) begin
          gen    = 0;
          in_tok = '{valid: 1'b1, kind: TK_ITEM, data: DATA_W'(sent)};
          @(negedge clk);
          sent++;
          if (sent % 4 == 0) begin
            gen     = 1;
            gen_tok = '{valid: 1'b1, kind: TK_RESULT, data: 32'hAA};
            in_tok  = '{valid: 1'b1, kind: TK_ITEM, data: DATA_W'(sent)};
            if (sent == 20) in_tok = TOKEN_IDLE;
            @(negedge clk);
          end
        end
        gen = 0; in_tok = TOKEN_IDLE;
      end
      begin
        int outs = 0, first = -1, lastc = -1;
        for (int cyc = 0; cyc < 60; cyc++) begin
          @(posedge clk); #1;
          if (out_tok.valid) begin
            outs++;
            if (first < 0) first = cyc;
            lastc = cyc;
          end
        end
        check(outs == 25, "20 items + 5 results leave");
        check(lastc - first + 1 == 25, "n + r cycles for the pass");
      end
    join

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
