// sys_set_comparator: local memory, set comparator and support counter of one
// systolic unit.
//
// The unit holds one candidate itemset, items in ascending order, in a small
// local memory addressed by an index pointer. Streamed sets are also sorted,
// so "is the held set a subset of the streamed set" reduces to a merge: the
// streamed item is compared with mem[index]; on equality the pointer moves on,
// and when it reaches the end of the held set the subset test is satisfied.
//
//  MODE_LOAD      an empty unit takes the next streamed set into its local
//                 memory (the tokens are absorbed, a bubble goes on).
//  MODE_SUPPORT   the support counter counts the streamed transactions that
//                 contain the held set. On TK_FLUSH the unit asks to inject
//                 its count as a TK_RESULT token after the flush token.
//  MODE_GENERATE  with held set c2 = (i1..i(m-1), i*) and streamed set
//                 c1 = (i1..i(m-1), im) where im < i*, the unit asks to inject
//                 i* as a result right after c1; the new candidate is
//                 c1 followed by i*.
//
// The index pointer, the equality comparator, the end-of-set test and the
// support counter follow the document's unit diagram. Reset of the pointer on
// the last item of a set, the flush and clear tokens, the load mode and the
// less-than test of generation mode are this design's own realisation of the
// behaviour the document states.
//
// Interface: tok is the upstream token, accept says it is taken this cycle.
// absorb (combinational) tells the injection controller to swallow it. gen is
// a registered one-cycle request to inject gen_tok.
module sys_set_comparator
  import apriori_pkg::*;
#(
  parameter int unsigned MAX_K = 16   // local memory depth m (items per set), at least 2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  mode_e        mode,
  input  token_t       tok,
  input  logic         accept,
  output logic         absorb,
  output logic         gen,
  output token_t       gen_tok,
  output logic         loaded,
  output logic [DATA_W-1:0] support
);

  localparam int unsigned LW = $clog2(MAX_K + 1);
  localparam int unsigned AW = $clog2(MAX_K);

  logic [ITEM_W-1:0] mem [MAX_K];
  logic [LW-1:0]     len;     // items held
  logic [LW-1:0]     idx;     // index pointer (support mode)
  logic [LW-1:0]     pos;     // position in streamed set (generation mode)
  logic              ok;      // prefix still equal (generation mode)

  logic              is_item;
  logic [ITEM_W-1:0] item;
  logic              match;
  logic              at_max;
  logic              ok_next;
  logic              gen_hit;

  assign is_item = (tok.kind == TK_ITEM) || (tok.kind == TK_LAST);
  assign item    = tok.data[ITEM_W-1:0];
  assign absorb  = (mode == MODE_LOAD) && !loaded && is_item;

  // support mode: equality against the item the pointer selects
  always_comb begin
    match  = 1'b0;
    at_max = 1'b0;
    if (idx < len) begin
      match  = (item == mem[idx[AW-1:0]]);
      at_max = (idx + LW'(1) == len);
    end
  end

  // generation mode: first m-1 items equal, m-th item smaller than ours
  always_comb begin
    ok_next = 1'b0;
    if (len != '0) begin
      if (pos + LW'(1) < len)       ok_next = ok && (item == mem[pos[AW-1:0]]);
      else if (pos + LW'(1) == len) ok_next = ok && (item <  mem[pos[AW-1:0]]);
    end
  end
  assign gen_hit = ok_next && (pos + LW'(1) == len);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      len     <= '0;
      idx     <= '0;
      pos     <= '0;
      ok      <= 1'b1;
      loaded  <= 1'b0;
      support <= '0;
      gen     <= 1'b0;
      gen_tok <= TOKEN_IDLE;
    end else begin
      gen <= 1'b0;
      if (accept) begin
        if (tok.kind == TK_CLEAR) begin
          len     <= '0;
          idx     <= '0;
          pos     <= '0;
          ok      <= 1'b1;
          loaded  <= 1'b0;
          support <= '0;
        end else if (absorb) begin
          if (len < LW'(MAX_K)) len <= len + LW'(1);
          if (tok.kind == TK_LAST) loaded <= 1'b1;
        end else if (loaded && mode == MODE_SUPPORT) begin
          if (is_item) begin
            if (match) begin
              idx <= idx + LW'(1);
              if (at_max) support <= support + DATA_W'(1);
            end
            if (tok.kind == TK_LAST) idx <= '0;
          end else if (tok.kind == TK_FLUSH) begin
            idx     <= '0;
            gen     <= 1'b1;
            gen_tok <= '{valid: 1'b1, kind: TK_RESULT, data: support};
          end
        end else if (loaded && mode == MODE_GENERATE && is_item) begin
          if (tok.kind == TK_LAST) begin
            pos <= '0;
            ok  <= 1'b1;
            if (gen_hit) begin
              gen     <= 1'b1;
              gen_tok <= '{valid: 1'b1, kind: TK_RESULT,
                           data: DATA_W'(mem[pos[AW-1:0]])};
            end
          end else begin
            if (pos < LW'(MAX_K)) pos <= pos + LW'(1);
            ok <= ok_next;
          end
        end
      end
    end
  end

  // local memory write port (candidate loading)
  always_ff @(posedge clk) begin
    if (accept && absorb && len < LW'(MAX_K)) mem[len[AW-1:0]] <= item;
  end

  a_load_fits : assert property (@(posedge clk) disable iff (!rst_n)
                                 (accept && absorb) |-> len < LW'(MAX_K));

endmodule
