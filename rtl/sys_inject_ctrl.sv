// sys_inject_ctrl: stall and result-injection controller of one systolic unit.
//
// The unit sits between pipeline register R(k-1) (upstream, arriving on in_tok)
// and its own output register R(k) (out_tok). Each cycle it either forwards
// the upstream token, or injects a generated result, or drains its one-entry
// item buffer. Injection costs upstream units one stall cycle and costs
// downstream units nothing, so a pass over n items that produces r results
// takes n + r cycles at the array output.
//
// Stall behaviour follows the document's truth table exactly:
//
//   in_stall stall_mem gen | out_stall stall_mem'
//      0        0       0  |    0         0        forward in_tok
//      0        0       1  |    1         0        result into R(k), upstream held
//      1        0       0  |    1         0        everything holds
//      0        1       x  |    1         0        buffered result into R(k)
//      1        0       1  |    1         1        result parked in item buffer
//      1        1       x  |    1         1        everything holds
//
// so out_stall = in_stall | stall_mem | gen, and while the item buffer is full
// no result is generated. out_stall is combinational from in_stall (the stall
// chain runs through the array in one cycle); this and the use of the item
// buffer for the parked result are this design's reading of the table and of
// the stall figure.
//
// Interface: in_tok/out_stall towards the upstream unit, out_tok/in_stall
// towards the downstream unit. gen (with gen_tok) is a one-cycle request from
// the set comparator; absorb says the accepted token is taken by the unit
// (candidate loading) and a bubble goes downstream instead. accept is high in
// the cycle the upstream token is taken.
module sys_inject_ctrl
  import apriori_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  token_t in_tok,
  output logic   out_stall,
  output token_t out_tok,
  input  logic   in_stall,
  input  logic   gen,
  input  token_t gen_tok,
  input  logic   absorb,
  output logic   accept,
  output logic   stall_mem
);

  token_t buf_tok;   // item buffer (stall)

  assign out_stall = in_stall | stall_mem | gen;
  assign accept    = in_tok.valid & ~out_stall;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_tok   <= TOKEN_IDLE;
      buf_tok   <= TOKEN_IDLE;
      stall_mem <= 1'b0;
    end else if (!in_stall) begin
      if (stall_mem) begin
        out_tok   <= buf_tok;
        stall_mem <= 1'b0;
      end else if (gen) begin
        out_tok <= gen_tok;
      end else if (in_tok.valid && !absorb) begin
        out_tok <= in_tok;
      end else begin
        out_tok <= TOKEN_IDLE;
      end
    end else if (gen && !stall_mem) begin
      buf_tok   <= gen_tok;
      stall_mem <= 1'b1;
    end
  end

  // A result request never meets a full item buffer: the request follows an
  // accepted token, and a token is only accepted with the buffer empty.
  a_gen_buffer_free : assert property (@(posedge clk) disable iff (!rst_n)
                                       gen |-> !stall_mem);
  a_gen_is_result : assert property (@(posedge clk) disable iff (!rst_n)
                                     gen |-> gen_tok.valid);

endmodule
