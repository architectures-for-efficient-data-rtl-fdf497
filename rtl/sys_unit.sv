// sys_unit: one unit of the systolic array.
//
// A unit joins a set comparator (local memory, index pointer, comparator and
// support counter) with the injection controller (item buffer and stall
// logic). Tokens enter on in_tok from the upstream unit and leave one cycle
// later on out_tok; stall runs the other way, out_stall towards upstream and
// in_stall from downstream. The mode input is passed straight on to the next
// unit, as the controller-to-controller connection of the array diagram
// shows; the controller changes it only while the array is empty.
// Latency: one cycle per unit; one extra cycle for every result injected.
module sys_unit
  import apriori_pkg::*;
#(
  parameter int unsigned MAX_K = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  mode_e        mode_in,
  output mode_e        mode_out,
  input  token_t       in_tok,
  output logic         out_stall,
  output token_t       out_tok,
  input  logic         in_stall,
  output logic         loaded,
  output logic [DATA_W-1:0] support
);

  logic   accept, absorb, gen, stall_mem;
  token_t gen_tok;

  assign mode_out = mode_in;

  sys_set_comparator #(.MAX_K(MAX_K)) u_cmp (
    .clk, .rst_n, .mode(mode_in), .tok(in_tok), .accept, .absorb,
    .gen, .gen_tok, .loaded, .support
  );

  sys_inject_ctrl u_ctrl (
    .clk, .rst_n, .in_tok, .out_stall, .out_tok, .in_stall,
    .gen, .gen_tok, .absorb, .accept, .stall_mem
  );

endmodule
