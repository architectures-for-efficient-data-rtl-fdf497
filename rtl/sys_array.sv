// sys_array: linear systolic array of N_UNITS units for the Apriori kernel.
//
// Candidate itemsets sit in the units' local memories; the transaction
// database (support mode) or the frequent itemsets (generation mode) stream
// through the chain one item per cycle. Results (support counts, generated
// items) are injected into the stream as it passes and leave at the end of
// the chain. A pass therefore takes N_UNITS cycles of latency plus one cycle
// per streamed item and per result. More candidates than units need more
// passes over the database.
//
// in_tok/out_stall face the controller; out_tok/in_stall are the end of the
// chain. loaded shows which units hold a candidate. The unit count of 560 is
// the document's figure for one Virtex-II Pro 100; the chaining is as in its
// array diagram.
module sys_array
  import apriori_pkg::*;
#(
  parameter int unsigned N_UNITS = 560,
  parameter int unsigned MAX_K   = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  mode_e        mode,
  input  token_t       in_tok,
  output logic         out_stall,
  output token_t       out_tok,
  input  logic         in_stall,
  output logic [N_UNITS-1:0] loaded
);

  token_t tok   [N_UNITS+1];
  logic   stall [N_UNITS+1];
  mode_e  md    [N_UNITS+1];

  assign tok[0]          = in_tok;
  assign out_stall       = stall[0];
  assign out_tok         = tok[N_UNITS];
  assign stall[N_UNITS]  = in_stall;
  assign md[0]           = mode;

  for (genvar u = 0; u < N_UNITS; u++) begin : g_unit
    logic [DATA_W-1:0] support;
    sys_unit #(.MAX_K(MAX_K)) u_unit (
      .clk, .rst_n,
      .mode_in(md[u]), .mode_out(md[u+1]),
      .in_tok(tok[u]), .out_stall(stall[u]),
      .out_tok(tok[u+1]), .in_stall(stall[u+1]),
      .loaded(loaded[u]), .support
    );
  end

endmodule
