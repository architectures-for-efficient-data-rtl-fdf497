// cam_array: shift-loaded content-addressable memory of item codes.
//
// Each entry holds one item code that candidates of its block use. Entries
// are loaded by shifting: with shift high, data_in enters entry 0 and every
// entry moves down by one. Otherwise data_in is the search key and every
// valid entry compares itself with it in parallel; match has one line per
// entry. Entries hold distinct codes, so at most one line is high.
// The shift loading and the data_in/shift ports are as drawn in the
// document; the entry count of 16 and the clear input are this design's
// choice. Matching is combinational; loading takes one cycle per entry.
module cam_array #(
  parameter int unsigned DEPTH = 16,
  parameter int unsigned W     = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             shift,
  input  logic [W-1:0]     data_in,
  output logic [DEPTH-1:0] match
);

  logic [W-1:0]     entry [DEPTH];
  logic [DEPTH-1:0] valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid <= '0;
    end else if (clear) begin
      valid <= '0;
    end else if (shift) begin
      valid <= {valid[DEPTH-2:0], 1'b1};
    end
  end

  always_ff @(posedge clk) begin
    if (shift && !clear) begin
      entry[0] <= data_in;
      for (int i = 1; i < DEPTH; i++) entry[i] <= entry[i-1];
    end
  end

  always_comb begin
    for (int i = 0; i < DEPTH; i++) match[i] = valid[i] && (entry[i] == data_in);
  end

endmodule
