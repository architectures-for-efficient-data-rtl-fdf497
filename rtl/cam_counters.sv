// cam_counters: per-candidate item counters and support counters of a
// bitmapped CAM block.
//
// For every streamed item whose CAM lookup hit, the bitmap row says which of
// the NC candidates contain that item; each of those candidates' item
// counters goes up by one. Items in a transaction are distinct, so when the
// transaction ends a candidate whose counter equals its item count had all
// its items present, and its support counter goes up. The item counters then
// restart for the next transaction. Candidate item counts are written through
// len_we/len_idx/len_val; a count of zero marks an unused slot.
// The counters follow the document's description ("counters determine if all
// candidate items have been found"); the item-count registers, support
// counters and the timing below are this design's choice.
//
// Timing: in_valid/hit/row/last arrive together (one cycle after the item
// entered the block); counters update at that clock edge.
module cam_counters
  import apriori_pkg::*;
#(
  parameter int unsigned NC    = 16,  // candidates per block
  parameter int unsigned MAX_K = 16   // largest candidate size
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  clear,
  input  logic                  len_we,
  input  logic [$clog2(NC)-1:0] len_idx,
  input  logic [$clog2(MAX_K+1)-1:0] len_val,
  input  logic                  in_valid,
  input  logic                  hit,
  input  logic [NC-1:0]         row,
  input  logic                  last,
  output logic [DATA_W-1:0]     support [NC]
);

  localparam int unsigned LW = $clog2(MAX_K + 1);

  logic [LW-1:0] len [NC];
  logic [LW-1:0] cnt [NC];

  for (genvar c = 0; c < NC; c++) begin : g_cand
    logic [LW-1:0] cnt_next;
    assign cnt_next = cnt[c] + LW'(hit && row[c]);

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        len[c]     <= '0;
        cnt[c]     <= '0;
        support[c] <= '0;
      end else begin
        if (len_we && len_idx == ($clog2(NC))'(c)) len[c] <= len_val;
        if (clear) begin
          cnt[c]     <= '0;
          support[c] <= '0;
        end else if (in_valid) begin
          if (last) begin
            cnt[c] <= '0;
            if (len[c] != '0 && cnt_next == len[c]) support[c] <= support[c] + DATA_W'(1);
          end else begin
            cnt[c] <= cnt_next;
          end
        end
      end
    end
  end

endmodule
