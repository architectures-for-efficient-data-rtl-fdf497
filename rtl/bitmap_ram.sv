// bitmap_ram: the bitmap memory of a bitmapped CAM block.
//
// Row r belongs to CAM entry r; bit c of the row is set when candidate c of
// the block contains that entry's item. One synchronous write port loads the
// rows, one synchronous read port returns the row of the matched item one
// cycle after raddr is presented (block-RAM style). Sizes: one row per CAM
// entry, one column per candidate counter (16, as in the document's figure).
module bitmap_ram #(
  parameter int unsigned ROWS = 16,
  parameter int unsigned COLS = 16
) (
  input  logic                    clk,
  input  logic                    we,
  input  logic [$clog2(ROWS)-1:0] waddr,
  input  logic [COLS-1:0]         wdata,
  input  logic                    re,
  input  logic [$clog2(ROWS)-1:0] raddr,
  output logic [COLS-1:0]         rdata
);

  logic [COLS-1:0] mem [ROWS];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end

endmodule
