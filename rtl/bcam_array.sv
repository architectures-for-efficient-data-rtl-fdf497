// bcam_array: replicated bitmapped CAM blocks sharing one transaction stream.
//
// Every block sees the same item stream (one 16-bit item per cycle, the rate
// the host memory delivers) and counts the support of its own NC candidates,
// so the array checks N_BLOCKS*NC candidates in one pass over the database.
// Configuration writes go to the block selected by cfg_blk; supports are read
// back through rd_blk/rd_idx (combinational read of the support counters).
// The document reports 1400 units on one Virtex-II Pro 100; with 16
// candidates per block, 88 blocks (1408 candidates) is the nearest count that
// covers it, which is this design's reading of that figure.
module bcam_array
  import apriori_pkg::*;
#(
  parameter int unsigned N_BLOCKS = 88,
  parameter int unsigned DEPTH    = 16,
  parameter int unsigned NC       = 16,
  parameter int unsigned MAX_K    = 16
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          in_valid,
  input  logic                          in_last,
  input  logic [ITEM_W-1:0]             data_in,
  input  logic [$clog2(N_BLOCKS)-1:0]   cfg_blk,
  input  logic                          cam_clear,
  input  logic                          cam_shift,
  input  logic                          bm_we,
  input  logic [$clog2(DEPTH)-1:0]      bm_addr,
  input  logic [NC-1:0]                 bm_data,
  input  logic                          len_we,
  input  logic [$clog2(NC)-1:0]         len_idx,
  input  logic [$clog2(MAX_K+1)-1:0]    len_val,
  input  logic                          cnt_clear,
  input  logic [$clog2(N_BLOCKS)-1:0]   rd_blk,
  input  logic [$clog2(NC)-1:0]         rd_idx,
  output logic [DATA_W-1:0]             rd_support
);

  localparam int unsigned BW = $clog2(N_BLOCKS);

  logic [DATA_W-1:0] sup [N_BLOCKS][NC];

  for (genvar b = 0; b < N_BLOCKS; b++) begin : g_blk
    logic sel;
    assign sel = (cfg_blk == BW'(b));
    bcam_block #(.DEPTH(DEPTH), .NC(NC), .MAX_K(MAX_K)) u_blk (
      .clk, .rst_n, .in_valid, .in_last, .data_in,
      .cam_clear(cam_clear && sel), .cam_shift(cam_shift && sel),
      .bm_we(bm_we && sel), .bm_addr, .bm_data,
      .len_we(len_we && sel), .len_idx, .len_val,
      .cnt_clear, .support(sup[b])
    );
  end

  assign rd_support = sup[rd_blk][rd_idx];

endmodule
