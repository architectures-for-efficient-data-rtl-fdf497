// bcam_block: one bitmapped CAM block (predecoding architecture).
//
// Instead of one comparator per candidate item, the block keeps the few item
// codes that its NC candidates use in a small CAM. A streamed transaction item
// is looked up in the CAM; the encoder turns the match line into a row
// address of the bitmap RAM; the row tells which candidates contain the item,
// and their item counters step. At the end of each transaction a candidate
// whose counter reached its size gains one support. One item is accepted every
// cycle, with no stalls.
//
// Pipeline: cycle 0 CAM lookup, encode and bitmap read; cycle 1 counter
// update (the bitmap row arrives from the registered RAM read). The support of
// a transaction is visible two clock edges after its last item was presented.
//
// Loading (while no transaction streams): cam_clear empties the CAM,
// cam_shift shifts data_in into it (the first code shifted ends up in the
// highest-numbered entry after DEPTH shifts; a code shifted in as the j-th of
// n lands in entry n-1-j); bm_we writes a bitmap row; len_we sets a
// candidate's size. cnt_clear zeroes item and support counters.
// Structure (CAM, encoder, bitmap RAM, 16 counters) is the document's; the
// two-stage pipeline and the load interface are this design's choice.
module bcam_block
  import apriori_pkg::*;
#(
  parameter int unsigned DEPTH = 16,   // CAM entries = bitmap rows
  parameter int unsigned NC    = 16,   // candidates (counters) per block
  parameter int unsigned MAX_K = 16    // largest candidate size
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // stream
  input  logic                      in_valid,
  input  logic                      in_last,
  input  logic [ITEM_W-1:0]         data_in,
  // loading
  input  logic                      cam_clear,
  input  logic                      cam_shift,
  input  logic                      bm_we,
  input  logic [$clog2(DEPTH)-1:0]  bm_addr,
  input  logic [NC-1:0]             bm_data,
  input  logic                      len_we,
  input  logic [$clog2(NC)-1:0]     len_idx,
  input  logic [$clog2(MAX_K+1)-1:0] len_val,
  input  logic                      cnt_clear,
  // results
  output logic [DATA_W-1:0]         support [NC]
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [DEPTH-1:0] match;
  logic [AW-1:0]    addr;
  logic             hit;
  logic [NC-1:0]    row;
  logic             s1_valid, s1_last, s1_hit;

  cam_array #(.DEPTH(DEPTH), .W(ITEM_W)) u_cam (
    .clk, .rst_n, .clear(cam_clear), .shift(cam_shift), .data_in, .match
  );

  cam_encoder #(.DEPTH(DEPTH)) u_enc (.match, .addr, .hit);

  bitmap_ram #(.ROWS(DEPTH), .COLS(NC)) u_bm (
    .clk, .we(bm_we), .waddr(bm_addr), .wdata(bm_data),
    .re(in_valid && !cam_shift), .raddr(addr), .rdata(row)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
      s1_last  <= 1'b0;
      s1_hit   <= 1'b0;
    end else begin
      s1_valid <= in_valid && !cam_shift;
      s1_last  <= in_last;
      s1_hit   <= hit && in_valid && !cam_shift;
    end
  end

  cam_counters #(.NC(NC), .MAX_K(MAX_K)) u_cnt (
    .clk, .rst_n, .clear(cnt_clear), .len_we, .len_idx, .len_val,
    .in_valid(s1_valid), .hit(s1_hit), .row, .last(s1_last), .support
  );

  // CAM entries are distinct item codes: at most one match line is high.
  a_onehot_match : assert property (@(posedge clk) disable iff (!rst_n)
                                    in_valid |-> $onehot0(match));

endmodule
