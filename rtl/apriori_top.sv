// apriori_top: the two Apriori accelerators, side by side.
//
// Systolic side: sys_controller in front of a sys_array of N_UNITS units.
// The host loads candidate itemsets into the units (load mode), streams the
// transaction database through them (support mode, supports come back after
// a flush token) or streams the frequent m-itemsets through units holding the
// same sets (generation mode, each unit appends the item that forms a new
// (m+1)-candidate). Streams are valid/ready, one token per cycle.
//
// Bitmapped CAM side: bcam_array of N_BLOCKS blocks of NC candidates. The
// host loads each block's CAM, bitmap rows and candidate sizes, then streams
// the transactions one item per cycle with bc_last on each transaction's final
// item, and reads the supports back by block and candidate index.
//
// The two sides share only the clock and reset. The host processor, its
// memory and candidate pruning are outside this RTL; their connections are the
// ports below.
module apriori_top
  import apriori_pkg::*;
#(
  parameter int unsigned N_UNITS  = 560,
  parameter int unsigned MAX_K    = 16,
  parameter int unsigned N_BLOCKS = 88,
  parameter int unsigned DEPTH    = 16,
  parameter int unsigned NC       = 16
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // systolic: host input stream
  input  logic                          sy_s_valid,
  output logic                          sy_s_ready,
  input  tok_kind_e                     sy_s_kind,
  input  logic [DATA_W-1:0]             sy_s_data,
  // systolic: mode and threshold
  input  logic                          sy_mode_we,
  input  mode_e                         sy_mode_req,
  output logic                          sy_mode_busy,
  output mode_e                         sy_mode,
  input  logic [DATA_W-1:0]             sy_min_support,
  // systolic: host output stream
  output logic                          sy_m_valid,
  input  logic                          sy_m_ready,
  output tok_kind_e                     sy_m_kind,
  output logic [DATA_W-1:0]             sy_m_data,
  output logic                          sy_m_frequent,
  output logic [N_UNITS-1:0]            sy_loaded,
  // bitmapped CAM: stream
  input  logic                          bc_valid,
  input  logic                          bc_last,
  input  logic [ITEM_W-1:0]             bc_data,
  // bitmapped CAM: loading
  input  logic [$clog2(N_BLOCKS)-1:0]   bc_cfg_blk,
  input  logic                          bc_cam_clear,
  input  logic                          bc_cam_shift,
  input  logic                          bc_bm_we,
  input  logic [$clog2(DEPTH)-1:0]      bc_bm_addr,
  input  logic [NC-1:0]                 bc_bm_data,
  input  logic                          bc_len_we,
  input  logic [$clog2(NC)-1:0]         bc_len_idx,
  input  logic [$clog2(MAX_K+1)-1:0]    bc_len_val,
  input  logic                          bc_cnt_clear,
  // bitmapped CAM: support read-back
  input  logic [$clog2(N_BLOCKS)-1:0]   bc_rd_blk,
  input  logic [$clog2(NC)-1:0]         bc_rd_idx,
  output logic [DATA_W-1:0]             bc_rd_support
);

  token_t arr_in_tok, arr_out_tok;
  logic   arr_out_stall, arr_in_stall;

  sys_controller #(.N_UNITS(N_UNITS)) u_sy_ctrl (
    .clk, .rst_n,
    .s_valid(sy_s_valid), .s_ready(sy_s_ready), .s_kind(sy_s_kind), .s_data(sy_s_data),
    .mode_we(sy_mode_we), .mode_req(sy_mode_req), .mode_busy(sy_mode_busy),
    .min_support(sy_min_support),
    .m_valid(sy_m_valid), .m_ready(sy_m_ready), .m_kind(sy_m_kind), .m_data(sy_m_data),
    .m_frequent(sy_m_frequent),
    .arr_mode(sy_mode), .arr_in_tok, .arr_out_stall, .arr_out_tok, .arr_in_stall
  );

  sys_array #(.N_UNITS(N_UNITS), .MAX_K(MAX_K)) u_sy_array (
    .clk, .rst_n, .mode(sy_mode),
    .in_tok(arr_in_tok), .out_stall(arr_out_stall),
    .out_tok(arr_out_tok), .in_stall(arr_in_stall),
    .loaded(sy_loaded)
  );

  bcam_array #(.N_BLOCKS(N_BLOCKS), .DEPTH(DEPTH), .NC(NC), .MAX_K(MAX_K)) u_bcam (
    .clk, .rst_n,
    .in_valid(bc_valid), .in_last(bc_last), .data_in(bc_data),
    .cfg_blk(bc_cfg_blk), .cam_clear(bc_cam_clear), .cam_shift(bc_cam_shift),
    .bm_we(bc_bm_we), .bm_addr(bc_bm_addr), .bm_data(bc_bm_data),
    .len_we(bc_len_we), .len_idx(bc_len_idx), .len_val(bc_len_val),
    .cnt_clear(bc_cnt_clear),
    .rd_blk(bc_rd_blk), .rd_idx(bc_rd_idx), .rd_support(bc_rd_support)
  );

endmodule
