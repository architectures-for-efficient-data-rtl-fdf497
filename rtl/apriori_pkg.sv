// apriori_pkg: types and constants shared by the Apriori accelerators.
//
// Both architectures work on item codes streamed one per clock. The systolic
// array moves tokens of type token_t from unit to unit; a token is an item of
// the set being streamed (TK_ITEM, or TK_LAST for the final item of a set), a
// result a unit has injected (TK_RESULT), or a control token (TK_FLUSH ends a
// database pass and asks every unit for its support count, TK_CLEAR empties
// the units). Item codes are 16 bits, the width the SRC-6 memory delivers per
// cycle; results carry a 32-bit payload so that a support count of a
// 100,000-transaction database fits. The token encoding and the widths of
// the payload are this design's own choice.
package apriori_pkg;

  localparam int unsigned ITEM_W = 16;   // item code width
  localparam int unsigned DATA_W = 32;   // token payload width (item or count)

  typedef enum logic [2:0] {
    TK_ITEM   = 3'd0,  // item of the streamed set, more follow
    TK_LAST   = 3'd1,  // last item of the streamed set
    TK_RESULT = 3'd2,  // result injected by a unit
    TK_FLUSH  = 3'd3,  // end of a support pass: units inject their support
    TK_CLEAR  = 3'd4   // empty every unit (local memory and support counter)
  } tok_kind_e;

  typedef struct packed {
    logic              valid;
    tok_kind_e         kind;
    logic [DATA_W-1:0] data;
  } token_t;

  // Operating mode of the systolic units.
  typedef enum logic [1:0] {
    MODE_LOAD     = 2'd0,  // empty units capture the next set into local memory
    MODE_SUPPORT  = 2'd1,  // count transactions that contain the held candidate
    MODE_GENERATE = 2'd2   // join the held set with streamed sets of equal prefix
  } mode_e;

  localparam token_t TOKEN_IDLE = '{valid: 1'b0, kind: TK_ITEM, data: '0};

endpackage
