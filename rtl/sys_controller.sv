// sys_controller: front end of the systolic array.
//
// It feeds the host's token stream into the first unit, returns the stream
// leaving the last unit (with the injected results) to the host, and owns the
// array's mode. The document shows this controller only as a box that drives
// the items and the mode into the array and receives the stall and the
// returning stream; everything inside is this design's own choice:
//
//  * Input: a valid/ready stream (s_*). Tokens are registered once before
//    the first unit and held there while the array stalls.
//  * Output: a valid/ready stream (m_*). m_ready low stalls the array end.
//    In support mode a returning TK_RESULT carries a support count and
//    m_frequent tells whether it reaches min_support. m_kind and m_data
//    are the last unit's token itself, and arr_in_stall is m_ready
//    inverted: those outputs are wires on purpose, so the array's output
//    costs no extra cycle.
//  * Mode switch: mode_we requests mode_req. The controller stops taking
//    input and waits until the array is empty, which it knows once N_UNITS+2
//    cycles without a stall from the host pass with nothing leaving the
//    array (the front token of a non-stalled array moves every cycle, and a
//    stall from the host freezes the whole array). Then the new
//    mode takes effect and mode_busy drops.
module sys_controller
  import apriori_pkg::*;
#(
  parameter int unsigned N_UNITS = 560
) (
  input  logic              clk,
  input  logic              rst_n,
  // host input stream
  input  logic              s_valid,
  output logic              s_ready,
  input  tok_kind_e         s_kind,
  input  logic [DATA_W-1:0] s_data,
  // mode control
  input  logic              mode_we,
  input  mode_e             mode_req,
  output logic              mode_busy,
  input  logic [DATA_W-1:0] min_support,
  // host output stream
  output logic              m_valid,
  input  logic              m_ready,
  output tok_kind_e         m_kind,
  output logic [DATA_W-1:0] m_data,
  output logic              m_frequent,
  // array side
  output mode_e             arr_mode,
  output token_t            arr_in_tok,
  input  logic              arr_out_stall,
  input  token_t            arr_out_tok,
  output logic              arr_in_stall
);

  localparam int unsigned TW = $clog2(N_UNITS + 3);

  mode_e         pend_mode;
  logic [TW-1:0] quiet;

  assign s_ready = !mode_busy && (!arr_in_tok.valid || !arr_out_stall);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      arr_in_tok <= TOKEN_IDLE;
    end else if (!arr_in_tok.valid || !arr_out_stall) begin
      if (s_valid && s_ready) arr_in_tok <= '{valid: 1'b1, kind: s_kind, data: s_data};
      else                    arr_in_tok <= TOKEN_IDLE;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      arr_mode  <= MODE_LOAD;
      pend_mode <= MODE_LOAD;
      mode_busy <= 1'b0;
      quiet     <= '0;
    end else if (!mode_busy) begin
      if (mode_we) begin
        pend_mode <= mode_req;
        mode_busy <= 1'b1;
        quiet     <= '0;
      end
    end else if (arr_out_tok.valid || arr_in_tok.valid) begin
      quiet <= '0;
    end else if (arr_in_stall) begin
      quiet <= quiet;                    // a stalled array is frozen: wait
    end else if (quiet == TW'(N_UNITS + 2)) begin
      arr_mode  <= pend_mode;
      mode_busy <= 1'b0;
    end else begin
      quiet <= quiet + TW'(1);
    end
  end

  assign m_valid      = arr_out_tok.valid;
  assign m_kind       = arr_out_tok.kind;
  assign m_data       = arr_out_tok.data;
  assign m_frequent   = (arr_mode == MODE_SUPPORT) && (arr_out_tok.kind == TK_RESULT)
                        && (arr_out_tok.data >= min_support);
  assign arr_in_stall = !m_ready;

endmodule
