// cam_encoder: turns the CAM match lines into a bitmap RAM row address.
//
// The match vector is one-hot (or zero, when the item is used by no
// candidate of the block); the encoder ORs together the indices of the high
// lines, which for a one-hot input is the binary index, and raises hit when
// any line is high. Purely combinational. The document shows the encoder
// between CAM and bitmap RAM; the OR-based structure is this design's choice.
module cam_encoder #(
  parameter int unsigned DEPTH = 16
) (
  input  logic [DEPTH-1:0]         match,
  output logic [$clog2(DEPTH)-1:0] addr,
  output logic                     hit
);

  always_comb begin
    addr = '0;
    for (int i = 0; i < DEPTH; i++) begin
      if (match[i]) addr = addr | ($clog2(DEPTH))'(i);
    end
  end

  assign hit = |match;

endmodule
