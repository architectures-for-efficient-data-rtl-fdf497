// tb_cam_encoder: every one-hot match vector must give its index and hit; the
// empty vector must give no hit.
module tb_cam_encoder;
  localparam int unsigned DEPTH = 16;

  logic [DEPTH-1:0] match;
  logic [$clog2(DEPTH)-1:0] addr;
  logic hit;
  int checks = 0, failures = 0;

  cam_encoder #(.DEPTH(DEPTH)) dut (.*);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    match = '0;
    #1 check(!hit, "no hit for empty match");
    for (int i = 0; i < DEPTH; i++) begin
      match = DEPTH'(1) << i;
      #1;
      check(hit, "hit");
      check(addr == i, $sformatf("address %0d", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
