// tb_cam_array: shifts item codes into the CAM and checks the match vector
// for every code 0..1023 against where each code must sit after shifting;
// then checks clear and a full random refill.
module tb_cam_array;
  localparam int unsigned DEPTH = 16, W = 16;

  logic clk = 0, rst_n = 0, clear, shift;
  logic [W-1:0] data_in;
  logic [DEPTH-1:0] match;
  int checks = 0, failures = 0;

  cam_array #(.DEPTH(DEPTH), .W(W)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  int codes[$];

  task automatic load(input int c[$]);
    foreach (c[i]) begin
      shift = 1; data_in = W'(c[i]);
      @(negedge clk);
    end
    shift = 0;
  endtask

  task automatic sweep(input int c[$]);
    for (int v = 0; v < 1024; v++) begin
      logic [DEPTH-1:0] exp_m;
      exp_m = '0;
      // code shifted in j-th of n sits in entry n-1-j (first entries shift out)
      foreach (c[j]) if (c[j] == v && c.size() - 1 - j < DEPTH) exp_m[c.size() - 1 - j] = 1'b1;
      data_in = W'(v);
      #1 check(match == exp_m, $sformatf("match for %0d", v));
    end
  endtask

  initial begin
    clear = 0; shift = 0; data_in = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(match == '0, "empty after reset");
    codes = '{236, 249, 316, 319, 395, 482, 529, 620, 743, 787, 804, 819};
    load(codes);
    sweep(codes);
    clear = 1;
    @(negedge clk);
    clear = 0;
    data_in = 16'd249;
    #1 check(match == '0, "clear empties the CAM");
    // refill with 20 distinct codes: the first 4 shift out
    codes = {};
    for (int i = 0; i < 20; i++) codes.push_back(i * 37 + 5);
    load(codes);
    sweep(codes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
