// tb_bitmap_ram: writes random rows, reads them back with the one-cycle read
// latency, and checks that a read without re keeps the last row.
module tb_bitmap_ram;
  localparam int unsigned ROWS = 16, COLS = 16;

  logic clk = 0, we, re;
  logic [$clog2(ROWS)-1:0] waddr, raddr;
  logic [COLS-1:0] wdata, rdata;
  logic [COLS-1:0] model [ROWS];
  int checks = 0, failures = 0;

  bitmap_ram #(.ROWS(ROWS), .COLS(COLS)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    we = 0; re = 0; waddr = '0; raddr = '0; wdata = '0;
    @(negedge clk);
    for (int r = 0; r < ROWS; r++) begin
      we = 1; waddr = r[$clog2(ROWS)-1:0]; wdata = COLS'($urandom);
      model[r] = wdata;
      @(negedge clk);
    end
    we = 0;
    for (int k = 0; k < 200; k++) begin
      int r;
      r = $urandom_range(0, ROWS - 1);
      re = 1; raddr = r[$clog2(ROWS)-1:0];
      // write another row in the same cycle
      we = 1; waddr = raddr + 1'b1; wdata = COLS'($urandom);
      @(negedge clk);
      model[waddr] = wdata;
      check(rdata == model[r], $sformatf("row %0d", r));
    end
    we = 0; re = 0; raddr = raddr + 1'b1;
    begin
      logic [COLS-1:0] held;
      held = rdata;
      @(negedge clk);
      check(rdata == held, "no read without re");
    end
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
