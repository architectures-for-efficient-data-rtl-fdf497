// tb_cam_counters: feeds random bitmap rows for random transactions and
// checks every candidate's support against a count kept in the testbench:
// a candidate is supported when the rows of the transaction hit it exactly as
// many times as its size.
module tb_cam_counters;
  import apriori_pkg::*;

  localparam int unsigned NC = 16, MAX_K = 16;

  logic clk = 0, rst_n = 0, clear, len_we, in_valid, hit, last;
  logic [$clog2(NC)-1:0] len_idx;
  logic [$clog2(MAX_K+1)-1:0] len_val;
  logic [NC-1:0] row;
  logic [DATA_W-1:0] support [NC];
  int checks = 0, failures = 0;

  cam_counters #(.NC(NC), .MAX_K(MAX_K)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  int lens[NC], cnt[NC], sup[NC];
  int supported_events = 0;

  initial begin
    clear = 0; len_we = 0; in_valid = 0; hit = 0; last = 0; row = '0;
    len_idx = '0; len_val = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int c = 0; c < NC; c++) begin
      lens[c] = (c == NC - 1) ? 0 : 1 + (c % 4);   // last slot unused
      len_we = 1; len_idx = c[$clog2(NC)-1:0]; len_val = lens[c][$clog2(MAX_K+1)-1:0];
      @(negedge clk);
      cnt[c] = 0; sup[c] = 0;
    end
    len_we = 0;
    for (int t = 0; t < 400; t++) begin
      int n;
      n = $urandom_range(1, 6);
      for (int i = 0; i < n; i++) begin
        in_valid = 1;
        hit  = ($urandom_range(0, 4) != 0);
        row  = NC'($urandom) | NC'($urandom);   // dense rows make hits likely
        last = (i == n - 1);
        for (int c = 0; c < NC; c++) if (hit && row[c]) cnt[c]++;
        if (last) begin
          for (int c = 0; c < NC; c++) begin
            if (lens[c] != 0 && cnt[c] == lens[c]) begin sup[c]++; supported_events++; end
            cnt[c] = 0;
          end
        end
        @(negedge clk);
        if ($urandom_range(0, 3) == 0) begin   // idle cycle between items
          in_valid = 0; hit = 1; row = '1; last = 1;
          @(negedge clk);
        end
      end
    end
    in_valid = 0;
    @(negedge clk);
    for (int c = 0; c < NC; c++) check(support[c] == DATA_W'(sup[c]), $sformatf("support %0d", c));
    check(support[NC-1] == 0, "unused slot never counts");
    check(supported_events > 50, "enough supported transactions");
    clear = 1;
    @(negedge clk);
    clear = 0;
    for (int c = 0; c < NC; c++) check(support[c] == '0, "clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
