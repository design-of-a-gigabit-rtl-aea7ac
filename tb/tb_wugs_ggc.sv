// Testbench for wugs_ggc: the number of grants equals min(free slots, 8),
// grants only change on `upd`, and the granted set rotates when slots are
// scarce so every input is eventually granted.
module tb_wugs_ggc;
  logic clk = 0, rst_n = 0, upd;
  logic [6:0] free_cnt;
  logic [7:0] ug;
  int checks = 0, failures = 0;
  int got [8];

  wugs_ggc #(.N(8), .CNT_W(7)) dut (.clk(clk), .rst_n(rst_n), .upd(upd), .free_cnt(free_cnt), .ug(ug));

  always #5 clk = ~clk;
  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    upd = 0; free_cnt = 0;
    foreach (got[j]) got[j] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      logic [7:0] ug_prev;
      int exp;
      @(negedge clk);
      free_cnt = (t < 100) ? 7'($urandom_range(0, 40)) : 7'd3;
      upd = 1;
      exp = (free_cnt > 8) ? 8 : int'(free_cnt);
      @(negedge clk);
      upd = 0;
      checks++;
      if ($countones(ug) != exp) begin
        failures++; $display("free %0d grants %b", free_cnt, ug);
      end
      if (t >= 100) foreach (got[j]) if (ug[j]) got[j]++;
      ug_prev = ug;
      free_cnt = 7'd40;
      @(negedge clk);
      checks++;
      if (ug != ug_prev) begin failures++; $display("grant changed without upd"); end
    end
    foreach (got[j]) begin
      checks++;
      if (got[j] < 50) begin failures++; $display("input %0d granted %0d times", j, got[j]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
