// Testbench for wugs_rsq: cells stamped 0,1,2,... at consecutive cell times
// reach the resequencer in scrambled order after random network delays of
// up to 40 cell times. With the 64-cell-time threshold they must leave in
// stamp order, each at the end of the cell time in which its age reaches
// 64 (seen by the consumer at age 65). Then flow control: with
// the buffer nearly full, dg must drop.
module tb_wugs_rsq;
  import wugs_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [3:0] tick;
  logic [11:0] now, thresh;
  logic in_v, dg, out_v, out_rdy;
  icell_t in_cell, out_cell;
  logic [15:0] ovf_cnt;
  int checks = 0, failures = 0;
  int due [200];
  int expect_ts = 0;
  int q [$];

  wugs_timing u_t (.clk(clk), .rst_n(rst_n), .tick(tick), .now(now));
  wugs_rsq #(.SLOTS(128)) dut (.clk(clk), .rst_n(rst_n), .tick(tick), .now(now), .cfg_thresh(thresh),
    .in_v(in_v), .in_cell(in_cell), .dg(dg), .out_v(out_v), .out_rdy(out_rdy), .out_cell(out_cell),
    .ovf_cnt(ovf_cnt));

  always #5 clk = ~clk;
  initial begin
    #3000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // consumer
  always @(posedge clk) if (rst_n && out_v && out_rdy) begin
    checks++;
    if (int'(out_cell.ts) != expect_ts || int'(12'(now - out_cell.ts)) != 65) begin
      failures++;
      $display("released ts %0d at age %0d, expected ts %0d", out_cell.ts, 12'(now - out_cell.ts), expect_ts);
    end
    expect_ts++;
  end

  initial begin
    in_v = 0; in_cell = '0; out_rdy = 1; thresh = 12'd64;
    for (int k = 0; k < 200; k++) due[k] = k + 1 + $urandom_range(0, 39);
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 320; t++) begin
      // wait for tick 0 of the next cell cycle
      while (tick != 4'd0) @(negedge clk);
      for (int k = 0; k < 200; k++) if (due[k] == int'(now)) q.push_back(k);
      if (q.size() > 0) begin
        in_v = 1; in_cell = '0; in_cell.ts = 12'(q[0]); in_cell.pl[0] = 32'(q[0]);
        void'(q.pop_front());
      end
      @(negedge clk); in_v = 0;
    end
    checks++;
    if (expect_ts != 200) begin failures++; $display("only %0d cells released", expect_ts); end
    // flow control
    thresh = 12'd4000;
    for (int k = 0; k < 127; k++) begin
      while (tick != 4'd0) @(negedge clk);
      in_v = 1; in_cell = '0; in_cell.ts = now;
      @(negedge clk); in_v = 0;
    end
    while (tick != 4'd0) @(negedge clk);
    checks++;
    if (dg) begin failures++; $display("dg high with one slot free"); end
    checks++;
    if (ovf_cnt != 0) begin failures++; $display("overflow"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
