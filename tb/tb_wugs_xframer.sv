// Testbench for wugs_xframer: cells offered at random times must appear on
// the link as 13 words, header first with start-of-cell, in order; back to
// back cells take exactly 13 clocks each; with the link's ready signal
// toggling at random, words are sent only when it is high and none is lost.
module tb_wugs_xframer;
  import wugs_pkg::*;
  logic clk = 0, rst_n = 0, in_v, in_pop, tx_valid, tx_soc, tx_ready = 1;
  ext_cell_t in_cell;
  logic [31:0] tx_data;
  ext_cell_t src [$];
  ext_cell_t exp_q [$];
  int checks = 0, failures = 0, widx = 0, words = 0, first_t = -1, last_t = 0, cyc = 0;
  ext_cell_t cur;

  wugs_xframer dut (.clk(clk), .rst_n(rst_n), .in_v(in_v), .in_cell(in_cell), .in_pop(in_pop), .tx_ready(tx_ready),
    .tx_valid(tx_valid), .tx_soc(tx_soc), .tx_data(tx_data));

  always #5 clk = ~clk;
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  assign in_v    = src.size() > 0;
  assign in_cell = (src.size() > 0) ? src[0] : '0;

  always @(posedge clk) begin
    cyc++;
    if (rst_n && !tx_ready) begin
      checks++;
      if (tx_valid) begin failures++; $display("word sent while the link was not ready"); end
    end
    if (rst_n && tx_valid) begin
      if (first_t < 0) first_t = cyc;
      last_t = cyc;
      words++;
      if (tx_soc) begin
        checks++;
        if (widx != 0) begin failures++; $display("soc at word %0d", widx); end
        cur = exp_q[0]; void'(exp_q.pop_front()); widx = 0;
      end
      checks++;
      if (tx_data != ((widx == 0) ? 32'(cur.hdr) : cur.pl[widx-1])) begin
        failures++; if (failures < 4) $display("word %0d mismatch %h %h soc %b", widx, tx_data, cur.hdr, tx_soc);
      end
      widx = (widx == 12) ? 0 : widx + 1;
    end
    if (rst_n && in_pop && src.size() > 0) begin
      exp_q.push_back(src[0]);
      #1 void'(src.pop_front());
    end
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 20; n++)
      src.push_back({$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom,
                     $urandom, $urandom, $urandom, $urandom, $urandom, $urandom});
    wait (src.size() == 0);
    repeat (20) @(negedge clk);
    checks++;
    if (words != 20 * 13 || last_t - first_t + 1 != 20 * 13) begin
      failures++; $display("words %0d span %0d", words, last_t - first_t + 1);
    end
    fork
      repeat (2000) begin @(negedge clk); tx_ready = ($urandom_range(0, 2) != 0); end
    join_none
    for (int n = 0; n < 10; n++) begin
      repeat ($urandom_range(0, 30)) @(negedge clk);
      src.push_back({$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom,
                     $urandom, $urandom, $urandom, $urandom, $urandom, $urandom});
    end
    wait (src.size() == 0);
    repeat (2100) @(negedge clk);
    checks++;
    if (words != 30 * 13) begin failures++; $display("words %0d", words); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
