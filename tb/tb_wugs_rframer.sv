// Testbench for wugs_rframer: random cells with random gaps, plus cells cut
// short by a new start-of-cell; every complete cell must come out intact
// and every cut one must be counted.
module tb_wugs_rframer;
  import wugs_pkg::*;
  logic clk = 0, rst_n = 0, rx_valid, rx_soc, cell_v;
  logic [31:0] rx_data;
  ext_cell_t rcell;
  logic [15:0] err_cnt;
  ext_cell_t exp_q [$];
  int checks = 0, failures = 0, aborted = 0;

  wugs_rframer dut (.clk(clk), .rst_n(rst_n), .rx_valid(rx_valid), .rx_soc(rx_soc),
    .rx_data(rx_data), .rx_cell_v(cell_v), .rx_cell(rcell), .err_cnt(err_cnt));

  always #5 clk = ~clk;
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) if (rst_n && cell_v) begin
    checks++;
    if (exp_q.size() == 0 || rcell != exp_q[0]) begin
      failures++; $display("unexpected rcell %h", rcell.hdr);
    end
    if (exp_q.size() > 0) void'(exp_q.pop_front());
  end

  initial begin
    rx_valid = 0; rx_soc = 0; rx_data = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 100; n++) begin
      ext_cell_t c;
      int len;
      c = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom,
           $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      len = (n % 10 == 5) ? 7 : 13;
      if (len == 13) exp_q.push_back(c); else aborted++;
      for (int k = 0; k < len; k++) begin
        while ($urandom_range(0, 3) == 0) begin
          @(negedge clk); rx_valid = 0; rx_soc = 0; rx_data = 32'($urandom);
        end
        @(negedge clk);
        rx_valid = 1; rx_soc = (k == 0);
        rx_data = (k == 0) ? 32'(c.hdr) : c.pl[k-1];
      end
      @(negedge clk); rx_valid = 0; rx_soc = 0;
    end
    repeat (5) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("%0d cells missing", exp_q.size()); end
    checks++;
    if (int'(err_cnt) != aborted) begin failures++; $display("err_cnt %0d exp %0d", err_cnt, aborted); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
