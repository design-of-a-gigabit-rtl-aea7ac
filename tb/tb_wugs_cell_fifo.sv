// Testbench for wugs_cell_fifo: random pushes and pops against a queue
// model; checks order, count, full and empty, and that a push into a full
// FIFO is ignored.
module tb_wugs_cell_fifo;
  logic clk = 0, rst_n = 0, push, pop, full, empty;
  logic [63:0] din, dout;
  logic [3:0] count;
  logic [63:0] q [$];
  int checks = 0, failures = 0;

  wugs_cell_fifo #(.W(64), .DEPTH(8)) dut (.clk(clk), .rst_n(rst_n), .push(push), .din(din),
    .full(full), .pop(pop), .dout(dout), .empty(empty), .count(count));

  always #5 clk = ~clk;
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    push = 0; pop = 0; din = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      checks++;
      if (int'(count) != q.size() || empty != (q.size() == 0) || full != (q.size() == 8) ||
          (q.size() > 0 && dout != q[0])) begin
        failures++; $display("t=%0d count %0d model %0d", t, count, q.size());
      end
      push = ($urandom_range(0, 99) < ((t / 500) % 2 ? 70 : 30));
      pop  = ($urandom_range(0, 99) < ((t / 500) % 2 ? 30 : 70));
      din  = {$urandom, $urandom};
      @(posedge clk);
      begin
        bit was_full;
        was_full = (q.size() == 8);
        if (pop && q.size() > 0) void'(q.pop_front());
        if (push && !was_full) q.push_back(din);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
