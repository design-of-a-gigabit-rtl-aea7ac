// Testbench for wugs_dstc: busy inputs get consecutive outputs starting at
// the rotating pointer, the pointer advances by the number of busy inputs,
// and over many cycles every output receives an equal share.
module tb_wugs_dstc;
  logic clk = 0, rst_n = 0, first, en;
  logic [7:0] busy;
  logic [7:0][2:0] sel;
  int checks = 0, failures = 0;
  int ptr = 0;
  int hits [8];

  wugs_dstc #(.N(8)) dut (.clk(clk), .rst_n(rst_n), .first(first), .en(en), .busy(busy), .sel(sel));

  always #5 clk = ~clk;
  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    first = 0; en = 1; busy = 0;
    foreach (hits[j]) hits[j] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      busy = (t < 200) ? 8'($urandom) : 8'hff;
      first = 1;
      en = (t % 7 != 3);
      #1;
      begin
        int k; k = ptr;
        for (int i = 0; i < 8; i++) if (busy[i]) begin
          checks++;
          if (int'(sel[i]) != k % 8) begin
            failures++; $display("t=%0d in %0d sel %0d exp %0d", t, i, sel[i], k % 8);
          end
          if (t >= 200) hits[sel[i]]++;
          k++;
        end
        if (en) ptr = k % 8;
      end
    end
    foreach (hits[j]) begin
      checks++;
      if (hits[j] != 200) begin failures++; $display("output %0d got %0d", j, hits[j]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
