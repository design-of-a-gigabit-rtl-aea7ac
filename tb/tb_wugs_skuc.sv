// Testbench for wugs_skuc: for every skew setting, the output must equal the
// input delayed by MAX_SKEW - skew clocks.
module tb_wugs_skuc;
  logic clk = 0;
  logic [1:0] skew;
  logic [11:0] din, dout;
  logic [11:0] hist [0:7];
  int checks = 0, failures = 0;

  wugs_skuc #(.W(12), .MAX_SKEW(2)) dut (.clk(clk), .skew(skew), .din(din), .dout(dout));

  always #5 clk = ~clk;
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    din = 0; skew = 0;
    for (int s = 0; s <= 2; s++) begin
      skew = 2'(s);
      for (int t = 0; t < 40; t++) begin
        @(negedge clk);
        for (int k = 7; k > 0; k--) hist[k] = hist[k-1];
        din = 12'($urandom); hist[0] = din;
        #1;
        if (t > 4) begin
          checks++;
          if (dout !== hist[2-s]) begin
            failures++;
            $display("skew %0d: got %h expected %h", s, dout, hist[2-s]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
