// Testbench for wugs_oxbar_arb: the grant goes to the requesting row with
// the largest age, lowest index on ties; no request gives no grant.
module tb_wugs_oxbar_arb;
  logic [39:0] req;
  logic [39:0][7:0] age;
  logic gnt_v;
  logic [5:0] gnt_idx;
  int checks = 0, failures = 0;

  wugs_oxbar_arb #(.N(40), .AGE_W(8)) dut (.req(req), .age(age), .gnt_v(gnt_v), .gnt_idx(gnt_idx));

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      int best, bage;
      req = {8'($urandom), 32'($urandom)};
      if (t % 10 == 0) req = '0;
      if (t % 10 == 1) req = 40'(1) << $urandom_range(0, 39);
      for (int r = 0; r < 40; r++) age[r] = (t % 3 == 0) ? 8'($urandom_range(0, 3)) : 8'($urandom);
      best = -1; bage = -1;
      for (int r = 0; r < 40; r++)
        if (req[r] && int'(age[r]) > bage) begin best = r; bage = int'(age[r]); end
      #1;
      checks++;
      if (gnt_v != (best >= 0) || (best >= 0 && int'(gnt_idx) != best)) begin
        failures++;
        $display("req %h: got %0d/%0d expected %0d", req, gnt_v, gnt_idx, best);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
