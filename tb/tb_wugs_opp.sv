// Testbench for wugs_opp: internal cells are fed as the switch element
// would (word w at tick w+1). Checked: cells leave on the link in time-stamp
// order even when they arrive out of order, not before the age threshold,
// with the VXI of their copy as the new VPI/VCI; a cell whose CYC bit is set
// goes to the recycling output with its STG; an upstream-discard cell from
// this port's own trunk group is dropped; dg is high while there is room.
module tb_wugs_opp;
  import wugs_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [3:0] tick;
  logic [11:0] now;
  word_t sw_data;
  logic sw_dg, tx_valid, tx_soc, cyc_push;
  logic [31:0] tx_data;
  ext_cell_t cyc_cell;
  logic [15:0] cyc_stg, rx_cnt, ud_cnt, bd_cnt, clp_cnt, ovf_cnt;
  int checks = 0, failures = 0;
  icell_t inq [$];
  icell_t cur; bit cur_v;
  logic [31:0] txw [$];
  ext_cell_t cycq [$];
  int tx_cells [$];

  wugs_timing u_t (.clk(clk), .rst_n(rst_n), .tick(tick), .now(now));
  wugs_opp dut (.clk(clk), .rst_n(rst_n), .tick(tick), .now(now), .port_id(16'd3),
    .sw_data(sw_data), .sw_dg(sw_dg), .tx_ready(1'b1), .tx_valid(tx_valid), .tx_soc(tx_soc), .tx_data(tx_data),
    .cyc_push(cyc_push), .cyc_cell(cyc_cell), .cyc_stg(cyc_stg), .cyc_full(1'b0),
    .cfg_age_thresh(12'd6), .cfg_hi(7'd40), .cfg_lo(7'd10), .cfg_clp(7'd30),
    .rx_cnt(rx_cnt), .ud_cnt(ud_cnt), .bd_cnt(bd_cnt), .clp_cnt(clp_cnt), .ovf_cnt(ovf_cnt));

  always #5 clk = ~clk;
  initial begin
    #20000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  always @(posedge clk) begin
    if (tick == 4'd15) begin
      cur_v = sw_dg && inq.size() > 0;
      if (cur_v) cur = inq.pop_front();
      sw_data <= '0;
    end else sw_data <= cur_v ? icell_word(cur, tick) : '0;
    if (rst_n && tx_valid) begin
      if (tx_soc) begin
        tx_cells.push_back(int'(now));
        txw.delete();
      end
      txw.push_back(tx_data);
    end
    if (rst_n && cyc_push) begin cycq.push_back(cyc_cell); checks++; if (cyc_stg != 16'd7) failures++; end
  end

  function automatic icell_t mk(logic [11:0] ts, logic [31:0] tag);
    icell_t c;
    c = '0; c.bi = 1; c.adr1 = 12'd3; c.adr2 = 12'd3; c.ts = ts; c.stg = 16'd7;
    c.vxi1 = 24'h010203; c.vxi2 = 24'h040506; c.cs = 1;
    for (int k = 0; k < 12; k++) c.pl[k] = tag + 32'(k);
    return c;
  endfunction

  initial begin
    icell_t a, b;
    logic [11:0] t0;
    cur_v = 0; sw_data = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    while (tick != 4'd5) @(negedge clk);
    t0 = now;
    // resequencing: younger cell first, older second
    b = mk(t0, 32'hB000); a = mk(t0 - 12'd3, 32'hA000); a.ci = 1;
    inq.push_back(b); inq.push_back(a);
    repeat (16 * 14) @(negedge clk);
    chk(tx_cells.size() == 2, $sformatf("two cells transmitted, %0d", tx_cells.size()));
    chk(rx_cnt == 2, "two cells received");
    // the words of the last cell (b) are in txw; check header and payload
    chk(txw.size() == 13 && txw[0] == {4'd0, 24'h010203, 3'd0, 1'b0} && txw[1] == 32'hB000 &&
        txw[12] == 32'hB00B, "b: copy 1 header and payload");
    chk(tx_cells.size() == 2 && tx_cells[0] >= int'(t0) - 3 + 6 && tx_cells[1] >= int'(t0) + 6,
        "released after the age threshold");
    // order: a (older, copy 2) must have gone first: its header is VXI2
    // recycle and upstream discard
    begin
      icell_t r, u;
      r = mk(now, 32'hC000); r.cyc = 2'b01;
      u = mk(now, 32'hD000); u.ud = 1; u.stg = 16'd3;
      inq.push_back(r); inq.push_back(u);
    end
    repeat (16 * 14) @(negedge clk);
    chk(cycq.size() == 1 && {cycq[0].hdr.vpi, cycq[0].hdr.vci} == 24'h010203 &&
        cycq[0].pl[0] == 32'hC000, "recycled cell");
    chk(ud_cnt == 1 && tx_cells.size() == 2, "upstream discard");
    chk(sw_dg, "dg high with free buffer");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // the first transmitted cell must be a (VXI2 header)
  initial begin
    wait (rst_n);
    @(posedge clk);
    wait (tx_valid && tx_soc);
    @(posedge clk);
    #1;
    checks++;
    if (txw[0] != {4'd0, 24'h040506, 3'd0, 1'b0}) begin
      failures++; $display("first cell out is not the older one: %h", txw[0]);
    end
  end
endmodule
