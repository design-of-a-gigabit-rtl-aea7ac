// Testbench for wugs_ipp: link cells are framed, translated and sent to the
// switch as 16-word internal cells only in cell cycles the switch granted;
// the internal cell fields are checked against the programmed table entry,
// and the time stamp must be the cell time at which the grant was used.
// Recycled cells keep their source trunk group. With the switch withholding
// grants the receive buffer fills, the congestion timer starts, and cells
// with CLP=1 are dropped while CLP=0 continuous-stream cells pass.
module tb_wugs_ipp;
  import wugs_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [3:0] tick;
  logic [11:0] now;
  logic rx_valid, rx_soc, cyc_push, cyc_full, sw_ug, h_we, h_re;
  logic [31:0] rx_data;
  ext_cell_t cyc_cell;
  logic [15:0] cyc_stg, frm_err_cnt, rcb_ovf_cnt, vxt_err_cnt, cong_cnt, sent_cnt;
  word_t sw_data;
  logic [9:0] h_addr;
  vxt_entry_t h_wdata, h_rdata;
  int checks = 0, failures = 0;
  icell_t got [$];
  logic [3:0] ug_tick_ok;
  bit granted;

  wugs_timing u_t (.clk(clk), .rst_n(rst_n), .tick(tick), .now(now));
  wugs_ipp dut (.clk(clk), .rst_n(rst_n), .tick(tick), .now(now), .port_id(16'd4),
    .rx_valid(rx_valid), .rx_soc(rx_soc), .rx_data(rx_data),
    .cyc_push(cyc_push), .cyc_cell(cyc_cell), .cyc_stg(cyc_stg), .cyc_full(cyc_full),
    .sw_data(sw_data), .sw_ug(sw_ug), .cfg_bound(11'd256), .cfg_rcb_thresh(6'd10),
    .cfg_disc_time(16'd2000), .h_we(h_we), .h_re(h_re), .h_addr(h_addr), .h_wdata(h_wdata),
    .h_rdata(h_rdata), .frm_err_cnt(frm_err_cnt), .rcb_ovf_cnt(rcb_ovf_cnt),
    .vxt_err_cnt(vxt_err_cnt), .cong_cnt(cong_cnt), .sent_cnt(sent_cnt));

  always #5 clk = ~clk;
  initial begin
    #20000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // switch side: collect cells (word w visible at tick w+1)
  icell_t acc;
  bit on;
  always @(posedge clk) if (rst_n) begin
    logic [3:0] ot;
    ot = tick - 4'd1;
    if (tick == 4'd15) granted = sw_ug;
    if (ot == 4'd0) begin
      on = sw_data[35];
      acc = icell_put('0, 4'd0, sw_data);
      if (on && !granted) begin failures++; $display("cell sent without grant"); end
    end else if (on) acc = icell_put(acc, ot, sw_data);
    if (ot == 4'd15 && on) begin
      got.push_back(acc); on = 0;
      checks++;
      if (12'(now - acc.ts) != 12'd2) begin failures++; $display("TS %0d now %0d", acc.ts, now); end
    end
  end

  task automatic link_cell(logic [7:0] vpi, logic [15:0] vci, logic clp, logic [31:0] tag);
    for (int k = 0; k < 13; k++) begin
      @(negedge clk);
      rx_valid = 1; rx_soc = (k == 0);
      rx_data = (k == 0) ? {4'd0, vpi, vci, 3'd0, clp} : (tag + 32'(k));
    end
    @(negedge clk); rx_valid = 0; rx_soc = 0;
  endtask

  initial begin
    vxt_entry_t e;
    rx_valid = 0; rx_soc = 0; rx_data = 0; cyc_push = 0; cyc_cell = '0; cyc_stg = 0;
    sw_ug = 1; h_we = 0; h_re = 0; h_addr = 0; h_wdata = '0; granted = 0; on = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int a = 0; a < 1024; a++) begin
      @(negedge clk); h_we = 1; h_addr = 10'(a); h_wdata = '0;
    end
    e = '0; e.bi = 1; e.vpt = 1; h_addr = 10'd0; h_wdata = e; @(negedge clk);
    e = '0; e.bi = 1; e.rc = RC_COPY2; e.adr1 = 12'd1; e.adr2 = 12'd6; e.cyc = 2'b01; e.cs = 0;
    e.vxi1 = 24'h000101; e.vxi2 = 24'h000202; e.bdi2 = 8'd9;
    h_addr = 10'd300; h_wdata = e; @(negedge clk);
    e = '0; e.bi = 1; e.adr1 = 12'd3; e.adr2 = 12'd3; e.cs = 1; e.vxi1 = 24'h000303;
    h_addr = 10'd301; h_wdata = e; @(negedge clk);
    h_we = 0;
    // one cell, VCI 44 -> entry 300
    link_cell(8'd0, 16'd44, 0, 32'h1000);
    repeat (80) @(negedge clk);
    chk(got.size() == 1, $sformatf("one cell sent, got %0d", got.size()));
    if (got.size() == 1) begin
      chk(got[0].bi && got[0].rc == RC_COPY2 && got[0].adr1 == 1 && got[0].adr2 == 6, "routing fields");
      chk(got[0].stg == 16'd4 && got[0].cyc == 2'b01 && got[0].vxi2 == 24'h000202 && got[0].bdi2 == 9,
          "stg/cyc/vxi");
      chk(got[0].pl[0] == 32'h1001 && got[0].pl[11] == 32'h100C, "payload");
    end
    got.delete();
    // recycled cell keeps its STG
    @(negedge clk);
    cyc_push = 1; cyc_cell = '0; cyc_cell.hdr.vci = 16'd45; cyc_cell.pl[0] = 32'hABCD; cyc_stg = 16'd2;
    @(negedge clk); cyc_push = 0;
    repeat (80) @(negedge clk);
    chk(got.size() == 1 && got[0].stg == 16'd2 && got[0].adr1 == 3 && got[0].pl[0] == 32'hABCD,
        "recycled cell translated with its own STG");
    got.delete();
    // congestion: withhold grants, fill the receive buffer
    sw_ug = 0;
    for (int n = 0; n < 12; n++) link_cell(8'd0, 16'd44, 0, 32'h2000);   // CS=0 cells
    repeat (40) @(negedge clk);
    chk(got.size() == 0, "nothing sent without grants");
    sw_ug = 1;
    for (int n = 0; n < 4; n++) link_cell(8'd0, 16'd45, 1, 32'h3000);   // CS=1, CLP=1
    for (int n = 0; n < 4; n++) link_cell(8'd0, 16'd45, 0, 32'h4000);   // CS=1, CLP=0
    repeat (800) @(negedge clk);
    chk(cong_cnt >= 16'd8, $sformatf("congestion discards %0d", cong_cnt));
    begin
      int n_clp0; n_clp0 = 0;
      foreach (got[k]) if (got[k].pl[0] == 32'h4001) n_clp0++;
      chk(n_clp0 == 4, $sformatf("CLP=0 continuous cells pass: %0d", n_clp0));
      foreach (got[k]) chk(got[k].pl[0] != 32'h3001, "CLP=1 cell dropped during congestion");
    end
    chk(vxt_err_cnt == 0 && frm_err_cnt == 0, "no errors");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
