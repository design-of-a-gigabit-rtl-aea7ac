// Testbench for wugs_vxt: programs a small table and checks virtual path
// switching (VCI kept), a terminating path that hands over to the circuit
// table, SC forcing CLP, the four error cases, the cell counters, and the
// lookup latency (2 clocks for a path entry, 3 through the circuit table).
module tb_wugs_vxt;
  import wugs_pkg::*;
  logic clk = 0, rst_n = 0;
  logic req_v, req_rdy, req_cyc, out_v, out_rdy, h_we, h_re;
  ext_cell_t req_cell;
  logic [15:0] req_stg, err_cnt;
  icell_t out_cell;
  logic [9:0] h_addr;
  vxt_entry_t h_wdata, h_rdata;
  logic [11:0] now;
  int checks = 0, failures = 0;

  wugs_vxt #(.ENTRIES(1024)) dut (.clk(clk), .rst_n(rst_n), .cfg_bound(11'd256), .now(now),
    .req_v(req_v), .req_rdy(req_rdy), .req_cell(req_cell), .req_stg(req_stg), .req_cyc(req_cyc),
    .out_v(out_v), .out_rdy(out_rdy), .out_cell(out_cell), .err_cnt(err_cnt),
    .h_we(h_we), .h_re(h_re), .h_addr(h_addr), .h_wdata(h_wdata), .h_rdata(h_rdata));

  always #5 clk = ~clk;
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic wr(int a, vxt_entry_t e);
    @(negedge clk); h_we = 1; h_addr = 10'(a); h_wdata = e;
    @(negedge clk); h_we = 0;
  endtask

  // returns 1 and the cell if translated, 0 on error; lat = clocks to out_v
  task automatic lookup(logic [7:0] vpi, logic [15:0] vci, logic clp, logic cyc,
                        output bit ok, output icell_t c, output int lat);
    int e0;
    e0 = int'(err_cnt);
    @(negedge clk);
    req_v = 1; req_cell = '0; req_cell.hdr.vpi = vpi; req_cell.hdr.vci = vci;
    req_cell.hdr.clp = clp; req_cell.hdr.pt = 3'd1; req_cell.pl[5] = 32'hCAFE0000 | 32'(vci);
    req_stg = 16'd9; req_cyc = cyc;
    @(negedge clk); req_v = 0;
    lat = 1; ok = 0;
    while (!out_v && int'(err_cnt) == e0 && lat < 20) begin @(negedge clk); lat++; end
    if (out_v) begin ok = 1; c = out_cell; out_rdy = 1; @(negedge clk); out_rdy = 0; end
  endtask

  initial begin
    vxt_entry_t e;
    icell_t c;
    bit ok;
    int lat;
    req_v = 0; req_cell = '0; req_stg = 0; req_cyc = 0; out_rdy = 0; h_we = 0; h_re = 0;
    h_addr = 0; h_wdata = '0; now = 12'd77;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int a = 0; a < 1024; a++) wr(a, '0);
    // VPI 3: switched virtual path
    e = '0; e.bi = 1; e.rc = RC_COPY2; e.adr1 = 12'd2; e.adr2 = 12'd5; e.cyc = 2'b10; e.cs = 1;
    e.vxi1 = 24'hAB0000; e.vxi2 = 24'hCD0000; e.bdi1 = 8'd4; e.ud = 1; e.cc = 32'd10;
    wr(3, e);
    // VPI 0: terminating path; VCI 40 -> entry 296
    e = '0; e.bi = 1; e.vpt = 1; wr(0, e);
    e = '0; e.bi = 1; e.adr1 = 12'd7; e.adr2 = 12'd7; e.vxi1 = 24'h012345; e.sc = 1; wr(256 + 40, e);
    // VCI 41: recycled cells only
    e = '0; e.bi = 1; e.rco = 1; e.adr1 = 12'd1; e.adr2 = 12'd1; e.vxi1 = 24'h0A0B0C; wr(256 + 41, e);

    lookup(8'd3, 16'h7777, 0, 0, ok, c, lat);
    chk(ok, "VP lookup ok");
    chk(lat == 2, $sformatf("VP latency %0d", lat));
    chk(c.bi && c.rc == RC_COPY2 && c.adr1 == 2 && c.adr2 == 5 && c.cyc == 2'b10 && c.cs && c.ud,
        "VP routing fields");
    chk(c.vxi1 == 24'hAB7777 && c.vxi2 == 24'hCD7777, "VP switching keeps VCI");
    chk(c.stg == 16'd9 && c.ts == 12'd77 && c.bdi1 == 8'd4 && c.pl[5] == 32'hCAFE7777, "stg/ts/payload");
    lookup(8'd0, 16'd40, 0, 0, ok, c, lat);
    chk(ok && lat == 3, $sformatf("VC lookup ok, latency %0d", lat));
    chk(c.vxi1 == 24'h012345 && c.adr1 == 7 && c.clp, "VC entry used, SC sets CLP");
    lookup(8'd0, 16'd41, 0, 0, ok, c, lat);
    chk(!ok, "RCO entry refuses link cell");
    lookup(8'd0, 16'd41, 0, 1, ok, c, lat);
    chk(ok && c.vxi1 == 24'h0A0B0C, "RCO entry accepts recycled cell");
    lookup(8'd9, 16'd1, 0, 0, ok, c, lat);
    chk(!ok, "idle entry is an error");
    lookup(8'd255, 16'd1, 0, 0, ok, c, lat);
    chk(!ok, "idle VP entry 255 is an error");
    lookup(8'd0, 16'd900, 0, 0, ok, c, lat);
    chk(!ok, "VCI beyond table is an error");
    chk(err_cnt == 16'd4, $sformatf("error count %0d", err_cnt));
    lookup(8'd3, 16'h1, 0, 0, ok, c, lat);
    @(negedge clk); h_re = 1; h_addr = 10'd3; @(negedge clk); h_re = 0;
    chk(h_rdata.cc == 32'd12, $sformatf("cell count %0d", h_rdata.cc));
    @(negedge clk); h_re = 1; h_addr = 10'd296; @(negedge clk); h_re = 0;
    chk(h_rdata.cc == 32'd1, "circuit cell count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
