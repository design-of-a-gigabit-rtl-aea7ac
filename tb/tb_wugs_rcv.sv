// Testbench for wugs_rcv: with both buffers non-empty the source alternates;
// link cells carry the port number as STG, recycled cells their stored STG;
// the congestion timer starts at the threshold and runs cfg_time clocks
// after the occupancy falls below it.
module tb_wugs_rcv;
  import wugs_pkg::*;
  logic clk = 0, rst_n = 0;
  logic rcb_empty, rcb_pop, cyc_empty, cyc_pop, req_v, req_rdy, req_cyc, disc_active;
  ext_cell_t rcb_cell, cyc_cell, req_cell;
  logic [5:0] rcb_count, cfg_thresh;
  logic [15:0] cyc_stg, req_stg, cfg_time;
  int checks = 0, failures = 0;

  wugs_rcv #(.CW(6)) dut (.clk(clk), .rst_n(rst_n), .port_id(16'd5),
    .rcb_empty(rcb_empty), .rcb_cell(rcb_cell), .rcb_count(rcb_count), .rcb_pop(rcb_pop),
    .cyc_empty(cyc_empty), .cyc_cell(cyc_cell), .cyc_stg(cyc_stg), .cyc_pop(cyc_pop),
    .req_v(req_v), .req_rdy(req_rdy), .req_cell(req_cell), .req_stg(req_stg), .req_cyc(req_cyc),
    .cfg_thresh(cfg_thresh), .cfg_time(cfg_time), .disc_active(disc_active));

  always #5 clk = ~clk;
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    rcb_empty = 1; cyc_empty = 1; req_rdy = 1; rcb_count = 0; cfg_thresh = 6'd20; cfg_time = 16'd30;
    rcb_cell = '0; rcb_cell.hdr.vci = 16'h1111; cyc_cell = '0; cyc_cell.hdr.vci = 16'h2222;
    cyc_stg = 16'd3;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(!req_v, "request with both buffers empty");
    rcb_empty = 0; cyc_empty = 0;
    begin
      bit prev; prev = 0;
      for (int k = 0; k < 10; k++) begin
        #1;
        chk(req_v && (rcb_pop ^ cyc_pop), "exactly one pop");
        if (k > 0) chk(req_cyc != prev, "sources alternate");
        chk(req_cyc ? (req_stg == 16'd3 && req_cell.hdr.vci == 16'h2222)
                    : (req_stg == 16'd5 && req_cell.hdr.vci == 16'h1111), "stg/cell of source");
        prev = req_cyc;
        @(negedge clk);
      end
    end
    cyc_empty = 1; #1;
    chk(rcb_pop && !req_cyc, "link only");
    req_rdy = 0; #1;
    chk(!rcb_pop && !cyc_pop, "no pop without ready");
    req_rdy = 1;
    // congestion timer
    chk(!disc_active, "timer idle");
    rcb_count = 6'd20;
    @(negedge clk);
    chk(disc_active, "timer started at threshold");
    rcb_count = 6'd3;
    for (int k = 0; k < 29; k++) begin @(negedge clk); chk(disc_active, "timer running"); end
    @(negedge clk);
    chk(!disc_active, "timer expired after cfg_time");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
