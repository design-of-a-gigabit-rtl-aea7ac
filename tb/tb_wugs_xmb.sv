// Testbench for wugs_xmb: strict priority of continuous-stream cells, CLP
// discard above the low-priority threshold, and block discard on AAL-5
// frames with hysteresis: once the discrete queue crosses the high mark,
// whole frames are dropped until it falls to the low mark; no frame leaves
// in part.
module tb_wugs_xmb;
  import wugs_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_push, in_cs, in_full, out_v, out_pop, congested;
  ext_cell_t in_cell, out_cell;
  logic [7:0] in_bdi;
  logic [4:0] cfg_hi, cfg_lo, cfg_clp;
  logic [15:0] bd_cnt, clp_cnt, ovf_cnt;
  int checks = 0, failures = 0;

  wugs_xmb #(.CS_DEPTH(8), .DS_DEPTH(16)) dut (.clk(clk), .rst_n(rst_n), .in_push(in_push),
    .in_cell(in_cell), .in_cs(in_cs), .in_bdi(in_bdi), .in_full(in_full),
    .cfg_hi(cfg_hi), .cfg_lo(cfg_lo), .cfg_clp(cfg_clp), .out_v(out_v), .out_cell(out_cell),
    .out_pop(out_pop), .congested(congested), .bd_cnt(bd_cnt), .clp_cnt(clp_cnt), .ovf_cnt(ovf_cnt));

  always #5 clk = ~clk;
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic push(logic cs, logic clp, logic [7:0] bdi, logic eof, logic [31:0] tag);
    @(negedge clk);
    in_push = 1; in_cs = cs; in_bdi = bdi; in_cell = '0; in_cell.hdr.clp = clp;
    in_cell.hdr.pt = eof ? 3'b001 : 3'b000; in_cell.pl[0] = tag;
    @(negedge clk); in_push = 0;
  endtask

  task automatic pop(output logic [31:0] tag, output bit got);
    @(negedge clk);
    got = out_v; tag = out_cell.pl[0];
    out_pop = out_v;
    @(negedge clk); out_pop = 0;
  endtask

  initial begin
    logic [31:0] tag; bit got;
    int frames_out [int];
    in_push = 0; in_cs = 0; in_bdi = 0; in_cell = '0; out_pop = 0;
    cfg_hi = 5'd8; cfg_lo = 5'd2; cfg_clp = 5'd6;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // priority
    push(0, 0, 0, 0, 32'h100); push(1, 0, 0, 0, 32'h200); push(0, 0, 0, 0, 32'h101);
    push(1, 0, 0, 0, 32'h201);
    pop(tag, got); chk(got && tag == 32'h200, "continuous first");
    pop(tag, got); chk(got && tag == 32'h201, "continuous second");
    pop(tag, got); chk(got && tag == 32'h100, "then discrete");
    pop(tag, got); chk(got && tag == 32'h101, "discrete order");
    pop(tag, got); chk(!got, "empty");
    // CLP discard: fill discrete queue to 6, then CLP=1 dropped, CLP=0 kept
    for (int k = 0; k < 6; k++) push(0, 0, 0, 0, 32'h300 + k);
    push(0, 1, 0, 0, 32'h3F0);
    chk(clp_cnt == 1, "CLP=1 cell dropped above threshold");
    push(0, 0, 0, 0, 32'h306);
    chk(dut.ds_cnt == 7, "CLP=0 cell kept");
    for (int k = 0; k < 7; k++) pop(tag, got);
    chk(!out_v, "drained");
    // block discard: frames of 3 cells on BDI 5; congestion from other traffic
    for (int f = 0; f < 6; f++) begin
      if (f == 1) for (int k = 0; k < 9; k++) push(0, 0, 0, 0, 32'h400 + k); // cross the high mark
      if (f == 4) while (out_v) begin pop(tag, got); if (tag[31:16] == 16'h5) frames_out[tag[15:8]]++; end
      for (int k = 0; k < 3; k++) push(0, 0, 8'd5, k == 2, {16'h5, 8'(f), 8'(k)});
    end
    while (out_v) begin pop(tag, got); if (tag[31:16] == 16'h5) frames_out[tag[15:8]]++; end
    // frame 0: accepted (not congested at its start); frame 1 ends while
    // congested, so frame 2 and 3 are dropped; frame 4 follows a frame end
    // seen while still congested (drain happens before frame 4), so frame 4
    // is dropped too and frame 5, after a frame end with the queue drained, passes.
    chk(frames_out.exists(0) && frames_out[0] == 3, "frame 0 whole");
    chk(frames_out.exists(1) && frames_out[1] == 3, "frame 1 whole");
    chk(!frames_out.exists(2) && !frames_out.exists(3), "frames 2,3 dropped whole");
    chk(frames_out.exists(5) && frames_out[5] == 3, "frame 5 whole after drain");
    foreach (frames_out[f]) chk(frames_out[f] == 3, $sformatf("frame %0d not partial", f));
    chk(bd_cnt == 16'(3 * (6 - frames_out.num())), $sformatf("block discard count %0d", bd_cnt));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
