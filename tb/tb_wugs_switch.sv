// End-to-end testbench for wugs_switch at its default size (8 ports, 1024
// table entries per port, 40-slot switch element planes), with the 64 cell
// time resequencing threshold. Link cells carry {flow, sequence} in their
// first payload word; every delivered cell is checked for its output port,
// new VPI/VCI, payload and per-flow order.
//   flow 1  port 0, terminating path VPI 0 -> circuit entry, unicast to 5
//   flow 2  port 1, virtual path VPI 7 switched to port 2 (VPI 9, VCI kept)
//   flow 3  port 2, copy-by-two multicast to ports 3 and 6
//   flow 4  port 3, copy-by-two to 0 and recycling port 7; the recycled
//           copy is looked up again (recycled-only entry) and copied to 1
//           and 4: three destinations in two passes
//   flow 5  port 4, many-to-many style: copies to 4 and 5 with upstream
//           discard, so the copy back to the sender's own port is dropped
//   flow 6  port 5, unprogrammed circuit: translation errors
//   flows 10-13 overload: ports 0-3 send at full link rate to port 6, whose
//           link takes one word in three. This forces output contention in
//           the switch element, withheld grants (stalls) at the inputs,
//           input congestion discard, low-priority (CLP) discard and AAL-5
//           block discard at the transmit buffer (flow 10 has a block
//           discard index and is sent slowly enough that its input does
//           not congest; its frames must arrive whole or not at all).
// Each mechanism is counted and a mechanism that never happened is a failure.
module tb_wugs_switch;
  import wugs_pkg::*;
  localparam int N = 8;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] rx_valid, rx_soc, tx_ready, tx_valid, tx_soc;
  logic [N-1:0][31:0] rx_data, tx_data;
  logic [N-1:0][1:0] cfg_skew;
  logic [2:0] h_port;
  logic h_we, h_re;
  logic [9:0] h_addr;
  vxt_entry_t h_wdata, h_rdata;
  logic [N-1:0][15:0] sent_cnt, recv_cnt, vxt_err_cnt, cong_cnt, ud_cnt, bd_cnt, clp_cnt, ovf_cnt;
  logic [3:0][15:0] se_drop_cnt;
  int checks = 0, failures = 0;

  wugs_switch dut (.clk(clk), .rst_n(rst_n), .rx_valid(rx_valid), .rx_soc(rx_soc), .rx_data(rx_data),
    .tx_ready(tx_ready), .tx_valid(tx_valid), .tx_soc(tx_soc), .tx_data(tx_data),
    .cfg_skew(cfg_skew), .cfg_bound(11'd256), .cfg_rcb_thresh(6'd24), .cfg_disc_time(16'd3000),
    .cfg_age_thresh(12'd64), .cfg_xmb_hi(7'd30), .cfg_xmb_lo(7'd12), .cfg_xmb_clp(7'd40),
    .h_port(h_port), .h_we(h_we), .h_re(h_re), .h_addr(h_addr), .h_wdata(h_wdata), .h_rdata(h_rdata),
    .sent_cnt(sent_cnt), .recv_cnt(recv_cnt), .vxt_err_cnt(vxt_err_cnt), .cong_cnt(cong_cnt),
    .ud_cnt(ud_cnt), .bd_cnt(bd_cnt), .clp_cnt(clp_cnt), .ovf_cnt(ovf_cnt), .se_drop_cnt(se_drop_cnt));

  always #5 clk = ~clk;
  initial begin
    #60000000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // ---------------- link drivers ----------------
  typedef struct { logic [31:0] w [13]; } lcell_t;
  lcell_t txq [N][$];
  int gap [N];              // idle clocks after each cell, per input link
  initial begin
    rx_valid = '0; rx_soc = '0; rx_data = '0;
    foreach (gap[i]) gap[i] = 0;
  end
  for (genvar i = 0; i < N; i++) begin : g_drv
    initial begin
      forever begin
        @(negedge clk);
        rx_valid[i] = 0; rx_soc[i] = 0;
        if (rst_n && txq[i].size() > 0) begin
          lcell_t c;
          c = txq[i].pop_front();
          for (int k = 0; k < 13; k++) begin
            rx_valid[i] = 1; rx_soc[i] = (k == 0); rx_data[i] = c.w[k];
            @(negedge clk);
          end
          rx_valid[i] = 0; rx_soc[i] = 0;
          repeat (gap[i]) @(negedge clk);
        end
      end
    end
  end

  task automatic send(int port, logic [7:0] vpi, logic [15:0] vci, int flow, int seq,
                      logic clp = 0, logic eof = 0);
    lcell_t c;
    c.w[0] = {4'd0, vpi, vci, 2'b00, eof, clp};
    c.w[1] = {8'(flow), 24'(seq)};
    for (int k = 2; k < 13; k++) c.w[k] = {8'(flow), 8'(k), 16'(seq)};
    txq[port].push_back(c);
  endtask

  // ---------------- expectations and receivers ----------------
  // per (flow, port): expected VPI/VCI (VCI < 0: keep the sent VCI + 0)
  int exp_hdr [int];        // key flow*8+port -> {vpi,vci}; -1 means VCI preserved
  int exp_vpi [int];
  int got_n [int];          // key flow*8+port -> cells received
  int last_seq [int];
  int frame_cnt [int];      // flow 10: seq/5 -> cells received
  int n_copies = 0;

  for (genvar j = 0; j < N; j++) begin : g_rx
    logic [31:0] w [13];
    int k = 0;
    always @(posedge clk) if (rst_n && tx_valid[j]) begin
      if (tx_soc[j]) k = 0;
      w[k] = tx_data[j];
      k++;
      if (k == 13) begin
        int flow, seq, key;
        bit ok;
        flow = int'(w[1][31:24]); seq = int'(w[1][23:0]);
        key = flow * 8 + j;
        ok = 1;
        for (int m = 2; m < 13; m++) if (w[m] != {8'(flow), 8'(m), 16'(seq)}) ok = 0;
        checks++;
        if (!ok) begin failures++; $display("port %0d: payload corrupted (flow %0d seq %0d)", j, flow, seq); end
        checks++;
        if (!exp_hdr.exists(key)) begin
          failures++; $display("port %0d: flow %0d should not arrive here", j, flow);
        end else if (exp_hdr[key] >= 0 && w[0][27:4] != 24'(exp_hdr[key])) begin
          failures++; $display("port %0d flow %0d: header %h", j, flow, w[0][27:4]);
        end else if (exp_hdr[key] < 0 && w[0][27:20] != 8'(exp_vpi[key])) begin
          failures++; $display("port %0d flow %0d: VPI %h", j, flow, w[0][27:20]);
        end
        if (flow == 2) begin
          checks++;
          if (w[0][19:4] != 16'(1000 + seq)) begin failures++; $display("flow 2: VCI not kept"); end
        end
        checks++;
        if (last_seq.exists(key) && seq <= last_seq[key]) begin
          failures++; $display("port %0d flow %0d: seq %0d after %0d", j, flow, seq, last_seq[key]);
        end
        last_seq[key] = seq;
        if (got_n.exists(key)) got_n[key]++; else got_n[key] = 1;
        if (flow == 10) begin
          if (frame_cnt.exists(seq / 5)) frame_cnt[seq / 5]++; else frame_cnt[seq / 5] = 1;
        end
        k = 0;
      end
    end
  end

  // ---------------- mechanism counters ----------------
  int n_stall = 0, n_recycle = 0, n_contend = 0;
  for (genvar i = 0; i < N; i++) begin : g_mon
    always @(posedge clk) if (rst_n) begin
      if (dut.tick == 4'd15 && dut.g_port[i].u_ipp.stg_v && !dut.ip_ug[i]) n_stall++;
      if (dut.c_push[i]) n_recycle++;
    end
  end
  // output contention: a cell ready for an output that another cell wins
  always @(posedge clk) if (rst_n && dut.tick == 4'd15) begin
    int r;
    r = 0;
    for (int s = 0; s < 40; s++)
      if (dut.g_plane[0].g_one.u_se.row_ready[s] && dut.g_plane[0].g_one.u_se.pend[s][6]) r++;
    if (r > 1) n_contend++;
  end

  // ---------------- table programming ----------------
  task automatic wr(int port, int a, vxt_entry_t e);
    @(negedge clk);
    h_port = 3'(port); h_we = 1; h_addr = 10'(a); h_wdata = e;
    @(negedge clk);
    h_we = 0;
  endtask

  function automatic vxt_entry_t ent(logic [2:0] rc, int a1, int a2, int v1, int v2);
    vxt_entry_t e;
    e = '0; e.bi = 1; e.rc = rc; e.adr1 = 12'(a1); e.adr2 = 12'(a2);
    e.vxi1 = 24'(v1); e.vxi2 = 24'(v2);
    return e;
  endfunction

  task automatic expect_at(int flow, int port, int hdr, int vpi = 0);
    exp_hdr[flow * 8 + port] = hdr;
    exp_vpi[flow * 8 + port] = vpi;
  endtask

  int start_t;
  initial begin
    vxt_entry_t e;
    tx_ready = '1; h_port = 0; h_we = 0; h_re = 0; h_addr = 0; h_wdata = '0;
    for (int i = 0; i < N; i++) cfg_skew[i] = 2'd1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // clear every table, then mark VPI 0 as terminating on every port
    for (int p = 0; p < N; p++)
      for (int a = 0; a < 1024; a++) begin
        @(negedge clk); h_port = 3'(p); h_we = 1; h_addr = 10'(a); h_wdata = '0;
      end
    @(negedge clk); h_we = 0;
    for (int p = 0; p < N; p++) begin
      e = '0; e.bi = 1; e.vpt = 1; wr(p, 0, e);
    end
    // flow 1
    wr(0, 256 + 50, ent(RC_UNICAST, 5, 5, 'h000100, 0));           expect_at(1, 5, 'h000100);
    // flow 2: VPI 7 not terminating
    wr(1, 7, ent(RC_UNICAST, 2, 2, 'h090000, 0));                  expect_at(2, 2, -1, 'h09);
    // flow 3
    e = ent(RC_COPY2, 3, 6, 'h000301, 'h000601); e.cs = 1; wr(2, 256 + 60, e);
    expect_at(3, 3, 'h000301); expect_at(3, 6, 'h000601);
    // flow 4 and its recycling entry on port 7
    e = ent(RC_COPY2, 0, 7, 'h000070, 'h000071); e.cyc = 2'b10; wr(3, 256 + 70, e);
    e = ent(RC_COPY2, 1, 4, 'h000011, 'h000044); e.rco = 1; wr(7, 256 + 'h71, e);
    expect_at(4, 0, 'h000070); expect_at(4, 1, 'h000011); expect_at(4, 4, 'h000044);
    // flow 5
    e = ent(RC_COPY2, 4, 5, 'h000404, 'h000505); e.ud = 1; wr(4, 256 + 80, e);
    expect_at(5, 5, 'h000505);
    // overload flows, all to port 6
    e = ent(RC_UNICAST, 6, 6, 'h000A00, 0); e.bdi1 = 8'd3; wr(0, 256 + 100, e); expect_at(10, 6, 'h000A00);
    for (int p = 1; p < 4; p++) begin
      e = ent(RC_UNICAST, 6, 6, 'h000A00 + p, 0); wr(p, 256 + 100, e); expect_at(10 + p, 6, 'h000A00 + p);
    end

    // ---- functional traffic ----
    start_t = $time;
    for (int s = 0; s < 20; s++) begin
      send(0, 0, 50, 1, s);
      send(1, 7, 16'(1000 + s), 2, s);
      send(2, 0, 60, 3, s);
      send(3, 0, 70, 4, s);
      send(4, 0, 80, 5, s);
      if (s < 5) send(5, 0, 90, 6, s);
    end
    wait (txq[0].size() == 0 && txq[1].size() == 0 && txq[3].size() == 0);
    repeat (16 * 200) @(negedge clk);
    chk(got_n.exists(8 + 5) && got_n[8 + 5] == 20, "flow 1: 20 cells at port 5");
    chk(got_n.exists(16 + 2) && got_n[16 + 2] == 20, "flow 2: 20 cells at port 2");
    chk(got_n.exists(24 + 3) && got_n[24 + 3] == 20 && got_n.exists(24 + 6) && got_n[24 + 6] == 20,
        "flow 3: 20 copies at ports 3 and 6");
    chk(got_n.exists(32 + 0) && got_n[32 + 0] == 20 && got_n.exists(32 + 1) && got_n[32 + 1] == 20 &&
        got_n.exists(32 + 4) && got_n[32 + 4] == 20, "flow 4: 20 copies at ports 0, 1 and 4");
    chk(got_n.exists(40 + 5) && got_n[40 + 5] == 20, "flow 5: 20 cells at port 5");
    chk(ud_cnt[4] == 16'd20, $sformatf("flow 5: %0d upstream discards at port 4", ud_cnt[4]));
    chk(vxt_err_cnt[5] == 16'd5, "flow 6: 5 translation errors");
    n_copies = got_n[24 + 3] + got_n[24 + 6] - 20;

    // ---- overload ----
    // flow 10 at a modest rate (one cell per 80 clocks, below its fair
    // share) so its input never congests; ports 1-3 at full link rate, with
    // ports 1 and 2 low priority (CLP=1).
    gap[0] = 67;
    for (int s = 0; s < 150; s++) begin
      send(0, 0, 100, 10, s, 0, (s % 5) == 4);
      for (int p = 1; p < 4; p++) send(p, 0, 100, 10 + p, s, p < 3);
    end
    fork
      begin
        while (txq[0].size() > 0 || txq[1].size() > 0 || txq[2].size() > 0 || txq[3].size() > 0) begin
          @(negedge clk); tx_ready[6] = ($urandom_range(0, 2) == 0);
        end
        repeat (30000) begin @(negedge clk); tx_ready[6] = ($urandom_range(0, 2) == 0); end
        tx_ready[6] = 1;
      end
    join
    repeat (16 * 200) @(negedge clk);
    foreach (frame_cnt[f]) chk(frame_cnt[f] == 5, $sformatf("flow 10 frame %0d arrived in part (%0d)", f, frame_cnt[f]));
    chk(se_drop_cnt == '0, "no cell lost inside the switch element");

    // ---- mechanisms ----
    $display("mechanisms: copies %0d recycled %0d upstream-discard %0d vxt-errors %0d contention %0d stalls %0d input-discard %0d clp-discard %0d block-discard %0d",
             n_copies, n_recycle, ud_cnt[4], vxt_err_cnt[5], n_contend, n_stall,
             cong_cnt[0] + cong_cnt[1] + cong_cnt[2] + cong_cnt[3], clp_cnt[6], bd_cnt[6]);
    chk(n_copies > 0, "copy-by-two multicast happened");
    chk(n_recycle > 0, "recycling happened");
    chk(ud_cnt[4] > 0, "upstream discard happened");
    chk(vxt_err_cnt[5] > 0, "translation error happened");
    chk(n_contend > 0, "output contention happened");
    chk(n_stall > 0, "flow-control stall happened");
    chk(cong_cnt[0] + cong_cnt[1] + cong_cnt[2] + cong_cnt[3] > 0, "input congestion discard happened");
    chk(clp_cnt[6] > 0, "CLP discard happened");
    chk(bd_cnt[6] > 0, "block discard happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
