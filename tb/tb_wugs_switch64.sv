// End-to-end testbench for the 64-port configuration of wugs_switch: four
// planes of the three-stage network (load distribution in the first stage)
// and 64 port processors. Link cells carry {flow, sequence} in their first
// payload word; every delivered cell is checked for its port, new header,
// payload and per-flow order.
//   flow 1  port 0 -> port 63 at full link rate, marked continuous-stream
//           so that input congestion control spares it (its receive buffer
//           may still overflow, which is counted), while fifteen
//           other inputs (ports 1-15 but 9, flows 11-25) overload ports
//           56-62 of the same last-stage element. That element's buffer
//           fills and its grants to the eight middle elements become scarce
//           and rotate, so the cells of flow 1, spread over all middle
//           elements by the first stage, reach output port 63 out of order;
//           the resequencer must restore the order. Queueing under this
//           overload exceeds 64 cell times, so the age threshold is set to
//           255, the maximum delay expected here. The
//           overload flows may lose cells to input congestion discard, but
//           what arrives must be in order.
//   flow 2  port 9, copy-by-two to ports 20 and 45 (first digits differ,
//           so copied in the middle stage); the copy to 45 is recycled and
//           copied again to ports 3 and 60: three links in two passes.
//   flow 3  port 17, copy-by-two to ports 40 and 41 (copied in the last
//           stage).
// Counted mechanisms, each required: out-of-order arrival at an output
// port processor (undone by the resequencer) and recycling.
module tb_wugs_switch64;
  import wugs_pkg::*;
  localparam int N = 64;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] rx_valid, rx_soc, tx_ready, tx_valid, tx_soc;
  logic [N-1:0][31:0] rx_data, tx_data;
  logic [N-1:0][1:0] cfg_skew;
  logic [5:0] h_port;
  logic h_we, h_re;
  logic [9:0] h_addr;
  vxt_entry_t h_wdata, h_rdata;
  logic [N-1:0][15:0] sent_cnt, recv_cnt, vxt_err_cnt, cong_cnt, ud_cnt, bd_cnt, clp_cnt, ovf_cnt;
  logic [3:0][15:0] se_drop_cnt;
  int checks = 0, failures = 0;

  wugs_switch #(.NPORTS(64)) dut (.clk(clk), .rst_n(rst_n), .rx_valid(rx_valid), .rx_soc(rx_soc), .rx_data(rx_data),
    .tx_ready(tx_ready), .tx_valid(tx_valid), .tx_soc(tx_soc), .tx_data(tx_data),
    .cfg_skew(cfg_skew), .cfg_bound(11'd256), .cfg_rcb_thresh(6'd30), .cfg_disc_time(16'd3000),
    .cfg_age_thresh(12'd255), .cfg_xmb_hi(7'd60), .cfg_xmb_lo(7'd30), .cfg_xmb_clp(7'd60),
    .h_port(h_port), .h_we(h_we), .h_re(h_re), .h_addr(h_addr), .h_wdata(h_wdata), .h_rdata(h_rdata),
    .sent_cnt(sent_cnt), .recv_cnt(recv_cnt), .vxt_err_cnt(vxt_err_cnt), .cong_cnt(cong_cnt),
    .ud_cnt(ud_cnt), .bd_cnt(bd_cnt), .clp_cnt(clp_cnt), .ovf_cnt(ovf_cnt), .se_drop_cnt(se_drop_cnt));

  always #5 clk = ~clk;
  initial begin
    #40000000; failures++;
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
  initial begin rx_valid = '0; rx_soc = '0; rx_data = '0; end
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
        end
      end
    end
  end

  task automatic send(int port, logic [15:0] vci, int flow, int seq);
    lcell_t c;
    c.w[0] = {4'd0, 8'd0, vci, 4'b0000};
    c.w[1] = {8'(flow), 24'(seq)};
    for (int k = 2; k < 13; k++) c.w[k] = {8'(flow), 8'(k), 16'(seq)};
    txq[port].push_back(c);
  endtask

  // ---------------- receivers ----------------
  int exp_hdr [int];        // key flow*64+port -> {vpi,vci}
  int got_n [int];
  int last_seq [int];
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
        key = flow * 64 + j;
        ok = 1;
        for (int m = 2; m < 13; m++) if (w[m] != {8'(flow), 8'(m), 16'(seq)}) ok = 0;
        checks++;
        if (!ok) begin failures++; $display("port %0d: payload corrupted (flow %0d seq %0d)", j, flow, seq); end
        checks++;
        if (!exp_hdr.exists(key)) begin
          failures++; $display("port %0d: flow %0d should not arrive here", j, flow);
        end else if (w[0][27:4] != 24'(exp_hdr[key])) begin
          failures++; $display("port %0d flow %0d: header %h", j, flow, w[0][27:4]);
        end
        checks++;
        if (last_seq.exists(key) && seq <= last_seq[key]) begin
          failures++; $display("port %0d flow %0d: seq %0d after %0d", j, flow, seq, last_seq[key]);
        end
        last_seq[key] = seq;
        if (got_n.exists(key)) got_n[key]++; else got_n[key] = 1;
        k = 0;
      end
    end
  end

  // cells of flow 1 reaching output port processor 63 before resequencing
  int n_misorder = 0, last_in = -1, n_recycle = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.g_port[63].u_opp.done_v && dut.g_port[63].u_opp.asm_cell.pl[0][31:24] == 8'd1) begin
      int s;
      s = int'(dut.g_port[63].u_opp.asm_cell.pl[0][23:0]);
      if (s < last_in) n_misorder++;
      if (s > last_in) last_in = s;
    end
    if (dut.c_push[45]) n_recycle++;
  end

  // ---------------- table programming ----------------
  task automatic wr(int port, int a, vxt_entry_t e);
    @(negedge clk);
    h_port = 6'(port); h_we = 1; h_addr = 10'(a); h_wdata = e;
    @(negedge clk);
    h_we = 0;
  endtask

  function automatic vxt_entry_t ent(logic [2:0] rc, int a1, int a2, int v1, int v2);
    vxt_entry_t e;
    e = '0; e.bi = 1; e.rc = rc; e.adr1 = 12'(a1); e.adr2 = 12'(a2);
    e.vxi1 = 24'(v1); e.vxi2 = 24'(v2);
    return e;
  endfunction

  initial begin
    vxt_entry_t e;
    tx_ready = '1; h_port = 0; h_we = 0; h_re = 0; h_addr = 0; h_wdata = '0;
    for (int i = 0; i < N; i++) cfg_skew[i] = 2'd1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // VPI 0 terminates on every port used; circuits at 256 + VCI
    foreach (cfg_skew[p]) begin
      e = '0; e.bi = 1; e.vpt = 1; wr(p, 0, e);
    end
    e = ent(RC_UNICAST, 63, 63, 'h000101, 0); e.cs = 1; wr(0, 256 + 10, e);  exp_hdr[64 + 63] = 'h000101;
    for (int p = 1; p < 16; p++) if (p != 9) begin
      wr(p, 256 + 10, ent(RC_UNICAST, 56 + p % 7, 56 + p % 7, 'h000200 + p, 0));
      exp_hdr[(10 + p) * 64 + 56 + p % 7] = 'h000200 + p;
    end
    e = ent(RC_COPY2, 20, 45, 'h000220, 'h000245); e.cyc = 2'b10; wr(9, 256 + 20, e);
    e = ent(RC_COPY2, 3, 60, 'h000203, 'h000260); e.rco = 1; wr(45, 256 + 'h245, e);
    exp_hdr[2 * 64 + 20] = 'h000220; exp_hdr[2 * 64 + 3] = 'h000203; exp_hdr[2 * 64 + 60] = 'h000260;
    wr(17, 256 + 30, ent(RC_COPY2, 40, 41, 'h000240, 'h000241));
    exp_hdr[3 * 64 + 40] = 'h000240; exp_hdr[3 * 64 + 41] = 'h000241;

    for (int s = 0; s < 100; s++) begin
      send(0, 10, 1, s);
      for (int p = 1; p < 16; p++) if (p != 9) send(p, 10, 10 + p, s);
      if (s < 30) begin send(9, 20, 2, s); send(17, 30, 3, s); end
    end
    wait (txq[0].size() == 0);
    repeat (16 * 1200) @(negedge clk);
    $display("delivered: flow 1 %0d, flow 2 %0d/%0d/%0d, flow 3 %0d/%0d",
             got_n.exists(64 + 63) ? got_n[64 + 63] : 0, got_n.exists(2 * 64 + 20) ? got_n[2 * 64 + 20] : 0,
             got_n.exists(2 * 64 + 3) ? got_n[2 * 64 + 3] : 0, got_n.exists(2 * 64 + 60) ? got_n[2 * 64 + 60] : 0,
             got_n.exists(3 * 64 + 40) ? got_n[3 * 64 + 40] : 0, got_n.exists(3 * 64 + 41) ? got_n[3 * 64 + 41] : 0);

    // flow 1 is spared by congestion control, but its receive buffer can
    // still overflow while the network holds it back
    chk(got_n.exists(64 + 63) && got_n[64 + 63] + int'(dut.g_port[0].u_ipp.rcb_ovf_cnt) + int'(ovf_cnt[63]) == 100,
        $sformatf("flow 1: %0d cells at port 63, %0d receive buffer overflows", got_n[64 + 63], dut.g_port[0].u_ipp.rcb_ovf_cnt));
    chk(got_n[64 + 63] >= 50, "flow 1: most cells delivered");
    for (int p = 1; p < 16; p++) if (p != 9)
      chk(got_n.exists((10 + p) * 64 + 56 + p % 7) && got_n[(10 + p) * 64 + 56 + p % 7] + cong_cnt[p] == 100,
          $sformatf("flow %0d: every cell delivered or counted as a congestion discard", 10 + p));
    chk(got_n.exists(2 * 64 + 20) && got_n[2 * 64 + 20] == 30 && got_n.exists(2 * 64 + 3) && got_n[2 * 64 + 3] == 30 &&
        got_n.exists(2 * 64 + 60) && got_n[2 * 64 + 60] == 30, "flow 2: 30 copies at ports 20, 3 and 60");
    chk(got_n.exists(3 * 64 + 40) && got_n[3 * 64 + 40] == 30 && got_n.exists(3 * 64 + 41) && got_n[3 * 64 + 41] == 30,
        "flow 3: 30 copies at ports 40 and 41");
    chk(se_drop_cnt == '0, "no cell lost in the network");
    $display("mechanisms: out-of-order arrivals %0d, recycled %0d, congestion discards %0d", n_misorder, n_recycle,
             cong_cnt[1] + cong_cnt[2] + cong_cnt[8] + cong_cnt[15]);
    chk(n_misorder > 0, "cells arrived out of order and were resequenced");
    chk(n_recycle > 0, "recycling happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
