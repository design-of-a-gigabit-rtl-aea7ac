// Testbench for wugs_se (one switch-element plane, 8 ports, 40 slots).
// Senders behave like port processors: they start a cell only in a cell
// cycle for which ug was high at tick 15, and drive it through a register
// (one tick of link skew, cfg_skew = 1). Receivers collect cells from the
// registered outputs and check them against deliveries computed here:
//  A  an isolated cell crosses in exactly two cell cycles: its last word
//     is collected 48 clocks after its first word reaches the input
//     (two 16-clock cell cycles of latency plus its own 16 words);
//  B  random unicast, copy-by-two and copy-range traffic under random
//     downstream back-pressure: every copy arrives once, at the right
//     output, with the right rewritten addresses and data, never in a cycle
//     the output was not granted, and no cell is lost;
//  C  cells held back by a closed output leave oldest first;
//  D  distribution mode: every cell leaves once, unchanged, and the outputs
//     share the load equally.
module tb_wugs_se;
  import wugs_pkg::*;
  localparam int N = 8;
  logic clk = 0, rst_n = 0;
  logic [3:0] tick;
  logic [11:0] now;
  logic [1:0] cfg_digit;
  logic cfg_dist;
  logic [N-1:0][1:0] cfg_skew;
  logic [N-1:0][11:0] ud, dd;
  logic [N-1:0] ug, dg, dg_s;
  logic [15:0] drop_cnt;
  int checks = 0, failures = 0;

  typedef logic [15:0][11:0] pcell_t;
  pcell_t inq [N][$];
  pcell_t cur [N];
  logic [N-1:0] cur_v;
  // expected deliveries: key = id*8 + output -> expected cell
  pcell_t exp_c [int];
  int     exp_n [int];
  int     next_id = 1;
  int     out_cnt [N];
  int     arrive_t [int];
  int     first_seen [int];
  int     order_q [$];
  int     clk_n = 0;

  wugs_timing u_t (.clk(clk), .rst_n(rst_n), .tick(tick), .now(now));
  wugs_se #(.N(N), .SLOTS(40)) dut (.clk(clk), .rst_n(rst_n), .tick(tick), .cfg_digit(cfg_digit),
    .cfg_dist(cfg_dist), .cfg_skew(cfg_skew), .ud(ud), .ug(ug), .dd(dd), .dg(dg), .drop_cnt(drop_cnt));

  always #5 clk = ~clk;
  initial begin
    #20000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic pcell_t mk(int id, logic [2:0] rc, logic [11:0] a1, logic [11:0] a2);
    pcell_t c;
    for (int w = 0; w < 16; w++) c[w] = {4'b0, 8'($urandom)};
    c[0][11:8] = {1'b1, rc};
    for (int k = 0; k < 4; k++) begin
      c[1+k][10:8] = a1[3*(3-k) +: 3];
      c[5+k][10:8] = a2[3*(3-k) +: 3];
    end
    c[9][7:0] = 8'(id); c[10][7:0] = 8'(id >> 8);
    c[15] = '0;
    return c;
  endfunction

  function automatic pcell_t with_adr(pcell_t c, logic [11:0] a1, logic [11:0] a2, logic ci);
    for (int k = 0; k < 4; k++) begin
      c[1+k][10:8] = a1[3*(3-k) +: 3];
      c[5+k][10:8] = a2[3*(3-k) +: 3];
    end
    c[1][11] = c[1][11] | ci;
    return c;
  endfunction

  // queue a cell on input i and record the deliveries it must produce
  task automatic send(int i, logic [2:0] rc, logic [11:0] a1, logic [11:0] a2);
    pcell_t c;
    int id, d1, d2, p;
    id = next_id++;
    c = mk(id, rc, a1, a2);
    inq[i].push_back(c);
    p = int'(cfg_digit);
    d1 = (a1 >> (3*p)) & 7; d2 = (a2 >> (3*p)) & 7;
    if (cfg_dist) begin
      exp_c[id*8] = c; exp_n[id*8] = 0;     // any output, stored under output 0
    end else if (rc == RC_COPY2 && d1 != d2) begin
      exp_c[id*8 + d1] = with_adr(c, a1, a1, 0);
      exp_c[id*8 + d2] = with_adr(c, a2, a2, 1);
    end else if (rc == RC_RANGE) begin
      for (int j = d1; j <= d2; j++) begin
        logic [11:0] lo, hi, pre, lm;
        lm  = 12'((1 << (3*p)) - 1);
        pre = a1 & ~12'((1 << (3*p + 3)) - 1);
        lo = (j == d1) ? a1 : (pre | 12'(j << (3*p)));
        hi = (j == d2) ? a2 : (pre | 12'(j << (3*p)) | lm);
        exp_c[id*8 + j] = with_adr(c, lo, hi, 0);
      end
    end else begin
      exp_c[id*8 + d1] = c;
    end
  endtask

  // senders
  always @(posedge clk) begin
    clk_n++;
    for (int i = 0; i < N; i++) begin
      if (tick == 4'd15) begin
        if (ug[i] && inq[i].size() > 0) begin
          cur[i] = inq[i].pop_front();
          cur_v[i] = 1;
        end else cur_v[i] = 0;
        ud[i] <= '0;
      end else begin
        ud[i] <= cur_v[i] ? cur[i][tick] : '0;
      end
    end
  end

  // receivers
  pcell_t rx [N];
  logic [N-1:0] rx_on;
  always @(posedge clk) if (rst_n) begin
    logic [3:0] ot;
    ot = tick - 4'd1;
    if (tick == 4'd15) dg_s = dg;
    for (int j = 0; j < N; j++) begin
      if (ot == 4'd0) begin
        rx_on[j] = dd[j][11];
        if (dd[j][11] && !dg_s[j]) begin
          failures++; $display("output %0d sent without grant", j);
        end
      end
      if (rx_on[j]) rx[j][ot] = dd[j];
      if (ot == 4'd15 && rx_on[j]) begin
        int id, key;
        rx_on[j] = 0;
        id = int'({rx[j][10][7:0], rx[j][9][7:0]});
        key = cfg_dist ? id*8 : id*8 + j;
        checks++;
        if (!exp_c.exists(key)) begin
          failures++; $display("unexpected copy of cell %0d at output %0d", id, j);
        end else if (exp_c[key] != rx[j]) begin
          failures++; $display("cell %0d at output %0d corrupted", id, j);
        end else begin
          exp_c.delete(key);
          out_cnt[j]++;
          arrive_t[id] = clk_n;
          order_q.push_back(id);
        end
      end
    end
  end

  task automatic wait_empty(int limit);
    int t; t = 0;
    while ((exp_c.num() > 0) && t < limit) begin @(negedge clk); t++; end
    repeat (64) @(negedge clk);
  endtask

  initial begin
    int t0;
    cfg_digit = 0; cfg_dist = 0; dg = '1;
    for (int i = 0; i < N; i++) begin cfg_skew[i] = 2'd1; cur_v[i] = 0; ud[i] = '0; rx_on[i] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    // A: latency
    while (tick != 4'd10) @(negedge clk);
    send(3, RC_UNICAST, 12'd6, 12'd6);
    while (tick != 4'd1) @(negedge clk);
    wait (dd[6][11] == 1'b0);
    t0 = clk_n;
    wait_empty(2000);
    checks++;
    if (!arrive_t.exists(1)) begin failures++; $display("A: cell lost"); end
    else if (arrive_t[1] - t0 != 48) begin
      failures++; $display("A: took %0d clocks", arrive_t[1] - t0);
    end
    // B: random traffic with back-pressure
    fork
      begin
        for (int n = 0; n < 600; n++) begin
          logic [2:0] rc; logic [11:0] a1, a2; int r;
          r = $urandom_range(0, 9);
          rc = (r < 5) ? RC_UNICAST : (r < 8) ? RC_COPY2 : RC_RANGE;
          a1 = 12'($urandom); a2 = 12'($urandom);
          if (rc == RC_RANGE) begin
            a1[11:3] = 0; a2[11:3] = 0;
            if (a1[2:0] > a2[2:0]) begin logic [2:0] x; x = a1[2:0]; a1[2:0] = a2[2:0]; a2[2:0] = x; end
          end
          send($urandom_range(0, N-1), rc, a1, a2);
          if ($urandom_range(0, 2) == 0) @(negedge clk);
        end
      end
      begin
        for (int k = 0; k < 4000; k++) begin
          @(negedge clk);
          if (tick == 4'd5) dg = (k < 3000) ? 8'($urandom) | 8'($urandom) : '1;
        end
      end
    join
    dg = '1;
    wait_empty(200000);
    checks++;
    if (exp_c.num() != 0) begin failures++; $display("B: %0d copies never delivered", exp_c.num()); end
    checks++;
    if (drop_cnt != 0) begin failures++; $display("B: %0d cells dropped", drop_cnt); end
    // C: oldest first
    while (tick != 4'd3) @(negedge clk);
    dg[2] = 0;
    order_q.delete();
    for (int k = 0; k < 4; k++) begin
      send(k, RC_UNICAST, 12'd2, 12'd2);
      repeat (16) @(negedge clk);
    end
    repeat (64) @(negedge clk);
    dg[2] = 1;
    wait_empty(5000);
    checks++;
    if (order_q.size() != 4 || order_q[0] > order_q[1] || order_q[1] > order_q[2] || order_q[2] > order_q[3]) begin
      failures++; $display("C: order %p", order_q);
    end
    // D: distribution
    cfg_dist = 1;
    foreach (out_cnt[j]) out_cnt[j] = 0;
    for (int n = 0; n < 80; n++)
      for (int i = 0; i < N; i++) send(i, RC_UNICAST, 12'($urandom), 12'($urandom));
    wait_empty(100000);
    checks++;
    if (exp_c.num() != 0) begin failures++; $display("D: %0d cells lost", exp_c.num()); end
    foreach (out_cnt[j]) begin
      checks++;
      if (out_cnt[j] != 80) begin failures++; $display("D: output %0d carried %0d", j, out_cnt[j]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
