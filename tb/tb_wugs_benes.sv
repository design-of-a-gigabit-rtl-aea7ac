// Testbench for wugs_benes: one plane of the 64-port three-stage network.
// Senders act like port processors (start a cell only after ug was high at
// tick 15, drive it through a register: one tick of skew). Checks:
//  A  an isolated cell crosses the three stages in two cell cycles each:
//     its first word leaves the network 96 clocks after the sender put it
//     on the link (both counted at the clock edge that drives the word);
//  B  random unicast and copy-by-two traffic from all 64 inputs under random
//     downstream back-pressure: every copy arrives once, at the right port,
//     with the right rewritten addresses and data, and no cell is lost;
//  C  mechanisms: the first stage spreads the cells of one input over all
//     eight middle elements, copies are made in stage 2 (first digits
//     differ) and in stage 3 (only the last digit differs), and outputs
//     are held back by the downstream grant. Each must happen.
module tb_wugs_benes;
  import wugs_pkg::*;
  localparam int N = 8, P = 64;
  logic clk = 0, rst_n = 0;
  logic [3:0] tick;
  logic [11:0] now;
  logic [P-1:0][1:0] cfg_skew;
  pword_t [P-1:0] ud, dd;
  logic [P-1:0] ug, dg, dg_s;
  logic [15:0] drop_cnt;
  int checks = 0, failures = 0;

  typedef logic [15:0][11:0] pcell_t;
  pcell_t inq [P][$];
  pcell_t cur [P];
  logic [P-1:0] cur_v;
  pcell_t exp_c [int];
  int next_id = 1, clk_n = 0;
  int in_t [int];
  int out_t [int];
  int n_split2 = 0, n_split3 = 0, n_held = 0;
  int mid_use [N];

  wugs_timing u_t (.clk(clk), .rst_n(rst_n), .tick(tick), .now(now));
  wugs_benes #(.N(N), .SLOTS(40)) dut (.clk(clk), .rst_n(rst_n), .tick(tick), .cfg_skew(cfg_skew),
    .ud(ud), .ug(ug), .dd(dd), .dg(dg), .drop_cnt(drop_cnt));

  always #5 clk = ~clk;
  initial begin
    #40000000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic pcell_t with_adr(pcell_t c, logic [11:0] a1, logic [11:0] a2, logic ci);
    for (int k = 0; k < 4; k++) begin
      c[1+k][10:8] = a1[3*(3-k) +: 3];
      c[5+k][10:8] = a2[3*(3-k) +: 3];
    end
    c[1][11] = ci;
    return c;
  endfunction

  task automatic send(int i, logic [2:0] rc, logic [11:0] a1, logic [11:0] a2);
    pcell_t c;
    int id, p1, p2;
    id = next_id++;
    for (int w = 0; w < 16; w++) c[w] = {4'b0, 8'($urandom)};
    c[0][11:8] = {1'b1, rc};
    c = with_adr(c, a1, a2, 0);
    for (int w = 9; w < 12; w++) c[w][11:8] = '0;
    c[9][7:0] = 8'(id); c[10][7:0] = 8'(id >> 8);
    c[15] = '0;
    inq[i].push_back(c);
    p1 = int'(a1[5:0]); p2 = int'(a2[5:0]);
    if (rc == RC_COPY2 && p1 != p2) begin
      exp_c[id*P + p1] = with_adr(c, a1, a1, 0);
      exp_c[id*P + p2] = with_adr(c, a2, a2, 1);
      if (a1[5:3] != a2[5:3]) n_split2++; else n_split3++;
    end else exp_c[id*P + p1] = c;
  endtask

  // senders
  always @(posedge clk) begin
    clk_n++;
    for (int i = 0; i < P; i++) begin
      if (tick == 4'd15) begin
        if (ug[i] && inq[i].size() > 0) begin
          cur[i] = inq[i].pop_front();
          cur_v[i] = 1;
        end else cur_v[i] = 0;
        ud[i] <= '0;
      end else begin
        ud[i] <= cur_v[i] ? cur[i][tick] : '0;
        if (cur_v[i] && tick == 4'd0)
          in_t[int'({cur[i][10][7:0], cur[i][9][7:0]})] = clk_n;
      end
    end
  end

  // use of the middle stage by input 0's cells (first-stage distribution)
  always @(posedge clk) if (rst_n)
    for (int m = 0; m < N; m++)
      if (dut.g_stage[0].g_elem[0].out_w[m][11] && dut.g_stage[0].g_elem[0].u_se.rtick == 4'd15) mid_use[m]++;

  // receivers
  pcell_t rx [P];
  logic [P-1:0] rx_on;
  always @(posedge clk) if (rst_n) begin
    logic [3:0] ot;
    ot = tick - 4'd1;
    if (tick == 4'd15) dg_s = dg;
    for (int j = 0; j < P; j++) begin
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
        key = id*P + j;
        checks++;
        if (!exp_c.exists(key)) begin
          failures++; $display("unexpected copy of cell %0d at output %0d", id, j);
        end else if (exp_c[key] != rx[j]) begin
          failures++; $display("cell %0d at output %0d corrupted", id, j);
        end else begin
          exp_c.delete(key);
          if (!out_t.exists(id)) out_t[id] = clk_n - 15;
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
    dg = '1;
    foreach (mid_use[m]) mid_use[m] = 0;
    for (int i = 0; i < P; i++) begin cfg_skew[i] = 2'd1; cur_v[i] = 0; ud[i] = '0; rx_on[i] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    // A: latency of one cell from input 9 to output 42
    send(9, RC_UNICAST, 12'd42, 12'd42);
    wait_empty(3000);
    checks++;
    if (!out_t.exists(1) || !in_t.exists(1)) begin failures++; $display("A: cell lost"); end
    else if (out_t[1] - in_t[1] != 6 * 16) begin
      failures++; $display("A: first word out %0d clocks after first word in", out_t[1] - in_t[1]);
    end
    // B: random traffic with back-pressure
    fork
      begin
        for (int n = 0; n < 3000; n++) begin
          logic [11:0] a1, a2;
          a1 = 12'($urandom); a2 = 12'($urandom);
          if ($urandom_range(0, 3) == 0) a2[5:3] = a1[5:3];
          send(n < 400 ? 0 : $urandom_range(0, P-1), ($urandom_range(0, 2) == 0) ? RC_COPY2 : RC_UNICAST, a1, a2);
          if ($urandom_range(0, 3) == 0) @(negedge clk);
        end
      end
      begin
        for (int k = 0; k < 30000; k++) begin
          @(negedge clk);
          if (tick == 4'd5) begin
            for (int j = 0; j < P; j++) dg[j] = (k > 25000) || ($urandom_range(0, 3) != 0);
          end
          if (tick == 4'd5) for (int j = 0; j < P; j++) if (!dg[j]) n_held++;
        end
        dg = '1;
      end
    join
    wait_empty(100000);
    checks++;
    if (exp_c.num() != 0) begin failures++; $display("B: %0d copies never arrived", exp_c.num()); end
    checks++;
    if (drop_cnt != 0) begin failures++; $display("B: %0d cells lost in the network", drop_cnt); end
    // C: mechanisms
    $display("mechanisms: split in stage 2 %0d, split in stage 3 %0d, outputs held %0d, middle use %p",
             n_split2, n_split3, n_held, mid_use);
    checks++; if (n_split2 == 0) begin failures++; $display("no stage-2 copy"); end
    checks++; if (n_split3 == 0) begin failures++; $display("no stage-3 copy"); end
    checks++; if (n_held == 0) begin failures++; $display("no back-pressure"); end
    foreach (mid_use[m]) begin
      checks++;
      if (mid_use[m] == 0) begin failures++; $display("middle element %0d never used by element 0", m); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
