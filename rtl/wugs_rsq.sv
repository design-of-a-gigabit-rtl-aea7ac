// wugs_rsq: timing-based resequencer of the output port processor.
// Cells can cross the switching network over different paths and with
// different delays. Each cell carries the cell time at which it entered the
// network (TS). The resequencer holds up to SLOTS cells; once per cell cycle
// (tick 15) it releases, among the cells whose age (now - TS, modulo the
// time-stamp range) has reached cfg_thresh, the oldest one. Since every cell
// waits until it is as old as the largest delay the network can impose,
// cells leave in the order in which they entered. 64 cell times is the
// threshold suggested for systems of up to 4096 ports. The oldest cell is found
// with the same bit-serial maximum search as the switch element's output
// arbiter. The released cell waits in out_cell until out_rdy.
// Flow control towards the switch: dg, registered at tick 14 and sampled by
// the switch element at tick 15, is high when at least two slots are free
// (one may be taken by a cell still arriving). Since every cell stays at
// least the threshold time, the buffer must hold threshold x arrival rate
// cells: the default of 128 slots covers one cell per cell time at the
// 64-cell-time threshold with margin. The slot count is this design's
// choice. The transitional time stamping that the input side
// applies after a multicast reconfiguration is not modelled.
module wugs_rsq
  import wugs_pkg::*;
#(
  parameter int SLOTS = 128
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [3:0]      tick,
  input  logic [TS_W-1:0] now,
  input  logic [TS_W-1:0] cfg_thresh,
  input  logic            in_v,
  input  icell_t          in_cell,
  output logic            dg,
  output logic            out_v,
  input  logic            out_rdy,
  output icell_t          out_cell,
  output logic [15:0]     ovf_cnt
);
  localparam int SW = $clog2(SLOTS);
  icell_t                       buf_q [SLOTS];
  logic [SLOTS-1:0][TS_W-1:0]   ts_q;
  logic [SLOTS-1:0]             used;
  logic [SLOTS-1:0][TS_W-1:0]   age;
  logic [SLOTS-1:0]             ripe;
  logic                         pick_v;
  logic [SW-1:0]                pick;
  logic                         free_v;
  logic [SW-1:0]                free_i;
  logic [$clog2(SLOTS+1)-1:0]   nfree;

  always_comb begin
    free_v = 1'b0; free_i = '0; nfree = '0;
    for (int s = 0; s < SLOTS; s++) begin
      age[s]  = TS_W'(now - ts_q[s]);
      ripe[s] = used[s] && (age[s] >= cfg_thresh);
      if (!used[s]) nfree = nfree + 1'b1;
    end
    for (int s = SLOTS-1; s >= 0; s--)
      if (!used[s]) begin free_v = 1'b1; free_i = SW'(s); end
  end

  wugs_oxbar_arb #(.N(SLOTS), .AGE_W(TS_W)) u_oldest (
    .req(ripe), .age(age), .gnt_v(pick_v), .gnt_idx(pick));

  always_ff @(posedge clk) begin
    if (in_v && free_v) buf_q[free_i] <= in_cell;
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      used <= '0; ts_q <= '0; out_v <= 1'b0; out_cell <= '0; dg <= 1'b0; ovf_cnt <= '0;
    end else begin
      if (out_v && out_rdy) out_v <= 1'b0;
      if (tick == 4'd15 && pick_v && (!out_v || out_rdy)) begin
        out_v    <= 1'b1;
        out_cell <= buf_q[pick];
        used[pick] <= 1'b0;
      end
      if (in_v) begin
        if (free_v) begin
          used[free_i] <= 1'b1;
          ts_q[free_i] <= in_cell.ts;
        end
        else        ovf_cnt <= ovf_cnt + 1'b1;
      end
      if (tick == 4'd14) dg <= (nfree >= 2);
    end
endmodule
