// wugs_benes: one plane of the three-stage Benes switching network for
// N*N ports (64 with eight-port elements), built from 3*N wugs_se planes.
//
// How it works: stage 1 elements run in distribution mode and spread their
// cells evenly over all stage-2 elements, which balances the load whatever
// the traffic pattern. Stages 2 and 3 route on the base-8 digits of the
// output port number, most significant first: stage 2 uses digit 1 (which
// stage-3 element), stage 3 digit 0 (which output of that element). A
// copy-by-two or copy-range cell is copied in the first routing stage where
// its two addresses differ and each copy continues as a single cell.
// Wiring: output j of element i in one stage feeds input i of element j in
// the next; the downstream grant of that link is the upstream grant of the
// receiving input. Network port p is input/output (p mod N) of element
// p / N in the first/last stage.
// Interface and timing: as for wugs_se, on N*N ports. Every element output
// is registered, so every inner link has one tick of skew (cfg_skew = 1 on
// stages 2 and 3); the network inputs take the skew given in cfg_skew.
// Each stage adds two cell cycles at least (the link skew included); a cell
// needs at least six.
// Following the description of the original: eight-port elements, 2k-1
// stages for N^k ports with load distribution in the first k-1 stages,
// digit-by-digit routing and copying in the remaining stages. The stage
// wiring (the standard recursive construction) and the choice of digit 1
// for stage 2 are this design's reading of that description; only the
// k = 2 network is built here.
module wugs_benes
  import wugs_pkg::*;
#(
  parameter int N     = 8,
  parameter int SLOTS = 40
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic [3:0]                   tick,
  input  logic [N*N-1:0][1:0]          cfg_skew,   // skew of each network input, ticks
  input  pword_t [N*N-1:0]             ud,         // network inputs
  output logic   [N*N-1:0]             ug,         // grants to the network inputs
  output pword_t [N*N-1:0]             dd,         // network outputs
  input  logic   [N*N-1:0]             dg,         // grants from downstream of each output
  output logic [15:0]                  drop_cnt    // cells lost for want of a slot, all elements
);
  // links between stages: lk[s][e][port], s = 0 (into stage 1) .. 3 (out of stage 3)
  pword_t [3:0][N-1:0][N-1:0] lk;
  logic   [3:0][N-1:0][N-1:0] gr;      // grant travelling against lk
  logic   [2:0][N-1:0][15:0]  drops;

  for (genvar e = 0; e < N; e++) begin : g_io
    for (genvar q = 0; q < N; q++) begin : g_p
      assign lk[0][e][q]  = ud[e*N + q];
      assign ug[e*N + q]  = gr[0][e][q];
      assign dd[e*N + q]  = lk[3][e][q];
      assign gr[3][e][q]  = dg[e*N + q];
    end
  end

  for (genvar s = 0; s < 3; s++) begin : g_stage
    for (genvar e = 0; e < N; e++) begin : g_elem
      pword_t [N-1:0] in_w, out_w;
      logic   [N-1:0] in_g, out_g;
      logic   [N-1:0][1:0] skew;
      for (genvar q = 0; q < N; q++) begin : g_wire
        if (s == 0) begin : g_first
          assign in_w[q]        = lk[0][e][q];
          assign gr[0][e][q]    = in_g[q];
          assign skew[q]        = cfg_skew[e*N + q];
        end else begin : g_inner
          // input q of element e comes from output e of element q upstream
          assign in_w[q]        = lk[s][q][e];
          assign gr[s][q][e]    = in_g[q];
          assign skew[q]        = 2'd1;
        end
        assign lk[s+1][e][q] = out_w[q];
        assign out_g[q]      = gr[s+1][e][q];
      end
      wugs_se #(.N(N), .SLOTS(SLOTS)) u_se (
        .clk(clk), .rst_n(rst_n), .tick(tick),
        .cfg_digit(s == 1 ? 2'd1 : 2'd0), .cfg_dist(s == 0),
        .cfg_skew(skew), .ud(in_w), .ug(in_g), .dd(out_w), .dg(out_g),
        .drop_cnt(drops[s][e]));
    end
  end

  always_comb begin
    drop_cnt = '0;
    for (int s = 0; s < 3; s++)
      for (int e = 0; e < N; e++) drop_cnt = drop_cnt + drops[s][e];
  end
endmodule
