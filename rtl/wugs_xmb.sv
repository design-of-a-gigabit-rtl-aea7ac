// wugs_xmb: transmit buffer of the output port processor, with its block
// discard controller (BDC).
// Cells are queued in one of two FIFOs: continuous-stream cells (CS=1,
// reserved constant or modestly variable rate traffic) and discrete-stream
// cells (CS=0, bursty data). The continuous queue has strict priority at the
// output. Discard rules:
//  * Block discard, on circuits with a non-zero block discard index (BDI):
//    one state bit per index says whether the current AAL-5 frame of that
//    circuit is being discarded. The bit is set or cleared at the end of each
//    frame (a user-data cell with PT bit 0 set), for the next frame, from a
//    congestion flag with hysteresis: the flag rises when the discrete queue
//    holds cfg_hi cells or more and falls when it holds cfg_lo or fewer.
//    Frames are therefore dropped whole, never in fragments.
//  * Low-priority discard: a discrete-stream cell with CLP=1 is dropped when
//    the discrete queue holds cfg_clp cells or more.
//  * A cell for a full queue is dropped.
// The one-bit-per-circuit state and the two-threshold hysteresis follow the
// description of the original; the exact decision points and thresholds are
// this design's choice. Queue depths are not published; 32 and 64 cells
// are assumed.
module wugs_xmb
  import wugs_pkg::*;
#(
  parameter int CS_DEPTH = 32,
  parameter int DS_DEPTH = 64
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_push,
  input  ext_cell_t             in_cell,
  input  logic                  in_cs,
  input  logic [7:0]            in_bdi,
  output logic                  in_full,
  input  logic [$clog2(DS_DEPTH+1)-1:0] cfg_hi,
  input  logic [$clog2(DS_DEPTH+1)-1:0] cfg_lo,
  input  logic [$clog2(DS_DEPTH+1)-1:0] cfg_clp,
  output logic                  out_v,
  output ext_cell_t             out_cell,
  input  logic                  out_pop,
  output logic                  congested,
  output logic [15:0]           bd_cnt,
  output logic [15:0]           clp_cnt,
  output logic [15:0]           ovf_cnt
);
  localparam int DCW = $clog2(DS_DEPTH+1);
  localparam int CCW = $clog2(CS_DEPTH+1);
  logic [255:0] bd_state;
  logic         cs_full, cs_empty, ds_full, ds_empty;
  ext_cell_t    cs_dout, ds_dout;
  logic [CCW-1:0] cs_cnt;
  logic [DCW-1:0] ds_cnt;
  logic         eof, bd_drop, clp_drop, push_cs, push_ds;

  always_comb begin
    eof      = !in_cell.hdr.pt[2] && in_cell.hdr.pt[0];
    bd_drop  = (in_bdi != 8'd0) && bd_state[in_bdi];
    clp_drop = !in_cs && in_cell.hdr.clp && (ds_cnt >= cfg_clp);
    push_cs  = in_push && in_cs && !bd_drop;
    push_ds  = in_push && !in_cs && !bd_drop && !clp_drop;
    in_full  = in_cs ? cs_full : ds_full;
  end

  wugs_cell_fifo #(.W($bits(ext_cell_t)), .DEPTH(CS_DEPTH)) u_csq (
    .clk(clk), .rst_n(rst_n), .push(push_cs), .din(in_cell), .full(cs_full),
    .pop(out_pop && !cs_empty), .dout(cs_dout), .empty(cs_empty), .count(cs_cnt));
  wugs_cell_fifo #(.W($bits(ext_cell_t)), .DEPTH(DS_DEPTH)) u_dsq (
    .clk(clk), .rst_n(rst_n), .push(push_ds), .din(in_cell), .full(ds_full),
    .pop(out_pop && cs_empty), .dout(ds_dout), .empty(ds_empty), .count(ds_cnt));

  assign out_v    = !cs_empty || !ds_empty;
  assign out_cell = !cs_empty ? cs_dout : ds_dout;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      bd_state <= '0; congested <= 1'b0; bd_cnt <= '0; clp_cnt <= '0; ovf_cnt <= '0;
    end else begin
      if (ds_cnt >= cfg_hi)      congested <= 1'b1;
      else if (ds_cnt <= cfg_lo) congested <= 1'b0;
      if (in_push) begin
        if (in_bdi != 8'd0 && eof) bd_state[in_bdi] <= congested;
        if (bd_drop)               bd_cnt  <= bd_cnt + 1'b1;
        else if (clp_drop)         clp_cnt <= clp_cnt + 1'b1;
        else if (in_cs ? cs_full : ds_full) ovf_cnt <= ovf_cnt + 1'b1;
      end
    end
endmodule
