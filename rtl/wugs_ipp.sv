// wugs_ipp: input port processor (input side of the port processor chip).
// Path: link -> receive framer -> receive buffer (RCB) -> receive circuit
// (RCV, which also takes cells from the recycling buffer CYCB) ->
// translation table (VXT) -> staging register -> switch.
// The RCV's congestion control drops, after translation, cells with CLP=1
// or CS=0 while its timer runs (counted in cong_cnt). A translated cell
// waits in the staging register until the switch grants: sw_ug is sampled
// at tick 15 and, if granted, the cell is sent in the next cell cycle, one
// 36-bit word per tick, through an output register (the link thus shows one
// tick of skew at the switch element). Idle cell cycles send all zeros.
// The time stamp TS is the cell time at which the cell is granted entry to
// the network (it overwrites the translation-time stamp).
// The source trunk group (STG) of link cells is port_id. Buffer depths
// (RCB 32, CYCB 16 cells) are this design's choice.
module wugs_ipp
  import wugs_pkg::*;
#(
  parameter int VXT_ENTRIES = 1024,
  parameter int RCB_DEPTH   = 32,
  parameter int CYCB_DEPTH  = 16
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [3:0]                    tick,
  input  logic [TS_W-1:0]               now,
  input  logic [15:0]                   port_id,
  // link side
  input  logic                          rx_valid,
  input  logic                          rx_soc,
  input  logic [31:0]                   rx_data,
  // recycling path from the output side
  input  logic                          cyc_push,
  input  ext_cell_t                     cyc_cell,
  input  logic [15:0]                   cyc_stg,
  output logic                          cyc_full,
  // switch side
  output word_t                         sw_data,
  input  logic                          sw_ug,
  // configuration and host access
  input  logic [$clog2(VXT_ENTRIES):0]  cfg_bound,
  input  logic [$clog2(RCB_DEPTH+1)-1:0] cfg_rcb_thresh,
  input  logic [15:0]                   cfg_disc_time,
  input  logic                          h_we,
  input  logic                          h_re,
  input  logic [$clog2(VXT_ENTRIES)-1:0] h_addr,
  input  vxt_entry_t                    h_wdata,
  output vxt_entry_t                    h_rdata,
  // statistics
  output logic [15:0]                   frm_err_cnt,
  output logic [15:0]                   rcb_ovf_cnt,
  output logic [15:0]                   vxt_err_cnt,
  output logic [15:0]                   cong_cnt,
  output logic [15:0]                   sent_cnt
);
  localparam int RCW = $clog2(RCB_DEPTH+1);
  typedef struct packed { ext_cell_t c; logic [15:0] stg; } cyc_ent_t;

  logic      f_v;
  ext_cell_t f_cell;
  logic      rcb_full, rcb_empty, rcb_pop;
  ext_cell_t rcb_dout;
  logic [RCW-1:0] rcb_count;
  logic      cyc_empty, cyc_pop;
  cyc_ent_t  cyc_dout;
  logic      req_v, req_rdy, req_cyc;
  ext_cell_t req_cell;
  logic [15:0] req_stg;
  logic      disc_active;
  logic      t_v, t_rdy;
  icell_t    t_cell;
  logic      drop;
  logic      stg_v;
  icell_t    stg_cell;
  logic      tx_v;
  icell_t    tx_cell;

  wugs_rframer u_rframer (
    .clk(clk), .rst_n(rst_n), .rx_valid(rx_valid), .rx_soc(rx_soc), .rx_data(rx_data),
    .rx_cell_v(f_v), .rx_cell(f_cell), .err_cnt(frm_err_cnt));

  wugs_cell_fifo #(.W($bits(ext_cell_t)), .DEPTH(RCB_DEPTH)) u_rcb (
    .clk(clk), .rst_n(rst_n), .push(f_v), .din(f_cell), .full(rcb_full),
    .pop(rcb_pop), .dout(rcb_dout), .empty(rcb_empty), .count(rcb_count));

  wugs_cell_fifo #(.W($bits(cyc_ent_t)), .DEPTH(CYCB_DEPTH)) u_cycb (
    .clk(clk), .rst_n(rst_n), .push(cyc_push), .din({cyc_cell, cyc_stg}), .full(cyc_full),
    .pop(cyc_pop), .dout(cyc_dout), .empty(cyc_empty), .count());

  wugs_rcv #(.CW(RCW)) u_rcv (
    .clk(clk), .rst_n(rst_n), .port_id(port_id),
    .rcb_empty(rcb_empty), .rcb_cell(rcb_dout), .rcb_count(rcb_count), .rcb_pop(rcb_pop),
    .cyc_empty(cyc_empty), .cyc_cell(cyc_dout.c), .cyc_stg(cyc_dout.stg), .cyc_pop(cyc_pop),
    .req_v(req_v), .req_rdy(req_rdy), .req_cell(req_cell), .req_stg(req_stg), .req_cyc(req_cyc),
    .cfg_thresh(cfg_rcb_thresh), .cfg_time(cfg_disc_time), .disc_active(disc_active));

  wugs_vxt #(.ENTRIES(VXT_ENTRIES)) u_vxt (
    .clk(clk), .rst_n(rst_n), .cfg_bound(cfg_bound), .now(now),
    .req_v(req_v), .req_rdy(req_rdy), .req_cell(req_cell), .req_stg(req_stg), .req_cyc(req_cyc),
    .out_v(t_v), .out_rdy(t_rdy), .out_cell(t_cell), .err_cnt(vxt_err_cnt),
    .h_we(h_we), .h_re(h_re), .h_addr(h_addr), .h_wdata(h_wdata), .h_rdata(h_rdata));

  assign drop  = disc_active && (t_cell.clp || !t_cell.cs);
  assign t_rdy = drop || !stg_v;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      stg_v <= 1'b0; stg_cell <= '0; tx_v <= 1'b0; tx_cell <= '0;
      sw_data <= '0; rcb_ovf_cnt <= '0; cong_cnt <= '0; sent_cnt <= '0;
    end else begin
      if (f_v && rcb_full) rcb_ovf_cnt <= rcb_ovf_cnt + 1'b1;
      if (t_v && drop) cong_cnt <= cong_cnt + 1'b1;
      if (tick == 4'd15) begin
        tx_v <= stg_v && sw_ug;
        if (stg_v && sw_ug) begin
          tx_cell    <= stg_cell;
          tx_cell.ts <= now;
          sent_cnt <= sent_cnt + 1'b1;
        end
      end
      if (tick == 4'd15 && stg_v && sw_ug) stg_v <= 1'b0;
      else if (t_v && !drop && !stg_v) begin
        stg_v    <= 1'b1;
        stg_cell <= t_cell;
      end
      sw_data <= tx_v ? icell_word(tx_cell, tick) : '0;
    end
endmodule
