// wugs_opp: output port processor (output side of the port processor chip).
// Path: switch -> cell assembly -> resequencer (RSQ) -> transmit circuit
// (XMIT) -> transmit buffer (XMB, with block discard) -> transmit framer ->
// link; XMIT can instead send a cell to the recycling buffer of this port's
// input side (cyc_* outputs).
// Cells arrive from the switch element's registered outputs one tick after
// the common tick (word w at tick w+1); a cell is recognised by its BI bit in
// word 0 and assembled from the 36-bit words of all four planes. sw_dg tells
// the switch element whether it may send a cell in the next cell cycle.
module wugs_opp
  import wugs_pkg::*;
#(
  parameter int RSQ_SLOTS = 128,
  parameter int CS_DEPTH  = 32,
  parameter int DS_DEPTH  = 64
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [3:0]            tick,
  input  logic [TS_W-1:0]       now,
  input  logic [15:0]           port_id,
  input  word_t                 sw_data,
  output logic                  sw_dg,
  // link side
  input  logic                  tx_ready,
  output logic                  tx_valid,
  output logic                  tx_soc,
  output logic [31:0]           tx_data,
  // recycling path to the input side
  output logic                  cyc_push,
  output ext_cell_t             cyc_cell,
  output logic [15:0]           cyc_stg,
  input  logic                  cyc_full,
  // configuration
  input  logic [TS_W-1:0]       cfg_age_thresh,
  input  logic [$clog2(DS_DEPTH+1)-1:0] cfg_hi,
  input  logic [$clog2(DS_DEPTH+1)-1:0] cfg_lo,
  input  logic [$clog2(DS_DEPTH+1)-1:0] cfg_clp,
  // statistics
  output logic [15:0]           rx_cnt,
  output logic [15:0]           ud_cnt,
  output logic [15:0]           bd_cnt,
  output logic [15:0]           clp_cnt,
  output logic [15:0]           ovf_cnt
);
  logic [3:0] rtick;
  logic       asm_v, done_v;
  icell_t     asm_cell;
  logic       q_v, q_rdy;
  icell_t     q_cell;
  logic       x_push, x_full, x_cs;
  ext_cell_t  x_cell;
  logic [7:0] x_bdi;
  logic       b_v, b_pop;
  ext_cell_t  b_cell;
  logic [15:0] rsq_ovf, xmit_ovf;

  assign rtick = tick - 4'd1;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      asm_v <= 1'b0; done_v <= 1'b0; asm_cell <= '0; rx_cnt <= '0;
    end else begin
      done_v <= 1'b0;
      if (rtick == 4'd0) begin
        asm_v    <= sw_data[35];
        asm_cell <= icell_put('0, 4'd0, sw_data);
      end else if (asm_v) begin
        asm_cell <= icell_put(asm_cell, rtick, sw_data);
        if (rtick == 4'd15) begin
          done_v <= 1'b1;
          asm_v  <= 1'b0;
          rx_cnt <= rx_cnt + 1'b1;
        end
      end
    end

  wugs_rsq #(.SLOTS(RSQ_SLOTS)) u_rsq (
    .clk(clk), .rst_n(rst_n), .tick(tick), .now(now), .cfg_thresh(cfg_age_thresh),
    .in_v(done_v), .in_cell(asm_cell), .dg(sw_dg),
    .out_v(q_v), .out_rdy(q_rdy), .out_cell(q_cell), .ovf_cnt(rsq_ovf));

  wugs_xmit u_xmit (
    .clk(clk), .rst_n(rst_n), .port_stg(port_id),
    .in_v(q_v), .in_cell(q_cell), .in_rdy(q_rdy),
    .x_push(x_push), .x_cell(x_cell), .x_cs(x_cs), .x_bdi(x_bdi), .x_full(x_full),
    .c_push(cyc_push), .c_cell(cyc_cell), .c_stg(cyc_stg), .c_full(cyc_full),
    .ud_cnt(ud_cnt), .ovf_cnt(xmit_ovf));

  wugs_xmb #(.CS_DEPTH(CS_DEPTH), .DS_DEPTH(DS_DEPTH)) u_xmb (
    .clk(clk), .rst_n(rst_n), .in_push(x_push), .in_cell(x_cell), .in_cs(x_cs),
    .in_bdi(x_bdi), .in_full(x_full), .cfg_hi(cfg_hi), .cfg_lo(cfg_lo), .cfg_clp(cfg_clp),
    .out_v(b_v), .out_cell(b_cell), .out_pop(b_pop), .congested(),
    .bd_cnt(bd_cnt), .clp_cnt(clp_cnt), .ovf_cnt());

  wugs_xframer u_xframer (
    .clk(clk), .rst_n(rst_n), .in_v(b_v), .in_cell(b_cell), .in_pop(b_pop),
    .tx_ready(tx_ready), .tx_valid(tx_valid), .tx_soc(tx_soc), .tx_data(tx_data));

  assign ovf_cnt = rsq_ovf + xmit_ovf;
endmodule
