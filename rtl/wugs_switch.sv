// wugs_switch: gigabit ATM switch built around cell recycling.
// By default this is the eight-port single-element configuration: one 8x8
// shared-buffer switch element, built from four identical bit-slice planes
// (wugs_se), joins eight port processors. With NPORTS = 64 each plane is
// instead a three-stage Benes network of 24 elements (wugs_benes) with
// load distribution in its first stage. Each port processor has an input
// side (wugs_ipp) that frames link cells, translates VPI/VCI through its
// table (VXT) into internal cells that carry a pair of output port numbers,
// and an output side (wugs_opp) that resequences, applies the discard rules
// and transmits. The output side of port i can hand a cell back to the
// input side of port i (recycling); each pass through the table doubles the
// number of copies, so a multicast connection with f endpoints needs
// log2(f) passes.
// Internal cells are 16 words of 36 bits; word bits [35:32] go to every
// plane, data bits [8p+7:8p] to plane p. All blocks share the tick/cell-time
// reference of wugs_timing. The single element routes on base-8 digit 0 of
// the port number. Link interfaces are 32-bit cell interfaces (13 words per
// cell with start-of-cell) with a ready signal on the transmit side. Host
// access: one translation-table port, steered by h_port. NPORTS must be 8
// or 64; the document's larger systems (4096 ports, seven stages) are not
// built. The link format, the host port and the counters are this design's
// own; the structure follows the description of the original.
module wugs_switch
  import wugs_pkg::*;
#(
  parameter int NPORTS      = 8,
  parameter int VXT_ENTRIES = 1024,
  parameter int SE_SLOTS    = 40
) (
  input  logic                                 clk,
  input  logic                                 rst_n,
  // links
  input  logic [NPORTS-1:0]                    rx_valid,
  input  logic [NPORTS-1:0]                    rx_soc,
  input  logic [NPORTS-1:0][31:0]              rx_data,
  input  logic [NPORTS-1:0]                    tx_ready,
  output logic [NPORTS-1:0]                    tx_valid,
  output logic [NPORTS-1:0]                    tx_soc,
  output logic [NPORTS-1:0][31:0]              tx_data,
  // configuration
  input  logic [NPORTS-1:0][1:0]               cfg_skew,       // link skew at the SE inputs, ticks
  input  logic [$clog2(VXT_ENTRIES):0]         cfg_bound,
  input  logic [5:0]                           cfg_rcb_thresh,
  input  logic [15:0]                          cfg_disc_time,
  input  logic [TS_W-1:0]                      cfg_age_thresh,
  input  logic [6:0]                           cfg_xmb_hi,
  input  logic [6:0]                           cfg_xmb_lo,
  input  logic [6:0]                           cfg_xmb_clp,
  // host access to the translation tables
  input  logic [$clog2(NPORTS)-1:0]            h_port,
  input  logic                                 h_we,
  input  logic                                 h_re,
  input  logic [$clog2(VXT_ENTRIES)-1:0]       h_addr,
  input  vxt_entry_t                           h_wdata,
  output vxt_entry_t                           h_rdata,
  // statistics
  output logic [NPORTS-1:0][15:0]              sent_cnt,
  output logic [NPORTS-1:0][15:0]              recv_cnt,
  output logic [NPORTS-1:0][15:0]              vxt_err_cnt,
  output logic [NPORTS-1:0][15:0]              cong_cnt,
  output logic [NPORTS-1:0][15:0]              ud_cnt,
  output logic [NPORTS-1:0][15:0]              bd_cnt,
  output logic [NPORTS-1:0][15:0]              clp_cnt,
  output logic [NPORTS-1:0][15:0]              ovf_cnt,
  output logic [PLANES-1:0][15:0]              se_drop_cnt
);
  logic [3:0]      tick;
  logic [TS_W-1:0] now;

  word_t                                   ip_data [NPORTS];
  logic [NPORTS-1:0]                       ip_ug;
  logic [NPORTS-1:0]                       op_dg;
  logic [PLANES-1:0][NPORTS-1:0][PLANE_W-1:0] se_in, se_out;
  logic [PLANES-1:0][NPORTS-1:0]           se_ug;
  word_t                                   op_data [NPORTS];
  logic [NPORTS-1:0]                       c_push, c_full;
  ext_cell_t                               c_cell [NPORTS];
  logic [NPORTS-1:0][15:0]                 c_stg;
  vxt_entry_t                              h_rd [NPORTS];

  wugs_timing u_timing (.clk(clk), .rst_n(rst_n), .tick(tick), .now(now));

  for (genvar p = 0; p < PLANES; p++) begin : g_plane
    for (genvar i = 0; i < NPORTS; i++) begin : g_bits
      assign se_in[p][i] = {ip_data[i][35:32], ip_data[i][8*p +: 8]};
    end
    if (NPORTS == 64) begin : g_net
      wugs_benes #(.N(8), .SLOTS(SE_SLOTS)) u_net (
        .clk(clk), .rst_n(rst_n), .tick(tick), .cfg_skew(cfg_skew),
        .ud(se_in[p]), .ug(se_ug[p]), .dd(se_out[p]), .dg(op_dg),
        .drop_cnt(se_drop_cnt[p]));
    end else begin : g_one
      wugs_se #(.N(NPORTS), .SLOTS(SE_SLOTS)) u_se (
        .clk(clk), .rst_n(rst_n), .tick(tick), .cfg_digit(2'd0), .cfg_dist(1'b0),
        .cfg_skew(cfg_skew), .ud(se_in[p]), .ug(se_ug[p]), .dd(se_out[p]), .dg(op_dg),
        .drop_cnt(se_drop_cnt[p]));
    end
  end

  for (genvar i = 0; i < NPORTS; i++) begin : g_port
    always_comb begin
      ip_ug[i] = 1'b1;
      op_data[i][35:32] = se_out[0][i][11:8];
      for (int p = 0; p < PLANES; p++) begin
        ip_ug[i] = ip_ug[i] & se_ug[p][i];
        op_data[i][8*p +: 8] = se_out[p][i][7:0];
      end
    end

    wugs_ipp #(.VXT_ENTRIES(VXT_ENTRIES)) u_ipp (
      .clk(clk), .rst_n(rst_n), .tick(tick), .now(now), .port_id(16'(i)),
      .rx_valid(rx_valid[i]), .rx_soc(rx_soc[i]), .rx_data(rx_data[i]),
      .cyc_push(c_push[i]), .cyc_cell(c_cell[i]), .cyc_stg(c_stg[i]), .cyc_full(c_full[i]),
      .sw_data(ip_data[i]), .sw_ug(ip_ug[i]),
      .cfg_bound(cfg_bound), .cfg_rcb_thresh(cfg_rcb_thresh), .cfg_disc_time(cfg_disc_time),
      .h_we(h_we && h_port == i), .h_re(h_re && h_port == i), .h_addr(h_addr),
      .h_wdata(h_wdata), .h_rdata(h_rd[i]),
      .frm_err_cnt(), .rcb_ovf_cnt(), .vxt_err_cnt(vxt_err_cnt[i]), .cong_cnt(cong_cnt[i]),
      .sent_cnt(sent_cnt[i]));

    wugs_opp u_opp (
      .clk(clk), .rst_n(rst_n), .tick(tick), .now(now), .port_id(16'(i)),
      .sw_data(op_data[i]), .sw_dg(op_dg[i]),
      .tx_ready(tx_ready[i]), .tx_valid(tx_valid[i]), .tx_soc(tx_soc[i]), .tx_data(tx_data[i]),
      .cyc_push(c_push[i]), .cyc_cell(c_cell[i]), .cyc_stg(c_stg[i]), .cyc_full(c_full[i]),
      .cfg_age_thresh(cfg_age_thresh), .cfg_hi(cfg_xmb_hi), .cfg_lo(cfg_xmb_lo),
      .cfg_clp(cfg_xmb_clp),
      .rx_cnt(recv_cnt[i]), .ud_cnt(ud_cnt[i]), .bd_cnt(bd_cnt[i]), .clp_cnt(clp_cnt[i]),
      .ovf_cnt(ovf_cnt[i]));
  end

  // host read data of the selected port (registered inside each table)
  logic [$clog2(NPORTS)-1:0] h_port_q;
  always_ff @(posedge clk) if (h_re) h_port_q <= h_port;
  assign h_rdata = h_rd[h_port_q];
endmodule
