// wugs_rcv: receive circuit of the input port processor.
// It chooses the next cell for translation, alternating between the receive
// buffer (cells from the link) and the recycling buffer (cells returned by
// the output side of the same port) when both hold cells; the alternation is
// this design's choice. A request carries the cell, its source trunk group
// (the port number for link cells, the stored value for recycled cells) and
// a flag telling where it came from. It also runs the input congestion
// control: whenever the receive buffer holds cfg_thresh or more cells a
// timer is (re)loaded with cfg_time clocks, and while it runs disc_active is
// high, telling the translation stage to drop cells with CLP=1 or CS=0.
module wugs_rcv
  import wugs_pkg::*;
#(
  parameter int CW = 6
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [15:0]   port_id,
  // receive buffer
  input  logic          rcb_empty,
  input  ext_cell_t     rcb_cell,
  input  logic [CW-1:0] rcb_count,
  output logic          rcb_pop,
  // recycling buffer
  input  logic          cyc_empty,
  input  ext_cell_t     cyc_cell,
  input  logic [15:0]   cyc_stg,
  output logic          cyc_pop,
  // request to the translation table
  output logic          req_v,
  input  logic          req_rdy,
  output ext_cell_t     req_cell,
  output logic [15:0]   req_stg,
  output logic          req_cyc,
  // congestion control
  input  logic [CW-1:0] cfg_thresh,
  input  logic [15:0]   cfg_time,
  output logic          disc_active
);
  logic       last_cyc;
  logic       take_cyc;
  logic [15:0] timer;

  always_comb begin
    take_cyc = !cyc_empty && (rcb_empty || !last_cyc);
    req_v    = !rcb_empty || !cyc_empty;
    req_cell = take_cyc ? cyc_cell : rcb_cell;
    req_stg  = take_cyc ? cyc_stg  : port_id;
    req_cyc  = take_cyc;
    rcb_pop  = req_v && req_rdy && !take_cyc;
    cyc_pop  = req_v && req_rdy && take_cyc;
  end

  assign disc_active = (timer != '0);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      last_cyc <= 1'b0;
      timer    <= '0;
    end else begin
      if (req_v && req_rdy) last_cyc <= take_cyc;
      if (rcb_count >= cfg_thresh)  timer <= cfg_time;
      else if (timer != '0)         timer <= timer - 1'b1;
    end
endmodule
