// wugs_xmit: transmit circuit of the output port processor.
// For each cell released by the resequencer it selects the half of the
// translation result that belongs to this copy: the copy index CI, set by the
// switch elements on the copy that followed the second address, selects
// VXI2/BDI2/CYC[1], otherwise VXI1/BDI1/CYC[0]. The chosen VXI becomes the
// cell's new VPI/VCI. If the chosen CYC bit is set the cell is recycled:
// it goes, with its source trunk group, to the recycling buffer of this
// port's input side for another table lookup. Otherwise it is bound for the
// link: if UD (upstream discard) is set and the cell's STG equals this
// port's trunk group it is discarded (counted in ud_cnt); else it goes to
// the transmit buffer with its CS bit and block discard index. A cell whose
// target buffer is full is dropped and counted in ovf_cnt. Accepts one cell
// per clock; purely combinational apart from the counters.
module wugs_xmit
  import wugs_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [15:0] port_stg,
  input  logic        in_v,
  input  icell_t      in_cell,
  output logic        in_rdy,
  // to the transmit buffer
  output logic        x_push,
  output ext_cell_t   x_cell,
  output logic        x_cs,
  output logic [7:0]  x_bdi,
  input  logic        x_full,
  // to the recycling buffer
  output logic        c_push,
  output ext_cell_t   c_cell,
  output logic [15:0] c_stg,
  input  logic        c_full,
  output logic [15:0] ud_cnt,
  output logic [15:0] ovf_cnt
);
  logic [23:0] vxi;
  logic        recyc, ud_hit;
  ext_cell_t   k;

  always_comb begin
    vxi    = in_cell.ci ? in_cell.vxi2 : in_cell.vxi1;
    x_bdi  = in_cell.ci ? in_cell.bdi2 : in_cell.bdi1;
    recyc  = in_cell.cyc[in_cell.ci];
    ud_hit = in_cell.ud && (in_cell.stg == port_stg);
    k.hdr.gfc = '0;
    k.hdr.vpi = vxi[23:16];
    k.hdr.vci = vxi[15:0];
    k.hdr.pt  = in_cell.pt;
    k.hdr.clp = in_cell.clp;
    k.pl      = in_cell.pl;
    x_cell = k;
    c_cell = k;
    c_stg  = in_cell.stg;
    x_cs   = in_cell.cs;
    in_rdy = 1'b1;
    c_push = in_v && recyc && !c_full;
    x_push = in_v && !recyc && !ud_hit && !x_full;
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      ud_cnt <= '0; ovf_cnt <= '0;
    end else if (in_v) begin
      if (!recyc && ud_hit) ud_cnt <= ud_cnt + 1'b1;
      else if (recyc ? c_full : x_full) ovf_cnt <= ovf_cnt + 1'b1;
    end
endmodule
