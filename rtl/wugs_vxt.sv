// wugs_vxt: Virtual Path/Circuit Translation Table of the input port
// processor.
// ENTRIES entries (1024, as in the original chip) are split by the bounds
// register: entries below cfg_bound form the virtual path table, indexed by
// the cell's VPI; the rest form the virtual circuit table, indexed by
// cfg_bound + VCI. A lookup first reads the path entry. If its VPT bit
// (virtual path terminates here) is clear, that entry routes the cell and the
// VCI passes through unchanged; if it is set, the circuit entry selected by
// the VCI routes the cell. An entry with BI (busy/idle) clear, an RCO
// (recycled cells only) entry hit by a cell from the link, a VPI at or above
// the bound and a VCI beyond the table are errors: the cell is dropped and
// err_cnt counts it. SC forces CLP to 1. Every use of an entry increments its
// 32-bit cell count CC. The result is the internal cell: the pair of output
// port numbers, new VPI/VCI pair (VXI), block discard indices, routing and
// control bits come from the entry; STG, PT, CLP and the payload from the
// request; the time stamp TS is the current cell time `now`.
// Handshake: req_v/req_rdy (accepted in IDLE), then out_v held until out_rdy.
// A translated cell is ready 2 clocks after the request for a path entry,
// 3 when the circuit table is read as well. The host port writes whole
// entries and reads them back (h_rdata registered one clock after h_re).
// Control cells (VPI 0, VCI 32) are not decoded here: their payload format
// is not published, and the host port stands in for them.
module wugs_vxt
  import wugs_pkg::*;
#(
  parameter int ENTRIES = 1024
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [$clog2(ENTRIES):0]   cfg_bound,
  input  logic [TS_W-1:0]            now,
  // lookup request
  input  logic                       req_v,
  output logic                       req_rdy,
  input  ext_cell_t                  req_cell,
  input  logic [15:0]                req_stg,
  input  logic                       req_cyc,
  // translated cell
  output logic                       out_v,
  input  logic                       out_rdy,
  output icell_t                     out_cell,
  output logic [15:0]                err_cnt,
  // host access
  input  logic                       h_we,
  input  logic                       h_re,
  input  logic [$clog2(ENTRIES)-1:0] h_addr,
  input  vxt_entry_t                 h_wdata,
  output vxt_entry_t                 h_rdata
);
  localparam int AW = $clog2(ENTRIES);
  typedef enum logic [1:0] {S_IDLE, S_VP, S_VC, S_OUT} state_t;

  vxt_entry_t mem [ENTRIES];
  state_t     st;
  ext_cell_t  c;
  logic [15:0] c_stg;
  logic       c_cyc;
  logic [AW-1:0] vc_idx;
  vxt_entry_t e;
  logic [AW:0] vc_full;
  logic       bad;

  assign req_rdy = (st == S_IDLE);
  assign out_v   = (st == S_OUT);
  assign vc_full = (AW+1)'(cfg_bound) + (AW+1)'(c.hdr.vci);

  always_comb begin
    e = (st == S_VC) ? mem[vc_idx] : mem[AW'(c.hdr.vpi)];
    bad = !e.bi || (e.rco && !c_cyc);
  end

  function automatic icell_t build(vxt_entry_t x, ext_cell_t k, logic [15:0] stg,
                                   logic vp_switched, logic [TS_W-1:0] ts);
    icell_t r;
    r = '0;
    r.bi = 1'b1;   r.rc = x.rc;     r.ci = 1'b0;
    r.adr1 = x.adr1; r.adr2 = x.adr2;
    r.ts = ts;     r.stg = stg;     r.d = x.d;   r.cyc = x.cyc;  r.cs = x.cs;
    r.br = x.br;   r.ud = x.ud;     r.pt = k.hdr.pt;
    r.clp = k.hdr.clp | x.sc;
    r.vxi1 = vp_switched ? {x.vxi1[23:16], k.hdr.vci} : x.vxi1;
    r.vxi2 = vp_switched ? {x.vxi2[23:16], k.hdr.vci} : x.vxi2;
    r.bdi1 = x.bdi1; r.bdi2 = x.bdi2;
    r.pl = k.pl;
    return r;
  endfunction

  always_ff @(posedge clk) begin
    if (h_we) mem[h_addr] <= h_wdata;
    else if ((st == S_VP && !bad && !e.vpt) || (st == S_VC && !bad))
      mem[(st == S_VC) ? vc_idx : AW'(c.hdr.vpi)].cc <= e.cc + 1'b1;
    if (h_re) h_rdata <= mem[h_addr];
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      st <= S_IDLE; c <= '0; c_stg <= '0; c_cyc <= 1'b0; vc_idx <= '0;
      out_cell <= '0; err_cnt <= '0;
    end else begin
      unique case (st)
        S_IDLE: if (req_v) begin
          c <= req_cell; c_stg <= req_stg; c_cyc <= req_cyc;
          st <= S_VP;
        end
        S_VP: begin
          if ((AW+1)'(c.hdr.vpi) >= cfg_bound || bad) begin
            err_cnt <= err_cnt + 1'b1;
            st <= S_IDLE;
          end else if (e.vpt) begin
            if (vc_full >= (AW+1)'(ENTRIES)) begin
              err_cnt <= err_cnt + 1'b1;
              st <= S_IDLE;
            end else begin
              vc_idx <= AW'(vc_full);
              st <= S_VC;
            end
          end else begin
            out_cell <= build(e, c, c_stg, 1'b1, now);
            st <= S_OUT;
          end
        end
        S_VC: begin
          if (bad) begin
            err_cnt <= err_cnt + 1'b1;
            st <= S_IDLE;
          end else begin
            out_cell <= build(e, c, c_stg, 1'b0, now);
            st <= S_OUT;
          end
        end
        S_OUT: if (out_rdy) st <= S_IDLE;
      endcase
    end
endmodule
