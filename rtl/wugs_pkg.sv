// wugs_pkg: types, constants and helper functions shared by the gigabit ATM
// switch: the 16-word internal cell format, the external ATM cell, the
// translation-table entry and the base-8 routing rules of the switch element.
//
// Internal cell: 16 words of 36 bits, one word per clock tick of a cell
// cycle. Bits [35:32] of every word are the address column, seen unchanged by
// all four switch planes; bits [31:0] are data, plane p carrying [8p+7:8p].
//   word 0   addr {BI, RC[2:0]}; data {STG[15:0], D, CYC[1], CYC[0], CS,
//            5 reserved, BR, UD, PT[2:0], CLP, 1 spare}
//   word 1   addr {CI, ADR1 digit 3}  data {VXI1[23:0], BDI1[7:0]}
//   word 2-4 addr {0, ADR1 digit 2..0} data: word 2 {VXI2, BDI2}, 3-4 payload
//   word 5-8 addr {0, ADR2 digit 3..0} data payload
//   word 9-11 addr reserved (0)       data payload
//   word 12-14 addr TS[11:8], TS[7:4], TS[3:0]; data payload (12 words total)
//   word 15  all zero (no field is assigned to the sixteenth tick)
// Field widths 4/16/4/5/7, 24/8, the 11-row address block, the 3-row TS
// block and the 12-row payload follow the published cell-format drawing; the
// exact bit order inside the 4-bit and 7-bit groups, one base-8 digit per
// row in the address column, and the copy-index flag CI are this design's
// own choices.
package wugs_pkg;

  localparam int TICKS    = 16;   // clock ticks per internal cell cycle
  localparam int WORD_W   = 36;   // internal data path width
  localparam int PLANES   = 4;    // parallel switch planes
  localparam int PLANE_W  = 12;   // 4 address bits + 8 data bits per plane
  localparam int SE_PORTS = 8;    // switch element inputs/outputs
  localparam int ADR_W    = 12;   // port number: four base-8 digits (4096 ports)
  localparam int TS_W     = 12;   // time stamp, in cell times
  localparam int PL_WORDS = 12;   // 48-byte payload as 32-bit words
  localparam int EXT_WORDS = 13;  // external cell on the 32-bit link: header + payload

  // routing control (RC) encodings
  localparam logic [2:0] RC_UNICAST = 3'd0;
  localparam logic [2:0] RC_COPY2   = 3'd1;
  localparam logic [2:0] RC_RANGE   = 3'd2;

  typedef logic [WORD_W-1:0]  word_t;
  typedef logic [PLANE_W-1:0] pword_t;

  typedef struct packed {
    logic [3:0]  gfc;
    logic [7:0]  vpi;
    logic [15:0] vci;
    logic [2:0]  pt;
    logic        clp;
  } atm_hdr_t;

  typedef struct packed {
    atm_hdr_t                    hdr;
    logic [PL_WORDS-1:0][31:0]   pl;
  } ext_cell_t;

  typedef struct packed {
    logic               bi;
    logic [2:0]         rc;
    logic               ci;
    logic [ADR_W-1:0]   adr1;
    logic [ADR_W-1:0]   adr2;
    logic [TS_W-1:0]    ts;
    logic [15:0]        stg;
    logic               d;
    logic [1:0]         cyc;
    logic               cs;
    logic               br;
    logic               ud;
    logic [2:0]         pt;
    logic               clp;
    logic [23:0]        vxi1;
    logic [7:0]         bdi1;
    logic [23:0]        vxi2;
    logic [7:0]         bdi2;
    logic [PL_WORDS-1:0][31:0] pl;
  } icell_t;

  // one Virtual Path/Circuit Translation Table entry
  typedef struct packed {
    logic               bi;
    logic [2:0]         rc;
    logic               d;
    logic [1:0]         cyc;
    logic               cs;
    logic               ud;
    logic               sc;
    logic               vpt;
    logic               rco;
    logic               br;
    logic [ADR_W-1:0]   adr1;
    logic [ADR_W-1:0]   adr2;
    logic [23:0]        vxi1;
    logic [7:0]         bdi1;
    logic [23:0]        vxi2;
    logic [7:0]         bdi2;
    logic [31:0]        cc;
  } vxt_entry_t;

  function automatic word_t icell_word(icell_t c, logic [3:0] w);
    word_t r;
    r = '0;
    unique case (w)
      4'd0:  r = {c.bi, c.rc, c.stg, c.d, c.cyc[1], c.cyc[0], c.cs, 5'b0,
                  c.br, c.ud, c.pt, c.clp, 1'b0};
      4'd1:  r = {c.ci,  c.adr1[11:9], c.vxi1, c.bdi1};
      4'd2:  r = {1'b0,  c.adr1[8:6],  c.vxi2, c.bdi2};
      4'd3:  r = {1'b0,  c.adr1[5:3],  c.pl[0]};
      4'd4:  r = {1'b0,  c.adr1[2:0],  c.pl[1]};
      4'd5:  r = {1'b0,  c.adr2[11:9], c.pl[2]};
      4'd6:  r = {1'b0,  c.adr2[8:6],  c.pl[3]};
      4'd7:  r = {1'b0,  c.adr2[5:3],  c.pl[4]};
      4'd8:  r = {1'b0,  c.adr2[2:0],  c.pl[5]};
      4'd9:  r = {4'b0,                c.pl[6]};
      4'd10: r = {4'b0,                c.pl[7]};
      4'd11: r = {4'b0,                c.pl[8]};
      4'd12: r = {c.ts[11:8],          c.pl[9]};
      4'd13: r = {c.ts[7:4],           c.pl[10]};
      4'd14: r = {c.ts[3:0],           c.pl[11]};
      default: r = '0;
    endcase
    return r;
  endfunction

  // inverse of icell_word: fold word w into cell c
  function automatic icell_t icell_put(icell_t c, logic [3:0] w, word_t x);
    icell_t r;
    r = c;
    unique case (w)
      4'd0:  begin
               r.bi = x[35]; r.rc = x[34:32]; r.stg = x[31:16]; r.d = x[15];
               r.cyc = x[14:13]; r.cs = x[12]; r.br = x[6]; r.ud = x[5];
               r.pt = x[4:2]; r.clp = x[1];
             end
      4'd1:  begin r.ci = x[35]; r.adr1[11:9] = x[34:32]; r.vxi1 = x[31:8]; r.bdi1 = x[7:0]; end
      4'd2:  begin r.adr1[8:6]  = x[34:32]; r.vxi2 = x[31:8]; r.bdi2 = x[7:0]; end
      4'd3:  begin r.adr1[5:3]  = x[34:32]; r.pl[0] = x[31:0]; end
      4'd4:  begin r.adr1[2:0]  = x[34:32]; r.pl[1] = x[31:0]; end
      4'd5:  begin r.adr2[11:9] = x[34:32]; r.pl[2] = x[31:0]; end
      4'd6:  begin r.adr2[8:6]  = x[34:32]; r.pl[3] = x[31:0]; end
      4'd7:  begin r.adr2[5:3]  = x[34:32]; r.pl[4] = x[31:0]; end
      4'd8:  begin r.adr2[2:0]  = x[34:32]; r.pl[5] = x[31:0]; end
      4'd9:  r.pl[6] = x[31:0];
      4'd10: r.pl[7] = x[31:0];
      4'd11: r.pl[8] = x[31:0];
      4'd12: begin r.ts[11:8] = x[35:32]; r.pl[9]  = x[31:0]; end
      4'd13: begin r.ts[7:4]  = x[35:32]; r.pl[10] = x[31:0]; end
      4'd14: begin r.ts[3:0]  = x[35:32]; r.pl[11] = x[31:0]; end
      default: ;
    endcase
    return r;
  endfunction

  function automatic logic [2:0] digit_of(logic [ADR_W-1:0] a, logic [1:0] p);
    return a[3*p +: 3];
  endfunction

  // Output-select lines of a routing stage that uses base-8 digit p.
  function automatic logic [7:0] route_mask(logic [2:0] rc, logic [ADR_W-1:0] a1,
                                            logic [ADR_W-1:0] a2, logic [1:0] p);
    logic [7:0] m;
    logic [2:0] d1, d2;
    d1 = digit_of(a1, p);
    d2 = digit_of(a2, p);
    m = '0;
    if (rc == RC_RANGE) begin
      for (int j = 0; j < 8; j++)
        if (3'(j) >= d1 && 3'(j) <= d2) m[j] = 1'b1;
      if (d1 > d2) m[d1] = 1'b1;          // malformed range: forward one copy
    end else if (rc == RC_COPY2) begin
      m[d1] = 1'b1;
      m[d2] = 1'b1;
    end else begin
      m[d1] = 1'b1;
    end
    return m;
  endfunction

endpackage
