// wugs_hmc: header modification for one switch-element output.
// A cell leaving on output `port` passes through here word by word (`w` is
// the word number). For copy-by-two cells whose two destination digits differ
// at this stage, the copy sent towards the first destination has its second
// address replaced by the first, and the copy sent towards the second
// destination has its first address replaced by the second and its copy
// index CI set, so later stages route each copy as a single cell and the
// output port processor knows which VXI of the pair to use. For copy-range
// cells each copy's bounds are narrowed to the part of the range below this
// output. Cells switched by the distribution circuit (`dmode`) and unicast
// cells pass unchanged. The rewrite rules are this design's own reading of
// the copy-by-two and copy-range routing.
module wugs_hmc
  import wugs_pkg::*;
(
  input  logic [2:0]       port,
  input  logic [1:0]       digit,
  input  logic             dmode,
  input  logic [2:0]       rc,
  input  logic [ADR_W-1:0] adr1,
  input  logic [ADR_W-1:0] adr2,
  input  logic [3:0]       w,
  input  pword_t           din,
  output pword_t           dout
);
  logic [ADR_W-1:0] n1, n2, low_ones;
  logic             set_ci;
  logic [2:0]       d1, d2;

  always_comb begin
    d1 = digit_of(adr1, digit);
    d2 = digit_of(adr2, digit);
    n1 = adr1;
    n2 = adr2;
    set_ci = 1'b0;
    low_ones = ADR_W'((13'd1 << (3*digit)) - 13'd1);
    if (!dmode && rc == RC_COPY2 && d1 != d2) begin
      if (port == d1) n2 = adr1;
      else begin
        n1 = adr2;
        set_ci = 1'b1;
      end
    end else if (!dmode && rc == RC_RANGE) begin
      if (port != d1) begin
        n1 = adr1 & ~low_ones;
        n1[3*digit +: 3] = port;
      end
      if (port != d2) begin
        n2 = adr2 | low_ones;
        n2[3*digit +: 3] = port;
      end
    end
  end

  always_comb begin
    dout = din;
    unique case (w)
      4'd1: dout[11:8] = {din[11] | set_ci, n1[11:9]};
      4'd2: dout[10:8] = n1[8:6];
      4'd3: dout[10:8] = n1[5:3];
      4'd4: dout[10:8] = n1[2:0];
      4'd5: dout[10:8] = n2[11:9];
      4'd6: dout[10:8] = n2[8:6];
      4'd7: dout[10:8] = n2[5:3];
      4'd8: dout[10:8] = n2[2:0];
      default: ;
    endcase
  end
endmodule
