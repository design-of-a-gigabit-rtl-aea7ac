// wugs_oxbar_arb: arbiter of one output-crossbar column.
// Among the buffer rows requesting this output it selects the one whose cell
// has waited longest. The maximum is found bit-serially, most significant
// age bit first: if any remaining candidate has a 1 in the current bit, all
// candidates with a 0 there drop out. This is the elimination scheme of a
// wired-OR bus arbiter, unrolled here into one combinational pass. Ties are
// broken towards the lowest row number.
module wugs_oxbar_arb #(
  parameter int N     = 40,
  parameter int AGE_W = 8
) (
  input  logic [N-1:0]            req,
  input  logic [N-1:0][AGE_W-1:0] age,
  output logic                    gnt_v,
  output logic [$clog2(N)-1:0]    gnt_idx
);
  always_comb begin
    logic [N-1:0] cand;
    logic [N-1:0] hit;
    cand = req;
    for (int b = AGE_W-1; b >= 0; b--) begin
      for (int r = 0; r < N; r++) hit[r] = cand[r] & age[r][b];
      if (|hit) cand = hit;
    end
    gnt_v   = |cand;
    gnt_idx = '0;
    for (int r = N-1; r >= 0; r--)
      if (cand[r]) gnt_idx = ($clog2(N))'(r);
  end
endmodule
