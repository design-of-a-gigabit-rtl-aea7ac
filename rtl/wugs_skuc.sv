// wugs_skuc: skew compensation for one switch-element input.
// Data on an inter-chip link arrive between 0 and MAX_SKEW clock ticks after
// the common cell-timing reference. The circuit delays each input by
// MAX_SKEW - skew ticks, so that every input reaches the chip's core with the
// same fixed lag of MAX_SKEW ticks and cells from all inputs are in phase.
// The delay is a tapped shift register; `skew` is the link's measured delay
// in ticks. MAX_SKEW = 2 covers the 16 ns of delay variation quoted for the
// original circuit at a 120 MHz clock. How the original measures the skew on
// its own is not described, so here it is a configuration input; the
// per-bit sampling of the original is not modelled.
module wugs_skuc #(
  parameter int W        = 12,
  parameter int MAX_SKEW = 2
) (
  input  logic                          clk,
  input  logic [$clog2(MAX_SKEW+1)-1:0] skew,   // link delay in ticks, 0..MAX_SKEW
  input  logic [W-1:0]                  din,
  output logic [W-1:0]                  dout
);
  logic [W-1:0] dl [MAX_SKEW+1];

  assign dl[0] = din;
  for (genvar k = 1; k <= MAX_SKEW; k++) begin : g_dl
    always_ff @(posedge clk) dl[k] <= dl[k-1];
  end

  always_comb begin
    dout = dl[MAX_SKEW];
    for (int k = 0; k <= MAX_SKEW; k++)
      if (int'(skew) == MAX_SKEW - k) dout = dl[k];
  end
endmodule
