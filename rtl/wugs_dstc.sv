// wugs_dstc: distribution circuit of the switch element.
// In the load-distribution stages of the Benes network (the first k-1 of
// 2k-1) cells are not routed by address but spread over the outputs. At the
// first tick of each input cell cycle (`first`), every input that carries a
// busy cell is given an output number: busy inputs take consecutive outputs
// starting at a rotating pointer, and the pointer then advances by the number
// of busy inputs, so over time every output receives the same share of
// cells. The rotating assignment is this design's own choice; the original
// circuit is only named. When `en` is low the assignment is not used and the
// pointer holds.
module wugs_dstc #(
  parameter int N = 8
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         first,
  input  logic                         en,
  input  logic [N-1:0]                 busy,
  output logic [N-1:0][$clog2(N)-1:0]  sel
);
  localparam int LW = $clog2(N);
  logic [LW-1:0] ptr;
  logic [LW-1:0] nbusy;

  always_comb begin
    logic [LW-1:0] k;
    k = ptr;
    nbusy = '0;
    for (int i = 0; i < N; i++) begin
      sel[i] = k;
      if (busy[i]) begin
        k = LW'(k + 1'b1);
        nbusy = LW'(nbusy + 1'b1);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) ptr <= '0;
    else if (first && en) ptr <= LW'(ptr + nbusy);
endmodule
