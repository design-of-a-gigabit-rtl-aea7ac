// wugs_ggc: grant generation circuit of the switch element.
// Once per cell cycle (`upd`, one tick before the upstream neighbours sample
// the grants) it turns the number of free cell-buffer slots into the upstream
// grant lines ug[]: each granted input may send one cell in the next cell
// cycle. With at least N free slots every input is granted; otherwise as many
// inputs as there are free slots are granted, starting at a rotating
// pointer so that no input is starved. The grants are registered and stay
// constant for a whole cell cycle. Counting only slots already free is
// conservative: slots released later in the cycle are offered next time.
module wugs_ggc #(
  parameter int N     = 8,
  parameter int CNT_W = 7
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             upd,
  input  logic [CNT_W-1:0] free_cnt,
  output logic [N-1:0]     ug
);
  localparam int LW = $clog2(N);
  logic [LW-1:0] ptr;
  logic [N-1:0]  ug_n;

  always_comb begin
    ug_n = '0;
    for (int k = 0; k < N; k++)
      if (k < int'(free_cnt)) ug_n[LW'(int'(ptr) + k)] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      ptr <= '0;
      ug  <= '0;
    end else if (upd) begin
      ug  <= ug_n;
      if (int'(free_cnt) < N) ptr <= LW'(ptr + 1'b1);
    end
endmodule
