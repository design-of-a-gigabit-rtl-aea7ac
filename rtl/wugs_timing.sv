// wugs_timing: the common timing reference of the switch.
// One clock and one cell-timing signal are distributed to every chip. Here
// this is a 4-bit tick counter (0..15, one internal cell cycle of 16 clocks)
// and a cell-time counter `now` that advances at the end of every cell
// cycle and is used for time stamps and resequencing.
module wugs_timing
  import wugs_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  output logic [3:0]      tick,
  output logic [TS_W-1:0] now
);
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      tick <= '0; now <= '0;
    end else begin
      tick <= tick + 1'b1;
      if (tick == 4'd15) now <= now + 1'b1;
    end
endmodule
