// wugs_cell_fifo: first-in first-out buffer of whole cells.
// Used for the receive buffer (RCB), the recycling buffer (CYCB) and the two
// queues of the transmit buffer (XMB). One cell of W bits can be pushed and
// one popped per clock; the head cell is visible on dout while not empty
// (first-word fall-through). A push into a full FIFO is ignored and the
// caller is expected to count it as a loss. `count` reports occupancy for
// the discard thresholds. Buffer depths are not given for the original chips;
// the defaults used by the port processor are this design's choice.
module wugs_cell_fifo #(
  parameter int W     = 416,
  parameter int DEPTH = 32
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      push,
  input  logic [W-1:0]              din,
  output logic                      full,
  input  logic                      pop,
  output logic [W-1:0]              dout,
  output logic                      empty,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int AW = $clog2(DEPTH);
  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wp, rp;
  logic          do_push, do_pop;

  assign full    = (count == ($clog2(DEPTH+1))'(DEPTH));
  assign empty   = (count == '0);
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;
  assign dout    = mem[rp];

  always_ff @(posedge clk) if (do_push) mem[wp] <= din;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      wp <= '0; rp <= '0; count <= '0;
    end else begin
      if (do_push) wp <= (int'(wp) == DEPTH-1) ? '0 : wp + 1'b1;
      if (do_pop)  rp <= (int'(rp) == DEPTH-1) ? '0 : rp + 1'b1;
      count <= count + ($clog2(DEPTH+1))'(do_push) - ($clog2(DEPTH+1))'(do_pop);
    end
endmodule
