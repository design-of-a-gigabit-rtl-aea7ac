// wugs_xframer: transmit framer of the output port processor.
// Whenever it is idle and the transmit buffer offers a cell, it pops the
// cell and sends it as 13 consecutive 32-bit words on the link interface,
// header first, with tx_soc on the first word and tx_valid on all of them
// (the counterpart of wugs_rframer). Cells follow each other back to back.
// tx_ready is the transmission interface's flow control (cell-available
// signal of a Utopia-style interface): a word is sent only in a clock where
// it is high, so a link slower than the switch backs cells up into the
// transmit buffer.
module wugs_xframer
  import wugs_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_v,
  input  ext_cell_t   in_cell,
  output logic        in_pop,
  input  logic        tx_ready,
  output logic        tx_valid,
  output logic        tx_soc,
  output logic [31:0] tx_data
);
  ext_cell_t  c;
  logic [3:0] idx;     // word being sent
  logic       busy;

  logic adv;      // current word is taken by the link
  assign adv    = busy && tx_ready;
  assign in_pop = in_v && (!busy || (adv && idx == 4'(EXT_WORDS - 1)));

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      c <= '0; idx <= '0; busy <= 1'b0;
    end else begin
      if (adv) idx <= idx + 1'b1;
      if (adv && idx == 4'(EXT_WORDS - 1)) busy <= 1'b0;
      if (in_pop) begin
        c <= in_cell; idx <= '0; busy <= 1'b1;
      end
    end

  always_comb begin
    tx_valid = adv;
    tx_soc   = adv && idx == 4'd0;
    tx_data  = (idx == 4'd0) ? 32'(c.hdr) : c.pl[idx - 4'd1];
  end
endmodule
