// wugs_rframer: receive framer of the input port processor.
// It takes cells from a 32-bit cell interface in the style of the 32-bit
// Utopia extension: a word per clock while rx_valid is high, rx_soc marking
// the first word. A cell is 13 words, the 4-byte ATM header (GFC, VPI, VCI,
// PT, CLP) followed by the 48-byte payload; the HEC byte is not carried on
// this interface. When the 13th word is in, the cell is presented on `rx_cell`
// with a one-clock rx_cell_v pulse. A start-of-cell in the middle of a cell
// abandons the partial cell and counts it in err_cnt. The original framer
// also works in the recovered link clock; here the link side is taken to be
// already synchronous to the switch clock.
module wugs_rframer
  import wugs_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        rx_valid,
  input  logic        rx_soc,
  input  logic [31:0] rx_data,
  output logic        rx_cell_v,
  output ext_cell_t   rx_cell,
  output logic [15:0] err_cnt
);
  logic [3:0] cnt;      // words still expected; 0 = hunting for start
  logic [3:0] idx;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      cnt <= '0; idx <= '0; rx_cell_v <= 1'b0;rx_cell <= '0; err_cnt <= '0;
    end else begin
      rx_cell_v <= 1'b0;
      if (rx_valid) begin
        if (rx_soc) begin
          if (cnt != 0) err_cnt <= err_cnt + 1'b1;
          rx_cell.hdr <= atm_hdr_t'(rx_data);
          cnt <= 4'(EXT_WORDS - 1);
          idx <= '0;
        end else if (cnt != 0) begin
          rx_cell.pl[idx] <= rx_data;
          idx <= idx + 1'b1;
          cnt <= cnt - 1'b1;
          if (cnt == 4'd1) rx_cell_v <= 1'b1;
        end
      end
    end
endmodule
