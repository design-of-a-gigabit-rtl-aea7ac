// Testbench for wugs_xmit: copy selection by CI, recycling by the selected
// CYC bit, upstream discard by UD and STG, and full-buffer drops.
module tb_wugs_xmit;
  import wugs_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_v, in_rdy, x_push, x_cs, x_full, c_push, c_full;
  icell_t in_cell;
  ext_cell_t x_cell, c_cell;
  logic [7:0] x_bdi;
  logic [15:0] c_stg, ud_cnt, ovf_cnt;
  int checks = 0, failures = 0, n_ud = 0, n_ovf = 0;

  wugs_xmit dut (.clk(clk), .rst_n(rst_n), .port_stg(16'd6), .in_v(in_v), .in_cell(in_cell),
    .in_rdy(in_rdy), .x_push(x_push), .x_cell(x_cell), .x_cs(x_cs), .x_bdi(x_bdi), .x_full(x_full),
    .c_push(c_push), .c_cell(c_cell), .c_stg(c_stg), .c_full(c_full), .ud_cnt(ud_cnt), .ovf_cnt(ovf_cnt));

  always #5 clk = ~clk;
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    in_v = 0; in_cell = '0; x_full = 0; c_full = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 500; t++) begin
      logic [23:0] vxi; logic [7:0] bdi; bit rec, udh, ef, cf;
      @(negedge clk);
      in_cell = '0;
      in_cell.ci = 1'($urandom); in_cell.cyc = 2'($urandom); in_cell.ud = 1'($urandom);
      in_cell.stg = ($urandom_range(0, 2) == 0) ? 16'd6 : 16'($urandom_range(0, 7));
      in_cell.vxi1 = 24'($urandom); in_cell.vxi2 = 24'($urandom);
      in_cell.bdi1 = 8'($urandom); in_cell.bdi2 = 8'($urandom);
      in_cell.cs = 1'($urandom); in_cell.pt = 3'($urandom); in_cell.clp = 1'($urandom);
      in_cell.pl[3] = $urandom;
      x_full = ($urandom_range(0, 9) == 0); c_full = ($urandom_range(0, 9) == 0);
      in_v = ($urandom_range(0, 4) != 0);
      vxi = in_cell.ci ? in_cell.vxi2 : in_cell.vxi1;
      bdi = in_cell.ci ? in_cell.bdi2 : in_cell.bdi1;
      rec = in_cell.ci ? in_cell.cyc[1] : in_cell.cyc[0];
      udh = in_cell.ud && in_cell.stg == 16'd6;
      ef = in_v && !rec && !udh && !x_full;
      cf = in_v && rec && !c_full;
      if (in_v && !rec && udh) n_ud++;
      else if (in_v && (rec ? c_full : x_full)) n_ovf++;
      #1;
      checks++;
      if (x_push != ef || c_push != cf) begin
        failures++; $display("push %b%b exp %b%b", x_push, c_push, ef, cf);
      end
      checks++;
      if ((ef && ({x_cell.hdr.vpi, x_cell.hdr.vci} != vxi || x_bdi != bdi || x_cs != in_cell.cs ||
                  x_cell.hdr.clp != in_cell.clp || x_cell.pl[3] != in_cell.pl[3])) ||
          (cf && ({c_cell.hdr.vpi, c_cell.hdr.vci} != vxi || c_stg != in_cell.stg))) begin
        failures++; $display("fields wrong");
      end
    end
    @(negedge clk);
    checks++;
    if (int'(ud_cnt) != n_ud || int'(ovf_cnt) != n_ovf) begin
      failures++; $display("counters %0d %0d exp %0d %0d", ud_cnt, ovf_cnt, n_ud, n_ovf);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
