// Testbench for wugs_hmc: rebuilds both addresses and CI from the modified
// words and compares them with the copy-by-two and copy-range rules worked
// out here; distribution and unicast cells and the data bits must pass
// unchanged.
module tb_wugs_hmc;
  import wugs_pkg::*;
  logic [2:0] port;
  logic [1:0] digit;
  logic dmode;
  logic [2:0] rc;
  logic [11:0] adr1, adr2;
  logic [3:0] w;
  pword_t din, dout;
  int checks = 0, failures = 0;

  wugs_hmc dut (.port(port), .digit(digit), .dmode(dmode), .rc(rc), .adr1(adr1), .adr2(adr2),
                .w(w), .din(din), .dout(dout));

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // send the cell's words 0..15 through the circuit, collect addresses
  task automatic run(output logic [11:0] o1, output logic [11:0] o2, output logic oci,
                     output int data_err);
    data_err = 0; o1 = 0; o2 = 0; oci = 0;
    for (int k = 0; k < 16; k++) begin
      pword_t x;
      x[7:0] = 8'($urandom);
      x[11:8] = 0;
      if (k >= 1 && k <= 4) x[10:8] = adr1[3*(4-k) +: 3];
      if (k >= 5 && k <= 8) x[10:8] = adr2[3*(8-k) +: 3];
      if (k == 0) x[11:8] = {1'b1, rc};
      w = 4'(k); din = x; #1;
      if (dout[7:0] != x[7:0]) data_err++;
      if (k == 0 && dout != x) data_err++;
      if (k == 1) oci = dout[11];
      if (k >= 1 && k <= 4) o1[3*(4-k) +: 3] = dout[10:8];
      if (k >= 5 && k <= 8) o2[3*(8-k) +: 3] = dout[10:8];
    end
  endtask

  initial begin
    for (int t = 0; t < 3000; t++) begin
      logic [11:0] e1, e2, o1, o2, pre, lowm;
      logic eci, oci;
      int derr, d1, d2;
      digit = 2'($urandom_range(0, 3));
      lowm = 12'((1 << (3*digit)) - 1);
      pre = 12'($urandom) & ~(12'((1 << (3*digit + 3)) - 1));
      adr1 = pre | (12'($urandom) & 12'((1 << (3*digit + 3)) - 1));
      adr2 = pre | (12'($urandom) & 12'((1 << (3*digit + 3)) - 1));
      d1 = (adr1 >> (3*digit)) & 7;
      d2 = (adr2 >> (3*digit)) & 7;
      dmode = (t % 9 == 0);
      rc = (t % 3 == 0) ? RC_UNICAST : (t % 3 == 1) ? RC_COPY2 : RC_RANGE;
      if (rc == RC_RANGE && d1 > d2) begin
        logic [11:0] tmp; tmp = adr1; adr1 = adr2; adr2 = tmp;
        d1 = (adr1 >> (3*digit)) & 7; d2 = (adr2 >> (3*digit)) & 7;
      end
      if (rc == RC_COPY2) port = ($urandom_range(0, 1) == 0) ? 3'(d1) : 3'(d2);
      else if (rc == RC_RANGE) port = 3'($urandom_range(d1, d2));
      else port = 3'(d1);
      e1 = adr1; e2 = adr2; eci = 0;
      if (!dmode && rc == RC_COPY2 && d1 != d2) begin
        if (int'(port) == d1) e2 = adr1;
        else begin e1 = adr2; eci = 1; end
      end
      if (!dmode && rc == RC_RANGE) begin
        if (int'(port) != d1) e1 = (pre | (12'(port) << (3*digit)));
        if (int'(port) != d2) e2 = (pre | (12'(port) << (3*digit)) | lowm);
      end
      run(o1, o2, oci, derr);
      checks++;
      if (o1 != e1 || o2 != e2 || oci != eci || derr != 0) begin
        failures++;
        $display("rc %0d digit %0d port %0d a1 %h a2 %h: got %h %h %b exp %h %h %b derr %0d",
                 rc, digit, port, adr1, adr2, o1, o2, oci, e1, e2, eci, derr);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
