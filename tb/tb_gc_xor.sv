// tb_gc_xor: random garbled vectors through a blue and a red 8-wide garbled XOR; the result,
// ungarbled in the other colour, must equal the XOR of the plain values.
module tb_gc_xor;
  import gc_pkg::*;
  import tb_ref_pkg::*;

  int checks = 0, failures = 0;
  logic [31:0] gk;
  logic [63:0] ab, bb, ar, br, yb, yr;

  gc_xor #(.WIDTH(8), .COLOR(BLUE)) dut_b (.a(ab), .b(bb), .keys(gkey_t'(gk)), .y(yb));
  gc_xor #(.WIDTH(8), .COLOR(RED))  dut_r (.a(ar), .b(br), .keys(gkey_t'(gk)), .y(yr));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] x, y, gotb, gotr;
    bit okb, okr;
    for (int n = 0; n < 2000; n++) begin
      gk = r_rand_gk();
      x = 8'($urandom);
      y = 8'($urandom);
      ab = r_gbyte(gk, 0, x); bb = r_gbyte(gk, 0, y);
      ar = r_gbyte(gk, 1, x); br = r_gbyte(gk, 1, y);
      #1;
      gotb = r_ungbyte(gk, 1, yb, okb);
      gotr = r_ungbyte(gk, 0, yr, okr);
      checks += 2;
      if (!okb || gotb !== (x ^ y)) begin failures++; $display("FAIL blue %h^%h got %h ok=%0d", x, y, gotb, okb); end
      if (!okr || gotr !== (x ^ y)) begin failures++; $display("FAIL red %h^%h got %h ok=%0d", x, y, gotr, okr); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
