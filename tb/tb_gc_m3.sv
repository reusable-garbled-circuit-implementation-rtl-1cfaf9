// tb_gc_m3: every byte value through the blue and the red garbled multiplier over several
// random garbling keys; the output, ungarbled in its colour, must equal r_mul(x, 8'h03).
module tb_gc_m3;
  import gc_pkg::*;
  import tb_ref_pkg::*;

  int checks = 0, failures = 0;
  logic [31:0] gk;
  logic [63:0] xb, xr, yb, yr;

  gc_m3 #(.COLOR(BLUE)) dut_b (.x(xb), .keys(gkey_t'(gk)), .y(yb));
  gc_m3 #(.COLOR(RED))  dut_r (.x(xr), .keys(gkey_t'(gk)), .y(yr));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] x, gotb, gotr;
    bit okb, okr;
    for (int n = 0; n < 8; n++) begin
      gk = r_rand_gk();
      for (int v = 0; v < 256; v++) begin
        x  = 8'(v);
        xb = r_gbyte(gk, 0, x);
        xr = r_gbyte(gk, 1, x);
        #1;
        gotb = r_ungbyte(gk, 0, yb, okb);
        gotr = r_ungbyte(gk, 1, yr, okr);
        checks += 2;
        if (!okb || gotb !== r_mul(x, 8'h03)) begin failures++; $display("FAIL blue x=%h got %h ok=%0d", x, gotb, okb); end
        if (!okr || gotr !== r_mul(x, 8'h03)) begin failures++; $display("FAIL red x=%h got %h ok=%0d", x, gotr, okr); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
