// tb_gc_encode: random 128-bit values garbled blue and red; every label must be the key of its
// bit's value in that colour (k1/k2 or k3/k4 taken from the garbling key's bytes).
module tb_gc_encode;
  import gc_pkg::*;
  import tb_ref_pkg::*;

  int checks = 0, failures = 0;
  logic [31:0]   gk;
  logic [127:0]  d;
  logic [1023:0] yb, yr;

  gc_encode #(.WIDTH(128), .COLOR(BLUE)) dut_b (.d(d), .keys(gkey_t'(gk)), .y(yb));
  gc_encode #(.WIDTH(128), .COLOR(RED))  dut_r (.d(d), .keys(gkey_t'(gk)), .y(yr));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 200; n++) begin
      gk = r_rand_gk();
      d  = {$urandom, $urandom, $urandom, $urandom};
      #1;
      for (int i = 0; i < 128; i++) begin
        checks += 2;
        if (yb[8*i +: 8] !== (d[i] ? gk[23:16] : gk[31:24])) begin failures++; $display("FAIL blue bit %0d", i); end
        if (yr[8*i +: 8] !== (d[i] ? gk[7:0]   : gk[15:8]))  begin failures++; $display("FAIL red bit %0d", i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
