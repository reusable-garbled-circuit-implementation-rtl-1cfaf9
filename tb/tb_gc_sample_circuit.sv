// tb_gc_sample_circuit: all eight input combinations of E = (A AND B) XOR (B OR C), garbled
// with random keys, must ungarble to the plain result with e_err low; a label on A that is
// neither blue key must raise e_err in nearly every case.
module tb_gc_sample_circuit;
  import gc_pkg::*;
  import tb_ref_pkg::*;

  int checks = 0, failures = 0;
  logic [31:0] gk;
  logic [7:0]  a, b, c;
  logic        e, err;

  gc_sample_circuit dut (.a_g(a), .b_g(b), .c_g(c), .gk(gk), .e(e), .e_err(err));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int flagged = 0, tried = 0;
    for (int n = 0; n < 300; n++) begin
      gk = r_rand_gk();
      for (int v = 0; v < 8; v++) begin
        a = r_lbl(gk, 0, v[2]); b = r_lbl(gk, 0, v[1]); c = r_lbl(gk, 0, v[0]);
        #1;
        checks++;
        if (e !== ((v[2] & v[1]) ^ (v[1] | v[0])) || err) begin
          failures++;
          $display("FAIL abc=%b e=%b err=%b gk=%h", v[2:0], e, err, gk);
        end
      end
      do a = 8'($urandom); while (a == gk[31:24] || a == gk[23:16]);
      b = r_lbl(gk, 0, $urandom_range(0, 1)); c = r_lbl(gk, 0, $urandom_range(0, 1));
      #1;
      tried++;
      if (err) flagged++;
    end
    checks++;
    if (flagged * 100 < tried * 90) begin
      failures++;
      $display("FAIL only %0d of %0d wrong labels flagged", flagged, tried);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
