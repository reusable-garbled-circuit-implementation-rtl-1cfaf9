// tb_gc_decode: garbled 128-bit vectors, red and blue, are ungarbled back to their plain
// value with err low; then one label is replaced by a value that is neither key and err must
// rise.
module tb_gc_decode;
  import gc_pkg::*;
  import tb_ref_pkg::*;

  int checks = 0, failures = 0;
  logic [31:0]   gk;
  logic [1023:0] xb, xr;
  logic [127:0]  db, dr;
  logic          eb, er;

  gc_decode #(.WIDTH(128), .COLOR(BLUE)) dut_b (.x(xb), .keys(gkey_t'(gk)), .d(db), .err(eb));
  gc_decode #(.WIDTH(128), .COLOR(RED))  dut_r (.x(xr), .keys(gkey_t'(gk)), .d(dr), .err(er));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] v;
    logic [7:0] bad;
    int pos;
    for (int n = 0; n < 300; n++) begin
      gk = r_rand_gk();
      v  = {$urandom, $urandom, $urandom, $urandom};
      for (int i = 0; i < 128; i++) begin
        xb[8*i +: 8] = r_lbl(gk, 0, v[i]);
        xr[8*i +: 8] = r_lbl(gk, 1, v[i]);
      end
      #1;
      checks += 2;
      if (db !== v || eb) begin failures++; $display("FAIL blue decode"); end
      if (dr !== v || er) begin failures++; $display("FAIL red decode"); end
      pos = $urandom_range(0, 127);
      do bad = 8'($urandom); while (bad == gk[31:24] || bad == gk[23:16]);
      xb[8*pos +: 8] = bad;
      do bad = 8'($urandom); while (bad == gk[15:8] || bad == gk[7:0]);
      xr[8*pos +: 8] = bad;
      #1;
      checks += 2;
      if (!eb) begin failures++; $display("FAIL blue err not flagged"); end
      if (!er) begin failures++; $display("FAIL red err not flagged"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
