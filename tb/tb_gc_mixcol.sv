// tb_gc_mixcol: garbled Mix-Columns of one column. Blue garbled columns in, red garbled
// columns out; the output is ungarbled and compared with the FIPS-197 example columns and with
// the reference model for random columns and garbling keys.
module tb_gc_mixcol;
  import gc_pkg::*;
  import tb_ref_pkg::*;

  int checks = 0, failures = 0;
  logic [31:0]  gk;
  logic [255:0] a, m;

  gc_mixcol dut (.a(a), .keys(gkey_t'(gk)), .m(m));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Byte r of the column is a[r]; a[3] is the top 64 bits of the packed array.
  task automatic check_col(logic [31:0] col, logic [31:0] exp);
    logic [31:0] got;
    bit ok, all_ok;
    all_ok = 1;
    for (int r = 0; r < 4; r++) a[64*r +: 64] = r_gbyte(gk, 0, col[31-8*r -: 8]);
    #1;
    for (int r = 0; r < 4; r++) begin
      got[31-8*r -: 8] = r_ungbyte(gk, 1, m[64*r +: 64], ok);
      all_ok &= ok;
    end
    checks++;
    if (!all_ok || got !== exp) begin
      failures++;
      $display("FAIL mixcol(%h) = %h expected %h ok=%0d", col, got, exp, all_ok);
    end
  endtask

  initial begin
    logic [31:0] c;
    gk = 32'ha1b2c3d4;
    check_col(32'hdb135345, 32'h8e4da1bc);
    check_col(32'hf20a225c, 32'h9fdc589d);
    check_col(32'h01010101, 32'h01010101);
    check_col(32'hd4d4d4d5, 32'hd5d5d7d6);
    for (int n = 0; n < 2000; n++) begin
      gk = r_rand_gk();
      c  = $urandom;
      check_col(c, r_mixcol(c));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
