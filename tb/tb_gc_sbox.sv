// tb_gc_sbox: all 256 garbled inputs over several garbling keys; the blue output must ungarble
// to the S-box value computed by the reference model, and a few entries are also checked
// against fixed values of the published AES S-box table.
module tb_gc_sbox;
  import gc_pkg::*;
  import tb_ref_pkg::*;

  int checks = 0, failures = 0;
  logic [31:0] gk;
  logic [63:0] x, y;

  gc_sbox dut (.x(x), .keys(gkey_t'(gk)), .y(y));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(logic [7:0] v, logic [7:0] exp);
    logic [7:0] got;
    bit ok;
    x = r_gbyte(gk, 0, v);
    #1;
    got = r_ungbyte(gk, 0, y, ok);
    checks++;
    if (!ok || got !== exp) begin
      failures++;
      $display("FAIL sbox(%h) = %h expected %h ok=%0d", v, got, exp, ok);
    end
  endtask

  initial begin
    logic [7:0] table_ref [256];
    for (int v = 0; v < 256; v++) table_ref[v] = r_sbox(8'(v));
    gk = 32'h3c5aa5c3;
    // entries of the published table (row x, column y)
    check_one(8'h00, 8'h63); check_one(8'h10, 8'hca); check_one(8'h53, 8'hed);
    check_one(8'h9a, 8'hb8); check_one(8'hc9, 8'hdd); check_one(8'hff, 8'h16);
    for (int n = 0; n < 6; n++) begin
      gk = r_rand_gk();
      for (int v = 0; v < 256; v++) check_one(8'(v), table_ref[v]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
