// tb_gc_aes: the garbled AES core against the FIPS-197 example vectors and the reference
// model, with random keys, plaintexts and garbling keys. Every block must give the plain AES
// ciphertext whatever the garbling key, with label_err low, and done must come 58 clocks after
// start. The garbled state is also checked to be garbled: after whitening it must hold only
// the blue keys of the plain state, never the plain bits themselves.
module tb_gc_aes;
  import gc_pkg::*;
  import tb_ref_pkg::*;

  int checks = 0, failures = 0;
  logic         clk = 0, rst_n = 0, start = 0;
  logic [127:0] pt, key, ct;
  logic [31:0]  gk;
  logic         done, busy, lerr;

  gc_aes dut (.clk, .rst_n, .start, .plaintext(pt), .key(key), .gk(gk),
              .ciphertext(ct), .done, .busy, .label_err(lerr));

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic encrypt(logic [127:0] p, logic [127:0] k, logic [31:0] g, logic [127:0] exp);
    int cyc = 0;
    logic [127:0] st0;
    bit ok;
    @(negedge clk);
    pt = p; key = k; gk = g; start = 1;
    @(negedge clk);
    start = 0;
    pt = '0; key = '0; gk = 32'h0;   // inputs are latched at start
    @(negedge clk);                  // whitening done: state holds blue labels of p ^ k
    cyc = 2;
    for (int i = 0; i < 16; i++) begin
      st0[127-8*i -: 8] = r_ungbyte(g, 0, dut.st_q[127-8*i -: 8], ok);
      chk("state labels are blue keys", ok);
    end
    chk("whitened state", st0 == (p ^ k));
    while (!done && cyc < 200) begin @(negedge clk); cyc++; end
    chk($sformatf("latency %0d == 58", cyc), cyc == 58);
    chk($sformatf("ciphertext %h expected %h", ct, exp), ct == exp);
    chk("label_err low", !lerr);
  endtask

  initial begin
    logic [127:0] p, k;
    logic [31:0] g;
    repeat (2) @(negedge clk);
    rst_n = 1;
    encrypt(128'h00112233445566778899aabbccddeeff, 128'h000102030405060708090a0b0c0d0e0f,
            32'h11223344, 128'h69c4e0d86a7b0430d8cdb78070b4c55a);
    encrypt(128'h3243f6a8885a308d313198a2e0370734, 128'h2b7e151628aed2a6abf7158809cf4f3c,
            32'ha5c3e10f, 128'h3925841d02dc09fbdc118597196a0b32);
    // the same block under several garbling keys: same ciphertext
    for (int n = 0; n < 4; n++)
      encrypt(128'h3243f6a8885a308d313198a2e0370734, 128'h2b7e151628aed2a6abf7158809cf4f3c,
              r_rand_gk(), 128'h3925841d02dc09fbdc118597196a0b32);
    for (int n = 0; n < 12; n++) begin
      p = {$urandom, $urandom, $urandom, $urandom};
      k = {$urandom, $urandom, $urandom, $urandom};
      g = r_rand_gk();
      encrypt(p, k, g, r_encrypt(p, k));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
