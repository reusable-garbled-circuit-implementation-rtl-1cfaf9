// tb_gc_top: end-to-end test of the top level at its default parameters.
// AES side: FIPS-197 vectors and random blocks, back to back, with a fresh garbling key for
// each block, one block where start is held high while busy, and the reference model as the
// judge. Sample-circuit side: all input combinations and corrupted labels, exercised while the
// AES core is running. Each mechanism the design has is counted and must occur at least once:
// whitening through the shared red XOR array, S-box steps, each of the four column steps of
// the shared Mix-Columns unit, round-key additions, final rounds, garbling-key changes between
// blocks, starts ignored while busy, and label errors caught by the ungarbler.
module tb_gc_top;
  import gc_pkg::*;
  import tb_ref_pkg::*;

  int checks = 0, failures = 0;
  logic         clk = 0, rst_n = 0;
  logic         aes_start = 0;
  logic [127:0] aes_plaintext = '0, aes_key = '0, aes_ciphertext;
  logic [31:0]  aes_gk = '0, smp_gk = 32'h01020304;
  logic         aes_done, aes_busy, aes_label_err;
  logic [7:0]   smp_a_g = 0, smp_b_g = 0, smp_c_g = 0;
  logic         smp_e, smp_e_err;

  gc_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- mechanism counters
  int n_whiten = 0, n_sub = 0, n_ark = 0, n_final = 0, n_gk_change = 0, n_start_ignored = 0;
  int n_smp_err = 0, n_smp_ok = 0;
  int n_col [4] = '{0, 0, 0, 0};
  logic [31:0] last_gk = '0;

  always @(posedge clk) if (rst_n) begin
    case (dut.u_aes.u_fsm.phase)
      PH_WHITEN: n_whiten++;
      PH_SUB:    n_sub++;
      PH_MIX:    n_col[dut.u_aes.u_fsm.col]++;
      PH_ARK:    n_ark++;
      PH_FINAL:  n_final++;
      default: ;
    endcase
    if (aes_start && aes_busy) n_start_ignored++;
  end

  task automatic chk(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic encrypt(logic [127:0] p, logic [127:0] k, logic [31:0] g, logic [127:0] exp,
                         bit hold_start);
    int cyc = 0;
    @(negedge clk);
    aes_plaintext = p; aes_key = k; aes_gk = g; aes_start = 1;
    if (g != last_gk) n_gk_change++;
    last_gk = g;
    @(negedge clk);
    cyc = 1;
    aes_start = hold_start;
    aes_plaintext = ~p;             // a second start while busy would pick these up
    while (!aes_done && cyc < 200) begin @(negedge clk); cyc++; end
    aes_start = 0;
    chk($sformatf("latency %0d == 58", cyc), cyc == 58);
    chk($sformatf("ciphertext %h expected %h", aes_ciphertext, exp), aes_ciphertext == exp);
    chk("label_err low", !aes_label_err);
  endtask

  // ---------------------------------------------------------------- sample circuit, in parallel
  initial begin
    @(posedge rst_n);
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      smp_gk = r_rand_gk();
      if (n % 5 == 4) begin
        do smp_a_g = 8'($urandom); while (smp_a_g == smp_gk[31:24] || smp_a_g == smp_gk[23:16]);
        smp_b_g = r_lbl(smp_gk, 0, 1'($urandom));
        smp_c_g = r_lbl(smp_gk, 0, 1'($urandom));
        #1;
        if (smp_e_err) n_smp_err++;
      end else begin
        logic [2:0] v;
        v = 3'($urandom);
        smp_a_g = r_lbl(smp_gk, 0, v[2]); smp_b_g = r_lbl(smp_gk, 0, v[1]); smp_c_g = r_lbl(smp_gk, 0, v[0]);
        #1;
        chk("sample circuit", smp_e == ((v[2] & v[1]) ^ (v[1] | v[0])) && !smp_e_err);
        n_smp_ok++;
      end
    end
  end

  initial begin
    logic [127:0] p, k;
    repeat (3) @(negedge clk);
    rst_n = 1;
    encrypt(128'h00112233445566778899aabbccddeeff, 128'h000102030405060708090a0b0c0d0e0f,
            32'h9e3779b9, 128'h69c4e0d86a7b0430d8cdb78070b4c55a, 0);
    encrypt(128'h3243f6a8885a308d313198a2e0370734, 128'h2b7e151628aed2a6abf7158809cf4f3c,
            32'h7f4a7c15, 128'h3925841d02dc09fbdc118597196a0b32, 1);
    for (int n = 0; n < 6; n++) begin
      p = {$urandom, $urandom, $urandom, $urandom};
      k = {$urandom, $urandom, $urandom, $urandom};
      encrypt(p, k, r_rand_gk(), r_encrypt(p, k), 0);
    end
    repeat (5) @(negedge clk);

    $display("mechanisms: whiten=%0d sub=%0d col0..3=%0d/%0d/%0d/%0d ark=%0d final=%0d gk_change=%0d start_ignored=%0d smp_ok=%0d smp_err=%0d",
             n_whiten, n_sub, n_col[0], n_col[1], n_col[2], n_col[3], n_ark, n_final,
             n_gk_change, n_start_ignored, n_smp_ok, n_smp_err);
    chk("whitening happened", n_whiten > 0);
    chk("S-box steps happened", n_sub > 0);
    for (int c = 0; c < 4; c++) chk($sformatf("mix column %0d happened", c), n_col[c] > 0);
    chk("round-key additions happened", n_ark > 0);
    chk("final rounds happened", n_final > 0);
    chk("garbling key changed between blocks", n_gk_change > 1);
    chk("start ignored while busy", n_start_ignored > 0);
    chk("sample circuit evaluated", n_smp_ok > 0);
    chk("label errors caught", n_smp_err > 0);
    chk("step counts agree", n_sub == 10 * n_final && n_ark == 9 * n_final && n_col[3] == 9 * n_final);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
