// tb_gc_dpa_set: the experiment set of the power-analysis study, run on the core.
//
// Ten random plaintexts are encrypted under five key pairs: (K1, gk1), (K2, gk1), (K3, gk1),
// (K1, gk2) and (K1, gk3), where K2 differs from K1 in bit 108, K3 in bits 108 and 126, gk2
// from gk1 in its least significant bit and gk3 from gk1 in three bits. Every ciphertext must
// be plain AES. For each run the testbench records a switching-activity trace, the number of
// state-register bits that toggle in each clock (a stand-in for dynamic power), and the
// selection bit b = bit 96 of the state after round 1, which must match the reference model.
// Traces are split into set 0 / set 1 by b under (K1, gk1); differential traces and their
// differences are formed as in a DPA and their peaks printed. Checked: the same run repeated
// gives the same trace, and a one-bit change of the garbling key changes the activity trace
// of the same plaintext and key while leaving the ciphertext unchanged.
module tb_gc_dpa_set;
  import gc_pkg::*;
  import tb_ref_pkg::*;

  localparam int M = 10;          // plaintexts per experiment
  localparam int T = 60;          // samples per trace

  int checks = 0, failures = 0;
  logic         clk = 0, rst_n = 0, start = 0;
  logic [127:0] pt = '0, key = '0, ct;
  logic [31:0]  gk = '0;
  logic         done, busy, lerr;

  gc_aes dut (.clk, .rst_n, .start, .plaintext(pt), .key(key), .gk(gk),
              .ciphertext(ct), .done, .busy, .label_err(lerr));

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  typedef int trace_t [T];

  // One encryption; returns its activity trace and the selection bit.
  task automatic run(logic [127:0] p, logic [127:0] k, logic [31:0] g,
                     output trace_t tr, output logic b);
    logic [3071:0] prev, cur;
    logic [127:0] r1;
    bit ok;
    for (int i = 0; i < T; i++) tr[i] = 0;
    b = 0;
    @(negedge clk);
    pt = p; key = k; gk = g; start = 1;
    prev = {dut.st_q, dut.sb_q, dut.m_q};
    for (int i = 0; i < T; i++) begin
      @(negedge clk);
      start = 0;
      cur   = {dut.st_q, dut.sb_q, dut.m_q};
      tr[i] = $countones(cur ^ prev);
      prev  = cur;
      if (dut.u_fsm.phase == PH_SUB && dut.u_fsm.round == 4'd2) begin
        for (int j = 0; j < 16; j++) r1[127-8*j -: 8] = r_ungbyte(g, 0, dut.st_q[127-8*j -: 8], ok);
        b = r1[96];
        chk("round-1 state", r1 == r_encrypt(p, k, 1));
      end
      if (done) chk("ciphertext", ct == r_encrypt(p, k) && !lerr);
    end
    chk("block finished within the trace", !busy);
  endtask

  function automatic real peak(real d [T]);
    real m = 0;
    for (int i = 0; i < T; i++) if ((d[i] < 0 ? -d[i] : d[i]) > m) m = (d[i] < 0 ? -d[i] : d[i]);
    return m;
  endfunction

  // Differential trace: mean of set 1 minus mean of set 0.
  function automatic void diff_trace(trace_t trs [M], logic sel [M], output real d [T]);
    real s0, s1;
    int n0, n1;
    for (int i = 0; i < T; i++) begin
      s0 = 0; s1 = 0; n0 = 0; n1 = 0;
      for (int m = 0; m < M; m++)
        if (sel[m]) begin s1 += trs[m][i]; n1++; end else begin s0 += trs[m][i]; n0++; end
      d[i] = (n1 ? s1 / n1 : 0) - (n0 ? s0 / n0 : 0);
    end
  endfunction

  initial begin
    logic [127:0] pts [M];
    logic [127:0] k1, k2, k3;
    logic [31:0]  g1, g2, g3;
    trace_t       tr [5][M];
    logic         bsel [5][M];
    trace_t       again;
    logic         bagain;
    real          d [5][T], dd [T];
    string        names [5] = '{"K1,gk1", "K2,gk1", "K3,gk1", "K1,gk2", "K1,gk3"};
    logic [127:0] keys [5];
    logic [31:0]  gks [5];
    int           nset1 = 0, ndiff;

    k1 = 128'h2b7e151628aed2a6abf7158809cf4f3c;
    k2 = k1 ^ (128'd1 << 108);
    k3 = k1 ^ (128'd1 << 108) ^ (128'd1 << 126);
    g1 = 32'hc3a55a3c;
    g2 = g1 ^ 32'h1;
    g3 = g1 ^ 32'h00410800;
    keys = '{k1, k2, k3, k1, k1};
    gks  = '{g1, g1, g1, g2, g3};
    for (int m = 0; m < M; m++) pts[m] = {$urandom, $urandom, $urandom, $urandom};

    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int e = 0; e < 5; e++)
      for (int m = 0; m < M; m++) run(pts[m], keys[e], gks[e], tr[e][m], bsel[e][m]);

    // repeatability: two runs, each preceded by the same block (registers keep history)
    run(pts[0], k1, g1, again, bagain);
    run(pts[0], k1, g1, again, bagain);
    begin
      trace_t first;
      logic   bfirst;
      first  = again;
      bfirst = bagain;
      run(pts[0], k1, g1, again, bagain);
      ndiff = 0;
      for (int i = 0; i < T; i++) if (again[i] != first[i]) ndiff++;
      ndiff += (bagain != bfirst);
    end
    chk("identical runs give identical traces", ndiff == 0 && bagain == bsel[0][0]);

    // a one-bit garbling-key change alters activity, not the result
    for (int m = 0; m < M; m++) begin
      ndiff = 0;
      for (int i = 0; i < T; i++) if (tr[3][m][i] != tr[0][m][i]) ndiff++;
      chk($sformatf("gk2 changes the activity trace of plaintext %0d", m), ndiff > 0);
    end

    // sets from (K1, gk1), used for every experiment as in the study
    for (int m = 0; m < M; m++) nset1 += bsel[0][m];
    $display("selection bit b under (K1,gk1): %0d of %0d traces in set 1", nset1, M);
    for (int e = 0; e < 5; e++) diff_trace(tr[e], bsel[0], d[e]);
    for (int e = 1; e < 5; e++) begin
      for (int i = 0; i < T; i++) dd[i] = d[e][i] - d[0][i];
      $display("peak of differential(%s) - differential(K1,gk1): %0.2f toggles", names[e], peak(dd));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
