// tb_gc_gate: checks every gate function in both colours for all four input combinations over
// random garbling keys (output must be the other colour's key of g(a, b)), and that a wrong
// input label almost never decrypts to a valid output key.
module tb_gc_gate;
  import gc_pkg::*;
  import tb_ref_pkg::*;

  int checks = 0, failures = 0;
  logic [31:0] gk;
  label_t in1, in2;
  label_t out [2][3];   // [colour][function]

  for (genvar c = 0; c < 2; c++) begin : g_c
    for (genvar f = 0; f < 3; f++) begin : g_f
      gc_gate #(.FUNC(gate_fn_e'(f)), .COLOR(color_e'(c)), .IDX(7*f + c)) dut (
        .in1(in1), .in2(in2), .keys(gkey_t'(gk)), .out(out[c][f]));
    end
  end

  function automatic logic ref_fn(int f, logic a, logic b);
    return (f == 0) ? (a & b) : (f == 1) ? (a | b) : (a ^ b);
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int flagged = 0, tried = 0;
    for (int n = 0; n < 200; n++) begin
      gk = (n == 0) ? 32'h11223344 : r_rand_gk();
      for (int c = 0; c < 2; c++)
        for (int v = 0; v < 4; v++) begin
          in1 = r_lbl(gk, c[0], v[1]);
          in2 = r_lbl(gk, c[0], v[0]);
          #1;
          for (int f = 0; f < 3; f++) begin
            checks++;
            if (out[c][f] !== r_lbl(gk, !c[0], ref_fn(f, v[1], v[0]))) begin
              failures++;
              if (failures < 10) $display("FAIL c=%0d f=%0d v=%0d gk=%h out=%h", c, f, v, gk, out[c][f]);
            end
          end
        end
      // wrong label on in1: the result must not be a valid output key
      for (int c = 0; c < 2; c++) begin
        do in1 = 8'($urandom); while (in1 == r_lbl(gk, c[0], 0) || in1 == r_lbl(gk, c[0], 1));
        in2 = r_lbl(gk, c[0], $urandom_range(0, 1));
        #1;
        for (int f = 0; f < 3; f++) begin
          tried++;
          if (out[c][f] != r_lbl(gk, !c[0], 0) && out[c][f] != r_lbl(gk, !c[0], 1)) flagged++;
        end
      end
    end
    checks++;
    if (flagged * 100 < tried * 95) begin
      failures++;
      $display("FAIL only %0d of %0d wrong labels gave an invalid output", flagged, tried);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
