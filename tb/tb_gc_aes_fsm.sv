// tb_gc_aes_fsm: runs the controller through blocks and compares every cycle's phase, round
// and column with a step list built here from the AES round structure (whitening, nine rounds
// of sub / four columns / key add, final sub and key add). Checks the 57-step length, the
// done pulse one clock after the last step, busy, and that start is ignored while busy.
module tb_gc_aes_fsm;
  import gc_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0;
  phase_e phase;
  logic [3:0] round;
  logic [1:0] col;
  logic busy, done;

  gc_aes_fsm dut (.clk, .rst_n, .start, .phase, .round, .col, .busy, .done);

  always #5 clk = ~clk;

  initial begin
    #20000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  phase_e     exp_ph [$];
  int         exp_rd [$];
  int         exp_cl [$];

  task automatic push(phase_e p, int r, int c);
    exp_ph.push_back(p); exp_rd.push_back(r); exp_cl.push_back(c);
  endtask

  task automatic chk(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    push(PH_WHITEN, 0, -1);
    for (int r = 1; r <= 9; r++) begin
      push(PH_SUB, r, -1);
      for (int c = 0; c < 4; c++) push(PH_MIX, r, c);
      push(PH_ARK, r, -1);
    end
    push(PH_SUB, 10, -1);
    push(PH_FINAL, 10, -1);
    chk("step count", exp_ph.size() == 57);

    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    chk("idle after reset", phase == PH_IDLE && !busy && !done);
    for (int blk = 0; blk < 3; blk++) begin
      @(negedge clk);
      start = 1;
      @(negedge clk);
      start = (blk == 1);          // hold start high during block 1: must be ignored
      for (int i = 0; i < exp_ph.size(); i++) begin
        chk($sformatf("phase step %0d", i), phase == exp_ph[i]);
        chk($sformatf("round step %0d", i), int'(round) == exp_rd[i]);
        if (exp_cl[i] >= 0) chk($sformatf("col step %0d", i), int'(col) == exp_cl[i]);
        chk("busy", busy);
        chk("no early done", !done);
        @(negedge clk);
      end
      start = 0;
      chk("done pulse 58 clocks after start", done && phase == PH_IDLE && !busy);
      @(negedge clk);
      chk("done is one cycle", !done);
      repeat (3) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
