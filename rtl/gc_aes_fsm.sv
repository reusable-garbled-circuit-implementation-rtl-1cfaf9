// gc_aes_fsm: controller of the garbled AES core.
//
// One block walks WHITEN (initial key addition), then for rounds 1..NROUNDS-1 SUB (S-box and
// row shift), MIX for columns 0..3 (one shared Mix-Columns unit, one column per cycle) and ARK
// (round-key addition), then SUB and FINAL for the last round: 1 + 6*(NROUNDS-1) + 2 steps,
// 57 for AES-128. The phase, round number and column drive the datapath's multiplexers and
// register enables, so each garbled unit is instantiated once and reused in different steps.
//
// Interface: start is sampled in PH_IDLE only. done pulses for one cycle after PH_FINAL, when
// the core's result register holds the ciphertext; busy is high from the cycle after start
// until that pulse. Ten rounds and reuse of the multipliers across steps are the original design's;
// the exact step list, the counters and the handshake are this design's.
module gc_aes_fsm
  import gc_pkg::*;
#(
  parameter int unsigned NROUNDS = 10
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  output phase_e     phase,
  output logic [3:0] round,   // 0 in WHITEN, 1..NROUNDS after
  output logic [1:0] col,     // column handled in PH_MIX
  output logic       busy,
  output logic       done
);

  phase_e     ph_q;
  logic [3:0] rnd_q;
  logic [1:0] col_q;
  logic       done_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ph_q   <= PH_IDLE;
      rnd_q  <= '0;
      col_q  <= '0;
      done_q <= 1'b0;
    end else begin
      done_q <= 1'b0;
      unique case (ph_q)
        PH_IDLE: if (start) begin
          ph_q  <= PH_WHITEN;
          rnd_q <= '0;
        end
        PH_WHITEN: begin
          ph_q  <= PH_SUB;
          rnd_q <= 4'd1;
        end
        PH_SUB: begin
          ph_q  <= (rnd_q == 4'(NROUNDS)) ? PH_FINAL : PH_MIX;
          col_q <= '0;
        end
        PH_MIX: begin
          col_q <= col_q + 2'd1;
          if (col_q == 2'd3) ph_q <= PH_ARK;
        end
        PH_ARK: begin
          ph_q  <= PH_SUB;
          rnd_q <= rnd_q + 4'd1;
        end
        PH_FINAL: begin
          ph_q   <= PH_IDLE;
          done_q <= 1'b1;
        end
        default: ph_q <= PH_IDLE;
      endcase
    end
  end

  assign phase = ph_q;
  assign round = rnd_q;
  assign col   = col_q;
  assign busy  = (ph_q != PH_IDLE);
  assign done  = done_q;

endmodule
