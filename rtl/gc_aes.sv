// gc_aes: AES-128 encryption on a garbled state, built from red and blue garbled gates.
//
// The user's plaintext and key enter in plain and are garbled inside: every state bit becomes
// an 8-bit label taken from a 32-bit garbling key gk (k1/k2 = blue 0/1, k3/k4 = red 0/1).
// The state register therefore holds 16 x 64 bits. Each round alternates colour:
//   SUB   blue state -> garbled S-box and row shift -> blue              (16 S-box units)
//   MIX   blue -> gc_mixcol (m2, m3 and XORs as blue/red levels) -> red  (one column per step)
//   ARK   red m + round key garbled red -> G(R(xor)) -> blue state s
// The initial key addition reuses the same G(R(xor)) array, with plaintext and cipher key
// garbled red. The last round (S-box, row shift, key addition) adds the round key garbled blue
// through a G(B(xor)) array; its red result is ungarbled with k3/k4 into the ciphertext. A
// label that matches neither red key sets label_err.
//
// Round keys are computed in plain, one per round (aes_key_expand), and garbled where used.
// gk is latched at start and must have k1 != k2 and k3 != k4; a new gk per block changes
// every label and table in the core without changing the ciphertext.
//
// Timing: start is taken when idle; the controller then runs 57 steps, one per clock, and
// done pulses on the 58th clock after start with ciphertext and label_err valid until the
// next result. Garbled gates, blue/red alternation, the Mix-Columns structure, garbling the
// round key red and reusing the Mix-Columns unit come from the original design; the initial key
// addition in red, the plain key schedule, the handshake and the final-round colouring are
// this design's choices (the original description of the last round differs, see README).
module gc_aes
  import gc_pkg::*;
#(
  parameter int unsigned NROUNDS = 10
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [127:0] plaintext,
  input  logic [127:0] key,
  input  logic [GK_W-1:0] gk,
  output logic [127:0] ciphertext,
  output logic         done,
  output logic         busy,
  output logic         label_err
);

  phase_e     phase;
  logic [3:0] round;
  logic [1:0] col;

  gc_aes_fsm #(.NROUNDS(NROUNDS)) u_fsm (
    .clk, .rst_n, .start, .phase, .round, .col, .busy, .done
  );

  // ---------------------------------------------------------------- registers
  gkey_t          gk_q;
  logic [127:0]   pt_q, rk_q, ct_q;
  logic [7:0]     rcon_q;
  label_t [127:0] st_q;   // blue: state at the start of a round
  label_t [127:0] sb_q;   // blue: after S-box and row shift
  label_t [127:0] m_q;    // red:  after Mix-Columns
  logic           err_q;

  // ---------------------------------------------------------------- garbling of inputs
  label_t [127:0] pt_red, rk_red, rk_blue;

  gc_encode #(.WIDTH(128), .COLOR(RED))  u_enc_pt (.d(pt_q), .keys(gk_q), .y(pt_red));
  gc_encode #(.WIDTH(128), .COLOR(RED))  u_enc_rk (.d(rk_q), .keys(gk_q), .y(rk_red));
  gc_encode #(.WIDTH(128), .COLOR(BLUE)) u_enc_rf (.d(rk_q), .keys(gk_q), .y(rk_blue));

  // ---------------------------------------------------------------- key schedule
  logic [127:0] rk_next;
  logic [7:0]   rcon_next;

  aes_key_expand u_kexp (.key_in(rk_q), .rcon(rcon_q), .key_out(rk_next), .rcon_next);

  // ---------------------------------------------------------------- S-box and row shift
  label_t [127:0] sub_out, shift_out;

  for (genvar i = 0; i < 16; i++) begin : g_sbox
    gc_sbox u_sbox (.x(st_q[127-8*i -: 8]), .keys(gk_q), .y(sub_out[127-8*i -: 8]));
  end

  // Byte (row r, column c) takes byte (r, c + r mod 4); byte index = 4*c + r.
  always_comb
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        shift_out[127-8*(4*c+r) -: 8] = sub_out[127-8*(4*((c+r)%4)+r) -: 8];

  // ---------------------------------------------------------------- Mix-Columns, one column
  gbyte_t [3:0] mc_in, mc_out;

  always_comb
    for (int r = 0; r < 4; r++) mc_in[r] = sb_q[127-8*(4*int'(col)+r) -: 8];

  gc_mixcol u_mix (.a(mc_in), .keys(gk_q), .m(mc_out));

  // ---------------------------------------------------------------- key additions
  label_t [127:0] ark_a, ark_out, fin_out;
  logic   [127:0] fin_plain;
  logic           fin_err;

  assign ark_a = (phase == PH_WHITEN) ? pt_red : m_q;

  gc_xor    #(.WIDTH(128), .COLOR(RED))  u_ark (.a(ark_a), .b(rk_red), .keys(gk_q), .y(ark_out));
  gc_xor    #(.WIDTH(128), .COLOR(BLUE)) u_fin (.a(sb_q), .b(rk_blue), .keys(gk_q), .y(fin_out));
  gc_decode #(.WIDTH(128), .COLOR(RED))  u_dec (.x(fin_out), .keys(gk_q), .d(fin_plain), .err(fin_err));

  // ---------------------------------------------------------------- sequencing
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gk_q   <= '0;
      pt_q   <= '0;
      rk_q   <= '0;
      rcon_q <= '0;
      st_q   <= '0;
      sb_q   <= '0;
      m_q    <= '0;
      ct_q   <= '0;
      err_q  <= 1'b0;
    end else begin
      unique case (phase)
        PH_IDLE: if (start) begin
          gk_q   <= gkey_t'(gk);
          pt_q   <= plaintext;
          rk_q   <= key;
          rcon_q <= 8'h01;
        end
        PH_WHITEN, PH_ARK: begin
          st_q   <= ark_out;
          rk_q   <= rk_next;
          rcon_q <= rcon_next;
        end
        PH_SUB:   sb_q <= shift_out;
        PH_MIX:
          for (int r = 0; r < 4; r++) m_q[127-8*(4*int'(col)+r) -: 8] <= mc_out[r];
        PH_FINAL: begin
          ct_q  <= fin_plain;
          err_q <= fin_err;
        end
        default: ;
      endcase
    end
  end

  assign ciphertext = ct_q;
  assign label_err  = err_q;

  // The final round runs in round NROUNDS and only there.
  a_final_round: assert property (@(posedge clk) disable iff (!rst_n)
                                  (phase == PH_FINAL) |-> (round == 4'(NROUNDS)));

  // The garbling key must give two distinct labels per colour.
  a_gk_ok: assert property (@(posedge clk) disable iff (!rst_n)
                            (phase == PH_IDLE && start) |-> gkey_ok(gkey_t'(gk)));

endmodule
