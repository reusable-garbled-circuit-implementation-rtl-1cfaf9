// gc_top: top level. The garbled AES-128 core and the garbled sample circuit
// E = (A AND B) XOR (B OR C) stand side by side, each with its own ports and its own garbling
// key input. They share only the clock domain (the sample circuit is combinational).
// Ports of the AES core: see gc_aes (start/done handshake, 58 clocks per block). Ports of the
// sample circuit: three blue input labels, the plain result and a label-error flag.
module gc_top (
  input  logic         clk,
  input  logic         rst_n,
  // garbled AES core
  input  logic         aes_start,
  input  logic [127:0] aes_plaintext,
  input  logic [127:0] aes_key,
  input  logic [31:0]  aes_gk,
  output logic [127:0] aes_ciphertext,
  output logic         aes_done,
  output logic         aes_busy,
  output logic         aes_label_err,
  // garbled sample circuit
  input  logic [7:0]   smp_a_g,
  input  logic [7:0]   smp_b_g,
  input  logic [7:0]   smp_c_g,
  input  logic [31:0]  smp_gk,
  output logic         smp_e,
  output logic         smp_e_err
);

  gc_aes u_aes (
    .clk, .rst_n,
    .start(aes_start), .plaintext(aes_plaintext), .key(aes_key), .gk(aes_gk),
    .ciphertext(aes_ciphertext), .done(aes_done), .busy(aes_busy), .label_err(aes_label_err)
  );

  gc_sample_circuit u_sample (
    .a_g(smp_a_g), .b_g(smp_b_g), .c_g(smp_c_g), .gk(smp_gk), .e(smp_e), .e_err(smp_e_err)
  );

endmodule
