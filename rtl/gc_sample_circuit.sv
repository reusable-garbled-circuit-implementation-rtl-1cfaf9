// gc_sample_circuit: the garbled form of E = (A AND B) XOR (B OR C).
//
// A, B and C arrive as blue labels (k1 = 0, k2 = 1). A blue AND gate and a blue OR gate give
// red labels (k3/k4); a red XOR gate returns a blue label, which is ungarbled with k1/k2 into
// the plain bit e. e_err is set when that label equals neither blue key, e.g. when an input
// label was not a valid blue key. The gates, their colours and the final ungarble stage are the
// document's example of the red/blue scheme. Combinational.
module gc_sample_circuit
  import gc_pkg::*;
(
  input  label_t a_g,
  input  label_t b_g,
  input  label_t c_g,
  input  logic [31:0] gk,
  output logic   e,
  output logic   e_err
);

  gkey_t  keys;
  label_t ab, bc, eg;

  assign keys = gkey_t'(gk);

  gc_gate #(.FUNC(GATE_AND), .COLOR(BLUE), .IDX(0)) u_and (.in1(a_g), .in2(b_g), .keys(keys), .out(ab));
  gc_gate #(.FUNC(GATE_OR),  .COLOR(BLUE), .IDX(1)) u_or  (.in1(b_g), .in2(c_g), .keys(keys), .out(bc));
  gc_gate #(.FUNC(GATE_XOR), .COLOR(RED),  .IDX(2)) u_xor (.in1(ab),  .in2(bc),  .keys(keys), .out(eg));

  gc_decode #(.WIDTH(1), .COLOR(BLUE)) u_ungarble (.x(eg), .keys(keys), .d(e), .err(e_err));

endmodule
