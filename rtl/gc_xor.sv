// gc_xor: bitwise garbled XOR of two vectors of labels (G(B(xor)) when COLOR is BLUE,
// G(R(xor)) when RED). One garbled gate per bit; the result is in the other colour.
// The module and its two colours are the original design's; the width parameter is this design's.
// Combinational.
module gc_xor
  import gc_pkg::*;
#(
  parameter int unsigned WIDTH = 8,
  parameter color_e      COLOR = BLUE
) (
  input  label_t [WIDTH-1:0] a,
  input  label_t [WIDTH-1:0] b,
  input  gkey_t              keys,
  output label_t [WIDTH-1:0] y
);

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    gc_gate #(.FUNC(GATE_XOR), .COLOR(COLOR), .IDX(i)) u_gate (
      .in1(a[i]), .in2(b[i]), .keys(keys), .out(y[i])
    );
  end

endmodule
