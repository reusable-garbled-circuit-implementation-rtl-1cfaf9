// gc_m3: garbled multiply by 0x03 in GF(2^8) (G(B(m3)) / G(R(m3))).
//
// x*3 = x*2 xor x. First level, in the input colour: gc_m2 gives x*2 and a garbled XOR with
// the garbled 0 copies x; both come out in the other colour. Second level, in that colour:
// one garbled XOR of the two. The result is back in the input colour, which is how the
// document's mix-columns figure feeds G(B(m3)) straight into a blue XOR. The two-level build is
// this design's reading of that diagram. Combinational.
module gc_m3
  import gc_pkg::*;
#(
  parameter color_e COLOR = BLUE
) (
  input  gbyte_t x,
  input  gkey_t  keys,
  output gbyte_t y
);

  gbyte_t x2, xc, zeros;

  always_comb
    for (int i = 0; i < 8; i++) zeros[i] = key0(keys, COLOR);

  gc_m2  #(.COLOR(COLOR))                u_m2   (.x(x), .keys(keys), .y(x2));
  gc_xor #(.WIDTH(8), .COLOR(COLOR))     u_copy (.a(x), .b(zeros), .keys(keys), .y(xc));
  gc_xor #(.WIDTH(8), .COLOR(other(COLOR))) u_sum (.a(x2), .b(xc), .keys(keys), .y(y));

endmodule
