// gc_m2: garbled multiply by 0x02 in GF(2^8) (G(B(m2)) / G(R(m2))).
//
// x*2 = (x << 1) xor (x[7] ? 0x1b : 0). Every output bit is one garbled XOR of two labels:
// the shifted-in bit (or the garbled 0 for bit 0) and x[7] where 0x1b has a one (bits 0, 1,
// 3, 4) or the garbled 0 elsewhere. So the byte passes one gate level and leaves in the other
// colour, as every garbled gate does. Building the multiplier from garbled XOR gates and
// shifts is the original design's; the exact operand pairing is this design's. Combinational.
module gc_m2
  import gc_pkg::*;
#(
  parameter color_e COLOR = BLUE
) (
  input  gbyte_t x,
  input  gkey_t  keys,
  output gbyte_t y
);

  gbyte_t a, b;
  label_t z;

  always_comb begin
    z = key0(keys, COLOR);
    for (int i = 0; i < 8; i++) begin
      a[i] = (i == 0) ? z : x[(i == 0) ? 0 : i-1];
      b[i] = (i == 0 || i == 1 || i == 3 || i == 4) ? x[7] : z;
    end
  end

  gc_xor #(.WIDTH(8), .COLOR(COLOR)) u_xor (.a(a), .b(b), .keys(keys), .y(y));

endmodule
