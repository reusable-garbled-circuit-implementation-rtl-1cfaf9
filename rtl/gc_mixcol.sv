// gc_mixcol: garbled AES Mix-Columns of one state column.
//
// In: the four bytes a0..a3 of a column, garbled blue (k1/k2). Out: the four bytes m0..m3,
// garbled red (k3/k4). Output byte r is 2*a[r] ^ 3*a[r+1] ^ a[r+2] ^ a[r+3] (indices mod 4),
// built exactly as the original design draws the first output byte:
//   G(B(m2))(a[r]) and G(B(xor))(a[r+2], a[r+3])  -> red
//   G(R(xor)) of those two                          -> blue
//   G(B(xor)) of that and G(B(m3))(a[r+1])          -> red = m[r]
// The coefficient pattern is the FIPS-197 matrix. One instance serves all four columns of the
// state in turn (the controller steps the column), which is the original design's reuse of the
// multipliers. Combinational.
module gc_mixcol
  import gc_pkg::*;
(
  input  gbyte_t [3:0] a,
  input  gkey_t        keys,
  output gbyte_t [3:0] m
);

  for (genvar r = 0; r < 4; r++) begin : g_row
    gbyte_t t2, tx, tr, t3;

    gc_m2  #(.COLOR(BLUE))            u_m2  (.x(a[r]), .keys(keys), .y(t2));
    gc_xor #(.WIDTH(8), .COLOR(BLUE)) u_x23 (.a(a[(r+2)%4]), .b(a[(r+3)%4]), .keys(keys), .y(tx));
    gc_xor #(.WIDTH(8), .COLOR(RED))  u_rx  (.a(t2), .b(tx), .keys(keys), .y(tr));
    gc_m3  #(.COLOR(BLUE))            u_m3  (.x(a[(r+1)%4]), .keys(keys), .y(t3));
    gc_xor #(.WIDTH(8), .COLOR(BLUE)) u_out (.a(tr), .b(t3), .keys(keys), .y(m[r]));
  end

endmodule
