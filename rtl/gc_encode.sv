// gc_encode: garbles a vector of plain bits. Bit i becomes the colour's '0' key (k1 or k3) or
// '1' key (k2 or k4). Garbling the user's inputs inside the device is the original design's scheme;
// the module boundary is this design's. Combinational.
module gc_encode
  import gc_pkg::*;
#(
  parameter int unsigned WIDTH = 128,
  parameter color_e      COLOR = BLUE
) (
  input  logic   [WIDTH-1:0] d,
  input  gkey_t              keys,
  output label_t [WIDTH-1:0] y
);

  always_comb
    for (int i = 0; i < WIDTH; i++)
      y[i] = d[i] ? key1(keys, COLOR) : key0(keys, COLOR);

endmodule
