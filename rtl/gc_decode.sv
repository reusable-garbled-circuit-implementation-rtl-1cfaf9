// gc_decode: ungarbles a vector of labels of one colour. Bit i is 1 when label i equals the
// colour's '1' key (k2 or k4). err is set when any label equals neither key, which is what a
// wrong garbling key or a corrupted label produces. The ungarble step is the original design's; the
// error flag is this design's addition. Combinational.
module gc_decode
  import gc_pkg::*;
#(
  parameter int unsigned WIDTH = 128,
  parameter color_e      COLOR = RED
) (
  input  label_t [WIDTH-1:0] x,
  input  gkey_t              keys,
  output logic   [WIDTH-1:0] d,
  output logic               err
);

  always_comb begin
    err = 1'b0;
    for (int i = 0; i < WIDTH; i++) begin
      d[i] = (x[i] == key1(keys, COLOR));
      if (x[i] != key1(keys, COLOR) && x[i] != key0(keys, COLOR)) err = 1'b1;
    end
  end

endmodule
