// gc_gate: one garbled two-input gate (AND, OR or XOR) of either colour.
//
// A blue gate reads labels garbled with k1 (0) / k2 (1) and writes a label garbled with
// k3 (0) / k4 (1); a red gate reads k3/k4 and writes k1/k2. The gate holds a garbled table of
// four rows, built from the keys as in Yao's construction: row (va, vb) is
// H(key_va | key_vb | IDX) xor outkey(g(va, vb)). Evaluation selects the row whose input keys
// match the labels on in1/in2 and removes the hash of those labels, which returns the output
// key of g(va, vb). A label that is neither key of its colour therefore produces a label that
// is (almost always) neither output key, so the ungarbler can flag it.
//
// The garbled table and the blue/red colour scheme follow the original design. Row selection by
// comparing a label with the '1' key (instead of point-and-permute pointer bits, which 8-bit
// keys do not carry) and the hash function are this design's choices.
// Purely combinational; keys must be stable while the gate is used.
module gc_gate
  import gc_pkg::*;
#(
  parameter gate_fn_e    FUNC  = GATE_XOR,
  parameter color_e      COLOR = BLUE,
  parameter int unsigned IDX   = 0
) (
  input  label_t in1,
  input  label_t in2,
  input  gkey_t  keys,
  output label_t out
);

  label_t   ik [2];       // input keys of this colour, index = bit value
  label_t   ok [2];       // output keys of the other colour
  label_t   table_e [2][2];
  logic     va, vb;

  always_comb begin
    ik[0] = key0(keys, COLOR);
    ik[1] = key1(keys, COLOR);
    ok[0] = key0(keys, other(COLOR));
    ok[1] = key1(keys, other(COLOR));
    // Garbler side: the four table rows.
    for (int a = 0; a < 2; a++)
      for (int b = 0; b < 2; b++)
        table_e[a][b] = gc_hash(ik[a], ik[b], IDX) ^ ok[gate_eval(FUNC, a[0], b[0])];
    // Evaluator side: locate the row and decrypt it with the labels actually present.
    va  = (in1 == ik[1]);
    vb  = (in2 == ik[1]);
    out = gc_hash(in1, in2, IDX) ^ table_e[va][vb];
  end

endmodule
