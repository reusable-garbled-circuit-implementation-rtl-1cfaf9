// gc_pkg: types, constants and helper functions shared by the garbled AES design.
//
// A garbled wire carries an 8-bit label instead of a bit. A 32-bit garbling key is split into
// four 8-bit keys: k1/k2 encode 0/1 on "blue" wires, k3/k4 encode 0/1 on "red" wires. A blue
// gate takes blue labels and returns red ones; a red gate does the reverse, so a circuit whose
// gate levels alternate colour never needs a conversion. The 8-bit key width and the four-way
// split are the original design's; the bit order of the split (k1 in the top byte) is this design's.
//
// The package also holds the label hash used by the garbled gate tables (the original design names a
// hash H but does not define it, so this one is the design's own), GF(2^8) helpers and the AES
// S-box, generated at elaboration from its definition (inverse in GF(2^8), then the affine map).
package gc_pkg;

  localparam int unsigned LABEL_W = 8;   // width of one garbling key / wire label
  localparam int unsigned GK_W    = 32;  // whole garbling key: four labels

  typedef logic [LABEL_W-1:0] label_t;

  // Garbling key set; gk[31:24] = k1 ... gk[7:0] = k4 when cast from a 32-bit vector.
  typedef struct packed {
    label_t k1;  // blue 0
    label_t k2;  // blue 1
    label_t k3;  // red 0
    label_t k4;  // red 1
  } gkey_t;

  // Colour of a gate = colour of the labels on its inputs.
  typedef enum logic { BLUE = 1'b0, RED = 1'b1 } color_e;

  typedef enum logic [1:0] { GATE_AND = 2'd0, GATE_OR = 2'd1, GATE_XOR = 2'd2 } gate_fn_e;

  // One garbled byte: label[i] carries bit i of the byte.
  typedef label_t [7:0] gbyte_t;

  // Plain AES: 16 bytes; byte 0 is bits 127:120, bytes run down columns.
  typedef logic [7:0] byte_arr_t [256];

  // Zero / one label of a colour.
  function automatic label_t key0(gkey_t k, color_e c);
    return (c == BLUE) ? k.k1 : k.k3;
  endfunction

  function automatic label_t key1(gkey_t k, color_e c);
    return (c == BLUE) ? k.k2 : k.k4;
  endfunction

  function automatic color_e other(color_e c);
    return (c == BLUE) ? RED : BLUE;
  endfunction

  // A usable key set has two different labels per colour.
  function automatic logic gkey_ok(gkey_t k);
    return (k.k1 != k.k2) && (k.k3 != k.k4);
  endfunction

  // Label hash H(a | b | i): rotations and xor, a non-linear term of b, and the gate index.
  // For a fixed b it is a bijection of a, so a wrong label on in1 never decrypts to the same
  // output key as the right one.
  function automatic label_t gc_hash(label_t a, label_t b, int unsigned idx);
    label_t ra, rb;
    ra = {a[6:0], a[7]};
    rb = {b[4:0], b[7:5]};
    return ra ^ rb ^ (b & {b[0], b[7:1]}) ^ label_t'(idx * 37) ^ 8'h5a;
  endfunction

  function automatic logic gate_eval(gate_fn_e fn, logic a, logic b);
    case (fn)
      GATE_AND: return a & b;
      GATE_OR:  return a | b;
      default:  return a ^ b;
    endcase
  endfunction

  // Multiply by x in GF(2^8) modulo x^8 + x^4 + x^3 + x + 1.
  function automatic logic [7:0] xtime(logic [7:0] a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  function automatic logic [7:0] gmul(logic [7:0] a, logic [7:0] b);
    logic [7:0] p, x;
    p = '0;
    x = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= x;
      x = xtime(x);
    end
    return p;
  endfunction

  // S-box entry: a^254 (the inverse, 0 for 0) followed by the affine map with constant 0x63.
  function automatic logic [7:0] sbox_entry(logic [7:0] a);
    logic [7:0] inv, sq, s;
    inv = 8'h01;
    sq  = a;
    for (int i = 0; i < 8; i++) begin           // 254 = 0b11111110
      if (i != 0) inv = gmul(inv, sq);
      sq = gmul(sq, sq);
    end
    if (a == 8'h00) inv = 8'h00;
    for (int i = 0; i < 8; i++)
      s[i] = inv[i] ^ inv[(i+4)%8] ^ inv[(i+5)%8] ^ inv[(i+6)%8] ^ inv[(i+7)%8];
    return s ^ 8'h63;
  endfunction

  function automatic byte_arr_t gen_sbox();
    byte_arr_t t;
    for (int i = 0; i < 256; i++) t[i] = sbox_entry(8'(i));
    return t;
  endfunction

  localparam byte_arr_t SBOX = gen_sbox();

  // Controller phases. WHITEN: initial key addition; SUB: S-box and row shift; MIX: one
  // column of Mix-Columns; ARK: round-key addition; FINAL: last key addition and ungarbling.
  typedef enum logic [2:0] {
    PH_IDLE   = 3'd0,
    PH_WHITEN = 3'd1,
    PH_SUB    = 3'd2,
    PH_MIX    = 3'd3,
    PH_ARK    = 3'd4,
    PH_FINAL  = 3'd5
  } phase_e;

endpackage
