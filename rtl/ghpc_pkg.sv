// ghpc_pkg: types, constants and truth tables shared by the GHPC gadgets and
// the masked cipher cores.
//
// A gadget is configured with the truth table of the Boolean function
// F : F2^n -> F2^m it protects. The table is one packed vector of
// LUT_BITS = 2^8 * 8 bits; the output word F(v) sits at bits [v*m +: m].
// Functions up to 8 inputs and 8 outputs fit, which covers the 2- and 3-input
// AND examples, the 4-bit S-boxes and the AES S-box. The PRESENT, PRINCE,
// Skinny-64 and Rectangle listings are those of the cipher specifications;
// the document names these S-boxes but does not print them. All tables are computed
// by constant functions at elaboration time: the 4-bit S-boxes from their
// usual 16-nibble listing, the AES S-box from inversion in GF(2^8) modulo
// x^8+x^4+x^3+x+1 followed by the affine map (FIPS-197).
//
// Also here: the PRODUCT() selector of the gadgets (AND of literals of the
// selecting share, one minterm per Shannon cofactor), the AES MixColumns
// helpers and the PRESENT permutation, which the cipher cores apply to each
// share separately because they are linear.
package ghpc_pkg;

  localparam int unsigned MAX_IN   = 8;
  localparam int unsigned MAX_OUT  = 8;
  localparam int unsigned LUT_BITS = (2 ** MAX_IN) * MAX_OUT;

  typedef logic [LUT_BITS-1:0] lut_t;

  // Selector of Shannon cofactor i from the selecting share x:
  // the product of x[k] where bit k of i is 1 and of ~x[k] where it is 0.
  function automatic logic product(input int unsigned i, input logic [MAX_IN-1:0] x,
                                   input int unsigned n);
    logic p;
    p = 1'b1;
    for (int unsigned k = 0; k < n; k++) begin
      if (i[k]) p = p & x[k];
      else      p = p & ~x[k];
    end
    return p;
  endfunction

  // ---------------------------------------------------------------- tables
  function automatic lut_t lut_and2();
    lut_t t = '0;
    for (int unsigned v = 0; v < 4; v++) t[v] = v[0] & v[1];
    return t;
  endfunction

  function automatic lut_t lut_and3();
    lut_t t = '0;
    for (int unsigned v = 0; v < 8; v++) t[v] = v[0] & v[1] & v[2];
    return t;
  endfunction

  // 4-bit S-box written as 16 hex digits, S(0) first (leftmost).
  function automatic lut_t lut_sbox4(input logic [63:0] listing);
    lut_t t = '0;
    for (int unsigned v = 0; v < 16; v++) t[v*4 +: 4] = listing[(15-v)*4 +: 4];
    return t;
  endfunction

  localparam logic [63:0] PRESENT_SBOX   = 64'hC56B_90AD_3EF8_4712;
  localparam logic [63:0] PRINCE_SBOX    = 64'hBF32_AC91_6780_E5D4;
  localparam logic [63:0] SKINNY64_SBOX  = 64'hC690_1A2B_385D_4E7F;
  localparam logic [63:0] RECTANGLE_SBOX = 64'h65CA_1E79_B03D_8F42;

  function automatic logic [7:0] gf256_mul(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] p, aa;
    p  = '0;
    aa = a;
    for (int k = 0; k < 8; k++) begin
      if (b[k]) p = p ^ aa;
      aa = {aa[6:0], 1'b0} ^ (aa[7] ? 8'h1B : 8'h00);
    end
    return p;
  endfunction

  // AES S-box: multiplicative inverse (x^254, 0 -> 0), then affine map.
  function automatic logic [7:0] aes_sbox_calc(input logic [7:0] x);
    logic [7:0] inv, sq, y;
    inv = 8'h01;
    sq  = x;
    for (int k = 0; k < 8; k++) begin  // 254 = 0b11111110
      if (k != 0) inv = gf256_mul(inv, sq);
      sq = gf256_mul(sq, sq);
    end
    for (int k = 0; k < 8; k++)
      y[k] = inv[k] ^ inv[(k+4)%8] ^ inv[(k+5)%8] ^ inv[(k+6)%8] ^ inv[(k+7)%8];
    return y ^ 8'h63;
  endfunction

  function automatic lut_t lut_aes();
    lut_t t = '0;
    for (int unsigned v = 0; v < 256; v++) t[v*8 +: 8] = aes_sbox_calc(8'(v));
    return t;
  endfunction

  localparam lut_t LUT_AND2      = lut_and2();
  localparam lut_t LUT_AND3      = lut_and3();
  localparam lut_t LUT_PRESENT   = lut_sbox4(PRESENT_SBOX);
  localparam lut_t LUT_PRINCE    = lut_sbox4(PRINCE_SBOX);
  localparam lut_t LUT_SKINNY64  = lut_sbox4(SKINNY64_SBOX);
  localparam lut_t LUT_RECTANGLE = lut_sbox4(RECTANGLE_SBOX);
  localparam lut_t LUT_AES       = lut_aes();

  // ------------------------------------------------------ AES linear layer
  function automatic logic [7:0] xtime(input logic [7:0] a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1B : 8'h00);
  endfunction

  // One column, byte 0 = row 0.
  function automatic logic [31:0] mix_column(input logic [31:0] c);
    logic [7:0] a [4];
    logic [7:0] r [4];
    for (int k = 0; k < 4; k++) a[k] = c[8*k +: 8];
    for (int k = 0; k < 4; k++)
      r[k] = xtime(a[k]) ^ xtime(a[(k+1)%4]) ^ a[(k+1)%4] ^ a[(k+2)%4] ^ a[(k+3)%4];
    return {r[3], r[2], r[1], r[0]};
  endfunction

  // State as 16 bytes, byte b = 4*column + row at bits [8*b +: 8].
  function automatic logic [127:0] shift_rows(input logic [127:0] s);
    logic [127:0] o;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        o[8*(4*c+r) +: 8] = s[8*(4*((c+r)%4)+r) +: 8];
    return o;
  endfunction

  // -------------------------------------------------- PRESENT linear layer
  // Bit j moves to 16*j mod 63 (bit 63 stays).
  function automatic logic [63:0] present_player(input logic [63:0] s);
    logic [63:0] o;
    for (int j = 0; j < 64; j++) o[(j == 63) ? 63 : (16*j) % 63] = s[j];
    return o;
  endfunction

endpackage
