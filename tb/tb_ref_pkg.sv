// tb_ref_pkg: reference models for the testbenches, written independently of
// the RTL: AES S-box by exhaustive search for the inverse plus the affine map
// in its rotation form, AES-128 with the textbook key expansion, and PRESENT
// with 80- and 128-bit keys, its permutation written as bit i -> i/4 + 16*(i%4).
// Functions are selected by an integer id for the gadget testbenches.
package tb_ref_pkg;

  localparam int FN_AND2 = 0;
  localparam int FN_AND3 = 1;
  localparam int FN_PRESENT = 2;
  localparam int FN_AES = 3;
  localparam int FN_PRINCE = 4;
  localparam int FN_SKINNY = 5;
  localparam int FN_RECTANGLE = 6;

  function automatic logic [7:0] mul_ref(input logic [7:0] a, input logic [7:0] b);
    logic [15:0] p = '0;
    for (int i = 0; i < 8; i++) if (b[i]) p ^= 16'(a) << i;
    for (int i = 15; i >= 8; i--) if (p[i]) p ^= 16'h011B << (i - 8);
    return p[7:0];
  endfunction

  function automatic logic [7:0] rotl8(input logic [7:0] b, input int n);
    return (b << n) | (b >> (8 - n));
  endfunction

  function automatic logic [7:0] aes_sbox_ref(input logic [7:0] x);
    logic [7:0] inv = '0;
    for (int y = 1; y < 256; y++) if (mul_ref(x, 8'(y)) == 8'h01) inv = 8'(y);
    return inv ^ rotl8(inv, 1) ^ rotl8(inv, 2) ^ rotl8(inv, 3) ^ rotl8(inv, 4) ^ 8'h63;
  endfunction

  logic [7:0] aes_tab [256];
  bit aes_tab_ok = 0;

  function automatic logic [7:0] aes_s(input logic [7:0] x);
    if (!aes_tab_ok) begin
      for (int v = 0; v < 256; v++) aes_tab[v] = aes_sbox_ref(8'(v));
      aes_tab_ok = 1;
    end
    return aes_tab[x];
  endfunction

  function automatic logic [3:0] present_s(input logic [3:0] x);
    case (x)
      4'h0: return 4'hC; 4'h1: return 4'h5; 4'h2: return 4'h6; 4'h3: return 4'hB;
      4'h4: return 4'h9; 4'h5: return 4'h0; 4'h6: return 4'hA; 4'h7: return 4'hD;
      4'h8: return 4'h3; 4'h9: return 4'hE; 4'hA: return 4'hF; 4'hB: return 4'h8;
      4'hC: return 4'h4; 4'hD: return 4'h7; 4'hE: return 4'h1; default: return 4'h2;
    endcase
  endfunction

  function automatic logic [3:0] prince_s(input logic [3:0] x);
    logic [3:0] t [16] = '{4'hB, 4'hF, 4'h3, 4'h2, 4'hA, 4'hC, 4'h9, 4'h1,
                           4'h6, 4'h7, 4'h8, 4'h0, 4'hE, 4'h5, 4'hD, 4'h4};
    return t[x];
  endfunction

  function automatic logic [3:0] skinny_s(input logic [3:0] x);
    logic [3:0] t [16] = '{4'hC, 4'h6, 4'h9, 4'h0, 4'h1, 4'hA, 4'h2, 4'hB,
                           4'h3, 4'h8, 4'h5, 4'hD, 4'h4, 4'hE, 4'h7, 4'hF};
    return t[x];
  endfunction

  function automatic logic [3:0] rectangle_s(input logic [3:0] x);
    logic [3:0] t [16] = '{4'h6, 4'h5, 4'hC, 4'hA, 4'h1, 4'hE, 4'h7, 4'h9,
                           4'hB, 4'h0, 4'h3, 4'hD, 4'h8, 4'hF, 4'h4, 4'h2};
    return t[x];
  endfunction

  function automatic logic [7:0] ref_eval(input int fn, input logic [7:0] x);
    case (fn)
      FN_AND2:    return {7'b0, x[0] & x[1]};
      FN_AND3:    return {7'b0, x[0] & x[1] & x[2]};
      FN_PRESENT: return {4'b0, present_s(x[3:0])};
      FN_PRINCE:  return {4'b0, prince_s(x[3:0])};
      FN_SKINNY:  return {4'b0, skinny_s(x[3:0])};
      FN_RECTANGLE: return {4'b0, rectangle_s(x[3:0])};
      default:    return aes_s(x);
    endcase
  endfunction

  // ----------------------------------------------------------- AES-128
  // Block layout: byte k (k-th byte of the FIPS-197 byte string) at [8k +: 8].
  function automatic logic [127:0] bswap128(input logic [127:0] v);
    logic [127:0] o;
    for (int k = 0; k < 16; k++) o[8*k +: 8] = v[8*(15-k) +: 8];
    return o;
  endfunction

  function automatic logic [127:0] aes128_enc(input logic [127:0] pt, input logic [127:0] key);
    logic [7:0] s [16];
    logic [7:0] w [176];
    logic [7:0] t [16];
    logic [7:0] tmp [4];
    logic [7:0] rc;
    logic [127:0] o;
    for (int k = 0; k < 16; k++) begin s[k] = pt[8*k +: 8]; w[k] = key[8*k +: 8]; end
    rc = 8'h01;
    for (int i = 4; i < 44; i++) begin
      for (int j = 0; j < 4; j++) tmp[j] = w[4*(i-1) + j];
      if (i % 4 == 0) begin
        logic [7:0] f;
        f = tmp[0];
        tmp[0] = aes_s(tmp[1]) ^ rc; tmp[1] = aes_s(tmp[2]); tmp[2] = aes_s(tmp[3]); tmp[3] = aes_s(f);
        rc = mul_ref(rc, 8'h02);
      end
      for (int j = 0; j < 4; j++) w[4*i + j] = w[4*(i-4) + j] ^ tmp[j];
    end
    for (int k = 0; k < 16; k++) s[k] ^= w[k];
    for (int r = 1; r <= 10; r++) begin
      for (int k = 0; k < 16; k++) s[k] = aes_s(s[k]);
      for (int c = 0; c < 4; c++) for (int rr = 0; rr < 4; rr++) t[4*c+rr] = s[4*((c+rr)%4)+rr];
      if (r != 10) begin
        for (int c = 0; c < 4; c++)
          for (int rr = 0; rr < 4; rr++)
            s[4*c+rr] = mul_ref(t[4*c+rr], 8'h02) ^ mul_ref(t[4*c+(rr+1)%4], 8'h03)
                      ^ t[4*c+(rr+2)%4] ^ t[4*c+(rr+3)%4];
      end else begin
        for (int k = 0; k < 16; k++) s[k] = t[k];
      end
      for (int k = 0; k < 16; k++) s[k] ^= w[16*r + k];
    end
    for (int k = 0; k < 16; k++) o[8*k +: 8] = s[k];
    return o;
  endfunction

  // ----------------------------------------------------------- PRESENT
  function automatic logic [63:0] present_p(input logic [63:0] s);
    logic [63:0] o;
    for (int i = 0; i < 64; i++) o[(i / 4) + 16 * (i % 4)] = s[i];
    return o;
  endfunction

  function automatic logic [63:0] present_sl(input logic [63:0] s);
    logic [63:0] o;
    for (int i = 0; i < 16; i++) o[4*i +: 4] = present_s(s[4*i +: 4]);
    return o;
  endfunction

  function automatic logic [63:0] present80_enc(input logic [63:0] pt, input logic [79:0] key);
    logic [63:0] s = pt;
    logic [79:0] k = key;
    for (int i = 1; i <= 31; i++) begin
      s = present_p(present_sl(s ^ k[79:16]));
      k = {k[18:0], k[79:19]};
      k[79:76] = present_s(k[79:76]);
      k[19:15] ^= 5'(i);
    end
    return s ^ k[79:16];
  endfunction

  function automatic logic [63:0] present128_enc(input logic [63:0] pt, input logic [127:0] key);
    logic [63:0] s = pt;
    logic [127:0] k = key;
    for (int i = 1; i <= 31; i++) begin
      s = present_p(present_sl(s ^ k[127:64]));
      k = {k[66:0], k[127:67]};
      k[127:124] = present_s(k[127:124]);
      k[123:120] = present_s(k[123:120]);
      k[66:62] ^= 5'(i);
    end
    return s ^ k[127:64];
  endfunction

endpackage
