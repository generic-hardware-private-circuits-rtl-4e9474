// prng: source of NBITS fresh random bits per clock cycle, one independent
// 31-bit LFSR (x^31 + x^28 + 1) per bit, as the document's evaluation
// set-up builds its mask generator.
//
// How it works: NBITS lfsr31 instances run in parallel. Their seeds must
// all differ and be non-zero; the document only asks for that. Here seed k
// is ((k + 1 + SEED_BASE) * 0x9E3779B1) mod 2^31, an own choice: multiplying
// by an odd constant is a bijection modulo 2^31, so the seeds are distinct
// and non-zero for fewer than 2^31 - SEED_BASE instances. Give each PRNG
// instance of a design a different SEED_BASE range so that no two LFSRs share
// a start value.
//
// Interface and timing: active-low synchronous reset loads the seeds; rnd
// changes every cycle afterwards. The default width is 8 bits, the fresh
// randomness of the first-order AES S-box gadget.
module prng #(
  parameter int unsigned NBITS     = 8,
  parameter int unsigned SEED_BASE = 0
) (
  input  logic             clk,
  input  logic             rst_n,
  output logic [NBITS-1:0] rnd
);
  function automatic logic [30:0] seed_of(input int unsigned k);
    logic [63:0] p;
    p = (64'(k) + 64'(SEED_BASE) + 64'd1) * 64'h9E37_79B1;
    return p[30:0];
  endfunction

  for (genvar k = 0; k < NBITS; k++) begin : g_lfsr
    lfsr31 #(.SEED(seed_of(k))) u_lfsr (
      .clk  (clk),
      .rst_n(rst_n),
      .rnd  (rnd[k])
    );
  end

endmodule
