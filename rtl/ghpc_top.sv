// ghpc_top: the three masked cipher cores built from GHPC gadgets, side by
// side, each with its own fresh-randomness generator.
//
//   u_aes      byte-serial AES-128, one masked AES S-box gadget
//   u_pres_ser nibble-serial PRESENT-80, one masked PRESENT S-box gadget
//   u_pres_rnd round-based PRESENT-128, 18 masked PRESENT S-box gadgets
//
// The cores do not share data; each keeps its own ports, prefixed aes_,
// ps_ and pr_. LOW_LATENCY selects the gadget type for all three: 0 (the
// default, the configuration the document measures) uses GHPC with two
// cycles of S-box latency and m fresh bits per S-box, 1 uses GHPC-LL with
// one cycle and m*2^n fresh bits. Each core's randomness comes from a prng
// (one 31-bit LFSR, x^31 + x^28 + 1, per bit); the three generators use
// disjoint seed ranges. All data ports carry two Boolean shares; the
// caller shares inputs and recombines outputs. Synchronous active-low reset
// for everything. Timing of each core is given in its own file.
module ghpc_top #(
  parameter bit LOW_LATENCY = 1'b0
) (
  input  logic         clk,
  input  logic         rst_n,
  // byte-serial AES-128
  input  logic         aes_start,
  input  logic [127:0] aes_pt0,
  input  logic [127:0] aes_pt1,
  input  logic [127:0] aes_key0,
  input  logic [127:0] aes_key1,
  output logic         aes_busy,
  output logic         aes_done,
  output logic [127:0] aes_ct0,
  output logic [127:0] aes_ct1,
  // nibble-serial PRESENT-80
  input  logic         ps_start,
  input  logic [63:0]  ps_pt0,
  input  logic [63:0]  ps_pt1,
  input  logic [79:0]  ps_key0,
  input  logic [79:0]  ps_key1,
  output logic         ps_busy,
  output logic         ps_done,
  output logic [63:0]  ps_ct0,
  output logic [63:0]  ps_ct1,
  // round-based PRESENT-128
  input  logic         pr_in_valid,
  output logic         pr_in_ready,
  input  logic [63:0]  pr_pt0,
  input  logic [63:0]  pr_pt1,
  input  logic [127:0] pr_key0,
  input  logic [127:0] pr_key1,
  output logic         pr_out_valid,
  output logic [63:0]  pr_ct0,
  output logic [63:0]  pr_ct1
);
  localparam int unsigned AES_RW = LOW_LATENCY ? 8 * 256 : 8;
  localparam int unsigned PS_RW  = LOW_LATENCY ? 4 * 16 : 4;
  localparam int unsigned PR_RW  = 18 * (LOW_LATENCY ? 4 * 16 : 4);

  logic [AES_RW-1:0] aes_rnd;
  logic [PS_RW-1:0]  ps_rnd;
  logic [PR_RW-1:0]  pr_rnd;

  prng #(.NBITS(AES_RW), .SEED_BASE(0))     u_prng_aes (.clk(clk), .rst_n(rst_n), .rnd(aes_rnd));
  prng #(.NBITS(PS_RW),  .SEED_BASE(4096))  u_prng_ps  (.clk(clk), .rst_n(rst_n), .rnd(ps_rnd));
  prng #(.NBITS(PR_RW),  .SEED_BASE(8192))  u_prng_pr  (.clk(clk), .rst_n(rst_n), .rnd(pr_rnd));

  aes_byte_serial #(.LOW_LATENCY(LOW_LATENCY)) u_aes (
    .clk(clk), .rst_n(rst_n), .start(aes_start),
    .pt0(aes_pt0), .pt1(aes_pt1), .key0(aes_key0), .key1(aes_key1), .rnd(aes_rnd),
    .busy(aes_busy), .done(aes_done), .ct0(aes_ct0), .ct1(aes_ct1)
  );

  present_nibble_serial #(.LOW_LATENCY(LOW_LATENCY)) u_pres_ser (
    .clk(clk), .rst_n(rst_n), .start(ps_start),
    .pt0(ps_pt0), .pt1(ps_pt1), .key0(ps_key0), .key1(ps_key1), .rnd(ps_rnd),
    .busy(ps_busy), .done(ps_done), .ct0(ps_ct0), .ct1(ps_ct1)
  );

  present_round_based #(.LOW_LATENCY(LOW_LATENCY)) u_pres_rnd (
    .clk(clk), .rst_n(rst_n), .in_valid(pr_in_valid), .in_ready(pr_in_ready),
    .pt0(pr_pt0), .pt1(pr_pt1), .key0(pr_key0), .key1(pr_key1), .rnd(pr_rnd),
    .out_valid(pr_out_valid), .ct0(pr_ct0), .ct1(pr_ct1)
  );

endmodule
