// ghpc: first-order, two-share, PINI-composable gadget for an arbitrary
// Boolean function F : F2^N -> F2^M, built from its truth table.
//
// How it works: the function of the shared input x = x0 ^ x1 is split into
// its 2^N Shannon cofactors with respect to share x1. Cofactor i is
// F(x0 ^ i), a function of share x0 alone. Each cofactor is blinded with the
// same fresh mask r and stored in the first register stage (t_q). Share x1
// then picks the right one: the minterm PRODUCT(i, x1) gates cofactor i into
// the second register stage (m_q), so exactly one m_q word is non-zero. The
// XOR of all m_q words is F(x) ^ r. The gadget returns o1 = F(x) ^ r and
// o0 = r (delayed). The output share indices must not be swapped: o0 belongs
// to share domain 0 and o1 to share domain 1. This follows the document's
// construction (Algorithm 2, Figure 2).
//
// Interface and timing: x0 (domain 0), x1 (domain 1) and r (M fresh random
// bits) are sampled every cycle. With PIPELINE = 1 the optional registers
// on x1 and r are present; the gadget then takes a new input every cycle
// and its outputs follow two clock edges later. With PIPELINE = 0 those
// registers are removed: x1 must then be held for two cycles and r for the
// whole evaluation, as in the document's non-pipelined area figures.
// The datapath has no reset; outputs are meaningful two cycles after the
// first input.
//
// The default configuration is the AES S-box (N = M = 8), the gadget of the
// byte-serial AES case study. The table parameter is this design's way of
// naming the function; any table from ghpc_pkg (or another) can be given.
module ghpc
  import ghpc_pkg::*;
#(
  parameter int unsigned N        = 8,
  parameter int unsigned M        = 8,
  parameter lut_t        TABLE    = LUT_AES,
  parameter bit          PIPELINE = 1'b1
) (
  input  logic         clk,
  input  logic [N-1:0] x0,
  input  logic [N-1:0] x1,
  input  logic [M-1:0] r,
  output logic [M-1:0] o0,
  output logic [M-1:0] o1
);
  localparam int unsigned NC = 2 ** N;  // number of Shannon cofactors

  logic [NC-1:0][M-1:0] t_q;  // blinded cofactors, share domain 0
  logic [NC-1:0][M-1:0] m_q;  // gated cofactors, share domain 1
  logic [NC-1:0] sel;       // one-hot cofactor selection from x1
  logic [N-1:0] x1_s;       // selecting share as used by stage 2

  // Stage 1: blinded cofactors F(x0 ^ i) ^ r.
  for (genvar i = 0; i < NC; i++) begin : g_cof
    logic [N-1:0] idx;
    assign idx = x0 ^ N'(i);
    always_ff @(posedge clk) t_q[i] <= TABLE[idx*M +: M] ^ r;
  end

  // Optional pipeline registers on the domain-1 side.
  if (PIPELINE) begin : g_pipe
    logic [N-1:0] x1_q;
    logic [M-1:0] r_q1, r_q2;
    always_ff @(posedge clk) begin
      x1_q <= x1;
      r_q1 <= r;
      r_q2 <= r_q1;
    end
    assign x1_s = x1_q;
    assign o0   = r_q2;
  end else begin : g_nopipe
    assign x1_s = x1;
    assign o0   = r;
  end

  // Stage 2: gate each cofactor with its minterm of x1.
  for (genvar i = 0; i < NC; i++) begin : g_sel
    assign sel[i] = product(i, MAX_IN'(x1_s), N);
    always_ff @(posedge clk) m_q[i] <= t_q[i] & {M{sel[i]}};
  end

  // Compression: XOR of all gated cofactors (only one is non-zero).
  always_comb begin
    o1 = '0;
    for (int i = 0; i < NC; i++) o1 = o1 ^ m_q[i];
  end

  // Exactly one cofactor is selected at any time.
  a_onehot: assert property (@(posedge clk) $onehot(sel));

endmodule
