// ghpc_ll: low-latency variant of the GHPC gadget (one register stage) for
// an arbitrary Boolean function F : F2^N -> F2^M given by its truth table.
//
// How it works: as in ghpc, cofactor i = F(x0 ^ i) depends on share x0 only,
// but every cofactor is blinded with its own fresh mask r_i before the single
// register stage (t_q). Because the stored cofactors are then independent,
// the second register stage can be dropped: the minterm PRODUCT(i, x1)
// selects cofactor i combinationally and the XOR of the gated words gives
// o1 = F(x) ^ r_x1. Output share o0 must equal that same mask r_x1: a plain
// multiplexer driven by x1 selects it from r and it is registered. This
// follows the document's construction (Algorithm 3, Figure 4). Fresh
// randomness is M * 2^N bits per evaluation; mask r_i is r[i*M +: M].
//
// Interface and timing: x0 (domain 0), x1 (domain 1) and r are sampled every
// cycle; o0 and o1 are valid one clock edge later. With PIPELINE = 1 x1 is
// registered (a pipeline register) and a new input can be applied every
// cycle. With PIPELINE = 0 the selection uses x1 directly, so x1 must be
// held for the cycle after it is applied. The o0 multiplexer always uses the
// x1 of the sampling cycle, so that o0 and the stored cofactors are written
// by the same clock edge (the document's Algorithm 3 writes the selection
// through the pipelined S_i; this is an own choice that keeps both output
// shares at one cycle of latency).
module ghpc_ll
  import ghpc_pkg::*;
#(
  parameter int unsigned N        = 8,
  parameter int unsigned M        = 8,
  parameter lut_t        TABLE    = LUT_AES,
  parameter bit          PIPELINE = 1'b1
) (
  input  logic                clk,
  input  logic [N-1:0]        x0,
  input  logic [N-1:0]        x1,
  input  logic [M*(2**N)-1:0] r,
  output logic [M-1:0]        o0,
  output logic [M-1:0]        o1
);
  localparam int unsigned NC = 2 ** N;

  logic [NC-1:0][M-1:0] t_q;
  logic [NC-1:0] sel;
  logic [N-1:0]  x1_s;
  logic [M-1:0]  r_sel;

  for (genvar i = 0; i < NC; i++) begin : g_cof
    logic [N-1:0] idx;
    assign idx = x0 ^ N'(i);
    always_ff @(posedge clk) t_q[i] <= TABLE[idx*M +: M] ^ r[i*M +: M];
  end

  if (PIPELINE) begin : g_pipe
    logic [N-1:0] x1_q;
    always_ff @(posedge clk) x1_q <= x1;
    assign x1_s = x1_q;
  end else begin : g_nopipe
    assign x1_s = x1;
  end

  for (genvar i = 0; i < NC; i++) begin : g_sel
    assign sel[i] = product(i, MAX_IN'(x1_s), N);
  end

  // Share 1: combinational selection of the stored cofactor.
  always_comb begin
    o1 = '0;
    for (int i = 0; i < NC; i++) o1 = o1 ^ (t_q[i] & {M{sel[i]}});
  end

  // Share 0: the mask of the selected cofactor, chosen by the current x1.
  always_comb begin
    r_sel = '0;
    for (int i = 0; i < NC; i++)
      r_sel = r_sel ^ (r[i*M +: M] & {M{product(i, MAX_IN'(x1), N)}});
  end
  always_ff @(posedge clk) o0 <= r_sel;

  a_onehot: assert property (@(posedge clk) $onehot(sel));

endmodule
