// present_round_based: first-order masked, round-based PRESENT-128
// encryption in which the registers of the S-box gadgets are the state and
// key registers.
//
// How it works: one round per pass through a loop of 18 masked S-box
// gadgets: 16 for the state and 2 for the two top nibbles of the key
// schedule. At the loop input the state shares are XORed with the round key
// (key bits [127:64]) and enter the 16 state gadgets; the key shares are
// rotated left by 61, their top two nibbles enter the key gadgets and the
// other 120 bits, with the round counter XORed into bits [66:62] of share 0,
// go through LAT delay registers alongside. LAT cycles later the gadget
// outputs, after the bit permutation, are the next state, and the key
// gadget outputs with the delayed bits are the next key. There is no other
// state register. With GHPC (LAT = 2) the loop holds two independent
// encryptions at once, entering on consecutive cycles, each taking a round
// every second cycle; with GHPC-LL (LAT = 1) it holds one, one round per
// cycle. A token (valid bit and round number) travels with each slot. When a
// slot leaves round 31 its ciphertext, permuted gadget output XOR the last
// round key, appears on ct0/ct1 with out_valid, and the slot is free again.
// Following the document: round-based, two encryptions pipelined for GHPC,
// 31 cycles per encryption for GHPC-LL, the gadget registers serving as
// state register, 18 S-box gadgets (fresh randomness 72 / 1152 bits). The
// 128-bit key is inferred from that randomness (16 + 2 gadgets); the
// handshake is this design's choice.
//
// Interface: a new encryption enters when in_valid and in_ready are both
// high in a cycle. in_ready is high when the slot at the loop input is free.
// out_valid and the ciphertext shares come 31*LAT cycles after entry (62
// for GHPC, 31 for GHPC-LL) and last one cycle. rnd must be fresh every
// cycle. Synchronous active-low reset clears the slot tokens.
module present_round_based
  import ghpc_pkg::*;
#(
  parameter bit LOW_LATENCY = 1'b0,
  localparam int unsigned LAT = LOW_LATENCY ? 1 : 2,
  localparam int unsigned RPG = LOW_LATENCY ? 4 * 16 : 4,   // random bits per gadget
  localparam int unsigned RW  = 18 * RPG
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  output logic          in_ready,
  input  logic [63:0]   pt0,
  input  logic [63:0]   pt1,
  input  logic [127:0]  key0,
  input  logic [127:0]  key1,
  input  logic [RW-1:0] rnd,
  output logic          out_valid,
  output logic [63:0]   ct0,
  output logic [63:0]   ct1
);
  // slot tokens, index LAT-1 is the one whose data leaves the gadgets now
  logic [LAT-1:0] tok_v_q;
  logic [LAT-1:0][4:0] tok_r_q;

  logic [63:0]  sb_x   [2];    // gadget inputs, state part
  logic [7:0]   kb_x   [2];    // gadget inputs, key part
  logic [63:0]  sb_o   [2];    // gadget outputs, state part
  logic [7:0]   kb_o   [2];
  logic [119:0] kdel_in [2];
  logic [1:0][LAT-1:0][119:0] kdel_q;

  logic [63:0]  st_cur [2];    // state entering the loop this cycle
  logic [127:0] k_cur  [2];    // key entering the loop this cycle
  logic [127:0] k_rot  [2];
  logic [63:0]  st_nxt [2];
  logic [127:0] k_nxt  [2];

  logic         loop_v;        // leaving slot continues with another round
  logic         inject;
  logic [4:0]   cur_round;
  logic         cur_valid;

  // ------------------------------------------------ loop-back values
  always_comb begin
    for (int s = 0; s < 2; s++) begin
      st_nxt[s] = present_player(sb_o[s]);
      k_nxt[s]  = {kb_o[s], kdel_q[s][LAT-1]};
    end
  end

  assign loop_v    = tok_v_q[LAT-1] && (tok_r_q[LAT-1] != 5'd31);
  assign out_valid = tok_v_q[LAT-1] && (tok_r_q[LAT-1] == 5'd31);
  assign in_ready  = !loop_v;
  assign inject    = in_valid && in_ready;
  assign cur_valid = loop_v || inject;
  assign cur_round = loop_v ? tok_r_q[LAT-1] + 5'd1 : 5'd1;

  assign ct0 = st_nxt[0] ^ k_nxt[0][127:64];
  assign ct1 = st_nxt[1] ^ k_nxt[1][127:64];

  always_comb begin
    st_cur[0] = loop_v ? st_nxt[0] : pt0;
    st_cur[1] = loop_v ? st_nxt[1] : pt1;
    k_cur[0]  = loop_v ? k_nxt[0]  : key0;
    k_cur[1]  = loop_v ? k_nxt[1]  : key1;
    for (int s = 0; s < 2; s++) begin
      k_rot[s]   = {k_cur[s][66:0], k_cur[s][127:67]};
      sb_x[s]    = st_cur[s] ^ k_cur[s][127:64];
      kb_x[s]    = k_rot[s][127:120];
      kdel_in[s] = k_rot[s][119:0];
    end
    kdel_in[0][66-:5] = kdel_in[0][66-:5] ^ cur_round;   // key bits [66:62]
  end

  // ------------------------------------------------------- S-box gadgets
  for (genvar g = 0; g < 18; g++) begin : g_sbox
    logic [3:0] x0, x1, o0, o1;
    if (g < 16) begin : g_state
      assign x0 = sb_x[0][4*g +: 4];
      assign x1 = sb_x[1][4*g +: 4];
      assign sb_o[0][4*g +: 4] = o0;
      assign sb_o[1][4*g +: 4] = o1;
    end else begin : g_key
      assign x0 = kb_x[0][4*(g-16) +: 4];
      assign x1 = kb_x[1][4*(g-16) +: 4];
      assign kb_o[0][4*(g-16) +: 4] = o0;
      assign kb_o[1][4*(g-16) +: 4] = o1;
    end
    if (LOW_LATENCY) begin : g_ll
      ghpc_ll #(.N(4), .M(4), .TABLE(LUT_PRESENT), .PIPELINE(1'b1)) u_sbox (
        .clk(clk), .x0(x0), .x1(x1), .r(rnd[g*RPG +: RPG]), .o0(o0), .o1(o1)
      );
    end else begin : g_ghpc
      ghpc #(.N(4), .M(4), .TABLE(LUT_PRESENT), .PIPELINE(1'b1)) u_sbox (
        .clk(clk), .x0(x0), .x1(x1), .r(rnd[g*RPG +: RPG]), .o0(o0), .o1(o1)
      );
    end
  end

  // ------------------------------------ key delay line and slot tokens
  always_ff @(posedge clk) begin
    for (int s = 0; s < 2; s++) begin
      kdel_q[s][0] <= kdel_in[s];
      for (int d = 1; d < LAT; d++) kdel_q[s][d] <= kdel_q[s][d-1];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      tok_v_q <= '0;
      for (int d = 0; d < LAT; d++) tok_r_q[d] <= '0;
    end else begin
      tok_v_q[0] <= cur_valid;
      tok_r_q[0] <= cur_round;
      for (int d = 1; d < LAT; d++) begin
        tok_v_q[d] <= tok_v_q[d-1];
        tok_r_q[d] <= tok_r_q[d-1];
      end
    end
  end

  a_round_range: assert property (@(posedge clk) disable iff (!rst_n)
                                  tok_v_q[LAT-1] |-> (tok_r_q[LAT-1] != 5'd0));

endmodule
