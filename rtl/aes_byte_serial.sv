// aes_byte_serial: first-order masked AES-128 encryption (two Boolean
// shares) with a single GHPC S-box gadget shared by the round function and
// the key expansion.
//
// How it works: state and key are held as two 128-bit shares each (byte
// b = 4*column + row at bits [8*b +: 8], byte 0 being the first input byte).
// Every linear step (AddRoundKey, ShiftRows, MixColumns, the XOR cascade of
// the key schedule) is applied to each share on its own; the round constant
// is added to share 0 only. The only non-linear step, SubBytes, goes byte by
// byte through one masked S-box gadget (ghpc, or ghpc_ll when LOW_LATENCY
// is set), whose fresh mask becomes output share 0.
//
// One round takes 21 + LAT cycles, LAT being the gadget latency (2 for GHPC,
// 1 for GHPC-LL), with a round-local counter t:
//   t = 0..3      the four key bytes of RotWord(w3) enter the gadget; in
//                 rounds 2..10 column t of the previous round's state gets
//                 MixColumns and AddRoundKey in the same cycle;
//   t = 4..19     the sixteen state bytes enter the gadget;
//   t = LAT..     results return LAT cycles after they entered and are
//                 written back in place (SubWord bytes into a 32-bit buffer);
//   t = LAT+4     the next round key is formed in one cycle;
//   t = 20+LAT    ShiftRows on both shares.
// After round 10 four more cycles add the last round key column by column
// (there is no MixColumns in the last round). The first AddRoundKey is done
// while loading. Following the document: the shared S-box, all pipeline
// registers in the gadget, 22 S-box cycles per round for GHPC (2 latency, 16
// state, 4 key), ShiftRows in one cycle, MixColumns in four. The order of the
// S-box feeds, MixColumns overlapping the key bytes of the next round and the
// one-cycle key update are this design's choices. Total: 10*(21+LAT)+4
// cycles from start to done (234 for GHPC, 224 for GHPC-LL).
//
// Interface: start is taken when busy is low; the plaintext and key shares
// are sampled with it. rnd must carry fresh randomness every cycle (8 bits
// for GHPC, 2048 for GHPC-LL). done pulses for one cycle with ct0/ct1 valid;
// they stay valid until the next start. Synchronous active-low reset.
module aes_byte_serial
  import ghpc_pkg::*;
#(
  parameter bit LOW_LATENCY = 1'b0,
  localparam int unsigned LAT = LOW_LATENCY ? 1 : 2,
  localparam int unsigned RW  = LOW_LATENCY ? 8 * 256 : 8
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [127:0]  pt0,
  input  logic [127:0]  pt1,
  input  logic [127:0]  key0,
  input  logic [127:0]  key1,
  input  logic [RW-1:0] rnd,
  output logic          busy,
  output logic          done,
  output logic [127:0]  ct0,
  output logic [127:0]  ct1
);
  localparam int unsigned RLEN = 21 + LAT;

  typedef enum logic [1:0] {S_IDLE, S_ROUND, S_FINAL} phase_e;

  phase_e       phase_q;
  logic [4:0]   t_q;
  logic [3:0]   round_q;
  logic [7:0]   rcon_q;
  logic [1:0][127:0] st_q;
  logic [1:0][127:0] kk_q;
  logic [1:0][31:0]  sw_q;

  logic [7:0]   sb_in  [2];
  logic [7:0]   sb_out [2];

  // ---------------------------------------------------------- S-box feed
  always_comb begin
    for (int s = 0; s < 2; s++) begin
      if (t_q < 5'd4) sb_in[s] = kk_q[s][8*(12 + ((int'(t_q) + 1) % 4)) +: 8];
      else if (t_q < 5'd20) sb_in[s] = st_q[s][8*(int'(t_q) - 4) +: 8];
      else sb_in[s] = '0;
    end
  end

  if (LOW_LATENCY) begin : g_ll
    ghpc_ll #(.N(8), .M(8), .TABLE(LUT_AES), .PIPELINE(1'b1)) u_sbox (
      .clk(clk), .x0(sb_in[0]), .x1(sb_in[1]), .r(rnd), .o0(sb_out[0]), .o1(sb_out[1])
    );
  end else begin : g_ghpc
    ghpc #(.N(8), .M(8), .TABLE(LUT_AES), .PIPELINE(1'b1)) u_sbox (
      .clk(clk), .x0(sb_in[0]), .x1(sb_in[1]), .r(rnd), .o0(sb_out[0]), .o1(sb_out[1])
    );
  end

  // ------------------------------------------------------------ key step
  function automatic logic [127:0] next_key(input logic [127:0] k, input logic [31:0] sw,
                                            input logic [7:0] rc);
    logic [31:0] w [4];
    w[0] = k[31:0] ^ sw ^ {24'h0, rc};
    w[1] = k[63:32] ^ w[0];
    w[2] = k[95:64] ^ w[1];
    w[3] = k[127:96] ^ w[2];
    return {w[3], w[2], w[1], w[0]};
  endfunction

  // ----------------------------------------------------------- datapath
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase_q <= S_IDLE;
      t_q     <= '0;
      round_q <= '0;
      rcon_q  <= 8'h01;
      done    <= 1'b0;
      for (int s = 0; s < 2; s++) begin
        st_q[s] <= '0;
        kk_q[s] <= '0;
        sw_q[s] <= '0;
      end
    end else begin
      done <= 1'b0;
      unique case (phase_q)
        S_IDLE: begin
          if (start) begin
            st_q[0] <= pt0 ^ key0;
            st_q[1] <= pt1 ^ key1;
            kk_q[0] <= key0;
            kk_q[1] <= key1;
            round_q <= 4'd1;
            rcon_q  <= 8'h01;
            t_q     <= '0;
            phase_q <= S_ROUND;
          end
        end
        S_ROUND: begin
          for (int s = 0; s < 2; s++) begin
            // MixColumns + AddRoundKey of the previous round, one column per cycle
            if (round_q != 4'd1 && t_q < 5'd4)
              st_q[s][32*t_q +: 32] <= mix_column(st_q[s][32*t_q +: 32]) ^ kk_q[s][32*t_q +: 32];
            // S-box results back into the SubWord buffer and the state
            if (t_q >= 5'(LAT) && t_q < 5'(LAT + 4))
              sw_q[s][8*(t_q - 5'(LAT)) +: 8] <= sb_out[s];
            if (t_q >= 5'(LAT + 4) && t_q < 5'(LAT + 20))
              st_q[s][8*(t_q - 5'(LAT + 4)) +: 8] <= sb_out[s];
            // next round key
            if (t_q == 5'(LAT + 4))
              kk_q[s] <= next_key(kk_q[s], sw_q[s], (s == 0) ? rcon_q : 8'h00);
            if (t_q == 5'(RLEN - 1))
              st_q[s] <= shift_rows(st_q[s]);
          end
          if (t_q == 5'(RLEN - 1)) begin
            t_q <= '0;
            if (round_q == 4'd10) phase_q <= S_FINAL;
            else begin
              round_q <= round_q + 4'd1;
              rcon_q  <= xtime(rcon_q);
            end
          end else begin
            t_q <= t_q + 5'd1;
          end
        end
        S_FINAL: begin
          for (int s = 0; s < 2; s++)
            st_q[s][32*t_q[1:0] +: 32] <= st_q[s][32*t_q[1:0] +: 32] ^ kk_q[s][32*t_q[1:0] +: 32];
          if (t_q == 5'd3) begin
            t_q     <= '0;
            done    <= 1'b1;
            phase_q <= S_IDLE;
          end else begin
            t_q <= t_q + 5'd1;
          end
        end
        default: phase_q <= S_IDLE;
      endcase
    end
  end

  assign busy = (phase_q != S_IDLE);
  assign ct0  = st_q[0];
  assign ct1  = st_q[1];

  a_done_idle: assert property (@(posedge clk) disable iff (!rst_n) done |-> !busy);
  a_round_range: assert property (@(posedge clk) disable iff (!rst_n)
                                  busy |-> (round_q >= 4'd1 && round_q <= 4'd10));

endmodule
