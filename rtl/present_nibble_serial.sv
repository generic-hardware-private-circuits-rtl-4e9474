// present_nibble_serial: first-order masked PRESENT-80 encryption (two
// Boolean shares) with a single GHPC S-box gadget shared by the state and the
// key schedule.
//
// How it works: state (64 bits) and key register (80 bits) are held as two
// shares each. In each of the 31 rounds a counter t walks over the sixteen
// state nibbles: nibble t is XORed with round-key nibble t (key bits
// [16+4t +: 4]) and enters the S-box gadget in the same cycle, so key
// addition and S-box look-up happen together. At t = 16 the top nibble of the
// key rotated left by 61 enters the gadget. Results return LAT cycles later
// (2 for GHPC, 1 for GHPC-LL) and are written back in place. At t = 16+LAT
// the permutation layer is applied to the whole state in one cycle, and the
// key register takes the rotated key with its new top nibble, the round
// counter being XORed into key bits [19:15] of share 0. After round 31 one
// cycle adds the last round key. Following the document: one S-box for data
// and key, key addition and S-box in one cycle, parallel permutation layer,
// S-box latency taken from the gadget type. Addressing the nibbles with a
// counter instead of shifting the registers is this design's choice; it
// does the same work per cycle. Total: 31*(17+LAT)+1 cycles from start to
// done (590 for GHPC, 559 for GHPC-LL).
//
// Interface: start is taken when busy is low, with the plaintext and key
// shares. rnd needs fresh randomness every cycle (4 bits for GHPC, 64 for
// GHPC-LL). done pulses for one cycle; ct0/ct1 hold the ciphertext shares
// until the next start. Synchronous active-low reset.
module present_nibble_serial
  import ghpc_pkg::*;
#(
  parameter bit LOW_LATENCY = 1'b0,
  localparam int unsigned LAT = LOW_LATENCY ? 1 : 2,
  localparam int unsigned RW  = LOW_LATENCY ? 4 * 16 : 4
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [63:0]   pt0,
  input  logic [63:0]   pt1,
  input  logic [79:0]   key0,
  input  logic [79:0]   key1,
  input  logic [RW-1:0] rnd,
  output logic          busy,
  output logic          done,
  output logic [63:0]   ct0,
  output logic [63:0]   ct1
);
  localparam int unsigned RLEN = 17 + LAT;

  typedef enum logic [1:0] {S_IDLE, S_ROUND, S_FINAL} phase_e;

  phase_e      phase_q;
  logic [4:0]  t_q;
  logic [4:0]  round_q;
  logic [1:0][63:0] st_q;
  logic [1:0][79:0] kk_q;
  logic [79:0] krot [2];
  logic [3:0]  sb_in  [2];
  logic [3:0]  sb_out [2];

  always_comb begin
    for (int s = 0; s < 2; s++) begin
      krot[s] = {kk_q[s][18:0], kk_q[s][79:19]};
      if (t_q < 5'd16) sb_in[s] = st_q[s][4*t_q[3:0] +: 4] ^ kk_q[s][16 + 4*t_q[3:0] +: 4];
      else if (t_q == 5'd16) sb_in[s] = krot[s][79:76];
      else sb_in[s] = '0;
    end
  end

  if (LOW_LATENCY) begin : g_ll
    ghpc_ll #(.N(4), .M(4), .TABLE(LUT_PRESENT), .PIPELINE(1'b1)) u_sbox (
      .clk(clk), .x0(sb_in[0]), .x1(sb_in[1]), .r(rnd), .o0(sb_out[0]), .o1(sb_out[1])
    );
  end else begin : g_ghpc
    ghpc #(.N(4), .M(4), .TABLE(LUT_PRESENT), .PIPELINE(1'b1)) u_sbox (
      .clk(clk), .x0(sb_in[0]), .x1(sb_in[1]), .r(rnd), .o0(sb_out[0]), .o1(sb_out[1])
    );
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase_q <= S_IDLE;
      t_q     <= '0;
      round_q <= '0;
      done    <= 1'b0;
      for (int s = 0; s < 2; s++) begin
        st_q[s] <= '0;
        kk_q[s] <= '0;
      end
    end else begin
      done <= 1'b0;
      unique case (phase_q)
        S_IDLE: begin
          if (start) begin
            st_q[0] <= pt0;
            st_q[1] <= pt1;
            kk_q[0] <= key0;
            kk_q[1] <= key1;
            round_q <= 5'd1;
            t_q     <= '0;
            phase_q <= S_ROUND;
          end
        end
        S_ROUND: begin
          for (int s = 0; s < 2; s++) begin
            if (t_q >= 5'(LAT) && t_q < 5'(LAT + 16))
              st_q[s][4*(t_q - 5'(LAT)) +: 4] <= sb_out[s];
            if (t_q == 5'(RLEN - 1)) begin
              st_q[s] <= present_player(st_q[s]);
              kk_q[s] <= {sb_out[s], krot[s][75:20],
                          krot[s][19:15] ^ ((s == 0) ? round_q : 5'd0), krot[s][14:0]};
            end
          end
          if (t_q == 5'(RLEN - 1)) begin
            t_q <= '0;
            if (round_q == 5'd31) phase_q <= S_FINAL;
            else round_q <= round_q + 5'd1;
          end else begin
            t_q <= t_q + 5'd1;
          end
        end
        S_FINAL: begin
          for (int s = 0; s < 2; s++) st_q[s] <= st_q[s] ^ kk_q[s][79:16];
          done    <= 1'b1;
          phase_q <= S_IDLE;
        end
        default: phase_q <= S_IDLE;
      endcase
    end
  end

  assign busy = (phase_q != S_IDLE);
  assign ct0  = st_q[0];
  assign ct1  = st_q[1];

  a_done_idle: assert property (@(posedge clk) disable iff (!rst_n) done |-> !busy);

endmodule
