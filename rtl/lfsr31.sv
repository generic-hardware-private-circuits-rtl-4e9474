// lfsr31: 31-bit Fibonacci linear-feedback shift register with feedback
// polynomial x^31 + x^28 + 1 (maximal length, period 2^31 - 1), the source
// of one fresh random bit per clock cycle for the masked gadgets.
//
// How it works: each cycle the register shifts left by one and the new bit 0
// is s[30] ^ s[27] (the taps of x^31 and x^28). The output bit is s[30].
// The polynomial follows the document; the seed is loaded by the
// active-low synchronous reset and must be non-zero (an all-zero seed is
// replaced by 1, an own safeguard, since the all-zero state never leaves).
//
// Interface and timing: rst_n loads SEED; from the next edge on, rnd gives a
// new bit every cycle.
module lfsr31 #(
  parameter logic [30:0] SEED = 31'h1
) (
  input  logic clk,
  input  logic rst_n,
  output logic rnd
);
  localparam logic [30:0] INIT = (SEED == '0) ? 31'h1 : SEED;

  logic [30:0] s;

  always_ff @(posedge clk) begin
    if (!rst_n) s <= INIT;
    else        s <= {s[29:0], s[30] ^ s[27]};
  end

  assign rnd = s[30];

endmodule
