// tb_prng: checks a 16-bit prng: after reset, bit k must follow the LFSR
// recurrence out[t] = out[t-31] ^ out[t-28] started from seed
// ((k + 1 + SEED_BASE) * 0x9E3779B1) mod 2^31; all seeds must be non-zero and
// distinct, and the bits must not all be equal over the run.
module tb_prng;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n;
  localparam int NB = 16;
  localparam int SB = 7;
  localparam int T = 500;
  logic [NB-1:0] rnd;
  int checks = 0, failures = 0;

  prng #(.NBITS(NB), .SEED_BASE(SB)) dut (.clk(clk), .rst_n(rst_n), .rnd(rnd));

  logic s [NB][T];
  logic [30:0] seed [NB];
  int ones [NB];

  initial begin
    for (int k = 0; k < NB; k++) begin
      longint unsigned p;
      p = longint'(k + 1 + SB) * 64'h9E37_79B1;
      seed[k] = p[30:0];
      for (int t = 0; t < 31; t++) s[k][t] = seed[k][30-t];
      for (int t = 31; t < T; t++) s[k][t] = s[k][t-31] ^ s[k][t-28];
      ones[k] = 0;
    end
    for (int i = 0; i < NB; i++) begin
      checks++;
      if (seed[i] == 0) failures++;
      for (int j = i + 1; j < NB; j++) if (seed[i] == seed[j]) failures++;
    end
    rst_n = 0;
    @(negedge clk); @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < T; t++) begin
      for (int k = 0; k < NB; k++) begin
        checks++;
        ones[k] += int'(rnd[k]);
        if (rnd[k] !== s[k][t]) begin
          failures++;
          if (failures < 5) $display("FAIL bit %0d t=%0d", k, t);
        end
      end
      @(negedge clk);
    end
    for (int k = 0; k < NB; k++) begin
      checks++;
      if (ones[k] < T / 4 || ones[k] > 3 * T / 4) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (T + 100) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
