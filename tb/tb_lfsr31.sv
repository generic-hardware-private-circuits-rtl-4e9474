// tb_lfsr31: checks the output stream of lfsr31 against the linear
// recurrence of x^31 + x^28 + 1, out[t] = out[t-31] ^ out[t-28], with the
// first 31 bits given by the seed (MSB first). Two instances: a normal seed
// and the all-zero seed, which must behave as seed 1.
module tb_lfsr31;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n;
  logic rnd_a, rnd_b;
  int checks = 0, failures = 0;

  localparam logic [30:0] SEED_A = 31'h5A5A_1234;

  lfsr31 #(.SEED(SEED_A)) u_a (.clk(clk), .rst_n(rst_n), .rnd(rnd_a));
  lfsr31 #(.SEED('0))     u_b (.clk(clk), .rst_n(rst_n), .rnd(rnd_b));

  localparam int T = 2000;
  logic sa [T];
  logic sb [T];

  initial begin
    for (int t = 0; t < 31; t++) begin
      sa[t] = SEED_A[30-t];
      sb[t] = (t == 30);
    end
    for (int t = 31; t < T; t++) begin
      sa[t] = sa[t-31] ^ sa[t-28];
      sb[t] = sb[t-31] ^ sb[t-28];
    end
    rst_n = 0;
    @(negedge clk); @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < T; t++) begin
      checks += 2;
      if (rnd_a !== sa[t]) begin failures++; if (failures < 5) $display("FAIL a t=%0d", t); end
      if (rnd_b !== sb[t]) begin failures++; if (failures < 5) $display("FAIL b t=%0d", t); end
      @(negedge clk);
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
