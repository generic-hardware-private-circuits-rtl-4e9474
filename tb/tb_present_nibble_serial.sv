// tb_present_nibble_serial: runs the masked nibble-serial PRESENT-80 core
// with the GHPC S-box (u_ghpc) and the GHPC-LL S-box (u_ll) on the published
// all-zero test vector and on random plaintexts and keys split into random
// shares. Checks the recombined ciphertext against the reference model, that
// share 0 alone differs from it, and the start-to-done latency
// 31*(17+LAT)+1 (590 and 559 clock edges).
module tb_present_nibble_serial;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n;
  int checks = 0, failures = 0;

  localparam int NVEC = 6;

  logic        start;
  logic [63:0] pt0, pt1;
  logic [79:0] key0, key1;
  logic [3:0]  rnd_g;
  logic [63:0] rnd_l;
  logic        busy_g, done_g, busy_l, done_l;
  logic [63:0] ct0_g, ct1_g, ct0_l, ct1_l;

  present_nibble_serial #(.LOW_LATENCY(1'b0)) u_ghpc (
    .clk(clk), .rst_n(rst_n), .start(start), .pt0(pt0), .pt1(pt1), .key0(key0), .key1(key1),
    .rnd(rnd_g), .busy(busy_g), .done(done_g), .ct0(ct0_g), .ct1(ct1_g));
  present_nibble_serial #(.LOW_LATENCY(1'b1)) u_ll (
    .clk(clk), .rst_n(rst_n), .start(start), .pt0(pt0), .pt1(pt1), .key0(key0), .key1(key1),
    .rnd(rnd_l), .busy(busy_l), .done(done_l), .ct0(ct0_l), .ct1(ct1_l));

  always @(negedge clk) begin
    rnd_g <= 4'($urandom());
    rnd_l <= {$urandom(), $urandom()};
  end

  task automatic check_run(input string tag, input logic [63:0] exp, input int cyc, input int exp_cyc,
                           input logic [63:0] c0, input logic [63:0] c1);
    checks += 3;
    if ((c0 ^ c1) !== exp) begin failures++; $display("FAIL %s: ct=%h expected %h", tag, c0 ^ c1, exp); end
    if (c0 === exp) begin failures++; $display("FAIL %s: share 0 equals the ciphertext", tag); end
    if (cyc != exp_cyc) begin failures++; $display("FAIL %s: %0d cycles, expected %0d", tag, cyc, exp_cyc); end
  endtask

  initial begin
    logic [63:0] pt, exp, m1;
    logic [79:0] key, m2;
    checks++;
    if (tb_ref_pkg::present80_enc(64'h0, 80'h0) !== 64'h5579c1387b228445) begin
      failures++; $display("FAIL reference model against the published vector");
    end
    rst_n = 0; start = 0;
    pt0 = '0; pt1 = '0; key0 = '0; key1 = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    pt = '0; key = '0;
    for (int v = 0; v < NVEC; v++) begin
      int cg, cl;
      if (v > 0) begin
        pt  = {$urandom(), $urandom()};
        key = {16'($urandom()), $urandom(), $urandom()};
      end
      exp = tb_ref_pkg::present80_enc(pt, key);
      m1 = {$urandom(), $urandom()};
      m2 = {16'($urandom()), $urandom(), $urandom()};
      @(negedge clk);
      pt0 = pt ^ m1; pt1 = m1; key0 = key ^ m2; key1 = m2;
      start = 1;
      @(negedge clk);
      start = 0;
      cg = 0; cl = 0;   // clock edges after the one that takes start
      fork
        begin while (!done_g) begin @(negedge clk); cg++; end end
        begin while (!done_l) begin @(negedge clk); cl++; end end
      join
      check_run("ghpc", exp, cg, 590, ct0_g, ct1_g);
      check_run("ghpc_ll", exp, cl, 559, ct0_l, ct1_l);
      while (busy_g || busy_l) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NVEC * 650 + 100) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
