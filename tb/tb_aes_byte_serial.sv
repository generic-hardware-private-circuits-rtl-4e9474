// tb_aes_byte_serial: runs the masked byte-serial AES-128 core with the GHPC
// S-box (u_ghpc) and with the GHPC-LL S-box (u_ll) on the FIPS-197 Appendix
// C.1 vector and on random plaintexts and keys, each input freshly split into
// two random shares. Checks, per encryption: the recombined ciphertext
// against the reference model, that share 0 alone differs from it, and the
// cycle count from start to done, 10*(21+LAT)+4 (234 and 224 cycles). The
// gadgets get fresh $urandom randomness every cycle.
module tb_aes_byte_serial;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n;
  int checks = 0, failures = 0;

  localparam int NVEC = 6;

  logic         start;
  logic [127:0] pt0, pt1, key0, key1;
  logic [7:0]   rnd_g;
  logic [2047:0] rnd_l;
  logic         busy_g, done_g, busy_l, done_l;
  logic [127:0] ct0_g, ct1_g, ct0_l, ct1_l;

  aes_byte_serial #(.LOW_LATENCY(1'b0)) u_ghpc (
    .clk(clk), .rst_n(rst_n), .start(start), .pt0(pt0), .pt1(pt1), .key0(key0), .key1(key1),
    .rnd(rnd_g), .busy(busy_g), .done(done_g), .ct0(ct0_g), .ct1(ct1_g));
  aes_byte_serial #(.LOW_LATENCY(1'b1)) u_ll (
    .clk(clk), .rst_n(rst_n), .start(start), .pt0(pt0), .pt1(pt1), .key0(key0), .key1(key1),
    .rnd(rnd_l), .busy(busy_l), .done(done_l), .ct0(ct0_l), .ct1(ct1_l));

  always @(negedge clk) begin
    rnd_g <= 8'($urandom());
    for (int k = 0; k < 64; k++) rnd_l[32*k +: 32] <= $urandom();
  end

  function automatic logic [127:0] rand128();
    return {$urandom(), $urandom(), $urandom(), $urandom()};
  endfunction

  task automatic check_run(input string tag, input logic [127:0] exp, input int cyc, input int exp_cyc,
                           input logic [127:0] c0, input logic [127:0] c1);
    checks += 3;
    if ((c0 ^ c1) !== exp) begin
      failures++;
      $display("FAIL %s: ct=%h expected %h", tag, c0 ^ c1, exp);
    end
    if (c0 === exp) begin
      failures++;
      $display("FAIL %s: share 0 equals the ciphertext", tag);
    end
    if (cyc != exp_cyc) begin
      failures++;
      $display("FAIL %s: %0d cycles, expected %0d", tag, cyc, exp_cyc);
    end
  endtask

  initial begin
    logic [127:0] pt, key, exp;
    // the reference model against the published vector
    pt  = tb_ref_pkg::bswap128(128'h00112233445566778899aabbccddeeff);
    key = tb_ref_pkg::bswap128(128'h000102030405060708090a0b0c0d0e0f);
    checks++;
    if (tb_ref_pkg::aes128_enc(pt, key) !== tb_ref_pkg::bswap128(128'h69c4e0d86a7b0430d8cdb78070b4c55a)) begin
      failures++;
      $display("FAIL reference model against FIPS-197");
    end
    rst_n = 0; start = 0;
    pt0 = '0; pt1 = '0; key0 = '0; key1 = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int v = 0; v < NVEC; v++) begin
      int cg, cl;
      logic [127:0] m1, m2;
      if (v > 0) begin
        pt  = rand128();
        key = rand128();
      end
      exp = tb_ref_pkg::aes128_enc(pt, key);
      m1 = rand128(); m2 = rand128();
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
      check_run("ghpc", exp, cg, 234, ct0_g, ct1_g);
      check_run("ghpc_ll", exp, cl, 224, ct0_l, ct1_l);
      while (busy_g || busy_l) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NVEC * 300 + 100) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
