// tb_present_round_based: runs the masked round-based PRESENT-128 core with
// GHPC gadgets (u_ghpc, two encryptions in flight) and GHPC-LL gadgets
// (u_ll, one in flight). Checks the published all-zero vector of the
// reference model, then feeds back-to-back pairs of random plaintext/key
// pairs, each split into random shares, and checks every ciphertext in order
// of arrival, that share 0 alone differs from it, the latency of 31*LAT
// cycles from entry to out_valid (62 and 31), and that for GHPC the two
// encryptions of a pair are in the loop at the same time.
module tb_present_round_based;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n;
  int checks = 0, failures = 0;

  localparam int NPAIR = 4;

  logic         in_valid_g, in_ready_g, out_valid_g;
  logic         in_valid_l, in_ready_l, out_valid_l;
  logic [63:0]  pt0_g, pt1_g, pt0_l, pt1_l;
  logic [127:0] key0_g, key1_g, key0_l, key1_l;
  logic [71:0]  rnd_g;
  logic [1151:0] rnd_l;
  logic [63:0]  ct0_g, ct1_g, ct0_l, ct1_l;

  present_round_based #(.LOW_LATENCY(1'b0)) u_ghpc (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid_g), .in_ready(in_ready_g),
    .pt0(pt0_g), .pt1(pt1_g), .key0(key0_g), .key1(key1_g), .rnd(rnd_g),
    .out_valid(out_valid_g), .ct0(ct0_g), .ct1(ct1_g));
  present_round_based #(.LOW_LATENCY(1'b1)) u_ll (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid_l), .in_ready(in_ready_l),
    .pt0(pt0_l), .pt1(pt1_l), .key0(key0_l), .key1(key1_l), .rnd(rnd_l),
    .out_valid(out_valid_l), .ct0(ct0_l), .ct1(ct1_l));

  always @(negedge clk) begin
    for (int k = 0; k < 3; k++) rnd_g[24*k +: 24] <= 24'($urandom());
    for (int k = 0; k < 36; k++) rnd_l[32*k +: 32] <= $urandom();
  end

  // expected results in order of entry, with entry times
  logic [63:0] exp_g [$], exp_l [$];
  int          t_g [$], t_l [$];
  int          cyc = 0;
  int          n_out_g = 0, n_out_l = 0, overlap = 0;

  always @(posedge clk) cyc <= cyc + 1;

  function automatic logic [127:0] rand128();
    return {$urandom(), $urandom(), $urandom(), $urandom()};
  endfunction

  // output monitors
  always @(negedge clk) if (rst_n && out_valid_g) begin
    checks += 3;
    n_out_g++;
    if (exp_g.size() == 0) failures++;
    else begin
      logic [63:0] e; int t0;
      e = exp_g.pop_front(); t0 = t_g.pop_front();
      if ((ct0_g ^ ct1_g) !== e) begin failures++; $display("FAIL ghpc ct=%h expected %h", ct0_g ^ ct1_g, e); end
      if (ct0_g === e) begin failures++; $display("FAIL ghpc share 0 equals the ciphertext"); end
      if (cyc - t0 != 62) begin failures++; $display("FAIL ghpc latency %0d", cyc - t0); end
    end
  end
  always @(negedge clk) if (rst_n && out_valid_l) begin
    checks += 3;
    n_out_l++;
    if (exp_l.size() == 0) failures++;
    else begin
      logic [63:0] e; int t0;
      e = exp_l.pop_front(); t0 = t_l.pop_front();
      if ((ct0_l ^ ct1_l) !== e) begin failures++; $display("FAIL ll ct=%h expected %h", ct0_l ^ ct1_l, e); end
      if (ct0_l === e) begin failures++; $display("FAIL ll share 0 equals the ciphertext"); end
      if (cyc - t0 != 31) begin failures++; $display("FAIL ll latency %0d", cyc - t0); end
    end
  end
  always @(negedge clk) if (rst_n && exp_g.size() == 2) overlap++;   // two in the loop

  // drive one encryption into a core, waiting for in_ready
  task automatic push_g(input logic [63:0] pt, input logic [127:0] key);
    logic [63:0] m1; logic [127:0] m2;
    m1 = {$urandom(), $urandom()}; m2 = rand128();
    pt0_g = pt ^ m1; pt1_g = m1; key0_g = key ^ m2; key1_g = m2;
    in_valid_g = 1;
    while (!in_ready_g) @(negedge clk);
    exp_g.push_back(tb_ref_pkg::present128_enc(pt, key));
    t_g.push_back(cyc);
    @(negedge clk);
    in_valid_g = 0;
  endtask
  task automatic push_l(input logic [63:0] pt, input logic [127:0] key);
    logic [63:0] m1; logic [127:0] m2;
    m1 = {$urandom(), $urandom()}; m2 = rand128();
    pt0_l = pt ^ m1; pt1_l = m1; key0_l = key ^ m2; key1_l = m2;
    in_valid_l = 1;
    while (!in_ready_l) @(negedge clk);
    exp_l.push_back(tb_ref_pkg::present128_enc(pt, key));
    t_l.push_back(cyc);
    @(negedge clk);
    in_valid_l = 0;
  endtask

  initial begin
    checks++;
    if (tb_ref_pkg::present128_enc(64'h0, 128'h0) !== 64'h96db702a2e6900af) begin
      failures++; $display("FAIL reference model against the published vector");
    end
    rst_n = 0; in_valid_g = 0; in_valid_l = 0;
    pt0_g = '0; pt1_g = '0; key0_g = '0; key1_g = '0;
    pt0_l = '0; pt1_l = '0; key0_l = '0; key1_l = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    fork
      for (int p = 0; p < NPAIR; p++) begin
        push_g((p == 0) ? 64'h0 : {$urandom(), $urandom()}, (p == 0) ? 128'h0 : rand128());
        push_g({$urandom(), $urandom()}, rand128());
      end
      for (int p = 0; p < 2 * NPAIR; p++) push_l({$urandom(), $urandom()}, rand128());
    join
    repeat (80) @(negedge clk);
    checks += 3;
    if (n_out_g != 2 * NPAIR) begin failures++; $display("FAIL ghpc gave %0d results", n_out_g); end
    if (n_out_l != 2 * NPAIR) begin failures++; $display("FAIL ll gave %0d results", n_out_l); end
    if (overlap == 0) begin failures++; $display("FAIL two encryptions never shared the loop"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NPAIR * 200 + 200) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
