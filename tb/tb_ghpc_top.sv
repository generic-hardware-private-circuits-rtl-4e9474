// tb_ghpc_top: end-to-end test of ghpc_top at its default parameters (GHPC
// gadgets, on-chip LFSR randomness). It shares random inputs, runs all three
// cores at once and checks every recombined ciphertext against the reference
// model and its latency: one AES-128 encryption (234 cycles), two
// PRESENT-80 nibble-serial encryptions (590 cycles each) and three pairs of
// PRESENT-128 round-based encryptions (62 cycles). It also counts how often
// each mechanism of the design happened and fails if one never did:
//   aes_key_feed    key bytes entering the shared AES S-box gadget
//   aes_state_feed  state bytes entering it
//   aes_mc_overlap  MixColumns done while key bytes enter the gadget
//   aes_final_ark   cycles of the final key addition after round 10
//   ps_key_sbox     key nibble through the shared PRESENT S-box gadget
//   ps_player       parallel permutation-layer cycles
//   pr_interleave   cycles with two round-based encryptions in the loop
//   pr_backpressure cycles where in_valid waited for in_ready
//   rnd_fresh       cycles where the AES randomness changed
module tb_ghpc_top;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n;
  int checks = 0, failures = 0;

  logic         aes_start, aes_busy, aes_done;
  logic [127:0] aes_pt0, aes_pt1, aes_key0, aes_key1, aes_ct0, aes_ct1;
  logic         ps_start, ps_busy, ps_done;
  logic [63:0]  ps_pt0, ps_pt1, ps_ct0, ps_ct1;
  logic [79:0]  ps_key0, ps_key1;
  logic         pr_in_valid, pr_in_ready, pr_out_valid;
  logic [63:0]  pr_pt0, pr_pt1, pr_ct0, pr_ct1;
  logic [127:0] pr_key0, pr_key1;

  ghpc_top dut (.*);

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // mechanism counters
  int aes_key_feed = 0, aes_state_feed = 0, aes_mc_overlap = 0, aes_final_ark = 0;
  int ps_key_sbox = 0, ps_player = 0, pr_interleave = 0, pr_backpressure = 0, rnd_fresh = 0;
  logic [7:0] rnd_prev;

  // phase encodings of the cores: 1 = rounds, 2 = final key addition
  always @(negedge clk) if (rst_n) begin
    if (dut.u_aes.phase_q == 2'd1) begin
      if (dut.u_aes.t_q < 4) aes_key_feed++;
      else if (dut.u_aes.t_q < 20) aes_state_feed++;
      if (dut.u_aes.t_q < 4 && dut.u_aes.round_q != 1) aes_mc_overlap++;
    end
    if (dut.u_aes.phase_q == 2'd2) aes_final_ark++;
    if (dut.u_pres_ser.phase_q == 2'd1) begin
      if (dut.u_pres_ser.t_q == 16) ps_key_sbox++;
      if (dut.u_pres_ser.t_q == 18) ps_player++;
    end
    if (pr_exp.size() == 2) pr_interleave++;
    if (pr_in_valid && !pr_in_ready) pr_backpressure++;
    if (dut.aes_rnd != rnd_prev) rnd_fresh++;
    rnd_prev <= dut.aes_rnd;
  end

  function automatic logic [127:0] rand128();
    return {$urandom(), $urandom(), $urandom(), $urandom()};
  endfunction

  // round-based PRESENT results, checked in order
  logic [63:0] pr_exp [$];
  int          pr_t [$];
  int          pr_n = 0;
  always @(negedge clk) if (rst_n && pr_out_valid) begin
    checks += 2;
    pr_n++;
    if (pr_exp.size() == 0) failures++;
    else begin
      logic [63:0] e; int t0;
      e = pr_exp.pop_front(); t0 = pr_t.pop_front();
      if ((pr_ct0 ^ pr_ct1) !== e) begin failures++; $display("FAIL pr ct=%h expected %h", pr_ct0 ^ pr_ct1, e); end
      if (cyc - t0 != 62) begin failures++; $display("FAIL pr latency %0d", cyc - t0); end
    end
  end

  task automatic run_aes();
    logic [127:0] pt, key, m1, m2, exp;
    int n;
    pt = rand128(); key = rand128(); m1 = rand128(); m2 = rand128();
    exp = tb_ref_pkg::aes128_enc(pt, key);
    aes_pt0 = pt ^ m1; aes_pt1 = m1; aes_key0 = key ^ m2; aes_key1 = m2;
    aes_start = 1;
    @(negedge clk);
    aes_start = 0;
    n = 0;
    while (!aes_done) begin @(negedge clk); n++; end
    checks += 2;
    if ((aes_ct0 ^ aes_ct1) !== exp) begin failures++; $display("FAIL aes ct=%h expected %h", aes_ct0 ^ aes_ct1, exp); end
    if (n != 234) begin failures++; $display("FAIL aes latency %0d", n); end
  endtask

  task automatic run_ps();
    logic [63:0] pt, m1, exp;
    logic [79:0] key, m2;
    int n;
    pt = {$urandom(), $urandom()}; key = {16'($urandom()), $urandom(), $urandom()};
    m1 = {$urandom(), $urandom()}; m2 = {16'($urandom()), $urandom(), $urandom()};
    exp = tb_ref_pkg::present80_enc(pt, key);
    ps_pt0 = pt ^ m1; ps_pt1 = m1; ps_key0 = key ^ m2; ps_key1 = m2;
    ps_start = 1;
    @(negedge clk);
    ps_start = 0;
    n = 0;
    while (!ps_done) begin @(negedge clk); n++; end
    checks += 2;
    if ((ps_ct0 ^ ps_ct1) !== exp) begin failures++; $display("FAIL ps ct=%h expected %h", ps_ct0 ^ ps_ct1, exp); end
    if (n != 590) begin failures++; $display("FAIL ps latency %0d", n); end
  endtask

  task automatic push_pr();
    logic [63:0] pt, m1; logic [127:0] key, m2;
    pt = {$urandom(), $urandom()}; key = rand128();
    m1 = {$urandom(), $urandom()}; m2 = rand128();
    pr_pt0 = pt ^ m1; pr_pt1 = m1; pr_key0 = key ^ m2; pr_key1 = m2;
    pr_in_valid = 1;
    while (!pr_in_ready) @(negedge clk);
    pr_exp.push_back(tb_ref_pkg::present128_enc(pt, key));
    pr_t.push_back(cyc);
    @(negedge clk);
    pr_in_valid = 0;
  endtask

  initial begin
    rst_n = 0;
    aes_start = 0; ps_start = 0; pr_in_valid = 0;
    aes_pt0 = '0; aes_pt1 = '0; aes_key0 = '0; aes_key1 = '0;
    ps_pt0 = '0; ps_pt1 = '0; ps_key0 = '0; ps_key1 = '0;
    pr_pt0 = '0; pr_pt1 = '0; pr_key0 = '0; pr_key1 = '0;
    rnd_prev = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    fork
      run_aes();
      begin run_ps(); run_ps(); end
      // three back-to-back pairs: the third push of each burst waits for a slot
      repeat (2) begin
        repeat (3) push_pr();
        repeat (70) @(negedge clk);
      end
    join
    repeat (70) @(negedge clk);
    checks += 10;
    if (pr_n != 6) begin failures++; $display("FAIL pr gave %0d results", pr_n); end
    if (aes_key_feed == 0)    begin failures++; $display("FAIL never: aes_key_feed"); end
    if (aes_state_feed == 0)  begin failures++; $display("FAIL never: aes_state_feed"); end
    if (aes_mc_overlap == 0)  begin failures++; $display("FAIL never: aes_mc_overlap"); end
    if (aes_final_ark == 0)   begin failures++; $display("FAIL never: aes_final_ark"); end
    if (ps_key_sbox == 0)     begin failures++; $display("FAIL never: ps_key_sbox"); end
    if (ps_player == 0)       begin failures++; $display("FAIL never: ps_player"); end
    if (pr_interleave == 0)   begin failures++; $display("FAIL never: pr_interleave"); end
    if (pr_backpressure == 0) begin failures++; $display("FAIL never: pr_backpressure"); end
    if (rnd_fresh == 0)       begin failures++; $display("FAIL never: rnd_fresh"); end
    $display("mechanisms: aes_key_feed=%0d aes_state_feed=%0d aes_mc_overlap=%0d aes_final_ark=%0d",
             aes_key_feed, aes_state_feed, aes_mc_overlap, aes_final_ark);
    $display("mechanisms: ps_key_sbox=%0d ps_player=%0d pr_interleave=%0d pr_backpressure=%0d rnd_fresh=%0d",
             ps_key_sbox, ps_player, pr_interleave, pr_backpressure, rnd_fresh);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
