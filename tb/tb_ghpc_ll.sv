// tb_ghpc: self-checking test of the one-stage GHPC-LL gadget for the document's
// example functions (2- and 3-input AND, PRESENT, PRINCE, Skinny-64 and Rectangle S-boxes, AES
// S-box) with pipeline registers, and for PRESENT without them. Each unit
// checks output share o0 against the fresh mask and the recombined output
// against the reference function, at one cycle of latency, with o0 checked against the mask of the selected cofactor.
module tb_ghpc_ll;
  import ghpc_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  localparam int NU = 9;
  int   ck [NU];
  int   fl [NU];
  logic fn [NU];
  int   checks, failures;

  tb_ghpc_unit #(.N(2), .M(1), .TABLE(LUT_AND2),    .FN(tb_ref_pkg::FN_AND2), .LL(1'b1))    u0 (clk, ck[0], fl[0], fn[0]);
  tb_ghpc_unit #(.N(3), .M(1), .TABLE(LUT_AND3),    .FN(tb_ref_pkg::FN_AND3), .LL(1'b1))    u1 (clk, ck[1], fl[1], fn[1]);
  tb_ghpc_unit #(.N(4), .M(4), .TABLE(LUT_PRESENT), .FN(tb_ref_pkg::FN_PRESENT), .LL(1'b1)) u2 (clk, ck[2], fl[2], fn[2]);
  tb_ghpc_unit #(.N(4), .M(4), .TABLE(LUT_PRINCE),  .FN(tb_ref_pkg::FN_PRINCE), .LL(1'b1))  u3 (clk, ck[3], fl[3], fn[3]);
  tb_ghpc_unit #(.N(8), .M(8), .TABLE(LUT_AES),     .FN(tb_ref_pkg::FN_AES), .NVEC(600), .LL(1'b1)) u4 (clk, ck[4], fl[4], fn[4]);
  tb_ghpc_unit #(.N(4), .M(4), .TABLE(LUT_PRESENT), .FN(tb_ref_pkg::FN_PRESENT), .PIPELINE(1'b0), .LL(1'b1)) u5 (clk, ck[5], fl[5], fn[5]);
  tb_ghpc_unit #(.N(2), .M(1), .TABLE(LUT_AND2),    .FN(tb_ref_pkg::FN_AND2), .PIPELINE(1'b0), .LL(1'b1)) u6 (clk, ck[6], fl[6], fn[6]);

  tb_ghpc_unit #(.N(4), .M(4), .TABLE(LUT_SKINNY64), .FN(tb_ref_pkg::FN_SKINNY), .LL(1'b1)) u7 (clk, ck[7], fl[7], fn[7]);
  tb_ghpc_unit #(.N(4), .M(4), .TABLE(LUT_RECTANGLE), .FN(tb_ref_pkg::FN_RECTANGLE), .LL(1'b1)) u8 (clk, ck[8], fl[8], fn[8]);
  initial begin
    @(posedge clk);
    wait (fn[0] && fn[1] && fn[2] && fn[3] && fn[4] && fn[5] && fn[6] && fn[7] && fn[8]);
    checks = 0; failures = 0;
    for (int i = 0; i < NU; i++) begin checks += ck[i]; failures += fl[i]; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", 0, 1);
    $finish;
  end
endmodule
