// tb_ghpc_unit: drives one ghpc (or ghpc_ll when LL = 1) instance with random
// shares and masks every cycle (every second cycle without pipeline
// registers) and checks both output shares against tb_ref_pkg:
//   ghpc:    o0 == r, o0 ^ o1 == F(x0 ^ x1), two cycles after the inputs;
//   ghpc_ll: o0 == r_(x1), o0 ^ o1 == F(x0 ^ x1), one cycle after.
// Reports its counts on output ports when fin rises.
module tb_ghpc_unit
  import ghpc_pkg::*;
#(
  parameter int unsigned N        = 2,
  parameter int unsigned M        = 1,
  parameter lut_t        TABLE    = LUT_AND2,
  parameter int          FN       = 0,
  parameter bit          PIPELINE = 1'b1,
  parameter bit          LL       = 1'b0,
  parameter int          NVEC     = 300
) (
  input  logic clk,
  output int   checks,
  output int   failures,
  output logic fin
);
  localparam int unsigned RW  = LL ? M * (2 ** N) : M;
  localparam int unsigned LAT = LL ? 1 : 2;
  localparam int unsigned STEP = PIPELINE ? 1 : LAT;   // cycles per vector
  localparam int unsigned DLY  = PIPELINE ? LAT : 1;   // vectors in flight

  logic [N-1:0]  x0, x1;
  logic [RW-1:0] r;
  logic [M-1:0]  o0, o1;

  if (LL) begin : g_ll
    ghpc_ll #(.N(N), .M(M), .TABLE(TABLE), .PIPELINE(PIPELINE)) dut (
      .clk(clk), .x0(x0), .x1(x1), .r(r), .o0(o0), .o1(o1));
  end else begin : g_ghpc
    ghpc #(.N(N), .M(M), .TABLE(TABLE), .PIPELINE(PIPELINE)) dut (
      .clk(clk), .x0(x0), .x1(x1), .r(r), .o0(o0), .o1(o1));
  end

  logic [N-1:0]  h_x0 [NVEC];
  logic [N-1:0]  h_x1 [NVEC];
  logic [RW-1:0] h_r  [NVEC];

  function automatic logic [RW-1:0] rand_bits();
    logic [RW-1:0] v;
    for (int k = 0; k < RW; k++) v[k] = 1'($urandom());
    return v;
  endfunction

  initial begin
    checks = 0; failures = 0; fin = 0;
    x0 = '0; x1 = '0; r = '0;
    for (int c = 0; c < NVEC + DLY; c++) begin
      for (int k = 0; k < STEP; k++) @(negedge clk);
      if (c >= DLY) begin
        int p;
        logic [M-1:0] exp_o0, exp_f;
        p = c - DLY;
        exp_f = M'(tb_ref_pkg::ref_eval(FN, 8'(h_x0[p] ^ h_x1[p])));
        exp_o0 = LL ? h_r[p][h_x1[p]*M +: M] : h_r[p][M-1:0];
        checks += 2;
        if (o0 !== exp_o0) begin
          failures++;
          $display("FAIL N=%0d FN=%0d vec %0d: o0=%h expected %h", N, FN, p, o0, exp_o0);
        end
        if ((o0 ^ o1) !== exp_f) begin
          failures++;
          $display("FAIL N=%0d FN=%0d vec %0d: o0^o1=%h expected %h", N, FN, p, o0 ^ o1, exp_f);
        end
      end
      if (c < NVEC) begin
        // early vectors sweep all unshared values, later ones are random
        h_x0[c] = N'($urandom());
        h_x1[c] = (c < 2 ** N) ? (N'(c) ^ h_x0[c]) : N'($urandom());
        h_r[c]  = rand_bits();
        x0 = h_x0[c]; x1 = h_x1[c]; r = h_r[c];
      end
    end
    fin = 1;
  end

endmodule
