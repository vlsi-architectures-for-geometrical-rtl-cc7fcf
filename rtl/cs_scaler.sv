// cs_scaler: implicit scale-factor compensation for a CFR-CORDIC pipeline.
// Instead of dividing the result by the CORDIC gain K, the carry-save value passes through
// a few extra shift-and-add micro-steps v <- v +/- 2^-k v, one per pipeline register. The
// shifts k and signs are chosen at elaboration time by cordic_pkg::scale_factor, a greedy
// search that makes the product of the factors equal to 1/K within 2^-(N+3). For the
// circular and hyperbolic modes at N = 16 this is 7 factors; the linear mode has gain 1
// and no factor, in which case the block is a wire.
// Interface: carry-save value in, carry-save value out, latency num_scale(...) cycles.
// The data registers have no reset: the enclosing pipeline tracks validity. With no factor
// (linear mode) clk is left unused.
module cs_scaler
  import cordic_pkg::*;
#(
  parameter cordic_mode_e MODE = CIRCULAR,
  parameter int           N    = N_ITER,
  parameter int           T    = T_EST,
  parameter int           Q    = 0
) (
  input  logic clk,
  input  cs_t  d,
  output cs_t  q
);
  localparam int NSC = num_scale(MODE, N, T, Q);

  cs_t r [NSC+1];
  assign r[0] = d;

  for (genvar j = 0; j < NSC; j++) begin : g_fac
    localparam int F = scale_factor(MODE, N, T, Q, j);
    localparam int SH = (F > 0) ? F : -F;
    localparam sigma_e OP = (F > 0) ? SIG_POS : SIG_NEG;
    always_ff @(posedge clk) r[j+1] <= cs_addsub(r[j], r[j], SH, OP);
  end

  assign q = r[NSC];
endmodule
