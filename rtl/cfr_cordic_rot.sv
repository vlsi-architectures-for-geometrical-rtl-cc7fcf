// cfr_cordic_rot: fully pipelined constant-factor-redundant (CFR) CORDIC, circular rotating
// mode. Rotates (x, y) by the angle z: x_out = x cos z - y sin z, y_out = x sin z + y cos z.
//
// Each micro-iteration i is one pipeline stage working on carry-save operands:
//   X <- X - s_i 2^-i Y,   Y <- Y + s_i 2^-i X,
//   U <- 2 (U - s_i 2^i atan 2^-i),  where U = 2^i Z is the scaled residual angle.
// The direction s_i is chosen from an estimate of U built from its integer bits and
// T fractional bits of both carry-save components (see cordic_pkg::cs_sign_estimate):
// s_i is +/-1 for i < N/2, so the gain K stays constant, and may be 0 for i >= N/2, where
// it no longer changes K at N-bit precision. Because the estimate can pick the wrong
// direction when U is tiny, correcting repetitions of index j (U <- U - 2 s 2^j atan 2^-j,
// X and Y rotated again by atan 2^-j) are inserted every T-1 indices and at N/2.
// After the micro-iterations the gain is removed by implicit scaling steps (cs_scaler) and
// a final carry-propagate addition returns ordinary two's complement words.
//
// The rotation is counter-clockwise by z, as in the mapper's Rot(x, theta); the printed
// X/Y recurrences of the CFR scheme have the opposite sign (clockwise). z must lie within +/-1.74 rad (sum of the angles),
// so the caller folds larger angles by quarter turns.
//
// Interface: x_in, y_in in the DW/DF data format, z_in in the DW/UF format (radians).
// Timing: one operand per clock, results LATENCY = cordic_latency(CIRCULAR, N, T, 0)
// cycles later (27 at N = 16, T = 4) with out_valid.
// Taken from the published scheme: the recurrences, the selection function, the correcting iterations and
// implicit scaling. Own choices: T = 4, the correction positions, word widths, the
// centred estimate and the greedy choice of scaling factors.
module cfr_cordic_rot
  import cordic_pkg::*;
#(
  parameter int N = N_ITER,
  parameter int T = T_EST
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  word_t x_in,
  input  word_t y_in,
  input  word_t z_in,
  output logic  out_valid,
  output word_t x_out,
  output word_t y_out
);
  localparam int NS      = num_stages(CIRCULAR, N, T, 0);
  localparam int LATENCY = cordic_latency(CIRCULAR, N, T, 0);

  cs_t xr [NS+1];
  cs_t yr [NS+1];
  cs_t ur [NS+1];

  assign xr[0] = cs_from_word(x_in);
  assign yr[0] = cs_from_word(y_in);
  assign ur[0] = cs_from_word(z_in);

  for (genvar k = 0; k < NS; k++) begin : g_stage
    localparam int    I   = stage_index(CIRCULAR, N, T, 0, k);
    localparam bit    REP = stage_repeat(CIRCULAR, N, T, 0, k);
    localparam word_t C   = REP ? (atan_scaled_u(I) <<< 1) : atan_scaled_u(I);

    sigma_e sig, nsig;
    cs_t xn, yn, ud, un;

    always_comb begin
      sig  = cfr_select(cs_sign_estimate(ur[k], UF, T), I, N);
      nsig = (sig == SIG_POS) ? SIG_NEG : (sig == SIG_NEG) ? SIG_POS : SIG_ZERO;
      xn   = cs_addsub(xr[k], yr[k], I, nsig);   // X - s 2^-i Y
      yn   = cs_addsub(yr[k], xr[k], I, sig);    // Y + s 2^-i X
      ud   = cs_addsub_w(ur[k], C, nsig);        // U - s c_i  (2 c_j for a correction)
      un   = REP ? ud : cs_shl1(ud);
    end

    always_ff @(posedge clk) begin
      xr[k+1] <= xn;
      yr[k+1] <= yn;
      ur[k+1] <= un;
    end
  end

  cs_t xs, ys;
  cs_scaler #(.MODE(CIRCULAR), .N(N), .T(T), .Q(0)) u_scale_x (.clk(clk), .d(xr[NS]), .q(xs));
  cs_scaler #(.MODE(CIRCULAR), .N(N), .T(T), .Q(0)) u_scale_y (.clk(clk), .d(yr[NS]), .q(ys));

  always_ff @(posedge clk) begin
    x_out <= xs.s + xs.c;
    y_out <= ys.s + ys.c;
  end

  delay_line #(.W(1), .D(LATENCY)) u_valid (
    .clk(clk), .rst_n(rst_n), .d(in_valid), .q(out_valid)
  );
endmodule
