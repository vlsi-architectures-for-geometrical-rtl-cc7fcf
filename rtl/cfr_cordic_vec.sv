// cfr_cordic_vec: fully pipelined CFR-CORDIC in vectoring mode, the elementary-function
// generator of the spherical transformer. MODE selects the coordinate system:
//   CIRCULAR    result = sqrt(x^2 + y^2)        (x >= 0), and angle = atan(y / x)
//   HYPERBOLIC  result = sqrt(x^2 - y^2)        (x > 0, |y| < 0.806 x)
//   LINEAR      result = m * y / x              (x > 0, |y / x| < 2^(LIN_Q+1))
// The Y recurrence is kept as W = 2^i Y so that the selection needs only the sign of an
// estimate of W, like the scaled angle U of the rotating mode:
//   W <- 2 (W - s X),           X <- X + m s 2^-2i W   (m = +1 circular, -1 hyperbolic,
//                                                     0 linear)
//   Z <- Z + s M 2^-i            (linear mode; M is the multiplicand operand)
//   Z <- Z + s atan 2^-i         (circular mode: the angle of (x, y), on a_out)
// s is +/-1 for i < N/2 and +/-1/0 above, from the centred estimate of W (T fractional
// bits). A repeated index j (circular correcting iteration, hyperbolic repetition at 4 and
// 13) uses W <- W - 2 s X and X <- X + m s 2^-(2j+1) W. Circular and hyperbolic results
// pass through implicit scaling steps that remove the gain; the linear mode has none.
// All operands are carry-save inside the pipeline; the output is an ordinary word.
//
// Interface: x_in, y_in, m_in, r_out in the DW/DF data format; a_out (circular mode only,
// 0 otherwise) in radians with UF fractional bits, aligned with r_out. One operand set per
// clock, result LATENCY = cordic_latency(MODE, N, T, Q) cycles later with out_valid (circular 28,
// hyperbolic 26, linear 18 at the defaults).
// Taken from the published scheme: the W recurrence, the selection function and the
// correcting iteration of the circular mode. Own choices: the same W form applied to the
// hyperbolic and linear modes, the multiplicand M folded into the linear Z recurrence (so
// a division also scales by M), the LIN_Q leading steps, T and the word widths.
module cfr_cordic_vec
  import cordic_pkg::*;
#(
  parameter cordic_mode_e MODE = CIRCULAR,
  parameter int           N    = N_ITER,
  parameter int           T    = T_EST,
  parameter int           Q    = (MODE == LINEAR) ? LIN_Q : 0
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  word_t x_in,
  input  word_t y_in,
  input  word_t m_in,
  output logic  out_valid,
  output word_t r_out,
  output word_t a_out
);
  localparam int NS      = num_stages(MODE, N, T, Q);
  localparam int LATENCY = cordic_latency(MODE, N, T, Q);

  cs_t   xr [NS+1];
  cs_t   wr [NS+1];
  cs_t   zr [NS+1];
  word_t mr [NS+1];

  // Initial W = 2^i0 * Y for the first index i0 (0, 1 or -Q).
  assign xr[0] = cs_from_word(x_in);
  assign wr[0] = cs_from_word(shift_w(y_in, -stage_index(MODE, N, T, Q, 0)));
  assign zr[0] = cs_from_word('0);
  assign mr[0] = m_in;

  for (genvar k = 0; k < NS; k++) begin : g_stage
    localparam int I   = stage_index(MODE, N, T, Q, k);
    localparam bit REP = stage_repeat(MODE, N, T, Q, k);
    localparam int XSH = REP ? 2 * I + 1 : 2 * I;

    sigma_e sig, nsig;
    cs_t xn, wd, wn, zn;

    always_comb begin
      sig  = cfr_select(cs_sign_estimate(wr[k], DF, T), I, N);
      nsig = (sig == SIG_POS) ? SIG_NEG : (sig == SIG_NEG) ? SIG_POS : SIG_ZERO;
      // W - s X (normal) or W - 2 s X (repetition), then doubled for a normal step
      wd   = cs_addsub(wr[k], xr[k], REP ? -1 : 0, nsig);
      wn   = REP ? wd : cs_shl1(wd);
      case (MODE)
        CIRCULAR:   xn = cs_addsub(xr[k], wr[k], XSH, sig);
        HYPERBOLIC: xn = cs_addsub(xr[k], wr[k], XSH, nsig);
        default:    xn = xr[k];
      endcase
      case (MODE)
        LINEAR:   zn = cs_addsub_w(zr[k], shift_w(mr[k], I), sig);
        CIRCULAR: zn = cs_addsub_w(zr[k], atan_u(I), sig);
        default:  zn = zr[k];
      endcase
    end

    always_ff @(posedge clk) begin
      xr[k+1] <= xn;
      wr[k+1] <= wn;
      zr[k+1] <= zn;
      mr[k+1] <= mr[k];
    end
  end

  cs_t res;
  cs_scaler #(.MODE(MODE), .N(N), .T(T), .Q(Q)) u_scale (
    .clk(clk), .d((MODE == LINEAR) ? zr[NS] : xr[NS]), .q(res)
  );

  // The angle skips the scaling steps: a delay line keeps it aligned with r_out.
  word_t ang, ang_d;
  assign ang = (MODE == CIRCULAR) ? zr[NS].s + zr[NS].c : '0;
  delay_line #(.W(DW), .D(LATENCY - NS - 1)) u_ang (
    .clk(clk), .rst_n(rst_n), .d(ang), .q(ang_d)
  );

  always_ff @(posedge clk) begin
    r_out <= res.s + res.c;
    a_out <= ang_d;
  end

  delay_line #(.W(1), .D(LATENCY)) u_valid (
    .clk(clk), .rst_n(rst_n), .d(in_valid), .q(out_valid)
  );
endmodule
