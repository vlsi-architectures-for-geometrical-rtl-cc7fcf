// affine_transformer: destination address of a pixel under the composite affine mapping
//   (x, y) . Rot(theta) . Trans(x, d) . Scale(x, c)
//   u = c (x cos theta - y sin theta + d),   v = x sin theta + y cos theta
// which slides, rotates and resizes a sub-image (picture-in-picture, templates).
//
// Structure (one pixel per clock, fully pipelined):
//   1 cycle   quarter-turn folding: an angle beyond +/-pi/2 is brought back by exactly
//             pi/2 while (x, y) is turned by a quarter turn (a swap and a negation), so the
//             CORDIC sees |z| <= pi/2, inside its convergence range
//  28 cycles  cfr_cordic_rot: rotation with its gain removed by implicit scaling
//   1 cycle   translator: x' + d
//   1 cycle   scaling along x: (x' + d) * c, rounding of u and v to the coordinate format
//             with saturation; ovf flags a result outside the 16-bit range
// Latency affine_latency(N, T) = 31 cycles, one pixel per clock; theta, d and c travel with
// each pixel, so they may change from pixel to pixel.
//
// Interface: x_in, y_in, d_in, u_out, v_out are 12.4 two's complement coordinates;
// theta_in is radians in 3.17 format, [-pi, pi]; c_in is an unsigned 2.8 scale factor.
// The CORDIC and the added translation follow the published architecture. The quarter-turn
// folding, the separate translator register, the multiplier used for Scale(x, c), the
// formats and the saturation are choices of this design.
module affine_transformer
  import cordic_pkg::*;
#(
  parameter int N = N_ITER,
  parameter int T = T_EST
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      in_valid,
  input  logic signed [COORD_W-1:0] x_in,
  input  logic signed [COORD_W-1:0] y_in,
  input  logic signed [ANG_W-1:0]   theta_in,
  input  logic signed [COORD_W-1:0] d_in,
  input  logic        [SCALE_W-1:0] c_in,
  output logic                      out_valid,
  output logic signed [COORD_W-1:0] u_out,
  output logic signed [COORD_W-1:0] v_out,
  output logic                      ovf,
  output logic                      folded      // the pixel's angle needed folding
);
  localparam int ROT_LAT = cordic_latency(CIRCULAR, N, T, 0);
  localparam logic signed [ANG_W-1:0] HALF_PI = ANG_W'(half_pi_ang());

  // ---------------------------------------------------------------- quarter-turn folding
  logic  v0;
  word_t x0, y0, z0;
  logic  f0;
  logic signed [COORD_W-1:0] d0;
  logic        [SCALE_W-1:0] c0;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v0 <= 1'b0;
    end else begin
      v0 <= in_valid;
    end
    d0 <= d_in;
    c0 <= c_in;
    if (theta_in > HALF_PI) begin
      x0 <= -coord_to_word(y_in);
      y0 <= coord_to_word(x_in);
      z0 <= (word_t'(theta_in) - word_t'(HALF_PI)) <<< (UF - ANG_F);
      f0 <= 1'b1;
    end else if (theta_in < -HALF_PI) begin
      x0 <= coord_to_word(y_in);
      y0 <= -coord_to_word(x_in);
      z0 <= (word_t'(theta_in) + word_t'(HALF_PI)) <<< (UF - ANG_F);
      f0 <= 1'b1;
    end else begin
      x0 <= coord_to_word(x_in);
      y0 <= coord_to_word(y_in);
      z0 <= word_t'(theta_in) <<< (UF - ANG_F);
      f0 <= 1'b0;
    end
  end

  // ---------------------------------------------------------------- rotation
  logic  vr;
  word_t xr, yr;
  cfr_cordic_rot #(.N(N), .T(T)) u_rot (
    .clk(clk), .rst_n(rst_n), .in_valid(v0), .x_in(x0), .y_in(y0), .z_in(z0),
    .out_valid(vr), .x_out(xr), .y_out(yr)
  );

  // side-band operands follow the CORDIC
  logic signed [COORD_W-1:0] dr;
  logic        [SCALE_W-1:0] cr;
  logic                      fr;
  delay_line #(.W(COORD_W + SCALE_W + 1), .D(ROT_LAT)) u_side (
    .clk(clk), .rst_n(rst_n), .d({d0, c0, f0}), .q({dr, cr, fr})
  );

  // ---------------------------------------------------------------- translator
  logic  vt, ft;
  word_t xt, yt;
  logic  [SCALE_W-1:0] ct;
  always_ff @(posedge clk) begin
    if (!rst_n) vt <= 1'b0;
    else        vt <= vr;
    xt <= xr + coord_to_word(dr);
    yt <= yr;
    ct <= cr;
    ft <= fr;
  end

  // ---------------------------------------------------------------- scaling and rounding
  localparam int PW = DW + SCALE_W + 1;
  logic signed [PW-1:0] prod;
  word_t                us;
  logic signed [COORD_W-1:0] u_n, v_n;
  logic                 u_ovf, v_ovf;

  always_comb begin
    prod = PW'(xt) * $signed({1'b0, ct});
    us   = word_t'(prod >>> SCALE_F);   // |u| stays far below 2^(DW-DF-1) pixels
    u_n  = round_sat(us, u_ovf);
    v_n  = round_sat(yt, v_ovf);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= vt;
    u_out  <= u_n;
    v_out  <= v_n;
    ovf    <= u_ovf | v_ovf;
    folded <= ft;
  end
endmodule
