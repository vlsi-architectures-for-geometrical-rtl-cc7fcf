// geometric_mapper: geometrical mapping processor. For every pixel (x, y) of a sub-image
// it computes the destination address (u, v) under one of two transformations, chosen per
// pixel by mode:
//   MAP_AFFINE     u = c (x cos theta - y sin theta + d),  v = x sin theta + y cos theta
//   MAP_SPHERICAL  u = r x / sqrt(r^2 - x^2 - y^2),        v = r y / sqrt(r^2 - x^2 - y^2)
// Both transformers are fully spanned pipelines of CFR-CORDIC elements (one CORDIC for the
// affine map, four for the spherical map) and accept one pixel per clock. A pixel enters
// only the transformer its mode selects. The affine result is delayed to the spherical
// latency, so results leave in input order, one per clock, whatever the mix of modes, and
// the mode may change on any pixel without a bubble.
//
// Interface: coordinates x_in, y_in, d_in, r_in, u_out, v_out are 12.4 two's complement;
// theta_in radians in 3.17 format; c_in unsigned 2.8. out_of_range is set when a result
// saturated (either mode) or the point lies outside the usable sphere (rho / r >= 0.8,
// spherical mode; u = v = 0 then). out_mode returns the mode of the result.
// Timing: LATENCY = spherical_latency(N, T) + 1 = 75 cycles from in_valid to out_valid.
// The two transformers and their CORDIC arrangement follow the published architecture; the
// per-pixel mode selection and in-order merging are choices of this design.
module geometric_mapper
  import cordic_pkg::*;
#(
  parameter int N = N_ITER,
  parameter int T = T_EST
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  map_mode_e           mode,
  input  coord_t              x_in,
  input  coord_t              y_in,
  input  logic signed [ANG_W-1:0] theta_in,
  input  coord_t              d_in,
  input  logic [SCALE_W-1:0]  c_in,
  input  coord_t              r_in,
  output logic                out_valid,
  output map_mode_e           out_mode,
  output coord_t              u_out,
  output coord_t              v_out,
  output logic                out_of_range
);
  localparam int AFF_LAT = affine_latency(N, T);
  localparam int SPH_LAT = spherical_latency(N, T);

  // ---------------------------------------------------------------- affine path
  logic   a_v, a_ovf;
  coord_t a_u, a_vv;
  affine_transformer #(.N(N), .T(T)) u_affine (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid && mode == MAP_AFFINE),
    .x_in(x_in), .y_in(y_in), .theta_in(theta_in), .d_in(d_in), .c_in(c_in),
    .out_valid(a_v), .u_out(a_u), .v_out(a_vv), .ovf(a_ovf), .folded()
  );

  logic   ad_v, ad_ovf;
  coord_t ad_u, ad_vv;
  delay_line #(.W(2 * COORD_W + 2), .D(SPH_LAT - AFF_LAT)) u_align (
    .clk(clk), .rst_n(rst_n), .d({a_v, a_u, a_vv, a_ovf}), .q({ad_v, ad_u, ad_vv, ad_ovf})
  );

  // ---------------------------------------------------------------- spherical path
  logic   s_v, s_in, s_ovf;
  coord_t s_u, s_vv;
  spherical_transformer #(.N(N), .T(T)) u_spherical (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid && mode == MAP_SPHERICAL),
    .x_in(x_in), .y_in(y_in), .r_in(r_in),
    .out_valid(s_v), .u_out(s_u), .v_out(s_vv), .in_sphere(s_in), .ovf(s_ovf)
  );

  // ---------------------------------------------------------------- in-order merge
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
    end else begin
      out_valid <= ad_v | s_v;
      // both paths have the same latency and a pixel enters only one of them
      assert (!(ad_v && s_v)) else $error("affine and spherical results collide");
    end
    if (s_v) begin
      out_mode     <= MAP_SPHERICAL;
      u_out        <= s_u;
      v_out        <= s_vv;
      out_of_range <= s_ovf | ~s_in;
    end else begin
      out_mode     <= MAP_AFFINE;
      u_out        <= ad_u;
      v_out        <= ad_vv;
      out_of_range <= ad_ovf;
    end
  end
endmodule
