// spherical_transformer: destination address of a pixel under the plane-to-sphere mapping
//   u = r x / sqrt(r^2 - x^2 - y^2),   v = r y / sqrt(r^2 - x^2 - y^2)
// where r sets the curvature of the sphere surface. The mapping is built from four
// vectoring CFR-CORDICs in a row, one pixel per clock:
//   1 cycle   input register, |x| (the circular CORDIC needs a non-negative x)
//  28 cycles  circular vectoring:    rho = sqrt(x^2 + y^2)
//  26 cycles  hyperbolic vectoring:  h = sqrt(r^2 - rho^2)
//  18 cycles  two linear vectoring:  u = r x / h and v = r y / h (r is the multiplicand of
//             the Z recurrence, so each division also multiplies by r)
//   1 cycle   rounding to the coordinate format with saturation
// Latency spherical_latency(N, T) = 74 cycles. x, y and r travel beside the CORDICs in
// delay lines.
// The hyperbolic CORDIC converges only for rho / r below tanh(1.118) = 0.806, so the unit
// checks 5 rho < 4 r (rho / r < 0.8) and reports in_sphere; outside it u and v are forced
// to 0. Within it h >= 0.6 r, so |x / h| < 1.34, inside the range of the linear CORDIC.
//
// Interface: x_in, y_in, r_in, u_out, v_out are 12.4 two's complement coordinates; ovf
// flags a saturated u or v.
// The four-CORDIC arrangement follows the published architecture; the validity region, the
// multiplicand in the division, the forced zero outside the sphere and the formats are
// choices of this design.
module spherical_transformer
  import cordic_pkg::*;
#(
  parameter int N = N_ITER,
  parameter int T = T_EST
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  coord_t x_in,
  input  coord_t y_in,
  input  coord_t r_in,
  output logic   out_valid,
  output coord_t u_out,
  output coord_t v_out,
  output logic   in_sphere,
  output logic   ovf
);
  localparam int LAT_C = cordic_latency(CIRCULAR, N, T, 0);
  localparam int LAT_H = cordic_latency(HYPERBOLIC, N, T, 0);
  localparam int LAT_L = cordic_latency(LINEAR, N, T, LIN_Q);

  // ---------------------------------------------------------------- input register
  logic   v0;
  word_t  ax0, y0w;
  coord_t x0, y0, r0;
  always_ff @(posedge clk) begin
    if (!rst_n) v0 <= 1'b0;
    else        v0 <= in_valid;
    ax0 <= coord_to_word(x_in[COORD_W-1] ? -x_in : x_in);
    y0w <= coord_to_word(y_in);
    x0  <= x_in;
    y0  <= y_in;
    r0  <= r_in;
  end

  // ---------------------------------------------------------------- rho = sqrt(x^2 + y^2)
  logic  v1;
  word_t rho;
  cfr_cordic_vec #(.MODE(CIRCULAR), .N(N), .T(T)) u_circ (
    .clk(clk), .rst_n(rst_n), .in_valid(v0), .x_in(ax0), .y_in(y0w), .m_in('0),
    .out_valid(v1), .r_out(rho), .a_out()
  );
  coord_t x1, y1, r1;
  delay_line #(.W(3 * COORD_W), .D(LAT_C)) u_side1 (
    .clk(clk), .rst_n(rst_n), .d({x0, y0, r0}), .q({x1, y1, r1})
  );

  // ---------------------------------------------------------------- h = sqrt(r^2 - rho^2)
  logic  inside1;
  word_t r1w;
  assign r1w     = coord_to_word(r1);
  assign inside1 = ((rho <<< 2) + rho) < (r1w <<< 2);

  logic  v2;
  word_t h;
  cfr_cordic_vec #(.MODE(HYPERBOLIC), .N(N), .T(T)) u_hyp (
    .clk(clk), .rst_n(rst_n), .in_valid(v1), .x_in(r1w), .y_in(rho), .m_in('0),
    .out_valid(v2), .r_out(h), .a_out()
  );
  coord_t x2, y2, r2;
  logic   inside2;
  delay_line #(.W(3 * COORD_W + 1), .D(LAT_H)) u_side2 (
    .clk(clk), .rst_n(rst_n), .d({x1, y1, r1, inside1}), .q({x2, y2, r2, inside2})
  );

  // ---------------------------------------------------------------- u = r x / h, v = r y / h
  logic  v3u, v3v;
  word_t uw, vw;
  cfr_cordic_vec #(.MODE(LINEAR), .N(N), .T(T)) u_div_u (
    .clk(clk), .rst_n(rst_n), .in_valid(v2), .x_in(h), .y_in(coord_to_word(x2)),
    .m_in(coord_to_word(r2)), .out_valid(v3u), .r_out(uw), .a_out()
  );
  cfr_cordic_vec #(.MODE(LINEAR), .N(N), .T(T)) u_div_v (
    .clk(clk), .rst_n(rst_n), .in_valid(v2), .x_in(h), .y_in(coord_to_word(y2)),
    .m_in(coord_to_word(r2)), .out_valid(v3v), .r_out(vw), .a_out()
  );
  logic inside3;
  delay_line #(.W(1), .D(LAT_L)) u_side3 (
    .clk(clk), .rst_n(rst_n), .d(inside2), .q(inside3)
  );

  // ---------------------------------------------------------------- output
  coord_t u_n, v_n;
  logic   u_ovf, v_ovf;
  always_comb begin
    u_n = round_sat(uw, u_ovf);
    v_n = round_sat(vw, v_ovf);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= v3u & v3v;
    u_out     <= inside3 ? u_n : '0;
    v_out     <= inside3 ? v_n : '0;
    ovf       <= inside3 & (u_ovf | v_ovf);
    in_sphere <= inside3;
  end
endmodule
