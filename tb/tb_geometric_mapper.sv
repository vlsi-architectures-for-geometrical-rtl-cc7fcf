// tb_geometric_mapper: end-to-end test of the geometrical mapping processor at its default
// parameters. A raster of pixels of a sub-image is mapped in frames that alternate
// between the transformations, and within a frame the mode is also switched on single
// pixels, so results of both transformers interleave back to back. Every result is compared
// with a floating-point model of the two mappings (tolerance 1/4 pixel), in order, and the
// 75-cycle latency is checked. Counted mechanisms, each of which must occur: mode switches
// between consecutive pixels, quarter-turn angle folding, saturation in each mode and
// points outside the usable sphere.
module tb_geometric_mapper;
  import cordic_pkg::*;

  localparam int  EXP_LAT = 75;
  localparam real TOL = 0.25;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic in_valid = 1'b0;
  map_mode_e mode = MAP_AFFINE;
  coord_t x_in = '0, y_in = '0, d_in = '0, r_in = '0;
  logic signed [ANG_W-1:0] theta_in = '0;
  logic [SCALE_W-1:0] c_in = '0;
  logic out_valid, out_of_range;
  map_mode_e out_mode;
  coord_t u_out, v_out;
  int checks = 0, failures = 0;
  int n_switch = 0, n_fold = 0, n_sat_aff = 0, n_sat_sph = 0, n_outside = 0, n_results = 0;
  longint cyc = 0;
  real max_err = 0.0;
  map_mode_e last_mode = MAP_AFFINE;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  geometric_mapper dut (.*);

  typedef struct {
    map_mode_e m;
    real       u, v, tol;
    bit        range;      // expected out_of_range
    bit        unsure;     // at a decision boundary: flag not checked
    longint    t;
  } exp_t;
  exp_t qe [$];
  bit check_lat = 1'b0;

  function automatic real rabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  function automatic real sat(real v);
    if (v > 2047.9375) return 2047.9375;
    if (v < -2048.0) return -2048.0;
    return v;
  endfunction

  task automatic drive(map_mode_e m, real x, real y, real th, real d, real c, real r);
    exp_t e;
    real xq, yq, dq, cq, tq, rq, rho, h;
    mode     <= m;
    x_in     <= COORD_W'($rtoi(x * 16.0));
    y_in     <= COORD_W'($rtoi(y * 16.0));
    d_in     <= COORD_W'($rtoi(d * 16.0));
    r_in     <= COORD_W'($rtoi(r * 16.0));
    c_in     <= SCALE_W'($rtoi(c * 256.0));
    theta_in <= ANG_W'($rtoi(th * real'(1 << ANG_F)));
    in_valid <= 1'b1;
    xq = real'($rtoi(x * 16.0)) / 16.0;
    yq = real'($rtoi(y * 16.0)) / 16.0;
    dq = real'($rtoi(d * 16.0)) / 16.0;
    rq = real'($rtoi(r * 16.0)) / 16.0;
    cq = real'($rtoi(c * 256.0)) / 256.0;
    tq = real'($rtoi(th * real'(1 << ANG_F))) / real'(1 << ANG_F);
    e.m = m;
    e.unsure = 1'b0;
    if (m == MAP_AFFINE) begin
      e.u = cq * (xq * $cos(tq) - yq * $sin(tq) + dq);
      e.v = xq * $sin(tq) + yq * $cos(tq);
      e.tol = 0.125 * ((cq > 1.0) ? cq : 1.0) + 0.0625;
      if (rabs(tq) > 1.5707964) n_fold++;
    end else begin
      rho = $sqrt(xq * xq + yq * yq);
      e.tol = TOL;
      if (rho < 0.8 * rq) begin
        h = $sqrt(rq * rq - rho * rho);
        e.u = rq * xq / h;
        e.v = rq * yq / h;
      end else begin
        e.u = 0.0;
        e.v = 0.0;
        e.range = 1'b1;
      end
      e.unsure = rabs(rho - 0.8 * rq) < 0.002 * rq;
    end
    e.range = (m == MAP_SPHERICAL && rho >= 0.8 * rq) ||
              (e.u > 2047.9375 + e.tol) || (e.u < -2048.0 - e.tol) ||
              (e.v > 2047.9375 + e.tol) || (e.v < -2048.0 - e.tol);
    if (e.u > 2047.9375 - e.tol || e.u < -2048.0 + e.tol ||
        e.v > 2047.9375 - e.tol || e.v < -2048.0 + e.tol)
      e.unsure = e.unsure | !e.range;
    e.t = cyc;
    qe.push_back(e);
    if (m != last_mode) n_switch++;
    last_mode = m;
    @(posedge clk);
  endtask

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      exp_t e;
      real gu, gv, err;
      n_results++;
      if (qe.size() == 0) begin
        failures++;
        $display("FAIL: unexpected output");
      end else begin
        e = qe.pop_front();
        gu = real'(u_out) / 16.0;
        gv = real'(v_out) / 16.0;
        checks++;
        if (out_mode != e.m) begin
          failures++;
          $display("FAIL: result order, mode %s expected %s", out_mode.name(), e.m.name());
        end else if (!e.unsure && out_of_range != e.range) begin
          failures++;
          $display("FAIL: out_of_range %0d expected %0d (u %f v %f)", out_of_range, e.range, e.u, e.v);
        end else if (!(e.unsure && out_of_range != e.range)) begin
          err = rabs(gu - sat(e.u));
          if (rabs(gv - sat(e.v)) > err) err = rabs(gv - sat(e.v));
          if (err > max_err) max_err = err;
          if (err > e.tol) begin
            failures++;
            if (failures < 20)
              $display("FAIL: %s got (%f,%f) expected (%f,%f)", e.m.name(), gu, gv, e.u, e.v);
          end
        end
        if (out_of_range && e.m == MAP_AFFINE) n_sat_aff++;
        if (out_of_range && e.m == MAP_SPHERICAL && e.range && (e.u != 0.0 || e.v != 0.0))
          n_sat_sph++;
        if (out_of_range && e.m == MAP_SPHERICAL && e.u == 0.0 && e.v == 0.0) n_outside++;
        if (check_lat) begin
          checks++;
          if (int'(cyc - e.t) - 1 != EXP_LAT) begin
            failures++;
            $display("FAIL: latency %0d, expected %0d", cyc - e.t - 1, EXP_LAT);
          end
        end
      end
    end
  end

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One frame: a W x H sub-image raster centred on the origin, with 4-pixel spacing.
  task automatic frame(map_mode_e m, int w, int h, real th, real d, real c, real r,
                       int flip_every);
    for (int j = 0; j < h; j++)
      for (int i = 0; i < w; i++) begin
        map_mode_e mm;
        mm = m;
        if (flip_every > 0 && ((j * w + i) % flip_every == flip_every - 1))
          mm = (m == MAP_AFFINE) ? MAP_SPHERICAL : MAP_AFFINE;
        drive(mm, 4.0 * real'(i - w / 2), 4.0 * real'(j - h / 2), th, d, c, r);
      end
  endtask

  initial begin
    int npix;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    check_lat = 1'b1;
    drive(MAP_SPHERICAL, 10.0, 20.0, 0.0, 0.0, 1.0, 500.0);
    drive(MAP_AFFINE, 10.0, 20.0, 0.5, 3.0, 1.0, 500.0);
    in_valid <= 1'b0;
    repeat (100) @(posedge clk);
    check_lat = 1'b0;
    // picture-in-picture: shrink by 1/2, rotate, slide
    frame(MAP_AFFINE, 48, 32, 0.35, 400.0, 0.5, 0.0, 0);
    // sphere over the sub-image; some corners fall outside the usable region
    frame(MAP_SPHERICAL, 48, 32, 0.0, 0.0, 1.0, 110.0, 0);
    // upside-down view (folded angle), enlarged until it saturates, modes interleaved
    frame(MAP_AFFINE, 48, 32, 2.8, 1900.0, 3.0, 1500.0, 7);
    frame(MAP_SPHERICAL, 48, 32, -2.0, 0.0, 1.0, 2040.0, 5);
    // large sphere: saturated results near the rim
    frame(MAP_SPHERICAL, 32, 8, 0.0, 0.0, 1.0, 1600.0, 0);
    for (int n = 0; n < 32; n++)
      drive(MAP_SPHERICAL, 1270.0, real'(n), 0.0, 0.0, 1.0, 1600.0);
    in_valid <= 1'b0;
    repeat (100) @(posedge clk);
    checks++;
    if (qe.size() != 0) begin
      failures++;
      $display("FAIL: %0d results missing", qe.size());
    end
    checks += 5;
    if (n_switch == 0)  begin failures++; $display("FAIL: no mode switch"); end
    if (n_fold == 0)    begin failures++; $display("FAIL: no angle folding"); end
    if (n_sat_aff == 0) begin failures++; $display("FAIL: no affine saturation"); end
    if (n_sat_sph == 0) begin failures++; $display("FAIL: no spherical saturation"); end
    if (n_outside == 0) begin failures++; $display("FAIL: no point outside the sphere"); end
    $display("results %0d, mode switches %0d, folded %0d, saturated affine %0d spherical %0d, outside sphere %0d, max error %f",
             n_results, n_switch, n_fold, n_sat_aff, n_sat_sph, n_outside, max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
