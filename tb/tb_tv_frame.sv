// tb_tv_frame: throughput workload for the geometrical mapper at its default parameters.
// A typical TV image of about 10^5 pixels (here 384 x 260 = 99,840 pixels, addressed from
// the image centre) is mapped twice: once as a picture-in-picture (rotated by 0.2 rad,
// shrunk to half size, slid by 500 pixels) and once onto a sphere of radius 200 pixels.
// Every address is compared with a floating-point model as in tb_geometric_mapper, and the
// frame time is checked: one address per clock, so a frame takes its pixel count plus the
// 75-cycle latency (10^5 addresses per 0.1 s screen time needs a clock of only 1 MHz).
// The image size and screen time are those the mapper is sized for; the 384 x 260 raster and
// the mapping parameters are this testbench's own choice.
module tb_tv_frame;
  import cordic_pkg::*;

  localparam int  EXP_LAT = 75;
  localparam real TOL = 0.25;
  localparam int  FW [2] = '{384, 384};
  localparam int  FH [2] = '{260, 260};

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
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One frame: a W x H raster centred on the origin, one pixel apart.
  task automatic frame(map_mode_e m, int w, int h, real th, real d, real c, real r,
                       int flip_every);
    for (int j = 0; j < h; j++)
      for (int i = 0; i < w; i++) begin
        map_mode_e mm;
        mm = m;
        if (flip_every > 0 && ((j * w + i) % flip_every == flip_every - 1))
          mm = (m == MAP_AFFINE) ? MAP_SPHERICAL : MAP_AFFINE;
        drive(mm, real'(i - w / 2), real'(j - h / 2), th, d, c, r);
      end
  endtask

  initial begin
    longint t0, t1;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    foreach (FW[k]) begin
      t0 = cyc;
      frame(k == 0 ? MAP_AFFINE : MAP_SPHERICAL, FW[k], FH[k], 0.2, 500.0, 0.5, 200.0, 0);
      in_valid <= 1'b0;
      while (qe.size() != 0) @(posedge clk);
      t1 = cyc;
      checks++;
      if (int'(t1 - t0) > FW[k] * FH[k] + EXP_LAT + 2) begin
        failures++;
        $display("FAIL: frame of %0d pixels took %0d cycles", FW[k] * FH[k], t1 - t0);
      end
      $display("frame %0d: %0d pixels in %0d cycles", k, FW[k] * FH[k], t1 - t0);
      repeat (5) @(posedge clk);
    end
    checks++;
    if (n_outside == 0) begin failures++; $display("FAIL: no point outside the sphere"); end
    $display("results %0d, outside sphere %0d, saturated %0d, max error %f",
             n_results, n_outside, n_sat_aff + n_sat_sph, max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
