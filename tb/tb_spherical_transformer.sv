// tb_spherical_transformer: self-checking test of the plane-to-sphere mapping unit.
// Streams random pixels, one per clock, with a sphere radius r in [64, 2047] and points
// both inside (rho / r < 0.8) and outside the valid region, and compares with
// u = r x / sqrt(r^2 - x^2 - y^2), v = r y / sqrt(r^2 - x^2 - y^2) in floating point
// (tolerance 1/4 pixel, four LSBs of the 12.4 format, since the error of h is magnified by
// up to 1 / 0.6 in the division). Outside the region in_sphere must be 0 and u = v = 0.
// Checks the 74-cycle latency and counts inside, outside and saturated results; each
// must occur.
module tb_spherical_transformer;
  import cordic_pkg::*;

  localparam int  NVEC = 3000;
  localparam int  EXP_LAT = 74;
  localparam real TOL = 0.25;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic in_valid = 1'b0;
  coord_t x_in = '0, y_in = '0, r_in = '0;
  logic out_valid, in_sphere, ovf;
  coord_t u_out, v_out;
  int checks = 0, failures = 0, n_in = 0, n_out = 0, n_ovf = 0;
  longint cyc = 0;
  real max_err = 0.0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  spherical_transformer dut (.*);

  typedef struct {
    real    u, v, ratio;
    longint t;
  } exp_t;
  exp_t qe [$];
  bit check_lat = 1'b0;

  function automatic real rabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  function automatic real rnd(real lo, real hi);
    return lo + (hi - lo) * real'($urandom_range(0, 1000000)) / 1000000.0;
  endfunction

  function automatic real sat(real v);
    if (v > 2047.9375) return 2047.9375;
    if (v < -2048.0) return -2048.0;
    return v;
  endfunction

  task automatic drive(real x, real y, real r);
    exp_t e;
    real xq, yq, rq, h;
    x_in <= COORD_W'($rtoi(x * 16.0));
    y_in <= COORD_W'($rtoi(y * 16.0));
    r_in <= COORD_W'($rtoi(r * 16.0));
    in_valid <= 1'b1;
    xq = real'($rtoi(x * 16.0)) / 16.0;
    yq = real'($rtoi(y * 16.0)) / 16.0;
    rq = real'($rtoi(r * 16.0)) / 16.0;
    e.ratio = $sqrt(xq * xq + yq * yq) / rq;
    if (e.ratio < 0.8) begin
      h = $sqrt(rq * rq - xq * xq - yq * yq);
      e.u = rq * xq / h;
      e.v = rq * yq / h;
    end else begin
      e.u = 0.0;
      e.v = 0.0;
    end
    e.t = cyc;
    qe.push_back(e);
    @(posedge clk);
  endtask

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      exp_t e;
      real gu, gv, err;
      if (qe.size() == 0) begin
        failures++;
        $display("FAIL: unexpected output");
      end else begin
        e = qe.pop_front();
        gu = real'(u_out) / 16.0;
        gv = real'(v_out) / 16.0;
        if (rabs(e.ratio - 0.8) > 0.001) begin
          checks++;
          if (in_sphere != (e.ratio < 0.8)) begin
            failures++;
            $display("FAIL: in_sphere %0d for rho/r = %f", in_sphere, e.ratio);
          end else begin
            err = rabs(gu - sat(e.u));
            if (rabs(gv - sat(e.v)) > err) err = rabs(gv - sat(e.v));
            if (err > max_err) max_err = err;
            if (err > TOL) begin
              failures++;
              if (failures < 20)
                $display("FAIL: got (%f,%f) expected (%f,%f)", gu, gv, e.u, e.v);
            end
          end
        end
        if (in_sphere) n_in++; else n_out++;
        if (ovf) n_ovf++;
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
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    check_lat = 1'b1;
    drive(100.0, -50.0, 400.0);
    in_valid <= 1'b0;
    repeat (90) @(posedge clk);
    check_lat = 1'b0;
    drive(0.0, 0.0, 1000.0);          // centre maps to itself
    drive(0.0, 0.0, 0.0);             // degenerate sphere: outside
    drive(-1500.0, 0.0, 1900.0);      // u saturates
    drive(700.0, 700.0, 1000.0);      // outside
    drive(-790.0, 0.0, 1000.0);       // close to the limit, inside
    for (int n = 0; n < NVEC; n++) begin
      real r, rho, a;
      r   = rnd(64.0, 2047.0);
      rho = rnd(0.0, 0.95) * r;
      a   = rnd(-3.14159, 3.14159);
      drive(rho * $cos(a), rho * $sin(a), r);
    end
    in_valid <= 1'b0;
    repeat (90) @(posedge clk);
    checks++;
    if (qe.size() != 0) begin
      failures++;
      $display("FAIL: results missing");
    end
    checks += 3;
    if (n_in == 0)  begin failures++; $display("FAIL: no point inside"); end
    if (n_out == 0) begin failures++; $display("FAIL: no point outside"); end
    if (n_ovf == 0) begin failures++; $display("FAIL: saturation never exercised"); end
    $display("inside %0d, outside %0d, saturated %0d, max error %f pixel", n_in, n_out, n_ovf, max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
