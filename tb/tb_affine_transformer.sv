// tb_affine_transformer: self-checking test of the affine mapping unit.
// A random pixel stream (one per clock) with random angle in [-pi, pi], translation d and
// scale c in [0, 4), plus corner cases (angles at and beyond +/-pi/2, c = 0, results that
// saturate), is compared with u = c (x cos t - y sin t + d), v = x sin t + y cos t worked
// out in floating point. Tolerance: two LSBs of the 12.4 format times max(c, 1) plus one
// LSB of output rounding. Also checks the ovf and folded flags, the 31-cycle latency and
// counts how often folding and saturation happened (each must happen at least once).
module tb_affine_transformer;
  import cordic_pkg::*;

  localparam int NVEC = 3000;
  localparam int EXP_LAT = 31;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic signed [COORD_W-1:0] x_in = '0, y_in = '0, d_in = '0;
  logic signed [ANG_W-1:0]   theta_in = '0;
  logic        [SCALE_W-1:0] c_in = '0;
  logic out_valid, ovf, folded;
  logic signed [COORD_W-1:0] u_out, v_out;
  int checks = 0, failures = 0, n_fold = 0, n_ovf = 0;
  longint cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  affine_transformer dut (.*);

  typedef struct {
    real    u, v, c;
    bit     fold;
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

  task automatic drive(real x, real y, real th, real d, real c);
    exp_t e;
    real xq, yq, dq, cq, tq, xr;
    x_in     <= COORD_W'($rtoi(x * 16.0));
    y_in     <= COORD_W'($rtoi(y * 16.0));
    d_in     <= COORD_W'($rtoi(d * 16.0));
    c_in     <= SCALE_W'($rtoi(c * 256.0));
    theta_in <= ANG_W'($rtoi(th * real'(1 << ANG_F)));
    in_valid <= 1'b1;
    xq = real'($rtoi(x * 16.0)) / 16.0;
    yq = real'($rtoi(y * 16.0)) / 16.0;
    dq = real'($rtoi(d * 16.0)) / 16.0;
    cq = real'($rtoi(c * 256.0)) / 256.0;
    tq = real'($rtoi(th * real'(1 << ANG_F))) / real'(1 << ANG_F);
    xr = xq * $cos(tq) - yq * $sin(tq);
    e.u = cq * (xr + dq);
    e.v = xq * $sin(tq) + yq * $cos(tq);
    e.c = cq;
    e.fold = (tq > 1.5707963) || (tq < -1.5707963);
    e.t = cyc;
    qe.push_back(e);
    @(posedge clk);
  endtask

  function automatic real sat(real v);
    if (v > 2047.9375) return 2047.9375;
    if (v < -2048.0) return -2048.0;
    return v;
  endfunction

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      exp_t e;
      real tol, gu, gv;
      bit  exp_ovf;
      if (qe.size() == 0) begin
        failures++;
        $display("FAIL: unexpected output");
      end else begin
        e = qe.pop_front();
        gu = real'(u_out) / 16.0;
        gv = real'(v_out) / 16.0;
        tol = 0.125 * ((e.c > 1.0) ? e.c : 1.0) + 0.0625;
        exp_ovf = (e.u > 2047.9375 + tol) || (e.u < -2048.0 - tol) ||
                  (e.v > 2047.9375 + tol) || (e.v < -2048.0 - tol);
        checks += 2;
        if (rabs(gu - sat(e.u)) > tol || rabs(gv - sat(e.v)) > tol) begin
          failures++;
          if (failures < 20) $display("FAIL: got (%f,%f) expected (%f,%f)", gu, gv, e.u, e.v);
        end
        if (exp_ovf && !ovf) begin
          failures++;
          $display("FAIL: ovf not flagged for (%f,%f)", e.u, e.v);
        end
        if (folded != e.fold) begin
          failures++;
          $display("FAIL: folded flag");
        end
        if (ovf) n_ovf++;
        if (folded) n_fold++;
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
    drive(100.0, 50.0, 0.3, 10.0, 1.0);
    in_valid <= 1'b0;
    repeat (40) @(posedge clk);
    check_lat = 1'b0;
    drive(1000.0, 0.0, 3.14159, 0.0, 1.0);      // half turn, folded
    drive(1000.0, 0.0, -3.14159, 0.0, 1.0);
    drive(500.0, 300.0, 1.5707, 0.0, 1.0);      // just inside the fold threshold
    drive(500.0, 300.0, 1.5709, 0.0, 1.0);      // just beyond
    drive(500.0, 300.0, -2.0, 12.5, 0.0);       // c = 0 collapses u
    drive(2000.0, 2000.0, 0.1, 2000.0, 3.5);    // saturates u
    drive(-2047.0, -2047.0, 0.785, 0.0, 1.0);   // saturates v
    for (int n = 0; n < NVEC; n++)
      drive(rnd(-1500.0, 1500.0), rnd(-1500.0, 1500.0), rnd(-3.14159, 3.14159),
            rnd(-300.0, 300.0), rnd(0.0, 1.999));
    in_valid <= 1'b0;
    repeat (40) @(posedge clk);
    checks++;
    if (qe.size() != 0) begin
      failures++;
      $display("FAIL: results missing");
    end
    checks += 2;
    if (n_fold == 0) begin failures++; $display("FAIL: folding never exercised"); end
    if (n_ovf == 0)  begin failures++; $display("FAIL: saturation never exercised"); end
    $display("folded %0d, saturated %0d", n_fold, n_ovf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
