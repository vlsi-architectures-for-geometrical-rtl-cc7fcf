// tb_cfr_cordic_vec: self-checking test of the vectoring CFR-CORDIC in its three modes.
// One instance per mode is fed a random stream, one operand set per clock:
//   circular   x in [0, 2047], y in [-2047, 2047]       expects sqrt(x^2 + y^2) and
//              atan(y / x) (within 2^-13 rad plus 2^-11 / sqrt(x^2 + y^2))
//   hyperbolic x in [16, 2047], y in [0, 0.8 x)         expects sqrt(x^2 - y^2)
//   linear     x in [64, 2047], |y| < 1.9 x, m in [1, 2047] expects m * y / x
// plus corner operands (x = 0, y = 0, y at the range limits). Results are compared with
// floating point within 1/8 pixel (two LSBs of the 12.4 coordinate format). The latency of
// each mode (28, 26 and 18 cycles) is checked on a lone operand.
module tb_cfr_cordic_vec;
  import cordic_pkg::*;

  localparam int  NVEC = 3000;
  localparam real TOL  = 2.0 / 16.0;
  localparam int  LAT_C = 28, LAT_H = 26, LAT_L = 18;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic in_valid = 1'b0;
  word_t cx = '0, cy = '0, hx = '0, hy = '0, lx = '0, ly = '0, lm = '0;
  logic cv, hv, lv;
  word_t cr, hr, lr, ca, ha, la;
  int checks = 0, failures = 0;
  longint cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  cfr_cordic_vec #(.MODE(CIRCULAR)) u_circ (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x_in(cx), .y_in(cy), .m_in('0),
    .out_valid(cv), .r_out(cr), .a_out(ca));
  cfr_cordic_vec #(.MODE(HYPERBOLIC)) u_hyp (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x_in(hx), .y_in(hy), .m_in('0),
    .out_valid(hv), .r_out(hr), .a_out(ha));
  cfr_cordic_vec #(.MODE(LINEAR)) u_lin (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x_in(lx), .y_in(ly), .m_in(lm),
    .out_valid(lv), .r_out(lr), .a_out(la));

  real    qc [$], qh [$], ql [$], qa [$];
  real    max_aerr = 0.0;
  longint tc [$], th [$], tl [$];
  real    max_err [3] = '{0.0, 0.0, 0.0};
  bit     check_lat = 1'b0;

  function automatic real rabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  function automatic word_t to_data(real v);
    return word_t'($rtoi(v * real'(1 << DF) + ((v >= 0.0) ? 0.5 : -0.5)));
  endfunction

  function automatic real from_data(word_t v);
    return real'(v) / real'(1 << DF);
  endfunction

  function automatic real q(real v);
    return from_data(to_data(v));
  endfunction

  function automatic real rnd(real lo, real hi);
    return lo + (hi - lo) * real'($urandom_range(0, 1000000)) / 1000000.0;
  endfunction

  task automatic drive(real x1, real y1, real x2, real y2, real x3, real y3, real m3);
    cx <= to_data(x1); cy <= to_data(y1);
    hx <= to_data(x2); hy <= to_data(y2);
    lx <= to_data(x3); ly <= to_data(y3); lm <= to_data(m3);
    in_valid <= 1'b1;
    qc.push_back($sqrt(q(x1) * q(x1) + q(y1) * q(y1)));
    qa.push_back($atan2(q(y1), q(x1)));
    qh.push_back($sqrt(q(x2) * q(x2) - q(y2) * q(y2)));
    ql.push_back(q(m3) * q(y3) / q(x3));
    tc.push_back(cyc); th.push_back(cyc); tl.push_back(cyc);
    @(posedge clk);
  endtask

  task automatic compare(int idx, word_t got, ref real qq [$], ref longint tt [$], input int lat);
    real e, err;
    longint t0;
    if (qq.size() == 0) begin
      failures++;
      $display("FAIL: mode %0d unexpected output", idx);
      return;
    end
    e  = qq.pop_front();
    t0 = tt.pop_front();
    err = rabs(from_data(got) - e);
    if (err > max_err[idx]) max_err[idx] = err;
    checks++;
    if (err > TOL) begin
      failures++;
      if (failures < 20) $display("FAIL: mode %0d got %f expected %f", idx, from_data(got), e);
    end
    if (check_lat) begin
      checks++;
      if (int'(cyc - t0) - 1 != lat) begin
        failures++;
        $display("FAIL: mode %0d latency %0d, expected %0d", idx, cyc - t0 - 1, lat);
      end
    end
  endtask

  always @(posedge clk) begin
    if (rst_n) begin
      if (cv) begin
        real rho, ea, err;
        rho = qc[0];
        ea  = qa.pop_front();
        if (rho >= 1.0) begin
          err = rabs(real'(ca) / real'(1 << UF) - ea);
          if (err > max_aerr) max_aerr = err;
          checks++;
          if (err > 2.0 ** -13 + 2.0 ** -11 / rho) begin
            failures++;
            if (failures < 20) $display("FAIL: angle got %f expected %f", real'(ca) / real'(1 << UF), ea);
          end
        end
        compare(0, cr, qc, tc, LAT_C);
      end
      checks++;
      if (ha != '0 || la != '0) begin
        failures++;
        $display("FAIL: angle output of a non-circular mode");
      end
      if (hv) compare(1, hr, qh, th, LAT_H);
      if (lv) compare(2, lr, ql, tl, LAT_L);
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
    drive(300.0, 400.0, 500.0, 300.0, 100.0, 150.0, 256.0);
    in_valid <= 1'b0;
    repeat (40) @(posedge clk);
    check_lat = 1'b0;
    drive(0.0, 0.0, 2047.0, 0.0, 2047.0, -3800.0, 2047.0);
    drive(0.0, 2047.0, 2047.0, 1637.0, 64.0, 121.0, 2047.0);
    drive(2047.0, -2047.0, 16.0, 12.75, 1000.0, 0.0, 1.0);
    drive(2047.0, 0.0, 100.0, 0.0625, 1500.0, 1.0, 2047.0);
    for (int n = 0; n < NVEC; n++) begin
      real x2, x3;
      x2 = rnd(16.0, 2047.0);
      x3 = rnd(64.0, 2047.0);
      drive(rnd(0.0, 2047.0), rnd(-2047.0, 2047.0),
            x2, rnd(0.0, 0.8) * x2,
            x3, rnd(-1.9, 1.9) * x3, rnd(1.0, 2047.0));
    end
    in_valid <= 1'b0;
    repeat (40) @(posedge clk);
    checks++;
    if (qc.size() + qh.size() + ql.size() != 0) begin
      failures++;
      $display("FAIL: results missing");
    end
    $display("max error circular %f hyperbolic %f linear %f pixel, angle %f rad", max_err[0], max_err[1], max_err[2], max_aerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
