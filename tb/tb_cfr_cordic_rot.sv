// tb_cfr_cordic_rot: self-checking test of the circular rotating CFR-CORDIC.
// Streams random vectors (|x|,|y| < 2048 pixels) and angles (|z| < pi/2), one per clock,
// plus corner angles (0, +/-pi/2, tiny angles that stress the sign estimate), and compares
// each result with x cos z - y sin z, x sin z + y cos z computed in floating point.
// Tolerance is two LSBs of the 12.4 coordinate format (1/8 pixel): 16 micro-iterations
// leave a residual angle near 2^-15 rad, 0.09 pixel at the largest radius. Also checks the pipeline latency (28 cycles: 19 micro-iterations,
// 8 scaling steps, 1 final addition) and that a new result leaves every clock.
module tb_cfr_cordic_rot;
  import cordic_pkg::*;

  localparam int    NVEC = 3000;
  localparam int    EXP_LAT = 28;
  localparam real   TOL = 2.0 / 16.0;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic in_valid = 1'b0;
  word_t x_in = '0, y_in = '0, z_in = '0;
  logic out_valid;
  word_t x_out, y_out;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  cfr_cordic_rot dut (.*);

  real exp_x [$];
  real exp_y [$];
  real exp_z [$];
  real max_err = 0.0;

  function automatic real rabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  function automatic word_t to_data(real v);
    return word_t'($rtoi(v * real'(1 << DF) + ((v >= 0.0) ? 0.5 : -0.5)));
  endfunction

  function automatic real from_data(word_t v);
    return real'(v) / real'(1 << DF);
  endfunction

  task automatic drive(real x, real y, real z);
    x_in <= to_data(x);
    y_in <= to_data(y);
    z_in <= word_t'($rtoi(z * real'(1 << UF)));
    in_valid <= 1'b1;
    // reference uses the angle as quantised for the input port
    z = real'($rtoi(z * real'(1 << UF))) / real'(1 << UF);
    x = from_data(to_data(x));
    y = from_data(to_data(y));
    exp_x.push_back(x * $cos(z) - y * $sin(z));
    exp_y.push_back(x * $sin(z) + y * $cos(z));
    exp_z.push_back(z);
    @(posedge clk);
  endtask

  // checker
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      real ex, ey, ez, err;
      if (exp_x.size() == 0) begin
        failures++;
        $display("FAIL: unexpected output");
      end else begin
        ex = exp_x.pop_front();
        ey = exp_y.pop_front();
        ez = exp_z.pop_front();
        err = rabs(from_data(x_out) - ex);
        if (rabs(from_data(y_out) - ey) > err) err = rabs(from_data(y_out) - ey);
        if (err > max_err) max_err = err;
        checks++;
        if (err > TOL) begin
          failures++;
          if (failures < 40)
            $display("FAIL: got (%f,%f) expected (%f,%f) angle %f", from_data(x_out), from_data(y_out), ex, ey, ez);
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
    int lat;
    real zc [8] = '{0.0, 1.5707, -1.5707, 1.0e-5, -1.0e-5, 0.7853981, -0.3, 2.0 ** -12};
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    // latency of a single operand
    drive(1000.0, -500.25, 0.5);
    in_valid <= 1'b0;
    lat = 1;
    while (!out_valid) begin @(posedge clk); lat++; end
    checks++;
    if (lat - 1 != EXP_LAT) begin
      failures++;
      $display("FAIL: latency %0d, expected %0d", lat - 1, EXP_LAT);
    end
    @(posedge clk);
    // corner angles
    foreach (zc[k]) drive(1234.5625, 777.125, zc[k]);
    foreach (zc[k]) drive(-2047.0, 2047.0, zc[k]);
    // random stream, back to back
    for (int n = 0; n < NVEC; n++) begin
      real x, y, z;
      x = (real'($urandom_range(0, 65535)) / 65535.0 - 0.5) * 4094.0;
      y = (real'($urandom_range(0, 65535)) / 65535.0 - 0.5) * 4094.0;
      z = (real'($urandom_range(0, 65535)) / 65535.0 - 0.5) * 3.1414;
      drive(x, y, z);
    end
    in_valid <= 1'b0;
    repeat (EXP_LAT + 5) @(posedge clk);
    checks++;
    if (exp_x.size() != 0) begin
      failures++;
      $display("FAIL: %0d results missing", exp_x.size());
    end
    $display("max error %f pixel", max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
