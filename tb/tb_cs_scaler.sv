// tb_cs_scaler: self-checking test of the implicit scaling steps. Random values, split
// at random into carry-save pairs (including pairs whose components wrap around), are
// pushed through the circular and hyperbolic scalers one per clock; the sum of the output
// pair must equal value / K within 2^-17 relative plus 8 LSBs, where K is the CORDIC gain
// recomputed here in floating point from the iteration schedule (circular: i = 0..15 with
// indices 3, 6 and 8 repeated; hyperbolic: i = 1..16 with 4 and 13 repeated). The latency
// (8 and 7 cycles) is checked by tracking when each value leaves.
module tb_cs_scaler;
  import cordic_pkg::*;

  localparam int NVEC = 2000;
  localparam int LAT_C = 8, LAT_H = 7;

  logic clk = 1'b0;
  cs_t  d = '0, qc, qh;
  int checks = 0, failures = 0;
  real kc, kh;
  real vals [$];

  always #5 clk = ~clk;

  cs_scaler #(.MODE(CIRCULAR))   u_c (.clk(clk), .d(d), .q(qc));
  cs_scaler #(.MODE(HYPERBOLIC)) u_h (.clk(clk), .d(d), .q(qh));

  function automatic real rabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    kc = 1.0;
    for (int i = 0; i < 16; i++) begin
      kc = kc * $sqrt(1.0 + 2.0 ** (-2 * i));
      if (i == 3 || i == 6 || i == 8) kc = kc * $sqrt(1.0 + 2.0 ** (-2 * i));
    end
    kh = 1.0;
    for (int i = 1; i <= 16; i++) begin
      kh = kh * $sqrt(1.0 - 2.0 ** (-2 * i));
      if (i == 4 || i == 13) kh = kh * $sqrt(1.0 - 2.0 ** (-2 * i));
    end
    // one value followed by zeros: latency
    @(negedge clk);
    d = '{s: word_t'(1000 << DF), c: '0};
    @(negedge clk);
    d = '0;
    for (int k = 1; k <= 10; k++) begin
      if (k == LAT_H) begin
        checks++;
        if (rabs(real'(qh.s + qh.c) / real'(1 << DF) - 1000.0 / kh) > 0.01) begin
          failures++;
          $display("FAIL: hyperbolic latency");
        end
      end
      if (k == LAT_C) begin
        checks++;
        if (rabs(real'(qc.s + qc.c) / real'(1 << DF) - 1000.0 / kc) > 0.01) begin
          failures++;
          $display("FAIL: circular latency");
        end
      end
      @(negedge clk);
    end
    // random stream, checked through a history of inputs
    for (int n = 0; n < NVEC + LAT_C; n++) begin
      word_t v, s;
      if (n < NVEC) begin
        v = word_t'($signed($urandom_range(0, 1 << 26)) - (1 << 25));
        s = word_t'({$urandom, $urandom});
        d = '{s: s, c: v - s};
        vals.push_back(real'(v));
      end
      @(negedge clk);
      if (n + 1 >= LAT_C && n + 1 - LAT_C < NVEC) begin
        real e, g;
        e = vals[n + 1 - LAT_C] / kc;
        g = real'(word_t'(qc.s + qc.c));
        checks++;
        if (rabs(g - e) > rabs(e) * 2.0 ** -17 + 8.0) begin
          failures++;
          if (failures < 10) $display("FAIL: circular got %f expected %f", g, e);
        end
      end
      if (n + 1 >= LAT_H && n + 1 - LAT_H < NVEC) begin
        real e, g;
        e = vals[n + 1 - LAT_H] / kh;
        g = real'(word_t'(qh.s + qh.c));
        checks++;
        if (rabs(g - e) > rabs(e) * 2.0 ** -17 + 8.0) begin
          failures++;
          if (failures < 10) $display("FAIL: hyperbolic got %f expected %f", g, e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
