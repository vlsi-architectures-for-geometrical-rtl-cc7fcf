// delay_line: a D-cycle shift register of W-bit words, used to carry valid bits and
// side-band operands alongside the CORDIC pipelines so that they arrive with the result.
// All taps are cleared by the active-low synchronous reset. D = 0 is a plain wire.
module delay_line #(
  parameter int W = 1,
  parameter int D = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  if (D == 0) begin : g_wire
    assign q = d;
  end else begin : g_regs
    logic [W-1:0] taps [D];
    always_ff @(posedge clk) begin
      if (!rst_n) begin
        for (int k = 0; k < D; k++) taps[k] <= '0;
      end else begin
        taps[0] <= d;
        for (int k = 1; k < D; k++) taps[k] <= taps[k-1];
      end
    end
    assign q = taps[D-1];
  end
endmodule
