// exp_sat: saturation module of the exponent PE.
//
// Clamps a signed intermediate biased exponent into the 8-bit range of the
// format: values at or above 0xFF become 0xFF (infinity) and values at or
// below zero become 0 (zero; denormals are not produced). Flags report which
// limit was hit. Combinational. The document gives the function (limit the
// exponent so it does not exceed the infinity value 0xFF); the underflow clamp
// is this design's choice.
module exp_sat #(
  parameter int unsigned W = 16
) (
  input  logic signed [W-1:0] e_in,
  output logic [7:0]          e_out,
  output logic                ovf,
  output logic                unf
);
  always_comb begin
    ovf = (e_in >= W'(signed'(255)));
    unf = (e_in <= W'(signed'(0)));
    if (ovf)      e_out = 8'hFF;
    else if (unf) e_out = 8'h00;
    else          e_out = e_in[7:0];
  end
endmodule
