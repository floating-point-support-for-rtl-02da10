// lod: leading-one detector of the mantissa PE.
//
// Reports the bit position of the most significant one of `din` and whether
// `din` is zero. Purely combinational. The mantissa PE uses it to find the
// normalising shift after a floating-point add or subtract. The document names
// the unit; the priority-scan structure is this design's choice.
module lod #(
  parameter int unsigned W = 20
) (
  input  logic [W-1:0]         din,
  output logic [$clog2(W)-1:0] pos,   // index of the leading one
  output logic                 zero   // din == 0 (pos is then 0)
);
  always_comb begin
    pos  = '0;
    zero = 1'b1;
    for (int i = 0; i < W; i++) begin
      if (din[i]) begin
        pos  = i[$clog2(W)-1:0];
        zero = 1'b0;
      end
    end
  end
endmodule
