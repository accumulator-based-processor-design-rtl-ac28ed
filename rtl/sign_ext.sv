// sign_ext: sign extension of the instruction's immediate field.
//
// Copies the top bit of the IN_W-bit immediate into the upper bits of an
// OUT_W-bit word, so that negative stack offsets (PULL -1) and negative
// constants keep their value. Purely combinational. The widths are the
// 10-bit immediate and 16-bit word of the instruction format.
module sign_ext #(
  parameter int unsigned IN_W  = 10,
  parameter int unsigned OUT_W = 16
) (
  input  logic [IN_W-1:0]  in,
  output logic [OUT_W-1:0] out
);
  always_comb out = {{(OUT_W-IN_W){in[IN_W-1]}}, in};
endmodule
