// pp_matrix: bit product matrix of an N x N unsigned multiplication.
//
// N*N two-input AND gates: pp[j][i] = a[i] & b[j], of weight 2^(i+j). Row j
// is therefore the multiplicand gated by multiplier bit j and, shifted left
// by j columns, forms the trapezoid the reduction trees compress.
// Combinational.
module pp_matrix #(
  parameter int N = 16
) (
  input  logic [N-1:0]         a,
  input  logic [N-1:0]         b,
  output logic [N-1:0][N-1:0]  pp   // [row j][bit i]
);
  for (genvar j = 0; j < N; j++) begin : g_row
    for (genvar i = 0; i < N; i++) begin : g_bit
      assign pp[j][i] = a[i] & b[j];
    end
  end
endmodule
