// mclt_cmul: "complex product" of the butterfly-like stages, a combinational
// complex multiplier with truncation.
//
// p = a * c with a of width A_W and c a Q15 factor:
//   p_re = a_re*c_re - a_im*c_im,  p_im = a_re*c_im + a_im*c_re.
// The full products are kept (A_W+C_W+1 bits), shifted right by
// SHIFT (15 to drop the Q15 scaling of c, more to divide by a power of two as
// well) and the low P_W bits of the result are kept. The shift rounds toward
// minus infinity (the low bits are dropped), as the design truncates its
// 9Q30 products to their upper 25 bits. The caller must size P_W for the range
// of its operands; the stages in this design cannot overflow it.
module mclt_cmul #(
  parameter int A_W   = 25,
  parameter int C_W   = 16,
  parameter int P_W   = 25,
  parameter int SHIFT = 15
) (
  input  logic signed [A_W-1:0] a_re,
  input  logic signed [A_W-1:0] a_im,
  input  logic signed [C_W-1:0] c_re,
  input  logic signed [C_W-1:0] c_im,
  output logic signed [P_W-1:0] p_re,
  output logic signed [P_W-1:0] p_im
);

  localparam int FW = A_W + C_W + 1;   // full width of a sum of two products

  logic signed [FW-1:0] full_re, full_im;

  always_comb begin
    full_re = FW'(a_re * c_re) - FW'(a_im * c_im);
    full_im = FW'(a_re * c_im) + FW'(a_im * c_re);
    p_re    = full_re[SHIFT +: P_W];
    p_im    = full_im[SHIFT +: P_W];
  end

endmodule
