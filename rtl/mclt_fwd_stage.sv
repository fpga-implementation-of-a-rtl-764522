// mclt_fwd_stage: butterfly-like stage of the direct MCLT processor.
//
// Turns the 2M-point FFT of an input block, U(k), into the M MCLT
// coefficients X(k) = jV(k) + V(k+1), where V(k) = c(k) U(k), k = 0..M-1
// (Malvar's fast MCLT). Per FFT output value:
//   stage 1  the ROM reads c(xk_index) while U(k) is registered,
//   stage 2  the complex product V = c*U is registered (9Q15, the 9Q30 product
//            truncated to its upper 25 bits),
//   stage 3  with V(k+1) in the product register and V(k) in the delay register,
//            sal_re = Re V(k+1) - Im V(k) and sal_im = Im V(k+1) + Re V(k) are
//            registered at the output with dv and dir_out = k.
// The delay register takes every valid V, so V(k+1) becomes V(k) on the next
// clock. Outputs of the FFT with index above M are ignored.
//
// Interface: xk_re/xk_im (9Q15), xk_index (0..2M-1) and xk_dv from the FFT
// core; sal_re/sal_im (9Q15), dir_out (0..M-1) and dv towards the
// watermarking stage. Latency 3 clocks from xk_index = k+1 to X(k); one
// coefficient per clock. The structure (ROM of Q15 c factors, complex product,
// one-value delay, two adders, control unit) and the formats follow the design
// description; the pipeline registers, xk_dv and the reset are this
// implementation's choices. With Q15 samples and an orthonormal FFT, |U| <= 16
// and |X| <= 32, so the 25-bit adders cannot overflow.
module mclt_fwd_stage
  import mclt_pkg::*;
#(
  parameter int M  = M_DEFAULT,
  parameter int AW = $clog2(2 * M),
  parameter int DW = $clog2(M)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic signed [XK_W-1:0] xk_re,
  input  logic signed [XK_W-1:0] xk_im,
  input  logic [AW-1:0]          xk_index,
  input  logic                   xk_dv,
  output logic signed [XK_W-1:0] sal_re,
  output logic signed [XK_W-1:0] sal_im,
  output logic [DW-1:0]          dir_out,
  output logic                   dv
);

  coef_t c;
  xk_t   u_s1, v_prod, v_s2, v_d;
  logic  shift_en, emit;

  mclt_c_rom #(.M(M), .CONJ(1'b0), .AW(AW)) u_rom (
    .clk  (clk),
    .addr (xk_index),
    .c    (c)
  );

  mclt_cmul #(.A_W(XK_W), .C_W(C_W), .P_W(XK_W), .SHIFT(FRAC)) u_cmul (
    .a_re (u_s1.re),
    .a_im (u_s1.im),
    .c_re (c.re),
    .c_im (c.im),
    .p_re (v_prod.re),
    .p_im (v_prod.im)
  );

  mclt_fwd_ctrl #(.M(M), .AW(AW), .DW(DW)) u_ctrl (
    .clk      (clk),
    .rst_n    (rst_n),
    .xk_index (xk_index),
    .xk_dv    (xk_dv),
    .shift_en (shift_en),
    .emit     (emit),
    .dv       (dv),
    .dir_out  (dir_out)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      u_s1   <= '0;
      v_s2   <= '0;
      v_d    <= '0;
      sal_re <= '0;
      sal_im <= '0;
    end else begin
      u_s1 <= '{re: xk_re, im: xk_im};
      v_s2 <= v_prod;
      if (shift_en) v_d <= v_s2;
      if (emit) begin
        sal_re <= v_s2.re - v_d.im;
        sal_im <= v_s2.im + v_d.re;
      end
    end
  end

endmodule
