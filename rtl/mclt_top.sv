// mclt_top: the two custom stages of an MCLT / inverse MCLT pair for a
// real-time audio watermarking system, side by side.
//
// Direct MCLT processor = 2M-point streaming FFT core + mclt_fwd_stage.
// Inverse MCLT processor = mclt_inv_stage + 2M-point streaming IFFT core.
// The FFT and IFFT are pre-built vendor cores and are not part of this RTL:
// their connections are the ports of this module.
//   FFT core -> xk_re/xk_im (9Q15), xk_index (0..2M-1), xk_dv
//   sal_re/sal_im (9Q15), dir_out (k = 0..M-1), dv -> watermark embedder
//   watermarked X(k): in_re/in_im (24-bit, 15 fraction bits), in_dir, in_valid
//   ifft_start -> IFFT core start; IFFT core Y_index -> Y_re/Y_im (24-bit),
//   RD_LAT clocks later.
// The two halves share only the clock and reset; in the full system the
// watermark embedder sits between dv/sal and in_valid/in.
// Timing: X(k) follows xk_index = k+1 by 3 clocks, one coefficient per clock;
// ifft_start follows the in_valid of k = M-1 by 3 clocks.
module mclt_top
  import mclt_pkg::*;
#(
  parameter int M      = M_DEFAULT,
  parameter int RD_LAT = 3,
  parameter int AW     = $clog2(2 * M),
  parameter int DW     = $clog2(M)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // direct MCLT: from the FFT core
  input  logic signed [XK_W-1:0]  xk_re,
  input  logic signed [XK_W-1:0]  xk_im,
  input  logic [AW-1:0]           xk_index,
  input  logic                    xk_dv,
  // direct MCLT: coefficients out
  output logic signed [XK_W-1:0]  sal_re,
  output logic signed [XK_W-1:0]  sal_im,
  output logic [DW-1:0]           dir_out,
  output logic                    dv,
  // inverse MCLT: watermarked coefficients in
  input  logic                    in_valid,
  input  logic [DW-1:0]           in_dir,
  input  logic signed [WIN_W-1:0] in_re,
  input  logic signed [WIN_W-1:0] in_im,
  // inverse MCLT: IFFT core interface
  output logic                    ifft_start,
  input  logic [AW-1:0]           Y_index,
  output logic signed [Y_W-1:0]   Y_re,
  output logic signed [Y_W-1:0]   Y_im
);

  mclt_fwd_stage #(.M(M), .AW(AW), .DW(DW)) u_fwd (
    .clk      (clk),
    .rst_n    (rst_n),
    .xk_re    (xk_re),
    .xk_im    (xk_im),
    .xk_index (xk_index),
    .xk_dv    (xk_dv),
    .sal_re   (sal_re),
    .sal_im   (sal_im),
    .dir_out  (dir_out),
    .dv       (dv)
  );

  mclt_inv_stage #(.M(M), .RD_LAT(RD_LAT), .AW(AW), .DW(DW)) u_inv (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (in_valid),
    .in_dir   (in_dir),
    .in_re    (in_re),
    .in_im    (in_im),
    .start    (ifft_start),
    .Y_index  (Y_index),
    .Y_re     (Y_re),
    .Y_im     (Y_im)
  );

endmodule
