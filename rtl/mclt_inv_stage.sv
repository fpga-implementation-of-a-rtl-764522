// mclt_inv_stage: butterfly-like stage of the inverse MCLT processor.
//
// Turns a block of M (watermarked) MCLT coefficients X(k) into the first M+1
// FFT coefficients of the inverse transform's output block y(n), following
// Malvar's fast inverse MCLT:
//   Y(k) = c*(k)/4 * [X(k-1) - jX(k)]         k = 1..M-1   (16)
//   Y(0) =  (Re X(0)   + Im X(0))   / sqrt(8)                (18)
//   Y(M) = -(Re X(M-1) + Im X(M-1)) / sqrt(8)                (18)
// and keeps them in mclt_y_buffer, which supplies the remaining values by
// conjugate symmetry Y(2M-k) = Y*(k) (17) when the IFFT core reads them.
// Per coefficient:
//   arrival  X(k) and the previous coefficient X(k-1) (delay register) form
//            A = X(k-1) - jX(k), i.e. A_re = Re X(k-1) + Im X(k),
//            A_im = Im X(k-1) - Re X(k), and the edge sum Re X(k) + Im X(k);
//            the ROM reads c*(k). All three are registered (stage 1).
//   stage 2  Y = c* A / 4 (Q15 product, 2 more bits dropped) and
//            edge = +-sum * round(2^15/sqrt(8)) / 2^15 are registered.
//   write    Y(k) into the RAM for k >= 1, the edge value into Y(0) for k = 0
//            and into Y(M) (negated) for k = M-1.
// After the write of Y(M) the control unit swaps the buffer banks and pulses
// start for the IFFT core, which then reads Y_index = 0..2M-1.
//
// Formats: in_re/in_im and Y_re/Y_im are 24-bit with 15 fraction bits; the
// sums are 25-bit and cannot overflow, and |Y| <= 2^8 so Y never overflows.
// Products are truncated (rounded toward minus infinity).
// The datapath (two delay registers, two adders, ROM of c*, complex product,
// RAM, control unit raising start) follows the design description; in_valid,
// the pipeline registers, the two banks, the separate edge path for (18) and
// the reset are this implementation's choices.
module mclt_inv_stage
  import mclt_pkg::*;
#(
  parameter int M      = M_DEFAULT,
  parameter int RD_LAT = 3,
  parameter int AW     = $clog2(2 * M),
  parameter int DW     = $clog2(M)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic [DW-1:0]           in_dir,
  input  logic signed [WIN_W-1:0] in_re,
  input  logic signed [WIN_W-1:0] in_im,
  output logic                    start,
  input  logic [AW-1:0]           Y_index,
  output logic signed [Y_W-1:0]   Y_re,
  output logic signed [Y_W-1:0]   Y_im
);

  localparam int SW = WIN_W + 1;                            // sum width
  localparam logic signed [C_W-1:0] INV_SQRT8 = to_q15(1.0 / $sqrt(8.0));

  typedef struct packed {
    logic signed [SW-1:0] re;
    logic signed [SW-1:0] im;
  } sum_t;

  // Delay register: the previous coefficient X(k-1).
  win_t                 x_prev;
  sum_t                 a_s1;
  logic signed [SW-1:0] e_s1;
  coef_t                c;
  y_t                   y_prod, y_s2;
  logic signed [Y_W-1:0] e_prod, e_s2;
  logic signed [SW+C_W-1:0] e_full;

  logic first_s1, last_s1, we_mid, we_y0, we_ym, wr_bank, rd_bank;
  logic [DW-1:0] wr_addr;

  mclt_inv_ctrl #(.M(M), .DW(DW)) u_ctrl (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (in_valid),
    .in_dir   (in_dir),
    .first_s1 (first_s1),
    .last_s1  (last_s1),
    .we_mid   (we_mid),
    .we_y0    (we_y0),
    .we_ym    (we_ym),
    .wr_addr  (wr_addr),
    .wr_bank  (wr_bank),
    .rd_bank  (rd_bank),
    .start    (start)
  );

  mclt_c_rom #(.M(M), .CONJ(1'b1), .AW(AW)) u_rom (
    .clk  (clk),
    .addr (AW'(in_dir)),
    .c    (c)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      x_prev <= '0;
      a_s1   <= '0;
      e_s1   <= '0;
      y_s2   <= '0;
      e_s2   <= '0;
    end else begin
      if (in_valid) x_prev <= '{re: in_re, im: in_im};
      a_s1.re <= SW'(x_prev.re) + SW'(in_im);
      a_s1.im <= SW'(x_prev.im) - SW'(in_re);
      e_s1    <= SW'(in_re) + SW'(in_im);
      y_s2    <= y_prod;
      e_s2    <= e_prod;
    end
  end

  // Stage 2: c*(k)/4 * A, and the edge path of equation (18).
  mclt_cmul #(.A_W(SW), .C_W(C_W), .P_W(Y_W), .SHIFT(FRAC + 2)) u_cmul (
    .a_re (a_s1.re),
    .a_im (a_s1.im),
    .c_re (c.re),
    .c_im (c.im),
    .p_re (y_prod.re),
    .p_im (y_prod.im)
  );

  always_comb begin
    e_full = (SW+C_W)'(e_s1 * INV_SQRT8);
    if (last_s1 && !first_s1) e_full = -e_full;
    e_prod = e_full[FRAC +: Y_W];
  end

  mclt_y_buffer #(.M(M), .RD_LAT(RD_LAT), .AW(AW), .DW(DW)) u_buf (
    .clk     (clk),
    .rst_n   (rst_n),
    .wr_bank (wr_bank),
    .we_mid  (we_mid),
    .wr_addr (wr_addr),
    .wr_data (y_s2),
    .we_y0   (we_y0),
    .we_ym   (we_ym),
    .wr_edge (e_s2),
    .rd_bank (rd_bank),
    .Y_index (Y_index),
    .Y_re    (Y_re),
    .Y_im    (Y_im)
  );

endmodule
