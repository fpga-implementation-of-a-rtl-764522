// mclt_y_buffer: two-bank RAM of Y(k) for the IFFT core of the inverse MCLT,
// read with conjugate symmetry.
//
// A real output block y(n) has an FFT with Y(2M-k) = Y*(k), so only
// Y(0)..Y(M) are stored: Y(1)..Y(M-1) in a RAM of M words per bank (word 0
// unused), and the real values Y(0) and Y(M) in one register each per bank.
// The IFFT core reads all 2M values by Y_index:
//   Y_index = 0      -> (Y(0), 0)
//   Y_index = 1..M-1 -> Y(k)
//   Y_index = M      -> (Y(M), 0)
//   Y_index > M      -> conj(Y(2M - Y_index))
// from the bank named by rd_bank, while the writer fills the other bank.
//
// Timing: the value for Y_index appears RD_LAT clocks later (RD_LAT >= 1; the
// RAM read itself takes one clock and the rest is a delay line). The default
// of 3 matches the FFT core's rule that input data follow their index by three
// clocks. rd_bank is sampled with Y_index.
// Keeping Y in a RAM for the IFFT core and completing it by conjugate symmetry
// follow the design description; the two banks, the registers for the real
// values Y(0) and Y(M) and the read pipeline are this implementation's choices.
module mclt_y_buffer
  import mclt_pkg::*;
#(
  parameter int M      = M_DEFAULT,
  parameter int RD_LAT = 3,
  parameter int AW     = $clog2(2 * M),
  parameter int DW     = $clog2(M)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // write side (inverse butterfly-like stage)
  input  logic                  wr_bank,
  input  logic                  we_mid,
  input  logic [DW-1:0]         wr_addr,
  input  y_t                    wr_data,
  input  logic                  we_y0,
  input  logic                  we_ym,
  input  logic signed [Y_W-1:0] wr_edge,
  // read side (IFFT core)
  input  logic                  rd_bank,
  input  logic [AW-1:0]         Y_index,
  output logic signed [Y_W-1:0] Y_re,
  output logic signed [Y_W-1:0] Y_im
);

  logic [2*Y_W-1:0]      mem [2*M];
  logic signed [Y_W-1:0] y0_q [2];
  logic signed [Y_W-1:0] ym_q [2];

  // Write port.
  always_ff @(posedge clk) begin
    if (we_mid) mem[{wr_bank, wr_addr}] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      y0_q <= '{default: '0};
      ym_q <= '{default: '0};
    end else begin
      if (we_y0) y0_q[wr_bank] <= wr_edge;
      if (we_ym) ym_q[wr_bank] <= wr_edge;
    end
  end

  // Read port: fold the index onto 0..M, read, then select and conjugate.
  logic [AW-1:0]    fold;
  logic [DW-1:0]    raddr;
  logic [2*Y_W-1:0] rdata;
  logic             is0_r, ism_r, conj_r, bank_r;
  y_t               rd_y;

  always_comb begin
    fold  = (int'(Y_index) > M) ? AW'(2 * M) - Y_index : Y_index;
    raddr = fold[DW-1:0];
  end

  always_ff @(posedge clk) begin
    rdata <= mem[{rd_bank, raddr}];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      is0_r  <= 1'b0;
      ism_r  <= 1'b0;
      conj_r <= 1'b0;
      bank_r <= 1'b0;
    end else begin
      is0_r  <= (Y_index == '0);
      ism_r  <= (int'(Y_index) == M);
      conj_r <= (int'(Y_index) > M);
      bank_r <= rd_bank;
    end
  end

  always_comb begin
    if (is0_r)      rd_y = '{re: y0_q[bank_r], im: '0};
    else if (ism_r) rd_y = '{re: ym_q[bank_r], im: '0};
    else begin
      rd_y = rdata;
      if (conj_r) rd_y.im = -rd_y.im;
    end
  end

  // Delay line for the remaining RD_LAT-1 clocks.
  if (RD_LAT == 1) begin : g_no_delay
    assign Y_re = rd_y.re;
    assign Y_im = rd_y.im;
  end else begin : g_delay
    y_t pipe [RD_LAT-1];

    always_ff @(posedge clk) begin
      if (!rst_n) pipe <= '{default: '0};
      else begin
        pipe[0] <= rd_y;
        for (int i = 1; i < RD_LAT - 1; i++) pipe[i] <= pipe[i-1];
      end
    end

    assign Y_re = pipe[RD_LAT-2].re;
    assign Y_im = pipe[RD_LAT-2].im;
  end

endmodule
