// mclt_c_rom: read-only table of the modulation factors c(k) (or c*(k)) in Q15.
//
// The direct MCLT multiplies FFT output U(k) by c(k) = W_8(2k+1) W_4M(k) for
// k = 0..M; the inverse multiplies by the conjugate c*(k). Both stages address
// the table with the index of the value being processed. The table holds the
// M+1 entries k = 0..M; addresses above M read entry M (those FFT outputs are
// not used). Contents are computed at elaboration from the closed form in
// mclt_pkg, so the table follows M.
//
// Timing: synchronous read, c appears on the clock edge after addr.
// The Q15 format and the storage of c in a ROM follow the design description;
// the synchronous read port is this implementation's choice.
module mclt_c_rom
  import mclt_pkg::*;
#(
  parameter int M    = M_DEFAULT,
  parameter bit CONJ = 1'b0,               // 1: store c*(k) for the inverse MCLT
  parameter int AW   = $clog2(2 * M)       // address width (FFT index width)
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  output coef_t         c
);

  typedef logic [2*C_W-1:0] rom_t [M+1];

  function automatic rom_t build_rom();
    rom_t r;
    for (int k = 0; k <= M; k++) r[k] = c_factor(k, M, CONJ);
    return r;
  endfunction

  localparam rom_t ROM = build_rom();

  always_ff @(posedge clk) begin
    if (int'(addr) > M) c <= ROM[M];
    else                c <= ROM[addr];
  end

endmodule
