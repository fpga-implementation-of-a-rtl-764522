// mclt_fwd_ctrl: control unit of the direct MCLT butterfly-like stage.
//
// The FFT core streams U(k) with its index xk_index (natural order, one value
// per clock while xk_dv is high). The stage computes X(k) = jV(k) + V(k+1), so
// X(k) can be emitted when V(k+1) arrives and V(k) sits in the one-value delay
// register. This unit follows each index through the two pipeline registers of
// the datapath (ROM/input register, then product register) and, at the second
// one, decides:
//   shift_en  load the current V into the delay register (every valid value),
//   emit      produce X(k): index k+1 in 1..M and the value held in the delay
//             register has index k (no gap in the stream).
// It then raises dv for one clock per coefficient together with dir_out = k,
// aligned with the registered sal outputs of the stage.
//
// Timing: dv/dir_out for X(k) appear 3 clocks after xk_index = k+1 was
// presented. With a gap-free stream, dv is high for M consecutive clocks per
// block. Reset is synchronous and active low (this design's choice; the
// design description shows no reset).
module mclt_fwd_ctrl
  import mclt_pkg::*;
#(
  parameter int M  = M_DEFAULT,
  parameter int AW = $clog2(2 * M),        // FFT index width (8 for M = 128)
  parameter int DW = $clog2(M)             // coefficient index width (7)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [AW-1:0] xk_index,
  input  logic          xk_dv,
  output logic          shift_en,          // to the delay register, stage 2
  output logic          emit,              // to the output register, stage 2
  output logic          dv,
  output logic [DW-1:0] dir_out
);

  logic [AW-1:0] idx_s1, idx_s2, idx_prev;
  logic          v_s1, v_s2, prev_ok;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v_s1     <= 1'b0;
      v_s2     <= 1'b0;
      idx_s1   <= '0;
      idx_s2   <= '0;
      idx_prev <= '0;
      prev_ok  <= 1'b0;
      dv       <= 1'b0;
      dir_out  <= '0;
    end else begin
      v_s1   <= xk_dv;
      idx_s1 <= xk_index;
      v_s2   <= v_s1;
      idx_s2 <= idx_s1;
      if (shift_en) begin
        idx_prev <= idx_s2;
        prev_ok  <= 1'b1;
      end
      dv <= emit;
      if (emit) dir_out <= DW'(idx_s2 - AW'(1));
    end
  end

  always_comb begin
    shift_en = v_s2;
    emit     = v_s2 && prev_ok && (idx_s2 != '0) && (int'(idx_s2) <= M)
               && (idx_prev == idx_s2 - AW'(1));
  end

endmodule
