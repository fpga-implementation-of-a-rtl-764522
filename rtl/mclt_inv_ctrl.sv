// mclt_inv_ctrl: control unit of the inverse MCLT butterfly-like stage.
//
// Watermarked coefficients X(k) arrive one at a time with their index in_dir
// (k = 0..M-1 in order, in_valid high). The stage writes Y(k), k = 0..M, for
// one block into one bank of a two-bank buffer and then starts the IFFT core
// on that bank while the next block is written into the other bank.
// This unit follows each index through the two pipeline registers of the
// datapath and, at the second one, issues the writes:
//   we_mid   Y(k) for k = 1..M-1 from the complex product (equation 16),
//   we_y0    Y(0) from the edge path (equation 18, first line), k = 0,
//   we_ym    Y(M) from the edge path (equation 18, second line), k = M-1.
// A block counts as complete when its indices arrived as 0, 1, ..., M-1 with
// no gap; its last write then swaps the banks and, one clock later, raises
// start for one clock with rd_bank pointing at the finished bank. A block
// with a gap is dropped: its bank is rewritten by the next block.
//
// Timing: start follows the in_valid of k = M-1 by 3 clocks. Reset is
// synchronous and active low. The two banks and the drop rule are this
// design's choices; the description only states that Y(k) is kept in a RAM
// for the IFFT core and that the control unit starts the core's loading.
module mclt_inv_ctrl
  import mclt_pkg::*;
#(
  parameter int M  = M_DEFAULT,
  parameter int DW = $clog2(M)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [DW-1:0] in_dir,
  output logic          first_s1,          // stage-1 value has k = 0
  output logic          last_s1,           // stage-1 value has k = M-1
  output logic          we_mid,
  output logic          we_y0,
  output logic          we_ym,
  output logic [DW-1:0] wr_addr,
  output logic          wr_bank,
  output logic          rd_bank,
  output logic          start
);

  localparam logic [DW-1:0] LAST = DW'(M - 1);

  logic          v_s1, v_s2, ok_s1, ok_s2;
  logic [DW-1:0] k_s1, k_s2, k_prev;
  logic          have_prev, in_order;

  // The sequence check is made on arrival: index 0 opens a block, every other
  // index must follow the one before it.
  always_comb begin
    in_order = (in_dir == '0) || (have_prev && in_dir == k_prev + DW'(1));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v_s1      <= 1'b0;
      v_s2      <= 1'b0;
      ok_s1     <= 1'b0;
      ok_s2     <= 1'b0;
      k_s1      <= '0;
      k_s2      <= '0;
      k_prev    <= '0;
      have_prev <= 1'b0;
      wr_bank   <= 1'b0;
      rd_bank   <= 1'b1;
      start     <= 1'b0;
    end else begin
      if (in_valid) begin
        k_prev    <= in_dir;
        have_prev <= in_order;
      end
      v_s1  <= in_valid;
      ok_s1 <= in_valid && in_order;
      k_s1  <= in_dir;
      v_s2  <= v_s1;
      ok_s2 <= ok_s1;
      k_s2  <= k_s1;
      start <= 1'b0;
      if (we_ym) begin
        wr_bank <= ~wr_bank;
        rd_bank <= wr_bank;
        start   <= 1'b1;
      end
    end
  end

  always_comb begin
    first_s1 = (k_s1 == '0);
    last_s1  = (k_s1 == LAST);
    wr_addr  = k_s2;
    we_mid   = v_s2 && ok_s2 && (k_s2 != '0);
    we_y0    = v_s2 && ok_s2 && (k_s2 == '0);
    we_ym    = v_s2 && ok_s2 && (k_s2 == LAST);
  end

  // The IFFT never reads the bank being written.
  a_banks_differ: assert property (@(posedge clk) disable iff (!rst_n) wr_bank != rd_bank);
  // start is a single-clock pulse.
  a_start_pulse: assert property (@(posedge clk) disable iff (!rst_n) start |=> !start);

endmodule
