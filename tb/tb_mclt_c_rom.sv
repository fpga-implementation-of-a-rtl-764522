// tb_mclt_c_rom: checks both c-factor tables (c(k) and c*(k)) entry by entry.
// The reference multiplies the two unit phasors W_8(2k+1) and W_4M(k) as
// complex numbers in floating point and rounds to Q15; entries must match to
// one LSB. Addresses above M must return entry M. The read latency of one
// clock is checked by presenting a new address every clock.
module tb_mclt_c_rom;
  import mclt_pkg::*;

  localparam int M  = 128;
  localparam int AW = $clog2(2 * M);
  localparam real TWO_PI = 6.28318530717958647692;

  logic          clk = 1'b0;
  logic [AW-1:0] addr;
  coef_t         c_fwd, c_inv;
  int            checks = 0, failures = 0;

  always #5 clk = ~clk;

  mclt_c_rom #(.M(M), .CONJ(1'b0)) dut_fwd (.clk(clk), .addr(addr), .c(c_fwd));
  mclt_c_rom #(.M(M), .CONJ(1'b1)) dut_inv (.clk(clk), .addr(addr), .c(c_inv));

  function automatic int q15_ref(input real v);
    int q;
    q = int'($floor(v * 32768.0 + 0.5));
    if (q > 32767) q = 32767;
    return q;
  endfunction

  task automatic check_entry(input int a, input coef_t f, input coef_t i);
    real a1, a2, re, im;
    int  k, er, ei;
    k  = (a > M) ? M : a;
    a1 = -TWO_PI * real'(2 * k + 1) / 8.0;          // W_8(2k+1)
    a2 = -TWO_PI * real'(k) / (4.0 * real'(M));     // W_4M(k)
    re = $cos(a1) * $cos(a2) - $sin(a1) * $sin(a2);
    im = $cos(a1) * $sin(a2) + $sin(a1) * $cos(a2);
    er = q15_ref(re);
    ei = q15_ref(im);
    checks += 4;
    if (int'(f.re) - er > 1 || er - int'(f.re) > 1) begin failures++; $display("c_re(%0d) = %0d, want %0d", a, f.re, er); end
    if (int'(f.im) - ei > 1 || ei - int'(f.im) > 1) begin failures++; $display("c_im(%0d) = %0d, want %0d", a, f.im, ei); end
    if (int'(i.re) - er > 1 || er - int'(i.re) > 1) begin failures++; $display("c*_re(%0d) = %0d, want %0d", a, i.re, er); end
    ei = q15_ref(-im);
    if (int'(i.im) - ei > 1 || ei - int'(i.im) > 1) begin failures++; $display("c*_im(%0d) = %0d, want %0d", a, i.im, ei); end
  endtask

  initial begin
    addr = '0;
    @(negedge clk);
    for (int a = 0; a < 2 * M; a++) begin
      addr = AW'(a);
      @(posedge clk);
      #1 check_entry(a, c_fwd, c_inv);
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20 * M) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
