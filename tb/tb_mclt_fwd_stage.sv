// tb_mclt_fwd_stage: streams random FFT outputs U(k) (9Q15, |re|,|im| < 16)
// through the direct butterfly-like stage, two blocks back to back, and
// compares every X(k) with X(k) = j c(k)U(k) + c(k+1)U(k+1) evaluated in
// floating point with the exact c(k). Errors come from the Q15 rounding of c
// and the truncations; they are bounded by 40 LSB of 9Q15 at this input range.
// Also checked: X(k) appears 3 clocks after xk_index = k+1, each block gives
// M coefficients on M consecutive clocks, dir_out counts 0..M-1.
module tb_mclt_fwd_stage;
  import mclt_pkg::*;

  localparam int  M   = 128;
  localparam int  AW  = $clog2(2 * M);
  localparam int  DW  = $clog2(M);
  localparam int  NB  = 2;             // blocks
  localparam real TOL = 40.0;          // LSB of 9Q15
  localparam real TWO_PI = 6.28318530717958647692;

  logic                   clk = 1'b0, rst_n = 1'b0;
  logic signed [XK_W-1:0] xk_re = '0, xk_im = '0;
  logic [AW-1:0]          xk_index = '0;
  logic                   xk_dv = 1'b0;
  logic signed [XK_W-1:0] sal_re, sal_im;
  logic [DW-1:0]          dir_out;
  logic                   dv;

  int  checks = 0, failures = 0, cycle = 0;
  int  u_re [NB][2*M], u_im [NB][2*M];
  int  sent_at [2*M];
  int  blk = 0, expect_k = 0, run = 0, max_run = 0, n_out = 0;
  real worst = 0.0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  mclt_fwd_stage #(.M(M)) dut (.*);

  // c(k) in floating point.
  function automatic real c_re(input int k);
    return $cos(-TWO_PI * (real'(2 * k + 1) / 8.0 + real'(k) / (4.0 * M)));
  endfunction
  function automatic real c_im(input int k);
    return $sin(-TWO_PI * (real'(2 * k + 1) / 8.0 + real'(k) / (4.0 * M)));
  endfunction

  task automatic check_x(input int b, input int k, input int got_re, input int got_im);
    real v0r, v0i, v1r, v1i, xr, xi, er, ei;
    v0r = c_re(k) * u_re[b][k] - c_im(k) * u_im[b][k];
    v0i = c_re(k) * u_im[b][k] + c_im(k) * u_re[b][k];
    v1r = c_re(k + 1) * u_re[b][k + 1] - c_im(k + 1) * u_im[b][k + 1];
    v1i = c_re(k + 1) * u_im[b][k + 1] + c_im(k + 1) * u_re[b][k + 1];
    xr  = v1r - v0i;                    // j*V(k) + V(k+1)
    xi  = v1i + v0r;
    er  = (real'(got_re) > xr) ? real'(got_re) - xr : xr - real'(got_re);
    ei  = (real'(got_im) > xi) ? real'(got_im) - xi : xi - real'(got_im);
    if (er > worst) worst = er;
    if (ei > worst) worst = ei;
    checks += 2;
    if (er > TOL) begin failures++; $display("blk %0d X(%0d).re = %0d, want %f", b, k, got_re, xr); end
    if (ei > TOL) begin failures++; $display("blk %0d X(%0d).im = %0d, want %f", b, k, got_im, xi); end
  endtask

  always @(posedge clk) begin
    if (rst_n) begin
      if (xk_dv) sent_at[xk_index] = cycle;
      if (dv) begin
        run++;
        if (run > max_run) max_run = run;
        checks += 2;
        if (int'(dir_out) != expect_k) begin
          failures++;
          $display("dir_out %0d, want %0d", dir_out, expect_k);
        end
        if (cycle - sent_at[int'(dir_out) + 1] != 3) begin
          failures++;
          $display("X(%0d) latency %0d, want 3", dir_out, cycle - sent_at[int'(dir_out) + 1]);
        end
        check_x(blk, int'(dir_out), int'(sal_re), int'(sal_im));
        n_out++;
        if (expect_k == M - 1) begin
          expect_k = 0;
          blk++;
          checks++;
          if (max_run != M) begin failures++; $display("longest dv run %0d, want %0d", max_run, M); end
          max_run = 0;
        end else expect_k++;
      end else run = 0;
    end
  end

  initial begin
    for (int b = 0; b < NB; b++)
      for (int k = 0; k < 2 * M; k++) begin
        u_re[b][k] = $signed($urandom_range(0, 1 << 20)) - (1 << 19);
        u_im[b][k] = $signed($urandom_range(0, 1 << 20)) - (1 << 19);
      end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int b = 0; b < NB; b++)
      for (int k = 0; k < 2 * M; k++) begin
        xk_re    <= XK_W'(u_re[b][k]);
        xk_im    <= XK_W'(u_im[b][k]);
        xk_index <= AW'(k);
        xk_dv    <= 1'b1;
        @(posedge clk);
      end
    xk_dv <= 1'b0;
    repeat (8) @(posedge clk);
    checks++;
    if (n_out != NB * M) begin failures++; $display("%0d coefficients, want %0d", n_out, NB * M); end
    $display("largest error %f LSB", worst);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NB * 2 * M + 200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
