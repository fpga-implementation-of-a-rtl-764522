// tb_mclt_top: end-to-end test of the MCLT / inverse MCLT pair at the default
// size (M = 128), with behavioural models of the FFT and IFFT cores around
// mclt_top.
//
// A random Q15 signal is cut into NB overlapping blocks of 2M samples (hop M).
// For each block the FFT model is started; it fetches the samples through a
// three-clock frame-buffer pipeline (xn_index -> xn_re), and its output goes
// through the direct stage. Every MCLT coefficient X(k) is compared with the
// definition X(k) = sum_n x(n) [p_c(n,k) - j p_s(n,k)] (equations 1-6) in
// floating point. The coefficients are passed unchanged (a register stands in
// for the watermark embedder) into the inverse stage; each ifft_start starts
// the IFFT model, whose output y(n) must equal x(n) h(n)^2 (equation 12).
// Tolerances: 40 LSB on X, 64 LSB on y (LSB = 2^-15).
//
// Counted mechanisms, each of which must occur: coefficient output (dv), runs
// of M coefficients on consecutive clocks, FFT outputs above index M being
// dropped, IFFT starts, bank swaps of the Y buffer, Y(0) and Y(M) written by
// the separate path of equation 18, reads served by conjugate symmetry, and Y
// writes of one block while the IFFT reads the previous one.
module tb_mclt_top;
  import mclt_pkg::*;

  localparam int  M      = M_DEFAULT;
  localparam int  N      = 2 * M;
  localparam int  AW     = $clog2(N);
  localparam int  DW     = $clog2(M);
  localparam int  NB     = 3;
  localparam int  PERIOD = N + 8;                // clocks between block starts
  localparam real TOL_X  = 40.0;
  localparam real TOL_Y  = 64.0;
  localparam real PI     = 3.14159265358979323846;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // ---------------- signal and frame buffer ----------------
  int sig [(NB + 1) * M];
  int load_blk = 0;
  logic                   fft_start = 1'b0;
  logic [AW-1:0]          xn_index;
  logic signed [15:0]     fb_d1 = '0, fb_d2 = '0, xn_re = '0;

  always @(posedge clk) begin
    fb_d1 <= 16'(sig[load_blk * M + int'(xn_index)]);
    fb_d2 <= fb_d1;
    xn_re <= fb_d2;
  end

  // ---------------- FFT model and DUT ----------------
  logic signed [XK_W-1:0]  xk_re, xk_im, sal_re, sal_im;
  logic [AW-1:0]           xk_index, Y_index;
  logic                    xk_dv, dv, ifft_start;
  logic [DW-1:0]           dir_out;
  logic                    in_valid = 1'b0;
  logic [DW-1:0]           in_dir = '0;
  logic signed [WIN_W-1:0] in_re = '0, in_im = '0;
  logic signed [Y_W-1:0]   Y_re, Y_im;

  fft_core_model #(.M(M)) u_fft (
    .clk(clk), .start(fft_start), .xn_re(xn_re), .xn_index(xn_index),
    .xk_re(xk_re), .xk_im(xk_im), .xk_index(xk_index), .xk_dv(xk_dv));

  mclt_top dut (.*);

  logic signed [32:0] yo_re, yo_im;
  logic [AW-1:0]      yo_index;
  logic               yo_dv, busy, edone, done;

  ifft_core_model #(.M(M)) u_ifft (
    .clk(clk), .start(ifft_start), .Y_re(Y_re), .Y_im(Y_im), .Y_index(Y_index),
    .xk_re(yo_re), .xk_im(yo_im), .xk_index(yo_index), .dv(yo_dv),
    .busy(busy), .edone(edone), .done(done));

  // ---------------- references ----------------
  function automatic real hwin(input int n);
    return -$sin((real'(n) + 0.5) * PI / (2.0 * M));
  endfunction

  task automatic x_ref(input int b, input int k, output real xr, output real xi);
    real ph, s;
    xr = 0.0;
    xi = 0.0;
    for (int n = 0; n < N; n++) begin
      ph = (real'(n) + real'(M + 1) / 2.0) * (real'(k) + 0.5) * PI / M;
      s  = real'(sig[b * M + n]) * hwin(n) * $sqrt(2.0 / M);
      xr += s * $cos(ph);                 // X_c
      xi -= s * $sin(ph);                 // -X_s
    end
  endtask

  function automatic real absr(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  // ---------------- scoreboards and counters ----------------
  int  out_blk = 0, exp_k = 0, run = 0, max_run = 0;
  int  n_dv = 0, n_runs = 0, n_dropped = 0, n_start = 0, n_swaps = 0;
  int  n_y0 = 0, n_ym = 0, n_conj = 0, n_overlap = 0;
  int  y_blk = 0, y_n = 0, n_y = 0;
  int  first_start = -1, first_dv = -1;
  real worst_x = 0.0, worst_y = 0.0;
  logic prev_rd_bank = 1'b1;
  logic [AW-1:0] prev_y_index = '0;
  bit   reading = 1'b0;

  always @(posedge clk) begin
    if (rst_n) begin
      // direct MCLT output
      if (dv) begin
        real xr, xi, e;
        if (first_dv < 0) first_dv = cycle;
        n_dv++;
        run++;
        if (run > max_run) max_run = run;
        checks += 3;
        if (int'(dir_out) != exp_k) begin failures++; $display("dir_out %0d want %0d", dir_out, exp_k); end
        x_ref(out_blk, int'(dir_out), xr, xi);
        e = absr(real'(sal_re) - xr);
        if (e > worst_x) worst_x = e;
        if (e > TOL_X) begin failures++; $display("blk %0d X(%0d).re %0d want %f", out_blk, dir_out, sal_re, xr); end
        e = absr(real'(sal_im) - xi);
        if (e > worst_x) worst_x = e;
        if (e > TOL_X) begin failures++; $display("blk %0d X(%0d).im %0d want %f", out_blk, dir_out, sal_im, xi); end
        if (exp_k == M - 1) begin
          exp_k = 0;
          out_blk++;
          if (max_run == M) n_runs++;
          max_run = 0;
        end else exp_k++;
      end else run = 0;
      if (xk_dv && int'(xk_index) > M) n_dropped++;

      // inverse side
      if (ifft_start) begin
        n_start++;
        reading = 1'b1;
      end
      if (dut.u_inv.u_ctrl.rd_bank != prev_rd_bank) n_swaps++;
      prev_rd_bank = dut.u_inv.u_ctrl.rd_bank;
      if (dut.u_inv.u_ctrl.we_y0) n_y0++;
      if (dut.u_inv.u_ctrl.we_ym) n_ym++;
      if (u_ifft.loading && int'(Y_index) > M && Y_index != prev_y_index) n_conj++;
      prev_y_index = Y_index;
      if (u_ifft.loading && dut.u_inv.u_ctrl.we_mid) n_overlap++;

      // IFFT output: y(n) = x(n) h(n)^2
      if (yo_dv) begin
        real want, e;
        want = real'(sig[y_blk * M + int'(yo_index)]) * hwin(int'(yo_index)) * hwin(int'(yo_index));
        e = absr(real'(yo_re) - want);
        if (e > worst_y) worst_y = e;
        if (absr(real'(yo_im)) > worst_y) worst_y = absr(real'(yo_im));
        checks += 3;
        if (int'(yo_index) != y_n) begin failures++; $display("y index %0d want %0d", yo_index, y_n); end
        if (e > TOL_Y) begin failures++; $display("blk %0d y(%0d) %0d want %f", y_blk, yo_index, yo_re, want); end
        if (absr(real'(yo_im)) > TOL_Y) begin failures++; $display("blk %0d y(%0d) imaginary %0d", y_blk, yo_index, yo_im); end
        n_y++;
        if (y_n == N - 1) begin y_n = 0; y_blk++; end else y_n++;
      end
    end
  end

  // Watermark-embedder stand-in: coefficients pass unchanged, one clock later.
  always @(posedge clk) begin
    in_valid <= dv;
    in_dir   <= dir_out;
    in_re    <= WIN_W'(sal_re);
    in_im    <= WIN_W'(sal_im);
  end

  task automatic expect_eq(input string what, input int got, input int want);
    checks++;
    if (got != want) begin failures++; $display("%s: %0d, want %0d", what, got, want); end
    else $display("%s: %0d", what, got);
  endtask

  initial begin
    foreach (sig[i]) sig[i] = $signed($urandom_range(0, 65535)) - 32768;
    repeat (4) @(posedge clk);
    rst_n <= 1'b1;
    repeat (2) @(posedge clk);
    for (int b = 0; b < NB; b++) begin
      load_blk  = b;
      if (first_start < 0) first_start = cycle;
      fft_start <= 1'b1;
      @(posedge clk);
      fft_start <= 1'b0;
      repeat (PERIOD - 1) @(posedge clk);
    end
    wait (y_blk == NB);
    repeat (10) @(posedge clk);

    // The FFT model delivers U(0) 611 clocks after start; the stage needs U(1)
    // (one clock more) and three pipeline clocks: X(0) at 615 clocks, the
    // initial latency the design targets.
    expect_eq("start to first coefficient, clocks", first_dv - first_start, 615);
    $display("largest X error %f LSB, largest y error %f LSB", worst_x, worst_y);
    expect_eq("coefficients out (dv)", n_dv, NB * M);
    expect_eq("blocks output at one coefficient per clock", n_runs, NB);
    expect_eq("FFT outputs above index M dropped", n_dropped, NB * (M - 1));
    expect_eq("IFFT starts", n_start, NB);
    expect_eq("Y buffer bank swaps", n_swaps, NB);
    expect_eq("Y(0) writes", n_y0, NB);
    expect_eq("Y(M) writes", n_ym, NB);
    expect_eq("conjugate-symmetric reads", n_conj, NB * (M - 1));
    checks++;
    if (n_overlap == 0) begin failures++; $display("no Y writes overlapped IFFT reads"); end
    else $display("Y writes during IFFT reads: %0d", n_overlap);
    expect_eq("output samples", n_y, NB * N);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NB * PERIOD + 2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
