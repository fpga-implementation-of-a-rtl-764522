// tb_mclt_inv_stage: feeds blocks of M random coefficients X(k) (24-bit,
// 15 fraction bits, |re|,|im| < 32) into the inverse butterfly-like stage and
// plays the IFFT core: on each start it reads Y_index = 0..2M-1, one per
// clock, while the next block is already being written. Blocks start 2M+4
// clocks apart: the IFFT needs 2M clocks to read a block, plus the start and
// read latencies, before the banks may swap again. Every value read is
// compared with floating-point evaluation of
//   Y(k) = c*(k)/4 [X(k-1) - jX(k)],  k = 1..M-1
//   Y(0) = (Re X(0) + Im X(0))/sqrt(8),  Y(M) = -(Re X(M-1) + Im X(M-1))/sqrt(8)
//   Y(2M-k) = conj Y(k)
// within 24 LSB. Also checked: start comes 3 clocks after the last
// coefficient, read data RD_LAT = 3 clocks after the index, one start per block.
module tb_mclt_inv_stage;
  import mclt_pkg::*;

  localparam int  M      = 128;
  localparam int  RD_LAT = 3;
  localparam int  AW     = $clog2(2 * M);
  localparam int  DW     = $clog2(M);
  localparam int  NB     = 3;
  localparam real TOL    = 24.0;
  localparam real TWO_PI = 6.28318530717958647692;

  logic                    clk = 1'b0, rst_n = 1'b0;
  logic                    in_valid = 1'b0;
  logic [DW-1:0]           in_dir = '0;
  logic signed [WIN_W-1:0] in_re = '0, in_im = '0;
  logic                    start;
  logic [AW-1:0]           Y_index = '0;
  logic signed [Y_W-1:0]   Y_re, Y_im;

  int  checks = 0, failures = 0, cycle = 0;
  int  xr [NB][M], xi [NB][M];
  int  last_at = 0, n_start = 0, rd_blk = 0, rd_i = -1;
  int  pend_i [$], pend_at [$], pend_b [$];
  real worst = 0.0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  mclt_inv_stage #(.M(M), .RD_LAT(RD_LAT)) dut (.*);

  function automatic real cs_re(input int k);   // c*(k)
    return $cos(TWO_PI * (real'(2 * k + 1) / 8.0 + real'(k) / (4.0 * M)));
  endfunction
  function automatic real cs_im(input int k);
    return $sin(TWO_PI * (real'(2 * k + 1) / 8.0 + real'(k) / (4.0 * M)));
  endfunction

  task automatic y_ref(input int b, input int i, output real yr, output real yi);
    int  k;
    real ar, ai;
    k = (i > M) ? 2 * M - i : i;
    if (k == 0) begin
      yr = real'(xr[b][0] + xi[b][0]) / $sqrt(8.0); yi = 0.0;
    end else if (k == M) begin
      yr = -real'(xr[b][M-1] + xi[b][M-1]) / $sqrt(8.0); yi = 0.0;
    end else begin
      ar = real'(xr[b][k-1]) + real'(xi[b][k]);      // X(k-1) - jX(k)
      ai = real'(xi[b][k-1]) - real'(xr[b][k]);
      yr = (cs_re(k) * ar - cs_im(k) * ai) / 4.0;
      yi = (cs_re(k) * ai + cs_im(k) * ar) / 4.0;
    end
    if (i > M) yi = -yi;
  endtask

  always @(posedge clk) begin
    if (rst_n) begin
      if (in_valid && int'(in_dir) == M - 1) last_at = cycle;
      if (start) begin
        checks++;
        if (cycle - last_at != 3) begin failures++; $display("start %0d clocks after last coefficient", cycle - last_at); end
        n_start++;
      end
      if (pend_at.size() > 0 && cycle - pend_at[0] == RD_LAT) begin
        real yr, yi, er, ei;
        y_ref(pend_b[0], pend_i[0], yr, yi);
        er = (real'(Y_re) > yr) ? real'(Y_re) - yr : yr - real'(Y_re);
        ei = (real'(Y_im) > yi) ? real'(Y_im) - yi : yi - real'(Y_im);
        if (er > worst) worst = er;
        if (ei > worst) worst = ei;
        checks += 2;
        if (er > TOL || ei > TOL) begin
          failures++;
          $display("blk %0d Y(%0d) = %0d,%0d want %f,%f", pend_b[0], pend_i[0], Y_re, Y_im, yr, yi);
        end
        void'(pend_i.pop_front()); void'(pend_at.pop_front()); void'(pend_b.pop_front());
      end
    end
  end

  // IFFT-core stand-in: a read sweep per start.
  initial begin
    forever begin
      @(posedge clk);
      if (rst_n && start) begin
        int b;
        b = rd_blk;
        rd_blk++;
        for (int i = 0; i < 2 * M; i++) begin
          Y_index <= AW'(i);
          pend_i.push_back(i); pend_b.push_back(b); pend_at.push_back(cycle + 1);
          @(posedge clk);
        end
      end
    end
  end

  initial begin
    for (int b = 0; b < NB; b++)
      for (int k = 0; k < M; k++) begin
        xr[b][k] = $signed($urandom_range(0, 1 << 21)) - (1 << 20);
        xi[b][k] = $signed($urandom_range(0, 1 << 21)) - (1 << 20);
      end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int b = 0; b < NB; b++) begin
      for (int k = 0; k < M; k++) begin
        in_valid <= 1'b1;
        in_dir   <= DW'(k);
        in_re    <= WIN_W'(xr[b][k]);
        in_im    <= WIN_W'(xi[b][k]);
        @(posedge clk);
      end
      in_valid <= 1'b0;
      repeat (M + 4) @(posedge clk);   // one block per 2M+4 clocks
    end
    repeat (2 * M + 10) @(posedge clk);
    checks += 2;
    if (n_start != NB) begin failures++; $display("%0d starts, want %0d", n_start, NB); end
    if (rd_blk != NB || pend_at.size() != 0) begin failures++; $display("reads incomplete"); end
    $display("largest error %f LSB", worst);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NB * 2 * M + 4 * M) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
