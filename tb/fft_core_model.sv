// fft_core_model: behavioural model (not synthesizable) of the streaming
// 2M-point FFT core that feeds the direct MCLT stage. It stands in for a
// vendor core in simulation only.
//
// On start it presents xn_index = 0..2M-1 on consecutive clocks and takes the
// sample for each index LOAD_DELAY clocks after the index (the data come from
// an external memory). When the block is loaded it computes
//   U(k) = 1/sqrt(2M) * sum_n x(n) exp(-j 2 pi k n / 2M)
// in floating point, rounds it to 9Q15 (25 bits) and streams U(0..2M-1) with
// xk_index and xk_dv, the first value OUT_LAT clocks after start. A new start
// may be given once the previous block is loaded (2M+LOAD_DELAY+2 clocks after
// its start); the output streams of
// consecutive blocks must not overlap (start-to-start spacing of at least 2M).
module fft_core_model #(
  parameter int M          = 128,
  parameter int LOAD_DELAY = 3,
  parameter int OUT_LAT    = 611,
  parameter int AW         = $clog2(2 * M)
) (
  input  logic               clk,
  input  logic               start,
  input  logic signed [15:0] xn_re,
  output logic [AW-1:0]      xn_index,
  output logic signed [24:0] xk_re,
  output logic signed [24:0] xk_im,
  output logic [AW-1:0]      xk_index,
  output logic               xk_dv
);
  localparam real TWO_PI = 6.28318530717958647692;
  localparam int  N      = 2 * M;

  initial begin
    xn_index = '0;
    xk_re    = '0;
    xk_im    = '0;
    xk_index = '0;
    xk_dv    = 1'b0;
  end

  function automatic int rnd(input real v);
    return int'($floor(v + 0.5));
  endfunction

  // Transformed blocks wait in a queue (N values each, plus the clock at
  // which their first value is due) for the output process.
  int out_re [$], out_im [$];
  int due [$];
  int now = 0;

  always @(posedge clk) now <= now + 1;

  initial begin
    forever begin
      @(posedge clk);
      if (due.size() > 0 && now >= due[0]) begin
        void'(due.pop_front());
        for (int k = 0; k < N; k++) begin
          xk_re    <= 25'(out_re.pop_front());
          xk_im    <= 25'(out_im.pop_front());
          xk_index <= AW'(k);
          xk_dv    <= 1'b1;
          @(posedge clk);
        end
        xk_dv <= 1'b0;
      end
    end
  end

  initial begin
    forever begin
      @(posedge clk);
      if (start) begin
        int  x [N];
        int  ur [N], ui [N];
        real sr, si;
        for (int j = 0; j < N + LOAD_DELAY + 1; j++) begin
          if (j < N) xn_index <= AW'(j);
          if (j >= LOAD_DELAY + 1) x[j - LOAD_DELAY - 1] = int'(xn_re);
          @(posedge clk);
        end
        for (int k = 0; k < N; k++) begin
          sr = 0.0;
          si = 0.0;
          for (int n = 0; n < N; n++) begin
            sr += real'(x[n]) * $cos(TWO_PI * real'((k * n) % N) / N);
            si -= real'(x[n]) * $sin(TWO_PI * real'((k * n) % N) / N);
          end
          ur[k] = rnd(sr / $sqrt(real'(N)));
          ui[k] = rnd(si / $sqrt(real'(N)));
        end
        for (int k = 0; k < N; k++) begin
          out_re.push_back(ur[k]);
          out_im.push_back(ui[k]);
        end
        due.push_back(now + OUT_LAT - (N + LOAD_DELAY + 1) - 2);
      end
    end
  end
endmodule
