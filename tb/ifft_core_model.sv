// ifft_core_model: behavioural model (not synthesizable) of the 2M-point
// IFFT core that reads Y(k) from the inverse MCLT stage. It stands in for a
// vendor core in simulation only.
//
// On start it raises busy, presents Y_index = 0..2M-1 on consecutive clocks
// and takes Y_re/Y_im for each index RD_LAT clocks after the index. It then
// computes y(n) = 1/sqrt(2M) * sum_k Y(k) exp(+j 2 pi k n / 2M) in floating
// point, pulses done for one clock CALC_LAT clocks after the load, edone on
// the clock after done, drops busy (unless the next block is being loaded), and streams y(0..2M-1) with xk_index and
// dv. Outputs are 33 bits with 15 fraction bits. A new start is taken once
// the previous block has been loaded.
module ifft_core_model #(
  parameter int M        = 128,
  parameter int RD_LAT   = 3,
  parameter int CALC_LAT = 100,
  parameter int AW       = $clog2(2 * M)
) (
  input  logic               clk,
  input  logic               start,
  input  logic signed [23:0] Y_re,
  input  logic signed [23:0] Y_im,
  output logic [AW-1:0]      Y_index,
  output logic signed [32:0] xk_re,
  output logic signed [32:0] xk_im,
  output logic [AW-1:0]      xk_index,
  output logic               dv,
  output logic               busy,
  output logic               edone,
  output logic               done
);
  localparam real TWO_PI = 6.28318530717958647692;
  localparam int  N      = 2 * M;

  bit loading = 1'b0;

  initial begin
    Y_index  = '0;
    xk_re    = '0;
    xk_im    = '0;
    xk_index = '0;
    dv       = 1'b0;
    busy     = 1'b0;
    edone    = 1'b0;
    done     = 1'b0;
  end

  function automatic longint rnd(input real v);
    return longint'($floor(v + 0.5));
  endfunction

  // Finished blocks wait in a queue (N values each, plus the clock at which
  // done is due) for the output process.
  longint out_re [$], out_im [$];
  int     due [$];
  int     now = 0;

  always @(posedge clk) now <= now + 1;

  initial begin
    forever begin
      @(posedge clk);
      if (due.size() > 0 && now >= due[0]) begin
        void'(due.pop_front());
        done <= 1'b1;
        @(posedge clk);
        done  <= 1'b0;
        edone <= 1'b1;
        if (!loading) busy <= 1'b0;
        @(posedge clk);
        edone <= 1'b0;
        for (int n = 0; n < N; n++) begin
          xk_re    <= 33'(out_re.pop_front());
          xk_im    <= 33'(out_im.pop_front());
          xk_index <= AW'(n);
          dv       <= 1'b1;
          @(posedge clk);
        end
        dv <= 1'b0;
      end
    end
  end

  initial begin
    forever begin
      @(posedge clk);
      if (start) begin
        int     vr [N], vi [N];
        longint yr [N], yi [N];
        real    sr, si, a;
        busy    <= 1'b1;
        loading  = 1'b1;
        for (int j = 0; j < N + RD_LAT + 1; j++) begin
          if (j < N) Y_index <= AW'(j);
          if (j >= RD_LAT + 1) begin
            vr[j - RD_LAT - 1] = int'(Y_re);
            vi[j - RD_LAT - 1] = int'(Y_im);
          end
          @(posedge clk);
        end
        for (int n = 0; n < N; n++) begin
          sr = 0.0;
          si = 0.0;
          for (int k = 0; k < N; k++) begin
            a   = TWO_PI * real'((k * n) % N) / N;
            sr += real'(vr[k]) * $cos(a) - real'(vi[k]) * $sin(a);
            si += real'(vr[k]) * $sin(a) + real'(vi[k]) * $cos(a);
          end
          yr[n] = rnd(sr / $sqrt(real'(N)));
          yi[n] = rnd(si / $sqrt(real'(N)));
        end
        loading = 1'b0;
        for (int n = 0; n < N; n++) begin
          out_re.push_back(yr[n]);
          out_im.push_back(yi[n]);
        end
        due.push_back(now + CALC_LAT);
      end
    end
  end
endmodule
