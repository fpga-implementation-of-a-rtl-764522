// tb_mclt_fwd_ctrl: drives FFT index streams into the direct-stage control
// unit and checks dv/dir_out.
//  1. a complete block 0..2M-1: dv must be high for exactly M consecutive
//     clocks, carrying k = 0..M-1, each 3 clocks after xk_index = k+1;
//  2. a block with index G missing: coefficients G-1 and G must be skipped;
//  3. a block with idle clocks (xk_dv low) inside: all M coefficients appear.
module tb_mclt_fwd_ctrl;
  localparam int M  = 16;
  localparam int AW = $clog2(2 * M);
  localparam int DW = $clog2(M);
  localparam int G  = 5;

  logic          clk = 1'b0, rst_n = 1'b0;
  logic [AW-1:0] xk_index = '0;
  logic          xk_dv = 1'b0;
  logic          shift_en, emit, dv;
  logic [DW-1:0] dir_out;
  int            checks = 0, failures = 0;
  int            cycle = 0;
  int            sent_at [2*M];      // clock at which each index was presented
  int            seen [M];
  int            n_dv, run, max_run;
  bit            gap_mode = 1'b0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  mclt_fwd_ctrl #(.M(M)) dut (.*);

  // Scoreboard: inputs and outputs are both sampled at the clock edge, so a
  // difference of 3 means the value is presented 3 clocks after its index.
  always @(posedge clk) begin
    if (rst_n) begin
      if (xk_dv) sent_at[xk_index] = cycle;
      if (dv) begin
        n_dv++;
        run++;
        if (run > max_run) max_run = run;
        seen[dir_out]++;
        checks++;
        if (cycle - sent_at[int'(dir_out) + 1] != 3) begin
          failures++;
          $display("X(%0d): latency %0d, want 3", dir_out, cycle - sent_at[int'(dir_out) + 1]);
        end
      end else run = 0;
    end
  end

  task automatic send_block(input int skip, input bit idle);
    for (int i = 0; i < 2 * M; i++) begin
      if (i == skip) continue;
      if (idle && (i % 3 == 2)) begin
        xk_dv <= 1'b0;
        @(posedge clk);
      end
      xk_index <= AW'(i);
      xk_dv    <= 1'b1;
      @(posedge clk);
    end
    xk_dv <= 1'b0;
    repeat (6) @(posedge clk);
  endtask

  task automatic clear();
    n_dv = 0; run = 0; max_run = 0;
    foreach (seen[k]) seen[k] = 0;
  endtask

  task automatic expect_eq(input string what, input int got, input int want);
    checks++;
    if (got != want) begin
      failures++;
      $display("%s: got %0d want %0d", what, got, want);
    end
  endtask

  initial begin
    clear();
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);

    send_block(-1, 1'b0);
    expect_eq("block 1 coefficients", n_dv, M);
    expect_eq("block 1 longest dv run", max_run, M);
    for (int k = 0; k < M; k++) expect_eq($sformatf("block 1 X(%0d) count", k), seen[k], 1);

    clear();
    send_block(G, 1'b0);
    expect_eq("block 2 coefficients", n_dv, M - 2);
    for (int k = 0; k < M; k++)
      expect_eq($sformatf("block 2 X(%0d) count", k), seen[k], (k == G - 1 || k == G) ? 0 : 1);

    clear();
    send_block(-1, 1'b1);
    expect_eq("block 3 coefficients", n_dv, M);
    for (int k = 0; k < M; k++) expect_eq($sformatf("block 3 X(%0d) count", k), seen[k], 1);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40 * M) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
