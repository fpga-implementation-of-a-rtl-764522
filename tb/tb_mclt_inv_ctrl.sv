// tb_mclt_inv_ctrl: drives coefficient index sequences into the inverse-stage
// control unit and checks the write strobes, bank swapping and start.
//  1. block 0..M-1 on consecutive clocks: M-1 we_mid with addresses 1..M-1,
//     one we_y0 and one we_ym, all into one bank; start one clock after the
//     last write (3 clocks after the in_valid of k = M-1), rd_bank = that bank;
//  2. the next block with idle clocks between coefficients: same, other bank;
//  3. a block with an index missing: no start, banks unchanged;
//  4. a complete block after it: start again.
module tb_mclt_inv_ctrl;
  localparam int M  = 16;
  localparam int DW = $clog2(M);

  logic          clk = 1'b0, rst_n = 1'b0;
  logic          in_valid = 1'b0;
  logic [DW-1:0] in_dir = '0;
  logic          first_s1, last_s1, we_mid, we_y0, we_ym, wr_bank, rd_bank, start;
  logic [DW-1:0] wr_addr;

  int checks = 0, failures = 0, cycle = 0;
  int n_mid, n_y0, n_ym, n_start, last_at, start_at, addr_sum, bank_of_writes;
  bit bank_mixed;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  mclt_inv_ctrl #(.M(M)) dut (.*);

  always @(posedge clk) begin
    if (rst_n) begin
      if (in_valid && int'(in_dir) == M - 1) last_at = cycle;
      if (we_mid || we_y0 || we_ym) begin
        if (bank_of_writes < 0) bank_of_writes = int'(wr_bank);
        else if (bank_of_writes != int'(wr_bank)) bank_mixed = 1'b1;
      end
      if (we_mid) begin n_mid++; addr_sum += int'(wr_addr); end
      if (we_y0) n_y0++;
      if (we_ym) n_ym++;
      if (start) begin
        n_start++;
        start_at = cycle;
        checks += 2;
        if (int'(rd_bank) != bank_of_writes) begin
          failures++;
          $display("rd_bank %0d at start, block written to %0d", rd_bank, bank_of_writes);
        end
        if (wr_bank == rd_bank) begin failures++; $display("write and read bank equal after start"); end
      end
    end
  end

  task automatic clear();
    n_mid = 0; n_y0 = 0; n_ym = 0; n_start = 0; addr_sum = 0;
    bank_of_writes = -1; bank_mixed = 1'b0; start_at = -1; last_at = -1;
  endtask

  task automatic expect_eq(input string what, input int got, input int want);
    checks++;
    if (got != want) begin failures++; $display("%s: got %0d want %0d", what, got, want); end
  endtask

  task automatic send(input int skip, input bit idle);
    for (int k = 0; k < M; k++) begin
      if (k == skip) continue;
      if (idle && k % 4 == 1) begin
        in_valid <= 1'b0;
        repeat (2) @(posedge clk);
      end
      in_valid <= 1'b1;
      in_dir   <= DW'(k);
      @(posedge clk);
    end
    in_valid <= 1'b0;
    repeat (6) @(posedge clk);
  endtask

  task automatic expect_block(input string name);
    expect_eq({name, " we_mid"}, n_mid, M - 1);
    expect_eq({name, " address sum"}, addr_sum, M * (M - 1) / 2);
    expect_eq({name, " we_y0"}, n_y0, 1);
    expect_eq({name, " we_ym"}, n_ym, 1);
    expect_eq({name, " start"}, n_start, 1);
    expect_eq({name, " start latency"}, start_at - last_at, 3);
    expect_eq({name, " one bank"}, int'(bank_mixed), 0);
  endtask

  initial begin
    int b1, b2;
    clear();
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);

    send(-1, 1'b0);
    expect_block("block 1");
    b1 = bank_of_writes;

    clear();
    send(-1, 1'b1);
    expect_block("block 2");
    b2 = bank_of_writes;
    expect_eq("banks alternate", int'(b1 != b2), 1);

    clear();
    send(7, 1'b0);
    expect_eq("block with gap: start", n_start, 0);
    expect_eq("block with gap: we_ym", n_ym, 0);

    clear();
    send(-1, 1'b0);
    expect_block("block 4");
    expect_eq("bank after dropped block", bank_of_writes, b1);

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
