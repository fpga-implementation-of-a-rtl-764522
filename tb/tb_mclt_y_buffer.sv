// tb_mclt_y_buffer: fills one bank of the Y buffer with random Y(0..M), then
// reads all 2M indices of it in a scrambled order while the other bank is
// being written, then reads the other bank. Every read must return, RD_LAT
// clocks after its index:
//   (Y(0),0), Y(k), (Y(M),0) or conj(Y(2M-k)) for k > M.
module tb_mclt_y_buffer;
  import mclt_pkg::*;

  localparam int M      = 16;
  localparam int RD_LAT = 3;
  localparam int AW     = $clog2(2 * M);
  localparam int DW     = $clog2(M);

  logic                  clk = 1'b0, rst_n = 1'b0;
  logic                  wr_bank = 1'b0, we_mid = 1'b0, we_y0 = 1'b0, we_ym = 1'b0;
  logic [DW-1:0]         wr_addr = '0;
  y_t                    wr_data = '0;
  logic signed [Y_W-1:0] wr_edge = '0;
  logic                  rd_bank = 1'b0;
  logic [AW-1:0]         Y_index = '0;
  logic signed [Y_W-1:0] Y_re, Y_im;

  int checks = 0, failures = 0, cycle = 0;
  int yr [2][M+1], yi [2][M+1];
  int pend_idx [$], pend_bank [$], pend_at [$];

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  mclt_y_buffer #(.M(M), .RD_LAT(RD_LAT)) dut (.*);

  function automatic int sx(input logic signed [Y_W-1:0] v);
    return int'(v);
  endfunction

  // Expected value of index i in bank b.
  task automatic expect_y(input int b, input int i, output int er, output int ei);
    if (i == 0)      begin er = yr[b][0]; ei = 0; end
    else if (i == M) begin er = yr[b][M]; ei = 0; end
    else if (i < M)  begin er = yr[b][i]; ei = yi[b][i]; end
    else             begin er = yr[b][2*M-i]; ei = -yi[b][2*M-i]; end
  endtask

  // Reads are queued with the clock they were sampled at and checked RD_LAT
  // clocks later.
  always @(posedge clk) begin
    if (rst_n) begin
      if (pend_at.size() > 0 && cycle - pend_at[0] == RD_LAT) begin
        int er, ei;
        expect_y(pend_bank[0], pend_idx[0], er, ei);
        checks += 2;
        if (sx(Y_re) != er || sx(Y_im) != ei) begin
          failures += (sx(Y_re) != er) + (sx(Y_im) != ei);
          $display("bank %0d Y[%0d] = %0d,%0d want %0d,%0d", pend_bank[0], pend_idx[0], Y_re, Y_im, er, ei);
        end
        void'(pend_idx.pop_front()); void'(pend_bank.pop_front()); void'(pend_at.pop_front());
      end
    end
  end

  task automatic fill_random(input int b);
    for (int k = 0; k <= M; k++) begin
      yr[b][k] = $signed($urandom) >>> 8;
      yi[b][k] = (k == 0 || k == M) ? 0 : $signed($urandom) >>> 8;
    end
  endtask

  // Writes bank b, one value per clock; optionally reads bank rb meanwhile.
  task automatic write_bank(input int b, input bit read_too, input int rb);
    int order [2*M];
    foreach (order[i]) order[i] = (i * 7 + 3) % (2 * M);   // scrambled, covers all
    for (int k = 0; k < 2 * M; k++) begin
      wr_bank <= b[0];
      we_mid  <= (k >= 1 && k < M);
      we_y0   <= (k == 0);
      we_ym   <= (k == M);
      wr_addr <= DW'(k);
      wr_data <= (k < M) ? '{re: Y_W'(yr[b][k]), im: Y_W'(yi[b][k])} : '0;
      wr_edge <= (k == 0) ? Y_W'(yr[b][0]) : Y_W'(yr[b][M]);
      if (k > M) begin we_mid <= 1'b0; we_y0 <= 1'b0; we_ym <= 1'b0; end
      if (read_too) begin
        rd_bank <= rb[0];
        Y_index <= AW'(order[k]);
        pend_idx.push_back(order[k]); pend_bank.push_back(rb); pend_at.push_back(cycle + 1);
      end
      @(posedge clk);
    end
    we_mid <= 1'b0; we_y0 <= 1'b0; we_ym <= 1'b0;
  endtask

  task automatic read_bank(input int b);
    for (int i = 0; i < 2 * M; i++) begin
      rd_bank <= b[0];
      Y_index <= AW'(i);
      pend_idx.push_back(i); pend_bank.push_back(b); pend_at.push_back(cycle + 1);
      @(posedge clk);
    end
  endtask

  initial begin
    fill_random(0);
    fill_random(1);
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    write_bank(0, 1'b0, 0);
    write_bank(1, 1'b1, 0);        // write bank 1 while bank 0 is read
    read_bank(1);
    fill_random(0);
    write_bank(0, 1'b1, 1);
    read_bank(0);
    repeat (RD_LAT + 3) @(posedge clk);
    checks++;
    if (pend_at.size() != 0) begin failures++; $display("%0d reads never checked", pend_at.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30 * M) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
