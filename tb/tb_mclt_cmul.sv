// tb_mclt_cmul: random vectors through the complex product in its two uses:
// 25-bit data times Q15 dropping 15 bits (direct MCLT) and 25-bit data times
// Q15 dropping 17 bits into 24 bits (inverse MCLT, includes the division by
// 4). The reference is exact 64-bit integer arithmetic, floor division by the
// power of two and truncation to the output width; results must be equal.
module tb_mclt_cmul;
  int checks = 0, failures = 0;

  logic signed [24:0] a_re, a_im;
  logic signed [15:0] c_re, c_im;
  logic signed [24:0] p1_re, p1_im;
  logic signed [23:0] p2_re, p2_im;

  mclt_cmul #(.A_W(25), .C_W(16), .P_W(25), .SHIFT(15)) dut1 (
    .a_re(a_re), .a_im(a_im), .c_re(c_re), .c_im(c_im), .p_re(p1_re), .p_im(p1_im));
  mclt_cmul #(.A_W(25), .C_W(16), .P_W(24), .SHIFT(17)) dut2 (
    .a_re(a_re), .a_im(a_im), .c_re(c_re), .c_im(c_im), .p_re(p2_re), .p_im(p2_im));

  function automatic longint floor_shift(input longint v, input int s);
    longint d;
    d = longint'(1) << s;
    if (v >= 0) return v / d;
    return -((-v + d - 1) / d);
  endfunction

  task automatic check(input string what, input longint got, input longint want, input int w);
    longint m;
    m = (longint'(1) << w) - 1;
    checks++;
    if ((got & m) != (want & m)) begin
      failures++;
      $display("%s: got %0d want %0d (a=%0d,%0d c=%0d,%0d)", what, got, want, a_re, a_im, c_re, c_im);
    end
  endtask

  initial begin
    for (int i = 0; i < 4000; i++) begin
      longint fr, fi;
      if (i < 4) begin
        // corners: largest magnitudes
        a_re = (i[0]) ? 25'sh0FFFFFF : 25'sh1000000;
        a_im = (i[1]) ? 25'sh0FFFFFF : 25'sh1000000;
        c_re = 16'sh8000;
        c_im = 16'sh7FFF;
      end else begin
        a_re = 25'($urandom);
        a_im = 25'($urandom);
        c_re = 16'($urandom);
        c_im = 16'($urandom);
      end
      #1;
      fr = longint'(a_re) * longint'(c_re) - longint'(a_im) * longint'(c_im);
      fi = longint'(a_re) * longint'(c_im) + longint'(a_im) * longint'(c_re);
      check("p1_re", longint'(p1_re), floor_shift(fr, 15), 25);
      check("p1_im", longint'(p1_im), floor_shift(fi, 15), 25);
      check("p2_re", longint'(p2_re), floor_shift(fr, 17), 24);
      check("p2_im", longint'(p2_im), floor_shift(fi, 17), 24);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
