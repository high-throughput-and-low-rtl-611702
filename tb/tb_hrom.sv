// tb_hrom: checks the coefficient banks.  Plain banks must return tap
// j*L + addr of the filter (zero for padding taps).  Segmented banks must
// return (m, s) with m + s = h, m >= 0, s = +/-2^k, and m the smallest such
// value, found here by trying every power of two.
module tb_hrom;
  import fir_pkg::*;
  localparam int N = 73;

  int checks = 0, failures = 0;

  // Smallest non-negative m = h - s over s in {+/-2^k}; returns the s code.
  function automatic void best_seg(input int h, output int m, output int scode);
    m = 1 << 30; scode = 0;
    for (int k = 0; k < 16; k++) begin
      if (h - (1 << k) >= 0 && h - (1 << k) < m) begin m = h - (1 << k); scode = k; end
      if (h + (1 << k) >= 0 && h + (1 << k) < m) begin m = h + (1 << k); scode = 16 + k; end
    end
  endfunction

  task automatic check_bank(input int M, input int j, input int c, input int hv,
                            input seg_t sq);
    int t, exp, em, es;
    t   = j * ((N + M - 1) / M) + c;
    exp = (t < N) ? int'(BP73[t]) : 0;
    checks++;
    if (hv != exp) begin
      failures++;
      if (failures < 10) $display("FAIL M=%0d bank %0d addr %0d h exp %0d got %0d", M, j, c, exp, hv);
    end
    best_seg(exp, em, es);
    checks++;
    if (int'(sq.m) != em || int'(sq.s) != es) begin
      failures++;
      if (failures < 10) $display("FAIL M=%0d bank %0d addr %0d h=%0d seg exp m=%0d s=%b got m=%0d s=%b",
                                  M, j, c, exp, em, 5'(es), sq.m, sq.s);
    end
  endtask

  // M = 2 and M = 8, each as a plain and a segmented bank
  logic [5:0] a2;
  logic [3:0] a8;
  logic signed [15:0] h2p [2], h2s [2], h8p [8], h8s [8];
  seg_t               s2p [2], s2s [2], s8p [8], s8s [8];

  hrom #(.N(N), .M(2), .SEG(1'b0)) u_p2 (.addr(a2), .h(h2p), .seg(s2p));
  hrom #(.N(N), .M(2), .SEG(1'b1)) u_s2 (.addr(a2), .h(h2s), .seg(s2s));
  hrom #(.N(N), .M(8), .SEG(1'b0)) u_p8 (.addr(a8), .h(h8p), .seg(s8p));
  hrom #(.N(N), .M(8), .SEG(1'b1)) u_s8 (.addr(a8), .h(h8s), .seg(s8s));

  // Hand-worked segmentations, including the 8-bit example 11110001 (-15)
  // -> m = 00000001, s = 10100 (-2^4), which reads the same at 16 bits.
  localparam logic signed [15:0] CX [4] = '{-16'sd15, 16'sd0, 16'sd5, -16'sd32768};
  localparam logic [15:0] EXP_M [4] = '{16'd1, 16'd1, 16'd1, 16'd0};
  localparam logic [4:0]  EXP_S [4] = '{5'b1_0100, 5'b1_0000, 5'b0_0010, 5'b1_1111};
  logic [1:0] ax;
  logic signed [15:0] hx [1];
  seg_t               sx [1];
  hrom #(.N(4), .M(1), .SEG(1'b1), .COEFF(CX)) u_ex (.addr(ax), .h(hx), .seg(sx));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 37; c++) begin
      a2 = 6'(c);
      #1;
      for (int j = 0; j < 2; j++) begin
        check_bank(2, j, c, int'(h2p[j]), s2s[j]);
      end
    end
    for (int c = 0; c < 10; c++) begin
      a8 = 4'(c);
      #1;
      for (int j = 0; j < 8; j++) begin
        check_bank(8, j, c, int'(h8p[j]), s8s[j]);
      end
    end
    for (int c = 0; c < 4; c++) begin
      ax = 2'(c);
      #1;
      checks++;
      if (sx[0].m != EXP_M[c] || sx[0].s != EXP_S[c]) begin
        failures++;
        $display("FAIL h=%0d: m=%0d s=%b, expected m=%0d s=%b", CX[c], sx[0].m, sx[0].s, EXP_M[c], EXP_S[c]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
