// tb_dp_cseg: checks the combined datapath group.  Coefficients are given in
// segmented form (m, s); two accumulator models, one per select value, add
// sum_j h_j * x_j on each enabled cycle (from zero when clr is high), with
// h_j = m_j + s_j.  y must show the model of the selected accumulator.  The
// select mostly toggles, as in operation, but is sometimes held.
module tb_dp_cseg;
  import fir_pkg::*;
  localparam int M = 3;

  logic               clk = 0, rst_n = 0, en = 0, clr = 0, sel = 0;
  logic signed [15:0] x  [M];
  seg_t               sg [M];
  logic signed [39:0] y;
  longint             hv [M];
  longint             macc [2];
  int checks = 0, failures = 0, n_clr = 0;

  dp_cseg #(.M(M)) dut (.clk, .rst_n, .en, .clr, .x, .seg(sg), .y);

  always #5 clk = ~clk;

  // New random coefficient for datapath j, in segmented form: the smallest
  // m >= 0 with h = m +/- 2^k, found by trying every k.
  task automatic new_coeff(input int j);
    int h_, m, sc;
    h_ = ($urandom % 8 == 0) ? 0 : int'(16'($urandom));
    if (h_ > 32767) h_ -= 65536;
    hv[j] = h_;
    m = 1 << 30; sc = 0;
    for (int k = 0; k < 16; k++) begin
      if (h_ - (1 << k) >= 0 && h_ - (1 << k) < m) begin m = h_ - (1 << k); sc = k; end
      if (h_ + (1 << k) >= 0 && h_ + (1 << k) < m) begin m = h_ + (1 << k); sc = 16 + k; end
    end
    sg[j].m = 16'(m);
    sg[j].s = 5'(sc);
  endtask

  function automatic longint wrap40(input longint v);
    return longint'(signed'(v[39:0]));
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint sum;
    int     s_;
    macc[0] = 0; macc[1] = 0;
    for (int j = 0; j < M; j++) begin x[j] = '0; new_coeff(j); end
    #12 rst_n = 1;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      en  = ($urandom % 8) != 0;
      clr = ($urandom % 10) == 0;
      for (int j = 0; j < M; j++) begin
        x[j] = 16'($urandom);
        if ($urandom % 2) new_coeff(j);
      end
      #1;
      s_ = int'(sel);
      checks++;
      if (longint'(y) != wrap40(macc[s_])) begin
        failures++;
        if (failures < 10) $display("FAIL cycle %0d: y=%0d exp %0d", i, y, wrap40(macc[s_]));
      end
      sum = clr ? 0 : macc[s_];
      for (int j = 0; j < M; j++) sum += hv[j] * longint'(x[j]);
      @(posedge clk);
      if (en) begin
        macc[s_] = wrap40(sum);
        if (clr) n_clr++;
      end
    end
    @(negedge clk);
    en = 0;
    #1;
    checks++;
    if (longint'(y) != wrap40(macc[int'(sel)])) failures++;
    if (n_clr == 0) begin
      failures++;
      $display("FAIL: clear never exercised");
    end
    $display("clears=%0d", n_clr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
