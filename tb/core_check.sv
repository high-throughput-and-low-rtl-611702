// core_check: drives one fir_core with NIN random samples and checks every
// output against a direct convolution y(n) = sum_k h_k x(n-k) (x = 0 before
// the first sample), computed here in 64-bit arithmetic.  The first half of
// the stream arrives with random gaps, the second half back to back.  In the
// back-to-back part the output spacing must give one output every
// L = ceil(N/M) cycles: every L cycles for block size 1, or pairs 1 and 2L-1
// cycles apart for block size 2.  Counts are returned through the ports once
// done is high.
module core_check
  import fir_pkg::*;
#(
  parameter alg_e ALG  = ALG_COMB,
  parameter int   N    = 73,
  parameter int   M    = 2,
  parameter logic signed [15:0] COEFF [N] = BP73,
  parameter int   NIN  = 200,
  parameter int   RAND_PCT = 30      // input valid probability in the first half
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output int   stalls,
  output int   rate_checks,
  output logic done
);
  localparam int B = (ALG == ALG_CSEG) ? 1 : 2;
  localparam int L = (N + M - 1) / M;

  logic signed [15:0] x_in = '0;
  logic               x_valid = 0, x_ready, y_valid;
  logic signed [39:0] y_out;

  fir_core #(.ALG(ALG), .N(N), .M(M), .COEFF(COEFF)) dut (
    .clk, .rst_n, .x_in, .x_valid, .x_ready, .y_out, .y_valid
  );

  longint xs [NIN];
  int     nin = 0, nout = 0, cyc = 0;
  int     last_y = -1, prev_gap = -1, nout_cont = -1;

  initial begin
    checks = 0; failures = 0; stalls = 0; rate_checks = 0; done = 0;
    for (int i = 0; i < NIN; i++) xs[i] = longint'(signed'(16'($urandom)));
    // a few extreme samples
    xs[3] = -32768; xs[4] = -32768; xs[7] = 32767;
  end

  function automatic longint ref_y(input int n);
    longint s = 0;
    for (int k = 0; k < N; k++) if (n - k >= 0) s += longint'(COEFF[k]) * xs[n - k];
    return s;
  endfunction

  task automatic err(input string msg);
    failures++;
    if (failures < 10) $display("core_check ALG=%0d N=%0d M=%0d cycle %0d: %s", ALG, N, M, cyc, msg);
  endtask

  always @(negedge clk) begin
    if (rst_n) begin
      if (nin < NIN) begin
        x_valid <= (nin >= NIN / 2) ? 1'b1 : (($urandom % 100) < RAND_PCT);
        x_in    <= 16'(xs[nin]);
      end else x_valid <= 1'b0;
    end
  end

  always @(posedge clk) begin
    if (rst_n && !done) begin
      cyc++;
      if (x_valid && !x_ready) stalls++;
      if (x_valid && x_ready) begin
        nin++;
        if (nin == NIN / 2 + 1) nout_cont = nout;
      end
      if (y_valid) begin
        checks++;
        if (longint'(y_out) != ref_y(nout))
          err($sformatf("y(%0d) = %0d, expected %0d", nout, y_out, ref_y(nout)));
        // output spacing while the input is back to back
        if (nout_cont >= 0 && nout > nout_cont + 4 && nout + 2 * B < NIN) begin
          int gap;
          gap = cyc - last_y;
          checks++;
          rate_checks++;
          if (B == 1 && gap != L) err($sformatf("output interval %0d, expected %0d", gap, L));
          if (B == 2 && !((gap == 1 && prev_gap == 2 * L - 1) || (gap == 2 * L - 1 && prev_gap == 1)))
            err($sformatf("output intervals %0d,%0d, expected 1 and %0d", prev_gap, gap, 2 * L - 1));
        end
        if (last_y >= 0) prev_gap = cyc - last_y;
        last_y = cyc;
        nout++;
        if (nout == NIN) done = 1;
      end
    end
  end
endmodule
