// hrom: coefficient memory of one FIR core, split into M banks.
//
// With N taps and M datapaths the taps are dealt out in M groups of
// L = ceil(N/M) consecutive taps; datapath j handles taps j*L .. j*L+L-1, and
// taps past N-1 are padding with a zero coefficient.  Bank j returns, for
// step addr, the coefficient of tap j*L + addr.  SEG = 0 gives plain h_k
// (block processing); SEG = 1 gives the segmented pair (m_k, s_k) of
// fir_pkg::segment (coefficient segmentation and the combined scheme), worked
// out when the design is elaborated.  Combinational read; the core registers
// the words in HREG.  The tap grouping per datapath follows the two-datapath
// example of the cores; the bank layout and the coefficient set are this
// design's own.
module hrom
  import fir_pkg::*;
#(
  parameter int N   = 73,
  parameter int M   = 2,
  parameter bit SEG = 1'b0,
  parameter logic signed [HW-1:0] COEFF [N] = BP73,
  localparam int L  = (N + M - 1) / M,
  localparam int LW = (L > 1) ? $clog2(L) : 1
) (
  input  logic [LW-1:0]        addr,
  output logic signed [HW-1:0] h   [M],
  output seg_t                 seg [M]
);
  // Coefficient of tap t, zero for the padding taps.
  function automatic logic signed [HW-1:0] tap(input int t);
    return (t < N) ? COEFF[t] : '0;
  endfunction

  for (genvar j = 0; j < M; j++) begin : g_bank
    logic signed [HW-1:0] hb [L];
    seg_t                 sb [L];
    for (genvar c = 0; c < L; c++) begin : g_word
      localparam logic signed [HW-1:0] HV = tap(j * L + c);
      localparam seg_t                 SV = segment(HV);
      assign hb[c] = HV;
      assign sb[c] = SV;
    end
    always_comb begin
      h[j]   = '0;
      seg[j] = '0;
      if (int'(addr) < L) begin
        if (SEG) seg[j] = sb[addr];
        else     h[j]   = hb[addr];
      end
    end
  end
endmodule
