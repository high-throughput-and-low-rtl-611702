// fir_ip_top: the three low-power multiple-datapath FIR cores side by side.
//
// One instance of fir_core per low-power scheme: coefficient segmentation
// (CSEG), block processing (BP) and the two combined (COMB).  All three use
// the same N-tap coefficient set and M datapaths, so for the same input
// stream they give the same outputs and can be compared directly.  Each core
// has its own sample input and output ports, indexed 0 = CSEG, 1 = BP,
// 2 = COMB; the timing of each is that of fir_core.  Clock and reset are
// shared.  The defaults, 73 taps and 2 datapaths, are the tap count of the
// evaluated band-pass filter and the datapath count of the architecture
// drawings; M = 1, 4 and 8 are the other evaluated sizes.
module fir_ip_top
  import fir_pkg::*;
#(
  parameter int N = 73,
  parameter int M = 2
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [XW-1:0]    x_in    [3],
  input  logic [2:0]              x_valid,
  output logic [2:0]              x_ready,
  output logic signed [ACC_W-1:0] y_out   [3],
  output logic [2:0]              y_valid
);
  localparam alg_e ALGS [3] = '{ALG_CSEG, ALG_BP, ALG_COMB};

  for (genvar i = 0; i < 3; i++) begin : g_core
    fir_core #(.ALG(ALGS[i]), .N(N), .M(M)) u_core (
      .clk,
      .rst_n,
      .x_in   (x_in[i]),
      .x_valid(x_valid[i]),
      .x_ready(x_ready[i]),
      .y_out  (y_out[i]),
      .y_valid(y_valid[i])
    );
  end
endmodule
