// dp_comb: datapath group of the combined segmentation and block-processing
// (COMB) core.
//
// Each of the M datapaths takes a segmented coefficient seg[j] = (m, s), held
// for two cycles, and a sample x[j] that alternates between the two outputs
// of the block.  The Booth multiplier forms m*x and the xconv/mux/shift branch
// forms s*x.  The 2M terms and the feedback (2M+1 inputs) are added into one
// of two accumulators: acc0 holds y(n), acc1 holds y(n+1).  The mux picks
// acc[sel] for both the output y and the feedback.  The clear logic (clacc)
// zeroes the feedback on the first step of an output.  Timing: when en is
// high the sum is stored in acc[sel] at the rising edge; sel toggles every
// cycle.  The structure follows the two-datapath combined architecture.  The
// two accumulators share one clock edge and take turns through enables,
// instead of taking opposite clock phases.
module dp_comb
  import fir_pkg::*;
#(
  parameter int M = 2
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,
  input  logic                    clr,
  input  logic                    sel,
  input  logic signed [XW-1:0]    x   [M],
  input  seg_t                    seg [M],
  output logic signed [ACC_W-1:0] y
);
  logic signed [PW-1:0]    ain1 [M];
  logic signed [PW-1:0]    ain2 [M];
  logic signed [ACC_W-1:0] fb;
  logic signed [ACC_W-1:0] sum;
  logic signed [ACC_W-1:0] acc0, acc1;

  for (genvar j = 0; j < M; j++) begin : g_dp
    booth_mult #(.W(XW)) u_mult (
      .a(x[j]),
      .b(seg[j].m),
      .p(ain1[j])
    );
    seg_shift u_shift (
      .x(x[j]),
      .s(seg[j].s),
      .y(ain2[j])
    );
  end

  assign y  = sel ? acc1 : acc0;
  assign fb = clr ? '0 : y;

  always_comb begin
    sum = fb;
    for (int j = 0; j < M; j++) sum = sum + ACC_W'(ain1[j]) + ACC_W'(ain2[j]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc0 <= '0;
      acc1 <= '0;
    end else if (en) begin
      if (sel) acc1 <= sum;
      else     acc0 <= sum;
    end
  end
endmodule
