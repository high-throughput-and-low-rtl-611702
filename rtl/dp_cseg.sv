// dp_cseg: datapath group of the coefficient-segmentation (CSEG) core.
//
// Each of the M datapaths gets a data sample x[j] and a segmented coefficient
// seg[j] = (m, s) with h = m + s.  The Booth multiplier forms m*x (ain1_j)
// and the xconv/mux/shift branch forms s*x (ain2_j).  One adder sums the 2M
// terms with the fed-back accumulator (ain3), so the tree has 2M+1 inputs;
// the clear logic (clacc) replaces the feedback by zero on the first step of
// an output.  Timing: when en is high the sum is stored in acc at the rising
// edge; y shows acc.  The structure follows the two-datapath segmentation
// architecture; the single edge-triggered clock and the 40-bit accumulator
// are this design's choice.
module dp_cseg
  import fir_pkg::*;
#(
  parameter int M = 2
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   en,    // accumulate this cycle
  input  logic                   clr,   // first step of an output: drop the feedback
  input  logic signed [XW-1:0]   x   [M],
  input  seg_t                   seg [M],
  output logic signed [ACC_W-1:0] y
);
  logic signed [PW-1:0]    ain1 [M];   // multiplier outputs
  logic signed [PW-1:0]    ain2 [M];   // shifter outputs
  logic signed [ACC_W-1:0] ain3;       // accumulator feedback after clacc
  logic signed [ACC_W-1:0] sum;
  logic signed [ACC_W-1:0] acc;

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

  assign ain3 = clr ? '0 : acc;

  always_comb begin
    sum = ain3;
    for (int j = 0; j < M; j++) sum = sum + ACC_W'(ain1[j]) + ACC_W'(ain2[j]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  acc <= '0;
    else if (en) acc <= sum;
  end

  assign y = acc;
endmodule
