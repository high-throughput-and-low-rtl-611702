// dp_bp: datapath group of the block-processing (BP) core, block size 2.
//
// Each of the M datapaths multiplies its coefficient h[j] by the sample x[j]
// in a Booth multiplier (ain1, ain2, ...).  The coefficient is held for two
// cycles while the sample alternates between the two outputs of the block,
// which keeps one multiplier input still.  Two accumulators hold the two
// outputs: acc0 for y(n) and acc1 for y(n+1).  A mux picks acc[sel]; its
// output is both the group's output y and, through the clear logic (clacc),
// the feedback input of the adder (M+1 inputs).  Timing: when en is high the
// sum is stored in acc[sel] at the rising edge.  The caller toggles sel every
// cycle.  The adder, the two accumulators, the shared mux and clacc follow the
// two-datapath block-processing architecture.  There, the two accumulators
// take opposite phases of the clock; here they share one edge and take turns
// through enables.
module dp_bp
  import fir_pkg::*;
#(
  parameter int M = 2
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,    // accumulate this cycle
  input  logic                    clr,   // first step of an output: drop the feedback
  input  logic                    sel,   // 0: acc0 / y(n), 1: acc1 / y(n+1)
  input  logic signed [XW-1:0]    x [M],
  input  logic signed [HW-1:0]    h [M],
  output logic signed [ACC_W-1:0] y
);
  logic signed [PW-1:0]    ain [M];
  logic signed [ACC_W-1:0] fb;
  logic signed [ACC_W-1:0] sum;
  logic signed [ACC_W-1:0] acc0, acc1;

  for (genvar j = 0; j < M; j++) begin : g_dp
    booth_mult #(.W(XW)) u_mult (
      .a(x[j]),
      .b(h[j]),
      .p(ain[j])
    );
  end

  assign y  = sel ? acc1 : acc0;
  assign fb = clr ? '0 : y;

  always_comb begin
    sum = fb;
    for (int j = 0; j < M; j++) sum = sum + ACC_W'(ain[j]);
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
