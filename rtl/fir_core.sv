// fir_core: one high-throughput, low-power FIR filtering core with M
// parallel datapaths.
//
// y(n) = sum_{k=0}^{N-1} h_k * x(n-k).  The core is built from a coefficient
// memory (hrom), a circular sample buffer (xram), coefficient and sample
// registers (HREG, XREG) in front of the datapaths, the datapath group of the
// chosen algorithm, an output register (OREG) and a controller (fir_ctrl).
// The taps are split over M datapaths, so an output needs L = ceil(N/M)
// cycles; for N = 73 that is 73, 37, 19 and 10 cycles for M = 1, 2, 4, 8.
//
// ALG selects the low-power scheme:
//   ALG_CSEG  coefficient segmentation: multiplier gets m_k, shifter s_k (B = 1)
//   ALG_BP    block processing: each coefficient serves two outputs (B = 2)
//   ALG_COMB  both together (B = 2)
//
// Interface: x_in/x_valid/x_ready is a valid/ready sample input (a sample is
// taken when both are high at a rising edge); y_out/y_valid gives one
// ACC_W-bit full-precision output per y_valid pulse, in input order.  On an
// idle core, y_valid comes L + 4 cycles after the sample is taken (B = 1).
// With B = 2 processing starts once both samples of a pair have arrived, and
// the pair of outputs comes on consecutive cycles, 2L + 4 or 2L + 5 cycles
// after the second sample.  A back-to-back stream gives one output per L
// cycles on average.  rst_n is
// an asynchronous active-low reset that also clears the sample history.
// The memory/register/datapath/controller split follows the generic core
// organisation; handshake, widths and reset are this design's choice.
module fir_core
  import fir_pkg::*;
#(
  parameter alg_e ALG = ALG_COMB,
  parameter int   N   = 73,
  parameter int   M   = 2,
  parameter logic signed [HW-1:0] COEFF [N] = BP73
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [XW-1:0]    x_in,
  input  logic                    x_valid,
  output logic                    x_ready,
  output logic signed [ACC_W-1:0] y_out,
  output logic                    y_valid
);
  localparam int B     = (ALG == ALG_CSEG) ? 1 : 2;
  localparam bit SEG   = (ALG != ALG_BP);
  localparam int DEPTH = N + 2 * B - 1;
  localparam int L     = (N + M - 1) / M;
  localparam int LW    = (L > 1) ? $clog2(L) : 1;
  localparam int AW    = $clog2(DEPTH);

  logic          xw_en;
  logic [AW-1:0] xw_addr;
  logic [AW-1:0] xr_addr [M];
  logic [LW-1:0] rom_addr;
  logic          f_vld, e_vld, e_clr, e_sel, o_ld, busy;

  logic signed [XW-1:0]    xram_q [M];
  logic signed [HW-1:0]    rom_h  [M];
  seg_t                    rom_s  [M];
  logic signed [XW-1:0]    xreg   [M];   // XREG
  logic signed [HW-1:0]    hreg   [M];   // HREG, plain coefficients
  seg_t                    sreg   [M];   // HREG, segmented coefficients
  logic signed [ACC_W-1:0] dp_y;

  fir_ctrl #(.N(N), .M(M), .B(B), .DEPTH(DEPTH)) u_ctrl (
    .clk, .rst_n, .x_valid, .x_ready,
    .xw_en, .xw_addr, .xr_addr, .rom_addr,
    .f_vld, .e_vld, .e_clr, .e_sel, .o_ld, .busy
  );

  xram #(.DEPTH(DEPTH), .M(M), .W(XW)) u_xram (
    .clk, .rst_n,
    .we(xw_en), .waddr(xw_addr), .wdata(x_in),
    .raddr(xr_addr), .rdata(xram_q)
  );

  hrom #(.N(N), .M(M), .SEG(SEG), .COEFF(COEFF)) u_hrom (
    .addr(rom_addr), .h(rom_h), .seg(rom_s)
  );

  // HREG / XREG: load only on fetch cycles, so idle cycles do not toggle the
  // datapath inputs.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < M; j++) begin
        xreg[j] <= '0;
        hreg[j] <= '0;
        sreg[j] <= '0;
      end
    end else if (f_vld) begin
      for (int j = 0; j < M; j++) begin
        xreg[j] <= xram_q[j];
        if (SEG) sreg[j] <= rom_s[j];
        else     hreg[j] <= rom_h[j];
      end
    end
  end

  if (ALG == ALG_CSEG) begin : g_cseg
    dp_cseg #(.M(M)) u_dp (
      .clk, .rst_n, .en(e_vld), .clr(e_clr), .x(xreg), .seg(sreg), .y(dp_y)
    );
  end else if (ALG == ALG_BP) begin : g_bp
    dp_bp #(.M(M)) u_dp (
      .clk, .rst_n, .en(e_vld), .clr(e_clr), .sel(e_sel), .x(xreg), .h(hreg), .y(dp_y)
    );
  end else begin : g_comb
    dp_comb #(.M(M)) u_dp (
      .clk, .rst_n, .en(e_vld), .clr(e_clr), .sel(e_sel), .x(xreg), .seg(sreg), .y(dp_y)
    );
  end

  // OREG
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y_out   <= '0;
      y_valid <= 1'b0;
    end else begin
      y_valid <= o_ld;
      if (o_ld) y_out <= dp_y;
    end
  end
endmodule
