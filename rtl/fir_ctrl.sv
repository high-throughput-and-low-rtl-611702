// fir_ctrl: controller of one multiple-datapath FIR core.
//
// The N taps are split over M datapaths, L = ceil(N/M) taps each, so one
// output takes L coefficient steps.  With block size B = 2 every coefficient
// is held for two cycles and used for two consecutive outputs y(n) and
// y(n+1), alternating between them each cycle; with B = 1 each step produces
// one term per datapath for a single output.
//
// Input side: x_valid/x_ready handshake.  Accepted samples are written to the
// circular sample buffer at the write pointer.  A block starts when B new
// samples have arrived and the previous block is in its last fetch cycle (or
// the controller is idle); up to B further samples are taken from the start
// cycle on while a block runs, so a steady input stream gives one output every L cycles.  The buffer
// therefore needs DEPTH >= N + 2B - 1 slots.
//
// Pipeline and timing: fetch cycle t reads the coefficient bank (rom_addr) and
// the M sample slots (xr_addr) into HREG/XREG (load enable f_vld); cycle t+1
// is the datapath cycle (e_vld, e_clr = first step of an output, e_sel =
// which of the two accumulators for B = 2); o_ld tells the core to load the
// output register, 2 cycles after the last fetch of an output for B = 1 and 3
// cycles after it for B = 2.  For B = 2 the accumulator select toggles every
// cycle, whether a block runs or not, and the output register takes each
// finished accumulator when the select next points at it.  The step order,
// the tap grouping and the block size follow the multiple-datapath cores;
// the handshake, the pointer scheme and the buffer depth are this design's
// own.
module fir_ctrl
  import fir_pkg::*;
#(
  parameter int N     = 73,
  parameter int M     = 2,
  parameter int B     = 1,
  parameter int DEPTH = N + 2 * B - 1,
  localparam int L    = (N + M - 1) / M,
  localparam int LW   = (L > 1) ? $clog2(L) : 1,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  // sample input handshake
  input  logic          x_valid,
  output logic          x_ready,
  // sample buffer
  output logic          xw_en,
  output logic [AW-1:0] xw_addr,
  output logic [AW-1:0] xr_addr [M],
  // coefficient memory
  output logic [LW-1:0] rom_addr,
  // fetch stage: HREG/XREG load enable
  output logic          f_vld,
  // datapath stage
  output logic          e_vld,
  output logic          e_clr,
  output logic          e_sel,
  // output register load
  output logic          o_ld,
  output logic          busy
);
  localparam int PCW = $clog2(B + 1);

  if (!(B == 1 || B == 2)) begin : g_bad_b
    $error("fir_ctrl: block size must be 1 or 2");
  end
  if (DEPTH < N + 2 * B - 1) begin : g_bad_depth
    $error("fir_ctrl: sample buffer too small");
  end

  function automatic logic [AW-1:0] inc(input logic [AW-1:0] a);
    return (int'(a) == DEPTH - 1) ? '0 : a + 1'b1;
  endfunction

  function automatic logic [AW-1:0] dec(input logic [AW-1:0] a);
    return (a == '0) ? AW'(DEPTH - 1) : a - 1'b1;
  endfunction

  logic [LW-1:0]  c;          // coefficient step
  logic           ph;         // block phase: which output of the block
  logic [PCW-1:0] pend;       // samples accepted for the next block
  logic [AW-1:0]  wp;         // next free buffer slot
  logic [AW-1:0]  rp [M];     // per-datapath slot of tap j*L+c for output 0 of the block
  logic           f_b;
  logic           f_last;     // last coefficient step of an output
  logic           last_fetch; // last fetch cycle of the block
  logic           start;
  logic           acc_x;
  logic           e_last;
  logic           o_pre;

  assign x_ready    = (int'(pend) < B) || start;
  assign acc_x      = x_valid && x_ready;
  assign xw_en      = acc_x;
  assign xw_addr    = wp;
  assign rom_addr   = c;
  assign f_vld      = busy;
  assign f_b        = (B == 2) ? ph : 1'b0;
  assign f_last     = busy && (int'(c) == L - 1);
  assign last_fetch = f_last && (int'(f_b) == B - 1);
  assign start      = (int'(pend) == B) && (!busy || last_fetch) && (B == 1 || ph);

  // Read slots: output 1 of a block uses the sample one slot newer.
  always_comb begin
    for (int j = 0; j < M; j++) xr_addr[j] = f_b ? inc(rp[j]) : rp[j];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      c    <= '0;
      ph   <= 1'b0;
      pend <= '0;
      wp   <= '0;
      for (int j = 0; j < M; j++) rp[j] <= '0;
    end else begin
      // never more than B samples wait for a block
      assert (int'(pend) <= B) else $error("fir_ctrl: pending sample count overflow");
      if (B == 2) ph <= ~ph;
      if (acc_x) wp <= inc(wp);
      if (start) pend <= PCW'(acc_x);
      else if (acc_x) pend <= pend + 1'b1;
      if (start) begin
        busy <= 1'b1;
        c    <= '0;
        // newest sample is at wp-1; output 0 of the block is B-1 samples older
        for (int j = 0; j < M; j++)
          rp[j] <= AW'(wrap_sub(int'(wp), (B + j * L) % DEPTH, DEPTH));
      end else if (busy && (int'(f_b) == B - 1)) begin
        if (int'(c) == L - 1) busy <= 1'b0;
        else c <= c + 1'b1;
        for (int j = 0; j < M; j++) rp[j] <= dec(rp[j]);
      end
    end
  end

  // Datapath-stage and output-stage control.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      e_vld  <= 1'b0;
      e_clr  <= 1'b0;
      e_sel  <= 1'b0;
      e_last <= 1'b0;
      o_pre  <= 1'b0;
      o_ld   <= 1'b0;
    end else begin
      e_vld  <= busy;
      e_clr  <= busy && (c == '0);
      e_sel  <= f_b;
      e_last <= f_last;
      o_pre  <= e_vld && e_last;
      o_ld   <= (B == 2) ? o_pre : (e_vld && e_last);
    end
  end
endmodule
