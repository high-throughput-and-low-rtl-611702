// xram: circular data-sample buffer with one write port and M read ports.
//
// DEPTH words of W bits.  The controller owns the circular pointers; this
// block stores a word at waddr when we is high (on the rising clock edge) and
// returns the word at each raddr[j] combinationally, so a read in the same
// cycle as a write to the same slot returns the old word.  Reset clears every
// word, which gives the filter an all-zero history.  The cores keep the
// samples in a latch-based circular buffer; this version uses edge-triggered
// registers so that the design stays single-clock and free of latches.
module xram #(
  parameter int DEPTH = 76,
  parameter int M     = 2,
  parameter int W     = 16,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                we,
  input  logic [AW-1:0]       waddr,
  input  logic signed [W-1:0] wdata,
  input  logic [AW-1:0]       raddr [M],
  output logic signed [W-1:0] rdata [M]
);
  logic signed [W-1:0] mem [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
    end else if (we) begin
      assert (int'(waddr) < DEPTH) else $error("xram: write address out of range");
      mem[waddr] <= wdata;
    end
  end

  always_comb begin
    for (int j = 0; j < M; j++) rdata[j] = mem[raddr[j]];
  end
endmodule
