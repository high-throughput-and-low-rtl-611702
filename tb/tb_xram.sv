// tb_xram: checks the sample buffer: all words read zero after reset, random
// writes land in the addressed slot only, every read port returns the stored
// word, and a read in the cycle of a write to the same slot returns the old
// word.
module tb_xram;
  localparam int DEPTH = 76;
  localparam int M     = 3;
  localparam int AW    = $clog2(DEPTH);

  logic                 clk = 0, rst_n = 0, we = 0;
  logic [AW-1:0]        waddr = '0;
  logic signed [15:0]   wdata = '0;
  logic [AW-1:0]        raddr [M];
  logic signed [15:0]   rdata [M];
  logic signed [15:0]   model [DEPTH];
  int checks = 0, failures = 0;

  xram #(.DEPTH(DEPTH), .M(M), .W(16)) dut (.clk, .rst_n, .we, .waddr, .wdata, .raddr, .rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_reads();
    for (int j = 0; j < M; j++) begin
      checks++;
      if (rdata[j] !== model[raddr[j]]) begin
        failures++;
        if (failures < 10) $display("FAIL port %0d addr %0d exp %0d got %0d", j, raddr[j], model[raddr[j]], rdata[j]);
      end
    end
  endtask

  initial begin
    for (int i = 0; i < DEPTH; i++) model[i] = '0;
    for (int j = 0; j < M; j++) raddr[j] = '0;
    #12 rst_n = 1;
    // after reset every slot reads zero
    for (int i = 0; i < DEPTH; i += M) begin
      for (int j = 0; j < M; j++) raddr[j] = AW'((i + j) % DEPTH);
      #1 check_reads();
    end
    repeat (3000) begin
      @(negedge clk);
      we    = ($urandom % 4) != 0;
      waddr = AW'($urandom % DEPTH);
      wdata = 16'($urandom);
      for (int j = 0; j < M; j++) raddr[j] = ($urandom % 3 == 0) ? waddr : AW'($urandom % DEPTH);
      #1 check_reads();            // old contents, even at the slot being written
      @(posedge clk);
      if (we) model[waddr] = wdata;
      #1 check_reads();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
