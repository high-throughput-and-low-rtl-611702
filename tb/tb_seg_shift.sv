// tb_seg_shift: checks the segmentation shifter branch: for every 5-bit shift
// code and many samples, y must equal x * (+/-) 2^k.
module tb_seg_shift;
  logic signed [15:0] x;
  logic [4:0]         s;
  logic signed [31:0] y;
  int checks = 0, failures = 0;

  seg_shift dut (.x, .s, .y);

  task automatic check(input logic signed [15:0] tx, input logic [4:0] ts);
    longint exp;
    x = tx; s = ts;
    #1;
    exp = longint'(tx) * (longint'(1) << ts[3:0]);
    if (ts[4]) exp = -exp;
    checks++;
    if (longint'(y) != exp) begin
      failures++;
      if (failures < 10) $display("FAIL x=%0d s=%b exp=%0d got=%0d", tx, ts, exp, y);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 32; c++) begin
      check(16'sh8000, 5'(c));
      check(16'sh7fff, 5'(c));
      check(-16'sd1, 5'(c));
      repeat (200) check(16'($urandom), 5'(c));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
