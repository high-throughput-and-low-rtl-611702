// tb_booth_mult: checks the 16x16 Booth multiplier against the language's
// own signed multiplication, on corner operands and 20000 random pairs.
module tb_booth_mult;
  logic signed [15:0] a, b;
  logic signed [31:0] p;
  int checks = 0, failures = 0;

  booth_mult #(.W(16)) dut (.a, .b, .p);

  task automatic check(input logic signed [15:0] ta, input logic signed [15:0] tb_);
    longint exp;
    a = ta; b = tb_;
    #1;
    exp = longint'(ta) * longint'(tb_);
    checks++;
    if (longint'(p) != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %0d * %0d = %0d, got %0d", ta, tb_, exp, p);
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
    logic signed [15:0] corner [8] = '{16'sh8000, 16'sh7fff, 16'sd0, 16'sd1, -16'sd1, 16'sd2, -16'sd2, 16'sh5555};
    foreach (corner[i]) foreach (corner[j]) check(corner[i], corner[j]);
    repeat (20000) check(16'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
