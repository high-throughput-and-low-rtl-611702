// tb_fir_ctrl: runs the controller checker for several tap counts, datapath
// counts and block sizes, including a case where whole datapaths hold only
// padding taps (N = 5, M = 4), and requires input stalls to have occurred.
module tb_fir_ctrl;
  logic clk = 0, rst_n = 0;
  int   c [5], f [5], s [5];
  logic d [5];
  int   checks, failures, stalls;

  always #5 clk = ~clk;

  ctrl_check #(.N(7),  .M(2), .B(1)) u0 (.clk, .rst_n, .checks(c[0]), .failures(f[0]), .stalls(s[0]), .done(d[0]));
  ctrl_check #(.N(7),  .M(2), .B(2)) u1 (.clk, .rst_n, .checks(c[1]), .failures(f[1]), .stalls(s[1]), .done(d[1]));
  ctrl_check #(.N(5),  .M(4), .B(2)) u2 (.clk, .rst_n, .checks(c[2]), .failures(f[2]), .stalls(s[2]), .done(d[2]));
  ctrl_check #(.N(73), .M(8), .B(1)) u3 (.clk, .rst_n, .checks(c[3]), .failures(f[3]), .stalls(s[3]), .done(d[3]));
  ctrl_check #(.N(73), .M(2), .B(2)) u4 (.clk, .rst_n, .checks(c[4]), .failures(f[4]), .stalls(s[4]), .done(d[4]));

  task automatic report(input bit timeout);
    checks = 0; failures = 0; stalls = 0;
    for (int i = 0; i < 5; i++) begin
      checks += c[i]; failures += f[i]; stalls += s[i];
      if (s[i] == 0) begin
        failures++;
        $display("instance %0d never stalled its input", i);
      end
    end
    if (timeout) begin
      failures++;
      $display("watchdog expired");
    end
    $display("input stalls=%0d", stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    report(1'b1);
  end

  initial begin
    #22 rst_n = 1;
    wait (d[0] && d[1] && d[2] && d[3] && d[4]);
    @(posedge clk);
    report(1'b0);
  end
endmodule
