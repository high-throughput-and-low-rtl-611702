// tb_fir_workloads: the evaluated configurations.  A 73-tap band-pass filter
// runs on 1, 2, 4 and 8 datapaths for each of the three algorithms (12 cores).
// Each core filters 1000 random samples, and every output is checked against
// a direct convolution.  On a back-to-back input stream each core must give
// one output every 73, 37, 19 and 10 cycles respectively.  At a 10 MHz clock
// that is 137, 270, 526 and 1000 thousand outputs per second.
module tb_fir_workloads;
  import fir_pkg::*;
  localparam int NI = 12;
  localparam int MS [4] = '{1, 2, 4, 8};

  logic clk = 0, rst_n = 0;
  int   c [NI], f [NI], s [NI], r [NI];
  logic d [NI];

  always #5 clk = ~clk;

  for (genvar mi = 0; mi < 4; mi++) begin : g_m
    core_check #(.ALG(ALG_CSEG), .N(73), .M(MS[mi]), .NIN(1000)) u_cseg (
      .clk, .rst_n, .checks(c[3*mi]), .failures(f[3*mi]), .stalls(s[3*mi]), .rate_checks(r[3*mi]), .done(d[3*mi]));
    core_check #(.ALG(ALG_BP), .N(73), .M(MS[mi]), .NIN(1000)) u_bp (
      .clk, .rst_n, .checks(c[3*mi+1]), .failures(f[3*mi+1]), .stalls(s[3*mi+1]), .rate_checks(r[3*mi+1]), .done(d[3*mi+1]));
    core_check #(.ALG(ALG_COMB), .N(73), .M(MS[mi]), .NIN(1000)) u_comb (
      .clk, .rst_n, .checks(c[3*mi+2]), .failures(f[3*mi+2]), .stalls(s[3*mi+2]), .rate_checks(r[3*mi+2]), .done(d[3*mi+2]));
  end

  task automatic report(input bit timeout);
    int checks = 0, failures = 0;
    string names [3] = '{"CSEG", "BP", "COMB"};
    for (int i = 0; i < NI; i++) begin
      checks += c[i]; failures += f[i];
      if (r[i] == 0) begin
        failures++;
        $display("instance %0d: output rate never checked", i);
      end
      $display("M=%0d %-4s: checks=%0d rate checks=%0d failures=%0d", MS[i / 3], names[i % 3], c[i], r[i], f[i]);
    end
    if (timeout) begin
      failures++;
      $display("watchdog expired");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    repeat (300000) @(posedge clk);
    report(1'b1);
  end

  initial begin
    #22 rst_n = 1;
    for (int i = 0; i < NI; i++) wait (d[i]);
    @(posedge clk);
    report(1'b0);
  end
endmodule
