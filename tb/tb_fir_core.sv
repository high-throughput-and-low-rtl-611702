// tb_fir_core: checks fir_core for all three algorithms with the 73-tap
// band-pass filter on 2 datapaths, plus a 5-tap filter with extreme
// coefficients on 4 datapaths (two of which hold only padding taps).  Each
// instance filters a random stream and must match a direct convolution and
// deliver one output per ceil(N/M) cycles on a back-to-back stream.
module tb_fir_core;
  import fir_pkg::*;
  localparam logic signed [15:0] C5 [5] = '{-16'sd32768, 16'sd32767, 16'sd0, -16'sd1, 16'sd1};
  localparam int NI = 6;

  logic clk = 0, rst_n = 0;
  int   c [NI], f [NI], s [NI], r [NI];
  logic d [NI];

  always #5 clk = ~clk;

  core_check #(.ALG(ALG_CSEG), .N(73), .M(2), .NIN(300)) u0 (.clk, .rst_n, .checks(c[0]), .failures(f[0]), .stalls(s[0]), .rate_checks(r[0]), .done(d[0]));
  core_check #(.ALG(ALG_BP),   .N(73), .M(2), .NIN(300)) u1 (.clk, .rst_n, .checks(c[1]), .failures(f[1]), .stalls(s[1]), .rate_checks(r[1]), .done(d[1]));
  core_check #(.ALG(ALG_COMB), .N(73), .M(2), .NIN(300)) u2 (.clk, .rst_n, .checks(c[2]), .failures(f[2]), .stalls(s[2]), .rate_checks(r[2]), .done(d[2]));
  core_check #(.ALG(ALG_CSEG), .N(5), .M(4), .COEFF(C5), .NIN(300)) u3 (.clk, .rst_n, .checks(c[3]), .failures(f[3]), .stalls(s[3]), .rate_checks(r[3]), .done(d[3]));
  core_check #(.ALG(ALG_BP),   .N(5), .M(4), .COEFF(C5), .NIN(300)) u4 (.clk, .rst_n, .checks(c[4]), .failures(f[4]), .stalls(s[4]), .rate_checks(r[4]), .done(d[4]));
  core_check #(.ALG(ALG_COMB), .N(5), .M(4), .COEFF(C5), .NIN(300)) u5 (.clk, .rst_n, .checks(c[5]), .failures(f[5]), .stalls(s[5]), .rate_checks(r[5]), .done(d[5]));

  task automatic report(input bit timeout);
    int checks = 0, failures = 0;
    for (int i = 0; i < NI; i++) begin
      checks += c[i]; failures += f[i];
      if (s[i] == 0 || r[i] == 0) begin
        failures++;
        $display("instance %0d: input stall or output-rate check never happened", i);
      end
      $display("instance %0d: checks=%0d stalls=%0d rate checks=%0d", i, c[i], s[i], r[i]);
    end
    if (timeout) begin
      failures++;
      $display("watchdog expired");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    report(1'b1);
  end

  initial begin
    #22 rst_n = 1;
    wait (d[0] && d[1] && d[2] && d[3] && d[4] && d[5]);
    @(posedge clk);
    report(1'b0);
  end
endmodule
