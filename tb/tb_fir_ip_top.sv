// tb_fir_ip_top: end-to-end test of the three cores at their default size
// (73-tap band-pass filter, 2 datapaths).  Each core filters the same 1000
// random samples through its own handshake.  The first half arrives with
// random gaps, the second half back to back.  Every output is compared with
// a direct convolution.  On the back-to-back part one output must come
// every 37 cycles (in pairs for the block-processing cores).  The test also
// counts how often each mechanism of the design was exercised and fails if
// one never was:
// input stalls, accumulator clears, writes to the second accumulator,
// negative and positive shift codes, zero coefficients, padding taps and
// blocks started back to back.
module tb_fir_ip_top;
  import fir_pkg::*;
  localparam int N   = 73;
  localparam int M   = 2;
  localparam int L   = (N + M - 1) / M;
  localparam int NIN = 1000;

  logic               clk = 0, rst_n = 0;
  logic signed [15:0] x_in [3];
  logic [2:0]         x_valid = '0, x_ready, y_valid;
  logic signed [39:0] y_out [3];

  fir_ip_top dut (.clk, .rst_n, .x_in, .x_valid, .x_ready, .y_out, .y_valid);

  always #5 clk = ~clk;

  longint xs [NIN];
  longint yref [NIN];
  int nin [3], nout [3], last_y [3], prev_gap [3], nout_cont [3];
  int checks = 0, failures = 0, rate_checks = 0, cyc = 0;
  // mechanism counters
  int n_stall = 0, n_clear = 0, n_acc1 = 0, n_negs = 0, n_poss = 0, n_zero = 0, n_pad = 0, n_b2b = 0;

  task automatic finish(input bit timeout);
    $display("outputs: CSEG=%0d BP=%0d COMB=%0d, rate checks=%0d", nout[0], nout[1], nout[2], rate_checks);
    $display("mechanisms: stalls=%0d clears=%0d acc1_writes=%0d neg_shift=%0d pos_shift=%0d zero_coeff=%0d pad_taps=%0d back_to_back=%0d",
             n_stall, n_clear, n_acc1, n_negs, n_poss, n_zero, n_pad, n_b2b);
    if (n_stall == 0 || n_clear == 0 || n_acc1 == 0 || n_negs == 0 || n_poss == 0 ||
        n_zero == 0 || n_pad == 0 || n_b2b == 0 || rate_checks == 0) begin
      failures++;
      $display("FAIL: a mechanism was never exercised");
    end
    if (timeout) begin
      failures++;
      $display("watchdog expired");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    repeat (120000) @(posedge clk);
    finish(1'b1);
  end

  initial begin
    for (int i = 0; i < NIN; i++) xs[i] = longint'(signed'(16'($urandom)));
    xs[10] = -32768; xs[11] = 32767;
    for (int n = 0; n < NIN; n++) begin
      yref[n] = 0;
      for (int k = 0; k < N; k++) if (n - k >= 0) yref[n] += longint'(BP73[k]) * xs[n - k];
    end
    for (int i = 0; i < 3; i++) begin
      nin[i] = 0; nout[i] = 0; last_y[i] = -1; prev_gap[i] = -1; nout_cont[i] = -1; x_in[i] = '0;
    end
    #22 rst_n = 1;
    wait (nout[0] == NIN && nout[1] == NIN && nout[2] == NIN);
    @(posedge clk);
    finish(1'b0);
  end

  // stimulus
  always @(negedge clk) begin
    if (rst_n) begin
      for (int i = 0; i < 3; i++) begin
        if (nin[i] < NIN) begin
          x_valid[i] <= (nin[i] >= NIN / 2) ? 1'b1 : (($urandom % 100) < 25);
          x_in[i]    <= 16'(xs[nin[i]]);
        end else x_valid[i] <= 1'b0;
      end
    end
  end

  // output checks
  always @(posedge clk) begin
    if (rst_n) begin
      cyc++;
      for (int i = 0; i < 3; i++) begin
        int b;
        b = (i == 0) ? 1 : 2;
        if (x_valid[i] && !x_ready[i]) n_stall++;
        if (x_valid[i] && x_ready[i]) begin
          nin[i]++;
          if (nin[i] == NIN / 2 + 1) nout_cont[i] = nout[i];
        end
        if (y_valid[i]) begin
          checks++;
          if (nout[i] >= NIN || longint'(y_out[i]) != yref[nout[i]]) begin
            failures++;
            if (failures < 10) $display("FAIL core %0d y(%0d) = %0d, expected %0d", i, nout[i], y_out[i], yref[nout[i]]);
          end
          if (nout_cont[i] >= 0 && nout[i] > nout_cont[i] + 4 && nout[i] + 4 < NIN) begin
            int gap;
            gap = cyc - last_y[i];
            checks++;
            rate_checks++;
            if ((b == 1 && gap != L) ||
                (b == 2 && !((gap == 1 && prev_gap[i] == 2 * L - 1) || (gap == 2 * L - 1 && prev_gap[i] == 1)))) begin
              failures++;
              if (failures < 10) $display("FAIL core %0d output spacing %0d after %0d", i, gap, prev_gap[i]);
            end
          end
          if (last_y[i] >= 0) prev_gap[i] = cyc - last_y[i];
          last_y[i] = cyc;
          nout[i]++;
        end
      end
    end
  end

  // mechanism counters, read from inside the cores
  always @(posedge clk) begin
    if (rst_n) begin
      if (dut.g_core[0].u_core.e_vld && dut.g_core[0].u_core.e_clr) n_clear++;
      if (dut.g_core[1].u_core.e_vld && dut.g_core[1].u_core.e_clr) n_clear++;
      if (dut.g_core[2].u_core.e_vld && dut.g_core[2].u_core.e_clr) n_clear++;
      if (dut.g_core[1].u_core.e_vld && dut.g_core[1].u_core.e_sel) n_acc1++;
      if (dut.g_core[2].u_core.e_vld && dut.g_core[2].u_core.e_sel) n_acc1++;
      if (dut.g_core[0].u_core.u_ctrl.start && dut.g_core[0].u_core.u_ctrl.busy) n_b2b++;
      if (dut.g_core[1].u_core.u_ctrl.start && dut.g_core[1].u_core.u_ctrl.busy) n_b2b++;
      if (dut.g_core[2].u_core.u_ctrl.start && dut.g_core[2].u_core.u_ctrl.busy) n_b2b++;
      for (int j = 0; j < M; j++) begin
        if (dut.g_core[0].u_core.e_vld) begin
          if (dut.g_core[0].u_core.sreg[j].s[4]) n_negs++; else n_poss++;
          if (dut.g_core[0].u_core.sreg[j] == seg_t'({16'd1, 5'b1_0000})) n_zero++;
        end
        if (dut.g_core[2].u_core.e_vld) begin
          if (dut.g_core[2].u_core.sreg[j].s[4]) n_negs++; else n_poss++;
        end
      end
      // padding tap: last step of the last datapath (tap 73 of 74 slots)
      if (dut.g_core[1].u_core.u_ctrl.f_vld && int'(dut.g_core[1].u_core.u_ctrl.rom_addr) == L - 1) n_pad++;
    end
  end
endmodule
