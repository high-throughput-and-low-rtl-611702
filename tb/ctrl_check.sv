// ctrl_check: drives one fir_ctrl with a random-then-continuous sample stream
// and checks it cycle by cycle against a model of the buffer contents.
//   - every accepted sample is written to the next circular slot;
//   - in fetch cycle (c, b) of block k, read port j names the slot that holds
//     sample (k*B + b) - (j*L + c) for every real tap j*L + c < N;
//   - the datapath-stage controls are the fetch controls one cycle later;
//   - o_ld comes 2 (B = 1) or 3 (B = 2) cycles after an output's last step;
//   - with a continuous stream, outputs come every L cycles (in pairs for
//     B = 2, spaced 1 and 2L-1 cycles).
// Counts are returned through the output ports once done is high.
module ctrl_check #(
  parameter int N = 7,
  parameter int M = 2,
  parameter int B = 1,
  parameter int NOUT = 200
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output int   stalls,
  output logic done
);
  localparam int L     = (N + M - 1) / M;
  localparam int DEPTH = N + 2 * B - 1;
  localparam int AW    = $clog2(DEPTH);
  localparam int LW    = (L > 1) ? $clog2(L) : 1;

  logic          x_valid = 0, x_ready, xw_en, f_vld, e_vld, e_clr, e_sel, o_ld, busy;
  logic [AW-1:0] xw_addr;
  logic [AW-1:0] xr_addr [M];
  logic [LW-1:0] rom_addr;

  fir_ctrl #(.N(N), .M(M), .B(B)) dut (
    .clk, .rst_n, .x_valid, .x_ready, .xw_en, .xw_addr, .xr_addr, .rom_addr,
    .f_vld, .e_vld, .e_clr, .e_sel, .o_ld, .busy
  );

  int slot [DEPTH];      // sample index held by each slot, -1 = reset zero
  int nin = 0;           // samples accepted
  int wp_m = 0;
  int fetch_no = 0;      // fetch cycles seen
  int cyc = 0;
  int nld = 0;
  int last_ld = -1, prev_gap = -1;
  bit cont = 0;          // continuous-stream phase
  int nld_cont = -1;     // outputs seen when the continuous phase began
  bit p_fvld = 0, p_clr = 0, p_b = 0;
  int ld_due [$];

  initial begin
    checks = 0; failures = 0; stalls = 0; done = 0;
    for (int i = 0; i < DEPTH; i++) slot[i] = -1;
  end

  task automatic err(input string msg);
    failures++;
    if (failures < 10) $display("ctrl_check N=%0d M=%0d B=%0d cycle %0d: %s", N, M, B, cyc, msg);
  endtask

  always @(negedge clk) begin
    if (rst_n) begin
      if (nin > NOUT / 2 && !cont) begin cont = 1; nld_cont = nld; end
      x_valid <= cont ? 1'b1 : (($urandom % 100) < 30);
    end
  end

  always @(posedge clk) begin
    if (rst_n && !done) begin
      int k, c, b, n, t, exp;
      cyc++;
      // handshake and writes
      checks++;
      if (xw_en != (x_valid && x_ready)) err("xw_en does not match the handshake");
      if (x_valid && !x_ready) stalls++;
      // datapath-stage controls follow the previous fetch
      checks++;
      if (e_vld != p_fvld || (p_fvld && (e_clr != p_clr || (B == 2 && e_sel != p_b))))
        err("datapath-stage controls do not follow the fetch");
      p_fvld = f_vld;
      // output load timing
      if (ld_due.size() > 0 && ld_due[0] == cyc) begin
        void'(ld_due.pop_front());
        checks++;
        if (!o_ld) err("o_ld missing");
      end else if (o_ld) err("unexpected o_ld");
      if (o_ld) begin
        nld++;
        if (cont && nld > nld_cont + B * 3 + 2) begin
          int gap;
          gap = cyc - last_ld;
          checks++;
          if (B == 1 && gap != L) err($sformatf("output interval %0d, expected %0d", gap, L));
          if (B == 2 && !((gap == 1 && prev_gap == 2 * L - 1) || (gap == 2 * L - 1 && prev_gap == 1)))
            err($sformatf("output intervals %0d,%0d, expected 1 and %0d", prev_gap, gap, 2 * L - 1));
          prev_gap = gap;
        end else if (last_ld >= 0) prev_gap = cyc - last_ld;
        last_ld = cyc;
        if (nld == NOUT) done = 1;
      end
      // fetch: read slots and coefficient step
      if (f_vld) begin
        k = fetch_no / (B * L);
        c = (fetch_no % (B * L)) / B;
        b = fetch_no % B;
        n = k * B + b;
        checks++;
        if (int'(rom_addr) != c) err($sformatf("rom_addr %0d, expected %0d", rom_addr, c));
        checks++;
        if (n + B - 1 - b >= nin) err("block started before its samples arrived");
        for (int j = 0; j < M; j++) begin
          t = j * L + c;
          if (t < N) begin
            exp = (n - t >= 0) ? n - t : -1;
            checks++;
            if (slot[xr_addr[j]] != exp)
              err($sformatf("port %0d step %0d/%0d: slot %0d holds sample %0d, expected %0d",
                            j, c, b, xr_addr[j], slot[xr_addr[j]], exp));
          end
        end
        p_clr = (c == 0);
        p_b   = b[0];
        if (c == L - 1) ld_due.push_back(cyc + ((B == 2) ? 3 : 2));
        fetch_no++;
      end
      if (xw_en) begin
        checks++;
        if (int'(xw_addr) != wp_m) err("write slot is not the next circular slot");
        slot[wp_m] = nin;
        nin++;
        wp_m = (wp_m + 1) % DEPTH;
      end
    end
  end
endmodule
