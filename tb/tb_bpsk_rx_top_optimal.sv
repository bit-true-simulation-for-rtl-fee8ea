// tb_bpsk_rx_top_optimal: the receiver run with the word lengths found by
// the max-1 search for each block.
//
// The search reported, as numbers of fractional bits cleared:
//   coarse frequency  [13,13,13,8,12,12,12,12], rotate CORDIC [9,9,6],
//                     arctangent CORDIC [16,13,5]
//   timing recovery   [15,14,12,12,14], and the uniform [12,12,12,12,12]
//                     that was kept for the optimised build
//   Costas loop       [12,13,7,12,12], rotate CORDIC [10,10,11]
// The testbench sends one packet (same waveform and serial link as the
// end-to-end test, peak amplitude 0.8) with no masking, then with each
// block's set on its own, then with all of them.  Every masked run is
// compared with the unmasked one and its signal-to-quantisation-noise
// ratio (SQNR) of the in-phase results is printed.
// Checked: every run returns about one result per symbol; the timing
// recovery sets keep every decision and an SQNR of at least 15 dB (the
// search reported about 19 dB for that block); every set changes the
// results.  The coarse frequency and Costas sets are reported only: they
// were found for a signal scale that is not known here, and at this
// amplitude they clear too many bits of the unit-magnitude correction
// vector and of the Costas input, so the decisions are not recovered.
// A mask above a block's fractional width clears all its fractional bits
// (the Costas loop carries 12).
module tb_bpsk_rx_top_optimal;
  localparam int  BAUD = 9600, CLK_HZ = 16 * 9600, DIV = CLK_HZ / BAUD;
  localparam int  NS = 425, SPS = 4, NSYM = 96, NM = 27;
  localparam real W_OFF = 0.03, TAU = 1.5, PH0 = 0.5;
  localparam real PI = 3.14159265358979;

  logic clk = 0, rst_n = 0, rxd = 1, txd;
  logic [15:0] runs;
  logic signed [23:0] dm_fs_error;
  logic signed [19:0] cl_phase, cl_freq;
  int checks = 0, failures = 0;

  bpsk_rx_top #(.CLK_HZ(CLK_HZ)) dut (.clk, .rst_n, .uart_rxd(rxd), .uart_txd(txd), .runs,
                                      .dm_fs_error, .cl_phase, .cl_freq,
    .hil_uart_rxd(1'b1), .hil_uart_txd(), .hil_runs(), .hil_phase(), .hil_freq());

  always #5 clk = ~clk;

  // ---- host serial port -------------------------------------------------
  byte unsigned rxq[$];
  initial begin
    byte unsigned b;
    forever begin
      @(negedge txd);
      repeat (DIV / 2) @(posedge clk);
      for (int k = 0; k < 8; k++) begin
        repeat (DIV) @(posedge clk);
        b[k] = txd;
      end
      repeat (DIV) @(posedge clk);
      rxq.push_back(b);
    end
  end

  task automatic send(byte unsigned b);
    logic [9:0] f;
    f = {1'b1, b, 1'b0};
    for (int k = 0; k < 10; k++) begin
      rxd = f[k];
      repeat (DIV) @(posedge clk);
    end
  endtask

  task automatic send_q(real v);
    logic [23:0] w;
    w = 24'($rtoi(v * 65536.0));
    send(w[23:16]); send(w[15:8]); send(w[7:0]);
  endtask

  // ---- one run ----------------------------------------------------------
  int bits[NSYM];
  real res_re[$], res_im[$];

  task automatic wait_start();
    int t = 0;
    while (rxq.size() < 5 && t < 200 * DIV) begin @(posedge clk); t++; end
    for (int k = 0; k < 5; k++) begin
      checks++;
      if (rxq.size() == 0 || rxq[0] != 8'hA5) begin failures++; $display("no start byte"); end
      if (rxq.size()) void'(rxq.pop_front());
    end
  endtask

  task automatic run(byte unsigned m[NM], real w_off, real ph0);
    real v, t, sr[NS], si[NS];
    logic [15:0] r0;
    int to;
    for (int n = 0; n < NS; n++) begin
      v = 0;
      for (int k = 0; k < NSYM; k++) begin
        t = real'(n) - real'(SPS * k) - TAU - 4.0;
        if (t > -4.0 && t < 4.0) v += (bits[k] ? 1.0 : -1.0) * $cos(PI * t / 8.0) ** 2;
      end
      sr[n] = 0.8 * v * $cos(w_off * n + ph0);
      si[n] = 0.8 * v * $sin(w_off * n + ph0);
    end
    wait_start();
    r0 = runs;
    foreach (m[k]) send(m[k]);
    for (int n = 0; n < NS; n++) begin send_q(sr[n]); send_q(si[n]); end
    to = 0;
    while (runs == r0 && to < 20000 * DIV) begin @(posedge clk); to++; end
    checks++;
    if (runs == r0) begin failures++; $display("run did not end"); end
    checks++;
    if (rxq.size() % 6 != 0) begin failures++; $display("%0d result bytes", rxq.size()); end
    res_re.delete(); res_im.delete();
    while (rxq.size() >= 6) begin
      res_re.push_back(real'($signed({rxq[0], rxq[1], rxq[2]})) / 65536.0);
      res_im.push_back(real'($signed({rxq[3], rxq[4], rxq[5]})) / 65536.0);
      repeat (6) void'(rxq.pop_front());
    end
  endtask

  // best fraction of data symbols matched by the decisions, over lags and sign
  function automatic real match();
    real best = 0, f;
    int ok, tot;
    for (int lag = -4; lag <= 4; lag++)
      for (int sgn = 0; sgn < 2; sgn++) begin
        ok = 0; tot = 0;
        for (int j = 30; j < res_re.size(); j++) begin
          int k = j + lag;
          if (k >= 16 && k < NSYM) begin
            tot++;
            if (((res_re[j] > 0) ^ sgn[0]) == bits[k][0]) ok++;
          end
        end
        f = (tot > 40) ? real'(ok) / real'(tot) : 0.0;
        if (f > best) best = f;
      end
    return best;
  endfunction

  // mean magnitude of the in-phase part of the later results; with the
  // loops settled this is near the transmitted amplitude 0.8 (lower by the
  // residual timing and phase error)
  function automatic real amp();
    real a = 0;
    int n = 0;
    for (int j = 30; j < res_re.size(); j++) begin
      a += (res_re[j] < 0) ? -res_re[j] : res_re[j];
      n++;
    end
    return (n > 0) ? a / real'(n) : 0.0;
  endfunction

  function automatic real sqnr(real ref_re[$]);
    real ps = 0, pn = 0;
    for (int j = 30; j < res_re.size() && j < ref_re.size(); j++) begin
      ps += ref_re[j] ** 2;
      pn += (res_re[j] - ref_re[j]) ** 2;
    end
    return (pn > 0) ? 10.0 * $log10(ps / pn) : 99.0;
  endfunction

  // returns the fraction of decisions matched
  function automatic real report(string name, real ref_re[$]);
    real f;
    int differ = 0;
    f = match();
    foreach (res_re[j]) if (j < ref_re.size() && res_re[j] != ref_re[j]) differ++;
    $display("%s: %0d results, decisions match %0.1f%%, SQNR %0.1f dB, %0d differ",
             name, res_re.size(), 100.0 * f, sqnr(ref_re), differ);
    checks++;
    if (res_re.size() < NSYM - 6 || res_re.size() > NSYM + 14) failures++;
    checks++;
    if (name != "no masks" && differ == 0) failures++;
    return f;
  endfunction

  initial begin
    byte unsigned m[NM];
    byte unsigned dm[14] = '{13, 13, 13, 8, 12, 12, 12, 12, 9, 9, 6, 16, 13, 5};
    byte unsigned mm[5]  = '{15, 14, 12, 12, 14};
    byte unsigned cl[8]  = '{12, 13, 7, 12, 12, 10, 10, 11};
    real ref_re[$], f;
    for (int k = 0; k < NSYM; k++) bits[k] = (k < 16) ? (k % 2 == 0) : ($urandom % 2);
    repeat (5) @(posedge clk); #1 rst_n = 1;

    foreach (m[k]) m[k] = 0;
    run(m, W_OFF, PH0);
    ref_re = res_re;
    f = report("no masks", ref_re);
    checks++; if (f < 0.95) failures++;

    // timing recovery: the search optimum and the uniform set
    foreach (mm[k]) m[14 + k] = mm[k];
    run(m, W_OFF, PH0);
    f = report("timing recovery optimum", ref_re);
    checks++; if (f < 0.95 || sqnr(ref_re) < 15.0) failures++;
    foreach (mm[k]) m[14 + k] = 12;
    run(m, W_OFF, PH0);
    f = report("timing recovery uniform 12", ref_re);
    checks++; if (f < 0.95 || sqnr(ref_re) < 15.0) failures++;

    // coarse frequency and Costas optima, reported only
    foreach (m[k]) m[k] = 0;
    foreach (dm[k]) m[k] = dm[k];
    run(m, W_OFF, PH0);
    void'(report("coarse frequency optimum", ref_re));
    foreach (m[k]) m[k] = 0;
    foreach (cl[k]) m[19 + k] = cl[k];
    run(m, W_OFF, PH0);
    void'(report("Costas optimum", ref_re));
    foreach (dm[k]) m[k] = dm[k];
    foreach (mm[k]) m[14 + k] = mm[k];
    run(m, W_OFF, PH0);
    void'(report("all optima", ref_re));

    checks++;
    if (runs < 6) failures++;
    wait_start();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
