// tb_bpsk_rx_top: end-to-end test of the receiver over its serial link.
//
// The testbench plays the host computer: it waits for the start bytes,
// sends the 27 mask bytes and one packet of 425 complex samples in the
// 3-byte serial format, and collects the result samples.  The packet is
// BPSK at 4 samples per symbol (16 alternating preamble symbols, then
// random data), shaped with a cos^2 pulse, delayed by a fraction of a
// sample and given a carrier offset of W_OFF rad/sample.  The clock is
// lowered to 16 clocks per bit to keep the run short; all other parameters
// are the defaults.
//
// Run 1, all masks 0: the coarse estimate must match the offset, about one
// result per symbol must come back, and the hard decisions of the results,
// at the best lag and sign (BPSK has a 180 degree ambiguity), must match
// the transmitted data.  Run 2 repeats this with a smaller offset.  Run 3
// sends the packet of run 2 with the coarse offset estimate masked to zero
// fractional bits (coarse correction off), so the Costas loop has to chase
// the whole offset; the results must differ from run 2.
// Counted mechanisms, each must occur: runs, coarse correction, timing
// step changes in both directions, back-pressure from the serial
// transmitter into the chain, and a mask changing the results.  Costas
// phase wraps are counted and reported only (the unit test covers them).
// At the same time a second host drives the stand-alone Costas loop on
// the second serial link through one 81-symbol run (see below).
module tb_bpsk_rx_top;
  localparam int  BAUD = 9600, CLK_HZ = 16 * 9600, DIV = CLK_HZ / BAUD;
  localparam int  NS = 425, SPS = 4, NSYM = 96, NM = 27;
  localparam real W_OFF = 0.03, TAU = 1.5, PH0 = 0.5, W_OFF2 = 0.005, PH02 = 1.5;
  localparam real PI = 3.14159265358979;

  logic clk = 0, rst_n = 0, rxd = 1, txd;
  logic [15:0] runs;
  logic signed [23:0] dm_fs_error;
  logic signed [19:0] cl_phase, cl_freq;
  int checks = 0, failures = 0;
  logic rxd2 = 1, txd2, hil2_done = 0;
  logic [15:0] hil2_runs;

  bpsk_rx_top #(.CLK_HZ(CLK_HZ)) dut (.clk, .rst_n, .uart_rxd(rxd), .uart_txd(txd), .runs,
                                      .dm_fs_error, .cl_phase, .cl_freq,
    .hil_uart_rxd(rxd2), .hil_uart_txd(txd2), .hil_runs(hil2_runs), .hil_phase(), .hil_freq());

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

  // ---- mechanism counters -------------------------------------------------
  int n_short = 0, n_long = 0, n_wrap = 0, n_stall = 0;
  logic signed [19:0] ph_q = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_mm.take && dut.u_mm.step < SPS) n_short++;
    if (dut.u_mm.take && dut.u_mm.step > SPS) n_long++;
    if (dut.c_valid && !dut.c_ready) n_stall++;
    ph_q <= cl_phase;
    if ((ph_q > 20'sd10240 && cl_phase < -20'sd10240) || (ph_q < -20'sd10240 && cl_phase > 20'sd10240))
      n_wrap++;
  end

  // ---- second serial link: the Costas loop alone --------------------------
  // One run of 81 symbols (one sample per symbol, residual carrier 0.02
  // rad/symbol), no masks, sent while the receiver chain is busy with its
  // own runs.  All 81 results must come back and their decisions, after
  // symbol 20, must match the data up to the BPSK sign.
  byte unsigned rxq2[$];

  initial begin
    byte unsigned b;
    forever begin
      @(negedge txd2);
      repeat (DIV / 2) @(posedge clk);
      for (int k = 0; k < 8; k++) begin
        repeat (DIV) @(posedge clk);
        b[k] = txd2;
      end
      repeat (DIV) @(posedge clk);
      rxq2.push_back(b);
    end
  end

  task automatic send2(byte unsigned b);
    logic [9:0] f;
    f = {1'b1, b, 1'b0};
    for (int k = 0; k < 10; k++) begin
      rxd2 = f[k];
      repeat (DIV) @(posedge clk);
    end
  endtask

  initial begin
    int b2[81], ok, to;
    logic [23:0] w;
    real v;
    @(posedge rst_n);
    for (int n = 0; n < 81; n++) b2[n] = $urandom % 2;
    to = 0;
    while (rxq2.size() < 5 && to < 200 * DIV) begin @(posedge clk); to++; end
    for (int k = 0; k < 5; k++) begin
      checks++;
      if (rxq2.size() == 0 || rxq2[0] != 8'hA5) begin failures++; $display("costas link: no start byte"); end
      if (rxq2.size()) void'(rxq2.pop_front());
    end
    for (int k = 0; k < 8; k++) send2(8'd0);
    for (int n = 0; n < 81; n++)
      for (int part = 0; part < 2; part++) begin
        v = 0.9 * (b2[n] ? 1.0 : -1.0) * (part ? $sin(0.6 + 0.02 * n) : $cos(0.6 + 0.02 * n));
        w = 24'($rtoi(v * 65536.0));
        send2(w[23:16]); send2(w[15:8]); send2(w[7:0]);
      end
    to = 0;
    while (hil2_runs == 0 && to < 2000 * DIV) begin @(posedge clk); to++; end
    checks++;
    if (rxq2.size() != 6 * 81) begin failures++; $display("costas link: %0d result bytes", rxq2.size()); end
    ok = 0;
    for (int n = 0; n < 81 && rxq2.size() >= 6; n++) begin
      if (n >= 20 && (($signed({rxq2[0], rxq2[1], rxq2[2]}) > 0) == (b2[n] != 0))) ok++;
      repeat (6) void'(rxq2.pop_front());
    end
    if (ok < 61 - ok) ok = 61 - ok;
    $display("costas link: run done, decisions match %0d of 61", ok);
    checks++;
    if (ok < 60) failures++;
    hil2_done = 1;
  end

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

  initial begin
    byte unsigned m[NM];
    real run1_re[$], est, f;
    int differ;
    for (int k = 0; k < NSYM; k++) bits[k] = (k < 16) ? (k % 2 == 0) : ($urandom % 2);
    repeat (5) @(posedge clk); #1 rst_n = 1;

    // run 1: full precision
    foreach (m[k]) m[k] = 0;
    run(m, W_OFF, PH0);
    est = real'(dm_fs_error) / 65536.0;
    checks++;
    if (est < 0.9 * W_OFF * SPS / (2.0 * PI) || est > 1.1 * W_OFF * SPS / (2.0 * PI)) begin
      failures++; $display("coarse estimate %f, offset %f", est, W_OFF * SPS / (2.0 * PI));
    end
    checks++;
    if (res_re.size() < NSYM - 6 || res_re.size() > NSYM + 14) begin
      failures++; $display("%0d results for %0d symbols", res_re.size(), NSYM);
    end
    f = match();
    $display("run 1: %0d results, fsError %f, decisions match %0.1f%%", res_re.size(), est, 100.0 * f);
    checks++;
    if (f < 0.95) failures++;
    checks++;
    if (amp() < 0.5 || amp() > 0.95) failures++;
    $display("result amplitude %f", amp());

    // run 2: a smaller offset, full precision
    run(m, W_OFF2, PH02);
    f = match();
    $display("run 2: %0d results, fsError %f, decisions match %0.1f%%", res_re.size(),
             real'(dm_fs_error) / 65536.0, 100.0 * f);
    checks++;
    if (f < 0.95) failures++;
    run1_re = res_re;

    // run 3: the same packet with the coarse estimate masked to its integer
    // part, so the Costas loop alone follows the offset (the results must
    // change; whether its phase wraps around +-pi is reported, not required)
    m[3] = 8'd16;
    run(m, W_OFF2, PH02);
    checks++;
    if (dm_fs_error != 0) begin failures++; $display("masked estimate not zero"); end
    differ = 0;
    foreach (res_re[j]) if (j < run1_re.size() && res_re[j] != run1_re[j]) differ++;
    checks++;
    if (differ == 0) begin failures++; $display("masking changed nothing"); end
    $display("run 3: %0d results, %0d differ from run 2", res_re.size(), differ);

    $display("mechanisms: runs=%0d coarse_est=%0d step_short=%0d step_long=%0d phase_wraps=%0d tx_stall_cycles=%0d",
             runs, est != 0, n_short, n_long, n_wrap, n_stall);
    checks++; if (runs < 3)    failures++;
    checks++; if (est == 0)    failures++;
    checks++; if (n_short == 0) failures++;
    checks++; if (n_long == 0)  failures++;
    checks++; if (n_stall == 0) failures++;
    wait (hil2_done);
    wait_start();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
