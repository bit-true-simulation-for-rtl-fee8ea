// tb_costas_hil: hardware-in-the-loop runs of the Costas loop over its
// serial link.
//
// The testbench plays the host: it waits for the five start bytes, sends
// the 8 mask bytes and an 81-sample packet of BPSK symbols (one sample per
// symbol, amplitude 0.9, phase offset 0.6 rad, residual carrier 0.015
// rad/symbol), and reads back the corrected samples.  The clock is lowered
// to 16 clocks per bit to keep the run short.
//
// Run 1, no masks: every one of the 81 results must come back; they are
// compared with a floating-point model of the loop (exact rotation, loop
// state kept on the 2^-12 grid) and the signal-to-quantisation-noise ratio
// (SQNR) must be at least 50 dB (the level the document reports between its
// hardware and software runs); the decisions after the first 20 symbols
// must match the data (up to the BPSK sign ambiguity).
// Run 2 repeats run 1: the results must be identical (the state is cleared
// between runs).  Run 3 uses the masks found by the word length search,
// [12,13,7,12,12] for the loop and [10,10,11] for its CORDIC: with 12
// fraction bits, outputs then carry no fraction at all, so the fraction
// bits of every result must be zero.  Run 4 clears 4 bits everywhere: the
// four lowest fraction bits must be zero, the SQNR against run 1 is
// printed and the decisions must still match.
module tb_costas_hil;
  localparam int  BAUD = 9600, CLK_HZ = 16 * 9600, DIV = CLK_HZ / BAUD;
  localparam int  NS = 81, NM = 8;
  localparam real TH0 = 0.6, DTH = 0.015, AMP = 0.9;
  localparam real PI = 3.14159265358979, SC = 4096.0;

  logic clk = 0, rst_n = 0, rxd = 1, txd;
  logic [15:0] runs;
  logic signed [19:0] phase, freq;
  int checks = 0, failures = 0;

  costas_hil #(.CLK_HZ(CLK_HZ)) dut (.clk, .rst_n, .uart_rxd(rxd), .uart_txd(txd), .runs,
                                     .phase, .freq);

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

  // a real value on the wire: integer byte, then a 16-bit fraction
  task automatic send_q(real v);
    logic [23:0] w;
    w = 24'($rtoi(v * 65536.0));
    send(w[23:16]); send(w[15:8]); send(w[7:0]);
  endtask

  // ---- packet and model ---------------------------------------------------
  int  bits[NS];
  real xr[NS], xi[NS], mr[NS], mi[NS];
  real res_re[$], res_im[$];
  logic [23:0] raw_re[$], raw_im[$];

  function automatic real q(real v);
    return $floor(v * SC + 1.0e-9) / SC;
  endfunction

  task automatic make_packet();
    real ph = 0, fr = 0, err;
    for (int n = 0; n < NS; n++) begin
      bits[n] = $urandom % 2;
      // the wire carries 16 fraction bits, the loop keeps 12
      xr[n] = q(AMP * (bits[n] ? 1.0 : -1.0) * $cos(TH0 + DTH * n));
      xi[n] = q(AMP * (bits[n] ? 1.0 : -1.0) * $sin(TH0 + DTH * n));
      mr[n] = xr[n] * $cos(ph) + xi[n] * $sin(ph);
      mi[n] = xi[n] * $cos(ph) - xr[n] * $sin(ph);
      err = q(mr[n] * mi[n]);
      fr  = fr + q(q(0.00932) * err);
      ph  = ph + fr + q(q(0.0132) * err);
      if (ph > PI) ph -= 2.0 * PI;
      if (ph < -PI) ph += 2.0 * PI;
    end
  endtask

  task automatic wait_start();
    int t = 0;
    while (rxq.size() < 5 && t < 200 * DIV) begin @(posedge clk); t++; end
    for (int k = 0; k < 5; k++) begin
      checks++;
      if (rxq.size() == 0 || rxq[0] != 8'hA5) begin failures++; $display("no start byte"); end
      if (rxq.size()) void'(rxq.pop_front());
    end
  endtask

  task automatic run(byte unsigned m[NM]);
    logic [15:0] r0;
    int to;
    wait_start();
    r0 = runs;
    foreach (m[k]) send(m[k]);
    for (int n = 0; n < NS; n++) begin send_q(xr[n]); send_q(xi[n]); end
    to = 0;
    while (runs == r0 && to < 2000 * DIV) begin @(posedge clk); to++; end
    checks++;
    if (runs == r0) begin failures++; $display("run did not end"); end
    checks++;
    if (rxq.size() != 6 * NS) begin failures++; $display("%0d result bytes", rxq.size()); end
    res_re.delete(); res_im.delete(); raw_re.delete(); raw_im.delete();
    while (rxq.size() >= 6) begin
      raw_re.push_back({rxq[0], rxq[1], rxq[2]});
      raw_im.push_back({rxq[3], rxq[4], rxq[5]});
      res_re.push_back(real'($signed({rxq[0], rxq[1], rxq[2]})) / 65536.0);
      res_im.push_back(real'($signed({rxq[3], rxq[4], rxq[5]})) / 65536.0);
      repeat (6) void'(rxq.pop_front());
    end
  endtask

  function automatic real sqnr(real ref_re[], real ref_im[]);
    real ps = 0, pn = 0;
    foreach (res_re[j]) begin
      ps += ref_re[j] ** 2 + ref_im[j] ** 2;
      pn += (res_re[j] - ref_re[j]) ** 2 + (res_im[j] - ref_im[j]) ** 2;
    end
    return (pn > 0) ? 10.0 * $log10(ps / pn) : 99.0;
  endfunction

  // fraction of decisions after symbol 20 that match, best of both signs
  function automatic real match();
    int ok = 0, tot = 0;
    for (int j = 20; j < res_re.size(); j++) begin
      tot++;
      if ((res_re[j] > 0) == (bits[j] != 0)) ok++;
    end
    if (tot == 0) return 0.0;
    return (ok > tot - ok) ? real'(ok) / real'(tot) : real'(tot - ok) / real'(tot);
  endfunction

  initial begin
    byte unsigned m[NM];
    byte unsigned opt[NM] = '{12, 13, 7, 12, 12, 10, 10, 11};
    real r1_re[], r1_im[], mref_re[], mref_im[], s, f;
    int same, nz;
    repeat (5) @(posedge clk); #1 rst_n = 1;
    make_packet();

    // run 1: full precision, against the model
    foreach (m[k]) m[k] = 0;
    run(m);
    mref_re = new[NS]; mref_im = new[NS];
    foreach (mr[n]) begin mref_re[n] = mr[n]; mref_im[n] = mi[n]; end
    s = sqnr(mref_re, mref_im);
    f = match();
    $display("run 1: %0d results, SQNR against the model %0.1f dB, decisions match %0.1f%%",
             res_re.size(), s, 100.0 * f);
    checks++; if (s < 50.0) failures++;
    checks++; if (f < 0.99) failures++;
    r1_re = new[res_re.size()]; r1_im = new[res_im.size()];
    foreach (res_re[j]) begin r1_re[j] = res_re[j]; r1_im[j] = res_im[j]; end

    // run 2: the same run again must give the same results
    run(m);
    same = 0;
    foreach (res_re[j]) if (j < r1_re.size() && res_re[j] == r1_re[j] && res_im[j] == r1_im[j]) same++;
    checks++;
    if (same != NS) begin failures++; $display("run 2: %0d of %0d results repeat", same, NS); end

    // run 3: the word length search optimum
    m = opt;
    run(m);
    nz = 0;
    foreach (raw_re[j]) if (raw_re[j][15:0] != 0 || raw_im[j][15:0] != 0) nz++;
    f = match();
    $display("run 3 (search optimum): SQNR against run 1 %0.1f dB, decisions match %0.1f%%",
             sqnr(r1_re, r1_im), 100.0 * f);
    checks++;
    if (nz != 0) begin failures++; $display("run 3: %0d results with fraction bits", nz); end

    // run 4: four fraction bits cleared everywhere
    foreach (m[k]) m[k] = 4;
    run(m);
    nz = 0;
    foreach (raw_re[j]) if (raw_re[j][7:0] != 0 || raw_im[j][7:0] != 0) nz++;
    f = match();
    $display("run 4 (4 bits cleared): SQNR against run 1 %0.1f dB, decisions match %0.1f%%",
             sqnr(r1_re, r1_im), 100.0 * f);
    checks++;
    if (nz != 0) begin failures++; $display("run 4: %0d results with low bits set", nz); end
    checks++; if (f < 0.99) failures++;
    checks++; if (runs != 4) failures++;

    wait_start();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
