// tb_mm_timing_sync: self-checking test of the Mueller & Muller timing
// synchroniser at its default parameters.
// Two packets of shaped BPSK (4 samples per symbol, a fractional timing
// offset, a small phase rotation) are streamed through the block, the
// second with all masks at 5 bits and random output back-pressure.  A
// reference model in 64-bit integer arithmetic, written from the loop
// equations, predicts every picked sample; the test also requires that the
// loop both shortened and lengthened its step at least once.
module tb_mm_timing_sync;
  localparam int W = 24, FWL = 16, SPS = 4, N = 400;
  localparam real SC = 2.0 ** FWL;
  localparam real PI = 3.14159265358979;
  logic clk = 0, rst_n = 0, clear = 0;
  logic [4:0][7:0] masks = '0;
  logic in_valid = 0, in_ready, in_last = 0, out_valid, out_ready = 1, out_last, busy;
  logic signed [W-1:0] in_re = 0, in_im = 0, out_re, out_im;
  int checks = 0, failures = 0, n_short = 0, n_long = 0;

  mm_timing_sync dut (.*);

  always #5 clk = ~clk;

  longint sre[N], sim[N];
  longint exp_re[$], exp_im[$];
  bit     exp_last[$];

  function automatic longint lim(longint v, int n);
    int k;
    k = (n > FWL) ? FWL : n;
    return (v >>> k) <<< k;
  endfunction

  // reference model of one packet
  task automatic model(int m);
    longint o1r, o1i, o2r, o2i, mu, x, y, mm, mun, step, sr, si;
    longint r1r, r1i, r2r, r2i, rr, ri;
    int skip;
    o1r = 0; o1i = 0; o2r = 0; o2i = 0; r1r = 0; r1i = 0; r2r = 0; r2i = 0;
    mu = 0; skip = 0;
    for (int n = 0; n < N; n++) begin
      if (skip == 0) begin
        sr = lim(sre[n], m); si = lim(sim[n], m);
        rr = (sr > 0) ? 1 : 0; ri = (si > 0) ? 1 : 0;
        x  = lim((rr - r2r) * o1r + (ri - r2i) * o1i, m);
        y  = lim((sr - o2r) * r1r + (si - o2i) * r1i, m);
        mm = lim(y - x, m);
        mun = lim(mu + SPS * 65536 + ((longint'(19661) * mm) >>> 16), m);
        step = mun >>> 16;
        mu = mun & 65535;
        if (step < SPS) n_short++;
        if (step > SPS) n_long++;
        skip = (step < 1) ? 0 : int'(step - 1);
        exp_re.push_back(sr); exp_im.push_back(si); exp_last.push_back(n == N - 1);
        o2r = o1r; o2i = o1i; o1r = sr; o1i = si;
        r2r = r1r; r2i = r1i; r1r = rr; r1i = ri;
      end else skip--;
    end
  endtask

  task automatic packet(real tau, real th, int m, bit bp);
    real v, t;
    int b[N / SPS + 2];
    foreach (b[k]) b[k] = ($urandom % 2) ? 1 : -1;
    for (int n = 0; n < N; n++) begin
      v = 0;
      for (int k = 0; k < N / SPS + 2; k++) begin
        t = real'(n) - real'(SPS * k) - tau;
        if (t > -4.0 && t < 4.0) v += b[k] * $cos(PI * t / 8.0) ** 2;
      end
      sre[n] = longint'($rtoi(v * $cos(th) * SC));
      sim[n] = longint'($rtoi(v * $sin(th) * SC));
    end
    exp_re.delete(); exp_im.delete(); exp_last.delete();
    model(m);
    masks = {5{8'(m)}};
    fork
      for (int n = 0; n < N; n++) begin
        in_valid = 1; in_re = W'(sre[n]); in_im = W'(sim[n]); in_last = (n == N - 1);
        @(posedge clk); while (!in_ready) @(posedge clk);
        #1;
      end
      begin
        int got = 0;
        while (got < exp_re.size()) begin
          out_ready = bp ? ($urandom % 2 == 0) : 1'b1;
          @(posedge clk);
          if (out_valid && out_ready) begin
            checks++;
            if (out_re != W'(exp_re[got]) || out_im != W'(exp_im[got]) ||
                out_last != exp_last[got]) begin
              failures++;
              if (failures < 6) $display("sample %0d got %0d,%0d want %0d,%0d", got,
                                         out_re, out_im, exp_re[got], exp_im[got]);
            end
            got++;
          end
          #1;
        end
      end
    join
    in_valid = 0; in_last = 0; out_ready = 1;
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (out_valid) begin failures++; $display("extra output"); end
  endtask

  initial begin
    repeat (3) @(posedge clk); #1 rst_n = 1;
    packet(1.3, 0.2, 0, 0);
    packet(2.6, -0.3, 5, 1);
    checks++;
    if (n_short == 0 || n_long == 0) begin
      failures++;
      $display("timing loop never adjusted: short=%0d long=%0d", n_short, n_long);
    end
    $display("step shorter than SPS %0d times, longer %0d times", n_short, n_long);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
