// tb_dm_coarse_freq: self-checking test of the delay-and-multiply coarse
// frequency corrector at its default parameters.
// A BPSK packet (4 samples per symbol, alternating preamble, random data)
// is given a carrier offset of w rad/sample.  The floating-point reference
// accumulates s[n] conj(s[n-1]) over the first 48 pairs, takes atan2 and
// removes the phase ramp.  Checked: the offset estimate, every output
// sample, the last flag, the output spacing of ITER + 4 cycles, and a second
// packet with a negative offset under random output back-pressure.
module tb_dm_coarse_freq;
  localparam int W = 24, FWL = 16, SPS = 4, N = 200, ITER = 16;
  localparam real SC = 2.0 ** FWL;
  localparam real PI = 3.14159265358979;
  logic clk = 0, rst_n = 0, clear = 0;
  logic [13:0][7:0] masks = '0;
  logic in_valid = 0, in_ready, in_last = 0, out_valid, out_ready = 1, out_last, busy;
  logic signed [W-1:0] in_re = 0, in_im = 0, out_re, out_im, fs_error;
  int checks = 0, failures = 0;
  real sr[N], si[N];

  dm_coarse_freq dut (.*);

  always #5 clk = ~clk;

  function automatic real fabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  task automatic packet(real w, real ph0, bit backpressure);
    real ar, ai, arg, er, ei, c, s;
    int b, k, last_t, t;
    // build and quantise the packet
    for (int n = 0; n < N; n++) begin
      k = n / SPS;
      b = (k < 16) ? ((k % 2) ? -1 : 1) : (($urandom % 2) ? 1 : -1);
      sr[n] = real'($rtoi(0.8 * b * $cos(w * n + ph0) * SC)) / SC;
      si[n] = real'($rtoi(0.8 * b * $sin(w * n + ph0) * SC)) / SC;
    end
    ar = 0; ai = 0;
    for (int n = 1; n <= 12 * SPS; n++) begin
      ar += sr[n] * sr[n-1] + si[n] * si[n-1];
      ai += si[n] * sr[n-1] - sr[n] * si[n-1];
    end
    arg = $atan2(ai, ar);
    // feed it
    for (int n = 0; n < N; n++) begin
      in_valid = 1; in_re = W'($rtoi(sr[n] * SC)); in_im = W'($rtoi(si[n] * SC));
      in_last = (n == N - 1);
      @(posedge clk); while (!in_ready) @(posedge clk);
      #1;
    end
    in_valid = 0; in_last = 0;
    // collect
    last_t = -1; t = 0;
    for (int n = 0; n < N; n++) begin
      out_ready = backpressure ? ($urandom % 3 != 0) : 1'b1;
      #0;
      while (!(out_valid && out_ready)) begin
        @(posedge clk); #1; t++;
        out_ready = backpressure ? ($urandom % 3 != 0) : 1'b1;
      end
      if (n == 0) begin
        checks++;
        if (fabs(real'(fs_error) / SC - arg * SPS / (2.0 * PI)) > 0.002) begin
          failures++;
          $display("fs_error %f want %f", real'(fs_error) / SC, arg * SPS / (2.0 * PI));
        end
      end
      c = $cos(arg * n); s = $sin(arg * n);
      er = sr[n] * c + si[n] * s;
      ei = si[n] * c - sr[n] * s;
      checks++;
      if (fabs(real'(out_re) / SC - er) > 0.03 || fabs(real'(out_im) / SC - ei) > 0.03) begin
        failures++;
        if (failures < 6) $display("n=%0d got (%f,%f) want (%f,%f)", n, real'(out_re) / SC,
                                   real'(out_im) / SC, er, ei);
      end
      checks++;
      if (out_last != (n == N - 1)) failures++;
      if (!backpressure && n > 0) begin
        checks++;
        if (t - last_t != ITER + 4) begin
          failures++;
          $display("output spacing %0d cycles", t - last_t);
        end
      end
      last_t = t;
      @(posedge clk); #1; t++;
    end
    out_ready = 1;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (busy) failures++;
  endtask

  initial begin
    repeat (3) @(posedge clk); #1 rst_n = 1;
    packet(0.06, 0.3, 0);
    packet(-0.11, -1.2, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
