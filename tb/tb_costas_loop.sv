// tb_costas_loop: self-checking test of the Costas loop at its default
// parameters (Q8.12).
// BPSK symbols with a phase offset and a residual carrier of 0.02
// rad/symbol are fed in.  A floating-point model of the same loop (exact
// rotation, same gains, loop state rounded down to 2^-12) predicts each output; the test checks the outputs,
// the input-to-output latency of ITER + 4 cycles, that the loop pulls
// the symbols towards the real axis (imaginary part halved at the end), that the phase wraps around +-pi at
// least once, and that masked outputs have their low bits cleared.
module tb_costas_loop;
  localparam int W = 20, FWL = 12, N = 200, ITER = 16;
  localparam real SC = 2.0 ** FWL;
  localparam real PI = 3.14159265358979;
  logic clk = 0, rst_n = 0, clear = 0;
  logic [7:0][7:0] masks = '0;
  logic in_valid = 0, in_ready, in_last = 0, out_valid, out_ready = 1, out_last, busy;
  logic signed [W-1:0] in_re = 0, in_im = 0, out_re, out_im, phase, freq;
  int checks = 0, failures = 0, wraps = 0;

  costas_loop dut (.*);

  always #5 clk = ~clk;

  function automatic real fabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  function automatic real q(real v);
    return $floor(v * SC + 1.0e-9) / SC;
  endfunction

  task automatic packet(real th0, real dth, int m, real tol);
    real ph, fr, xr, xi, orr, oi, err, prev_ph;
    int b, cyc;
    real im_start, im_end;
    ph = 0; fr = 0; prev_ph = 0; im_start = 0; im_end = 0;
    masks = {8{8'(m)}};
    clear = 1; @(posedge clk); #1 clear = 0;
    for (int n = 0; n < N; n++) begin
      b = ($urandom % 2) ? 1 : -1;
      xr = real'($rtoi(0.9 * b * $cos(th0 + dth * n) * SC)) / SC;
      xi = real'($rtoi(0.9 * b * $sin(th0 + dth * n) * SC)) / SC;
      in_valid = 1; in_re = W'($rtoi(xr * SC)); in_im = W'($rtoi(xi * SC));
      in_last = (n == N - 1);
      @(posedge clk); while (!in_ready) @(posedge clk);
      #1 in_valid = 0;
      cyc = 1;
      while (!out_valid) begin @(posedge clk); #1; cyc++; end
      // model
      orr = xr * $cos(ph) + xi * $sin(ph);
      oi  = xi * $cos(ph) - xr * $sin(ph);
      // loop state kept at the block's precision: 2^-12 steps, rounded down
      err = q(orr * oi);
      fr  = fr + q(q(0.00932) * err);
      ph  = ph + fr + q(q(0.0132) * err);
      if (ph > PI) ph -= 2.0 * PI;
      if (ph < -PI) ph += 2.0 * PI;
      if (m == 0) checks++;
      if (m == 0 && (fabs(real'(out_re) / SC - orr) > tol || fabs(real'(out_im) / SC - oi) > tol)) begin
        failures++;
        if (failures < 6) $display("n=%0d got (%f,%f) want (%f,%f)", n,
                                   real'(out_re) / SC, real'(out_im) / SC, orr, oi);
      end
      checks++;
      if (m == 0 && cyc != ITER + 4) begin failures++; $display("latency %0d", cyc); end
      if (m > 0) begin
        checks++;
        if (out_re[3:0] != 0 || out_im[3:0] != 0) begin
          failures++;
          if (failures < 6) $display("masked bits set: %h %h", out_re, out_im);
        end
      end
      if (n < 10) im_start += fabs(real'(out_im) / SC) / 10.0;
      if (n >= N - 30) im_end += fabs(real'(out_im) / SC) / 30.0;
      checks++;
      if (out_last != (n == N - 1)) failures++;
      if (prev_ph > 2.5 && real'(phase) / SC < -2.5) wraps++;
      prev_ph = real'(phase) / SC;
      @(posedge clk); #1;
    end
    // the loop pulls the symbols towards the real axis
    if (m == 0) checks++;
    if (m == 0 && im_end > 0.5 * im_start) begin
      failures++;
      $display("loop did not converge: |im| %f at start, %f at end", im_start, im_end);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk); #1 rst_n = 1;
    packet(0.4, 0.02, 0, 0.03);
    packet(-0.7, 0.01, 4, 0.0);
    checks++;
    if (wraps == 0) begin failures++; $display("phase never wrapped"); end
    $display("phase wrapped %0d times", wraps);
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
