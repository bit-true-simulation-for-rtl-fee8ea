// tb_cordic_rotate: self-checking test of the rotation-mode CORDIC.
// Random vectors and angles over the full -pi..pi range are compared with
// x cos z - y sin z and x sin z + y cos z computed in floating point; the
// latency (ITER + 2 cycles from input to output) is checked, and a run with
// 8-bit masks checks that the masked LSBs come out zero.
module tb_cordic_rotate;
  localparam int W = 24, FWL = 16, ITER = 16;
  localparam real SC = 2.0 ** FWL;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, out_valid, out_ready;
  logic signed [W-1:0] x_in, y_in, z_in, x_out, y_out;
  logic [7:0] mask_x, mask_y, mask_z;
  int checks = 0, failures = 0;

  cordic_rotate #(.W(W), .FWL(FWL), .ITER(ITER)) dut (.*);

  always #5 clk = ~clk;

  function automatic real fabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  function automatic real rnd(real lo, real hi);
    return lo + (hi - lo) * real'($urandom_range(0, 1000000)) / 1.0e6;
  endfunction

  task automatic run(real x, real y, real z, int m, real tol);
    real ex, ey;
    int cyc;
    x_in = W'($rtoi(x * SC)); y_in = W'($rtoi(y * SC)); z_in = W'($rtoi(z * SC));
    mask_x = 8'(m); mask_y = 8'(m); mask_z = 8'(m);
    in_valid = 1;
    @(posedge clk); while (!in_ready) @(posedge clk);
    #1 in_valid = 0;
    cyc = 1;
    while (!out_valid) begin @(posedge clk); #1; cyc++; end
    ex = x * $cos(z) - y * $sin(z);
    ey = x * $sin(z) + y * $cos(z);
    checks++;
    if (fabs(real'(x_out) / SC - ex) > tol || fabs(real'(y_out) / SC - ey) > tol) begin
      failures++;
      if (failures < 5) $display("rot (%f,%f) by %f: got (%f,%f) want (%f,%f)", x, y, z,
                                 real'(x_out) / SC, real'(y_out) / SC, ex, ey);
    end
    checks++;
    if (cyc != ITER + 2) begin failures++; $display("latency %0d", cyc); end
    if (m > 0) begin
      checks++;
      if (x_out[7:0] != 0 || y_out[7:0] != 0) failures++;
    end
    @(posedge clk); #1;
  endtask

  initial begin
    in_valid = 0; out_ready = 1; x_in = 0; y_in = 0; z_in = 0;
    mask_x = 0; mask_y = 0; mask_z = 0;
    repeat (3) @(posedge clk); #1 rst_n = 1;
    run(1.0, 0.0, 3.14159265 / 2.0, 0, 0.001);
    run(1.0, 0.0, -3.0, 0, 0.001);
    run(0.0, 1.0, 2.5, 0, 0.001);
    for (int t = 0; t < 300; t++)
      run(rnd(-1.5, 1.5), rnd(-1.5, 1.5), rnd(-3.14, 3.14), 0, 0.002);
    for (int t = 0; t < 50; t++)
      run(rnd(-1.5, 1.5), rnd(-1.5, 1.5), rnd(-3.14, 3.14), 8, 0.15);
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
