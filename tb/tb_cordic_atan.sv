// tb_cordic_atan: self-checking test of the arctangent-mode CORDIC.
// Random vectors in all four quadrants, with magnitudes from 0.1 to 60, are
// compared with the floating-point atan2; the latency (ITER + 1 cycles) is
// checked, and masks of 8 bits must leave the angle's low bits zero.
module tb_cordic_atan;
  localparam int W = 24, FWL = 16, ITER = 16;
  localparam real SC = 2.0 ** FWL;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, out_valid, out_ready;
  logic signed [W-1:0] x_in, y_in, z_out;
  logic [7:0] mask_x, mask_y, mask_z;
  int checks = 0, failures = 0;

  cordic_atan #(.W(W), .FWL(FWL), .ITER(ITER)) dut (.*);

  always #5 clk = ~clk;

  function automatic real fabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  function automatic real rnd(real lo, real hi);
    return lo + (hi - lo) * real'($urandom_range(0, 1000000)) / 1.0e6;
  endfunction

  task automatic run(real x, real y, int m, real tol);
    real ez, d;
    int cyc;
    x_in = W'($rtoi(x * SC)); y_in = W'($rtoi(y * SC));
    mask_x = 8'(m); mask_y = 8'(m); mask_z = 8'(m);
    in_valid = 1;
    @(posedge clk); while (!in_ready) @(posedge clk);
    #1 in_valid = 0;
    cyc = 1;
    while (!out_valid) begin @(posedge clk); #1; cyc++; end
    ez = $atan2(y, x);
    d = fabs(real'(z_out) / SC - ez);
    if (d > 3.14159265) d = 6.2831853 - d;   // +pi and -pi are the same angle
    checks++;
    if (d > tol) begin
      failures++;
      if (failures < 5) $display("atan2(%f,%f): got %f want %f", y, x, real'(z_out) / SC, ez);
    end
    checks++;
    if (cyc != ITER + 1) begin failures++; $display("latency %0d", cyc); end
    if (m > 0) begin
      checks++;
      if (z_out[7:0] != 0) failures++;
    end
    @(posedge clk); #1;
  endtask

  initial begin
    real r, a;
    in_valid = 0; out_ready = 1; x_in = 0; y_in = 0;
    mask_x = 0; mask_y = 0; mask_z = 0;
    repeat (3) @(posedge clk); #1 rst_n = 1;
    run(1.0, 0.0, 0, 0.001);
    run(-1.0, 0.001, 0, 0.002);
    run(0.0, -1.0, 0, 0.001);
    run(-2.0, -2.0, 0, 0.001);
    for (int t = 0; t < 300; t++) begin
      r = rnd(0.1, 60.0); a = rnd(-3.14, 3.14);
      run(r * $cos(a), r * $sin(a), 0, 0.002);
    end
    for (int t = 0; t < 50; t++) begin
      r = rnd(1.0, 60.0); a = rnd(-3.14, 3.14);
      run(r * $cos(a), r * $sin(a), 8, 0.1);
    end
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
