// tb_fxp_limiter: self-checking test of the fractional bit-mask limiter.
// Random two-lane words and mask counts 0..30 are applied; the expected
// value is computed by shifting right and back left by min(count, FWL).
module tb_fxp_limiter;
  localparam int W = 24, FWL = 16;
  logic [1:0][W-1:0] din, dout;
  logic [7:0] nbits;
  int checks = 0, failures = 0;

  fxp_limiter #(.W(W), .FWL(FWL), .LANES(2)) dut (.din, .nbits, .dout);

  function automatic logic [W-1:0] expect_v(logic [W-1:0] v, int n);
    int k;
    k = (n > FWL) ? FWL : n;
    return (v >> k) << k;
  endfunction

  initial begin
    // figure example: 9-bit operands, two LSBs cleared
    din[0] = 24'h00012B; din[1] = 24'h0001CE; nbits = 8'd2; #1;
    checks++; if (dout[0] != 24'h000128 || dout[1] != 24'h0001CC) failures++;
    // their 18-bit product has its four LSBs cleared
    checks++; if (((dout[0][8:0] * dout[1][8:0]) & 18'hF) != 0) failures++;
    for (int t = 0; t < 2000; t++) begin
      din[0] = W'($urandom); din[1] = W'($urandom);
      nbits = 8'($urandom_range(0, 30));
      #1;
      for (int l = 0; l < 2; l++) begin
        checks++;
        if (dout[l] !== expect_v(din[l], int'(nbits))) begin
          failures++;
          if (failures < 5) $display("mismatch lane %0d din=%h n=%0d dout=%h", l, din[l], nbits, dout[l]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
