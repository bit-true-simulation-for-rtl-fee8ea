// tb_hil_ctrl: self-checking test of the serial run protocol.
// The byte streams of the serial link are driven directly, and a stub
// stands in for the receiver chain (it returns, for each sample, the real
// part plus one LSB and the negated imaginary part, in Q8.12).  Two runs of
// 8 samples are made; checked are the five start bytes, the clear pulse,
// every mask register, every sample handed to the chain and its last flag,
// the 6-byte result frames and the run counter.
module tb_hil_ctrl;
  localparam int NM = 27, NS = 8;
  logic clk = 0, rst_n = 0;
  logic rx_valid = 0, tx_valid, tx_ready = 0, clear, chain_busy;
  logic [7:0] rx_data = 0, tx_data;
  logic [NM-1:0][7:0] masks;
  logic s_valid, s_ready = 0, s_last, r_valid, r_ready;
  logic signed [23:0] s_re, s_im;
  logic signed [19:0] r_re, r_im;
  logic [15:0] runs;
  int checks = 0, failures = 0, clears = 0;

  hil_ctrl #(.N_SAMPLES(NS)) dut (.*);

  always #5 clk = ~clk;

  // ---- chain stub ---------------------------------------------------------
  logic signed [19:0] q_re[$], q_im[$];
  logic [23:0] exp_s_re[$], exp_s_im[$];
  int nsamp_seen = 0;
  always @(posedge clk) begin
    s_ready <= ($urandom % 2);
    if (rst_n && clear) clears++;
    if (s_valid && s_ready) begin
      checks++;
      if (s_re != exp_s_re[0] || s_im != exp_s_im[0] || s_last != (nsamp_seen % NS == NS - 1)) begin
        failures++;
        $display("sample %0d: got %h %h last %b", nsamp_seen, s_re, s_im, s_last);
      end
      void'(exp_s_re.pop_front()); void'(exp_s_im.pop_front());
      nsamp_seen++;
      q_re.push_back(20'(s_re >>> 4) + 20'sd1);
      q_im.push_back(-20'(s_im >>> 4));
    end
    if (r_valid && r_ready) begin
      void'(q_re.pop_front()); void'(q_im.pop_front());
    end
  end
  assign r_valid    = q_re.size() > 0;
  assign r_re       = r_valid ? q_re[0] : '0;
  assign r_im       = r_valid ? q_im[0] : '0;
  assign chain_busy = r_valid;

  // ---- serial byte sink: collect what the controller sends -----------------
  byte unsigned txq[$];
  always @(posedge clk) begin
    if (tx_valid && tx_ready) txq.push_back(tx_data);
    tx_ready <= ($urandom % 4 == 0);
  end

  task automatic send(byte unsigned b);
    @(posedge clk); #1 rx_valid = 1; rx_data = b;
    @(posedge clk); #1 rx_valid = 0;
    repeat ($urandom_range(0, 3)) @(posedge clk);
  endtask

  task automatic expect_start();
    int t = 0;
    while (txq.size() < 5 && t < 2000) begin @(posedge clk); t++; end
    for (int k = 0; k < 5; k++) begin
      checks++;
      if (txq.size() == 0 || txq[0] != 8'hA5) begin failures++; $display("start byte missing"); end
      if (txq.size()) void'(txq.pop_front());
    end
    repeat (10) @(posedge clk);
    checks++;
    if (txq.size() != 0) begin failures++; $display("extra start bytes"); end
  endtask

  task automatic run(int r);
    logic [7:0] m[NM];
    logic [23:0] v_re[NS], v_im[NS];
    logic [23:0] w;
    int t;
    expect_start();
    checks++;
    if (clears != r + 1) begin failures++; $display("clear pulses %0d", clears); end
    foreach (m[k]) begin m[k] = 8'($urandom); send(m[k]); end
    for (int n = 0; n < NS; n++) begin
      v_re[n] = 24'($urandom); v_im[n] = 24'($urandom);
      exp_s_re.push_back(v_re[n]); exp_s_im.push_back(v_im[n]);
      send(v_re[n][23:16]); send(v_re[n][15:8]); send(v_re[n][7:0]);
      send(v_im[n][23:16]); send(v_im[n][15:8]); send(v_im[n][7:0]);
    end
    foreach (m[k]) begin
      checks++;
      if (masks[k] != m[k]) begin failures++; $display("mask %0d", k); end
    end
    // results: 6 bytes per sample, then the next run's start bytes
    t = 0;
    while (txq.size() < 6 * NS && t < 20000) begin @(posedge clk); t++; end
    for (int n = 0; n < NS; n++) begin
      w = 24'(20'(($signed(v_re[n]) >>> 4) + 1)) << 4;
      checks++;
      if (txq[0] != w[23:16] || txq[1] != w[15:8] || txq[2] != w[7:0]) begin
        failures++; $display("result %0d real: %h %h %h want %h", n, txq[0], txq[1], txq[2], w);
      end
      w = 24'(-20'($signed(v_im[n]) >>> 4)) << 4;
      checks++;
      if (txq[3] != w[23:16] || txq[4] != w[15:8] || txq[5] != w[7:0]) begin
        failures++; $display("result %0d imag wrong", n);
      end
      repeat (6) void'(txq.pop_front());
    end
    checks++;
    if (runs != 16'(r + 1)) begin
      // the counter steps when the chain is idle and the last byte is out
      repeat (50) @(posedge clk);
      if (runs != 16'(r + 1)) begin failures++; $display("runs %0d", runs); end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk); #1 rst_n = 1;
    run(0);
    run(1);
    expect_start();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
