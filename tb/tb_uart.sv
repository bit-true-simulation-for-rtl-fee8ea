// tb_uart: self-checking test of the 8N1 serial transmitter and receiver.
// uart_tx drives uart_rx through a wire.  Random bytes are sent back to back;
// each must arrive unchanged, each frame on the line must last exactly 10
// bit times (start bit low, stop bit high), and a frame with a broken stop
// bit must be dropped by the receiver.  A small divider (CLK_HZ = 16 * BAUD)
// keeps the run short.
module tb_uart;
  localparam int BAUD = 9600, CLK_HZ = 16 * 9600, DIV = CLK_HZ / BAUD;
  logic clk = 0, rst_n = 0;
  logic tx_valid = 0, tx_ready, txd, rx_valid, line;
  logic [7:0] tx_data = 0, rx_data;
  logic inject = 0, inj_val = 1;
  int checks = 0, failures = 0;
  byte unsigned sent[$];

  uart_tx #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) u_tx (.clk, .rst_n, .valid(tx_valid), .ready(tx_ready),
                                               .data(tx_data), .txd);
  uart_rx #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) u_rx (.clk, .rst_n, .rxd(line), .valid(rx_valid),
                                               .data(rx_data));
  assign line = inject ? inj_val : txd;

  always #5 clk = ~clk;

  // receiver side: compare every byte
  always @(posedge clk) if (rx_valid) begin
    checks++;
    if (sent.size() == 0 || rx_data != sent[0]) begin
      failures++;
      $display("received %h, expected %h", rx_data, sent.size() ? sent[0] : 8'h00);
    end
    if (sent.size()) void'(sent.pop_front());
  end

  // line side: a frame keeps the transmitter busy for exactly 10 bit times
  int start_t = -1, cyc = 0;
  logic ready_q = 1;
  always @(posedge clk) begin
    cyc++;
    ready_q <= tx_ready;
    if (tx_ready && !ready_q && start_t >= 0 && start_t < cyc) begin
      checks++;
      if (cyc - start_t != 10 * DIV + 1) begin
        failures++;
        $display("frame lasted %0d cycles", cyc - start_t - 1);
      end
    end
    if (tx_valid && tx_ready) start_t = cyc;
  end

  initial begin
    repeat (3) @(posedge clk); #1 rst_n = 1;
    repeat (40) begin
      tx_data = 8'($urandom); tx_valid = 1;
      sent.push_back(tx_data);
      @(posedge clk); while (!tx_ready) @(posedge clk);
      #1 tx_valid = 0;
      @(posedge clk); #1;
    end
    // wait until the last byte is in
    repeat (12 * DIV) @(posedge clk);
    checks++;
    if (sent.size() != 0) begin failures++; $display("%0d bytes lost", sent.size()); end
    // a frame whose stop bit is low must not be delivered
    inject = 1;
    inj_val = 0; repeat (9 * DIV) @(posedge clk);   // start bit + 8 zero bits
    inj_val = 0; repeat (DIV) @(posedge clk);       // broken stop bit
    inj_val = 1; repeat (3 * DIV) @(posedge clk);
    checks++;   // the rx checker above would flag any byte (queue is empty)
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
