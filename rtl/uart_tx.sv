// uart_tx: 8N1 asynchronous serial transmitter.
//
// Sends each byte as one start bit (0), eight data bits LSB first and one
// stop bit (1), every bit lasting CLK_HZ / BAUD clock cycles.  The line
// idles high.
//
// The 8N1 format and 9600 baud follow the document; the clock frequency is
// this design's choice.
//
// Interface: valid/ready; a byte is taken when both are high, and ready is
// low for the 10 bit times of its frame.
module uart_tx #(
  parameter int CLK_HZ = 50_000_000,
  parameter int BAUD   = 9600
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       valid,
  output logic       ready,
  input  logic [7:0] data,
  output logic       txd
);
  localparam int DIV = CLK_HZ / BAUD;
  localparam int TW  = $clog2(DIV + 1);

  logic [9:0]    sh;     // stop, data[7:0], start
  logic [3:0]    left;   // bits still to send
  logic [TW-1:0] tick;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh <= '1; left <= '0; tick <= '0;
    end else if (left == '0) begin
      if (valid) begin
        sh   <= {1'b1, data, 1'b0};
        left <= 4'd10;
        tick <= TW'(DIV - 1);
      end
    end else if (tick == '0) begin
      sh   <= {1'b1, sh[9:1]};
      left <= left - 1'b1;
      tick <= TW'(DIV - 1);
    end else begin
      tick <= tick - 1'b1;
    end
  end

  assign ready = (left == '0);
  assign txd   = (left == '0) ? 1'b1 : sh[0];
endmodule
