// uart_rx: 8N1 asynchronous serial receiver.
//
// Receives one start bit (0), eight data bits LSB first and one stop bit
// (1) at BAUD bits per second from a clock of CLK_HZ.  The line is
// synchronised with two flip-flops; a falling edge starts a frame, the start
// bit is checked half a bit later, and each data bit is sampled in the
// middle of its bit time.  A frame whose stop bit is 0 is dropped.
//
// The 8N1 format and the 9600 baud rate follow the document; the clock
// frequency and the mid-bit sampling scheme are this design's choices.
//
// Interface: `valid` is a one-cycle pulse with the received byte on `data`,
// about 9.5 bit times after the start edge.  There is no back-pressure.
module uart_rx #(
  parameter int CLK_HZ = 50_000_000,
  parameter int BAUD   = 9600
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rxd,
  output logic       valid,
  output logic [7:0] data
);
  localparam int DIV = CLK_HZ / BAUD;
  localparam int TW  = $clog2(DIV + 1);

  typedef enum logic [1:0] {IDLE, START, DATA, STOP} state_t;
  state_t state;

  logic [1:0]    sync;
  logic [TW-1:0] tick;
  logic [2:0]    bitn;
  logic [7:0]    sh;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync <= 2'b11; state <= IDLE; tick <= '0; bitn <= '0; sh <= '0;
      valid <= 1'b0; data <= '0;
    end else begin
      sync  <= {sync[0], rxd};
      valid <= 1'b0;
      case (state)
        IDLE: if (!sync[1]) begin
          state <= START;
          tick  <= TW'(DIV / 2);
        end
        START: if (tick == '0) begin
          if (!sync[1]) begin
            state <= DATA; tick <= TW'(DIV - 1); bitn <= '0;
          end else state <= IDLE;
        end else tick <= tick - 1'b1;
        DATA: if (tick == '0) begin
          sh   <= {sync[1], sh[7:1]};
          tick <= TW'(DIV - 1);
          bitn <= bitn + 1'b1;
          if (bitn == 3'd7) state <= STOP;
        end else tick <= tick - 1'b1;
        STOP: if (tick == '0) begin
          state <= IDLE;
          if (sync[1]) begin
            valid <= 1'b1;
            data  <= sh;
          end
        end else tick <= tick - 1'b1;
      endcase
    end
  end
endmodule
