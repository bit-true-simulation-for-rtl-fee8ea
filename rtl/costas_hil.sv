// costas_hil: the Costas loop alone behind its own serial link, for
// hardware-in-the-loop word length search on a small FPGA.
//
// A host computer runs the word length search and uses this circuit in
// place of a software bit-true model of the Costas loop.  Each run goes:
//   1. five start bytes come out, and the loop state is cleared;
//   2. the host sends the 8 mask bytes of the loop: phase, frequency,
//      error, input, output, then the rotate CORDIC x, y, z;
//   3. the host sends N_SAMPLES complex samples at one sample per symbol,
//      6 bytes each (real then imaginary; integer byte, two fraction bytes);
//   4. every corrected sample goes back in the same format.
// The loop works in Q8.12, so the low nibble of the 16-bit wire fraction is
// dropped on the way in and sent as zeros on the way out.
//
// The Costas-only configuration, the 81-sample test packet, the 8 masks,
// the 9600 baud 8N1 link and the order of a run follow the document's
// hardware-in-the-loop setup.  The clock frequency, the start byte value
// and the end-of-run rule (loop idle and transmitter empty) are this
// design's choices, shared with the full receiver.
//
// The loop's last flag is left open: the end of a run is taken from the
// idle loop instead.
//
// Interface: clock, active-low reset, the two serial lines; `runs` counts
// completed runs, `phase` and `freq` show the loop state.  Timing: the
// serial link sets the pace, 10 bit times per byte; the loop needs ITER + 4
// clocks per sample.
module costas_hil
  import fxp_pkg::*;
#(
  parameter int CLK_HZ    = 50_000_000,
  parameter int BAUD      = 9600,
  parameter int N_SAMPLES = 81,
  parameter int ITER      = 16,
  parameter int FWL       = 12
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     uart_rxd,
  output logic                     uart_txd,
  output logic [15:0]              runs,
  output logic signed [IWL+FWL-1:0] phase,
  output logic signed [IWL+FWL-1:0] freq
);
  localparam int N_MASKS = 8;
  localparam int W = IWL + FWL;

  logic       rx_valid, tx_valid, tx_ready;
  logic [7:0] rx_data, tx_data;

  uart_rx #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) u_rx (
    .clk, .rst_n, .rxd(uart_rxd), .valid(rx_valid), .data(rx_data));
  uart_tx #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) u_tx (
    .clk, .rst_n, .valid(tx_valid), .ready(tx_ready), .data(tx_data), .txd(uart_txd));

  mask_t [N_MASKS-1:0] masks;
  logic clear, busy;
  logic s_valid, s_ready, s_last, c_valid, c_ready;
  logic signed [W-1:0] s_re, s_im, c_re, c_im;

  hil_ctrl #(.N_MASKS(N_MASKS), .N_SAMPLES(N_SAMPLES), .IN_FWL(FWL), .OUT_FWL(FWL)) u_hil (
    .clk, .rst_n,
    .rx_valid, .rx_data, .tx_valid, .tx_ready, .tx_data,
    .masks, .clear, .chain_busy(busy || c_valid),
    .s_valid, .s_ready, .s_re, .s_im, .s_last,
    .r_valid(c_valid), .r_ready(c_ready), .r_re(c_re), .r_im(c_im),
    .runs);

  costas_loop #(.W(W), .FWL(FWL), .ITER(ITER)) u_cl (
    .clk, .rst_n, .clear, .masks,
    .in_valid(s_valid), .in_ready(s_ready), .in_re(s_re), .in_im(s_im), .in_last(s_last),
    .out_valid(c_valid), .out_ready(c_ready), .out_re(c_re), .out_im(c_im), .out_last(),
    .busy, .phase, .freq);
endmodule
