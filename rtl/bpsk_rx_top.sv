// bpsk_rx_top: bit-true BPSK receiver chain with run-time word length masks,
// reached over a serial link for hardware-in-the-loop word length search.
//
// Chain:  uart_rx -> hil_ctrl -> dm_coarse_freq -> mm_timing_sync ->
//         costas_loop -> hil_ctrl -> uart_tx
//   * dm_coarse_freq: delay-and-multiply coarse carrier offset removal
//     (Q8.16, 4 samples per symbol, whole packet buffered);
//   * mm_timing_sync: Mueller & Muller timing recovery, 4 samples per symbol
//     down to 1 (Q8.16);
//   * costas_loop: fine frequency / phase correction (Q8.12).  The four
//     lowest fraction bits of the timing output are dropped on the way in.
// Every masked operand of the chain has a byte register, loaded by the host
// at the start of each run, that clears that many fractional LSBs:
//   masks[13:0]  coarse frequency (8 own, rotate CORDIC x y z, atan CORDIC x y z)
//   masks[18:14] timing sync (x, y, mu, input, mmVal)
//   masks[26:19] Costas loop (phase, frequency, error, input, output,
//                rotate CORDIC x y z)
//
// The three blocks, their order, their fraction widths, the serial link at
// 9600 baud 8N1 and the run protocol follow the document, which built and
// measured each block on its own; joining them into one chain behind one
// serial link, the clock frequency and the packet length default (16
// preamble bits plus 10 bytes, 4 samples per symbol, 42-tap pulse shaping:
// 96 * 4 + 41 = 425 samples) are this design's choices.
//
// Beside the chain, and independent of it, sits costas_hil: the Costas loop
// alone behind a second serial link, the configuration the document ran in
// hardware-in-the-loop (81-sample packets, 8 masks).  It shares only the
// clock and reset.
//
// Interface: a clock, an active-low reset and the two serial lines; `runs`
// counts completed runs, and the offset estimate and the Costas loop state
// are brought out for observation.  The Costas loop's last flag is left
// open: a run ends when the whole chain is idle.
module bpsk_rx_top
  import fxp_pkg::*;
#(
  parameter int CLK_HZ      = 50_000_000,
  parameter int BAUD        = 9600,
  parameter int N_SAMPLES   = 425,
  parameter int MAX_SAMPLES = 512,
  parameter int SPS         = 4,
  parameter int ITER        = 16,
  parameter int FWL_DM      = 16,
  parameter int FWL_MM      = 16,
  parameter int FWL_CL      = 12,
  parameter int N_SAMPLES_HIL = 81
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        uart_rxd,
  output logic        uart_txd,
  output logic [15:0] runs,
  output logic signed [IWL+FWL_DM-1:0] dm_fs_error,  // coarse offset estimate, fsError
  output logic signed [IWL+FWL_CL-1:0] cl_phase,     // Costas loop phase
  output logic signed [IWL+FWL_CL-1:0] cl_freq,      // Costas loop frequency
  // Costas loop alone on its own serial link
  input  logic        hil_uart_rxd,
  output logic        hil_uart_txd,
  output logic [15:0] hil_runs,
  output logic signed [IWL+FWL_CL-1:0] hil_phase,
  output logic signed [IWL+FWL_CL-1:0] hil_freq
);
  localparam int N_MASKS = 27;
  localparam int W_DM = IWL + FWL_DM;
  localparam int W_MM = IWL + FWL_MM;
  localparam int W_CL = IWL + FWL_CL;

  logic       rx_valid, tx_valid, tx_ready;
  logic [7:0] rx_data, tx_data;

  uart_rx #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) u_rx (
    .clk, .rst_n, .rxd(uart_rxd), .valid(rx_valid), .data(rx_data));
  uart_tx #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) u_tx (
    .clk, .rst_n, .valid(tx_valid), .ready(tx_ready), .data(tx_data), .txd(uart_txd));

  mask_t [N_MASKS-1:0] masks;
  logic clear, chain_busy;

  // hil -> coarse frequency
  logic s_valid, s_ready, s_last;
  logic signed [W_DM-1:0] s_re, s_im;
  // coarse frequency -> timing
  logic d_valid, d_ready, d_last, d_busy;
  logic signed [W_DM-1:0] d_re, d_im;
  // timing -> Costas
  logic m_valid, m_ready, m_last, m_busy;
  logic signed [W_MM-1:0] m_re, m_im;
  // Costas -> hil
  logic c_valid, c_ready, c_busy;
  logic signed [W_CL-1:0] c_re, c_im;

  hil_ctrl #(.N_MASKS(N_MASKS), .N_SAMPLES(N_SAMPLES), .IN_FWL(FWL_DM), .OUT_FWL(FWL_CL)) u_hil (
    .clk, .rst_n,
    .rx_valid, .rx_data, .tx_valid, .tx_ready, .tx_data,
    .masks, .clear, .chain_busy,
    .s_valid, .s_ready, .s_re, .s_im, .s_last,
    .r_valid(c_valid), .r_ready(c_ready), .r_re(c_re), .r_im(c_im),
    .runs);

  dm_coarse_freq #(.W(W_DM), .FWL(FWL_DM), .SPS(SPS), .MAX_SAMPLES(MAX_SAMPLES), .ITER(ITER)) u_dm (
    .clk, .rst_n, .clear, .masks(masks[13:0]),
    .in_valid(s_valid), .in_ready(s_ready), .in_re(s_re), .in_im(s_im), .in_last(s_last),
    .out_valid(d_valid), .out_ready(d_ready), .out_re(d_re), .out_im(d_im), .out_last(d_last),
    .busy(d_busy), .fs_error(dm_fs_error));

  mm_timing_sync #(.W(W_MM), .FWL(FWL_MM), .SPS(SPS)) u_mm (
    .clk, .rst_n, .clear, .masks(masks[18:14]),
    .in_valid(d_valid), .in_ready(d_ready), .in_re(W_MM'(d_re) <<< (FWL_MM - FWL_DM)),
    .in_im(W_MM'(d_im) <<< (FWL_MM - FWL_DM)), .in_last(d_last),
    .out_valid(m_valid), .out_ready(m_ready), .out_re(m_re), .out_im(m_im), .out_last(m_last),
    .busy(m_busy));

  costas_loop #(.W(W_CL), .FWL(FWL_CL), .ITER(ITER)) u_cl (
    .clk, .rst_n, .clear, .masks(masks[26:19]),
    .in_valid(m_valid), .in_ready(m_ready),
    .in_re(W_CL'(m_re >>> (FWL_MM - FWL_CL))), .in_im(W_CL'(m_im >>> (FWL_MM - FWL_CL))),
    .in_last(m_last),
    .out_valid(c_valid), .out_ready(c_ready), .out_re(c_re), .out_im(c_im), .out_last(),
    .busy(c_busy), .phase(cl_phase), .freq(cl_freq));

  assign chain_busy = d_busy || m_busy || c_busy || d_valid || m_valid || c_valid;

  costas_hil #(.CLK_HZ(CLK_HZ), .BAUD(BAUD), .N_SAMPLES(N_SAMPLES_HIL), .ITER(ITER), .FWL(FWL_CL)) u_hil_cl (
    .clk, .rst_n, .uart_rxd(hil_uart_rxd), .uart_txd(hil_uart_txd), .runs(hil_runs),
    .phase(hil_phase), .freq(hil_freq));
endmodule
