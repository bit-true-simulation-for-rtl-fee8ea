// hil_ctrl: serial protocol controller for hardware-in-the-loop runs.
//
// It lets a host computer load the bit masks of the receiver, stream in one
// packet of samples and read back the processed samples over a byte-wide
// serial link (uart_rx / uart_tx), so that a word length search can run
// without re-synthesis.
//
// One run:
//   1. the controller sends N_START bytes of START_BYTE to signal that it is
//      ready, and pulses `clear` to reset the receiver chain;
//   2. the host sends N_MASKS bytes, one per masked operand, giving the
//      number of fractional LSBs to clear;
//   3. the host sends N_SAMPLES complex samples, real part first, each part
//      as three bytes: the signed integer byte, then two fraction bytes,
//      most significant first (Q8.16, fraction left-aligned so that a fraction
//      of 8 bits or less leaves the third byte zero).  The last sample is
//      flagged `last` to the chain;
//   4. every result sample of the chain is sent back in the same 6-byte
//      format as soon as it appears;
//   5. when the chain is idle and all bytes are out, the next run starts.
//
// The five start bytes, one byte per mask, the 3-byte sample format and the
// real-first order follow the document.  The value of the start byte and
// the end-of-run rule are this design's choices.
//
// Timing: limited by the serial link, 10 bit times per byte.
//
// An assertion checks the sample handshake: s_valid stays high, with the
// sample unchanged, until it is taken.  It is disabled during reset, which
// makes the reset look synchronous as well as asynchronous to a linter; the
// flip-flops themselves use it only asynchronously.
module hil_ctrl
  import fxp_pkg::*;
#(
  parameter int         N_MASKS    = 27,
  parameter int         N_SAMPLES  = 425,
  parameter int         N_START    = 5,
  parameter logic [7:0] START_BYTE = 8'hA5,
  parameter int         IN_FWL     = 16,   // fraction bits of samples to the chain
  parameter int         OUT_FWL    = 12,   // fraction bits of samples from the chain
  parameter int         W_IN       = IWL + IN_FWL,
  parameter int         W_OUT      = IWL + OUT_FWL
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // serial byte streams
  input  logic                    rx_valid,
  input  logic [7:0]              rx_data,
  output logic                    tx_valid,
  input  logic                    tx_ready,
  output logic [7:0]              tx_data,
  // receiver chain control
  output mask_t [N_MASKS-1:0]     masks,
  output logic                    clear,
  input  logic                    chain_busy,
  // samples to the chain
  output logic                    s_valid,
  input  logic                    s_ready,
  output logic signed [W_IN-1:0]  s_re,
  output logic signed [W_IN-1:0]  s_im,
  output logic                    s_last,
  // results from the chain
  input  logic                    r_valid,
  output logic                    r_ready,
  input  logic signed [W_OUT-1:0] r_re,
  input  logic signed [W_OUT-1:0] r_im,
  // run counter, for observation
  output logic [15:0]             runs
);
  localparam int WIRE_FWL = 16;
  localparam int SCW = $clog2(N_SAMPLES + 1);
  localparam int MCW = $clog2(N_MASKS + 1);

  typedef enum logic [1:0] {START, MASKS, SAMPLES, DRAIN} state_t;
  state_t state;

  logic [2:0]       nstart;   // start bytes sent
  logic [MCW-1:0]   nmask;
  logic [SCW-1:0]   nsamp;
  logic [2:0]       nbyte;    // byte of the current sample, 0..5
  logic [4:0][7:0]  rbuf;     // received bytes of one sample
  logic [5:0][7:0]  tbuf;     // result bytes still to send
  logic [2:0]       tleft;

  // wire word (Q8.16) to chain format and back
  // (the sixth byte is taken straight from the receiver)
  logic signed [23:0] w_re, w_im;
  assign w_re = {rbuf[0], rbuf[1], rbuf[2]};
  assign w_im = {rbuf[3], rbuf[4], rx_data};

  logic [23:0] o_re, o_im;
  assign o_re = 24'(r_re) << (WIRE_FWL - OUT_FWL);
  assign o_im = 24'(r_im) << (WIRE_FWL - OUT_FWL);

  assign r_ready = (tleft == '0) && (state != START);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= START; nstart <= '0; nmask <= '0; nsamp <= '0; nbyte <= '0;
      rbuf <= '0; tbuf <= '0; tleft <= '0; masks <= '0;
      s_valid <= 1'b0; s_last <= 1'b0; clear <= 1'b0; runs <= '0;
      s_re <= '0; s_im <= '0;
    end else begin
      clear <= 1'b0;
      if (s_valid && s_ready) s_valid <= 1'b0;
      // result path
      if (r_valid && r_ready) begin
        tbuf  <= {o_im[7:0], o_im[15:8], o_im[23:16], o_re[7:0], o_re[15:8], o_re[23:16]};
        tleft <= 3'd6;
      end else if (tleft != '0 && tx_ready && state != START) begin
        tbuf  <= tbuf >> 8;
        tleft <= tleft - 1'b1;
      end
      case (state)
        START: if (tx_ready) begin
          if (int'(nstart) == N_START - 1) begin
            nstart <= '0;
            nmask  <= '0;
            clear  <= 1'b1;
            state  <= MASKS;
          end else nstart <= nstart + 1'b1;
        end
        MASKS: if (rx_valid) begin
          masks[nmask] <= rx_data;
          nmask <= nmask + 1'b1;
          if (int'(nmask) == N_MASKS - 1) begin
            nsamp <= '0; nbyte <= '0;
            state <= SAMPLES;
          end
        end
        SAMPLES: if (rx_valid) begin
          if (nbyte != 3'd5) rbuf[nbyte] <= rx_data;
          if (nbyte == 3'd5) begin
            nbyte   <= '0;
            s_re    <= W_IN'(w_re >>> (WIRE_FWL - IN_FWL));
            s_im    <= W_IN'(w_im >>> (WIRE_FWL - IN_FWL));
            s_valid <= 1'b1;
            s_last  <= (int'(nsamp) == N_SAMPLES - 1);
            nsamp   <= nsamp + 1'b1;
            if (int'(nsamp) == N_SAMPLES - 1) state <= DRAIN;
          end else nbyte <= nbyte + 1'b1;
        end
        DRAIN: if (!s_valid && !chain_busy && !r_valid && tleft == '0 && tx_ready) begin
          state <= START;
          runs  <= runs + 1'b1;
        end
      endcase
    end
  end

  always_comb begin
    if (state == START) begin
      tx_valid = 1'b1;
      tx_data  = START_BYTE;
    end else begin
      tx_valid = (tleft != '0);
      tx_data  = tbuf[0];
    end
  end

  // a sample offered to the chain stays until it is taken
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
                           s_valid && !s_ready |=> s_valid && $stable(s_re) && $stable(s_im));
endmodule
