// costas_loop: BPSK Costas loop for fine frequency and phase correction,
// with run-time bit masks on its operands.
//
// Input and output: complex samples at one sample per symbol.  Each sample
// is rotated back by the loop's phase estimate; the loop drives the
// imaginary part of the output towards zero so that the BPSK symbols lie on
// the real axis.
//
// How it works, per sample:
//     out   = input * exp(-j*phase)       (rotation-mode CORDIC)
//     error = real(out) * imag(out)
//     freq  = freq + BETA * error
//     phase = phase + freq + ALPHA * error, wrapped into -pi..pi
// Masks, in the document's order: masks[0] phase, masks[1] frequency,
// masks[2] error, masks[3] input, masks[4] output, then the rotate CORDIC
// [x, y, z] in masks[7:5].
//
// The loop equations, the gains ALPHA = 0.0132 and BETA = 0.00932, the use
// of the same rotation CORDIC as the coarse corrector and the eight masked
// signals follow the document.  Wrapping the phase into -pi..pi (the range
// of the CORDIC) and clearing the loop state with `clear` are this design's
// choices.
//
// Interface: valid/ready streams with a last flag passed through.  Timing:
// one sample at a time; the output is valid ITER + 4 cycles after the input
// is accepted, and the next input is taken once the output is consumed.
module costas_loop
  import fxp_pkg::*;
#(
  parameter int  W     = 20,
  parameter int  FWL   = 12,
  parameter int  ITER  = 16,
  parameter real ALPHA = 0.0132,
  parameter real BETA  = 0.00932
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                clear,
  input  mask_t [7:0]         masks,
  input  logic                in_valid,
  output logic                in_ready,
  input  logic signed [W-1:0] in_re,
  input  logic signed [W-1:0] in_im,
  input  logic                in_last,
  output logic                out_valid,
  input  logic                out_ready,
  output logic signed [W-1:0] out_re,
  output logic signed [W-1:0] out_im,
  output logic                out_last,
  output logic                busy,
  output logic signed [W-1:0] phase,
  output logic signed [W-1:0] freq
);
  localparam logic signed [W-1:0] ALPHA_Q = W'(real_q(ALPHA, FWL));
  localparam logic signed [W-1:0] BETA_Q  = W'(real_q(BETA, FWL));
  localparam logic signed [W-1:0] PI_Q    = W'(real_q(PI, FWL));
  localparam logic signed [W-1:0] TWO_PI  = W'(real_q(2.0 * PI, FWL));

  function automatic logic signed [W-1:0] fmul(logic signed [W-1:0] a, logic signed [W-1:0] b);
    logic signed [2*W-1:0] p;
    p = a * b;
    return W'(p >>> FWL);
  endfunction

  function automatic logic signed [W-1:0] lim(logic signed [W-1:0] v, mask_t n);
    logic [W-1:0] m;
    for (int b = 0; b < W; b++) m[b] = !((b < FWL) && (b < int'(n)));
    return v & m;
  endfunction

  typedef enum logic [1:0] {IDLE, ROT, ROT_WAIT, OUT} state_t;
  state_t state;

  logic signed [W-1:0] s_re, s_im;
  logic                last_q;

  logic rot_in_ready, rot_out_valid;
  logic signed [W-1:0] rot_x, rot_y;
  cordic_rotate #(.W(W), .FWL(FWL), .ITER(ITER)) u_rot (
    .clk, .rst_n,
    .in_valid (state == ROT), .in_ready (rot_in_ready),
    .x_in (s_re), .y_in (s_im), .z_in (-phase),
    .mask_x (masks[5]), .mask_y (masks[6]), .mask_z (masks[7]),
    .out_valid (rot_out_valid), .out_ready (state == ROT_WAIT),
    .x_out (rot_x), .y_out (rot_y)
  );

  logic signed [W-1:0] o_re, o_im, err, freq_n, ph_sum, phase_n;
  always_comb begin
    o_re    = lim(rot_x, masks[4]);
    o_im    = lim(rot_y, masks[4]);
    err     = lim(fmul(o_re, o_im), masks[2]);
    freq_n  = lim(freq + fmul(BETA_Q, err), masks[1]);
    ph_sum  = phase + freq_n + fmul(ALPHA_Q, err);
    if (ph_sum > PI_Q)        ph_sum = ph_sum - TWO_PI;
    else if (ph_sum < -PI_Q)  ph_sum = ph_sum + TWO_PI;
    phase_n = lim(ph_sum, masks[0]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE;
      s_re <= '0; s_im <= '0; last_q <= 1'b0;
      phase <= '0; freq <= '0; out_re <= '0; out_im <= '0;
    end else if (clear) begin
      state <= IDLE;
      phase <= '0; freq <= '0;
    end else begin
      case (state)
        IDLE: if (in_valid) begin
          s_re   <= lim(in_re, masks[3]);
          s_im   <= lim(in_im, masks[3]);
          last_q <= in_last;
          state  <= ROT;
        end
        ROT:      if (rot_in_ready) state <= ROT_WAIT;
        ROT_WAIT: if (rot_out_valid) begin
          out_re <= o_re;
          out_im <= o_im;
          freq   <= freq_n;
          phase  <= phase_n;
          state  <= OUT;
        end
        OUT: if (out_ready) state <= IDLE;
      endcase
    end
  end

  assign in_ready  = (state == IDLE);
  assign out_valid = (state == OUT);
  assign out_last  = last_q;
  assign busy      = (state != IDLE);
endmodule
