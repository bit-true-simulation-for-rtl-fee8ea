// mm_timing_sync: Mueller & Muller symbol timing recovery with run-time bit
// masks on its operands.
//
// Input: complex samples at SPS samples per symbol.  Output: one complex
// sample per symbol, the input sample the loop picks as the best sampling
// instant.  The block is a decimator whose step varies around SPS.
//
// How it works, for each picked sample out[n] (with rail[n] = (re > 0) +
// j(im > 0), a 0/1 hard decision on each axis):
//     x      = (rail[n] - rail[n-2]) * conj(out[n-1])
//     y      = (out[n]  - out[n-2])  * conj(rail[n-1])
//     mmVal  = real(y - x)
//     mu     = mu + SPS + MU_GAIN * mmVal
//     step   = floor(mu),  mu = mu - step
// and the next picked sample is `step` input samples later.  Only the real
// parts of x and y reach the output, so only they are computed.  Masks, in
// the document's order: masks[0] x, masks[1] y, masks[2] mu,
// masks[3] input, masks[4] mmVal.
//
// The equations, the gain 0.3 and the choice of picking an input sample
// without interpolation follow the document.  Streaming the input (skipping
// step - 1 samples instead of indexing a stored packet), forcing step to at
// least 1, and clearing the loop state after the last sample of a packet are
// this design's choices.
//
// Interface: valid/ready/last streams.  Timing: one input sample per cycle;
// a picked sample appears on the output register one cycle after it is
// accepted.  out_last marks the picked sample taken from the last input, if
// that sample is picked.
module mm_timing_sync
  import fxp_pkg::*;
#(
  parameter int  W       = 24,
  parameter int  FWL     = 16,
  parameter int  SPS     = 4,
  parameter real MU_GAIN = 0.3
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                clear,
  input  mask_t [4:0]         masks,
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
  output logic                busy
);
  localparam logic signed [W-1:0] GAIN  = W'(real_q(MU_GAIN, FWL));
  localparam logic signed [W-1:0] SPS_Q = W'(real_q(real'(SPS), FWL));
  localparam logic signed [W-1:0] ONE   = W'(real_q(1.0, FWL));

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

  // value (0 or 1) of a rail bit in fixed point
  function automatic logic signed [W-1:0] rv(logic b);
    return b ? ONE : '0;
  endfunction

  logic signed [W-1:0] o1_re, o1_im, o2_re, o2_im;   // out[n-1], out[n-2]
  logic                r1_re, r1_im, r2_re, r2_im;   // rail[n-1], rail[n-2]
  logic signed [W-1:0] mu;
  logic [W-FWL-1:0]    skip;                          // samples to drop

  logic signed [W-1:0] s_re, s_im, x_re, y_re, mmval, mu_n, mu_frac;
  logic                rr, ri;
  logic signed [W-FWL-1:0] step;
  localparam logic signed [W-FWL-1:0] STEP_ONE = 1;

  always_comb begin
    s_re = lim(in_re, masks[3]);
    s_im = lim(in_im, masks[3]);
    rr   = (s_re > 0);
    ri   = (s_im > 0);
    x_re = lim(fmul(rv(rr) - rv(r2_re), o1_re) + fmul(rv(ri) - rv(r2_im), o1_im), masks[0]);
    y_re = lim(fmul(s_re - o2_re, rv(r1_re)) + fmul(s_im - o2_im, rv(r1_im)), masks[1]);
    mmval = lim(y_re - x_re, masks[4]);
    mu_n  = lim(mu + SPS_Q + fmul(GAIN, mmval), masks[2]);
    step  = mu_n[W-1:FWL];
    mu_frac = {{(W-FWL){1'b0}}, mu_n[FWL-1:0]};
  end

  logic take;
  assign in_ready = !out_valid || out_ready;
  assign take     = in_valid && in_ready && (skip == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      o1_re <= '0; o1_im <= '0; o2_re <= '0; o2_im <= '0;
      r1_re <= 1'b0; r1_im <= 1'b0; r2_re <= 1'b0; r2_im <= 1'b0;
      mu <= '0; skip <= '0;
      out_valid <= 1'b0; out_re <= '0; out_im <= '0; out_last <= 1'b0;
    end else if (clear) begin
      o1_re <= '0; o1_im <= '0; o2_re <= '0; o2_im <= '0;
      r1_re <= 1'b0; r1_im <= 1'b0; r2_re <= 1'b0; r2_im <= 1'b0;
      mu <= '0; skip <= '0; out_valid <= 1'b0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (in_valid && in_ready) begin
        if (take) begin
          out_valid <= 1'b1;
          out_re    <= s_re;
          out_im    <= s_im;
          out_last  <= in_last;
          o2_re <= o1_re; o2_im <= o1_im; o1_re <= s_re; o1_im <= s_im;
          r2_re <= r1_re; r2_im <= r1_im; r1_re <= rr;   r1_im <= ri;
          mu    <= mu_frac;
          skip  <= (step < 1) ? '0 : $unsigned(step - STEP_ONE);
        end else begin
          skip <= skip - 1'b1;
        end
        if (in_last) begin
          // end of packet: restart the loop for the next one
          o1_re <= '0; o1_im <= '0; o2_re <= '0; o2_im <= '0;
          r1_re <= 1'b0; r1_im <= 1'b0; r2_re <= 1'b0; r2_im <= 1'b0;
          mu <= '0; skip <= '0;
        end
      end
    end
  end

  assign busy = out_valid;
endmodule
