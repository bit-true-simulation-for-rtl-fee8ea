// dm_coarse_freq: delay-and-multiply coarse frequency offset estimator and
// corrector, with run-time bit masks on its operands.
//
// The block receives one packet of complex baseband samples (SPS samples per
// symbol), stores it, estimates the carrier frequency offset from the
// preamble and sends the whole packet out again with the offset removed.
//
// How it works:
//   1. LOAD: every sample is written to the packet buffer.  For the first
//      ACC_LEN sample pairs the block accumulates
//          acc += current * conj(last)
//      whose argument is the phase advance of the carrier per sample.
//   2. ATAN: a vectoring CORDIC returns arg(acc).
//   3. The offset in sample-rate units is fsError = (SPS / 2pi) * arg(acc);
//      the correction rotates by -(2pi / SPS) * fsError per sample.
//   4. OUT/ROT: a fix vector starts at 1 + j0.  Each buffered sample is
//      multiplied by it and sent out, and the rotation-mode CORDIC turns the
//      fix vector one step further to give the fix vector of the next sample.
// Eight operands are limited by masks, in the document's order:
//   masks[0] currentSample  masks[1] lastSample  masks[2] accumSample
//   masks[3] fsError        masks[4] input       masks[5] output
//   masks[6] xFix           masks[7] yFix
// followed by the rotate CORDIC [x, y, z] in masks[10:8] and the arctangent
// CORDIC [x, y, z] in masks[13:11].
//
// The algorithm, the 14 masked signals, the FFT-free arctangent CORDIC and
// the recursively rotated fix vector follow the document, as does ACC_LEN =
// 12 samples per symbol times SPS.  The buffer depth, the handshakes and the
// reset of the estimate at every packet are this design's choices.
//
// Interface: valid/ready/last streams in and out; `clear` drops a packet
// being loaded.  Timing: one sample per cycle while loading, ITER + 2
// cycles for the arctangent after the last input, then one output sample
// every ITER + 4 cycles (the rotate CORDIC runs between outputs).
// Samples beyond MAX_SAMPLES are accepted but not stored.
module dm_coarse_freq
  import fxp_pkg::*;
#(
  parameter int W           = 24,
  parameter int FWL         = 16,
  parameter int SPS         = 4,
  parameter int ACC_LEN     = 12 * SPS,
  parameter int MAX_SAMPLES = 512,
  parameter int ITER        = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clear,
  input  mask_t [13:0]         masks,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic signed [W-1:0]  in_re,
  input  logic signed [W-1:0]  in_im,
  input  logic                 in_last,
  output logic                 out_valid,
  input  logic                 out_ready,
  output logic signed [W-1:0]  out_re,
  output logic signed [W-1:0]  out_im,
  output logic                 out_last,
  output logic                 busy,
  output logic signed [W-1:0]  fs_error   // last offset estimate, fsError
);
  localparam int AW = $clog2(MAX_SAMPLES);
  localparam int CW = AW + 1;
  localparam logic signed [W-1:0] ONE     = W'(real_q(1.0, FWL));
  localparam logic signed [W-1:0] C_FSERR = W'(real_q(real'(SPS) / (2.0 * PI), FWL));
  localparam logic signed [W-1:0] C_ROT   = W'(real_q(2.0 * PI / real'(SPS), FWL));

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

  typedef enum logic [2:0] {LOAD, ATAN, ATAN_WAIT, FSERR, OUT, ROT, ROT_WAIT} state_t;
  state_t state;

  logic [W-1:0]        mem_re [MAX_SAMPLES];
  logic [W-1:0]        mem_im [MAX_SAMPLES];
  logic [CW-1:0]       cnt, oidx;
  logic signed [W-1:0] last_re, last_im, acc_re, acc_im;
  logic signed [W-1:0] fix_re, fix_im, rot_z, fserr;

  // ---- accumulation of current * conj(last) ----------------------------
  logic signed [W-1:0] cur_re_l, cur_im_l, last_re_l, last_im_l, acc_re_n, acc_im_n;
  always_comb begin
    cur_re_l  = lim(in_re,   masks[0]);
    cur_im_l  = lim(in_im,   masks[0]);
    last_re_l = lim(last_re, masks[1]);
    last_im_l = lim(last_im, masks[1]);
    acc_re_n  = lim(acc_re + fmul(cur_re_l, last_re_l) + fmul(cur_im_l, last_im_l), masks[2]);
    acc_im_n  = lim(acc_im + fmul(cur_im_l, last_re_l) - fmul(cur_re_l, last_im_l), masks[2]);
  end

  // ---- arctangent CORDIC ------------------------------------------------
  logic atan_in_ready, atan_out_valid;
  logic signed [W-1:0] atan_z;
  cordic_atan #(.W(W), .FWL(FWL), .ITER(ITER)) u_atan (
    .clk, .rst_n,
    .in_valid (state == ATAN), .in_ready (atan_in_ready),
    .x_in (acc_re), .y_in (acc_im),
    .mask_x (masks[11]), .mask_y (masks[12]), .mask_z (masks[13]),
    .out_valid (atan_out_valid), .out_ready (state == ATAN_WAIT),
    .z_out (atan_z)
  );

  // ---- rotation CORDIC for the fix vector ------------------------------
  logic rot_in_ready, rot_out_valid;
  logic signed [W-1:0] rot_x, rot_y;
  cordic_rotate #(.W(W), .FWL(FWL), .ITER(ITER)) u_rot (
    .clk, .rst_n,
    .in_valid (state == ROT), .in_ready (rot_in_ready),
    .x_in (fix_re), .y_in (fix_im), .z_in (rot_z),
    .mask_x (masks[8]), .mask_y (masks[9]), .mask_z (masks[10]),
    .out_valid (rot_out_valid), .out_ready (state == ROT_WAIT),
    .x_out (rot_x), .y_out (rot_y)
  );

  // ---- correction of one buffered sample --------------------------------
  logic signed [W-1:0] rd_re, rd_im, fsr_n;
  assign rd_re = lim(mem_re[oidx[AW-1:0]], masks[4]);
  assign rd_im = lim(mem_im[oidx[AW-1:0]], masks[4]);
  assign out_re = lim(fmul(rd_re, fix_re) - fmul(rd_im, fix_im), masks[5]);
  assign out_im = lim(fmul(rd_re, fix_im) + fmul(rd_im, fix_re), masks[5]);
  assign fsr_n  = lim(fmul(atan_z, C_FSERR), masks[3]);

  always_ff @(posedge clk)
    if (state == LOAD && in_valid && int'(cnt) < MAX_SAMPLES) begin
      mem_re[cnt[AW-1:0]] <= in_re;
      mem_im[cnt[AW-1:0]] <= in_im;
    end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= LOAD;
      cnt <= '0; oidx <= '0;
      last_re <= '0; last_im <= '0; acc_re <= '0; acc_im <= '0;
      fix_re <= '0; fix_im <= '0; rot_z <= '0; fserr <= '0;
    end else if (clear) begin
      state <= LOAD;
      cnt <= '0; oidx <= '0; acc_re <= '0; acc_im <= '0;
    end else begin
      case (state)
        LOAD: if (in_valid) begin
          if (int'(cnt) < MAX_SAMPLES) cnt <= cnt + 1'b1;
          last_re <= in_re;
          last_im <= in_im;
          if (cnt != '0 && int'(cnt) <= ACC_LEN) begin
            acc_re <= acc_re_n;
            acc_im <= acc_im_n;
          end
          if (in_last) state <= ATAN;
        end
        ATAN:      if (atan_in_ready) state <= ATAN_WAIT;
        ATAN_WAIT: if (atan_out_valid) begin
          fserr <= fsr_n;
          state <= FSERR;
        end
        FSERR: begin
          rot_z  <= -fmul(fserr, C_ROT);
          fix_re <= lim(ONE, masks[6]);
          fix_im <= '0;
          oidx   <= '0;
          state  <= OUT;
        end
        OUT: if (out_ready) begin
          if (oidx + 1'b1 >= cnt) begin
            state  <= LOAD;
            cnt    <= '0;
            acc_re <= '0;
            acc_im <= '0;
          end else begin
            oidx  <= oidx + 1'b1;
            state <= ROT;
          end
        end
        ROT:      if (rot_in_ready) state <= ROT_WAIT;
        ROT_WAIT: if (rot_out_valid) begin
          fix_re <= lim(rot_x, masks[6]);
          fix_im <= lim(rot_y, masks[7]);
          state  <= OUT;
        end
        default: state <= LOAD;
      endcase
    end
  end

  assign in_ready  = (state == LOAD);
  assign out_valid = (state == OUT);
  assign out_last  = (oidx + 1'b1 >= cnt);
  assign busy      = (state != LOAD) || (cnt != '0);
  assign fs_error  = fserr;
endmodule
