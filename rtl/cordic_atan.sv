// cordic_atan: iterative CORDIC in vectoring (arctangent) mode with run-time
// bit masks.
//
// Returns z_out = atan2(y_in, x_in) in radians (range -pi..pi), the argument
// of the complex value x_in + j*y_in.
//
// How it works: both inputs are first halved (the argument does not change,
// and the CORDIC gain of about 1.65 then cannot overflow the integer part).
// A vector in the left half-plane is turned by -+90 degrees into the right
// half-plane and z starts at +-pi/2.  Each clock cycle one micro-rotation
// drives y towards zero and accumulates the rotated angle atan(2^-i) in z.
// The working registers x, y, z pass through bit-mask limiters (masks
// mask_x, mask_y, mask_z) on load and after every micro-rotation.
//
// The use of an arctangent-mode CORDIC and its [x, y, z] mask set follow the
// document; the iterative structure, the iteration count, the input halving
// and the half-plane pre-rotation are this design's choices.
//
// Interface: valid/ready handshakes on input and output.  Timing: an input
// accepted in cycle t gives out_valid in cycle t + ITER + 1.
module cordic_atan
  import fxp_pkg::*;
#(
  parameter int W    = 24,
  parameter int FWL  = 16,
  parameter int ITER = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  output logic                in_ready,
  input  logic signed [W-1:0] x_in,
  input  logic signed [W-1:0] y_in,
  input  mask_t               mask_x,
  input  mask_t               mask_y,
  input  mask_t               mask_z,
  output logic                out_valid,
  input  logic                out_ready,
  output logic signed [W-1:0] z_out
);
  localparam logic signed [W-1:0] HALF_PI = W'(real_q(PI / 2.0, FWL));
  localparam int CW = (ITER > 1) ? $clog2(ITER) : 1;

  typedef enum logic [1:0] {IDLE, ITERATE, DONE} state_t;
  state_t state;

  logic signed [W-1:0] x, y, z;
  logic [CW-1:0]       i;

  // micro-rotation angles atan(2^-i), computed during elaboration
  typedef logic signed [W-1:0] tab_t [ITER];
  function automatic tab_t mk_tab();
    tab_t t;
    for (int k = 0; k < ITER; k++) t[k] = W'(atan_q(k, FWL));
    return t;
  endfunction
  localparam tab_t ATAN_TAB = mk_tab();

  logic signed [W-1:0] atan_i;
  assign atan_i = ATAN_TAB[i];

  // halving and half-plane pre-rotation
  logic signed [W-1:0] xh, yh, x_pre, y_pre, z_pre;
  always_comb begin
    xh = x_in >>> 1;
    yh = y_in >>> 1;
    if (!xh[W-1]) begin
      x_pre = xh;  y_pre = yh;  z_pre = '0;
    end else if (!yh[W-1]) begin
      x_pre = yh;  y_pre = -xh; z_pre = HALF_PI;
    end else begin
      x_pre = -yh; y_pre = xh;  z_pre = -HALF_PI;
    end
  end

  logic signed [W-1:0] x_nxt, y_nxt, z_nxt;
  always_comb begin
    if (y[W-1]) begin  // y < 0: rotate counter-clockwise
      x_nxt = x - (y >>> i);  y_nxt = y + (x >>> i);  z_nxt = z - atan_i;
    end else begin
      x_nxt = x + (y >>> i);  y_nxt = y - (x >>> i);  z_nxt = z + atan_i;
    end
  end

  logic signed [W-1:0] x_sel, y_sel, z_sel, x_lim, y_lim, z_lim;
  assign x_sel = (state == IDLE) ? x_pre : x_nxt;
  assign y_sel = (state == IDLE) ? y_pre : y_nxt;
  assign z_sel = (state == IDLE) ? z_pre : z_nxt;

  fxp_limiter #(.W(W), .FWL(FWL)) u_lim_x (.din(x_sel), .nbits(mask_x), .dout(x_lim));
  fxp_limiter #(.W(W), .FWL(FWL)) u_lim_y (.din(y_sel), .nbits(mask_y), .dout(y_lim));
  fxp_limiter #(.W(W), .FWL(FWL)) u_lim_z (.din(z_sel), .nbits(mask_z), .dout(z_lim));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE;
      x <= '0; y <= '0; z <= '0; i <= '0;
    end else begin
      case (state)
        IDLE: if (in_valid) begin
          x <= x_lim; y <= y_lim; z <= z_lim; i <= '0;
          state <= ITERATE;
        end
        ITERATE: begin
          x <= x_lim; y <= y_lim; z <= z_lim;
          i <= i + 1'b1;
          if (int'(i) == ITER - 1) state <= DONE;
        end
        DONE: if (out_ready) state <= IDLE;
        default: state <= IDLE;
      endcase
    end
  end

  assign in_ready  = (state == IDLE);
  assign out_valid = (state == DONE);
  assign z_out     = z;
endmodule
