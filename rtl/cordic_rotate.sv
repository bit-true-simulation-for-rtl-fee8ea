// cordic_rotate: iterative CORDIC in rotation mode with run-time bit masks.
//
// Rotates the vector (x_in, y_in) by the angle z_in (radians, range -pi..pi)
// and returns (x_out, y_out) = (x cos z - y sin z, x sin z + y cos z).
//
// How it works: the micro-rotation table atan(2^-i), i = 0..ITER-1, covers
// angles of magnitude up to about 90 degrees.  For a larger angle one extra
// step first turns the vector by +-90 degrees; this equals two 45 degree
// (i = 0) micro-rotations in the same direction, whose combined gain of
// exactly 2 is removed by a one-bit shift, so the step is an exact swap and
// negation.  Then one micro-rotation is done per clock cycle, and the result
// is multiplied by the inverse CORDIC gain K.  The three working registers
// x, y and z pass through a bit-mask limiter (masks mask_x, mask_y, mask_z)
// on load and after every micro-rotation, and the outputs are limited with
// mask_x / mask_y.
//
// The rotate mode, the tan(2^-i) table, the extra step for angles above 90
// degrees and the [x, y, z] mask set follow the document.  The iterative
// (one step per cycle) structure, the iteration count and the final gain
// multiply are this design's choices.
//
// Interface: valid/ready handshakes on input and output.  Timing: an input
// accepted in cycle t gives out_valid in cycle t + ITER + 2; one rotation in
// flight at a time.
module cordic_rotate
  import fxp_pkg::*;
#(
  parameter int W    = 24,  // word width, IWL + FWL
  parameter int FWL  = 16,  // fractional bits
  parameter int ITER = 16   // micro-rotations
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  output logic                in_ready,
  input  logic signed [W-1:0] x_in,
  input  logic signed [W-1:0] y_in,
  input  logic signed [W-1:0] z_in,
  input  mask_t               mask_x,
  input  mask_t               mask_y,
  input  mask_t               mask_z,
  output logic                out_valid,
  input  logic                out_ready,
  output logic signed [W-1:0] x_out,
  output logic signed [W-1:0] y_out
);
  localparam logic signed [W-1:0] HALF_PI = W'(real_q(PI / 2.0, FWL));
  localparam logic signed [W-1:0] KINV    = W'(k_q(ITER, FWL));
  localparam int CW = (ITER > 1) ? $clog2(ITER) : 1;

  typedef enum logic [1:0] {IDLE, ITERATE, SCALE, DONE} state_t;
  state_t state;

  logic signed [W-1:0] x, y, z;
  logic [CW-1:0]       i;

  // angle of the current micro-rotation
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

  // pre-rotation of the input vector
  logic signed [W-1:0] x_pre, y_pre, z_pre;
  always_comb begin
    if (z_in > HALF_PI) begin
      x_pre = -y_in;  y_pre = x_in;   z_pre = z_in - HALF_PI;
    end else if (z_in < -HALF_PI) begin
      x_pre = y_in;   y_pre = -x_in;  z_pre = z_in + HALF_PI;
    end else begin
      x_pre = x_in;   y_pre = y_in;   z_pre = z_in;
    end
  end

  // one micro-rotation
  logic signed [W-1:0] x_nxt, y_nxt, z_nxt;
  always_comb begin
    if (!z[W-1]) begin
      x_nxt = x - (y >>> i);  y_nxt = y + (x >>> i);  z_nxt = z - atan_i;
    end else begin
      x_nxt = x + (y >>> i);  y_nxt = y - (x >>> i);  z_nxt = z + atan_i;
    end
  end

  // gain correction
  logic signed [2*W-1:0] x_prod, y_prod;
  assign x_prod = x * KINV;
  assign y_prod = y * KINV;

  // register selection and masking
  logic signed [W-1:0] x_sel, y_sel, z_sel, x_lim, y_lim, z_lim;
  always_comb begin
    case (state)
      IDLE:    begin x_sel = x_pre; y_sel = y_pre; z_sel = z_pre; end
      ITERATE: begin x_sel = x_nxt; y_sel = y_nxt; z_sel = z_nxt; end
      default: begin
        x_sel = W'(x_prod >>> FWL); y_sel = W'(y_prod >>> FWL); z_sel = z;
      end
    endcase
  end

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
          if (int'(i) == ITER - 1) state <= SCALE;
        end
        SCALE: begin
          x <= x_lim; y <= y_lim;
          state <= DONE;
        end
        DONE: if (out_ready) state <= IDLE;
      endcase
    end
  end

  assign in_ready  = (state == IDLE);
  assign out_valid = (state == DONE);
  assign x_out     = x;
  assign y_out     = y;
endmodule
