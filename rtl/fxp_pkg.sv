// fxp_pkg: constants and constant functions shared by the fixed-point blocks
// of the BPSK receiver.
//
// All datapath signals are signed two's-complement fixed-point words with
// IWL integer bits (sign included) and FWL fractional bits, the Q(IWL).(FWL)
// format.  The integer part is one byte, as in the serial sample format of
// the receiver; the fractional width is a parameter of each block (16 for the
// coarse frequency and timing blocks, 12 for the Costas loop).
//
// A "mask" is a byte that gives how many fractional LSBs of an operand are
// forced to zero at run time (0 = full precision).  Masks larger than the
// fractional width clear the whole fraction.
//
// The constant functions below produce the CORDIC angle table, the CORDIC
// gain correction and pi at any fractional width during elaboration, so no
// table file is needed:
//   atan_q(i, f) = round(atan(2^-i) * 2^f)
//   k_q(n, f)    = round(prod_{i<n} 1/sqrt(1 + 2^-2i) * 2^f)
//   real_q(r, f) = round(r * 2^f)
package fxp_pkg;

  localparam int IWL   = 8;   // integer bits, sign included (one byte)
  localparam int MASKW = 8;   // width of one mask register (one byte)

  localparam real PI = 3.14159265358979323846;

  typedef logic [MASKW-1:0] mask_t;

  // round a real constant to fixed point with f fractional bits
  function automatic longint real_q(real r, int f);
    real s;
    s = r * (2.0 ** f);
    return (s >= 0.0) ? longint'($floor(s + 0.5)) : -longint'($floor(-s + 0.5));
  endfunction

  // angle of CORDIC micro-rotation i, in radians, fixed point
  function automatic longint atan_q(int i, int f);
    return real_q($atan(2.0 ** (-i)), f);
  endfunction

  // inverse of the CORDIC gain after n micro-rotations
  function automatic longint k_q(int n, int f);
    real k;
    k = 1.0;
    for (int i = 0; i < n; i++) k = k / $sqrt(1.0 + 2.0 ** (-2 * i));
    return real_q(k, f);
  endfunction

endpackage
