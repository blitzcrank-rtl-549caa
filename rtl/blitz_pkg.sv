// blitz_pkg: number format and helpers shared by all BLITZCRANK modules.
//
// All datapath values are signed Q16.16 fixed point (32 bits, 16 fraction
// bits). Products are formed at full width and shifted back; a Q32.32 form
// (64 bits) is used where sums of products must keep their precision, as in
// dot products and norms. The design's reference uses single-precision
// floating point; fixed point is this implementation's choice, made so that
// every unit is plain integer logic.
package blitz_pkg;

  localparam int FRAC = 16;
  localparam int FW   = 32;

  typedef logic signed [FW-1:0]   fix_t;   // Q16.16
  typedef logic signed [2*FW-1:0] acc_t;   // Q32.32

  // One element of a matrix column travelling through the QR update chain.
  typedef struct packed {
    fix_t       data;
    logic [7:0] col;
    logic [7:0] row;
  } qr_elem_t;

  localparam fix_t FIX_ONE = fix_t'(1 <<< FRAC);

  // Q16.16 x Q16.16 -> Q16.16 (truncating toward minus infinity)
  function automatic fix_t fmul(fix_t a, fix_t b);
    acc_t p;
    p = acc_t'(a) * acc_t'(b);
    return fix_t'(p >>> FRAC);
  endfunction

  // Q16.16 x Q16.16 -> Q32.32 (exact)
  function automatic acc_t fmul_wide(fix_t a, fix_t b);
    return acc_t'(a) * acc_t'(b);
  endfunction

  function automatic fix_t fabs(fix_t a);
    return (a < 0) ? -a : a;
  endfunction

  function automatic fix_t int2fix(int i);
    return fix_t'(i <<< FRAC);
  endfunction

endpackage
