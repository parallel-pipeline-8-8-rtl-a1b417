// Shared constants of the 8x8 forward 2-D ICT(10,9,6,2,3,1) processor.
//
// Word lengths: 10-bit input samples, 16-bit words between the two 1-D
// stages (the width of the transpose buffer), 23-bit un-normalised 2-D
// coefficients and 12-bit normalised coefficients.
//
// Normalisation coefficients: the 2-D result is X(u,v) = K_H(u,v) * Y(u,v)
// with K_H(u,v) = k(u) * k(v), where k(u) = 1/sqrt(8) for u = 0,4,
// 1/sqrt(40) for u = 2,6 and 1/sqrt(442) for odd u (the row norms of the
// integer kernel).  Only six distinct products exist.  Each is quantised to
// an 18-bit fraction, C = round(K_H * 2^18), and held as a 13-bit mantissa
// M with a left shift S so that C = M << S:
//   1/8          -> 32768 = 4096 << 3
//   1/(4*sqrt221)->  4408
//   1/(8*sqrt5)  -> 14654 = 7327 << 1
//   1/442        ->   593
//   1/(4*sqrt1105)-> 1972
//   1/40         ->  6554
package ict_pkg;

  localparam int IN_W    = 10;  // input sample width
  localparam int MID_W   = 16;  // word width of the transpose buffer
  localparam int OUT_W   = 23;  // un-normalised 2-D coefficient width
  localparam int NORM_W  = 12;  // normalised coefficient width
  localparam int COEF_W  = 13;  // effective coefficient mantissa width
  localparam int COEF_FRAC = 18; // fraction bits of the quantised K_H

  // Class of a 1-D frequency index: 0 for u = 0,4; 1 for odd u; 2 for u = 2,6.
  function automatic logic [1:0] freq_class(input logic [2:0] u);
    if (u[0]) return 2'd1;
    else if (u[1]) return 2'd2;
    else return 2'd0;
  endfunction

  typedef struct packed {
    logic [COEF_W-1:0] mant;
    logic [1:0]        shift;
  } coef_t;

  // Quantised K_H(u,v) as mantissa and shift, chosen by the two classes.
  function automatic coef_t kh_coef(input logic [2:0] u, input logic [2:0] v);
    logic [1:0] cu, cv, lo, hi;
    coef_t c;
    cu = freq_class(u);
    cv = freq_class(v);
    lo = (cu < cv) ? cu : cv;
    hi = (cu < cv) ? cv : cu;
    unique case ({lo, hi})
      {2'd0, 2'd0}: c = '{mant: 13'd4096, shift: 2'd3};
      {2'd0, 2'd1}: c = '{mant: 13'd4408, shift: 2'd0};
      {2'd0, 2'd2}: c = '{mant: 13'd7327, shift: 2'd1};
      {2'd1, 2'd1}: c = '{mant: 13'd593,  shift: 2'd0};
      {2'd1, 2'd2}: c = '{mant: 13'd1972, shift: 2'd0};
      default:      c = '{mant: 13'd6554, shift: 2'd0};  // {2,2}
    endcase
    return c;
  endfunction

endpackage
