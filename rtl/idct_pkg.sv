// idct_pkg: types and constants shared by the two 8x8 IDCT architectures.
//
// Number formats. Each 1D pass computes sqrt(8) times the orthonormal 1D-IDCT
// (DC weight 1, AC weights sqrt(2)*cos), so two passes scale by 8 and the
// final rounding divides by 8. Constants are integers scaled by 2^CB.
// Coefficients enter with 12 bits and pixels leave with 9 bits (MPEG ranges);
// the transpose memory keeps PF fraction bits between the passes. CB, F and
// PF are choices of this design, checked with an IEEE-1180 style accuracy test.
//
// The second half of the package describes the control word of the
// Loeffler-12 core: one optional input load, one multiplication and four
// add/sub operations per cycle, each naming its operand and result registers
// and the loop iteration it belongs to.
package idct_pkg;
  localparam int IDCT_IN_W  = 12;  // coefficient width
  localparam int IDCT_OUT_W = 9;   // pixel width
  localparam int IDCT_CB    = 13;  // constant scaling 2^13
  localparam int IDCT_PF    = 3;   // fraction bits in the transpose memory
  localparam int IDCT_TW    = 20;  // transpose memory word
  localparam int LF_W  = 28;  // Loeffler core register width
  localparam int LF_F  = 6;   // Loeffler core fraction bits

  // Physical registers of the Loeffler core, shared by the values of two
  // overlapped loop iterations according to their lifetimes.
  localparam int LF_NREG = 18;
  typedef logic [4:0] lf_reg_t;

  // Constant multipliers of the 12-multiplication Loeffler IDCT,
  // round(2^13 * value); cN = cos(N*pi/16).
  typedef enum logic [3:0] {
    K_1, K_2, K_3, K_4, K_5, K_6, K_7, K_8, K_9, K_10, K_11, K_12
  } lf_const_e;

  function automatic logic signed [15:0] lf_const(lf_const_e k);
    case (k)
      K_1:  return 16'sd4433;    //  sqrt2*c6
      K_2:  return -16'sd15137;  // -sqrt2*(c2+c6)
      K_3:  return 16'sd6270;    //  sqrt2*(c2-c6)
      K_4:  return 16'sd2446;    //  sqrt2*(-c1+c3+c5-c7)
      K_5:  return 16'sd16819;   //  sqrt2*( c1+c3-c5+c7)
      K_6:  return 16'sd25172;   //  sqrt2*( c1+c3+c5-c7)
      K_7:  return 16'sd12299;   //  sqrt2*( c1+c3-c5-c7)
      K_8:  return -16'sd7373;   //  sqrt2*( c7-c3)
      K_9:  return -16'sd20995;  //  sqrt2*(-c1-c3)
      K_10: return -16'sd16069;  //  sqrt2*(-c3-c5)
      K_11: return -16'sd3196;   //  sqrt2*( c5-c3)
      default: return 16'sd9633; //  sqrt2*c3
    endcase
  endfunction

  // One operation of the schedule. 'b_stage' tells which of the two
  // overlapped iterations it belongs to: 0 = the one in its first 12 cycles,
  // 1 = the one in its second 12 cycles (outputs use that one's pass).
  typedef struct packed {
    logic       en;
    logic       b_stage;
    logic       sub;      // add/sub units only
    logic       to_out;   // add/sub unit 3 only: result goes to the output port
    logic [2:0] out_idx;
    lf_reg_t    a;
    lf_reg_t    b;
    lf_reg_t    dst;
  } lf_alu_op_t;

  typedef struct packed {
    logic      en;
    logic      b_stage;
    lf_reg_t   a;
    lf_const_e k;
    lf_reg_t   dst;
  } lf_mul_op_t;

  typedef struct packed {
    logic       en;     // an input sample is loaded (first-half iteration)
    logic [2:0] idx;    // coefficient number X(idx)
    lf_reg_t    dst;
  } lf_ld_op_t;

  typedef struct packed {
    lf_ld_op_t        ld;
    lf_mul_op_t       mul;
    lf_alu_op_t [3:0] alu;
  } lf_cw_t;
endpackage
