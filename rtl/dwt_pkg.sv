// dwt_pkg: constants shared by the 9/7 lifting 2-D DWT datapath.
//
// The transform is the Daubechies 9/7 lifting scheme (predict alpha, update
// beta, predict gamma, update delta, then scaling) computed in "flipped" form:
// every lifting equation is divided by its own coefficient so that the
// multiplication sits on the input node, in front of the adders, and the
// critical path holds one multiplier only. Predict and update are merged
// into one lifting pair through two intermediate variables per pair index n:
//   D1(n) = CO*x(2n+1) + x(2n)
//   D2(n) = (CE + 1)*x(2n) + D1(n-1)
// so the even node is multiplied by CE + 1, not CE. Constants per pair:
//   odd  node CO:      1/alpha              (pair 1)   1/(beta*gamma)       (pair 2)
//   even node CE + 1:  1/(alpha*beta) + 1   (pair 1)   1/(gamma*delta) + 1  (pair 2)
// The outputs of pair 2 are the true lifting outputs multiplied by
// 1/(alpha*beta*gamma) (high) and 1/(alpha*beta*gamma*delta) (low); the
// scaling step removes these factors and applies the JPEG 2000 norm
// (low by 1/K, high by K/2, K = 1.230174104914), once per direction.
//
// Number formats (choices of this design, not fixed by the algorithm):
//   samples       : DATA_W-bit signed integers, no fraction bits
//   lifting coeffs: COEF_W-bit signed, COEF_F fraction bits
//   scaling coeffs: COEF_W-bit signed, SCALE_F fraction bits
// Every constant below is round(value * 2^fraction_bits).
package dwt_pkg;

  localparam int unsigned DATA_W  = 32;   // internal sample width
  localparam int unsigned PIX_W   = 8;    // input pixel width
  localparam int unsigned OUT_W   = 16;   // output coefficient width
  localparam int unsigned COEF_W  = 18;   // constant multiplier operand width
  localparam int unsigned COEF_F  = 12;   // fraction bits of lifting constants
  localparam int unsigned SCALE_F = 24;   // fraction bits of scaling constants

  typedef logic signed [COEF_W-1:0] coef_t;

  // Lifting pair 1 (alpha, beta).
  localparam coef_t C_ODD_1  = -18'sd2582;    // 1/alpha             = -0.630464
  localparam coef_t C_EVEN_1 =  18'sd52838;   // 1/(alpha*beta) + 1  = 12.900004
  // Lifting pair 2 (gamma, delta).
  localparam coef_t C_ODD_2  = -18'sd87565;   // 1/(beta*gamma)      = -21.378149
  localparam coef_t C_EVEN_2 =  18'sd14556;   // 1/(gamma*delta) + 1 =  3.553775

  // Scaling of the four subbands (both directions folded into one constant).
  //   low factor  fL = alpha*beta*gamma*delta / K = 0.0267488
  //   high factor fH = alpha*beta*gamma * K / 2   = 0.0456360
  localparam coef_t S_LL = 18'sd12004;        // fL*fL = 7.154960e-4
  localparam coef_t S_LH = 18'sd20480;        // fL*fH = 1.220703e-3 (HL and LH)
  localparam coef_t S_HH = 18'sd34941;        // fH*fH = 2.082634e-3

  // Coefficient of lifting pair STAGE (0 or 1), odd or even node.
  function automatic coef_t odd_coef(input int stage);
    return (stage == 0) ? C_ODD_1 : C_ODD_2;
  endfunction

  function automatic coef_t even_coef(input int stage);
    return (stage == 0) ? C_EVEN_1 : C_EVEN_2;
  endfunction

endpackage
