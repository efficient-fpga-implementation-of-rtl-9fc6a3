// hsca_pkg: types and constants shared by the HSCA (hardware Sine Cosine
// Algorithm) engine.
//
// Number formats (this design's choice; the source algorithm is written in
// floating point C):
//   pos_t  - signed Q16.16, 32 bits. Particle coordinates, bounds, r1, r3,
//            angles in radians and CORDIC sin/cos outputs.
//   fit_t  - signed Q48.16, 64 bits. Fitness values. Saturating arithmetic
//            keeps large products (f4) at the most positive value.
// Benchmark selection follows the numbering f1..f10 of the benchmark table
// (encoded 0..9); code 10 selects the TDOA localisation cost, which uses
// TDOA_M anchor nodes.
package hsca_pkg;

  localparam int unsigned POS_W  = 32;
  localparam int unsigned FRAC   = 16;
  localparam int unsigned FIT_W  = 64;

  typedef logic signed [POS_W-1:0] pos_t;
  typedef logic signed [FIT_W-1:0] fit_t;

  localparam pos_t Q_ONE     = pos_t'(32'sd65536);
  localparam pos_t Q_PI      = pos_t'(32'sd205887);   // pi     * 2^16
  localparam pos_t Q_HALF_PI = pos_t'(32'sd102944);   // pi/2   * 2^16
  localparam pos_t Q_TWO_PI  = pos_t'(32'sd411775);   // 2*pi   * 2^16
  localparam pos_t Q_3HALF_PI = pos_t'(32'sd308831);  // 3*pi/2 * 2^16
  localparam pos_t Q_CORDIC_K = pos_t'(32'sd39797);   // 0.60725252935 * 2^16

  localparam fit_t FIT_MAX = {1'b0, {(FIT_W-1){1'b1}}};
  localparam fit_t FIT_MIN = {1'b1, {(FIT_W-1){1'b0}}};

  typedef enum logic [3:0] {
    F1_SPHERE      = 4'd0,  // sum x^2
    F2_ROSENBROCK  = 4'd1,  // sum 100(x[i+1]-x[i]^2)^2 + (x[i]-1)^2
    F3_SUM_SQUARES = 4'd2,  // sum i*x^2
    F4_SCHWEFEL222 = 4'd3,  // sum |x| + prod |x|
    F5_MAX_ABS     = 4'd4,  // max |x|
    F6_CAMEL3      = 4'd5,  // 2x1^2 - 1.05x1^4 + x1^6/6 + x1x2 + x2^2
    F7_ACKLEY      = 4'd6,  // -20exp(-0.2 sqrt(mean x^2)) - exp(mean cos 2pi x) + 20 + e
    F8_RASTRIGIN   = 4'd7,  // sum x^2 - 10cos(2pi x) + 10
    F9_GRIEWANK    = 4'd8,  // sum x^2/4000 - prod cos(x[i]/sqrt(i)) + 1
    F10_STYBLINSKI = 4'd9,  // 1/2 sum x^4 - 16x^2 + 5x
    F_TDOA         = 4'd10  // TDOA localisation cost
  } func_e;

  localparam int unsigned TDOA_M = 4;   // anchor nodes of the TDOA cost

  // Saturating Q48.16 helpers.
  function automatic fit_t sat_add(fit_t a, fit_t b);
    logic signed [FIT_W:0] s;
    s = {a[FIT_W-1], a} + {b[FIT_W-1], b};
    if (s[FIT_W] != s[FIT_W-1]) return s[FIT_W] ? FIT_MIN : FIT_MAX;
    return s[FIT_W-1:0];
  endfunction

  function automatic fit_t sat_mul(fit_t a, fit_t b);
    logic signed [2*FIT_W-1:0] p;
    logic signed [2*FIT_W-1:0] q;
    p = a * b;
    q = p >>> FRAC;
    if (q[2*FIT_W-1:FIT_W-1] != '0 && q[2*FIT_W-1:FIT_W-1] != '1)
      return q[2*FIT_W-1] ? FIT_MIN : FIT_MAX;
    return q[FIT_W-1:0];
  endfunction

  // Q16.16 product, truncated toward minus infinity, wrapped to 32 bits.
  function automatic pos_t qmul(pos_t a, pos_t b);
    logic signed [2*POS_W-1:0] p;
    p = a * b;
    return pos_t'(p >>> FRAC);
  endfunction

  function automatic fit_t to_fit(pos_t a);
    return fit_t'(a);
  endfunction

endpackage
