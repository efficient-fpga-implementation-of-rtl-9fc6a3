// hsca_fitness: fitness module (FM) of the HSCA engine.
//
// Evaluates the benchmark function selected by func on a particle that
// arrives one coordinate per cycle (the order in which the initialize and
// particle update modules produce coordinates). Each coordinate adds its
// term to running accumulators (a sum, a second sum, a product and a
// maximum); first restarts them. Lower fitness is better (minimisation).
//
// Functions (benchmark numbering, func = number - 1):
//   f1  sum x^2                      f2  sum 100(x[i+1]-x[i]^2)^2 + (x[i]-1)^2
//   f3  sum i*x^2                    f4  sum |x| + prod |x|
//   f5  max |x|                      f6  2x1^2 - 1.05x1^4 + x1^6/6 + x1x2 + x2^2
//   f7  -20 exp(-0.2 sqrt(1/D sum x^2)) - exp(1/D sum cos(2 pi x)) + 20 + e
//   f8  sum x^2 - 10 cos(2 pi x) + 10
//   f9  1/4000 sum x^2 - prod cos(x[i]/sqrt(i)) + 1
//   f10 1/2 sum (x^4 - 16x^2 + 5x)
//   func = 10: the TDOA localisation cost (hsca_tdoa_fitness, anchor and
//   rdiff inputs).
//
// How it works (this design's own arithmetic; the source evaluates the
// functions in floating point): Q16.16 coordinates are widened to Q48.16
// with saturating multiply and add. The polynomial functions need no
// front end and their result is registered one cycle after the last
// coordinate. f7, f8 and f9 need the cosine of every coordinate: the
// coordinate is turned into an angle in turns (f7, f8: the fraction of x,
// since cos(2 pi x) has period 1; f9: x/sqrt(i) times 1/(2 pi), with a
// table of 1/sqrt(i) computed at elaboration), and a 16-rotation CORDIC
// gives its cosine; a delay line keeps the coordinate beside it, so these
// results come 18 cycles after the last coordinate. f7 then takes both
// means (times a table of 1/D), a pipelined square root and two
// exponentials: its result comes 52 cycles after the last coordinate. The
// TDOA cost comes 35 cycles after it. A new particle may
// follow the previous one immediately with every function.
//
// Interface: in_valid, x, first (coordinate 0), last (coordinate D-1), tag;
// out_valid, fit, out_tag. func, anchor and rdiff must stay constant while
// particles are in flight. busy is high while a particle is inside the
// module and its result has not reached the output register yet.
module hsca_fitness
  import hsca_pkg::*;
#(
  parameter int unsigned TAG_W = 9,
  parameter int unsigned MAX_D = 256
) (
  input  logic             clk,
  input  logic             rst_n,
  input  func_e            func,
  input  logic             in_valid,
  input  pos_t             x,
  input  logic             first,
  input  logic             last,
  input  logic [TAG_W-1:0] tag,
  input  pos_t             anchor [TDOA_M][3],
  input  pos_t             rdiff  [TDOA_M-1],
  output logic             busy,
  output logic             out_valid,
  output fit_t             fit,
  output logic [TAG_W-1:0] out_tag
);

  localparam int unsigned CNT_W   = $clog2(MAX_D + 1);
  localparam int unsigned CL      = 17;               // 16-rotation CORDIC latency
  localparam fit_t C_1_05   = 64'sd68813;   // 1.05 * 2^16
  localparam fit_t C_SIXTH  = 64'sd10923;   // 1/6  * 2^16
  localparam fit_t C_ONE    = 64'sd65536;
  localparam fit_t C_10     = 64'sd655360;
  localparam fit_t C_16     = 64'sd1048576;
  localparam fit_t C_5      = 64'sd327680;
  localparam fit_t C_20     = 64'sd1310720;
  localparam fit_t C_E      = 64'sd178145;    // e * 2^16
  localparam fit_t C_100    = 64'sd6553600;
  localparam fit_t C_4096_4000 = 64'sd67109;  // 4096/4000 * 2^16
  localparam logic signed [63:0] C_INV_2PI = 64'sd683565276;   // 1/(2 pi) * 2^32
  localparam fit_t C_MEAN_MAX = 64'sh0000_7FFF_FFFF_FFFF;     // mean << 16 fits 64 bits

  // 2^32 / floor(sqrt(v)) with v = i * 2^32: 2^16 / sqrt(i) in Q16.
  function automatic logic [31:0] inv_sqrt_q16(int unsigned i);
    logic [63:0] v, rt, bit_;
    v    = 64'(i) << 32;
    rt   = '0;
    bit_ = 64'h1 << 62;
    while (bit_ > v) bit_ >>= 2;
    while (bit_ != 0) begin
      if (v >= rt + bit_) begin
        v  = v - (rt + bit_);
        rt = (rt >> 1) + bit_;
      end else begin
        rt = rt >> 1;
      end
      bit_ >>= 2;
    end
    return 32'((64'h1 << 32) / rt);
  endfunction

  logic [31:0] isq   [MAX_D + 1];   // 1/sqrt(i), i = 1..MAX_D
  logic [31:0] inv_d [MAX_D + 1];   // 1/i
  for (genvar i = 0; i <= MAX_D; i++) begin : g_tab
    assign isq[i]   = (i == 0) ? 32'h0 : inv_sqrt_q16(i);
    assign inv_d[i] = (i == 0) ? 32'h0 : 32'((65536 + i / 2) / i);
  end

  logic trig_f;
  assign trig_f = (func == F7_ACKLEY) || (func == F8_RASTRIGIN) || (func == F9_GRIEWANK);

  // ---------------- cosine front end (f7, f8, f9) ----------------
  typedef struct packed {
    logic             valid;
    logic             first;
    logic             last;
    logic [TAG_W-1:0] tag;
    pos_t             x;
  } elem_t;

  logic [CNT_W-1:0] in_cnt;          // coordinate index at the input
  logic [15:0]      turn;
  pos_t             theta, cos_v, sin_v;
  logic             cos_valid;
  elem_t            dl [CL];

  always_comb begin
    logic [CNT_W-1:0]   i1;
    logic signed [63:0] xs, t;
    i1   = first ? CNT_W'(1) : in_cnt + 1'b1;
    xs   = (64'(x) * $signed({32'h0, isq[i1]})) >>> 16;
    t    = xs * C_INV_2PI;
    turn = (func == F9_GRIEWANK) ? t[47:32] : x[15:0];
    theta = pos_t'((48'(turn) * 48'(Q_TWO_PI)) >> 16);
  end

  hsca_cordic #(.ITER(16)) u_cos (
    .clk, .rst_n, .in_valid(in_valid && trig_f), .theta,
    .out_valid(cos_valid), .sin_o(sin_v), .cos_o(cos_v)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_cnt <= '0;
      for (int k = 0; k < CL; k++) dl[k] <= '0;
    end else begin
      if (in_valid) in_cnt <= first ? CNT_W'(1) : in_cnt + 1'b1;
      dl[0] <= '{valid: in_valid && trig_f, first: first, last: last, tag: tag, x: x};
      for (int k = 1; k < CL; k++) dl[k] <= dl[k-1];
    end
  end

  // ---------------- accumulators ----------------
  elem_t e;
  fit_t  cosf;
  assign e    = trig_f ? dl[CL-1] : '{valid: in_valid, first: first, last: last, tag: tag, x: x};
  assign cosf = to_fit(cos_v);

  fit_t acc_sum, acc_sum2, acc_prod, acc_max, xp;
  logic [CNT_W-1:0] cnt;

  fit_t xf, ax, x2, x4, x6, d, term, term2;
  fit_t b_sum, b_sum2, b_prod, b_max;
  fit_t n_sum, n_sum2, n_prod, n_max, result;
  fit_t idx;

  always_comb begin
    xf = to_fit(e.x);
    ax = xf[FIT_W-1] ? -xf : xf;
    x2 = sat_mul(xf, xf);
    x4 = sat_mul(x2, x2);
    x6 = sat_mul(x4, x2);
    idx = e.first ? C_ONE : fit_t'({cnt + 1'b1, 16'h0});

    b_sum  = e.first ? '0    : acc_sum;
    b_sum2 = e.first ? '0    : acc_sum2;
    b_prod = e.first ? C_ONE : acc_prod;
    b_max  = e.first ? '0    : acc_max;

    term  = '0;
    term2 = '0;
    d     = '0;
    unique case (func)
      F1_SPHERE:      term = x2;
      F2_ROSENBROCK:  if (!e.first) begin
                        d    = sat_add(xf, -sat_mul(xp, xp));
                        term = sat_add(sat_mul(C_100, sat_mul(d, d)),
                                       sat_mul(sat_add(xp, -C_ONE), sat_add(xp, -C_ONE)));
                      end
      F3_SUM_SQUARES: term = sat_mul(idx, x2);
      F4_SCHWEFEL222: term = ax;
      F6_CAMEL3:      if (e.first)
                        term = sat_add(sat_add(sat_mul(64'sd131072, x2), -sat_mul(C_1_05, x4)),
                                       sat_mul(C_SIXTH, x6));
                      else if (cnt == CNT_W'(1))
                        term = sat_add(sat_mul(xp, xf), x2);
      F7_ACKLEY:      begin
                        term  = x2;
                        term2 = cosf;
                      end
      F8_RASTRIGIN:   term = sat_add(x2, sat_mul(C_10, C_ONE - cosf));
      F9_GRIEWANK:    term = sat_mul(x2, C_4096_4000) >>> 12;
      F10_STYBLINSKI: term = sat_add(sat_add(x4, -sat_mul(C_16, x2)), sat_mul(C_5, xf)) >>> 1;
      default:        term = '0;
    endcase

    n_sum  = sat_add(b_sum, term);
    n_sum2 = sat_add(b_sum2, term2);
    n_prod = sat_mul(b_prod, (func == F9_GRIEWANK) ? cosf : ax);
    n_max  = (ax > b_max) ? ax : b_max;

    unique case (func)
      F4_SCHWEFEL222: result = sat_add(n_sum, n_prod);
      F5_MAX_ABS:     result = n_max;
      F9_GRIEWANK:    result = sat_add(sat_add(n_sum, -n_prod), C_ONE);
      default:        result = n_sum;
    endcase
  end

  logic             acc_out;                 // result of a polynomial or cosine function
  assign acc_out = e.valid && e.last && func != F7_ACKLEY && func != F_TDOA;

  logic             a0_valid;                // f7: both sums complete
  fit_t             a0_ms, a0_mc;
  logic [TAG_W-1:0] a0_tag;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_sum  <= '0;
      acc_sum2 <= '0;
      acc_prod <= C_ONE;
      acc_max  <= '0;
      xp       <= '0;
      cnt      <= '0;
      a0_valid <= 1'b0;
      a0_ms    <= '0;
      a0_mc    <= '0;
      a0_tag   <= '0;
    end else begin
      a0_valid <= e.valid && e.last && func == F7_ACKLEY;
      if (e.valid) begin
        acc_sum  <= n_sum;
        acc_sum2 <= n_sum2;
        acc_prod <= n_prod;
        acc_max  <= n_max;
        xp       <= xf;
        cnt      <= e.first ? CNT_W'(1) : cnt + 1'b1;
        if (e.last) begin
          fit_t ms;
          ms     = sat_mul(n_sum, fit_t'({32'h0, inv_d[e.first ? CNT_W'(1) : cnt + 1'b1]}));
          a0_ms  <= (ms > C_MEAN_MAX) ? C_MEAN_MAX : ms;
          a0_mc  <= sat_mul(n_sum2, fit_t'({32'h0, inv_d[e.first ? CNT_W'(1) : cnt + 1'b1]}));
          a0_tag <= e.tag;
        end
      end
    end
  end

  // ---------------- Ackley back end ----------------
  logic             sq_busy, sq_valid;
  logic [31:0]      sq_root;
  logic [TAG_W+31:0] sq_side;
  pos_t             y1, y2;
  fit_t             ex1, ex2;
  logic             ex_valid;
  logic [TAG_W-1:0] ex_tag;

  hsca_isqrt #(.W(64), .SW(TAG_W + 32)) u_sqrt (
    .clk, .rst_n, .in_valid(a0_valid), .rad(64'(a0_ms) << 16),
    .side_i({a0_tag, a0_mc[31:0]}), .busy(sq_busy), .out_valid(sq_valid),
    .root(sq_root), .side_o(sq_side)
  );

  // -0.2 * sqrt(mean x^2), kept above -24 where exp() is already below 2^-16
  always_comb begin
    logic [47:0] p;
    p  = ({16'h0, sq_root} * 48'd13107) >> 16;
    y1 = (p > 48'd1572864) ? -pos_t'(32'sd1572864) : -pos_t'(p[31:0]);
    y2 = pos_t'(sq_side[31:0]);
  end

  hsca_exp u_exp1 (.clk, .rst_n, .y(y1), .e(ex1));
  hsca_exp u_exp2 (.clk, .rst_n, .y(y2), .e(ex2));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ex_valid <= 1'b0;
      ex_tag   <= '0;
    end else begin
      ex_valid <= sq_valid;
      if (sq_valid) ex_tag <= sq_side[TAG_W+31:32];
    end
  end

  // ---------------- TDOA cost ----------------
  logic             td_busy, td_valid;
  fit_t             td_fit;
  logic [TAG_W-1:0] td_tag;

  hsca_tdoa_fitness #(.M(TDOA_M), .TAG_W(TAG_W)) u_tdoa (
    .clk, .rst_n, .in_valid(in_valid && func == F_TDOA), .x, .first, .last, .tag,
    .anchor, .rdiff, .busy(td_busy), .out_valid(td_valid), .fit(td_fit), .out_tag(td_tag)
  );

  // ---------------- output ----------------
  logic dl_busy;
  always_comb begin
    dl_busy = 1'b0;
    for (int k = 0; k < CL; k++) dl_busy |= dl[k].valid;
  end

  assign busy = dl_busy || a0_valid || sq_busy || ex_valid || td_busy || td_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      fit       <= '0;
      out_tag   <= '0;
    end else begin
      out_valid <= acc_out || ex_valid || td_valid;
      if (ex_valid) begin
        fit     <= sat_add(sat_add(C_20 + C_E, -sat_mul(C_20, ex1)), -ex2);
        out_tag <= ex_tag;
      end else if (td_valid) begin
        fit     <= td_fit;
        out_tag <= td_tag;
      end else if (acc_out) begin
        fit     <= result;
        out_tag <= e.tag;
      end
    end
  end

  // Only one result source is active at a time (func is constant).
  assert property (@(posedge clk) disable iff (!rst_n)
                   $onehot0({acc_out, ex_valid, td_valid}));
  assert property (@(posedge clk) disable iff (!rst_n) cos_valid == dl[CL-1].valid);

endmodule
