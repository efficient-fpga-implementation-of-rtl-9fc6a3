// hsca_core_tb: runs the SCA engine on small populations and checks
//  - the reported best fitness against the benchmark evaluated in floating
//    point on the reported best particle,
//  - that the best fitness never rises from one iteration to the next and
//    that no particle's stored fitness is below it,
//  - convergence on f1 (sphere), f10 and the TDOA cost (the best particle
//    must approach the target that produced the range differences),
//  - the run time in cycles against
//    max(n*d + 4 + max(L, 2), 34) + T*(n*d + CORDIC_ITER + 6 + L), L the fitness
//    latency (1, 18 for f8/f9, 52 for f7, 35 for TDOA), also when
//    the r1 divider, not initialisation, is the slower,
//  - runs of f7, f8 and f9,
//  - T = 0 (initial population only),
// and counts that r1 took values above and below 1 and that the best
// particle was replaced.
module hsca_core_tb;
  import hsca_pkg::*;
  localparam int N = 16, D = 6, IT = 4;
  logic clk = 0, rst_n = 0, start = 0;
  logic [4:0] n = 0;
  logic [3:0] d = 0;
  logic [15:0] t_max = 0, iter;
  pos_t lb = 0, ub = 0, a = 2 * 65536;
  logic [31:0] seed = 0, cycles;
  func_e func = F1_SPHERE;
  pos_t anchor [TDOA_M][3];
  pos_t rdiff [TDOA_M-1];
  real  ax [TDOA_M][3] = '{'{0.0, 0.0, 0.0}, '{10.0, 0.0, 0.0}, '{-5.0, 8.66, 0.0}, '{-5.0, -8.66, 6.0}};
  real  target [3] = '{3.25, -2.5, 0.0};   // on the plane z = 0, estimated in 2-D
  localparam real PI = 3.14159265358979;
  logic busy, done;
  fit_t best_fit, fit_data;
  logic [D-1:0][31:0] best_pos;
  logic [3:0] fit_idx = 0;
  int checks = 0, failures = 0;
  int r1_hi = 0, r1_lo = 0, improvements = 0;

  hsca_core #(.MAX_N(N), .MAX_D(D), .T_W(16), .CORDIC_ITER(IT)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (dut.pum_start) begin
    if (dut.r1 >= 65536) r1_hi++; else r1_lo++;
  end

  task automatic check(logic c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic real range_to(real p [3], int m);
    return $sqrt((p[0]-ax[m][0])**2 + (p[1]-ax[m][1])**2 + (p[2]-ax[m][2])**2);
  endfunction

  function automatic real ref_fit(func_e f, int dd);
    real s = 0, c = 0, p = 1;
    real u [3] = '{0.0, 0.0, 0.0};
    for (int k = 0; k < dd; k++) begin
      real v = real'(pos_t'(best_pos[k])) / 65536.0;
      if (k < 3) u[k] = v;
      case (f)
        F1_SPHERE:    s += v * v;
        F7_ACKLEY:    begin s += v * v; c += $cos(2 * PI * v); end
        F8_RASTRIGIN: s += v * v - 10 * $cos(2 * PI * v) + 10;
        F9_GRIEWANK:  begin s += v * v / 4000; p *= $cos(v / $sqrt(k + 1.0)); end
        default:      s += 0.5 * (v**4 - 16 * v**2 + 5 * v);
      endcase
    end
    if (f == F7_ACKLEY) s = -20 * $exp(-0.2 * $sqrt(s / dd)) - $exp(c / dd) + 20 + $exp(1.0);
    if (f == F9_GRIEWANK) s = s - p + 1;
    if (f == F_TDOA) begin
      s = 0;
      for (int m = 1; m < TDOA_M; m++) begin
        real e = real'(rdiff[m-1]) / 65536.0 - (range_to(u, m) - range_to(u, 0));
        s += e * e;
      end
    end
    return s;
  endfunction

  function automatic int fm_lat(func_e f);
    case (f)
      F7_ACKLEY:                 return 52;
      F8_RASTRIGIN, F9_GRIEWANK: return 18;
      F_TDOA:                    return 35;
      default:                   return 1;
    endcase
  endfunction

  task automatic run(func_e f, int nn, int dd, int tt, real l, real u, logic [31:0] s,
                     output real first_best, output real final_best);
    fit_t prev;
    int   last_iter, t0;
    func = f; n = 5'(nn); d = 4'(dd); t_max = 16'(tt);
    lb = pos_t'($rtoi(l * 65536.0)); ub = pos_t'($rtoi(u * 65536.0)); seed = s;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    prev = FIT_MAX; last_iter = -1; first_best = 0; t0 = 1;
    while (!done) begin
      if (32'(iter) != last_iter) begin
        if (last_iter == 0) first_best = real'(best_fit) / 65536.0;
        check(best_fit <= prev, "best fitness never rises");
        if (best_fit < prev && last_iter > 0) improvements++;
        prev = best_fit;
        last_iter = 32'(iter);
      end
      @(negedge clk);
      t0++;
    end
    final_best = real'(best_fit) / 65536.0;
    check(32'(iter) == tt, "iterations");
    begin
      real e = ref_fit(f, dd);
      check(final_best - e < 0.05 + 1e-3 * (e < 0 ? -e : e) && e - final_best < 0.05 + 1e-3 * (e < 0 ? -e : e),
            $sformatf("best fitness %f, recomputed %f", final_best, e));
    end
    for (int k = 0; k < dd; k++)
      check(pos_t'(best_pos[k]) >= lb && pos_t'(best_pos[k]) <= ub, "best inside bounds");
    for (int i = 0; i < nn; i++) begin
      @(negedge clk); fit_idx = 4'(i); @(negedge clk);
      check(fit_data >= best_fit, "stored fitness not below best");
    end
    begin
      int init_t, exp_cyc;
      init_t = nn * dd + 4 + ((fm_lat(f) < 2) ? 2 : fm_lat(f));
      if (init_t < 34) init_t = 34;       // waits for the divider
      exp_cyc = init_t + tt * (nn * dd + IT + 6 + fm_lat(f));
      check(32'(cycles) == exp_cyc, $sformatf("cycles %0d expected %0d (start to done %0d)", cycles, exp_cyc, t0));
    end
  endtask

  initial begin
    real fb, lb_;
    for (int m = 0; m < TDOA_M; m++)
      for (int k = 0; k < 3; k++) anchor[m][k] = pos_t'($rtoi(ax[m][k] * 65536.0));
    for (int m = 1; m < TDOA_M; m++)
      rdiff[m-1] = pos_t'($rtoi((range_to(target, m) - range_to(target, 0)) * 65536.0));
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(F1_SPHERE, 16, 6, 200, -10.0, 10.0, 32'h1357_9BDF, fb, lb_);
    check(lb_ < fb / 100.0 && lb_ < 0.05, $sformatf("sphere converges: %f -> %f", fb, lb_));
    run(F10_STYBLINSKI, 12, 4, 150, -5.0, 5.0, 32'h2468_ACE0, fb, lb_);
    // every coordinate in a local minimum (x = 2.75) gives -100.1; the global one -156.7
    check(lb_ < -110.0, $sformatf("f10 leaves the local minima: %f (optimum %f)", lb_, -39.16599 * 4));
    run(F8_RASTRIGIN, 16, 6, 60, -5.12, 5.12, 32'h3141_5926, fb, lb_);
    check(lb_ < fb, $sformatf("f8 improves: %f -> %f", fb, lb_));
    run(F9_GRIEWANK, 16, 6, 40, -600.0, 600.0, 32'h2718_2818, fb, lb_);
    check(lb_ < fb, $sformatf("f9 improves: %f -> %f", fb, lb_));
    run(F7_ACKLEY, 16, 6, 40, -32.0, 32.0, 32'h1618_0339, fb, lb_);
    check(lb_ < fb, $sformatf("f7 improves: %f -> %f", fb, lb_));
    run(F_TDOA, 16, 2, 200, -20.0, 20.0, 32'hC0FF_EE11, fb, lb_);
    begin
      real dx = 0;
      for (int k = 0; k < 2; k++) dx += (real'(pos_t'(best_pos[k])) / 65536.0 - target[k])**2;
      check($sqrt(dx) < 1.0 && lb_ < 0.05,
            $sformatf("TDOA finds the target: error %f, cost %f", $sqrt(dx), lb_));
    end
    run(F_TDOA, 1, 3, 1, -20.0, 20.0, 32'h9, fb, lb_);         // divider slower than init
    run(F1_SPHERE, 1, 1, 3, -10.0, 10.0, 32'h5, fb, lb_);      // divider slower than init
    run(F1_SPHERE, 8, 5, 0, -10.0, 10.0, 32'h77, fb, lb_);     // T = 0
    check(r1_hi > 0 && r1_lo > 0 && improvements > 0,
          $sformatf("mechanisms r1>=1:%0d r1<1:%0d improvements:%0d", r1_hi, r1_lo, improvements));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
