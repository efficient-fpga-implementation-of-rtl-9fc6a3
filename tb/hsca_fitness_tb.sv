// hsca_fitness_tb: streams random particles, back to back, through the
// fitness module for every benchmark function and for the TDOA cost, and
// compares each result with a floating-point evaluation of the formula.
// Also checks the latency of each kind of function (1 cycle after the last
// coordinate for the polynomial ones, 18 for f8/f9, 52 for f7, 35 for
// TDOA), the tag, the busy flag, and that the f4 product saturates.
module hsca_fitness_tb;
  import hsca_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, first = 0, last = 0, out_valid, busy;
  pos_t anchor [TDOA_M][3];
  pos_t rdiff [TDOA_M-1];
  func_e func = F1_SPHERE;
  pos_t x = 0;
  logic [8:0] tag = 0, out_tag;
  fit_t fit;
  int checks = 0, failures = 0;

  hsca_fitness #(.TAG_W(9), .MAX_D(30)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam real PI = 3.14159265358979;

  function automatic int lat(func_e f);
    case (f)
      F7_ACKLEY:                 return 52;
      F8_RASTRIGIN, F9_GRIEWANK: return 18;
      F_TDOA:                    return 35;
      default:                   return 1;
    endcase
  endfunction

  function automatic real ref_fit(func_e f, real v [], int d);
    real s = 0, p = 1, m = 0;
    case (f)
      F1_SPHERE:      for (int k = 0; k < d; k++) s += v[k]*v[k];
      F2_ROSENBROCK:  for (int k = 0; k < d-1; k++)
                        s += 100.0*(v[k+1]-v[k]*v[k])**2 + (v[k]-1.0)**2;
      F3_SUM_SQUARES: for (int k = 0; k < d; k++) s += (k+1)*v[k]*v[k];
      F4_SCHWEFEL222: begin
                        for (int k = 0; k < d; k++) begin
                          s += (v[k] < 0) ? -v[k] : v[k];
                          p *= (v[k] < 0) ? -v[k] : v[k];
                        end
                        s += (p > 1.4e14) ? 1.0e30 : p;
                      end
      F5_MAX_ABS:     for (int k = 0; k < d; k++) begin
                        real a = (v[k] < 0) ? -v[k] : v[k];
                        if (a > s) s = a;
                      end
      F6_CAMEL3:      s = 2*v[0]**2 - 1.05*v[0]**4 + v[0]**6/6.0 + v[0]*v[1] + v[1]**2;
      F7_ACKLEY:      begin
                        for (int k = 0; k < d; k++) begin
                          s += v[k]*v[k];
                          m += $cos(2.0*PI*v[k]);
                        end
                        s = -20.0*$exp(-0.2*$sqrt(s/d)) - $exp(m/d) + 20.0 + $exp(1.0);
                      end
      F8_RASTRIGIN:   for (int k = 0; k < d; k++) s += v[k]*v[k] - 10.0*$cos(2.0*PI*v[k]) + 10.0;
      F9_GRIEWANK:    begin
                        for (int k = 0; k < d; k++) begin
                          s += v[k]*v[k] / 4000.0;
                          p *= $cos(v[k] / $sqrt(k + 1.0));
                        end
                        s = s - p + 1.0;
                      end
      F10_STYBLINSKI: for (int k = 0; k < d; k++) s += 0.5*(v[k]**4 - 16*v[k]**2 + 5*v[k]);
      F_TDOA:         for (int k = 1; k < TDOA_M; k++) begin
                        // anchor k at (k, 0, 0), measured differences rdiff = 0.5 * k
                        real rk, r0, z;
                        z  = (d > 2) ? v[2] : 0.0;
                        rk = $sqrt((v[0]-k)**2 + v[1]**2 + z**2);
                        r0 = $sqrt(v[0]**2 + v[1]**2 + z**2);
                        s += (0.5*k - (rk - r0))**2;
                      end
      default:        s = 1.0e30;
    endcase
    return s;
  endfunction

  // expected results, in order
  real exp_q [$];
  int  tag_q [$];
  int  sent_last_cycle [$];
  int  cyc = 0;
  int  sat_seen = 0;
  always @(posedge clk) cyc++;

  always @(negedge clk) if (rst_n && out_valid) begin
    real e, g, tol;
    e = exp_q.pop_front();
    g = real'(fit) / 65536.0;
    tol = 1.0e-3 * ((e < 0) ? -e : e) + 0.05;
    checks++;
    if (e >= 1.0e29) begin
      if (fit != FIT_MAX) begin failures++; $display("FAIL saturation: got %f", g); end
      else sat_seen++;
    end else if (g - e > tol || e - g > tol) begin
      failures++;
      $display("FAIL func %0d: got %f expected %f", func, g, e);
    end
    checks++;
    if (out_tag != 9'(tag_q.pop_front())) begin failures++; $display("FAIL tag"); end
    checks++;
    if (cyc - sent_last_cycle.pop_front() != lat(func)) begin failures++; $display("FAIL latency"); end
  end

  task automatic send(func_e f, int d, real lo, real hi, int t);
    real v [] = new [d];
    for (int k = 0; k < d; k++) begin
      pos_t q;
      q = pos_t'($rtoi((lo + (hi - lo) * real'($urandom_range(0, 65535)) / 65536.0) * 65536.0));
      v[k] = real'(q) / 65536.0;
    end
    exp_q.push_back(ref_fit(f, v, d));
    tag_q.push_back(t);
    for (int k = 0; k < d; k++) begin
      @(negedge clk);
      func = f;
      in_valid = 1;
      x = pos_t'($rtoi(v[k] * 65536.0));
      first = (k == 0);
      last = (k == d - 1);
      tag = 9'(t);
      if (last) sent_last_cycle.push_back(cyc);
    end
  endtask

  // Stop the stream and wait until the module has emptied.
  task automatic drain();
    @(negedge clk);
    in_valid = 0;
    @(negedge clk);
    checks++;
    if (!busy && !out_valid && exp_q.size() != 0) begin
      failures++;
      $display("FAIL not busy with results pending");
    end
    while (busy || out_valid) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL results missing"); end
  endtask

  initial begin
    for (int k = 0; k < TDOA_M; k++) begin
      anchor[k][0] = pos_t'(k * 65536);
      anchor[k][1] = '0;
      anchor[k][2] = '0;
    end
    for (int k = 1; k < TDOA_M; k++) rdiff[k-1] = pos_t'(k * 32768);
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < 20; r++) send(F1_SPHERE,      30, -10, 10, r);
    for (int r = 0; r < 20; r++) send(F2_ROSENBROCK,  30, -2.048, 2.048, r + 1);
    for (int r = 0; r < 20; r++) send(F3_SUM_SQUARES, 30, -10, 10, r + 2);
    for (int r = 0; r < 20; r++) send(F4_SCHWEFEL222, 30, -1.2, 1.2, r + 3);
    send(F4_SCHWEFEL222, 30, 9, 10, 100);     // product beyond the fitness range
    for (int r = 0; r < 20; r++) send(F5_MAX_ABS,     30, -100, 100, r + 4);
    for (int r = 0; r < 20; r++) send(F6_CAMEL3,       2, -5, 5, r + 5);
    for (int r = 0; r < 20; r++) send(F10_STYBLINSKI, 30, -5, 5, r + 6);
    for (int r = 0; r < 20; r++) send(F1_SPHERE,      10, -600, 600, r + 7);
    drain();
    for (int r = 0; r < 20; r++) send(F8_RASTRIGIN,   30, -5.12, 5.12, r + 8);
    for (int r = 0; r < 5; r++)  send(F8_RASTRIGIN,    2, -0.01, 0.01, r + 9);
    drain();
    for (int r = 0; r < 20; r++) send(F9_GRIEWANK,    30, -600, 600, r + 10);
    for (int r = 0; r < 5; r++)  send(F9_GRIEWANK,    30, -1, 1, r + 11);
    drain();
    for (int r = 0; r < 20; r++) send(F7_ACKLEY,      30, -32, 32, r + 12);
    for (int r = 0; r < 5; r++)  send(F7_ACKLEY,      30, -0.01, 0.01, r + 13);
    for (int r = 0; r < 5; r++)  send(F7_ACKLEY,       2, -1, 1, r + 14);
    drain();
    for (int r = 0; r < 20; r++) send(F_TDOA,         3, -10, 10, r + 15);
    for (int r = 0; r < 5; r++)  send(F_TDOA,         2, -10, 10, r + 16);
    drain();
    checks++;
    if (exp_q.size() != 0 || sat_seen < 1) begin
      failures++;
      $display("FAIL %0d results missing, %0d saturated", exp_q.size(), sat_seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
