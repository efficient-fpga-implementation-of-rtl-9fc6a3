// hsca_top_tb: end-to-end test of the HSCA IP core at its default sizes
// (population memory for 512 particles of 256 dimensions, four-rotation
// CORDIC). A processor model programs runs over AXI4-Lite, waits for the
// interrupt, reads the result registers and receives the AXI4-Stream result
// packet with random back-pressure. The main run is the benchmark setting
// of 30 particles, 30 dimensions and 1000 iterations on f1; shorter runs
// cover the other benchmark functions, and a TDOA localisation run (anchors
// and range differences written over AXI4-Lite; 100 particles as in the
// localisation experiment) must find the target, and one iteration runs
// with the largest population and dimension count (512 x 256). Checks: the best fitness
// recomputed from
// the streamed best particle, agreement of stream and registers, cycle
// counts, convergence on f1, and that every mechanism happened: both sin
// and cos updates, clamping at both bounds, r1 above and below 1, best
// particle replaced, fitness saturation, waiting for the r1 divider, stream
// back-pressure, a start refused while busy, starts refused for a bad
// configuration and the engine waiting for the fitness module to empty.
module hsca_top_tb;
  import hsca_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [11:0] s_axil_awaddr = 0, s_axil_araddr = 0;
  logic s_axil_awvalid = 0, s_axil_wvalid = 0, s_axil_bready = 1, s_axil_arvalid = 0, s_axil_rready = 1;
  logic [31:0] s_axil_wdata = 0;
  logic [3:0] s_axil_wstrb = 4'hF;
  logic s_axil_awready, s_axil_wready, s_axil_bvalid, s_axil_arready, s_axil_rvalid;
  logic [1:0] s_axil_bresp, s_axil_rresp;
  logic [31:0] s_axil_rdata, m_axis_tdata;
  logic m_axis_tlast, m_axis_tvalid, m_axis_tready = 0, irq;
  int checks = 0, failures = 0;

  hsca_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (4000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- mechanism counters ----
  int n_sin = 0, n_cos = 0, n_clamp_lo = 0, n_clamp_hi = 0, n_r1_hi = 0, n_r1_lo = 0;
  int n_improve = 0, n_sat = 0, n_divwait = 0, n_stall = 0, n_init = 0, n_start = 0, n_fmwait = 0;
  int n_cfgerr = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_core.u_pum.m.valid) begin
      if (dut.u_core.u_pum.m.r4) n_cos++; else n_sin++;
      if (dut.u_core.u_pum.xn == dut.u_core.lb && dut.u_core.u_pum.x + dut.u_core.u_pum.step < dut.u_core.lb) n_clamp_lo++;
      if (dut.u_core.u_pum.xn == dut.u_core.ub && dut.u_core.u_pum.x + dut.u_core.u_pum.step > dut.u_core.ub) n_clamp_hi++;
    end
    if (dut.u_core.pum_start) begin
      if (dut.u_core.r1 >= 65536) n_r1_hi++; else n_r1_lo++;
    end
    if (dut.u_core.state == dut.u_core.S_LATCH && dut.u_core.cand_new) n_improve++;
    if (dut.u_core.state == dut.u_core.S_LATCH && !(dut.u_core.div_ready || dut.u_core.div_done)) n_divwait++;
    if (dut.u_core.fm_out_valid && dut.u_core.fm_fit == FIT_MAX) n_sat++;
    if (dut.u_core.im_done) n_init++;
    if (dut.u_core.state == dut.u_core.S_FLUSH && dut.u_core.fm_busy) n_fmwait++;
    if (dut.start) n_start++;
    if (m_axis_tvalid && !m_axis_tready) n_stall++;
  end

  // ---- stream receiver ----
  logic [31:0] pkt [$];
  int          pkts = 0;
  always @(posedge clk) begin
    if (m_axis_tvalid && m_axis_tready) begin
      pkt.push_back(m_axis_tdata);
      if (m_axis_tlast) pkts++;
    end
  end
  always @(negedge clk) m_axis_tready <= ($urandom_range(0, 3) != 0);

  task automatic check(logic c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic wr(logic [11:0] addr, logic [31:0] data);
    @(negedge clk);
    s_axil_awaddr = addr; s_axil_awvalid = 1; s_axil_wdata = data; s_axil_wvalid = 1;
    do @(posedge clk); while (!s_axil_awready);
    @(negedge clk); s_axil_awvalid = 0; s_axil_wvalid = 0;
    while (!s_axil_bvalid) @(negedge clk);
  endtask

  task automatic rd(logic [11:0] addr, output logic [31:0] data);
    @(negedge clk);
    s_axil_araddr = addr; s_axil_arvalid = 1;
    do @(posedge clk); while (!s_axil_arready);
    @(negedge clk); s_axil_arvalid = 0;
    while (!s_axil_rvalid) @(negedge clk);
    data = s_axil_rdata;
  endtask

  localparam real PI = 3.14159265358979;
  real ax [TDOA_M][3] = '{'{0.0, 0.0, 0.0}, '{10.0, 0.0, 0.0}, '{-5.0, 8.66, 0.0}, '{-5.0, -8.66, 0.0}};
  real target [3] = '{-3.5, 4.25, 0.0};

  function automatic real range_to(real p [3], int m);
    return $sqrt((p[0]-ax[m][0])**2 + (p[1]-ax[m][1])**2 + (p[2]-ax[m][2])**2);
  endfunction

  function automatic real rdiff_of(int m);
    return real'($rtoi((range_to(target, m) - range_to(target, 0)) * 65536.0)) / 65536.0;
  endfunction

  function automatic int fm_lat(func_e f);
    case (f)
      F7_ACKLEY:                 return 52;
      F8_RASTRIGIN, F9_GRIEWANK: return 18;
      F_TDOA:                    return 35;
      default:                   return 1;
    endcase
  endfunction

  function automatic real bench(func_e f, real v [], int dd);
    real s = 0, p = 1, c = 0;
    real u [3] = '{0.0, 0.0, 0.0};
    case (f)
      F7_ACKLEY:      begin
                        for (int k = 0; k < dd; k++) begin s += v[k]**2; c += $cos(2 * PI * v[k]); end
                        s = -20 * $exp(-0.2 * $sqrt(s / dd)) - $exp(c / dd) + 20 + $exp(1.0);
                      end
      F8_RASTRIGIN:   for (int k = 0; k < dd; k++) s += v[k]**2 - 10 * $cos(2 * PI * v[k]) + 10;
      F9_GRIEWANK:    begin
                        for (int k = 0; k < dd; k++) begin s += v[k]**2 / 4000; p *= $cos(v[k] / $sqrt(k + 1.0)); end
                        s = s - p + 1;
                      end
      F_TDOA:         begin
                        for (int k = 0; k < dd && k < 3; k++) u[k] = v[k];
                        for (int m = 1; m < TDOA_M; m++) s += (rdiff_of(m) - (range_to(u, m) - range_to(u, 0)))**2;
                      end
      F1_SPHERE:      for (int k = 0; k < dd; k++) s += v[k] * v[k];
      F2_ROSENBROCK:  for (int k = 0; k < dd - 1; k++) s += 100.0 * (v[k+1] - v[k]**2)**2 + (v[k] - 1.0)**2;
      F3_SUM_SQUARES: for (int k = 0; k < dd; k++) s += (k + 1) * v[k] * v[k];
      F4_SCHWEFEL222: begin
                        for (int k = 0; k < dd; k++) begin
                          s += (v[k] < 0) ? -v[k] : v[k];
                          p *= (v[k] < 0) ? -v[k] : v[k];
                        end
                        s += p;
                      end
      F5_MAX_ABS:     for (int k = 0; k < dd; k++) if (((v[k] < 0) ? -v[k] : v[k]) > s) s = (v[k] < 0) ? -v[k] : v[k];
      F6_CAMEL3:      s = 2 * v[0]**2 - 1.05 * v[0]**4 + v[0]**6 / 6.0 + v[0] * v[1] + v[1]**2;
      default:        for (int k = 0; k < dd; k++) s += 0.5 * (v[k]**4 - 16 * v[k]**2 + 5 * v[k]);
    endcase
    return s;
  endfunction

  // One run: program, start, wait, read back, receive the packet.
  task automatic run(func_e f, int nn, int dd, int tt, real l, real u, logic [31:0] seed,
                     output real best);
    logic [31:0] r, lo, hi, cyc;
    real v [] = new [dd];
    real e;
    int  pk0;
    fit_t bf;
    wr(12'h004, 32'(nn)); wr(12'h008, 32'(dd)); wr(12'h00C, 32'(tt));
    wr(12'h010, 32'($rtoi(l * 65536.0))); wr(12'h014, 32'($rtoi(u * 65536.0)));
    wr(12'h018, 32'h0002_0000); wr(12'h01C, seed); wr(12'h020, 32'(f));
    pk0 = pkts;
    pkt.delete();
    wr(12'h000, 32'h1);
    wr(12'h000, 32'h1);                           // refused: already busy
    rd(12'h000, r);
    check(r[0] == 1'b1, "busy after start");
    while (!irq) @(negedge clk);
    while (pkts == pk0) @(negedge clk);
    check(pkts == pk0 + 1, "one result packet");
    rd(12'h000, r);  check(r == 32'h2, "done, idle");
    rd(12'h024, lo); rd(12'h028, hi); rd(12'h02C, cyc); rd(12'h030, r);
    bf = {hi, lo};
    best = real'(bf) / 65536.0;
    check(r == 32'(tt), "iteration count");
    check(cyc == 32'((nn * dd + 4 + (fm_lat(f) < 2 ? 2 : fm_lat(f)) < 34 ? 34
                      : nn * dd + 4 + (fm_lat(f) < 2 ? 2 : fm_lat(f)))
                     + tt * (nn * dd + 4 + 6 + fm_lat(f))),
          $sformatf("cycle count %0d", cyc));
    check(pkt.size() == dd + 2 && pkt[dd] == lo && pkt[dd + 1] == hi, "packet fitness");
    for (int k = 0; k < dd; k++) begin
      rd(12'(12'h100 + 4 * k), r);
      check(r == pkt[k], "packet position matches register");
      v[k] = real'($signed(r)) / 65536.0;
      check(v[k] >= l - 1e-4 && v[k] <= u + 1e-4, "best inside bounds");
    end
    e = bench(f, v, dd);
    if (e > 1.4e14) check(bf == FIT_MAX, "saturated fitness");
    else check(best - e < 0.05 + 1e-3 * (e < 0 ? -e : e) && e - best < 0.05 + 1e-3 * (e < 0 ? -e : e),
               $sformatf("f%0d best %f recomputed %f", int'(f) + 1, best, e));
    $display("func %0d n=%0d d=%0d T=%0d: best fitness %f in %0d cycles", int'(f) + 1, nn, dd, tt, best, cyc);
  endtask

  initial begin
    real b;
    logic [31:0] r;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // TDOA anchors (Y-shaped, on the plane z = 0) and measured range differences
    for (int m = 0; m < TDOA_M; m++)
      for (int k = 0; k < 3; k++) wr(12'(12'h040 + 12 * m + 4 * k), 32'($rtoi(ax[m][k] * 65536.0)));
    for (int m = 1; m < TDOA_M; m++) wr(12'(12'h070 + 4 * (m - 1)), 32'($rtoi(rdiff_of(m) * 65536.0)));
    rd(12'h058, r);
    check(r == 32'($rtoi(ax[2][0] * 65536.0)), "anchor register read back");
    rd(12'h074, r);
    check(r == 32'($rtoi(rdiff_of(2) * 65536.0)), "range difference read back");
    // benchmark setting: 30 particles, 30 dimensions, 1000 iterations
    run(F1_SPHERE, 30, 30, 1000, -10.0, 10.0, 32'h2023_0915, b);
    check(b < 1.0, $sformatf("f1 converges (%f)", b));
    run(F2_ROSENBROCK,  20, 10, 20, -2.048, 2.048, 32'h11, b);
    run(F3_SUM_SQUARES, 20, 10, 20, -10.0, 10.0, 32'h22, b);
    run(F4_SCHWEFEL222, 10, 30, 2, -10.0, 10.0, 32'h33, b);
    run(F5_MAX_ABS,     20, 10, 20, -100.0, 100.0, 32'h44, b);
    run(F6_CAMEL3,      20, 2, 50, -5.0, 5.0, 32'h55, b);
    check(b < 0.01, $sformatf("f6 converges (%f)", b));
    run(F10_STYBLINSKI, 20, 10, 20, -5.0, 5.0, 32'h66, b);
    run(F7_ACKLEY,      20, 10, 20, -32.0, 32.0, 32'h88, b);
    run(F8_RASTRIGIN,   20, 10, 20, -5.12, 5.12, 32'h99, b);
    run(F9_GRIEWANK,    20, 10, 20, -600.0, 600.0, 32'hAA, b);
    run(F_TDOA,         100, 2, 100, -20.0, 20.0, 32'hBB, b);
    begin
      real dx = 0;
      for (int k = 0; k < 2; k++) begin
        rd(12'(12'h100 + 4 * k), r);
        dx += (real'($signed(r)) / 65536.0 - target[k])**2;
      end
      check($sqrt(dx) < 0.1, $sformatf("TDOA position error %f", $sqrt(dx)));
    end
    run(F1_SPHERE,      512, 256, 1, -10.0, 10.0, 32'hCC, b);   // largest population and dimension
    run(F1_SPHERE,      1, 2, 3, -10.0, 10.0, 32'h77, b);
    // input check: D = 0 and LB > UB are refused with the error bit
    wr(12'h008, 32'd0);
    wr(12'h000, 32'h1);
    rd(12'h000, r);
    check(r == 32'h6, "D = 0 refused");
    if (r[2]) n_cfgerr++;
    wr(12'h008, 32'd2); wr(12'h010, 32'h0010_0000); wr(12'h014, 32'hFFF0_0000);
    wr(12'h000, 32'h1);
    rd(12'h000, r);
    check(r == 32'h6, "LB > UB refused");
    if (r[2]) n_cfgerr++;
    $display("mechanisms: init=%0d sin=%0d cos=%0d clamp_lo=%0d clamp_hi=%0d r1>=1:%0d r1<1:%0d improve=%0d sat=%0d divwait=%0d stall=%0d fmwait=%0d cfgerr=%0d",
             n_init, n_sin, n_cos, n_clamp_lo, n_clamp_hi, n_r1_hi, n_r1_lo, n_improve, n_sat, n_divwait, n_stall, n_fmwait, n_cfgerr);
    check(n_init == 13, "initialisations");
    check(n_start == 13, "starts while busy refused");
    check(n_fmwait > 0, "waited for the fitness module");
    check(n_cfgerr == 2, "bad configurations refused");
    check(n_sin > 0, "sin update"); check(n_cos > 0, "cos update");
    check(n_clamp_lo > 0, "clamp at lb"); check(n_clamp_hi > 0, "clamp at ub");
    check(n_r1_hi > 0, "r1 >= 1"); check(n_r1_lo > 0, "r1 < 1");
    check(n_improve > 0, "best replaced"); check(n_sat > 0, "fitness saturation");
    check(n_divwait > 0, "waited for divider"); check(n_stall > 0, "stream back-pressure");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
