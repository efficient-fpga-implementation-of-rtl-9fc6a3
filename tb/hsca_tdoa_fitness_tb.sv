// hsca_tdoa_fitness_tb: self-checking testbench of the TDOA fitness unit.
//
// Four anchors in a Y-shaped layout with one raised anchor; measured range
// differences come from a known target. Particles of three and of two
// coordinates (z = 0) are streamed back to back and with gaps. Each cost is
// compared with a floating-point model of sum (R_m1 - (R_m - R_1))^2, the
// tag is checked, and the latency (34 cycles after the last coordinate) and
// the busy flag are checked too. The true target itself must give a cost
// near zero.
module hsca_tdoa_fitness_tb;
  import hsca_pkg::*;

  localparam int M = 4;
  localparam int LAT = 34;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic       in_valid = 1'b0, first = 1'b0, last = 1'b0;
  pos_t       x = '0;
  logic [8:0] tag = '0;
  pos_t       anchor [M][3];
  pos_t       rdiff [M-1];
  logic       busy, out_valid;
  fit_t       fit;
  logic [8:0] out_tag;

  int checks = 0, failures = 0;
  longint cyc = 0;

  hsca_tdoa_fitness #(.M(M), .TAG_W(9)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #2_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic pos_t q(real v);
    return pos_t'($rtoi(v * 65536.0));
  endfunction
  function automatic real r(pos_t v);
    return $itor(v) / 65536.0;
  endfunction

  real ax [M][3];
  real target [3] = '{3.25, -2.5, 1.75};

  function automatic real range_to(real p [3], int m);
    return $sqrt((p[0]-ax[m][0])**2 + (p[1]-ax[m][1])**2 + (p[2]-ax[m][2])**2);
  endfunction

  function automatic real cost(real p [3]);
    real c = 0.0;
    for (int m = 1; m < M; m++) begin
      real e = r(rdiff[m-1]) - (range_to(p, m) - range_to(p, 0));
      c += e * e;
    end
    return c;
  endfunction

  real    exp_q [$];
  int     tag_q [$];
  longint last_q [$];
  int     n_out = 0;

  // Result checker.
  always @(negedge clk) if (out_valid) begin
    real e, got, tol;
    longint t0;
    e   = exp_q.pop_front();
    t0  = last_q.pop_front();
    got = $itor(fit) / 65536.0;
    tol = 2e-3 + 1e-4 * e;
    checks++;
    if (got - e > tol || e - got > tol) begin
      failures++;
      $display("FAIL: cost %f expected %f", got, e);
    end
    checks++;
    if (int'(out_tag) != tag_q.pop_front()) begin
      failures++;
      $display("FAIL: tag %0d", out_tag);
    end
    checks++;
    if (cyc - t0 != LAT) begin
      failures++;
      $display("FAIL: latency %0d", cyc - t0);
    end
    n_out++;
  end

  task automatic send(real p [3], int d, int t, int gap, bit drop);
    real pp [3];
    pp = p;
    if (d < 3) pp[2] = 0.0;
    exp_q.push_back(cost(pp));
    tag_q.push_back(t);
    for (int k = 0; k < d; k++) begin
      in_valid <= 1'b1;
      x        <= q(p[k]);
      first    <= (k == 0);
      last     <= (k == d - 1);
      tag      <= 9'(t);
      @(posedge clk);
      if (k == d - 1) last_q.push_back(cyc);
      // in_valid is lowered only where no assignment follows in this step
      if (gap > 0 || (drop && k == d - 1)) in_valid <= 1'b0;
      repeat (gap) @(posedge clk);
    end
  endtask

  initial begin
    real p [3];
    ax = '{'{0.0, 0.0, 0.0}, '{10.0, 0.0, 0.0}, '{-5.0, 8.66, 0.0}, '{-5.0, -8.66, 6.0}};
    for (int m = 0; m < M; m++)
      for (int k = 0; k < 3; k++) anchor[m][k] = q(ax[m][k]);
    for (int m = 1; m < M; m++) rdiff[m-1] = q(range_to(target, m) - range_to(target, 0));
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);

    checks++;
    if (busy) begin failures++; $display("FAIL: busy after reset"); end

    // The true target: cost near zero.
    send(target, 3, 1, 0, 1'b1);
    checks++;
    @(negedge clk);
    if (!busy) begin failures++; $display("FAIL: not busy"); end
    @(posedge clk);

    // Random particles, back to back, then with gaps, then two-dimensional.
    for (int i = 0; i < 40; i++) begin
      for (int k = 0; k < 3; k++) p[k] = ($itor($urandom_range(0, 40000)) - 20000.0) / 1000.0;
      send(p, (i >= 30) ? 2 : 3, i + 2, (i >= 20 && i < 25) ? 1 : 0, i == 39);
    end
    repeat (LAT + 5) @(posedge clk);

    checks++;
    if (n_out != 41) begin failures++; $display("FAIL: %0d results", n_out); end
    checks++;
    if (busy) begin failures++; $display("FAIL: busy at end"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
