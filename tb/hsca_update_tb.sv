// hsca_update_tb: runs particle-update iterations on a small population held
// in a testbench memory (synchronous read, like the population memory) and
// checks every written coordinate against Eq. (1) evaluated in floating
// point with the same random numbers (reference LFSR model) and $sin/$cos,
// including clamping to [lb, ub]. Checks the write-back order, the stream
// to the fitness module, that both the sin and the cos branch and both
// clamps occur, and the iteration time n*d + ITER + 3 cycles.
module hsca_update_tb;
  import hsca_pkg::*;
  localparam int N = 8, D = 4, IT = 16;
  logic clk = 0, rst_n = 0, load = 0, start = 0;
  logic [31:0] seed = 32'h0BAD_5EED;
  logic [3:0] n = 0;
  logic [2:0] d = 0;
  pos_t lb = 0, ub = 0, r1 = 0;
  logic [D-1:0][31:0] best = '0;
  logic busy, done, ew_en, fm_valid, fm_first, fm_last;
  logic [2:0] er_idx, ew_idx, fm_tag;
  logic [1:0] er_dim, ew_dim;
  pos_t er_data, ew_data, fm_x;
  int checks = 0, failures = 0;

  hsca_update #(.MAX_N(N), .MAX_D(D), .CORDIC_ITER(IT)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  pos_t mem [N][D];
  always_ff @(posedge clk) begin
    er_data <= mem[er_idx][er_dim];
    if (ew_en) mem[ew_idx][ew_dim] <= ew_data;
  end

  function automatic logic [31:0] leap(logic [31:0] s);
    for (int b = 0; b < 32; b++) s = s[0] ? ((s >> 1) ^ 32'h8020_0003) : (s >> 1);
    return s;
  endfunction

  task automatic check(logic c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  logic [31:0] rng;
  int n_sin = 0, n_cos = 0, n_clamp_lo = 0, n_clamp_hi = 0;

  task automatic iterate(int nn, int dd, real rr1);
    real expv [N][D];
    int  k, t0;
    pos_t old [N][D];
    n = 4'(nn); d = 3'(dd); r1 = pos_t'($rtoi(rr1 * 65536.0));
    old = mem;
    // reference, in issue order
    for (int i = 0; i < nn; i++)
      for (int j = 0; j < dd; j++) begin
        real r2, r3, x, p, diff, e, tr;
        logic [47:0] a;
        a  = {32'h0, rng[15:0]} * 48'(Q_TWO_PI);
        r2 = real'(a[47:16]) / 65536.0;
        r3 = real'(rng[30:16]) / 16384.0;
        x  = real'(old[i][j]) / 65536.0;
        p  = real'(pos_t'(best[j])) / 65536.0;
        diff = r3 * p - x;
        if (diff < 0) diff = -diff;
        tr = rng[31] ? $cos(r2) : $sin(r2);
        if (rng[31]) n_cos++; else n_sin++;
        e = x + rr1 * tr * diff;
        if (e > real'(ub) / 65536.0) begin e = real'(ub) / 65536.0; n_clamp_hi++; end
        if (e < real'(lb) / 65536.0) begin e = real'(lb) / 65536.0; n_clamp_lo++; end
        expv[i][j] = e;
        rng = leap(rng);
      end
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    k = 0; t0 = 1;
    while (!done) begin
      if (ew_en) begin
        int ei, ej;
        real g, e;
        ei = k / dd; ej = k % dd;
        g = real'(ew_data) / 65536.0;
        e = expv[ei][ej];
        check(32'(ew_idx) == ei && 32'(ew_dim) == ej, "write order");
        check(g - e < 0.003 && e - g < 0.003, $sformatf("value [%0d][%0d] got %f expected %f", ei, ej, g, e));
        check(fm_valid && fm_x == ew_data && fm_tag == ew_idx && fm_first == (ej == 0)
              && fm_last == (ej == dd - 1), "fitness stream");
        k++;
      end
      @(negedge clk);
      t0++;
    end
    // done is high in the cycle of the last write
    check(k == nn * dd - 1 && ew_en, "last write with done");
    check(t0 == nn * dd + IT + 3, $sformatf("iteration time %0d", t0));
    @(negedge clk);
    check(!busy, "idle");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < N; i++)
      for (int j = 0; j < D; j++) mem[i][j] = pos_t'($urandom_range(0, 20 * 65536)) - pos_t'(10 * 65536);
    for (int j = 0; j < D; j++) best[j] = 32'($urandom_range(0, 8 * 65536)) - 32'(4 * 65536);
    lb = -10 * 65536; ub = 10 * 65536;
    @(negedge clk); load = 1; @(negedge clk); load = 0;
    rng = seed ^ 32'h5A5A_A5A5;
    iterate(8, 4, 2.0);
    iterate(5, 3, 1.25);
    lb = -2 * 65536; ub = 2 * 65536;      // narrow box: forces clamping
    iterate(8, 4, 2.0);
    iterate(8, 4, 0.1);
    check(n_sin > 0 && n_cos > 0 && n_clamp_lo > 0 && n_clamp_hi > 0,
          $sformatf("mechanisms sin=%0d cos=%0d clamp_lo=%0d clamp_hi=%0d", n_sin, n_cos, n_clamp_lo, n_clamp_hi));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
