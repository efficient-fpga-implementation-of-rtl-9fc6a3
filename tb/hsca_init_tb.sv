// hsca_init_tb: runs the initialize module for two populations and checks
// every row written to memory against a reference (per-lane LFSR model,
// x = lb + r*(ub-lb)), the bounds, the coordinate stream to the fitness
// module (values, first/last flags, tags, one coordinate per cycle, all
// coordinates of a row generated in the same cycle) and the run time of
// n*d + 2 cycles.
module hsca_init_tb;
  import hsca_pkg::*;
  localparam int N = 16, D = 6;
  logic clk = 0, rst_n = 0, start = 0;
  logic [4:0] n = 0;
  logic [3:0] d = 0;
  pos_t lb = 0, ub = 0;
  logic [31:0] seed = 0;
  logic busy, done, rw_en, fm_valid, fm_first, fm_last;
  logic [3:0] rw_idx, fm_tag;
  logic [D-1:0][31:0] rw_data;
  pos_t fm_x;
  int checks = 0, failures = 0;

  hsca_init #(.MAX_N(N), .MAX_D(D)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] leap(logic [31:0] s);
    for (int b = 0; b < 32; b++) s = s[0] ? ((s >> 1) ^ 32'h8020_0003) : (s >> 1);
    return s;
  endfunction

  task automatic check(logic c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  logic [31:0] lane [D];
  pos_t        rows [N][D];
  int          nrows, nstream, cyc;

  task automatic run(int nn, int dd, real l, real u, logic [31:0] s);
    int t0;
    n = 5'(nn); d = 4'(dd);
    lb = pos_t'($rtoi(l * 65536.0)); ub = pos_t'($rtoi(u * 65536.0)); seed = s;
    for (int k = 0; k < D; k++) lane[k] = s ^ (32'h9E37_79B9 * 32'(k + 1));
    nrows = 0; nstream = 0; cyc = 0;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    t0 = 1;
    while (!done) begin
      // row write: all lanes in this cycle
      if (rw_en) begin
        check(32'(rw_idx) == nrows, "row index");
        for (int k = 0; k < D; k++) begin
          logic [47:0] sc;
          pos_t e;
          sc = {32'h0, lane[k][31:16]} * {16'h0, ub - lb};
          e = lb + pos_t'(sc[47:16]);
          rows[nrows][k] = pos_t'(rw_data[k]);
          if (k < dd) begin
            check(pos_t'(rw_data[k]) == e, "row value");
            check(pos_t'(rw_data[k]) >= lb && pos_t'(rw_data[k]) < ub, "bounds");
          end
          lane[k] = leap(lane[k]);
        end
        nrows++;
      end
      if (fm_valid) begin
        int pi, pj;
        pi = nstream / dd; pj = nstream % dd;
        check(32'(fm_tag) == pi && fm_x == rows[pi][pj], "stream value");
        check(fm_first == (pj == 0) && fm_last == (pj == dd - 1), "stream flags");
        nstream++;
      end
      @(negedge clk);
      t0++;
    end
    check(nrows == nn && nstream == nn * dd, "counts");
    check(t0 == nn * dd + 2, $sformatf("run time %0d cycles", t0));
    @(negedge clk);
    check(!busy, "idle after done");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(10, 5, -10.0, 10.0, 32'h1234_5678);
    run(16, 6, -2.048, 2.048, 32'hCAFE_F00D);
    run(1, 1, -600.0, 600.0, 32'h0000_0001);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
