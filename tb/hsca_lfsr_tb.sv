// hsca_lfsr_tb: checks the LFSR against a bit-serial reference model of the
// polynomial x^32 + x^22 + x^2 + x + 1: seeding, zero-seed replacement,
// hold when disabled, the 32-shift leap per clock and a rough balance of
// the output bits.
module hsca_lfsr_tb;
  logic clk = 0, rst_n = 0, load = 0, en = 0;
  logic [31:0] seed = 0, rnd;
  int checks = 0, failures = 0;

  hsca_lfsr dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference: polynomial taps applied one bit at a time, feedback from bit 0.
  function automatic logic [31:0] ref_step(logic [31:0] s, int k);
    for (int b = 0; b < k; b++) begin
      logic fb;
      fb = s[0];
      s = {1'b0, s[31:1]};
      if (fb) begin
        s[31] = ~s[31];
        s[21] = ~s[21];
        s[1]  = ~s[1];
        s[0]  = ~s[0];
      end
    end
    return s;
  endfunction

  task automatic check(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    logic [31:0] model;
    int ones;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    check(rnd, 32'h1, "reset state");
    // zero seed
    load = 1; seed = 0; @(posedge clk); #1 load = 0;
    check(rnd, 32'h1, "zero seed");
    // real seed
    load = 1; seed = 32'hDEAD_BEEF; @(posedge clk); #1 load = 0;
    check(rnd, 32'hDEAD_BEEF, "seed load");
    repeat (3) @(posedge clk);
    #1 check(rnd, 32'hDEAD_BEEF, "hold when disabled");
    model = 32'hDEAD_BEEF;
    ones = 0;
    en = 1;
    for (int k = 0; k < 2000; k++) begin
      @(posedge clk); #1;
      model = ref_step(model, 32);
      check(rnd, model, "sequence");
      ones += rnd[31];
      checks++;
      if (rnd == 0) begin failures++; $display("FAIL zero state"); end
    end
    en = 0;
    checks++;
    if (ones < 900 || ones > 1100) begin
      failures++;
      $display("FAIL bit balance %0d of 2000", ones);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
