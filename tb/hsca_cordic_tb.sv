// hsca_cordic_tb: drives one angle per cycle over [0, 2*pi] into the CORDIC
// and compares sin/cos with $sin/$cos. The default four-rotation unit is
// checked against the error bound of four rotations (residual angle up to
// atan(1/8) plus the gain error of the fixed K); a 16-rotation instance is
// checked to 2e-3. Also checks the latency (ITER + 1 cycles) and that a
// result leaves every cycle.
module hsca_cordic_tb;
  import hsca_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0;
  pos_t theta = 0;
  logic v4, v16;
  pos_t s4, c4, s16, c16;
  int checks = 0, failures = 0;
  localparam int NA = 400;

  hsca_cordic #(.ITER(4))  dut4  (.clk, .rst_n, .in_valid, .theta, .out_valid(v4),  .sin_o(s4),  .cos_o(c4));
  hsca_cordic #(.ITER(16)) dut16 (.clk, .rst_n, .in_valid, .theta, .out_valid(v16), .sin_o(s16), .cos_o(c16));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real angles [NA];
  int  sent_cycle [NA];
  int  cyc = 0;
  int  got4 = 0, got16 = 0;
  always @(posedge clk) cyc++;

  task automatic cmp(pos_t got, real exp, real tol, string what, int k);
    real g;
    g = real'(got) / 65536.0;
    checks++;
    if (g - exp > tol || exp - g > tol) begin
      failures++;
      $display("FAIL %s angle %f: got %f expected %f", what, angles[k], g, exp);
    end
  endtask

  // Collect results in issue order.
  always @(negedge clk) if (rst_n) begin
    if (v4) begin
      cmp(s4, $sin(angles[got4]), 0.13, "sin ITER=4", got4);
      cmp(c4, $cos(angles[got4]), 0.13, "cos ITER=4", got4);
      checks++;
      if (cyc - sent_cycle[got4] != 5) begin
        failures++;
        $display("FAIL latency ITER=4: %0d", cyc - sent_cycle[got4]);
      end
      got4++;
    end
    if (v16) begin
      cmp(s16, $sin(angles[got16]), 0.002, "sin ITER=16", got16);
      cmp(c16, $cos(angles[got16]), 0.002, "cos ITER=16", got16);
      checks++;
      if (cyc - sent_cycle[got16] != 17) begin
        failures++;
        $display("FAIL latency ITER=16: %0d", cyc - sent_cycle[got16]);
      end
      got16++;
    end
  end

  initial begin
    for (int k = 0; k < NA; k++)
      angles[k] = (k < 8) ? real'(k) * 3.14159265358979 / 4.0
                          : real'($urandom_range(0, 411775)) / 65536.0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < NA; k++) begin
      @(negedge clk);
      in_valid = 1;
      theta = pos_t'($rtoi(angles[k] * 65536.0));
      sent_cycle[k] = cyc;
    end
    @(negedge clk);
    in_valid = 0;
    repeat (30) @(posedge clk);
    checks++;
    if (got4 != NA || got16 != NA) begin
      failures++;
      $display("FAIL result count %0d %0d", got4, got16);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
