// hsca_exp: exponential function for the Ackley benchmark (helper of the
// fitness module), one result per cycle, one register stage.
//
// e^y = 2^(y*log2 e) = 2^k * 2^f with k = floor(y*log2 e) and f in [0, 1).
// 2^f is a degree-6 polynomial (Taylor series of e^(f ln 2), Horner form,
// Q16 coefficients, error below 2e-4), then shifted by k. Input y is Q16.16
// (valid for -24 < y < 24), output Q48.16. Latency one cycle.
module hsca_exp
  import hsca_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  pos_t y,
  output fit_t e
);

  localparam logic [63:0] C [7] = '{64'd65536, 64'd45426, 64'd15743, 64'd3638,
                                    64'd630, 64'd87, 64'd10};

  logic signed [63:0] t;
  logic signed [47:0] k;
  logic [15:0]        f;
  logic [63:0]        p;
  fit_t               res;

  always_comb begin
    t = (64'(y) * 64'sd94548) >>> 16;          // y * log2(e), Q16.16
    k = t[63:16];
    f = t[15:0];
    p = C[6];
    for (int i = 5; i >= 0; i--) p = C[i] + ((p * 64'(f)) >> 16);
    if (k >= 0) res = fit_t'(p << k[5:0]);
    else        res = fit_t'(p >> (-k));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) e <= '0;
    else        e <= res;
  end

endmodule
