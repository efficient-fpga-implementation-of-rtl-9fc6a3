// hsca_div: unsigned sequential restoring divider (helper of hsca_core).
//
// Computes q = a / b for W-bit unsigned operands, one quotient bit per
// cycle, most significant first. start loads the operands; done pulses W
// cycles later with q valid (q holds until the next start). A zero divisor
// yields an all-ones quotient. Used once per run to turn the control factor
// constant a into the per-iteration decrement a/T of r1.
module hsca_div #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic         busy,
  output logic         done,
  output logic [W-1:0] q
);

  logic [W-1:0]         divisor, rem;
  logic [$clog2(W+1)-1:0] cnt;
  logic [W:0]           trial;

  assign trial = {rem, q[W-1]} - {1'b0, divisor};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      done    <= 1'b0;
      q       <= '0;
      rem     <= '0;
      divisor <= '0;
      cnt     <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        busy    <= 1'b1;
        q       <= a;            // dividend bits shift out of q as quotient bits shift in
        rem     <= '0;
        divisor <= b;
        cnt     <= '0;
      end else if (busy) begin
        if (!trial[W]) begin
          rem <= trial[W-1:0];
          q   <= {q[W-2:0], 1'b1};
        end else begin
          rem <= {rem[W-2:0], q[W-1]};
          q   <= {q[W-2:0], 1'b0};
        end
        cnt <= cnt + 1'b1;
        if (32'(cnt) == W - 1) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

endmodule
