// hsca_isqrt: pipelined integer square root (helper of the fitness units).
//
// root = floor(sqrt(rad)) for a W-bit unsigned radicand, by the
// digit-by-digit (restoring) method: each of the W/2 pipeline stages brings
// down two radicand bits and decides one root bit by a trial subtraction.
// A new radicand is accepted every cycle; the result, with the side-band
// word side_i, appears LAT = W/2 cycles later. busy is high while any
// stage holds a value. Fixed point: for a Q.16
// value v, feeding v << 16 gives sqrt(v) in Q.16.
module hsca_isqrt #(
  parameter int unsigned W  = 64,
  parameter int unsigned SW = 8
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  input  logic [W-1:0]    rad,
  input  logic [SW-1:0]   side_i,
  output logic            busy,
  output logic            out_valid,
  output logic [W/2-1:0]  root,
  output logic [SW-1:0]   side_o
);

  localparam int unsigned S  = W / 2;
  localparam int unsigned RW = W / 2 + 5;    // remainder width with headroom

  logic           v    [S+1];
  logic [W-1:0]   r    [S+1];   // radicand, consumed from the top two bits at a time
  logic [RW-1:0]  rem  [S+1];
  logic [W/2-1:0] q    [S+1];
  logic [SW-1:0]  sd   [S+1];

  assign v[0]   = in_valid;
  assign r[0]   = rad;
  assign rem[0] = '0;
  assign q[0]   = '0;
  assign sd[0]  = side_i;

  for (genvar k = 0; k < S; k++) begin : g_stage
    logic [RW-1:0] cur, trial;
    assign cur   = {rem[k][RW-3:0], r[k][W-1 -: 2]};
    assign trial = cur - RW'({q[k], 2'b01});
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        v[k+1]   <= 1'b0;
        r[k+1]   <= '0;
        rem[k+1] <= '0;
        q[k+1]   <= '0;
        sd[k+1]  <= '0;
      end else begin
        v[k+1]  <= v[k];
        r[k+1]  <= r[k] << 2;
        sd[k+1] <= sd[k];
        if (!trial[RW-1]) begin
          rem[k+1] <= trial;
          q[k+1]   <= {q[k][W/2-2:0], 1'b1};
        end else begin
          rem[k+1] <= cur;
          q[k+1]   <= {q[k][W/2-2:0], 1'b0};
        end
      end
    end
  end

  always_comb begin
    busy = 1'b0;
    for (int k = 1; k <= S; k++) busy |= v[k];
  end

  assign out_valid = v[S];
  assign root      = q[S];
  assign side_o    = sd[S];

endmodule
