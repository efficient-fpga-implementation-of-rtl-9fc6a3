// hsca_init: initialize module (IM) of the HSCA engine.
//
// Creates the random initial population and sends every particle to the
// fitness module. As in the source's pseudo code, the loop over the D
// coordinates of a particle is fully unrolled: MAX_D random number
// generators, one per coordinate, produce all coordinates of a particle in
// the same clock cycle, each scaled into the search space,
//   x_j = lb + r_j * (ub - lb),  r_j = top 16 LFSR bits / 2^16 in [0, 1),
// and the whole particle is written to the population memory at once. The
// loop over particles is pipelined: while a particle's coordinates are
// streamed to the fitness module one per cycle, the next one is generated
// in the cycle of the last coordinate, so a particle takes d cycles.
// The per-coordinate seeds (seed XOR a per-lane constant) and the streaming
// of coordinates to the fitness module are this design's choices.
//
// Interface: start (one cycle, with n, d, lb, ub, seed stable until done)
// loads the generators; done pulses one cycle after the last coordinate has
// been sent. Total time n*d + 2 cycles. Row writes go out on rw_*, the
// coordinate stream on fm_* (first/last mark coordinates 0 and d-1, tag is
// the particle index).
module hsca_init
  import hsca_pkg::*;
#(
  parameter int unsigned MAX_N = 512,
  parameter int unsigned MAX_D = 256,
  localparam int unsigned IDX_W = $clog2(MAX_N),
  localparam int unsigned DIM_W = $clog2(MAX_D)
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        start,
  input  logic [IDX_W:0]              n,
  input  logic [DIM_W:0]              d,
  input  pos_t                        lb,
  input  pos_t                        ub,
  input  logic [31:0]                 seed,
  output logic                        busy,
  output logic                        done,
  output logic                        rw_en,
  output logic [IDX_W-1:0]            rw_idx,
  output logic [MAX_D-1:0][POS_W-1:0] rw_data,
  output logic                        fm_valid,
  output pos_t                        fm_x,
  output logic                        fm_first,
  output logic                        fm_last,
  output logic [IDX_W-1:0]            fm_tag
);

  typedef enum logic [1:0] {S_IDLE, S_GEN, S_STREAM} state_e;
  state_e state;

  logic [IDX_W-1:0]            i;
  logic [DIM_W-1:0]            j;
  logic [MAX_D-1:0][POS_W-1:0] row, buffer;
  logic                        gen;
  pos_t                        range;
  logic                        last_dim, last_particle;

  assign range = ub - lb;

  // One generator per coordinate: the unrolled inner loop.
  for (genvar k = 0; k < MAX_D; k++) begin : g_lane
    logic [31:0] rnd;
    logic [47:0] scaled;
    hsca_lfsr u_rng (
      .clk  (clk),
      .rst_n(rst_n),
      .load (start),
      .seed (seed ^ (32'h9E37_79B9 * 32'(k + 1))),
      .en   (gen),
      .rnd  (rnd)
    );
    assign scaled = {32'h0, rnd[31:16]} * {16'h0, range};
    assign row[k] = lb + pos_t'(scaled[47:16]);
  end

  assign last_dim      = (32'(j) == 32'(d) - 1);
  assign last_particle = (32'(i) == 32'(n) - 1);
  assign gen = (state == S_GEN) || (state == S_STREAM && last_dim && !last_particle);

  assign rw_en    = gen;
  assign rw_idx   = (state == S_GEN) ? '0 : i + 1'b1;
  assign rw_data  = row;

  assign fm_valid = (state == S_STREAM);
  assign fm_x     = pos_t'(buffer[j]);
  assign fm_first = (j == '0);
  assign fm_last  = last_dim;
  assign fm_tag   = i;
  assign busy     = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      i      <= '0;
      j      <= '0;
      buffer <= '0;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      if (gen) buffer <= row;
      unique case (state)
        S_IDLE:   if (start) state <= S_GEN;
        S_GEN: begin
          i     <= '0;
          j     <= '0;
          state <= S_STREAM;
        end
        S_STREAM: begin
          if (last_dim) begin
            j <= '0;
            if (last_particle) begin
              state <= S_IDLE;
              done  <= 1'b1;
            end else begin
              i <= i + 1'b1;
            end
          end else begin
            j <= j + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
