// hsca_update: particle update module (PUM) of the HSCA engine.
//
// Runs one iteration of the Sine Cosine Algorithm over the population:
// every coordinate j of every particle i moves by
//   x' = x + r1 * sin(r2) * |r3 * P[j] - x|   if r4 < 0.5
//   x' = x + r1 * cos(r2) * |r3 * P[j] - x|   if r4 >= 0.5
// where P is the best particle found so far, r1 the control factor supplied
// by the engine, r2 in [0, 2*pi), r3 in [0, 2) and r4 in [0, 1) random.
// As in the source, the loop over coordinates is pipelined rather than
// unrolled, and sin/cos come from the CORDIC module: one coordinate enters
// per cycle and the whole pipeline (memory read, CORDIC, update, write)
// keeps one coordinate per stage. New coordinates are written back to the
// population memory and streamed to the fitness module in the same cycle.
//
// This design's choices: r2, r3, r4 are drawn fresh for every coordinate
// from one 32-bit word of the LFSR (r2 = 2*pi*rnd[15:0]/2^16,
// r3 = rnd[30:16]/2^14, r4 = rnd[31]); the updated coordinate is clamped
// to [lb, ub]; all arithmetic is Q16.16 with truncation.
//
// Interface: load/seed seed the generator (once per run). start begins an
// iteration with n, d, lb, ub, r1 and best held stable until done, which
// pulses in the cycle the last coordinate is written. An iteration takes
// n*d + CORDIC_ITER + 3 cycles from start to done. ew_* writes the population memory,
// er_* reads it (synchronous, one cycle), fm_* feeds the fitness module.
module hsca_update
  import hsca_pkg::*;
#(
  parameter int unsigned MAX_N       = 512,
  parameter int unsigned MAX_D       = 256,
  parameter int unsigned CORDIC_ITER = 4,
  localparam int unsigned IDX_W = $clog2(MAX_N),
  localparam int unsigned DIM_W = $clog2(MAX_D)
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        load,
  input  logic [31:0]                 seed,
  input  logic                        start,
  input  logic [IDX_W:0]              n,
  input  logic [DIM_W:0]              d,
  input  pos_t                        lb,
  input  pos_t                        ub,
  input  pos_t                        r1,
  input  logic [MAX_D-1:0][POS_W-1:0] best,
  output logic                        busy,
  output logic                        done,
  output logic [IDX_W-1:0]            er_idx,
  output logic [DIM_W-1:0]            er_dim,
  input  pos_t                        er_data,
  output logic                        ew_en,
  output logic [IDX_W-1:0]            ew_idx,
  output logic [DIM_W-1:0]            ew_dim,
  output pos_t                        ew_data,
  output logic                        fm_valid,
  output pos_t                        fm_x,
  output logic                        fm_first,
  output logic                        fm_last,
  output logic [IDX_W-1:0]            fm_tag
);

  localparam int unsigned CL = CORDIC_ITER + 1;   // CORDIC latency

  typedef struct packed {
    logic             valid;
    logic [IDX_W-1:0] idx;
    logic [DIM_W-1:0] dim;
    logic             first;
    logic             last;
    logic             final_elem;
    logic [15:0]      r2;
    pos_t             r3;
    logic             r4;
    pos_t             p;
  } meta_t;

  logic             running;
  logic [IDX_W-1:0] i;
  logic [DIM_W-1:0] j;
  logic [31:0]      rnd;
  logic             last_dim, last_particle, issue;

  meta_t meta0;                // issue stage, memory read in flight
  meta_t line [CL];            // aligned with the CORDIC pipeline
  pos_t  xline [CL];
  logic  cordic_valid;
  pos_t  sin_v, cos_v;
  pos_t  theta;

  hsca_lfsr u_rng (
    .clk  (clk),
    .rst_n(rst_n),
    .load (load),
    .seed (seed ^ 32'h5A5A_A5A5),
    .en   (issue),
    .rnd  (rnd)
  );

  assign last_dim      = (32'(j) == 32'(d) - 1);
  assign last_particle = (32'(i) == 32'(n) - 1);
  assign issue         = running;
  assign er_idx        = i;
  assign er_dim        = j;
  assign busy          = running || meta0.valid || line[0].valid || cordic_valid || ew_en;

  // Issue: one coordinate per cycle.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running <= 1'b0;
      i       <= '0;
      j       <= '0;
      meta0   <= '0;
    end else begin
      meta0.valid <= issue;
      if (issue) begin
        meta0.idx        <= i;
        meta0.dim        <= j;
        meta0.first      <= (j == '0);
        meta0.last       <= last_dim;
        meta0.final_elem <= last_dim && last_particle;
        meta0.r2         <= rnd[15:0];
        meta0.r3         <= pos_t'({rnd[30:16], 2'b00});
        meta0.r4         <= rnd[31];
        meta0.p          <= pos_t'(best[j]);
      end
      if (start && !running) begin
        running <= 1'b1;
        i       <= '0;
        j       <= '0;
      end else if (issue) begin
        if (last_dim) begin
          j <= '0;
          if (last_particle) running <= 1'b0;
          else               i <= i + 1'b1;
        end else begin
          j <= j + 1'b1;
        end
      end
    end
  end

  // r2 = 2*pi * rnd[15:0] / 2^16, in Q16.16
  always_comb begin
    logic [47:0] a;
    a = {32'h0, meta0.r2} * 48'(Q_TWO_PI);
    theta = pos_t'(a[47:16]);
  end

  hsca_cordic #(.ITER(CORDIC_ITER)) u_cordic (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (meta0.valid),
    .theta    (theta),
    .out_valid(cordic_valid),
    .sin_o    (sin_v),
    .cos_o    (cos_v)
  );

  // Delay line matching the CORDIC latency; the memory word joins here.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < CL; k++) begin
        line[k]  <= '0;
        xline[k] <= '0;
      end
    end else begin
      line[0]  <= meta0;
      xline[0] <= er_data;
      for (int k = 1; k < CL; k++) begin
        line[k]  <= line[k-1];
        xline[k] <= xline[k-1];
      end
    end
  end

  // Update, Eq. (1), then clamp.
  meta_t m;
  pos_t  x, trig, dst, diff, step, xn;
  always_comb begin
    m    = line[CL-1];
    x    = xline[CL-1];
    trig = m.r4 ? cos_v : sin_v;
    diff = qmul(m.r3, m.p) - x;
    dst = diff[POS_W-1] ? -diff : diff;
    step = qmul(qmul(r1, trig), dst);
    xn   = x + step;
    if (xn > ub)      xn = ub;
    else if (xn < lb) xn = lb;
  end

  // Write-back and fitness stream.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ew_en    <= 1'b0;
      ew_idx   <= '0;
      ew_dim   <= '0;
      ew_data  <= '0;
      fm_first <= 1'b0;
      fm_last  <= 1'b0;
      done     <= 1'b0;
    end else begin
      ew_en    <= m.valid;
      ew_idx   <= m.idx;
      ew_dim   <= m.dim;
      ew_data  <= xn;
      fm_first <= m.first;
      fm_last  <= m.last;
      done     <= m.valid && m.final_elem;
    end
  end

  assign fm_valid = ew_en;
  assign fm_x     = ew_data;
  assign fm_tag   = ew_idx;

  // The CORDIC output must line up with the delay line.
  assert property (@(posedge clk) disable iff (!rst_n) cordic_valid == line[CL-1].valid);

endmodule
