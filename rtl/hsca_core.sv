// hsca_core: the HSCA engine, a hardware Sine Cosine Algorithm optimiser.
//
// The engine minimises the selected benchmark function over a population of
// n particles in d dimensions, bounded by [lb, ub], for T iterations. It
// connects the blocks of the source's architecture: the initialize module
// (IM) creates the population and has it evaluated by the fitness module
// (FM); then, T times, the particle update module (PUM) moves every
// particle with the CORDIC-based update of the Sine Cosine Algorithm and the
// FM evaluates it again. The population and fitness values live in the
// population memory. The control factor follows r1 = a - a*t/T, t = 0..T-1:
// a/T is computed once by a sequential divider and r1 = a - t*(a/T).
//
// Best-solution tracking (this design's choice of mechanism): while a phase
// runs, every fitness result is compared with the best so far and the index
// of an improving particle is remembered. When the phase has drained, that
// particle is copied from the population memory into the best register P in
// one cycle, so the whole of an iteration sees one fixed P, as in the
// standard algorithm.
//
// Interface: start (one cycle; configuration held stable until done), done
// pulses when the run ends; best_fit/best_pos hold the result, cycles the
// length of the last run in clock cycles, iter the iterations completed.
// fit_idx/fit_data read the fitness memory (one cycle latency). t_max = 0
// stops after the initial population.
// Timing: a run takes max(n*d + 4 + max(L, 2), 34) + T*(n*d + CORDIC_ITER + 6 + L)
// cycles from start to done (34: the divider, when initialisation is
// shorter), where L is the fitness latency: 1 for the polynomial
// benchmarks, 18 for f8/f9, 52 for f7 and 35 for TDOA. Each phase waits in
// S_FLUSH until the fitness module has emptied.
module hsca_core
  import hsca_pkg::*;
#(
  parameter int unsigned MAX_N       = 512,
  parameter int unsigned MAX_D       = 256,
  parameter int unsigned T_W         = 16,
  parameter int unsigned CORDIC_ITER = 4,
  localparam int unsigned IDX_W = $clog2(MAX_N),
  localparam int unsigned DIM_W = $clog2(MAX_D)
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        start,
  input  logic [IDX_W:0]              n,
  input  logic [DIM_W:0]              d,
  input  logic [T_W-1:0]              t_max,
  input  pos_t                        lb,
  input  pos_t                        ub,
  input  pos_t                        a,
  input  logic [31:0]                 seed,
  input  func_e                       func,
  input  pos_t                        anchor [TDOA_M][3],
  input  pos_t                        rdiff  [TDOA_M-1],
  output logic                        busy,
  output logic                        done,
  output fit_t                        best_fit,
  output logic [MAX_D-1:0][POS_W-1:0] best_pos,
  output logic [31:0]                 cycles,
  output logic [T_W-1:0]              iter,
  input  logic [IDX_W-1:0]            fit_idx,
  output fit_t                        fit_data
);

  typedef enum logic [2:0] {
    S_IDLE, S_INIT, S_ITER, S_WAIT, S_FLUSH, S_COPY, S_LATCH
  } state_e;
  state_e state;

  // ---------------- population memory ----------------
  logic                        rw_en, ew_en, fw_en;
  logic [IDX_W-1:0]            rw_idx, ew_idx, er_idx, rr_idx, fw_idx;
  logic [DIM_W-1:0]            ew_dim, er_dim;
  logic [MAX_D-1:0][POS_W-1:0] rw_data, rr_data;
  pos_t                        ew_data, er_data;
  fit_t                        fw_data;

  hsca_pop_mem #(.MAX_N(MAX_N), .MAX_D(MAX_D)) u_mem (
    .clk, .rw_en, .rw_idx, .rw_data, .ew_en, .ew_idx, .ew_dim, .ew_data,
    .er_idx, .er_dim, .er_data, .rr_idx, .rr_data,
    .fw_en, .fw_idx, .fw_data, .fr_idx(fit_idx), .fr_data(fit_data)
  );

  // ---------------- initialize module ----------------
  logic             im_busy, im_done, im_fm_valid, im_fm_first, im_fm_last;
  pos_t             im_fm_x;
  logic [IDX_W-1:0] im_fm_tag;

  hsca_init #(.MAX_N(MAX_N), .MAX_D(MAX_D)) u_im (
    .clk, .rst_n, .start(start && state == S_IDLE), .n, .d, .lb, .ub, .seed,
    .busy(im_busy), .done(im_done), .rw_en, .rw_idx, .rw_data,
    .fm_valid(im_fm_valid), .fm_x(im_fm_x), .fm_first(im_fm_first),
    .fm_last(im_fm_last), .fm_tag(im_fm_tag)
  );

  // ---------------- control factor r1 ----------------
  logic        div_busy, div_done;
  logic [31:0] r1_step;
  pos_t        r1;

  hsca_div #(.W(32)) u_div (
    .clk, .rst_n, .start(start && state == S_IDLE), .a(a), .b(32'(t_max)),
    .busy(div_busy), .done(div_done), .q(r1_step)
  );

  // ---------------- particle update module ----------------
  logic             pum_start, pum_busy, pum_done, pum_fm_valid, pum_fm_first, pum_fm_last;
  pos_t             pum_fm_x;
  logic [IDX_W-1:0] pum_fm_tag;

  hsca_update #(.MAX_N(MAX_N), .MAX_D(MAX_D), .CORDIC_ITER(CORDIC_ITER)) u_pum (
    .clk, .rst_n, .load(start && state == S_IDLE), .seed, .start(pum_start),
    .n, .d, .lb, .ub, .r1, .best(best_pos),
    .busy(pum_busy), .done(pum_done),
    .er_idx, .er_dim, .er_data, .ew_en, .ew_idx, .ew_dim, .ew_data,
    .fm_valid(pum_fm_valid), .fm_x(pum_fm_x), .fm_first(pum_fm_first),
    .fm_last(pum_fm_last), .fm_tag(pum_fm_tag)
  );

  // ---------------- fitness module ----------------
  logic             fm_valid, fm_first, fm_last, fm_busy, fm_out_valid;
  pos_t             fm_x;
  logic [IDX_W-1:0] fm_tag, fm_out_tag;
  fit_t             fm_fit;

  assign fm_valid = im_fm_valid || pum_fm_valid;
  assign fm_x     = im_fm_valid ? im_fm_x     : pum_fm_x;
  assign fm_first = im_fm_valid ? im_fm_first : pum_fm_first;
  assign fm_last  = im_fm_valid ? im_fm_last  : pum_fm_last;
  assign fm_tag   = im_fm_valid ? im_fm_tag   : pum_fm_tag;

  hsca_fitness #(.TAG_W(IDX_W), .MAX_D(MAX_D)) u_fm (
    .clk, .rst_n, .func, .in_valid(fm_valid), .x(fm_x), .first(fm_first),
    .last(fm_last), .tag(fm_tag), .anchor, .rdiff, .busy(fm_busy),
    .out_valid(fm_out_valid), .fit(fm_fit),
    .out_tag(fm_out_tag)
  );

  assign fw_en   = fm_out_valid;
  assign fw_idx  = fm_out_tag;
  assign fw_data = fm_fit;

  // ---------------- best tracking and sequencing ----------------
  fit_t             cand_fit;
  logic [IDX_W-1:0] cand_idx;
  logic             cand_new, div_ready, iter_started;
  logic [T_W-1:0]   t;

  assign rr_idx    = cand_idx;
  assign pum_start = (state == S_ITER);
  assign busy      = (state != S_IDLE);
  assign iter      = t;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      done      <= 1'b0;
      best_fit  <= FIT_MAX;
      best_pos  <= '0;
      cand_fit  <= FIT_MAX;
      cand_idx  <= '0;
      cand_new  <= 1'b0;
      div_ready <= 1'b0;
      t         <= '0;
      r1        <= '0;
      cycles    <= '0;
    end else begin
      done <= 1'b0;
      if (div_done) div_ready <= 1'b1;
      if (state != S_IDLE) cycles <= cycles + 1'b1;

      // Compare every fitness result with the best so far.
      if (fm_out_valid && (fm_fit < cand_fit)) begin
        cand_fit <= fm_fit;
        cand_idx <= fm_out_tag;
        cand_new <= 1'b1;
      end

      unique case (state)
        S_IDLE: if (start) begin
          state     <= S_INIT;
          best_fit  <= FIT_MAX;
          cand_fit  <= FIT_MAX;
          cand_new  <= 1'b0;
          div_ready <= 1'b0;
          t         <= '0;
          cycles    <= 32'd1;
        end
        S_INIT: if (im_done) state <= S_FLUSH;
        S_ITER: state <= S_WAIT;           // PUM started this cycle
        S_WAIT: if (pum_done) state <= S_FLUSH;
        S_FLUSH: if (!fm_busy) state <= S_COPY;   // last fitness result is being compared
        S_COPY:  state <= S_LATCH;         // best particle is being read
        S_LATCH: if (div_ready || div_done) begin
          if (cand_new) begin
            best_pos <= rr_data;
            best_fit <= cand_fit;
          end
          cand_new <= 1'b0;
          if (iter_started) t <= t + 1'b1;
          if ((iter_started ? t + 1'b1 : t) == t_max) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end else begin
            r1    <= iter_started ? r1 - pos_t'(r1_step) : a;
            state <= S_ITER;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // Set once the first update iteration has begun.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                 iter_started <= 1'b0;
    else if (state == S_IDLE)   iter_started <= 1'b0;
    else if (state == S_ITER)   iter_started <= 1'b1;
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(im_fm_valid && pum_fm_valid));

endmodule
