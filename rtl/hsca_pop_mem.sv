// hsca_pop_mem: population memory Pop[N][D] and fitness memory fitness[N].
//
// The source keeps the population and the fitness of each particle in
// on-chip memory (arrays Pop[i][j] and fitness[i] of its pseudo code). Here
// each population word is one particle: MAX_D Q16.16 coordinates side by
// side, so the initialize module can write a whole particle in one cycle
// (its D coordinates are generated in parallel) and the best particle can be
// copied out in one cycle, while the particle update module reads and
// writes single coordinates. The port set is this design's choice.
//
// Ports (all reads synchronous, data valid the cycle after the address):
//   row write  rw_en/rw_idx/rw_data       (wins over an element write to the same row)
//   elem write ew_en/ew_idx/ew_dim/ew_data
//   elem read  er_idx/er_dim -> er_data
//   row read   rr_idx -> rr_data
//   fitness    fw_en/fw_idx/fw_data, fr_idx -> fr_data
// Contents are not reset; every location is written before it is read.
module hsca_pop_mem
  import hsca_pkg::*;
#(
  parameter int unsigned MAX_N = 512,
  parameter int unsigned MAX_D = 256,
  localparam int unsigned IDX_W = $clog2(MAX_N),
  localparam int unsigned DIM_W = $clog2(MAX_D)
) (
  input  logic                        clk,
  input  logic                        rw_en,
  input  logic [IDX_W-1:0]            rw_idx,
  input  logic [MAX_D-1:0][POS_W-1:0] rw_data,
  input  logic                        ew_en,
  input  logic [IDX_W-1:0]            ew_idx,
  input  logic [DIM_W-1:0]            ew_dim,
  input  pos_t                        ew_data,
  input  logic [IDX_W-1:0]            er_idx,
  input  logic [DIM_W-1:0]            er_dim,
  output pos_t                        er_data,
  input  logic [IDX_W-1:0]            rr_idx,
  output logic [MAX_D-1:0][POS_W-1:0] rr_data,
  input  logic                        fw_en,
  input  logic [IDX_W-1:0]            fw_idx,
  input  fit_t                        fw_data,
  input  logic [IDX_W-1:0]            fr_idx,
  output fit_t                        fr_data
);

  logic [MAX_D-1:0][POS_W-1:0] pop [MAX_N];
  fit_t                        fitness [MAX_N];

  always_ff @(posedge clk) begin
    if (rw_en)
      pop[rw_idx] <= rw_data;
    else if (ew_en)
      pop[ew_idx][ew_dim] <= ew_data;
    er_data <= pos_t'(pop[er_idx][er_dim]);
    rr_data <= pop[rr_idx];
  end

  always_ff @(posedge clk) begin
    if (fw_en) fitness[fw_idx] <= fw_data;
    fr_data <= fitness[fr_idx];
  end

endmodule
