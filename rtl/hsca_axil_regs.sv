// hsca_axil_regs: AXI4-Lite register file through which the processor sets
// the parameters of a run and reads its results.
//
// In the source system the processor writes the SCA parameters (population
// size, dimensions, bounds, seed) to the IP core over AXI-Lite. The
// register map below is this design's own:
//   0x00 CTRL      W: bit0 = 1 starts a run.  R: bit0 busy, bit1 done (sticky,
//                  cleared by the next start), bit2 configuration error
//   0x04 N         population size            0x08 D     dimensions
//   0x0C T         maximum iterations         0x10 LB    lower bound, Q16.16
//   0x14 UB        upper bound, Q16.16        0x18 A     r1 constant a, Q16.16
//   0x1C SEED      random seed                0x20 FUNC  0..9 = f1..f10, 10 = TDOA
//   0x24/0x28 R    best fitness, Q48.16, low/high word
//   0x2C CYCLES R  cycles of the last run     0x30 ITER R iterations done
//   0x34 FIT_IDX   particle whose fitness 0x38/0x3C (R, low/high) return
//   0x40 + 12*m + 4*k  coordinate k (x, y, z) of TDOA anchor m, Q16.16
//   0x70 + 4*(m-1)     measured range difference R_m1 (m = 2..M), Q16.16
//                  (func 10 selects the TDOA cost)
//   0x100 + 4*j R  coordinate j of the best particle, Q16.16
// Unmapped reads return 0, unmapped writes are ignored; responses are OKAY.
//
// Handshake: a write is taken when AWVALID and WVALID are both high and no
// write response is pending (AWREADY = WREADY = 1 for that cycle); BVALID
// follows the next cycle. A read is taken when ARVALID is high and no read
// data is pending; RVALID follows the next cycle. WSTRB is ignored (whole
// words). start_o is a one-cycle pulse.
//
// Input check (the source checks the scope of the input values before a
// run): a start is refused, and bit2 of CTRL set until the next accepted
// start, unless 1 <= N <= MAX_N, 1 <= D <= MAX_D and LB < UB. A start while
// busy is ignored.
module hsca_axil_regs
  import hsca_pkg::*;
#(
  parameter int unsigned MAX_N = 512,
  parameter int unsigned MAX_D = 256,
  parameter int unsigned T_W   = 16,
  localparam int unsigned ADDR_W = 12,
  localparam int unsigned IDX_W = $clog2(MAX_N),
  localparam int unsigned DIM_W = $clog2(MAX_D)
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // AXI4-Lite slave
  input  logic [ADDR_W-1:0]           s_awaddr,
  input  logic                        s_awvalid,
  output logic                        s_awready,
  input  logic [31:0]                 s_wdata,
  input  logic [3:0]                  s_wstrb,
  input  logic                        s_wvalid,
  output logic                        s_wready,
  output logic [1:0]                  s_bresp,
  output logic                        s_bvalid,
  input  logic                        s_bready,
  input  logic [ADDR_W-1:0]           s_araddr,
  input  logic                        s_arvalid,
  output logic                        s_arready,
  output logic [31:0]                 s_rdata,
  output logic [1:0]                  s_rresp,
  output logic                        s_rvalid,
  input  logic                        s_rready,
  // engine side
  output logic                        start_o,
  output logic [IDX_W:0]              n_o,
  output logic [DIM_W:0]              d_o,
  output logic [T_W-1:0]              t_o,
  output pos_t                        lb_o,
  output pos_t                        ub_o,
  output pos_t                        a_o,
  output logic [31:0]                 seed_o,
  output func_e                       func_o,
  output logic [IDX_W-1:0]            fit_idx_o,
  output pos_t                        anchor_o [TDOA_M][3],
  output pos_t                        rdiff_o  [TDOA_M-1],
  input  logic                        busy_i,
  input  logic                        done_i,
  input  fit_t                        best_fit_i,
  input  logic [MAX_D-1:0][POS_W-1:0] best_pos_i,
  input  logic [31:0]                 cycles_i,
  input  logic [T_W-1:0]              iter_i,
  input  fit_t                        fit_data_i
);

  logic        wr, rd, done_flag, err_flag, cfg_ok;
  logic [31:0] rdata;

  assign wr        = s_awvalid && s_wvalid && !s_bvalid;
  assign rd        = s_arvalid && !s_rvalid;
  assign cfg_ok    = (n_o != '0) && (32'(n_o) <= MAX_N) && (d_o != '0) && (32'(d_o) <= MAX_D) &&
                     (lb_o < ub_o);
  assign s_awready = wr;
  assign s_wready  = wr;
  assign s_arready = rd;
  assign s_bresp   = 2'b00;
  assign s_rresp   = 2'b00;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      start_o   <= 1'b0;
      n_o       <= '0;
      d_o       <= '0;
      t_o       <= '0;
      lb_o      <= '0;
      ub_o      <= '0;
      a_o       <= 32'sd131072;  // a = 2
      seed_o    <= 32'h1;
      func_o    <= F1_SPHERE;
      fit_idx_o <= '0;
      for (int m = 0; m < TDOA_M; m++) anchor_o[m] <= '{default: '0};
      for (int m = 0; m < TDOA_M - 1; m++) rdiff_o[m] <= '0;
      done_flag <= 1'b0;
      err_flag  <= 1'b0;
      s_bvalid  <= 1'b0;
      s_rvalid  <= 1'b0;
      s_rdata   <= '0;
    end else begin
      start_o <= 1'b0;
      if (done_i) done_flag <= 1'b1;

      if (wr) begin
        s_bvalid <= 1'b1;
        unique case (s_awaddr)
          12'h000: if (s_wdata[0] && !busy_i) begin
                     if (cfg_ok) begin
                       start_o   <= 1'b1;
                       done_flag <= 1'b0;
                       err_flag  <= 1'b0;
                     end else begin
                       err_flag  <= 1'b1;
                     end
                   end
          12'h004: n_o       <= s_wdata[IDX_W:0];
          12'h008: d_o       <= s_wdata[DIM_W:0];
          12'h00C: t_o       <= s_wdata[T_W-1:0];
          12'h010: lb_o      <= s_wdata;
          12'h014: ub_o      <= s_wdata;
          12'h018: a_o       <= s_wdata;
          12'h01C: seed_o    <= s_wdata;
          12'h020: func_o    <= func_e'(s_wdata[3:0]);
          12'h034: fit_idx_o <= s_wdata[IDX_W-1:0];
          default: ;
        endcase
        for (int m = 0; m < TDOA_M; m++)
          for (int k = 0; k < 3; k++)
            if (s_awaddr == ADDR_W'(32'h040 + 12 * m + 4 * k)) anchor_o[m][k] <= s_wdata;
        for (int m = 0; m < TDOA_M - 1; m++)
          if (s_awaddr == ADDR_W'(32'h070 + 4 * m)) rdiff_o[m] <= s_wdata;
      end else if (s_bvalid && s_bready) begin
        s_bvalid <= 1'b0;
      end

      if (rd) begin
        s_rvalid <= 1'b1;
        s_rdata  <= rdata;
      end else if (s_rvalid && s_rready) begin
        s_rvalid <= 1'b0;
      end
    end
  end

  always_comb begin
    rdata = '0;
    if (s_araddr >= 12'h100 && 32'(s_araddr - 12'h100) < 4 * MAX_D)
      rdata = best_pos_i[DIM_W'((s_araddr - 12'h100) >> 2)];
    else
      unique case (s_araddr)
        12'h000: rdata = {29'h0, err_flag, done_flag, busy_i};
        12'h004: rdata = 32'(n_o);
        12'h008: rdata = 32'(d_o);
        12'h00C: rdata = 32'(t_o);
        12'h010: rdata = lb_o;
        12'h014: rdata = ub_o;
        12'h018: rdata = a_o;
        12'h01C: rdata = seed_o;
        12'h020: rdata = 32'(func_o);
        12'h024: rdata = best_fit_i[31:0];
        12'h028: rdata = best_fit_i[63:32];
        12'h02C: rdata = cycles_i;
        12'h030: rdata = 32'(iter_i);
        12'h034: rdata = 32'(fit_idx_o);
        12'h038: rdata = fit_data_i[31:0];
        12'h03C: rdata = fit_data_i[63:32];
        default: rdata = '0;
      endcase
    for (int m = 0; m < TDOA_M; m++)
      for (int k = 0; k < 3; k++)
        if (s_araddr == ADDR_W'(32'h040 + 12 * m + 4 * k)) rdata = anchor_o[m][k];
    for (int m = 0; m < TDOA_M - 1; m++)
      if (s_araddr == ADDR_W'(32'h070 + 4 * m)) rdata = rdiff_o[m];
  end

  // AXI rules: a response stays valid until it is accepted.
  assert property (@(posedge clk) disable iff (!rst_n) s_bvalid && !s_bready |=> s_bvalid);
  assert property (@(posedge clk) disable iff (!rst_n)
                   s_rvalid && !s_rready |=> s_rvalid && $stable(s_rdata));

endmodule
