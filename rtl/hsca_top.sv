// hsca_top: HSCA IP core as seen from the processor system.
//
// Wraps the Sine Cosine Algorithm engine (hsca_core) with the two system
// ports of the source architecture: an AXI4-Lite slave through which the
// processor writes the parameters of a run, starts it and reads the result
// (register map in hsca_axil_regs), and an AXI4-Stream master through which
// the best particle and its fitness go to a DMA engine at the end of every
// run (packet format in hsca_axis_out). irq is high for one cycle when a
// run ends. The processor, the AXI interconnect, the DMA and the DDR memory
// are outside this design; their ports are the ports of this module.
//
// Parameters: MAX_N largest population, MAX_D largest dimension count,
// T_W width of the iteration count, CORDIC_ITER CORDIC rotations.
module hsca_top
  import hsca_pkg::*;
#(
  parameter int unsigned MAX_N       = 512,
  parameter int unsigned MAX_D       = 256,
  parameter int unsigned T_W         = 16,
  parameter int unsigned CORDIC_ITER = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [11:0] s_axil_awaddr,
  input  logic        s_axil_awvalid,
  output logic        s_axil_awready,
  input  logic [31:0] s_axil_wdata,
  input  logic [3:0]  s_axil_wstrb,
  input  logic        s_axil_wvalid,
  output logic        s_axil_wready,
  output logic [1:0]  s_axil_bresp,
  output logic        s_axil_bvalid,
  input  logic        s_axil_bready,
  input  logic [11:0] s_axil_araddr,
  input  logic        s_axil_arvalid,
  output logic        s_axil_arready,
  output logic [31:0] s_axil_rdata,
  output logic [1:0]  s_axil_rresp,
  output logic        s_axil_rvalid,
  input  logic        s_axil_rready,
  output logic [31:0] m_axis_tdata,
  output logic        m_axis_tlast,
  output logic        m_axis_tvalid,
  input  logic        m_axis_tready,
  output logic        irq
);

  localparam int unsigned IDX_W = $clog2(MAX_N);
  localparam int unsigned DIM_W = $clog2(MAX_D);

  logic                        start, busy, done, out_busy;
  logic [IDX_W:0]              n;
  logic [DIM_W:0]              d;
  logic [T_W-1:0]              t_max, iter;
  pos_t                        lb, ub, a;
  logic [31:0]                 seed, cycles;
  func_e                       func;
  pos_t                        anchor [TDOA_M][3];
  pos_t                        rdiff  [TDOA_M-1];
  fit_t                        best_fit, fit_data;
  logic [MAX_D-1:0][POS_W-1:0] best_pos;
  logic [IDX_W-1:0]            fit_idx;

  hsca_axil_regs #(.MAX_N(MAX_N), .MAX_D(MAX_D), .T_W(T_W)) u_regs (
    .clk, .rst_n,
    .s_awaddr(s_axil_awaddr), .s_awvalid(s_axil_awvalid), .s_awready(s_axil_awready),
    .s_wdata(s_axil_wdata), .s_wstrb(s_axil_wstrb), .s_wvalid(s_axil_wvalid),
    .s_wready(s_axil_wready), .s_bresp(s_axil_bresp), .s_bvalid(s_axil_bvalid),
    .s_bready(s_axil_bready), .s_araddr(s_axil_araddr), .s_arvalid(s_axil_arvalid),
    .s_arready(s_axil_arready), .s_rdata(s_axil_rdata), .s_rresp(s_axil_rresp),
    .s_rvalid(s_axil_rvalid), .s_rready(s_axil_rready),
    .start_o(start), .n_o(n), .d_o(d), .t_o(t_max), .lb_o(lb), .ub_o(ub), .a_o(a),
    .seed_o(seed), .func_o(func), .fit_idx_o(fit_idx),
    .anchor_o(anchor), .rdiff_o(rdiff),
    .busy_i(busy || out_busy), .done_i(done), .best_fit_i(best_fit), .best_pos_i(best_pos),
    .cycles_i(cycles), .iter_i(iter), .fit_data_i(fit_data)
  );

  hsca_core #(.MAX_N(MAX_N), .MAX_D(MAX_D), .T_W(T_W), .CORDIC_ITER(CORDIC_ITER)) u_core (
    .clk, .rst_n, .start, .n, .d, .t_max, .lb, .ub, .a, .seed, .func, .anchor, .rdiff,
    .busy, .done, .best_fit, .best_pos, .cycles, .iter, .fit_idx, .fit_data
  );

  hsca_axis_out #(.MAX_D(MAX_D)) u_out (
    .clk, .rst_n, .trigger(done), .d, .best_pos, .best_fit, .busy(out_busy),
    .m_tdata(m_axis_tdata), .m_tlast(m_axis_tlast), .m_tvalid(m_axis_tvalid),
    .m_tready(m_axis_tready)
  );

  assign irq = done;

endmodule
