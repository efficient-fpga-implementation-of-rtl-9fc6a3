// hsca_axil_regs_tb: AXI4-Lite master with random BREADY/RREADY delays.
// Writes and reads back every parameter register, checks the engine-side
// outputs, the start pulse (and that it is refused while busy or with N, D
// or the bounds out of range), the sticky
// done flag, the result registers, the best-particle window and the TDOA
// anchor and range-difference registers.
module hsca_axil_regs_tb;
  import hsca_pkg::*;
  localparam int MAX_D = 256;
  logic clk = 0, rst_n = 0;
  logic [11:0] s_awaddr = 0, s_araddr = 0;
  logic s_awvalid = 0, s_wvalid = 0, s_bready = 0, s_arvalid = 0, s_rready = 0;
  logic [31:0] s_wdata = 0;
  logic [3:0] s_wstrb = 4'hF;
  logic s_awready, s_wready, s_bvalid, s_arready, s_rvalid;
  logic [1:0] s_bresp, s_rresp;
  logic [31:0] s_rdata;
  logic start_o;
  logic [9:0] n_o;
  logic [8:0] d_o;
  logic [15:0] t_o, iter_i = 16'd77;
  pos_t lb_o, ub_o, a_o;
  logic [31:0] seed_o, cycles_i = 32'd123456;
  func_e func_o;
  logic [8:0] fit_idx_o;
  pos_t anchor_o [TDOA_M][3];
  pos_t rdiff_o [TDOA_M-1];
  logic busy_i = 0, done_i = 0;
  fit_t best_fit_i = 64'sh0000_1234_8765_4321, fit_data_i = 64'sh7654_3210_0FED_CBA9;
  logic [MAX_D-1:0][31:0] best_pos_i;
  int checks = 0, failures = 0, starts = 0;

  hsca_axil_regs #(.MAX_N(512), .MAX_D(MAX_D), .T_W(16)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (start_o) starts++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic axi_write(logic [11:0] addr, logic [31:0] data);
    @(negedge clk);
    s_awaddr = addr; s_awvalid = 1; s_wdata = data; s_wvalid = 1;
    do @(posedge clk); while (!(s_awready && s_wready));
    @(negedge clk);
    s_awvalid = 0; s_wvalid = 0;
    repeat ($urandom_range(0, 3)) begin
      @(negedge clk);
      check(s_bvalid, "BVALID held");
    end
    s_bready = 1;
    do @(posedge clk); while (!s_bvalid);
    check(s_bresp == 2'b00, "BRESP");
    @(negedge clk); s_bready = 0;
  endtask

  task automatic axi_read(logic [11:0] addr, output logic [31:0] data);
    logic [31:0] first;
    @(negedge clk);
    s_araddr = addr; s_arvalid = 1;
    do @(posedge clk); while (!s_arready);
    @(negedge clk);
    s_arvalid = 0;
    first = s_rdata;
    repeat ($urandom_range(0, 3)) begin
      @(negedge clk);
      check(s_rvalid && s_rdata == first, "RVALID/RDATA held");
    end
    s_rready = 1;
    do @(posedge clk); while (!s_rvalid);
    data = s_rdata;
    @(negedge clk); s_rready = 0;
  endtask

  task automatic wr_rd(logic [11:0] addr, logic [31:0] data, logic [31:0] expect_rd);
    logic [31:0] r;
    axi_write(addr, data);
    axi_read(addr, r);
    check(r == expect_rd, $sformatf("reg %h read %h expected %h", addr, r, expect_rd));
  endtask

  initial begin
    logic [31:0] r;
    for (int k = 0; k < MAX_D; k++) best_pos_i[k] = $urandom;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wr_rd(12'h004, 32'd100, 32'd100);
    wr_rd(12'h008, 32'd30, 32'd30);
    wr_rd(12'h00C, 32'd1000, 32'd1000);
    wr_rd(12'h010, 32'hFFF6_0000, 32'hFFF6_0000);
    wr_rd(12'h014, 32'h000A_0000, 32'h000A_0000);
    wr_rd(12'h018, 32'h0002_0000, 32'h0002_0000);
    wr_rd(12'h01C, 32'hABCD_1234, 32'hABCD_1234);
    wr_rd(12'h020, 32'd9, 32'd9);
    wr_rd(12'h034, 32'd17, 32'd17);
    check(n_o == 10'd100 && d_o == 9'd30 && t_o == 16'd1000 && lb_o == -10 * 65536 &&
          ub_o == 10 * 65536 && a_o == 2 * 65536 && seed_o == 32'hABCD_1234 &&
          func_o == F10_STYBLINSKI && fit_idx_o == 9'd17, "engine outputs");
    // TDOA anchors and range differences
    for (int m = 0; m < TDOA_M; m++)
      for (int k = 0; k < 3; k++)
        wr_rd(12'(12'h040 + 12 * m + 4 * k), 32'(1000 * m + 10 * k + 1), 32'(1000 * m + 10 * k + 1));
    for (int m = 0; m < TDOA_M - 1; m++)
      wr_rd(12'(12'h070 + 4 * m), 32'(-(m + 1) * 65536), 32'(-(m + 1) * 65536));
    for (int m = 0; m < TDOA_M; m++)
      for (int k = 0; k < 3; k++)
        check(anchor_o[m][k] == pos_t'(1000 * m + 10 * k + 1), $sformatf("anchor %0d.%0d", m, k));
    for (int m = 0; m < TDOA_M - 1; m++)
      check(rdiff_o[m] == pos_t'(-(m + 1) * 65536), $sformatf("rdiff %0d", m));
    check(n_o == 10'd100 && func_o == F10_STYBLINSKI, "other registers unchanged");
    // start
    axi_write(12'h000, 32'h1);
    check(starts == 1, "start pulse");
    busy_i = 1;
    axi_read(12'h000, r);
    check(r == 32'h1, "busy status");
    axi_write(12'h000, 32'h1);
    check(starts == 1, "start refused while busy");
    @(negedge clk); done_i = 1; busy_i = 0; @(negedge clk); done_i = 0;
    axi_read(12'h000, r);
    check(r == 32'h2, "done sticky");
    axi_read(12'h024, r); check(r == best_fit_i[31:0], "best fit low");
    axi_read(12'h028, r); check(r == best_fit_i[63:32], "best fit high");
    axi_read(12'h02C, r); check(r == 32'd123456, "cycles");
    axi_read(12'h030, r); check(r == 32'd77, "iter");
    axi_read(12'h038, r); check(r == fit_data_i[31:0], "fitness low");
    axi_read(12'h03C, r); check(r == fit_data_i[63:32], "fitness high");
    for (int k = 0; k < MAX_D; k++) begin
      axi_read(12'(12'h100 + 4 * k), r);
      check(r == best_pos_i[k], $sformatf("best_pos[%0d]", k));
    end
    axi_read(12'h600, r); check(r == 0, "unmapped");
    axi_write(12'h000, 32'h1);
    check(starts == 2, "second start");
    busy_i = 0;
    // input check: each bad value refuses the start and sets the error bit
    wr_rd(12'h004, 32'd0, 32'd0);
    axi_write(12'h000, 32'h1);
    axi_read(12'h000, r);
    check(starts == 2 && r[2], "N = 0 refused");
    wr_rd(12'h004, 32'd512, 32'd512);
    wr_rd(12'h008, 32'd257, 32'd257);
    axi_write(12'h000, 32'h1);
    axi_read(12'h000, r);
    check(starts == 2 && r[2], "D > MAX_D refused");
    wr_rd(12'h008, 32'd256, 32'd256);
    wr_rd(12'h010, 32'h000A_0000, 32'h000A_0000);
    axi_write(12'h000, 32'h1);
    axi_read(12'h000, r);
    check(starts == 2 && r[2], "LB = UB refused");
    wr_rd(12'h010, 32'hFFF6_0000, 32'hFFF6_0000);
    axi_write(12'h000, 32'h1);
    axi_read(12'h000, r);
    check(starts == 3 && r[2:0] == 3'b000, "N = 512, D = 256 accepted, error cleared");
    axi_read(12'h000, r);
    check(r == 32'h0, "done cleared by start");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
