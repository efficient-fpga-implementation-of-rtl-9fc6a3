// hsca_tdoa_fitness: fitness function for TDOA (time difference of arrival)
// localisation.
//
// The target position u = (x, y, z) is the particle: coordinate 0 is x,
// 1 is y, 2 is z (z = 0 for two-dimensional particles). For each of the M
// anchor nodes s_m the unit computes the range R_m = |u - s_m|, and with the
// measured range differences R_{m,1} (m = 2..M, relative to anchor 1) the
// cost
//     J(u) = sum_{m=2..M} (R_{m,1} - (R_m - R_1))^2 = (h - g)^T (h - g).
// The maximum-likelihood position minimises J; the source states its
// fitness as 1/J to be maximised, this engine minimises J itself, which
// has the same optimum and needs no divider.
//
// Pipeline: coordinates arrive one per cycle; with the last one the squared
// ranges (Q.16, saturated below 2^47) are registered, M pipelined square
// roots (32 stages) run in parallel, and J is registered: the result comes
// LATENCY = 34 cycles after the last coordinate, one particle may follow
// another back to back. busy is high while a particle is in flight.
// anchor and rdiff are Q16.16 (for example kilometres) and must be stable
// during a run.
module hsca_tdoa_fitness
  import hsca_pkg::*;
#(
  parameter int unsigned M     = 4,
  parameter int unsigned TAG_W = 9
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  pos_t                x,
  input  logic                first,
  input  logic                last,
  input  logic [TAG_W-1:0]    tag,
  input  pos_t                anchor [M][3],
  input  pos_t                rdiff  [M-1],
  output logic                busy,
  output logic                out_valid,
  output fit_t                fit,
  output logic [TAG_W-1:0]    out_tag
);

  localparam fit_t D2_MAX = 64'sh0000_7FFF_FFFF_FFFF;   // radicand << 16 must fit 64 bits

  pos_t             px, py;
  logic [1:0]       cnt;
  pos_t             c [3];
  logic             s0_valid;
  logic [TAG_W-1:0] s0_tag;
  logic [63:0]      s0_rad [M];

  // Current coordinates, including the one arriving now.
  always_comb begin
    logic [1:0] idx;
    idx  = first ? 2'd0 : cnt;
    c[0] = (idx == 2'd0) ? x : px;
    c[1] = (idx == 2'd1) ? x : ((idx == 2'd0) ? '0 : py);
    c[2] = (idx == 2'd2) ? x : '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      px       <= '0;
      py       <= '0;
      cnt      <= '0;
      s0_valid <= 1'b0;
      s0_tag   <= '0;
      for (int m = 0; m < M; m++) s0_rad[m] <= '0;
    end else begin
      s0_valid <= in_valid && last;
      if (in_valid) begin
        px  <= c[0];
        py  <= c[1];
        cnt <= first ? 2'd1 : ((cnt == 2'd3) ? cnt : cnt + 1'b1);
        if (last) begin
          s0_tag <= tag;
          for (int m = 0; m < M; m++) begin
            fit_t d2;
            d2 = '0;
            for (int k = 0; k < 3; k++) begin
              fit_t dd;
              dd = fit_t'(c[k]) - fit_t'(anchor[m][k]);
              d2 = sat_add(d2, sat_mul(dd, dd));
            end
            if (d2 > D2_MAX) d2 = D2_MAX;
            s0_rad[m] <= 64'(d2) << 16;
          end
        end
      end
    end
  end

  logic [31:0]      root [M];
  logic             r_valid [M];
  logic             r_busy [M];
  logic [TAG_W-1:0] r_tag [M];

  for (genvar m = 0; m < M; m++) begin : g_range
    hsca_isqrt #(.W(64), .SW(TAG_W)) u_sqrt (
      .clk, .rst_n, .in_valid(s0_valid), .rad(s0_rad[m]), .side_i(s0_tag),
      .busy(r_busy[m]), .out_valid(r_valid[m]), .root(root[m]), .side_o(r_tag[m])
    );
  end

  fit_t j_cost;
  always_comb begin
    j_cost = '0;
    for (int m = 1; m < M; m++) begin
      fit_t e;
      e = fit_t'(rdiff[m-1]) - (fit_t'({1'b0, root[m]}) - fit_t'({1'b0, root[0]}));
      j_cost = sat_add(j_cost, sat_mul(e, e));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      fit       <= '0;
      out_tag   <= '0;
    end else begin
      out_valid <= r_valid[0];
      if (r_valid[0]) begin
        fit     <= j_cost;
        out_tag <= r_tag[0];
      end
    end
  end

  assign busy = s0_valid || r_busy[0];

endmodule
