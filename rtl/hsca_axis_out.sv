// hsca_axis_out: AXI4-Stream master that hands the result of a run to the
// DMA.
//
// In the source system a DMA links the IP core to DDR memory over an
// AXI-Stream port. What is sent is this design's choice: when trigger
// pulses (end of a run), the best particle and its fitness are captured and
// sent as d + 2 32-bit beats: coordinates 0..d-1 (Q16.16), then the best
// fitness (Q48.16) low word and high word, with TLAST on the final beat. A
// trigger while a packet is still being sent is ignored.
//
// Interface: standard TVALID/TREADY handshake; TDATA and TLAST are held
// while TVALID is high and TREADY low. busy is high from trigger until the
// last beat is accepted. One beat per cycle when TREADY stays high.
module hsca_axis_out
  import hsca_pkg::*;
#(
  parameter int unsigned MAX_D = 256,
  localparam int unsigned DIM_W = $clog2(MAX_D)
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        trigger,
  input  logic [DIM_W:0]              d,
  input  logic [MAX_D-1:0][POS_W-1:0] best_pos,
  input  fit_t                        best_fit,
  output logic                        busy,
  output logic [31:0]                 m_tdata,
  output logic                        m_tlast,
  output logic                        m_tvalid,
  input  logic                        m_tready
);

  logic [MAX_D-1:0][POS_W-1:0] pos_q;
  fit_t                        fit_q;
  logic [DIM_W+1:0]            beat, beats;

  assign busy     = m_tvalid;
  assign m_tlast  = m_tvalid && (beat == beats - 1'b1);

  always_comb begin
    if (32'(beat) < 32'(beats) - 2)       m_tdata = pos_q[DIM_W'(beat)];
    else if (32'(beat) == 32'(beats) - 2) m_tdata = fit_q[31:0];
    else                                  m_tdata = fit_q[63:32];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m_tvalid <= 1'b0;
      beat     <= '0;
      beats    <= '0;
      pos_q    <= '0;
      fit_q    <= '0;
    end else if (!m_tvalid) begin
      if (trigger) begin
        m_tvalid <= 1'b1;
        beat     <= '0;
        beats    <= (DIM_W+2)'(d) + (DIM_W+2)'(2);
        pos_q    <= best_pos;
        fit_q    <= best_fit;
      end
    end else if (m_tready) begin
      if (m_tlast) m_tvalid <= 1'b0;
      else         beat     <= beat + 1'b1;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n)
                   m_tvalid && !m_tready |=> m_tvalid && $stable(m_tdata) && $stable(m_tlast));

endmodule
