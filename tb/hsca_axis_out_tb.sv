// hsca_axis_out_tb: triggers result packets and receives them with random
// TREADY. Checks the beat count, the order (coordinates, fitness low, high),
// TLAST on the last beat only, that data is held under back-pressure and
// that a trigger during a packet is ignored.
module hsca_axis_out_tb;
  import hsca_pkg::*;
  localparam int MAX_D = 30;
  logic clk = 0, rst_n = 0, trigger = 0, m_tready = 0;
  logic [5:0] d = 0;
  logic [MAX_D-1:0][31:0] best_pos;
  fit_t best_fit = 0;
  logic busy, m_tlast, m_tvalid;
  logic [31:0] m_tdata;
  int checks = 0, failures = 0, stalls = 0;

  hsca_axis_out #(.MAX_D(MAX_D)) dut (.*);

  always #5 clk = ~clk;

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

  task automatic packet(int dd, int ready_pct);
    logic [31:0] expv [$];
    logic [31:0] prev;
    logic        prev_stall;
    int beats;
    for (int k = 0; k < MAX_D; k++) best_pos[k] = $urandom;
    best_fit = {$urandom, $urandom};
    d = 6'(dd);
    for (int k = 0; k < dd; k++) expv.push_back(best_pos[k]);
    expv.push_back(best_fit[31:0]);
    expv.push_back(best_fit[63:32]);
    @(negedge clk); trigger = 1; @(negedge clk); trigger = 0;
    // change the inputs: the packet must carry the captured values
    for (int k = 0; k < MAX_D; k++) best_pos[k] = ~best_pos[k];
    beats = 0; prev_stall = 0;
    while (beats < dd + 2) begin
      m_tready = ($urandom_range(0, 99) < ready_pct);
      if (beats == 3) trigger = 1;        // ignored, a packet is in flight
      #1;
      check(m_tvalid, "valid during packet");
      if (prev_stall) check(m_tdata == prev, "held under back-pressure");
      if (m_tready) begin
        check(m_tdata == expv[beats], $sformatf("beat %0d", beats));
        check(m_tlast == (beats == dd + 1), "tlast");
        beats++;
        prev_stall = 0;
      end else begin
        stalls++;
        prev = m_tdata;
        prev_stall = 1;
      end
      @(negedge clk);
      trigger = 0;
    end
    m_tready = 0;
    #1 check(!m_tvalid && !busy, "idle after packet");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    packet(30, 100);
    packet(10, 50);
    packet(1, 30);
    packet(30, 70);
    check(stalls > 0, "back-pressure happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
