// hsca_pop_mem_tb: random row writes, element writes and fitness writes
// against a reference array; checks both read ports and the fitness read
// one cycle after the address, and that a row write wins over an element
// write in the same cycle.
module hsca_pop_mem_tb;
  import hsca_pkg::*;
  localparam int N = 16, D = 5;
  logic clk = 0;
  logic rw_en = 0, ew_en = 0, fw_en = 0;
  logic [3:0] rw_idx = 0, ew_idx = 0, er_idx = 0, rr_idx = 0, fw_idx = 0, fr_idx = 0;
  logic [2:0] ew_dim = 0, er_dim = 0;
  logic [D-1:0][31:0] rw_data = '0, rr_data;
  pos_t ew_data = 0, er_data;
  fit_t fw_data = 0, fr_data;
  int checks = 0, failures = 0;

  hsca_pop_mem #(.MAX_N(N), .MAX_D(D)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] model [N][D];
  fit_t        fmodel [N];

  initial begin
    // fill every row
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      rw_en = 1; rw_idx = 4'(i);
      for (int k = 0; k < D; k++) begin
        rw_data[k] = $urandom; model[i][k] = rw_data[k];
      end
      fw_en = 1; fw_idx = 4'(i); fw_data = {$urandom, $urandom}; fmodel[i] = fw_data;
    end
    @(negedge clk); rw_en = 0; fw_en = 0;
    for (int r = 0; r < 3000; r++) begin
      int op;
      @(negedge clk);
      // check reads issued in the previous cycle
      checks += 3;
      if (er_data != pos_t'(model[er_idx][er_dim])) begin failures++; $display("FAIL elem read"); end
      for (int k = 0; k < D; k++)
        if (rr_data[k] != model[rr_idx][k]) begin failures++; $display("FAIL row read"); break; end
      if (fr_data != fmodel[fr_idx]) begin failures++; $display("FAIL fitness read"); end
      // apply the writes that the last posedge performed to the model
      if (rw_en) for (int k = 0; k < D; k++) model[rw_idx][k] = rw_data[k];
      else if (ew_en) model[ew_idx][ew_dim] = ew_data;
      if (fw_en) fmodel[fw_idx] = fw_data;
      // new stimulus
      op = $urandom_range(0, 3);
      rw_en = (op == 0); ew_en = (op != 3); fw_en = $urandom_range(0, 1);
      rw_idx = 4'($urandom); ew_idx = (op == 0) ? rw_idx : 4'($urandom);
      ew_dim = 3'($urandom_range(0, D-1)); ew_data = $urandom;
      for (int k = 0; k < D; k++) rw_data[k] = $urandom;
      fw_idx = 4'($urandom); fw_data = {$urandom, $urandom};
      er_idx = 4'($urandom); er_dim = 3'($urandom_range(0, D-1));
      rr_idx = 4'($urandom); fr_idx = 4'($urandom);
      // reads are sampled at the same edge as the writes: read old contents
      // by checking against the model before the write is applied above
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
