// Testbench of the controller. It keeps its own count of clocks since
// reset and from it derives, independently, what the schedule must be in
// every clock of the N+2-clock period: input clocks, load, accumulate,
// D -> MIN, MF start and compare clocks. It drives in_valid with gaps in some
// windows and checks that mf_done appears exactly for the valid windows, on
// the N-th compare clock two periods after the window was loaded.
module vmf_ctrl_tb;
  import vmf_pkg::*;

  localparam int unsigned N = N_DEF;
  localparam int P = N + 2;
  localparam int NPER = 60;

  logic     clk = 1'b0;
  logic     rst_n;
  logic     in_valid;
  logic     in_ready;
  pe_ctrl_t pe_ctrl;
  logic     mf_start, mf_cmp, mf_done;
  int checks = 0, failures = 0;

  vmf_ctrl #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  bit win_ok [NPER];
  int n_done = 0, n_done_exp = 0;

  initial begin
    int p, per;
    bit exp_done;
    for (int k = 0; k < NPER; k++) win_ok[k] = (k % 4 != 2);
    in_valid = 0;
    rst_n = 0;
    @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < NPER * P; t++) begin
      p = t % P;
      per = t / P;
      in_valid = (p < N) && !(!win_ok[per] && p == 3);
      #1;
      checks++;
      exp_done = (p == N - 3) && per >= 2 && win_ok[per - 2];
      if (in_ready != (p < N) || pe_ctrl.sr_shift != (p < N) ||
          pe_ctrl.load != (p == N) || pe_ctrl.d2min != (p == N - 1) ||
          pe_ctrl.acc != (p != N && p != N - 1) || mf_start != (p == N - 1) ||
          mf_cmp != (p != N - 1 && p != N - 2) || mf_done != exp_done) begin
        failures++;
        $display("FAIL clock %0d (phase %0d): ready %b ctrl %b start %b cmp %b done %b",
                 t, p, in_ready, pe_ctrl, mf_start, mf_cmp, mf_done);
      end
      if (mf_done) n_done++;
      if (exp_done) n_done_exp++;
      @(posedge clk);
      #1;
    end
    checks++;
    if (n_done != n_done_exp || n_done == 0) begin
      failures++;
      $display("FAIL done count %0d expected %0d", n_done, n_done_exp);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NPER * P + 50) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
