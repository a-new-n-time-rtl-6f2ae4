// Testbench of the Minimum Finding block. For each window it pulses start,
// then presents N distances with their vectors on DIS over N compare
// clocks (with a non-compare clock in between now and then), and checks the
// min flag on each clock, the final M and MX against a model that keeps the
// first strictly smaller value, and the one-clock med_valid strobe after the
// compare marked done. Distances are drawn from a small range, so ties
// occur, and include the largest value below all-ones.
module vmf_mf_tb;
  import vmf_pkg::*;

  localparam int unsigned N  = N_DEF;
  localparam int unsigned DW = dist_width(N);

  logic          clk = 1'b0;
  logic          rst_n;
  logic          start, cmp, done;
  logic [DW-1:0] dis;
  rgb_t          dis_vec;
  logic          min;
  logic          med_valid;
  rgb_t          med_vec;
  logic [DW-1:0] med_dist;
  int checks = 0, failures = 0;

  vmf_mf #(.DW(DW)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    logic [DW-1:0] m_ref;
    rgb_t          mx_ref;
    bit            exp_min;
    start = 0;
    cmp = 0;
    done = 0;
    dis = '0;
    dis_vec = '0;
    rst_n = 1'b0;
    @(posedge clk);
    #1 rst_n = 1'b1;
    for (int t = 0; t < 300; t++) begin
      start = 1;
      @(posedge clk);
      #1 start = 0;
      chk("med_valid low outside done", !med_valid);
      m_ref = '1;
      mx_ref = '0;
      for (int i = 0; i < N; i++) begin
        if (t % 3 == 0) begin
          cmp = 0;
          @(posedge clk);
          #1;
        end
        cmp = 1;
        done = (i == N - 1);
        dis = (t % 10 == 0) ? DW'({DW{1'b1}} - 1) : DW'($urandom_range(0, 6));
        dis_vec = rgb_t'($urandom);
        #1;
        exp_min = (dis < m_ref);
        chk("min flag", min == exp_min);
        if (exp_min) begin
          m_ref = dis;
          mx_ref = dis_vec;
        end
        @(posedge clk);
        #1;
        cmp = 0;
        done = 0;
      end
      chk("med_valid after done", med_valid);
      checks++;
      if (med_vec != mx_ref || med_dist != m_ref) begin
        failures++;
        $display("FAIL window %0d: got %0d/%h expected %0d/%h", t, med_dist,
                 med_vec, m_ref, mx_ref);
      end
      @(posedge clk);
      #1;
      chk("med_valid one clock only", !med_valid);
      chk("result held", med_vec == mx_ref && med_dist == m_ref);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300 * (2 * N + 4) + 50) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
