// Testbench of one processing element. The testbench plays the
// neighbouring PEs: it shifts a vector x into SR, loads RI/RJ, then feeds
// N-1 further vectors y_1 .. y_{N-1} on the RJ ring input during N
// accumulate clocks, so D must become ||x-x|| + sum_k ||x - y_k||
// (computed here independently). It then checks that MUX2 moves D and x into
// MIN, that MIN afterwards takes the previous PE's MIN every clock, and that
// SR and RJ pass their values on to the next PE.
module vmf_pe_tb;
  import vmf_pkg::*;

  localparam int unsigned N  = N_DEF;
  localparam int unsigned DW = dist_width(N);

  logic          clk = 1'b0;
  logic          rst_n;
  pe_ctrl_t      ctrl;
  rgb_t          sr_in, sr_out, rj_in, rj_out, min_v_in, min_v_out;
  logic [DW-1:0] min_d_in, min_d_out;
  int checks = 0, failures = 0;

  vmf_pe #(.DW(DW)) dut (.*);

  always #5 clk = ~clk;

  function automatic longint unsigned sqd(rgb_t a, rgb_t b);
    longint signed dr, dg, db;
    dr = longint'(a.r) - longint'(b.r);
    dg = longint'(a.g) - longint'(b.g);
    db = longint'(a.b) - longint'(b.b);
    return longint'(dr * dr + dg * dg + db * db);
  endfunction

  task automatic step(pe_ctrl_t c);
    ctrl = c;
    @(posedge clk);
    #1;
  endtask

  task automatic chk(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    rgb_t x, prev_rj;
    longint unsigned d;
    ctrl = '0;
    sr_in = '0;
    rj_in = '0;
    min_d_in = '0;
    min_v_in = '0;
    rst_n = 1'b0;
    @(posedge clk);
    #1 rst_n = 1'b1;
    for (int t = 0; t < 200; t++) begin
      // SR shift
      x = rgb_t'($urandom);
      sr_in = x;
      step('{sr_shift: 1'b1, load: 1'b0, acc: 1'b0, d2min: 1'b0});
      chk("SR takes the previous PE's vector", sr_out == x);
      sr_in = rgb_t'($urandom);
      // load: MUX1 = SR
      rj_in = rgb_t'($urandom);
      step('{sr_shift: 1'b0, load: 1'b1, acc: 1'b0, d2min: 1'b0});
      chk("RJ loaded from SR (MUX1 = SR)", rj_out == x);
      chk("SR holds without shift", sr_out == x);
      // accumulate
      d = 0;
      for (int k = 0; k < N; k++) begin
        prev_rj = rj_out;
        d += sqd(x, prev_rj);
        rj_in = (k == 0 && (t % 5 == 0)) ? x : rgb_t'($urandom);
        if (t % 7 == 0) rj_in = '1;
        step('{sr_shift: 1'b0, load: 1'b0, acc: 1'b1, d2min: 1'b0});
        chk("RJ takes the previous PE's RJ (MUX1 = RJ)", rj_out == rj_in);
      end
      // D -> MIN
      min_d_in = DW'($urandom);
      min_v_in = rgb_t'($urandom);
      step('{sr_shift: 1'b0, load: 1'b0, acc: 1'b0, d2min: 1'b1});
      checks++;
      if (longint'(min_d_out) != d || min_v_out != x) begin
        failures++;
        $display("FAIL MIN after d2min: %0d/%h expected %0d/%h", min_d_out,
                 min_v_out, d, x);
      end
      // MIN shift from the previous PE
      for (int k = 0; k < 2; k++) begin
        min_d_in = DW'($urandom);
        min_v_in = rgb_t'($urandom);
        step('{sr_shift: 1'b0, load: 1'b0, acc: 1'b0, d2min: 1'b0});
        chk("MIN takes the previous PE's MIN (MUX2)",
            min_d_out == min_d_in && min_v_out == min_v_in);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200 * (N + 8) + 50) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
