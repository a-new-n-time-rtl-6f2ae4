// Testbench of the Minimum Computation block on its own. The testbench
// sequences the control word itself, one window at a time: N SR shifts,
// load, N accumulate clocks, D -> MIN, then N clocks in which DIS must
// deliver D_1 .. D_N (each with its vector x_i) in that order, followed by
// the all-ones filler that enters at PE_N. The D_i are computed
// independently from Eq. D_i = sum_j ||x_i - x_j||.
module vmf_mc_tb;
  import vmf_pkg::*;

  localparam int unsigned N  = N_DEF;
  localparam int unsigned DW = dist_width(N);

  logic          clk = 1'b0;
  logic          rst_n;
  pe_ctrl_t      ctrl;
  rgb_t          in_vec;
  logic [DW-1:0] dis;
  rgb_t          dis_vec;
  int checks = 0, failures = 0;

  vmf_mc #(.N(N), .DW(DW)) dut (.*);

  always #5 clk = ~clk;

  function automatic longint unsigned sqd(rgb_t a, rgb_t b);
    longint signed dr, dg, db;
    dr = longint'(a.r) - longint'(b.r);
    dg = longint'(a.g) - longint'(b.g);
    db = longint'(a.b) - longint'(b.b);
    return longint'(dr * dr + dg * dg + db * db);
  endfunction

  task automatic step(bit sh, bit ld, bit ac, bit dm);
    ctrl = '{sr_shift: sh, load: ld, acc: ac, d2min: dm};
    @(posedge clk);
    #1;
  endtask

  initial begin
    rgb_t x [N];
    longint unsigned d;
    ctrl = '0;
    in_vec = '0;
    rst_n = 1'b0;
    @(posedge clk);
    #1 rst_n = 1'b1;
    for (int t = 0; t < 100; t++) begin
      for (int i = 0; i < N; i++)
        x[i] = (t == 0) ? rgb_t'({3{8'(i * 20)}}) : rgb_t'($urandom);
      for (int i = 0; i < N; i++) begin
        in_vec = x[i];
        step(1, 0, 0, 0);
      end
      in_vec = rgb_t'($urandom);
      step(0, 1, 0, 0);
      for (int k = 0; k < N; k++) step(0, 0, 1, 0);
      step(0, 0, 0, 1);
      for (int i = 0; i < N; i++) begin
        d = 0;
        for (int j = 0; j < N; j++) d += sqd(x[i], x[j]);
        checks++;
        if (longint'(dis) != d || dis_vec != x[i]) begin
          failures++;
          $display("FAIL window %0d D_%0d: got %0d/%h expected %0d/%h", t,
                   i + 1, dis, dis_vec, d, x[i]);
        end
        step(0, 0, 0, 0);
      end
      checks++;
      if (dis != '1) begin
        failures++;
        $display("FAIL filler after D_N: %0d", dis);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100 * (3 * N + 4) + 50) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
