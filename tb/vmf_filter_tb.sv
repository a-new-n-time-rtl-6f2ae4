// End-to-end testbench of the vector median filter at its default size
// (N = 9, a 3x3 window of 8-bit RGB pixels).
//
// It streams windows into the filter back to back, one vector per clock
// while in_ready is high, and compares every median with a reference model
// that evaluates D_i = sum_j ||x_i - x_j|| directly and takes the first
// vector with the smallest D_i. Windows used:
//   - the three 3x3 windows of a test image whose pixel at row r, column c
//     has the grey value 16r + c (all three components equal), centred on
//     the pixels 17, 18 and 19, whose medians must be 17, 18 and 19;
//   - random windows over the full colour range;
//   - random windows over a tiny range, which produce tied minima;
//   - windows with a gap in in_valid, which must produce no result.
// It checks the latency (first input to med_valid: 3N+2 clocks), the
// spacing of results of back-to-back windows (N+2 clocks) and counts how
// often each mechanism of the array was exercised: SR load into RI/RJ
// (MUX1 = SR), RJ ring rotation (MUX1 = RJ), D into MIN (MUX2 = D),
// replacement of the running minimum in MF, three windows in flight at
// once, tie, and a dropped window.
module vmf_filter_tb;
  import vmf_pkg::*;

  localparam int unsigned N  = N_DEF;
  localparam int unsigned DW = dist_width(N);
  localparam int NRAND  = 300;
  localparam int NTIE   = 60;
  localparam int NWIN   = 3 + NRAND + NTIE;
  localparam int GAP_EVERY = 37;     // every 37th random window has a gap

  logic          clk = 1'b0;
  logic          rst_n;
  logic          in_valid;
  rgb_t          in_vec;
  logic          in_ready;
  logic          med_valid;
  rgb_t          med_vec;
  logic [DW-1:0] med_dist;

  vmf_filter dut (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (in_valid),
    .in_vec    (in_vec),
    .in_ready  (in_ready),
    .med_valid (med_valid),
    .med_vec   (med_vec),
    .med_dist  (med_dist)
  );

  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;
  longint unsigned cyc = 0;

  typedef rgb_t win_t [N];

  // ---------------------------------------------------------------- model
  function automatic longint unsigned sqd(rgb_t a, rgb_t b);
    longint signed dr, dg, db;
    dr = longint'(a.r) - longint'(b.r);
    dg = longint'(a.g) - longint'(b.g);
    db = longint'(a.b) - longint'(b.b);
    return longint'(dr * dr + dg * dg + db * db);
  endfunction

  // Returns the index of the vector median and its D; tie = 1 if another,
  // different vector has the same minimal D.
  function automatic int ref_median(win_t w, output longint unsigned dmin,
                                    output bit tie);
    longint unsigned d;
    int best = 0;
    dmin = '1;
    tie  = 1'b0;
    for (int i = 0; i < N; i++) begin
      d = 0;
      for (int j = 0; j < N; j++) d += sqd(w[i], w[j]);
      if (d < dmin) begin
        dmin = d;
        best = i;
        tie  = 1'b0;
      end else if (d == dmin && w[i] != w[best]) begin
        tie = 1'b1;
      end
    end
    return best;
  endfunction

  // ------------------------------------------------------------ stimulus
  win_t wins [NWIN];
  bit   gap  [NWIN];

  function automatic rgb_t grey(int v);
    rgb_t p;
    p.r = comp_t'(v);
    p.g = comp_t'(v);
    p.b = comp_t'(v);
    return p;
  endfunction

  initial begin
    // Test image: pixel(r, c) = 16r + c, windows centred at (1,1),(1,2),(1,3).
    for (int w = 0; w < 3; w++)
      for (int r = 0; r < 3; r++)
        for (int c = 0; c < 3; c++)
          wins[w][3*r + c] = grey(16 * r + c + w);
    for (int w = 3; w < 3 + NRAND; w++) begin
      for (int i = 0; i < N; i++) begin
        wins[w][i].r = comp_t'($urandom);
        wins[w][i].g = comp_t'($urandom);
        wins[w][i].b = comp_t'($urandom);
      end
      gap[w] = (w % GAP_EVERY == 0);
    end
    for (int w = 3 + NRAND; w < NWIN; w++)
      for (int i = 0; i < N; i++) begin
        wins[w][i].r = comp_t'($urandom_range(0, 2));
        wins[w][i].g = comp_t'($urandom_range(0, 1));
        wins[w][i].b = 8'd0;
      end
    // A deterministic tie: D is 42 for both (2,0,0) and (0,0,0); the
    // earlier one, (2,0,0), must win.
    for (int i = 0; i < 4; i++) wins[3 + NRAND][i] = '{r: 8'd2, g: 8'd0, b: 8'd0};
    for (int i = 4; i < 8; i++) wins[3 + NRAND][i] = '{r: 8'd0, g: 8'd0, b: 8'd0};
    wins[3 + NRAND][8] = '{r: 8'd1, g: 8'd5, b: 8'd0};
    for (int w = 0; w < 3; w++) gap[w] = 1'b0;
    for (int w = 3 + NRAND; w < NWIN; w++) gap[w] = 1'b0;
  end

  // Expected results, in order.
  typedef struct {
    rgb_t            vec;
    longint unsigned d;
    longint unsigned t_first;
    int              win;
  } exp_t;
  exp_t exp_q[$];

  int  wi = 0;        // window being fed
  int  vi = 0;        // vector within it
  longint unsigned t_first;
  int  n_tie = 0, n_drop = 0, n_results = 0;
  bit  feeding_done = 1'b0;

  // Driver: change inputs on the falling edge.
  always @(negedge clk) begin
    if (!rst_n || wi >= NWIN) begin
      in_valid <= 1'b0;
      in_vec   <= '0;
    end else begin
      in_vec   <= wins[wi][vi];
      in_valid <= !(gap[wi] && vi == 4);
    end
  end

  // Bookkeeping at the rising edge on which a vector is taken.
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && in_ready && wi < NWIN) begin
      if (vi == 0) t_first = cyc;
      if (vi == N - 1) begin
        if (!gap[wi]) begin
          exp_t e;
          longint unsigned dmin;
          bit tie;
          int idx;
          idx = ref_median(wins[wi], dmin, tie);
          e.vec = wins[wi][idx];
          e.d = dmin;
          e.t_first = t_first;
          e.win = wi;
          exp_q.push_back(e);
          if (tie) n_tie++;
        end else begin
          n_drop++;
        end
        vi = 0;
        wi++;
        if (wi == NWIN) feeding_done = 1'b1;
      end else begin
        vi++;
      end
    end
  end

  // Result checker.
  longint unsigned t_last_res = 0;
  int last_win = -10;
  always @(posedge clk) begin
    if (rst_n && med_valid) begin
      n_results++;
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL: unexpected result at cycle %0d", cyc);
      end else begin
        exp_t e;
        e = exp_q.pop_front();
        if (med_vec != e.vec || longint'(med_dist) != e.d) begin
          failures++;
          $display("FAIL win %0d: got %h/%0d expected %h/%0d", e.win,
                   med_vec, med_dist, e.vec, e.d);
        end
        if (e.win == 3 + NRAND) begin
          checks++;
          if (med_vec != rgb_t'{r: 8'd2, g: 8'd0, b: 8'd0} || med_dist != DW'(42)) begin
            failures++;
            $display("FAIL tie window: %h/%0d", med_vec, med_dist);
          end
        end
        if (e.win < 3) begin
          checks++;
          if (med_vec != grey(17 + e.win)) begin
            failures++;
            $display("FAIL test image window %0d: median %h", e.win, med_vec);
          end
        end
        checks++;
        if (cyc - e.t_first != 3 * N + 2) begin
          failures++;
          $display("FAIL latency win %0d: %0d clocks", e.win, cyc - e.t_first);
        end
        if (e.win == last_win + 1) begin
          checks++;
          if (cyc - t_last_res != 64'(N + 2)) begin
            failures++;
            $display("FAIL spacing win %0d: %0d clocks", e.win, cyc - t_last_res);
          end
        end
        last_win   = e.win;
        t_last_res = cyc;
      end
    end
  end

  // Mechanism counters.
  int n_load = 0, n_rot = 0, n_d2min = 0, n_replace = 0, n_three = 0;
  always @(posedge clk) begin
    if (rst_n) begin
      if (dut.pe_ctrl.load) n_load++;
      if (dut.pe_ctrl.acc) n_rot++;
      if (dut.pe_ctrl.d2min) n_d2min++;
      if (dut.mf_min && dut.u_mf.m != '1) n_replace++;
      if (dut.u_ctrl.set_ok && dut.u_ctrl.comp_valid && dut.u_ctrl.min_valid &&
          dut.u_ctrl.phase == 4'd1) n_three++;
    end
  end

  task automatic need(string what, int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL: mechanism never exercised: %s", what);
    end else begin
      $display("  %-32s %0d", what, n);
    end
  endtask

  initial begin
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    wait (feeding_done);
    repeat (3 * (N + 2) + 4) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("FAIL: %0d results missing", exp_q.size());
    end
    $display("results %0d, windows %0d", n_results, NWIN);
    need("SR -> RI/RJ load (MUX1 = SR)", n_load);
    need("RJ ring rotation (MUX1 = RJ)", n_rot);
    need("D -> MIN (MUX2 = D)", n_d2min);
    need("MF minimum replaced", n_replace);
    need("three windows in flight", n_three);
    need("tied minimum", n_tie);
    need("window dropped (input gap)", n_drop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat ((NWIN + 10) * int'(N + 2) + 100) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
