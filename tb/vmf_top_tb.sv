// End-to-end testbench of the colour-image vector median filter with all
// parameters at their defaults (16 x 16 image, 3 x 3 window, N = 9).
//
// Three images are written into the frame buffer and filtered in turn:
//   1. the grey ramp pixel(r, c) = 16r + c; the first three results, for
//      the centres (1,1), (1,2), (1,3), must be 17, 18 and 19, and every
//      other result equals its centre pixel;
//   2. a random full-range colour image;
//   3. a random image of three colours, (0,0,0), (2,0,0) and (1,5,0), in
//      which (0,0,0) and (2,0,0) tie whenever a window holds as many of one
//      as of the other; the earlier pixel of the window must win.
// Every result is compared, with its centre coordinate, against a
// reference that computes the vector median of each window directly. The
// testbench also checks the number of results (one per interior pixel),
// the latency from a window's first pixel to its result (3N+2 clocks), the
// spacing of consecutive results (N+2 clocks), and counts how often each
// mechanism happened: waiting for the input slot at start, moving to the
// next image row, D -> MIN (MUX2), RJ ring rotation, replacement of the
// running minimum, three windows in flight and a tied minimum.
module vmf_top_tb;
  import vmf_pkg::*;

  localparam int IMG_W = 16;
  localparam int IMG_H = 16;
  localparam int K     = 3;
  localparam int N     = K * K;
  localparam int DW    = dist_width(N);
  localparam int AW    = $clog2(IMG_W * IMG_H);
  localparam int NRES  = (IMG_W - K + 1) * (IMG_H - K + 1);

  logic          clk = 1'b0;
  logic          rst_n;
  logic          wr_en;
  logic [AW-1:0] wr_addr;
  rgb_t          wr_pix;
  logic          start;
  logic          busy;
  logic          med_valid;
  logic [3:0]    med_row;
  logic [3:0]    med_col;
  rgb_t          med_vec;
  logic [DW-1:0] med_dist;

  vmf_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  rgb_t img [IMG_H][IMG_W];

  function automatic longint unsigned sqd(rgb_t a, rgb_t b);
    longint signed dr, dg, db;
    dr = longint'(a.r) - longint'(b.r);
    dg = longint'(a.g) - longint'(b.g);
    db = longint'(a.b) - longint'(b.b);
    return longint'(dr * dr + dg * dg + db * db);
  endfunction

  // Vector median of the window centred at (r, c); tie is set when another,
  // different pixel has the same smallest D.
  function automatic rgb_t ref_med(int r, int c, output longint unsigned dmin,
                                   output bit tie);
    rgb_t w [N];
    rgb_t best;
    longint unsigned d;
    for (int i = 0; i < N; i++) w[i] = img[r - K/2 + i / K][c - K/2 + i % K];
    dmin = '1;
    tie = 0;
    best = w[0];
    for (int i = 0; i < N; i++) begin
      d = 0;
      for (int j = 0; j < N; j++) d += sqd(w[i], w[j]);
      if (d < dmin) begin
        dmin = d;
        best = w[i];
        tie = 0;
      end else if (d == dmin && w[i] != best) begin
        tie = 1;
      end
    end
    return best;
  endfunction

  function automatic rgb_t grey(int v);
    return rgb_t'({comp_t'(v), comp_t'(v), comp_t'(v)});
  endfunction

  task automatic load_image();
    for (int r = 0; r < IMG_H; r++)
      for (int c = 0; c < IMG_W; c++) begin
        @(negedge clk);
        wr_en   = 1;
        wr_addr = AW'(r * IMG_W + c);
        wr_pix  = img[r][c];
      end
    @(negedge clk);
    wr_en = 0;
  endtask

  task automatic chk(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  int img_no;
  int n_res, n_tie_img;
  longint unsigned t_prev;
  int n_tie = 0, n_wait = 0, n_row = 0, n_d2min = 0, n_rot = 0;
  int n_replace = 0, n_three = 0;
  longint unsigned t_first_pix;

  // Result checker.
  always @(posedge clk) begin
    if (rst_n && med_valid) begin
      longint unsigned dmin;
      bit tie;
      rgb_t e;
      int r, c;
      r = (K / 2) + n_res / (IMG_W - K + 1);
      c = (K / 2) + n_res % (IMG_W - K + 1);
      e = ref_med(r, c, dmin, tie);
      if (tie) n_tie++;
      checks++;
      if (int'(med_row) != r || int'(med_col) != c || med_vec != e ||
          longint'(med_dist) != dmin) begin
        failures++;
        $display("FAIL image %0d result %0d: (%0d,%0d) %h/%0d expected (%0d,%0d) %h/%0d",
                 img_no, n_res, med_row, med_col, med_vec, med_dist, r, c, e, dmin);
      end
      if (img_no == 1) begin
        checks++;
        if (med_vec != img[r][c] ||
            (n_res < 3 && med_vec != grey(17 + n_res))) begin
          failures++;
          $display("FAIL ramp image: result %0d is %h", n_res, med_vec);
        end
      end
      checks++;
      if (n_res == 0) begin
        if (cyc - t_first_pix != longint'(3 * N + 2)) begin
          failures++;
          $display("FAIL latency %0d", cyc - t_first_pix);
        end
      end else if (cyc - t_prev != 64'(N + 2)) begin
        failures++;
        $display("FAIL spacing %0d", cyc - t_prev);
      end
      t_prev = cyc;
      n_res++;
    end
  end

  // Mechanism counters.
  always @(posedge clk) begin
    if (rst_n) begin
      if (dut.u_scan.state == 2'd1) n_wait++;
      if (dut.u_scan.state == 2'd2 && dut.in_ready &&
          dut.u_scan.off_r == 2'(K - 1) && dut.u_scan.off_c == 2'(K - 1) &&
          dut.u_scan.cen_c == 4'(IMG_W - 1 - K / 2)) n_row++;
      if (dut.u_scan.state == 2'd2 && dut.in_ready &&
          dut.u_scan.off_r == 0 && dut.u_scan.off_c == 0 && n_res == 0 &&
          t_first_pix == 0) t_first_pix = cyc;
      if (dut.u_filter.pe_ctrl.d2min) n_d2min++;
      if (dut.u_filter.pe_ctrl.acc) n_rot++;
      if (dut.u_filter.mf_min && dut.u_filter.u_mf.m != '1) n_replace++;
      if (dut.u_filter.u_ctrl.set_ok && dut.u_filter.u_ctrl.comp_valid &&
          dut.u_filter.u_ctrl.min_valid && dut.u_filter.u_ctrl.phase == 4'd1)
        n_three++;
    end
  end

  task automatic need(string what, int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL: mechanism never exercised: %s", what);
    end else begin
      $display("  %-28s %0d", what, n);
    end
  endtask

  task automatic run_image(int which, int delay);
    img_no = which;
    n_res = 0;
    t_first_pix = 0;
    load_image();
    repeat (delay) @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    wait (!busy);
    repeat (3 * (N + 2) + 2) @(posedge clk);
    chk($sformatf("image %0d: %0d results", which, n_res), n_res == NRES);
  endtask

  initial begin
    wr_en = 0;
    wr_addr = '0;
    wr_pix = '0;
    start = 0;
    rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < IMG_H; r++)
      for (int c = 0; c < IMG_W; c++) img[r][c] = grey(16 * r + c);
    run_image(1, 0);
    for (int r = 0; r < IMG_H; r++)
      for (int c = 0; c < IMG_W; c++) img[r][c] = rgb_t'($urandom);
    run_image(2, 3);
    for (int r = 0; r < IMG_H; r++)
      for (int c = 0; c < IMG_W; c++)
        case ($urandom_range(0, 4))
          0, 1:    img[r][c] = '{r: 8'd0, g: 8'd0, b: 8'd0};
          2, 3:    img[r][c] = '{r: 8'd2, g: 8'd0, b: 8'd0};
          default: img[r][c] = '{r: 8'd1, g: 8'd5, b: 8'd0};
        endcase
    run_image(3, 7);
    need("wait for input slot", n_wait);
    need("next image row", n_row);
    need("D -> MIN (MUX2 = D)", n_d2min);
    need("RJ ring rotation", n_rot);
    need("MF minimum replaced", n_replace);
    need("three windows in flight", n_three);
    need("tied minimum", n_tie);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3 * (NRES * (N + 2) + IMG_W * IMG_H + 200)) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
