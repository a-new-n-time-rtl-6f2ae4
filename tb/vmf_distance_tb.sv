// Testbench of the distance ALU: compares the squared RGB distance with an
// independent model on corner cases (equal vectors, maximal differences in
// each component and in all three) and on random vector pairs.
module vmf_distance_tb;
  import vmf_pkg::*;

  rgb_t               a, b;
  logic [DIST1_W-1:0] sqdist;
  int checks = 0, failures = 0;

  vmf_distance dut (.a(a), .b(b), .sqdist(sqdist));

  function automatic int unsigned model(rgb_t x, rgb_t y);
    int dr, dg, db;
    dr = int'(x.r) - int'(y.r);
    dg = int'(x.g) - int'(y.g);
    db = int'(x.b) - int'(y.b);
    return int'(dr * dr + dg * dg + db * db);
  endfunction

  task automatic check(rgb_t x, rgb_t y);
    a = x;
    b = y;
    #1;
    checks++;
    if (int'(sqdist) != model(x, y)) begin
      failures++;
      $display("FAIL %h %h: got %0d expected %0d", x, y, sqdist, model(x, y));
    end
  endtask

  initial begin
    check('0, '0);
    check('1, '0);
    check('0, '1);
    check('{r: 8'hff, g: 8'h00, b: 8'h00}, '0);
    check('{r: 8'h00, g: 8'hff, b: 8'h00}, '0);
    check('{r: 8'h00, g: 8'h00, b: 8'hff}, '0);
    check('{r: 8'h10, g: 8'h20, b: 8'h30}, '{r: 8'h30, g: 8'h10, b: 8'h00});
    for (int i = 0; i < 2000; i++) check(rgb_t'($urandom), rgb_t'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
