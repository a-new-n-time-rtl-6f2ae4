// Testbench of the window scanner. It writes a random image into the frame
// buffer, then plays the filter's input slot itself (in_ready high for N
// clocks, low for 2) and starts the scan at an arbitrary point of that
// slot pattern. Every pixel taken must be the next pixel of the expected
// sequence: centres in raster order over the interior of the image, and
// within each window the K*K pixels in raster order. It also checks that
// the first pixel is taken on the first clock of a slot, that in_valid is
// high on every clock of the slot while scanning, and that busy falls after
// the last window.
module vmf_window_scan_tb;
  import vmf_pkg::*;

  localparam int IMG_W = 16;
  localparam int IMG_H = 16;
  localparam int K     = 3;
  localparam int N     = K * K;
  localparam int AW    = $clog2(IMG_W * IMG_H);
  localparam int NWIN  = (IMG_W - K + 1) * (IMG_H - K + 1);

  logic          clk = 1'b0;
  logic          rst_n;
  logic          wr_en;
  logic [AW-1:0] wr_addr;
  rgb_t          wr_pix;
  logic          start;
  logic          busy;
  logic          win_valid;
  rgb_t          win_vec;
  logic          win_ready;
  int checks = 0, failures = 0;

  vmf_window_scan #(.IMG_W(IMG_W), .IMG_H(IMG_H), .K(K)) dut (.*);

  always #5 clk = ~clk;

  rgb_t img [IMG_H * IMG_W];
  int   slot = 0;      // position in the N+2 slot pattern
  int   taken = 0;     // pixels taken so far
  bit   scanning = 0;

  always @(negedge clk) begin
    slot <= (slot == N + 1) ? 0 : slot + 1;
  end
  assign win_ready = (slot < N);

  function automatic rgb_t expected(int k);
    int w, i, r, c;
    w = k / N;
    i = k % N;
    r = K / 2 + w / (IMG_W - K + 1) + i / K - K / 2;
    c = K / 2 + w % (IMG_W - K + 1) + i % K - K / 2;
    return img[r * IMG_W + c];
  endfunction

  always @(posedge clk) begin
    if (rst_n && scanning && win_ready) begin
      checks++;
      if (!win_valid || win_vec != expected(taken)) begin
        failures++;
        $display("FAIL pixel %0d: valid %b %h expected %h", taken, win_valid,
                 win_vec, expected(taken));
      end
      if (taken == 0) begin
        checks++;
        if (slot != 0) begin
          failures++;
          $display("FAIL first pixel taken in slot position %0d", slot);
        end
      end
      taken++;
      if (taken == NWIN * N) scanning = 0;
    end
  end

  initial begin
    wr_en = 0;
    wr_addr = '0;
    wr_pix = '0;
    start = 0;
    rst_n = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int a = 0; a < IMG_W * IMG_H; a++) begin
      img[a] = rgb_t'($urandom);
      @(negedge clk);
      wr_en = 1;
      wr_addr = AW'(a);
      wr_pix = img[a];
    end
    @(negedge clk);
    wr_en = 0;
    repeat (4) @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    // The first window may begin only at the next slot start.
    wait (win_valid);
    scanning = 1;
    wait (!busy);
    checks++;
    if (taken != NWIN * N) begin
      failures++;
      $display("FAIL %0d pixels taken, expected %0d", taken, NWIN * N);
    end
    repeat (3) @(posedge clk);
    checks++;
    if (win_valid || busy) begin
      failures++;
      $display("FAIL still busy after the scan");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NWIN * (N + 2) + IMG_W * IMG_H + 200) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
