// Colour-image vector median filter: a K x K window scanner in front of
// the systolic vector median filter.
//
// An image of IMG_W x IMG_H RGB pixels is written into the scanner's frame
// buffer through wr_en / wr_addr / wr_pix. A start pulse then filters the
// whole image: for each pixel whose K x K window lies inside the image, the
// scanner streams the K*K window pixels to the filter, which returns the
// vector median of the window (the window pixel with the smallest sum of
// squared RGB distances to the others). Results leave on med_valid /
// med_vec / med_dist together with the row and column of the centre pixel
// they replace, one every N+2 = K*K+2 clocks, in raster order; the first one
// 3N+2 clocks after the first pixel enters the filter.
//
// The filter (vmf_filter) follows the published systolic architecture;
// the scanner, the frame buffer, the image size and the coordinate counter
// are this design's choices, the simplest hardware that applies the filter
// to an image the way sliding-window median filtering is defined.
module vmf_top
  import vmf_pkg::*;
#(
  parameter int unsigned IMG_W = 16,
  parameter int unsigned IMG_H = 16,
  parameter int unsigned K     = 3,
  parameter int unsigned N     = K * K,
  parameter int unsigned DW    = dist_width(N),
  parameter int unsigned AW    = $clog2(IMG_W * IMG_H)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     wr_en,
  input  logic [AW-1:0]            wr_addr,
  input  rgb_t                     wr_pix,
  input  logic                     start,
  output logic                     busy,
  output logic                     med_valid,
  output logic [$clog2(IMG_H)-1:0] med_row,
  output logic [$clog2(IMG_W)-1:0] med_col,
  output rgb_t                     med_vec,
  output logic [DW-1:0]            med_dist
);

  localparam int unsigned H  = K / 2;
  localparam int unsigned RW = $clog2(IMG_H);
  localparam int unsigned CW_ = $clog2(IMG_W);

  logic in_valid, in_ready;
  rgb_t in_vec;

  vmf_window_scan #(.IMG_W(IMG_W), .IMG_H(IMG_H), .K(K), .AW(AW)) u_scan (
    .clk       (clk),
    .rst_n     (rst_n),
    .wr_en     (wr_en),
    .wr_addr   (wr_addr),
    .wr_pix    (wr_pix),
    .start     (start),
    .busy      (busy),
    .win_valid (in_valid),
    .win_vec   (in_vec),
    .win_ready (in_ready)
  );

  vmf_filter #(.N(N), .DW(DW)) u_filter (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (in_valid),
    .in_vec    (in_vec),
    .in_ready  (in_ready),
    .med_valid (med_valid),
    .med_vec   (med_vec),
    .med_dist  (med_dist)
  );

  // Centre coordinate of the result on the output: results arrive in the
  // scan order, so a counter that steps on every med_valid tracks them.
  always_ff @(posedge clk) begin
    if (!rst_n || (start && !busy)) begin
      med_row <= RW'(H);
      med_col <= CW_'(H);
    end else if (med_valid) begin
      if (med_col != CW_'(IMG_W - 1 - H)) begin
        med_col <= med_col + 1'b1;
      end else begin
        med_col <= CW_'(H);
        med_row <= med_row + 1'b1;
      end
    end
  end

endmodule
