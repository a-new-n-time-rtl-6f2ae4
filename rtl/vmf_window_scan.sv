// Window scanner: slides a K x K window over an image held in a frame
// buffer and feeds the pixels of each window, serially, to the vector
// median filter.
//
// The frame buffer is an IMG_W x IMG_H array of RGB pixels written through
// a simple write port (wr_en, wr_addr = row * IMG_W + column, wr_pix) and
// read asynchronously. After start the scanner visits every centre pixel
// whose whole window lies inside the image, in raster order (rows K/2 ..
// IMG_H-1-K/2, columns K/2 .. IMG_W-1-K/2), and emits that window's pixels
// P_1 .. P_{K*K} in raster order within the window, one per clock on which
// the filter's in_ready is high. It waits for in_ready to be low before the
// first pixel so that every window lines up with the filter's N-clock
// input slot. Border pixels, which have no complete window, get no result.
//
// Sliding a K x K window over the image and replacing its centre pixel
// with the median is how the filter is applied; the frame buffer, the scan
// order, the border rule and the image size are this design's choices
// (the 16-pixel row follows the test image used to demonstrate the filter,
// whose pixel values 0, 1, 2, 16, 17, 18, ... are raster indices of a
// 16-pixel-wide image). Writing the frame buffer while busy is not
// supported.
//
// Timing: start is taken on a rising edge while idle; busy stays high until
// the last pixel of the last window has been taken.
module vmf_window_scan
  import vmf_pkg::*;
#(
  parameter int unsigned IMG_W = 16,
  parameter int unsigned IMG_H = 16,
  parameter int unsigned K     = 3,
  parameter int unsigned AW    = $clog2(IMG_W * IMG_H)
) (
  input  logic          clk,
  input  logic          rst_n,
  // frame buffer write port
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  rgb_t          wr_pix,
  // scan control
  input  logic          start,
  output logic          busy,
  // serial window output, to the filter
  output logic          win_valid,
  output rgb_t          win_vec,
  input  logic          win_ready
);

  localparam int unsigned H  = K / 2;
  localparam int unsigned RW = $clog2(IMG_H);
  localparam int unsigned CW_ = $clog2(IMG_W);
  localparam int unsigned OW = $clog2(K);

  if (K > IMG_W || K > IMG_H) begin : g_check_size
    $error("vmf_window_scan: window larger than the image");
  end

  typedef enum logic [1:0] {IDLE, ALIGN, RUN} state_t;

  rgb_t           fb [IMG_W * IMG_H];
  state_t         state;
  logic [RW-1:0]  cen_r;   // centre row
  logic [CW_-1:0] cen_c;   // centre column
  logic [OW-1:0]  off_r;   // row offset within the window
  logic [OW-1:0]  off_c;   // column offset within the window
  logic [RW-1:0]  pix_r;
  logic [CW_-1:0] pix_c;

  always_ff @(posedge clk) begin
    if (wr_en) fb[wr_addr] <= wr_pix;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= IDLE;
      cen_r <= '0;
      cen_c <= '0;
      off_r <= '0;
      off_c <= '0;
    end else begin
      unique case (state)
        IDLE: if (start) begin
          state <= ALIGN;
          cen_r <= RW'(H);
          cen_c <= CW_'(H);
          off_r <= '0;
          off_c <= '0;
        end
        ALIGN: if (!win_ready) state <= RUN;
        RUN: if (win_ready) begin
          if (off_c != OW'(K - 1)) begin
            off_c <= off_c + 1'b1;
          end else begin
            off_c <= '0;
            if (off_r != OW'(K - 1)) begin
              off_r <= off_r + 1'b1;
            end else begin
              off_r <= '0;
              if (cen_c != CW_'(IMG_W - 1 - H)) begin
                cen_c <= cen_c + 1'b1;
              end else begin
                cen_c <= CW_'(H);
                if (cen_r != RW'(IMG_H - 1 - H)) cen_r <= cen_r + 1'b1;
                else state <= IDLE;
              end
            end
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  always_comb begin
    pix_r     = cen_r - RW'(H) + RW'(off_r);
    pix_c     = cen_c - CW_'(H) + CW_'(off_c);
    win_vec   = fb[AW'(pix_r) * AW'(IMG_W) + AW'(pix_c)];
    win_valid = (state == RUN);
    busy      = (state != IDLE);
  end

endmodule
