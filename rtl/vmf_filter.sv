// Vector median filter: systolic-array architecture that returns, for every
// window of N colour vectors x_1 .. x_N, the vector x_i whose cumulative
// distance D_i = sum_j ||x_i - x_j|| (squared Euclidean) is smallest.
//
// The window is applied serially, one vector per clock on in_vec while
// in_ready is high (N clocks of every N+2). The MC block (N processing
// elements) computes all D_i in N clocks, the MF block scans them and keeps
// the vector with the smallest D_i. The first median appears 3N+2 clocks
// after the first input vector; after that one median every N+2 clocks.
// med_valid is high for one clock per valid window; med_vec and med_dist
// (its D value) then hold until the next window's result.
//
// The MC/MF split, the register-level structure and the 3N+2 / N+2 timing
// follow the published architecture. The control schedule within the
// period, the input slot handshake, the valid tracking, med_valid and
// med_dist are this design's choices, as is carrying each x_i with its D_i
// to the MF block (see vmf_pe).
//
// Ports:
//   in_valid / in_vec / in_ready - serial window input; a vector is taken on
//                                  every clock with in_ready high
//   med_valid / med_vec / med_dist - result
module vmf_filter
  import vmf_pkg::*;
#(
  parameter int unsigned N  = N_DEF,          // vectors per window (3x3)
  parameter int unsigned DW = dist_width(N)   // width of D_i
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  rgb_t          in_vec,
  output logic          in_ready,
  output logic          med_valid,
  output rgb_t          med_vec,
  output logic [DW-1:0] med_dist
);

  pe_ctrl_t      pe_ctrl;
  logic          mf_start, mf_cmp, mf_done, mf_min;
  logic [DW-1:0] dis;
  rgb_t          dis_vec;

  vmf_ctrl #(.N(N)) u_ctrl (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (in_valid),
    .in_ready (in_ready),
    .pe_ctrl  (pe_ctrl),
    .mf_start (mf_start),
    .mf_cmp   (mf_cmp),
    .mf_done  (mf_done)
  );

  vmf_mc #(.N(N), .DW(DW)) u_mc (
    .clk     (clk),
    .rst_n   (rst_n),
    .ctrl    (pe_ctrl),
    .in_vec  (in_vec),
    .dis     (dis),
    .dis_vec (dis_vec)
  );

  vmf_mf #(.DW(DW)) u_mf (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (mf_start),
    .cmp       (mf_cmp),
    .done      (mf_done),
    .dis       (dis),
    .dis_vec   (dis_vec),
    .min       (mf_min),
    .med_valid (med_valid),
    .med_vec   (med_vec),
    .med_dist  (med_dist)
  );

endmodule
