// Processing element (PE) of the Minimum Computation (MC) block.
//
// Each PE holds one vector x_i of a window and computes its cumulative
// distance D_i = sum_j ||x_i - x_j|| to all vectors of the window.
//   SR  - input shift register; the PEs form a chain PE_N -> ... -> PE_1
//         through which the window is loaded serially, one vector a clock.
//   RI  - copy of SR taken when the whole window is loaded; stays x_i.
//   RJ  - loaded from SR through MUX1 at the same time, then, through MUX1,
//         takes the RJ of the previous PE every clock; the RJs form a ring
//         (PE_1 feeds PE_N), so over N clocks RJ presents every x_j.
//   D   - cleared at load, then D <= D + distance(RI, RJ) for N clocks.
//   MIN - through MUX2 takes D (the finished D_i) once per window, and
//         otherwise the MIN of the previous PE, so the D_i leave the chain
//         one per clock towards the Minimum Finding block.
// The structure follows the PE diagram of the architecture. One departure:
// MIN also carries the vector x_i (taken from RI alongside D_i), so that the
// minimum finder receives each D_i together with the vector it belongs to.
// The register widths and the synchronous active-low reset are this
// design's choices.
//
// Timing: all registers update on the rising clock edge, under the control
// word ctrl (see vmf_pkg::pe_ctrl_t); MIN shifts on every edge on which
// d2min is low.
module vmf_pe
  import vmf_pkg::*;
#(
  parameter int unsigned DW = dist_width(N_DEF)  // width of D and MIN
) (
  input  logic          clk,
  input  logic          rst_n,
  input  pe_ctrl_t      ctrl,
  // SR chain: from the previous PE (PE_{i+1}, or the filter input)
  input  rgb_t          sr_in,
  output rgb_t          sr_out,
  // RJ ring: from RJ of the previous PE
  input  rgb_t          rj_in,
  output rgb_t          rj_out,
  // MIN chain: from MIN of the previous PE, to the next PE / MF block
  input  logic [DW-1:0] min_d_in,
  input  rgb_t          min_v_in,
  output logic [DW-1:0] min_d_out,
  output rgb_t          min_v_out
);

  rgb_t                sr, ri, rj;
  logic [DW-1:0]       d;
  logic [DW-1:0]       min_d;
  rgb_t                min_v;
  logic [DIST1_W-1:0]  sqdist;
  rgb_t                mux1;

  vmf_distance u_distance (
    .a    (ri),
    .b    (rj),
    .sqdist (sqdist)
  );

  // MUX1: SR at load, otherwise RJ of the previous PE.
  assign mux1 = ctrl.load ? sr : rj_in;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sr    <= '0;
      ri    <= '0;
      rj    <= '0;
      d     <= '0;
      min_d <= '0;
      min_v <= '0;
    end else begin
      if (ctrl.sr_shift) sr <= sr_in;
      if (ctrl.load) ri <= sr;
      if (ctrl.load || ctrl.acc) rj <= mux1;
      // Register D with the adder ALU.
      if (ctrl.load)     d <= '0;
      else if (ctrl.acc) d <= d + DW'(sqdist);
      // MUX2: D once per window, otherwise the previous PE's MIN.
      if (ctrl.d2min) begin
        min_d <= d;
        min_v <= ri;
      end else begin
        min_d <= min_d_in;
        min_v <= min_v_in;
      end
    end
  end

  assign sr_out    = sr;
  assign rj_out    = rj;
  assign min_d_out = min_d;
  assign min_v_out = min_v;

endmodule
