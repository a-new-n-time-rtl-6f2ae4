// Minimum Computation (MC) block: a linear systolic array of N processing
// elements that computes the cumulative distance D_i of every vector x_i of
// an N-vector window.
//
// The window enters serially at PE_N and moves one PE towards PE_1 per
// loading clock; after N loading clocks PE_i holds x_i. At load every PE
// copies its vector into RI and RJ, then the RJ ring rotates for N clocks
// while each PE accumulates distance(RI, RJ) into D, giving D_i. At d2min
// the D_i enter the MIN chain and leave through PE_1 in the order
// D_1, D_2, ..., D_N, one per clock, each with its vector x_i.
// Loading, accumulation and the MIN chain work on three different windows
// at once, which is what gives one median per N+2 clocks.
//
// Index convention: pe[0] is PE_1 and pe[N-1] is PE_N. The MIN input of
// PE_N, which has no previous PE, is fed with the all-ones distance.
//
// Ports: ctrl - control word from vmf_ctrl; in_vec - the serial window
// input; dis / dis_vec - the D value and vector in MIN of PE_1 (the DIS
// input of the Minimum Finding block).
module vmf_mc
  import vmf_pkg::*;
#(
  parameter int unsigned N  = N_DEF,
  parameter int unsigned DW = dist_width(N)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  pe_ctrl_t      ctrl,
  input  rgb_t          in_vec,
  output logic [DW-1:0] dis,
  output rgb_t          dis_vec
);

  rgb_t          sr_o  [N];
  rgb_t          rj_o  [N];
  logic [DW-1:0] min_d [N];
  rgb_t          min_v [N];

  for (genvar i = 0; i < N; i++) begin : g_pe
    // Previous PE in every chain is PE_{i+1}; PE_N takes the input, the
    // RJ ring closes from PE_1 back to PE_N.
    localparam int unsigned PREV = (i == N - 1) ? 0 : i + 1;

    rgb_t          sr_i;
    logic [DW-1:0] min_d_i;
    rgb_t          min_v_i;

    if (i == N - 1) begin : g_head
      assign sr_i    = in_vec;
      assign min_d_i = '1;
      assign min_v_i = '0;
    end else begin : g_body
      assign sr_i    = sr_o[PREV];
      assign min_d_i = min_d[PREV];
      assign min_v_i = min_v[PREV];
    end

    vmf_pe #(.DW(DW)) u_pe (
      .clk       (clk),
      .rst_n     (rst_n),
      .ctrl      (ctrl),
      .sr_in     (sr_i),
      .sr_out    (sr_o[i]),
      .rj_in     (rj_o[PREV]),
      .rj_out    (rj_o[i]),
      .min_d_in  (min_d_i),
      .min_v_in  (min_v_i),
      .min_d_out (min_d[i]),
      .min_v_out (min_v[i])
    );
  end

  assign dis     = min_d[0];
  assign dis_vec = min_v[0];

endmodule
