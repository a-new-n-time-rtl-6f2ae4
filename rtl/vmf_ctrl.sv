// Controller of the vector median filter.
//
// The array runs on a fixed period of N+2 clocks, counted by a phase
// counter p = 0 .. N+1 that starts at 0 after reset and never stops:
//   p = 0 .. N-1  SR shift: one input vector is taken per clock (in_ready)
//   p = N         load: MUX1 selects SR, RI/RJ take SR, D is cleared
//   p = N+1, 0 .. N-2
//                 N accumulate clocks: RJ ring rotates, D += distance
//   p = N-1       d2min: MUX2 selects D; the MF block's M is set to maximum
//   p = N, N+1, 0 .. N-3
//                 N compare clocks of the MF block on D_1 .. D_N
// Window k is loaded in period k, accumulated from the end of period k
// through period k+1 and searched for its minimum in period k+2, so three
// windows are in flight at a time. The first median is ready 3N+2 clocks
// after the first input and later ones every N+2 clocks, as the
// architecture specifies; the exact phase of each step within the period is
// this design's choice.
//
// A window counts as valid only if in_valid was high on all N of its input
// clocks; a window with a gap is still processed but produces no med_valid
// (the gap and the valid tracking are this design's additions). The
// pipeline never stalls.
module vmf_ctrl
  import vmf_pkg::*;
#(
  parameter int unsigned N = N_DEF
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     in_valid,
  output logic     in_ready,
  output pe_ctrl_t pe_ctrl,
  output logic     mf_start,
  output logic     mf_cmp,
  output logic     mf_done
);

  localparam int unsigned P  = N + 2;
  localparam int unsigned PW = $clog2(P);

  if (N < 3) begin : g_check_n
    $error("vmf_ctrl: N must be at least 3");
  end

  logic [PW-1:0] phase;
  logic          set_ok;      // window being loaded has had no gap so far
  logic          comp_valid;  // window in RI/RJ/D is valid
  logic          min_valid;   // window in the MIN chain / MF is valid

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase      <= '0;
      set_ok     <= 1'b0;
      comp_valid <= 1'b0;
      min_valid  <= 1'b0;
    end else begin
      phase <= (phase == PW'(P - 1)) ? '0 : phase + 1'b1;
      if (phase == '0)              set_ok <= in_valid;
      else if (phase < PW'(N))      set_ok <= set_ok && in_valid;
      if (phase == PW'(N))          comp_valid <= set_ok;
      if (phase == PW'(N - 1))      min_valid  <= comp_valid;
    end
  end

  always_comb begin
    in_ready         = (phase < PW'(N));
    pe_ctrl.sr_shift = (phase < PW'(N));
    pe_ctrl.load     = (phase == PW'(N));
    pe_ctrl.d2min    = (phase == PW'(N - 1));
    pe_ctrl.acc      = !pe_ctrl.load && !pe_ctrl.d2min;
    mf_start         = (phase == PW'(N - 1));
    mf_cmp           = (phase != PW'(N - 1)) && (phase != PW'(N - 2));
    mf_done          = (phase == PW'(N - 3)) && min_valid;
  end

endmodule
