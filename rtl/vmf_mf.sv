// Minimum Finding (MF) block.
//
// Receives the cumulative distances D_1 ... D_N serially (DIS) from the MC
// block, one per clock, each with its vector, and keeps the smallest.
// Register M holds the running minimum and is set to the maximum (all-ones)
// value by start. On every compare clock, min = (DIS < M); when min is set,
// M takes DIS and register MX takes the vector. After the N-th compare MX
// holds the vector median. Because the comparison is strict, a tie keeps the
// earlier vector (lowest index i); tie handling is this design's choice.
//
// The output strobe med_valid is this design's addition: it is raised for
// one clock after the compare clock marked by done, while MX (med_vec) and
// M (med_dist) hold the result of the window until the next start.
//
// Timing: start, cmp and done are sampled on the rising edge; start and cmp
// are never high together.
module vmf_mf
  import vmf_pkg::*;
#(
  parameter int unsigned DW = dist_width(N_DEF)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,    // M <= maximum
  input  logic          cmp,      // compare DIS with M this clock
  input  logic          done,     // this compare is the window's last
  input  logic [DW-1:0] dis,
  input  rgb_t          dis_vec,
  output logic          min,
  output logic          med_valid,
  output rgb_t          med_vec,
  output logic [DW-1:0] med_dist
);

  logic [DW-1:0] m;
  rgb_t          mx;

  assign min = cmp && (dis < m);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      m         <= '1;
      mx        <= '0;
      med_valid <= 1'b0;
    end else begin
      if (start) m <= '1;
      else if (min) begin
        m  <= dis;
        mx <= dis_vec;
      end
      med_valid <= done;
    end
  end

  assign med_vec  = mx;
  assign med_dist = m;

  a_start_cmp_exclusive: assert property (@(posedge clk) disable iff (!rst_n)
    !(start && cmp));
  a_done_is_compare: assert property (@(posedge clk) disable iff (!rst_n)
    done |-> cmp);

endmodule
