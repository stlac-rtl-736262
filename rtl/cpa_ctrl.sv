// cpa_ctrl: cache partition controller (CPA) of one STLAC slice.
//
// It profiles how well the victim part and the prefetch part of the slice
// serve demand lookups and, once per period, moves one way between them:
//   * start: both parts get half of the ways, all counters cleared;
//   * every PERIOD cycles the miss rates of the two parts are compared,
//     MR_v = 1 - hits_v/accesses and MR_p = 1 - hits_p/accesses;
//     if MR_v - MR_p >= threshold the victim part shrinks by one way and the
//     prefetch part grows, if MR_p - MR_v >= threshold the victim part grows,
//     otherwise the partition is kept; the counters then restart.
// The comparison is done without division:
//   MR_v - MR_p >= THR_PCT/100  <=>  100*(hits_p - hits_v) >= THR_PCT*accesses.
// Neither part is shrunk below MIN_WAYS.
//
// Interface: ev_* are one-cycle event pulses from the cache. mv_valid is a
// one-cycle pulse asking the cache to hand one way away from mv_src; no new
// decision is taken until mv_done comes back. cap_v/cap_p give the current
// number of ways of each part.
//
// The period (1M cycles), the 10% threshold, the equal start and the
// one-way step follow the published algorithm. The miss-rate definition per
// part, the floor of MIN_WAYS and the counter widths are choices of this
// design.
module cpa_ctrl
  import stlac_pkg::*;
#(
  parameter int WAYS     = 8,
  parameter int PERIOD   = 1_000_000,
  parameter int THR_PCT  = 10,
  parameter int MIN_WAYS = 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    ev_access,
  input  logic                    ev_hit_v,
  input  logic                    ev_hit_p,
  output logic                    mv_valid,
  output part_t                   mv_src,
  input  logic                    mv_done,
  output logic [$clog2(WAYS):0]   cap_v,
  output logic [$clog2(WAYS):0]   cap_p,
  output logic                    ev_shrink_v,   // a way went victim -> prefetch
  output logic                    ev_expand_v    // a way went prefetch -> victim
);
  localparam int CW = 32;
  localparam int KW = $clog2(WAYS) + 1;

  logic [CW-1:0] period_cnt, acc, hv, hp;
  logic          pending;

  // 100*(hp-hv) against THR*acc, in signed arithmetic wide enough for 32-bit counts
  // the counts including this cycle's events
  logic [CW-1:0] acc_n, hv_n, hp_n;
  logic signed [CW+8:0] lhs, rhs;
  always_comb begin
    acc_n = acc + CW'(ev_access);
    hv_n  = hv + CW'(ev_hit_v);
    hp_n  = hp + CW'(ev_hit_p);
    lhs   = (signed'({9'b0, hp_n}) - signed'({9'b0, hv_n})) * 100;
    rhs   = signed'({9'b0, acc_n}) * THR_PCT;
  end
  wire period_end = (period_cnt == CW'(PERIOD - 1));
  wire want_shrink_v = (acc_n != '0) && (lhs >= rhs)  && cap_v > KW'(MIN_WAYS);
  wire want_expand_v = (acc_n != '0) && (-lhs >= rhs) && cap_p > KW'(MIN_WAYS);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      period_cnt  <= '0;
      acc         <= '0;
      hv          <= '0;
      hp          <= '0;
      pending     <= 1'b0;
      mv_valid    <= 1'b0;
      mv_src      <= PART_VICTIM;
      cap_v       <= KW'(WAYS / 2);
      cap_p       <= KW'(WAYS - WAYS / 2);
      ev_shrink_v <= 1'b0;
      ev_expand_v <= 1'b0;
    end else begin
      mv_valid    <= 1'b0;
      ev_shrink_v <= 1'b0;
      ev_expand_v <= 1'b0;
      if (mv_done) pending <= 1'b0;
      if (period_end) begin
        period_cnt <= '0;
        acc        <= '0;
        hv         <= '0;
        hp         <= '0;
        if (!pending) begin
          if (want_shrink_v) begin
            mv_valid    <= 1'b1;
            mv_src      <= PART_VICTIM;
            pending     <= 1'b1;
            cap_v       <= cap_v - 1'b1;
            cap_p       <= cap_p + 1'b1;
            ev_shrink_v <= 1'b1;
          end else if (want_expand_v) begin
            mv_valid    <= 1'b1;
            mv_src      <= PART_PREF;
            pending     <= 1'b1;
            cap_v       <= cap_v + 1'b1;
            cap_p       <= cap_p - 1'b1;
            ev_expand_v <= 1'b1;
          end
        end
      end else begin
        period_cnt <= period_cnt + 1'b1;
        acc        <= acc_n;
        hv         <= hv_n;
        hp         <= hp_n;
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) cap_v + cap_p == KW'(WAYS))
    else $error("cpa_ctrl: partition does not cover all ways");
endmodule
