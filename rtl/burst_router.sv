// burst_router: five-port mesh router with burst support.
//
// The router carries two kinds of traffic. Normal packet-switched (PS)
// packets travel wormhole style and may interleave flit by flit with other
// packets on an output. Burst packets carry a whole prefetch (several cache
// blocks behind one head flit); they get higher priority than PS flits and,
// once their head flit wins an output, the switch connection from their input
// to that output is reserved until the tail flit has passed, so the burst
// crosses the router without being broken up.
//
// Structure, per input port and virtual channel (VC):
//   * an input buffer of DEPTH flits;
//   * a VC state register with the fields active, output port, burst, age and
//     a wait counter.
// Pipeline (three stages for a head flit, two for body flits):
//   1. buffer write; the route is computed from the head flit header
//      (dimension order, X first);
//   2. VC allocation: the packet takes the same VC on the output (VC = message
//      class), which must not be held by another packet;
//   3. switch allocation and traversal into the output register. Allocation
//      is separable: each input picks one VC, each output picks one input.
//      At both levels burst flits and aged PS flits form the high class, PS
//      flits of age 0 the low class; round-robin within a class.
// Starvation avoidance: a PS flit starts with age 0. When it has waited
// AGE_TH cycles without being sent its age becomes 1 and it then competes on
// equal terms with burst flits.
// Flow control is credit based, one credit per buffer slot per VC; crd_out
// returns a credit upstream one cycle after a flit leaves an input buffer.
//
// The reservation, the burst priority, the VC state register and the ageing
// rule follow the published design. Buffer depth, AGE_TH, the static VC per
// message class and the exact pipeline split are choices of this design.
module burst_router
  import stlac_pkg::*;
#(
  parameter int X      = 0,
  parameter int Y      = 0,
  parameter int DEPTH  = VC_DEPTH,
  parameter int AGE_TH = 16
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // links from the neighbours (and the local network interface, port 0)
  input  logic  [NPORTS-1:0]           in_valid,
  input  flit_t                        in_flit  [NPORTS],
  output logic  [NPORTS-1:0][NVC-1:0]  crd_out,
  // links to the neighbours
  output logic  [NPORTS-1:0]           out_valid,
  output flit_t                        out_flit [NPORTS],
  input  logic  [NPORTS-1:0][NVC-1:0]  crd_in,
  // event pulses for statistics
  output logic                         ev_lock,   // a burst reserved an output
  output logic                         ev_age,    // a PS flit was aged
  output logic                         ev_stall   // a flit lost switch allocation
);
  localparam int PW = 3;
  localparam int CW = $clog2(DEPTH + 1);

  typedef struct packed {
    logic          active;
    logic [PW-1:0] outp;
    logic          burst;
    logic          age;
    logic [7:0]    wait_cnt;
  } vcs_t;

  // ------------------------------------------------------------ buffers
  flit_t               head_f  [NPORTS][NVC];
  logic [NVC-1:0]      empty   [NPORTS];
  logic [NVC-1:0]      pop     [NPORTS];

  for (genvar p = 0; p < NPORTS; p++) begin : g_in
    for (genvar v = 0; v < NVC; v++) begin : g_vc
      logic unused_full;
      flit_fifo #(.DEPTH(DEPTH)) u_buf (
        .clk, .rst_n,
        .wr_en  (in_valid[p] && in_flit[p].vc == VC_W'(v)),
        .wr_flit(in_flit[p]),
        .rd_en  (pop[p][v]),
        .rd_flit(head_f[p][v]),
        .empty  (empty[p][v]),
        .full   (unused_full)
      );
    end
  end

  // ------------------------------------------------------------ state
  vcs_t               vcs     [NPORTS][NVC];
  logic [NVC-1:0]     busy    [NPORTS];        // output VC held by a packet
  logic [CW-1:0]      credit  [NPORTS][NVC];
  logic               lock_v  [NPORTS];        // output reserved by a burst
  logic [PW-1:0]      lock_p  [NPORTS];
  logic [VC_W-1:0]    lock_vc [NPORTS];
  logic               ilock_v [NPORTS];        // input tied to a burst VC
  logic [VC_W-1:0]    ilock_vc[NPORTS];
  logic [3:0]         va_ptr  [NPORTS][NVC];
  logic [3:0]         in_ptr  [NPORTS];
  logic [3:0]         out_ptr [NPORTS];

  // dimension-order route of a head flit
  function automatic logic [PW-1:0] route(input flit_t f);
    hdr_t h;
    h = hdr_t'(f.data);
    if      (int'(h.dst_x) > X) return PW'(P_EAST);
    else if (int'(h.dst_x) < X) return PW'(P_WEST);
    else if (int'(h.dst_y) > Y) return PW'(P_SOUTH);
    else if (int'(h.dst_y) < Y) return PW'(P_NORTH);
    else                        return PW'(P_LOCAL);
  endfunction

  // ------------------------------------------------------------ VC allocation
  logic [NVC-1:0]  va_req [NPORTS];
  logic [PW-1:0]   rt     [NPORTS][NVC];
  logic [NVC-1:0]  va_gnt [NPORTS];
  logic [3:0]      va_win [NPORTS][NVC];
  logic            va_any [NPORTS][NVC];

  always_comb begin
    for (int p = 0; p < NPORTS; p++)
      for (int v = 0; v < NVC; v++) begin
        rt[p][v]     = route(head_f[p][v]);
        va_req[p][v] = !empty[p][v] && head_f[p][v].head && !vcs[p][v].active;
        va_gnt[p][v] = 1'b0;
      end
    for (int o = 0; o < NPORTS; o++)
      for (int v = 0; v < NVC; v++) begin
        logic [15:0] r;
        r = '0;
        for (int p = 0; p < NPORTS; p++)
          r[p] = va_req[p][v] && rt[p][v] == PW'(o) && !busy[o][v];
        va_any[o][v] = |r;
        va_win[o][v] = rr_pick(r, va_ptr[o][v], NPORTS);
        if (va_any[o][v]) va_gnt[va_win[o][v][2:0]][v] = 1'b1;
      end
  end

  // ------------------------------------------------------------ switch allocation
  logic [NVC-1:0]  elig   [NPORTS];
  logic [NVC-1:0]  hi     [NPORTS];
  logic            isel_v [NPORTS];
  logic [VC_W-1:0] isel   [NPORTS];
  logic [PW-1:0]   isel_o [NPORTS];
  logic            isel_hi[NPORTS];
  logic            sa_gnt [NPORTS];        // per input: its chosen VC wins
  logic            o_any  [NPORTS];
  logic [3:0]      o_win  [NPORTS];

  always_comb begin
    for (int p = 0; p < NPORTS; p++) begin
      logic [15:0] re, rh;
      logic [3:0]  pick;
      re = '0;
      rh = '0;
      for (int v = 0; v < NVC; v++) begin
        logic [PW-1:0] o;
        o = vcs[p][v].outp;
        elig[p][v] = vcs[p][v].active && !empty[p][v] && credit[o][v] != '0
                     && (!lock_v[o] || (lock_p[o] == PW'(p) && lock_vc[o] == VC_W'(v)))
                     && (!ilock_v[p] || ilock_vc[p] == VC_W'(v));
        hi[p][v]   = elig[p][v] && (vcs[p][v].burst || vcs[p][v].age);
        re[v] = elig[p][v];
        rh[v] = hi[p][v];
      end
      pick       = (|rh) ? rr_pick(rh, in_ptr[p], NVC) : rr_pick(re, in_ptr[p], NVC);
      isel_v[p]  = |re;
      isel[p]    = VC_W'(pick);
      isel_o[p]  = vcs[p][isel[p]].outp;
      isel_hi[p] = |rh;
      sa_gnt[p]  = 1'b0;
    end
    for (int o = 0; o < NPORTS; o++) begin
      logic [15:0] re, rh;
      re = '0;
      rh = '0;
      for (int p = 0; p < NPORTS; p++) begin
        re[p] = isel_v[p] && isel_o[p] == PW'(o);
        rh[p] = re[p] && isel_hi[p];
      end
      o_any[o] = |re;
      o_win[o] = (|rh) ? rr_pick(rh, out_ptr[o], NPORTS) : rr_pick(re, out_ptr[o], NPORTS);
      if (o_any[o]) sa_gnt[o_win[o][2:0]] = 1'b1;
    end
    for (int p = 0; p < NPORTS; p++)
      for (int v = 0; v < NVC; v++)
        pop[p][v] = sa_gnt[p] && isel[p] == VC_W'(v);
  end

  // ------------------------------------------------------------ events
  always_comb begin
    ev_stall = 1'b0;
    for (int p = 0; p < NPORTS; p++)
      if (isel_v[p] && !sa_gnt[p]) ev_stall = 1'b1;
  end

  // ------------------------------------------------------------ sequential
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < NPORTS; p++) begin
        for (int v = 0; v < NVC; v++) begin
          vcs[p][v]    <= '0;
          credit[p][v] <= CW'(DEPTH);
          va_ptr[p][v] <= '0;
        end
        busy[p]     <= '0;
        lock_v[p]   <= 1'b0;
        lock_p[p]   <= '0;
        lock_vc[p]  <= '0;
        ilock_v[p]  <= 1'b0;
        ilock_vc[p] <= '0;
        in_ptr[p]   <= '0;
        out_ptr[p]  <= '0;
        out_valid[p]<= 1'b0;
        out_flit[p] <= '0;
        crd_out[p]  <= '0;
      end
      ev_lock <= 1'b0;
      ev_age  <= 1'b0;
    end else begin
      ev_lock <= 1'b0;
      ev_age  <= 1'b0;
      // VC allocation
      for (int o = 0; o < NPORTS; o++)
        for (int v = 0; v < NVC; v++)
          if (va_any[o][v]) begin
            busy[o][v]   <= 1'b1;
            va_ptr[o][v] <= (va_win[o][v] == 4'(NPORTS-1)) ? '0 : va_win[o][v] + 1'b1;
          end
      for (int p = 0; p < NPORTS; p++)
        for (int v = 0; v < NVC; v++)
          if (va_gnt[p][v]) begin
            vcs[p][v].active <= 1'b1;
            vcs[p][v].outp   <= rt[p][v];
            vcs[p][v].burst  <= head_f[p][v].burst;
          end
      // credits returned from downstream
      for (int o = 0; o < NPORTS; o++)
        for (int v = 0; v < NVC; v++)
          credit[o][v] <= credit[o][v] + CW'(crd_in[o][v])
                          - CW'(o_any[o] && isel[o_win[o][2:0]] == VC_W'(v));
      // switch traversal
      for (int o = 0; o < NPORTS; o++) begin
        out_valid[o] <= o_any[o];
        if (o_any[o]) begin
          logic [2:0]      p;
          logic [VC_W-1:0] v;
          flit_t           f;
          p = o_win[o][2:0];
          v = isel[p];
          f = head_f[p][v];
          out_flit[o] <= f;
          out_ptr[o]  <= (o_win[o] == 4'(NPORTS-1)) ? '0 : o_win[o] + 1'b1;
          in_ptr[p]   <= (v == VC_W'(NVC-1)) ? '0 : 4'(v) + 1'b1;
          if (f.head && f.burst && !f.tail) begin
            lock_v[o]   <= 1'b1;
            lock_p[o]   <= p;
            lock_vc[o]  <= v;
            ilock_v[p]  <= 1'b1;
            ilock_vc[p] <= v;
            ev_lock     <= 1'b1;
          end
          if (f.tail) begin
            vcs[p][v].active <= 1'b0;
            busy[o][v]       <= 1'b0;
            if (lock_v[o] && lock_p[o] == p) begin
              lock_v[o]  <= 1'b0;
              ilock_v[p] <= 1'b0;
            end
          end
        end
      end
      // credits to upstream, ageing
      for (int p = 0; p < NPORTS; p++)
        for (int v = 0; v < NVC; v++) begin
          crd_out[p][v] <= pop[p][v];
          if (pop[p][v]) begin
            vcs[p][v].wait_cnt <= '0;
            vcs[p][v].age      <= 1'b0;
          end else if (!empty[p][v] && !head_f[p][v].burst && !vcs[p][v].age) begin
            if (vcs[p][v].wait_cnt >= 8'(AGE_TH - 1)) begin
              vcs[p][v].age <= 1'b1;
              ev_age        <= 1'b1;
            end else begin
              vcs[p][v].wait_cnt <= vcs[p][v].wait_cnt + 1'b1;
            end
          end
        end
    end
  end

  // A flit must never arrive for a VC without a free buffer slot, and a
  // burst reservation must belong to the input that made it.
  for (genvar o = 0; o < NPORTS; o++) begin : g_chk
    assert property (@(posedge clk) disable iff (!rst_n)
                     lock_v[o] |-> ilock_v[lock_p[o]] && ilock_vc[lock_p[o]] == lock_vc[o])
      else $error("burst_router: output reservation without input reservation");
  end
endmodule
