// burst_router_tb: the router at mesh position (1,1) with traffic sources on
// all five inputs and credit-returning sinks on all five outputs.
// Checked:
//   * head-flit latency through an idle router: 3 cycles;
//   * every packet leaves on its dimension-order output, complete, in order;
//   * no foreign flit appears on an output between the head and the tail of
//     a burst packet (switch reservation);
//   * burst traffic competing with PS traffic: PS flits get aged and still
//     get through (starvation avoidance); bursts are reserved (ev_lock).
module burst_router_tb;
  import stlac_pkg::*;
  localparam int DEPTH = 4, AGE_TH = 16;

  // rst_n falls just after time 0 so that the asynchronous reset acts before
  // the first clock edge
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  logic  [NPORTS-1:0]          in_valid, out_valid;
  flit_t                       in_flit [NPORTS];
  flit_t                       out_flit[NPORTS];
  logic  [NPORTS-1:0][NVC-1:0] crd_out, crd_in;
  logic ev_lock, ev_age, ev_stall;
  int checks = 0, failures = 0;

  burst_router #(.X(1), .Y(1), .DEPTH(DEPTH), .AGE_TH(AGE_TH)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  // ---------------------------------------------------------------- packets
  typedef struct { int id; int dst_x; int dst_y; int len; bit burst; int vc; } pkt_t;
  pkt_t   q     [NPORTS][$];
  int     exp_port[int];
  int     exp_len [int];
  int     got     [int];
  int     sent_cycle[int];
  int     lat_first = -1;
  int     n_sent = 0, n_done = 0, n_lock = 0, n_age = 0, n_stall = 0;
  int     cycle = 0;

  function automatic int dor(input int dx, input int dy);
    if (dx > 1) return P_EAST;
    if (dx < 1) return P_WEST;
    if (dy > 1) return P_SOUTH;
    if (dy < 1) return P_NORTH;
    return P_LOCAL;
  endfunction

  function automatic flit_t mkflit(input pkt_t p, input int seq);
    flit_t f;
    hdr_t  h;
    h = '0;
    h.dst_x = COORD_W'(p.dst_x);
    h.dst_y = COORD_W'(p.dst_y);
    f.head  = (seq == 0);
    f.tail  = (seq == p.len - 1);
    f.burst = p.burst;
    f.vc    = VC_W'(p.vc);
    f.data  = (seq == 0) ? FLIT_W'(h) : FLIT_W'($urandom);
    f.data[127:112] = 16'(p.id);
    f.data[111:96]  = 16'(seq);
    return f;
  endfunction

  int next_id = 1;
  task automatic add(input int port, input int dx, input int dy, input bit burst, input int len, input int vc);
    pkt_t p;
    p = '{next_id, dx, dy, len, burst, vc};
    q[port].push_back(p);
    exp_port[next_id] = dor(dx, dy);
    exp_len[next_id]  = len;
    got[next_id]      = 0;
    next_id++;
  endtask

  // ---------------------------------------------------------------- sources
  int credit [NPORTS][NVC];
  int seq_of [NPORTS];
  always @(posedge clk) begin
    if (rst_n) begin
      for (int p = 0; p < NPORTS; p++) begin
        for (int v = 0; v < NVC; v++) credit[p][v] += int'(crd_out[p][v]);
        in_valid[p] <= 1'b0;
        if (q[p].size() > 0 && credit[p][q[p][0].vc] > 0) begin
          in_valid[p] <= 1'b1;
          in_flit[p]  <= mkflit(q[p][0], seq_of[p]);
          credit[p][q[p][0].vc]--;
          if (seq_of[p] == 0) begin sent_cycle[q[p][0].id] = int'($time / 10); n_sent++; end
          seq_of[p]++;
          if (seq_of[p] == q[p][0].len) begin seq_of[p] = 0; void'(q[p].pop_front()); end
        end
      end
    end
  end

  // ---------------------------------------------------------------- sinks
  int burst_owner [NPORTS];   // packet id holding the output, 0 = none
  always @(posedge clk) begin
    if (rst_n) begin
      cycle++;
      n_lock  += int'(ev_lock);
      n_age   += int'(ev_age);
      n_stall += int'(ev_stall);
      for (int o = 0; o < NPORTS; o++) begin
        crd_in[o] <= '0;
        if (out_valid[o]) begin
          int id, seq;
          id  = int'(out_flit[o].data[127:112]);
          seq = int'(out_flit[o].data[111:96]);
          crd_in[o][out_flit[o].vc] <= 1'b1;
          check(exp_port.exists(id) && exp_port[id] == o, $sformatf("packet %0d on port %0d", id, o));
          check(got[id] == seq, $sformatf("packet %0d flit %0d out of order", id, seq));
          got[id]++;
          check(burst_owner[o] == 0 || burst_owner[o] == id,
                $sformatf("flit of %0d inside burst %0d on port %0d", id, burst_owner[o], o));
          if (out_flit[o].head && out_flit[o].burst && !out_flit[o].tail) burst_owner[o] = id;
          if (out_flit[o].tail) begin
            burst_owner[o] = 0;
            check(got[id] == exp_len[id], "packet length");
            n_done++;
          end
          if (id == 1 && seq == 0) lat_first = int'($time / 10) - sent_cycle[id];
        end
      end
    end
  end

  task automatic drain(input int max);
    int c = 0;
    while ((n_done < next_id - 1) && c < max) begin @(posedge clk); c++; end
    check(n_done == next_id - 1, $sformatf("%0d of %0d packets delivered", n_done, next_id - 1));
  endtask

  initial begin
    in_valid = '0; crd_in = '0;
    for (int p = 0; p < NPORTS; p++) begin
      in_flit[p] = '0; seq_of[p] = 0; burst_owner[p] = 0;
      for (int v = 0; v < NVC; v++) credit[p][v] = DEPTH;
    end
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;

    // 1. latency of a lone head flit, west to east
    add(P_WEST, 3, 1, 0, 1, 0);
    drain(50);
    // driven on edge e, buffered on e+1, VC allocated on e+2, switched into the
    // output register on e+3, sampled by the sink on e+4
    check(lat_first == 4, $sformatf("head latency %0d, expected 3 router cycles", lat_first));

    // 2. random mixed traffic
    for (int i = 0; i < 300; i++) begin
      int port, dx, dy, vc, len;
      bit b;
      port = $urandom_range(0, NPORTS - 1);
      do begin dx = $urandom_range(0, 3); dy = $urandom_range(0, 3); end
      while ((port == P_LOCAL && dx == 1 && dy == 1) ||
             (port == P_EAST && dx >= 2) || (port == P_WEST && dx == 0) ||
             (port == P_NORTH && (dx != 1 || dy == 0)) || (port == P_SOUTH && (dx != 1 || dy >= 2)) ||
             ((port == P_NORTH || port == P_SOUTH) && dx != 1));
      b   = ($urandom_range(0, 3) == 0);
      vc  = b ? 1 : $urandom_range(0, 1);
      len = b ? 1 + 4 * PREF_LEN : (($urandom_range(0, 1) == 1) ? 5 : 1);
      add(port, dx, dy, b, len, vc);
    end
    drain(20000);

    // 3. back-to-back bursts from north and south against PS flits from the west,
    //    all heading east
    n_age = 0;
    for (int i = 0; i < 6; i++) begin
      add(P_NORTH, 1, 1, 0, 1, 0);            // keep the ids unique; local delivery
    end
    for (int i = 0; i < 8; i++) begin
      add(P_LOCAL, 3, 1, 1, 17, 1);
      add(P_SOUTH, 1, 0, 0, 5, 0);
    end
    for (int i = 0; i < 8; i++) add(P_WEST, 2, 1, 0, 5, 0);
    for (int i = 0; i < 8; i++) add(P_LOCAL, 2, 1, 1, 17, 1);
    drain(20000);
    check(n_age > 0, "no PS flit was aged");
    check(n_lock > 0, "no burst reservation");
    check(n_stall > 0, "no allocation conflict");
    $display("packets %0d, burst reservations %0d, aged flits %0d, stalls %0d",
             n_done, n_lock, n_age, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
