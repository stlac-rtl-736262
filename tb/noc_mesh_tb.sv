// noc_mesh_tb: random packet-switched and burst packets between all tiles
// of the 4x4 mesh, with credit-respecting injectors and ejectors standing in
// for the network interfaces. Checked: every packet reaches its destination
// tile complete and in order; burst packets reach the ejection port without
// any foreign flit between head and tail; the zero-load latency of a head
// flit across the mesh (corner to corner) is 3 cycles per router plus one
// cycle to be sampled; burst reservations and PS ageing occur.
module noc_mesh_tb;
  import stlac_pkg::*;

  // rst_n falls just after time 0 so that the asynchronous reset acts before
  // the first clock edge
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  logic  [NODES-1:0]          inj_valid, ej_valid;
  flit_t                      inj_flit [NODES];
  flit_t                      ej_flit  [NODES];
  logic  [NODES-1:0][NVC-1:0] inj_crd, ej_crd;
  logic  [NODES-1:0]          ev_lock, ev_age, ev_stall;
  int checks = 0, failures = 0;

  noc_mesh dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  typedef struct { int id; int dst; int len; bit burst; int vc; } pkt_t;
  pkt_t q [NODES][$];
  int exp_dst[int], exp_len[int], got[int], t_sent[int];
  int next_id = 1, n_done = 0, n_lock = 0, n_age = 0, lat_first = -1;

  function automatic flit_t mkflit(input pkt_t p, input int seq);
    flit_t f;
    hdr_t  h;
    h = '0;
    h.dst_x = COORD_W'(p.dst % MESH_X);
    h.dst_y = COORD_W'(p.dst / MESH_X);
    f.head  = (seq == 0);
    f.tail  = (seq == p.len - 1);
    f.burst = p.burst;
    f.vc    = VC_W'(p.vc);
    f.data  = (seq == 0) ? FLIT_W'(h) : {$urandom, $urandom, $urandom, $urandom};
    f.data[127:112] = 16'(p.id);
    f.data[111:96]  = 16'(seq);
    return f;
  endfunction

  task automatic add(input int src, input int dst, input bit burst, input int len, input int vc);
    q[src].push_back('{next_id, dst, len, burst, vc});
    exp_dst[next_id] = dst; exp_len[next_id] = len; got[next_id] = 0;
    next_id++;
  endtask

  int credit[NODES][NVC];
  int seq_of[NODES];
  int owner [NODES];
  always @(posedge clk) begin
    if (rst_n) begin
      for (int n = 0; n < NODES; n++) begin
        for (int v = 0; v < NVC; v++) credit[n][v] += int'(inj_crd[n][v]);
        inj_valid[n] <= 1'b0;
        if (q[n].size() > 0 && credit[n][q[n][0].vc] > 0) begin
          inj_valid[n] <= 1'b1;
          inj_flit[n]  <= mkflit(q[n][0], seq_of[n]);
          credit[n][q[n][0].vc]--;
          if (seq_of[n] == 0) t_sent[q[n][0].id] = int'($time / 10);
          seq_of[n]++;
          if (seq_of[n] == q[n][0].len) begin seq_of[n] = 0; void'(q[n].pop_front()); end
        end
        // ejection: consume at once, return the credit
        ej_crd[n] <= '0;
        if (ej_valid[n]) begin
          int id, seq;
          id  = int'(ej_flit[n].data[127:112]);
          seq = int'(ej_flit[n].data[111:96]);
          ej_crd[n][ej_flit[n].vc] <= 1'b1;
          check(exp_dst.exists(id) && exp_dst[id] == n, $sformatf("packet %0d at node %0d", id, n));
          check(got[id] == seq, $sformatf("packet %0d order", id));
          got[id]++;
          check(owner[n] == 0 || owner[n] == id, $sformatf("burst %0d broken at node %0d", owner[n], n));
          if (ej_flit[n].head && ej_flit[n].burst && !ej_flit[n].tail) owner[n] = id;
          if (ej_flit[n].tail) begin
            owner[n] = 0;
            check(got[id] == exp_len[id], "packet length");
            n_done++;
          end
          if (id == 1 && seq == 0) lat_first = int'($time / 10) - t_sent[id];
        end
      end
      n_lock += $countones(ev_lock);
      n_age  += $countones(ev_age);
    end
  end

  task automatic drain(input int max);
    int c = 0;
    while (n_done < next_id - 1 && c < max) begin @(posedge clk); c++; end
    check(n_done == next_id - 1, $sformatf("%0d of %0d packets delivered", n_done, next_id - 1));
  endtask

  initial begin
    inj_valid = '0; ej_crd = '0;
    for (int n = 0; n < NODES; n++) begin
      inj_flit[n] = '0; seq_of[n] = 0; owner[n] = 0;
      for (int v = 0; v < NVC; v++) credit[n][v] = VC_DEPTH;
    end
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;

    // zero-load latency corner to corner: 7 routers
    add(0, 15, 0, 1, 0);
    drain(200);
    check(lat_first == 3 * 7 + 1, $sformatf("corner-to-corner latency %0d", lat_first));

    // random traffic, a quarter of it bursts of 1+16 flits
    for (int i = 0; i < 600; i++) begin
      int s, d;
      bit b;
      s = $urandom_range(0, NODES - 1);
      d = $urandom_range(0, NODES - 1);
      b = ($urandom_range(0, 3) == 0);
      add(s, d, b, b ? 1 + 4 * PREF_LEN : (($urandom_range(0, 1) == 1) ? 5 : 1),
          b ? 1 : $urandom_range(0, 1));
    end
    drain(50000);
    check(n_lock > 0, "no burst reservation");
    check(n_age > 0, "no PS flit aged");
    $display("packets %0d, reservations %0d, aged %0d", n_done, n_lock, n_age);
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
