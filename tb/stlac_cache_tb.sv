// stlac_cache_tb: random lookups, victim inserts, prefetch fills and
// repartition walks on a small slice, checked against a reference model
// kept here. The reference keeps a last-use time per way (LRU = oldest
// time) instead of the age permutation of the RTL. Checked: hit/miss, the
// part that hit, the data, every displaced dirty block (address and data),
// the walk length (SETS cycles) and the per-part way count after each walk.
module stlac_cache_tb;
  import stlac_pkg::*;
  localparam int SETS = 4, WAYS = 8, IW = 2;

  // rst_n falls just after time 0 so that the asynchronous reset acts before
  // the first clock edge
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  logic req_valid, req_ready, req_dirty, resp_valid, resp_hit;
  cop_t req_op;
  blk_addr_t req_addr, evict_addr;
  block_t req_data, resp_data, evict_data;
  part_t resp_part, mv_src;
  logic evict_valid, evict_ready, mv_valid, mv_done, ev_access, ev_hit_v, ev_hit_p;
  int checks = 0, failures = 0;

  stlac_cache #(.SETS(SETS), .WAYS(WAYS)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  // reference model
  logic      m_v   [SETS][WAYS];
  logic      m_d   [SETS][WAYS];
  logic      m_r   [SETS][WAYS];
  blk_addr_t m_a   [SETS][WAYS];
  block_t    m_dat [SETS][WAYS];
  longint    m_t   [SETS][WAYS];
  longint    now = 0;
  int        n_hit_v = 0, n_hit_p = 0, n_evict = 0, n_walk = 0;

  function automatic block_t rnd_block();
    block_t b;
    for (int i = 0; i < BLOCK_BITS / 32; i++) b[i*32 +: 32] = $urandom;
    return b;
  endfunction

  function automatic int lru_of(input int s, input logic part);
    int best = -1;
    for (int w = 0; w < WAYS; w++)
      if (m_r[s][w] == part && (best < 0 || m_t[s][w] < m_t[s][best])) best = w;
    return best;
  endfunction

  task automatic do_req(input cop_t op, input blk_addr_t a, input logic dirty);
    int s, hw, tw;
    block_t d;
    bit exp_ev;
    blk_addr_t ev_a;
    block_t ev_d;
    s  = int'(a[IW-1:0]);
    d  = rnd_block();
    hw = -1;
    for (int w = 0; w < WAYS; w++) if (m_v[s][w] && m_a[s][w] == a) hw = w;
    req_valid <= 1; req_op <= op; req_addr <= a; req_data <= d; req_dirty <= dirty;
    @(posedge clk);
    while (!req_ready) @(posedge clk);
    req_valid <= 0;
    now++;
    exp_ev = 0;
    if (op == COP_LOOKUP) begin
      if (hw >= 0) begin m_t[s][hw] = now; if (m_r[s][hw]) n_hit_p++; else n_hit_v++; end
    end else if (!(hw >= 0 && op == COP_PREF)) begin
      logic part;
      part = (op == COP_PREF);
      tw = hw;
      if (tw < 0)
        for (int w = WAYS - 1; w >= 0; w--) if (!m_v[s][w] && m_r[s][w] == part) tw = w;
      if (tw < 0) begin
        tw = lru_of(s, part);
        if (m_d[s][tw]) begin exp_ev = 1; ev_a = m_a[s][tw]; ev_d = m_dat[s][tw]; end
      end
      m_d[s][tw]   = (hw >= 0) ? (m_d[s][tw] | dirty) : dirty;
      m_v[s][tw]   = 1;
      m_a[s][tw]   = a;
      m_dat[s][tw] = d;
      m_t[s][tw]   = now;
    end
    #1;
    if (op == COP_LOOKUP) begin
      check(resp_valid, "lookup reply");
      check(resp_hit == (hw >= 0), $sformatf("hit flag addr %h", a));
      if (hw >= 0) begin
        check(resp_part == part_t'(m_r[s][hw]), "hit part");
        check(resp_data == m_dat[s][hw], "hit data");
      end
    end else begin
      check(evict_valid == exp_ev, $sformatf("eviction flag addr %h", a));
      if (exp_ev) begin
        n_evict++;
        check(evict_addr == ev_a && evict_data == ev_d, "evicted block");
        // hold it for a few cycles: no request may be accepted meanwhile
        evict_ready <= 0;
        req_valid <= 1; req_op <= COP_LOOKUP;
        repeat (3) begin @(posedge clk); #1; check(!req_ready, "stalled behind eviction"); end
        req_valid <= 0;
        evict_ready <= 1;
        @(posedge clk);
        evict_ready <= ($urandom_range(0, 1) == 1);
      end
    end
  endtask

  task automatic do_move(input part_t src);
    int cyc = 0;
    mv_valid <= 1; mv_src <= src;
    @(posedge clk);
    mv_valid <= 0;
    for (int s = 0; s < SETS; s++) begin
      int w;
      w = lru_of(s, src);
      m_r[s][w] = ~src;
    end
    do begin @(posedge clk); cyc++; end while (!mv_done && cyc < 100);
    check(cyc == SETS + 1, $sformatf("walk took %0d cycles", cyc));
    n_walk++;
  endtask

  initial begin
    req_valid = 0; mv_valid = 0; evict_ready = 1; req_op = COP_LOOKUP;
    req_addr = '0; req_data = '0; req_dirty = 0; mv_src = PART_VICTIM;
    for (int s = 0; s < SETS; s++)
      for (int w = 0; w < WAYS; w++) begin
        m_v[s][w] = 0; m_d[s][w] = 0; m_r[s][w] = (w >= WAYS / 2);
        m_t[s][w] = -longint'(w); m_a[s][w] = '0; m_dat[s][w] = '0;
      end
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    @(posedge clk);
    for (int i = 0; i < 4000; i++) begin
      blk_addr_t a;
      int k;
      a = blk_addr_t'($urandom_range(0, 12 * SETS - 1));
      k = $urandom_range(0, 99);
      if (k < 40)      do_req(COP_LOOKUP, a, 0);
      else if (k < 70) do_req(COP_VICTIM, a, $urandom_range(0, 1) == 1);
      else if (k < 99) do_req(COP_PREF, a, 0);
      else begin
        // keep at least one way in each part
        automatic int nv = 0;
        for (int w = 0; w < WAYS; w++) nv += (m_r[0][w] == 0);
        if (nv > 1 && (nv == WAYS - 1 || $urandom_range(0, 1) == 1)) do_move(PART_VICTIM);
        else if (nv < WAYS - 1) do_move(PART_PREF);
      end
    end
    check(n_hit_v > 50 && n_hit_p > 50 && n_evict > 20 && n_walk > 5,
          $sformatf("coverage hv=%0d hp=%0d ev=%0d walks=%0d", n_hit_v, n_hit_p, n_evict, n_walk));
    $display("victim hits %0d, prefetch hits %0d, dirty evictions %0d, walks %0d",
             n_hit_v, n_hit_p, n_evict, n_walk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
