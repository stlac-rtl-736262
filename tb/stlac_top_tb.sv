// stlac_top_tb: end-to-end test of the 16-tile system. Every tile gets a
// behavioural memory behind its home engine and a core driver that runs,
// on its own address region spread over all home tiles:
//   A. a stream of demand reads through consecutive blocks (misses that
//      trigger burst prefetches, then prefetch-part hits);
//   B. L1 evictions of dirty blocks that are read back repeatedly
//      (victim-part hits);
//   C. ten dirty evictions into one set, which forces write-backs, and
//      re-reads that must return the written data from remote memory.
// Every returned block is compared with a reference copy kept here. The
// partition period is shortened so that the partition controller acts.
// Every mechanism is counted and must occur: victim and prefetch hits,
// misses, prefetch requests, write-backs, victim shrink and expand, burst
// switch reservations, PS ageing and switch-allocation stalls.
module stlac_top_tb;
  import stlac_pkg::*;
  localparam int PERIOD = 4000, MEM_LAT = 150;

  // rst_n falls just after time 0 so that the asynchronous reset acts before
  // the first clock edge
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  logic      [NODES-1:0] core_req_valid, core_req_ready, core_req_evict, core_req_dirty;
  blk_addr_t             core_req_addr  [NODES];
  block_t                core_req_data  [NODES];
  logic      [NODES-1:0] core_resp_valid;
  blk_addr_t             core_resp_addr [NODES];
  block_t                core_resp_data [NODES];
  src_t                  core_resp_src  [NODES];
  logic      [NODES-1:0] mem_req_valid, mem_req_ready, mem_req_we, mem_resp_valid;
  blk_addr_t             mem_req_addr   [NODES];
  block_t                mem_req_wdata  [NODES];
  block_t                mem_resp_data  [NODES];
  logic      [NODES-1:0][3:0] cap_v, cap_p;
  logic      [NODES-1:0] ev_hit_v, ev_hit_p, ev_miss, ev_pf_req, ev_wb, ev_shrink_v,
                         ev_expand_v, ev_lock, ev_age, ev_stall;
  int checks = 0, failures = 0;

  stlac_top #(.PERIOD(PERIOD)) dut (.*);

  for (genvar n = 0; n < NODES; n++) begin : g_mem
    mem_model #(.LAT(MEM_LAT)) u_mem (
      .clk, .req_valid(mem_req_valid[n]), .req_ready(mem_req_ready[n]), .req_we(mem_req_we[n]),
      .req_addr(mem_req_addr[n]), .req_wdata(mem_req_wdata[n]),
      .resp_valid(mem_resp_valid[n]), .resp_data(mem_resp_data[n])
    );
  end
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  // same pattern as mem_model::init_block
  function automatic block_t init_block(input blk_addr_t a);
    block_t b;
    for (int i = 0; i < BLOCK_BITS / 32; i++) b[i*32 +: 32] = {a[15:0], 16'(i)} ^ 32'h5a3c_0000;
    return b;
  endfunction

  block_t golden [blk_addr_t];
  function automatic block_t expect_of(input blk_addr_t a);
    return golden.exists(a) ? golden[a] : init_block(a);
  endfunction

  function automatic block_t rnd_block();
    block_t b;
    for (int i = 0; i < BLOCK_BITS / 32; i++) b[i*32 +: 32] = $urandom;
    return b;
  endfunction

  int n_src [3];
  int n_finished = 0;

  // address of tile n: region bits [22:17] = n, home bits [9:6], offset [5:0]
  function automatic blk_addr_t A(input int n, input int hi, input int home, input int off);
    return blk_addr_t'((n << 17) | (hi << 10) | (home << 6) | off);
  endfunction

  // One core driver per tile. Inputs change at the falling edge; a request
  // is taken at the next rising edge where core_req_ready is high.
  for (genvar n = 0; n < NODES; n++) begin : g_core
    logic      v, e, dty;
    blk_addr_t a;
    block_t    d;
    assign core_req_valid[n] = v;
    assign core_req_evict[n] = e;
    assign core_req_dirty[n] = dty;
    assign core_req_addr[n]  = a;
    assign core_req_data[n]  = d;

    task automatic rd(input blk_addr_t ad);
      int c = 0;
      @(negedge clk);
      v = 1; e = 0; a = ad; dty = 0;
      #1;
    while (!core_req_ready[n]) begin @(negedge clk); #1; end
      @(posedge clk);
      #1 v = 0;
      while (!core_resp_valid[n] && c < 20000) begin @(posedge clk); #1; c++; end
      check(core_resp_valid[n] && core_resp_addr[n] == ad, $sformatf("tile %0d read %h answered", n, ad));
      check(core_resp_data[n] == expect_of(ad), $sformatf("tile %0d read %h data", n, ad));
      n_src[core_resp_src[n]]++;
    endtask

    task automatic ev(input blk_addr_t ad);
      block_t dd;
      dd = rnd_block();
      @(negedge clk);
      v = 1; e = 1; a = ad; d = dd; dty = 1;
      #1;
    while (!core_req_ready[n]) begin @(negedge clk); #1; end
      @(posedge clk);
      #1 v = 0;
      golden[ad] = dd;
    endtask

    initial begin
      int h;
      v = 0; e = 0; dty = 0; a = '0; d = '0;
      h = (n * 5 + 3) % NODES;             // a remote home for the stream
      @(posedge rst_n);
      // A. stream
      for (int i = 0; i < 60; i++) begin
        rd(A(n, 1, h, i));
        repeat ($urandom_range(5, 30)) @(posedge clk);
      end
      // B. reuse of evicted blocks
      for (int i = 0; i < 12; i++) ev(A(n, 2, (h + 1) % NODES, i));
      for (int r = 0; r < 8; r++)
        for (int i = 0; i < 12; i++) begin
          rd(A(n, 2, (h + 1) % NODES, i));
          repeat ($urandom_range(20, 60)) @(posedge clk);
        end
      // C. write-backs: ten dirty blocks into the same set, different homes
      for (int k = 0; k < 10; k++) ev(A(n, 4 + k, ((k & 3) << 2), 5));
      repeat (400) @(posedge clk);
      for (int k = 0; k < 10; k++) rd(A(n, 4 + k, ((k & 3) << 2), 5));
      n_finished++;
    end
  end

  int c_hv = 0, c_hp = 0, c_miss = 0, c_pf = 0, c_wb = 0, c_shr = 0, c_exp = 0;
  int c_lock = 0, c_age = 0, c_stall = 0;
  always @(posedge clk) if (rst_n) begin
    c_hv += $countones(ev_hit_v);   c_hp += $countones(ev_hit_p);
    c_miss += $countones(ev_miss);  c_pf += $countones(ev_pf_req);
    c_wb += $countones(ev_wb);      c_shr += $countones(ev_shrink_v);
    c_exp += $countones(ev_expand_v);
    c_lock += $countones(ev_lock);  c_age += $countones(ev_age);
    c_stall += $countones(ev_stall);
  end

  initial begin
    n_src = '{0, 0, 0};
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    wait (n_finished == NODES);
    repeat (2 * PERIOD) @(posedge clk);
    check(c_hv > 0,    "victim-part hits");
    check(c_hp > 0,    "prefetch-part hits");
    check(c_miss > 0,  "misses");
    check(c_pf > 0,    "burst prefetch requests");
    check(c_wb > 0,    "write-backs");
    check(c_shr > 0,   "victim part shrunk");
    check(c_exp > 0,   "victim part expanded");
    check(c_lock > 0,  "burst switch reservations");
    check(c_age > 0,   "PS flits aged");
    check(c_stall > 0, "switch allocation stalls");
    for (int n = 0; n < NODES; n++) check(cap_v[n] + cap_p[n] == 8, "partition covers 8 ways");
    $display("replies: victim %0d prefetch %0d memory %0d", n_src[0], n_src[1], n_src[2]);
    $display("hits v/p %0d/%0d misses %0d prefetches %0d wbs %0d shrink %0d expand %0d lock %0d age %0d stall %0d",
             c_hv, c_hp, c_miss, c_pf, c_wb, c_shr, c_exp, c_lock, c_age, c_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
