// stlac_node_tb: one tile (node at (0,0)) whose network port is looped back
// to itself by a credit-respecting model of the router's local port, with
// the behavioural memory behind its home engine. All addresses used live in
// pages whose home is this tile. Checked:
//   * a miss returns the memory block after the memory latency and sends a
//     burst prefetch of the next 4 blocks; those then hit in the prefetch
//     part within 2 cycles;
//   * an L1 eviction hits afterwards in the victim part with its data;
//   * a dirty block displaced from the victim part is written back and a
//     later miss reads the written data from memory;
//   * prefetches are clipped at the end of a 4 KB page;
//   * with a streaming access pattern the partition controller moves ways
//     from the victim part to the prefetch part; with a reuse pattern back.
module stlac_node_tb;
  import stlac_pkg::*;
  localparam int PERIOD = 3000, MEM_LAT = 150;

  // rst_n falls just after time 0 so that the asynchronous reset acts before
  // the first clock edge
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  logic core_req_valid, core_req_ready, core_req_evict, core_req_dirty, core_resp_valid;
  blk_addr_t core_req_addr, core_resp_addr, mem_req_addr;
  block_t core_req_data, core_resp_data, mem_req_wdata, mem_resp_data;
  src_t core_resp_src;
  logic mem_req_valid, mem_req_ready, mem_req_we, mem_resp_valid;
  logic inj_valid, ej_valid;
  flit_t inj_flit, ej_flit;
  logic [NVC-1:0] inj_crd, ej_crd;
  logic [3:0] cap_v, cap_p;
  logic ev_hit_v, ev_hit_p, ev_miss, ev_pf_req, ev_wb, ev_shrink_v, ev_expand_v;
  int checks = 0, failures = 0;

  stlac_node #(.X(0), .Y(0), .PERIOD(PERIOD)) dut (.*);
  mem_model #(.LAT(MEM_LAT)) u_mem (
    .clk, .req_valid(mem_req_valid), .req_ready(mem_req_ready), .req_we(mem_req_we),
    .req_addr(mem_req_addr), .req_wdata(mem_req_wdata),
    .resp_valid(mem_resp_valid), .resp_data(mem_resp_data)
  );
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  // ------------------------------------------------ loopback of the local port
  flit_t lq [NVC][$];
  int    ecrd [NVC];
  always @(posedge clk) begin
    if (!rst_n) begin
      inj_crd  <= '0;
      ej_valid <= 1'b0;
      for (int v = 0; v < NVC; v++) begin ecrd[v] = VC_DEPTH; lq[v].delete(); end
    end else begin
      for (int v = 0; v < NVC; v++) ecrd[v] += int'(ej_crd[v]);
      if (inj_valid) begin
        lq[inj_flit.vc].push_back(inj_flit);
        check(lq[inj_flit.vc].size() <= VC_DEPTH, "injection beyond credits");
      end
      inj_crd  <= '0;
      ej_valid <= 1'b0;
      for (int v = NVC - 1; v >= 0; v--)
        if (!ej_valid && lq[v].size() > 0 && ecrd[v] > 0 && $urandom_range(0, 3) != 0) begin
          ej_valid   <= 1'b1;
          ej_flit    <= lq[v].pop_front();
          ecrd[v]--;
          inj_crd[v] <= 1'b1;
          break;
        end
    end
  end

  // ------------------------------------------------ statistics
  int n_hv = 0, n_hp = 0, n_miss = 0, n_pf = 0, n_wb = 0, n_shr = 0, n_exp = 0;
  always @(posedge clk) begin
    n_hv += int'(ev_hit_v); n_hp += int'(ev_hit_p); n_miss += int'(ev_miss);
    n_pf += int'(ev_pf_req); n_wb += int'(ev_wb); n_shr += int'(ev_shrink_v);
    n_exp += int'(ev_expand_v);
  end

  // ------------------------------------------------ core-side tasks
  block_t golden [blk_addr_t];
  function automatic block_t expect_of(input blk_addr_t a);
    return golden.exists(a) ? golden[a] : u_mem.init_block(a);
  endfunction

  // Inputs change at the falling edge; the request is taken at the next
  // rising edge where core_req_ready is high.
  task automatic rd(input blk_addr_t a, output src_t src, output int lat);
    int c = 0;
    @(negedge clk);
    core_req_valid = 1; core_req_evict = 0; core_req_addr = a; core_req_dirty = 0;
    #1;
    while (!core_req_ready) begin @(negedge clk); #1; end
    @(posedge clk);
    #1 core_req_valid = 0;
    while (!core_resp_valid && c < 5000) begin @(posedge clk); #1; c++; end
    lat = c;
    src = core_resp_src;
    check(core_resp_valid && core_resp_addr == a, $sformatf("read %h answered", a));
    check(core_resp_data == expect_of(a), $sformatf("read %h data", a));
  endtask

  task automatic ev(input blk_addr_t a, input block_t d);
    @(negedge clk);
    core_req_valid = 1; core_req_evict = 1; core_req_addr = a; core_req_data = d;
    core_req_dirty = 1;
    #1;
    while (!core_req_ready) begin @(negedge clk); #1; end
    @(posedge clk);
    #1 core_req_valid = 0;
    golden[a] = d;
  endtask

  function automatic block_t rnd_block();
    block_t b;
    for (int i = 0; i < BLOCK_BITS / 32; i++) b[i*32 +: 32] = $urandom;
    return b;
  endfunction

  // home of a block is bits [9:6]; keep them 0 so this tile is the home
  function automatic blk_addr_t A(input int page, input int off);
    return blk_addr_t'((page << 10) | off);
  endfunction

  initial begin
    src_t s;
    int   lat;
    core_req_valid = 0; core_req_evict = 0; core_req_addr = '0; core_req_data = '0;
    core_req_dirty = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    @(posedge clk);

    // 1. miss, then the four prefetched blocks hit
    rd(A(1, 8), s, lat);
    check(s == SRC_MEM && lat > MEM_LAT, $sformatf("miss from memory, latency %0d", lat));
    repeat (400) @(posedge clk);
    for (int k = 1; k <= PREF_LEN; k++) begin
      rd(A(1, 8 + k), s, lat);
      check(s == SRC_PREF && lat <= 2, $sformatf("prefetched block %0d: src %0d lat %0d", k, s, lat));
    end
    rd(A(1, 8 + PREF_LEN + 1), s, lat);
    check(s == SRC_MEM, "block past the prefetch is a miss");

    // 2. victim part
    ev(A(2, 0), rnd_block());
    rd(A(2, 0), s, lat);
    check(s == SRC_VICTIM && lat <= 2, "evicted block hits in victim part");

    // 3. dirty write-back: 5 blocks of one set into a 4-way victim part
    for (int k = 0; k < 5; k++) ev(A(8 + k, 3), rnd_block());
    repeat (600) @(posedge clk);
    check(n_wb == 1, $sformatf("write-backs %0d", n_wb));
    rd(A(8, 3), s, lat);   // least recently used one went to memory
    check(s == SRC_MEM, "displaced block is read from memory");

    // 4. prefetch clipped at the page end
    begin
      automatic int pf0 = n_pf;
      rd(A(3, 63), s, lat);
      repeat (300) @(posedge clk);
      check(n_pf == pf0, "no prefetch from the last block of a page");
      rd(A(3, 61), s, lat);
      repeat (300) @(posedge clk);
      rd(A(3, 62), s, lat);
      check(s == SRC_PREF, "clipped prefetch brought the last block");
    end

    // 5. streaming: every miss prefetches the next blocks, prefetch part wins
    for (int i = 0; i < 150; i++) begin
      rd(A(4 + i / 60, i % 60), s, lat);
      repeat (20) @(posedge clk);
    end
    repeat (PERIOD) @(posedge clk);
    check(n_shr > 0 && cap_v < 4, $sformatf("stream shrank the victim part: cap_v=%0d", cap_v));

    // 6. reuse of evicted blocks: victim part wins it back
    for (int r = 0; r < 6; r++) begin
      for (int i = 0; i < 12; i++) begin
        if (r == 0) ev(A(20, i), rnd_block());
        rd(A(20, i), s, lat);
        repeat (60) @(posedge clk);
      end
    end
    repeat (PERIOD) @(posedge clk);
    check(n_exp > 0, "reuse expanded the victim part");

    $display("hits victim %0d prefetch %0d, misses %0d, prefetches %0d, write-backs %0d, moves %0d/%0d, cap_v %0d",
             n_hv, n_hp, n_miss, n_pf, n_wb, n_shr, n_exp, cap_v);
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
