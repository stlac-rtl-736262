// stlac_cache: last-level cache slice whose ways are shared between a victim
// cache and a prefetch buffer.
//
// Every way of every set carries a role bit. Victim-role ways receive blocks
// evicted from the private L1 above (temporal locality), prefetch-role ways
// receive blocks fetched speculatively ahead of a miss (spatial locality).
// A demand lookup searches all ways; a hit reports which part it hit so that
// the partition controller can profile both parts. Replacement is true LRU
// (an age per way, 0 = most recent), restricted to the ways of the part that
// is being filled; an invalid way of that part is used first. A block that is
// already present is updated in place instead of being duplicated (a prefetch
// never overwrites a present block, whose copy may be newer).
//
// Repartitioning works at way granularity: a move request walks all sets,
// one set per cycle, and in each set hands the least recently used way of
// the shrinking part to the other part. The block in that way stays valid.
// Requests are not accepted during the walk.
//
// Interface and timing:
//   req_*   : valid/ready; op LOOKUP, VICTIM (with dirty flag) or PREF.
//   resp_*  : one cycle after a LOOKUP is accepted: hit, part and data.
//   evict_* : one cycle after an insert displaced a dirty block: its address
//             and data. While a displaced block waits for evict_ready, no new
//             request is accepted.
//   mv_*    : a one-cycle mv_valid with mv_src (the part that gives a way
//             away) starts a walk: one start cycle, then one cycle per set;
//             mv_done pulses when it ends.
// Size defaults (128 KB, 8 ways, 64-byte blocks, so 256 sets) follow the
// evaluated configuration; the role bits per set, the in-place walk and
// keeping the moved block are choices of this design.
module stlac_cache
  import stlac_pkg::*;
#(
  parameter int SETS = 256,
  parameter int WAYS = 8
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       req_valid,
  output logic       req_ready,
  input  cop_t       req_op,
  input  blk_addr_t  req_addr,
  input  block_t     req_data,
  input  logic       req_dirty,
  output logic       resp_valid,
  output logic       resp_hit,
  output part_t      resp_part,
  output block_t     resp_data,
  output logic       evict_valid,
  input  logic       evict_ready,
  output blk_addr_t  evict_addr,
  output block_t     evict_data,
  input  logic       mv_valid,
  input  part_t      mv_src,
  output logic       mv_done,
  output logic       ev_access,
  output logic       ev_hit_v,
  output logic       ev_hit_p
);
  localparam int IW = $clog2(SETS);
  localparam int WW = $clog2(WAYS);
  localparam int TW = BLK_ADDR_W - IW;

  logic [WAYS-1:0][TW-1:0] tags  [SETS];
  logic [WAYS-1:0]         vld   [SETS];
  logic [WAYS-1:0]         drt   [SETS];
  logic [WAYS-1:0]         role  [SETS];   // 1 = prefetch part
  logic [WAYS-1:0][WW-1:0] age   [SETS];
  block_t                  dmem  [SETS*WAYS];

  // ------------------------------------------------------------ request decode
  logic [IW-1:0] idx;
  logic [TW-1:0] tag;
  assign idx = req_addr[IW-1:0];
  assign tag = req_addr[BLK_ADDR_W-1:IW];

  logic          walking;
  logic [IW-1:0] widx;
  part_t         wsrc;

  assign req_ready = !walking && !mv_valid && !(evict_valid && !evict_ready);
  wire accept = req_valid && req_ready;

  logic          hit;
  logic [WW-1:0] hway;
  logic          free_ok;
  logic [WW-1:0] fway, lway, tway;
  part_t         ipart;

  always_comb begin
    hit  = 1'b0;
    hway = '0;
    for (int w = WAYS - 1; w >= 0; w--)
      if (vld[idx][w] && tags[idx][w] == tag) begin
        hit  = 1'b1;
        hway = WW'(w);
      end
    ipart   = (req_op == COP_PREF) ? PART_PREF : PART_VICTIM;
    free_ok = 1'b0;
    fway    = '0;
    for (int w = WAYS - 1; w >= 0; w--)
      if (!vld[idx][w] && role[idx][w] == ipart) begin
        free_ok = 1'b1;
        fway    = WW'(w);
      end
    lway = '0;
    begin
      logic          found;
      logic [WW-1:0] best;
      found = 1'b0;
      best  = '0;
      for (int w = 0; w < WAYS; w++)
        if (role[idx][w] == ipart && (!found || age[idx][w] > best)) begin
          found = 1'b1;
          best  = age[idx][w];
          lway  = WW'(w);
        end
    end
    tway = hit ? hway : (free_ok ? fway : lway);
  end

  // LRU way of the shrinking part in the set being walked
  logic [WW-1:0] mway;
  always_comb begin
    logic          found;
    logic [WW-1:0] best;
    found = 1'b0;
    best  = '0;
    mway  = '0;
    for (int w = 0; w < WAYS; w++)
      if (role[widx][w] == wsrc && (!found || age[widx][w] > best)) begin
        found = 1'b1;
        best  = age[widx][w];
        mway  = WW'(w);
      end
  end

  function automatic logic [WAYS-1:0][WW-1:0] touch(input logic [WAYS-1:0][WW-1:0] a,
                                                    input logic [WW-1:0] w);
    touch = a;
    for (int i = 0; i < WAYS; i++)
      if (a[i] < a[w]) touch[i] = a[i] + 1'b1;
    touch[w] = '0;
  endfunction

  wire is_insert = (req_op == COP_VICTIM) || (req_op == COP_PREF);

  // ------------------------------------------------------------ state update
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < SETS; s++) begin
        tags[s] <= '0;
        vld[s]  <= '0;
        drt[s]  <= '0;
        for (int w = 0; w < WAYS; w++) begin
          role[s][w] <= (w >= WAYS / 2);       // equal split at start
          age[s][w]  <= WW'(w);
        end
      end
      walking     <= 1'b0;
      widx        <= '0;
      wsrc        <= PART_VICTIM;
      mv_done     <= 1'b0;
      resp_valid  <= 1'b0;
      resp_hit    <= 1'b0;
      resp_part   <= PART_VICTIM;
      evict_valid <= 1'b0;
      evict_addr  <= '0;
      ev_access   <= 1'b0;
      ev_hit_v    <= 1'b0;
      ev_hit_p    <= 1'b0;
    end else begin
      mv_done    <= 1'b0;
      resp_valid <= 1'b0;
      ev_access  <= 1'b0;
      ev_hit_v   <= 1'b0;
      ev_hit_p   <= 1'b0;
      if (evict_valid && evict_ready) evict_valid <= 1'b0;

      if (walking) begin
        role[widx][mway] <= ~wsrc;
        widx             <= widx + 1'b1;
        if (widx == IW'(SETS - 1)) begin
          walking <= 1'b0;
          mv_done <= 1'b1;
        end
      end else if (mv_valid) begin
        walking <= 1'b1;
        widx    <= '0;
        wsrc    <= mv_src;
      end else if (accept) begin
        if (req_op == COP_LOOKUP) begin
          resp_valid <= 1'b1;
          resp_hit   <= hit;
          resp_part  <= part_t'(role[idx][hway]);
          ev_access  <= 1'b1;
          ev_hit_v   <= hit && role[idx][hway] == PART_VICTIM;
          ev_hit_p   <= hit && role[idx][hway] == PART_PREF;
          if (hit) age[idx] <= touch(age[idx], hway);
        end else if (is_insert) begin
          if (!(hit && req_op == COP_PREF)) begin
            tags[idx][tway] <= tag;
            vld[idx][tway]  <= 1'b1;
            drt[idx][tway]  <= hit ? (drt[idx][tway] | req_dirty) : req_dirty;
            age[idx]        <= touch(age[idx], tway);
            if (!hit && vld[idx][tway] && drt[idx][tway]) begin
              evict_valid <= 1'b1;
              evict_addr  <= {tags[idx][tway], idx};
            end
          end
        end
      end
    end
  end

  // ------------------------------------------------------------ data array
  logic [IW+WW-1:0] raddr;
  always_comb raddr = accept && is_insert ? {idx, tway} : {idx, hway};

  always_ff @(posedge clk) begin
    if (accept && (req_op == COP_LOOKUP || is_insert)) begin
      if (req_op == COP_LOOKUP) resp_data  <= dmem[raddr];
      else                      evict_data <= dmem[raddr];
    end
    if (accept && is_insert && !(hit && req_op == COP_PREF))
      dmem[{idx, tway}] <= req_data;
  end

  assert property (@(posedge clk) disable iff (!rst_n) walking |-> !accept)
    else $error("stlac_cache: request accepted during a repartition walk");
  assert property (@(posedge clk) disable iff (!rst_n) evict_valid && !evict_ready |=> evict_valid)
    else $error("stlac_cache: evicted block dropped");
endmodule
