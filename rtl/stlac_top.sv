// stlac_top: the STLAC tiled system, 16 tiles on a 4x4 burst-support mesh.
//
// Every tile is a stlac_node (last-level cache slice split into a victim
// part and a prefetch part, partition controller, miss/prefetch engine,
// home engine, network interface) attached to port 0 of its router in
// noc_mesh. The cores with their private L1 caches and the main memory are
// outside this design: each tile brings out its core-side port (demand reads
// and L1 evictions in, blocks out) and the memory port of its home engine.
// A block's home tile is chosen by its 4 KB page (see stlac_pkg::home_of),
// so the memory behind tile n holds the pages that map to n.
//
// Per tile the partition (cap_v/cap_p ways) and event pulses are brought out
// for statistics: slice hits per part, misses, prefetch requests,
// write-backs, partition moves, and from the routers burst reservations,
// PS-flit ageing and switch-allocation stalls.
//
// Defaults follow the evaluated system: 4x4 mesh, 128 KB 8-way slices with
// 64-byte blocks, prefetch length 4, a 10% CPA threshold, repartitioning
// every 1M cycles.
module stlac_top
  import stlac_pkg::*;
#(
  parameter int SETS    = 256,
  parameter int WAYS    = 8,
  parameter int PERIOD  = 1_000_000,
  parameter int THR_PCT = 10,
  parameter int PREF_N  = PREF_LEN,
  parameter int AGE_TH  = 16
) (
  input  logic                            clk,
  input  logic                            rst_n,
  // core / L1 side of every tile
  input  logic      [NODES-1:0]           core_req_valid,
  output logic      [NODES-1:0]           core_req_ready,
  input  logic      [NODES-1:0]           core_req_evict,
  input  blk_addr_t                       core_req_addr  [NODES],
  input  block_t                          core_req_data  [NODES],
  input  logic      [NODES-1:0]           core_req_dirty,
  output logic      [NODES-1:0]           core_resp_valid,
  output blk_addr_t                       core_resp_addr [NODES],
  output block_t                          core_resp_data [NODES],
  output src_t                            core_resp_src  [NODES],
  // memory port of every tile's home engine
  output logic      [NODES-1:0]           mem_req_valid,
  input  logic      [NODES-1:0]           mem_req_ready,
  output logic      [NODES-1:0]           mem_req_we,
  output blk_addr_t                       mem_req_addr   [NODES],
  output block_t                          mem_req_wdata  [NODES],
  input  logic      [NODES-1:0]           mem_resp_valid,
  input  block_t                          mem_resp_data  [NODES],
  // statistics
  output logic      [NODES-1:0][$clog2(WAYS):0] cap_v,
  output logic      [NODES-1:0][$clog2(WAYS):0] cap_p,
  output logic      [NODES-1:0]           ev_hit_v,
  output logic      [NODES-1:0]           ev_hit_p,
  output logic      [NODES-1:0]           ev_miss,
  output logic      [NODES-1:0]           ev_pf_req,
  output logic      [NODES-1:0]           ev_wb,
  output logic      [NODES-1:0]           ev_shrink_v,
  output logic      [NODES-1:0]           ev_expand_v,
  output logic      [NODES-1:0]           ev_lock,
  output logic      [NODES-1:0]           ev_age,
  output logic      [NODES-1:0]           ev_stall
);
  logic  [NODES-1:0]          inj_valid, ej_valid;
  flit_t                      inj_flit [NODES];
  flit_t                      ej_flit  [NODES];
  logic  [NODES-1:0][NVC-1:0] inj_crd, ej_crd;

  noc_mesh #(.AGE_TH(AGE_TH)) u_noc (
    .clk, .rst_n,
    .inj_valid, .inj_flit, .inj_crd,
    .ej_valid, .ej_flit, .ej_crd,
    .ev_lock, .ev_age, .ev_stall
  );

  for (genvar n = 0; n < NODES; n++) begin : g_tile
    stlac_node #(
      .X(n % MESH_X), .Y(n / MESH_X), .SETS(SETS), .WAYS(WAYS),
      .PERIOD(PERIOD), .THR_PCT(THR_PCT), .PREF_N(PREF_N)
    ) u_node (
      .clk, .rst_n,
      .core_req_valid (core_req_valid[n]), .core_req_ready(core_req_ready[n]),
      .core_req_evict (core_req_evict[n]), .core_req_addr (core_req_addr[n]),
      .core_req_data  (core_req_data[n]),  .core_req_dirty(core_req_dirty[n]),
      .core_resp_valid(core_resp_valid[n]), .core_resp_addr(core_resp_addr[n]),
      .core_resp_data (core_resp_data[n]),  .core_resp_src (core_resp_src[n]),
      .mem_req_valid  (mem_req_valid[n]),  .mem_req_ready (mem_req_ready[n]),
      .mem_req_we     (mem_req_we[n]),     .mem_req_addr  (mem_req_addr[n]),
      .mem_req_wdata  (mem_req_wdata[n]),
      .mem_resp_valid (mem_resp_valid[n]), .mem_resp_data (mem_resp_data[n]),
      .inj_valid      (inj_valid[n]), .inj_flit(inj_flit[n]), .inj_crd(inj_crd[n]),
      .ej_valid       (ej_valid[n]),  .ej_flit (ej_flit[n]),  .ej_crd (ej_crd[n]),
      .cap_v          (cap_v[n]), .cap_p(cap_p[n]),
      .ev_hit_v       (ev_hit_v[n]), .ev_hit_p(ev_hit_p[n]), .ev_miss(ev_miss[n]),
      .ev_pf_req      (ev_pf_req[n]), .ev_wb(ev_wb[n]),
      .ev_shrink_v    (ev_shrink_v[n]), .ev_expand_v(ev_expand_v[n])
    );
  end
endmodule
