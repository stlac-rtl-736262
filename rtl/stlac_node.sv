// stlac_node: one tile of the STLAC system without its router: the
// last-level cache slice with its partition controller, the miss and
// prefetch engine on the core side, the home engine on the memory side and
// the network interface that packs all of them into flits.
//
// Core side (requester). A demand read looks up the slice. On a hit the
// block is returned at once, tagged with the part (victim or prefetch) that
// held it. On a miss a one-flit READ request goes to the block's home tile
// and, if no prefetch is outstanding, a one-flit PREF request asks the same
// home for the next PREF_N blocks (clipped at the page end, since a page has
// one home). The home returns the demand block in a normal packet-switched
// DATA packet (head + 4 flits) and the prefetched blocks together in one
// BURST packet (head + 4*len flits), which the routers forward without
// breaking it up. Prefetched blocks are written into the prefetch part of
// the slice. A block the core evicts from its L1 is written into the victim
// part; a dirty block the slice displaces goes to its home in a WB packet.
//
// Home side. A READ/PREF request makes the home read the blocks from its
// memory port (reads are pipelined, replies come in order), gather them and
// then send the whole reply flit after flit, so a burst leaves without gaps.
// A WB request is written to memory.
//
// Network interface: requests and write-backs use VC0, replies VC1, each
// with its own ejection buffer and credit counter, so replies are always
// drained and can never be blocked by requests. Replies get the injection
// port first.
//
// Timing: the core interface is blocking (one read outstanding); core_resp
// is a one-cycle pulse that must be taken. The memory interface is
// valid/ready for requests; mem_resp_valid returns read data in order.
//
// Following the published design: the victim/prefetch use of the slice, the
// CPA, the 4-block prefetch length and the burst reply. Choices of this
// design: message set and header, one VC per message class, page-interleaved
// home tiles, the blocking core interface and write-back of dirty blocks.
module stlac_node
  import stlac_pkg::*;
#(
  parameter int X       = 0,
  parameter int Y       = 0,
  parameter int SETS    = 256,
  parameter int WAYS    = 8,
  parameter int PERIOD  = 1_000_000,
  parameter int THR_PCT = 10,
  parameter int PREF_N  = PREF_LEN
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // core / L1 side
  input  logic                  core_req_valid,
  output logic                  core_req_ready,
  input  logic                  core_req_evict,   // 0 = demand read, 1 = L1 eviction
  input  blk_addr_t             core_req_addr,
  input  block_t                core_req_data,
  input  logic                  core_req_dirty,
  output logic                  core_resp_valid,
  output blk_addr_t             core_resp_addr,
  output block_t                core_resp_data,
  output src_t                  core_resp_src,
  // memory side of this tile's home engine
  output logic                  mem_req_valid,
  input  logic                  mem_req_ready,
  output logic                  mem_req_we,
  output blk_addr_t             mem_req_addr,
  output block_t                mem_req_wdata,
  input  logic                  mem_resp_valid,
  input  block_t                mem_resp_data,
  // network: injection into and ejection from the local router port
  output logic                  inj_valid,
  output flit_t                 inj_flit,
  input  logic [NVC-1:0]        inj_crd,
  input  logic                  ej_valid,
  input  flit_t                 ej_flit,
  output logic [NVC-1:0]        ej_crd,
  // partition state and event pulses
  output logic [$clog2(WAYS):0] cap_v,
  output logic [$clog2(WAYS):0] cap_p,
  output logic                  ev_hit_v,
  output logic                  ev_hit_p,
  output logic                  ev_miss,
  output logic                  ev_pf_req,
  output logic                  ev_wb,
  output logic                  ev_shrink_v,
  output logic                  ev_expand_v
);
  localparam int CRW = $clog2(VC_DEPTH + 1);
  localparam int FCW = $clog2(FLITS_PER_BLK);
  localparam int BIW = $clog2(PREF_N + 1);
  localparam logic [NODE_W-1:0] SELF = NODE_W'(Y * MESH_X + X);

  function automatic flit_t mk_head(input msg_t t, input logic [NODE_W-1:0] dst,
                                    input blk_addr_t a, input int len,
                                    input logic tail, input logic burst, input int vc);
    hdr_t h;
    flit_t f;
    h       = '0;
    h.mtype = t;
    h.len   = LEN_W'(len);
    h.dst_x = COORD_W'(int'(dst) % MESH_X);
    h.dst_y = COORD_W'(int'(dst) / MESH_X);
    h.src_x = COORD_W'(X);
    h.src_y = COORD_W'(Y);
    h.addr  = a;
    f.head  = 1'b1;
    f.tail  = tail;
    f.burst = burst;
    f.vc    = VC_W'(vc);
    f.data  = h;
    return f;
  endfunction

  // ================================================================ cache + CPA
  logic      c_req_valid, c_req_ready, c_req_dirty;
  cop_t      c_req_op;
  blk_addr_t c_req_addr;
  block_t    c_req_data;
  logic      c_resp_valid, c_resp_hit;
  part_t     c_resp_part;
  block_t    c_resp_data;
  logic      c_ev_valid, c_ev_ready;
  blk_addr_t c_ev_addr;
  block_t    c_ev_data;
  logic      mv_valid, mv_done, ev_access;
  part_t     mv_src;

  stlac_cache #(.SETS(SETS), .WAYS(WAYS)) u_cache (
    .clk, .rst_n,
    .req_valid(c_req_valid), .req_ready(c_req_ready), .req_op(c_req_op),
    .req_addr(c_req_addr), .req_data(c_req_data), .req_dirty(c_req_dirty),
    .resp_valid(c_resp_valid), .resp_hit(c_resp_hit), .resp_part(c_resp_part),
    .resp_data(c_resp_data),
    .evict_valid(c_ev_valid), .evict_ready(c_ev_ready), .evict_addr(c_ev_addr),
    .evict_data(c_ev_data),
    .mv_valid, .mv_src, .mv_done,
    .ev_access, .ev_hit_v, .ev_hit_p
  );

  cpa_ctrl #(.WAYS(WAYS), .PERIOD(PERIOD), .THR_PCT(THR_PCT)) u_cpa (
    .clk, .rst_n,
    .ev_access, .ev_hit_v, .ev_hit_p,
    .mv_valid, .mv_src, .mv_done,
    .cap_v, .cap_p, .ev_shrink_v, .ev_expand_v
  );

  // ================================================================ ejection
  flit_t          ej_head [NVC];
  logic [NVC-1:0] ej_empty, ej_pop;
  for (genvar v = 0; v < NVC; v++) begin : g_ej
    logic unused_full;
    flit_fifo #(.DEPTH(VC_DEPTH)) u_ejq (
      .clk, .rst_n,
      .wr_en(ej_valid && ej_flit.vc == VC_W'(v)), .wr_flit(ej_flit),
      .rd_en(ej_pop[v]), .rd_flit(ej_head[v]),
      .empty(ej_empty[v]), .full(unused_full)
    );
  end
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) ej_crd <= '0;
    else        ej_crd <= ej_pop;

  // ================================================================ injection
  // Request flits (VC0) go through a small queue that is written one whole
  // packet at a time; reply flits (VC1) come straight from the home engine.
  logic  rq_push, rq_pop, rq_empty, rq_full;
  flit_t rq_in, rq_head;
  flit_fifo #(.DEPTH(8)) u_rq (
    .clk, .rst_n, .wr_en(rq_push), .wr_flit(rq_in),
    .rd_en(rq_pop), .rd_flit(rq_head), .empty(rq_empty), .full(rq_full)
  );
  logic [CRW-1:0] crd [NVC];
  logic           rs_valid, rs_take;
  flit_t          rs_flit, inj_sel;

  always_comb begin
    rs_take  = rs_valid && crd[VC_RESP] != '0;
    rq_pop   = !rs_take && !rq_empty && crd[VC_REQ] != '0;
    inj_sel  = rs_take ? rs_flit : rq_head;
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      inj_valid <= 1'b0;
      for (int v = 0; v < NVC; v++) crd[v] <= CRW'(VC_DEPTH);
    end else begin
      inj_valid <= rs_take || rq_pop;
      crd[VC_REQ]  <= crd[VC_REQ]  + CRW'(inj_crd[VC_REQ])  - CRW'(rq_pop);
      crd[VC_RESP] <= crd[VC_RESP] + CRW'(inj_crd[VC_RESP]) - CRW'(rs_take);
    end
  end
  always_ff @(posedge clk) inj_flit <= inj_sel;

  // ================================================================ requester
  typedef enum logic [2:0] {R_IDLE, R_LOOK, R_SEND, R_WAIT} rstate_t;
  logic      rq_push_wb, rq_push_pf, send_rd;
  logic      pf_pend;      // PREF request waiting to enter the queue
  rstate_t   rst;
  blk_addr_t raddr;
  logic      pf_busy;

  // write-back engine
  logic      wb_active;
  blk_addr_t wb_addr;
  block_t    wb_data;
  logic [FCW:0] wb_cnt;

  // prefetch fill engine (fed from the reply side)
  logic      pf_fill_valid;
  blk_addr_t pf_fill_addr;
  block_t    pf_fill_data;
  logic      pf_last;

  // cache port: prefetch fills first, then the requester
  wire req_can = (rst == R_IDLE) && core_req_valid && !pf_fill_valid;
  always_comb begin
    c_req_valid = pf_fill_valid || req_can;
    c_req_op    = pf_fill_valid ? COP_PREF : (core_req_evict ? COP_VICTIM : COP_LOOKUP);
    c_req_addr  = pf_fill_valid ? pf_fill_addr : core_req_addr;
    c_req_data  = pf_fill_valid ? pf_fill_data : core_req_data;
    c_req_dirty = pf_fill_valid ? 1'b0 : core_req_dirty;
    core_req_ready = req_can && c_req_ready;
  end

  // prefetch length, clipped at the page end
  int pf_len;
  always_comb begin
    pf_len = page_left(raddr) - 1;
    if (pf_len > PREF_N) pf_len = PREF_N;
  end

  logic dat_done;     // demand reply delivered to the core
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rst       <= R_IDLE;
      raddr     <= '0;
      pf_busy   <= 1'b0;
      ev_miss   <= 1'b0;
      ev_pf_req <= 1'b0;
    end else begin
      ev_miss   <= 1'b0;
      ev_pf_req <= 1'b0;
      if (pf_fill_valid && c_req_ready && pf_last) pf_busy <= 1'b0;
      unique case (rst)
        R_IDLE: if (core_req_ready && !core_req_evict) begin
          rst   <= R_LOOK;
          raddr <= core_req_addr;
        end
        R_LOOK: if (c_resp_valid) begin
          if (c_resp_hit) rst <= R_IDLE;
          else begin
            rst     <= R_SEND;
            ev_miss <= 1'b1;
          end
        end
        R_SEND: if (!wb_active && !rq_full && !rq_push_wb) begin
          rst <= R_WAIT;
          if (!pf_busy && pf_len > 0) begin
            pf_busy   <= 1'b1;
            ev_pf_req <= 1'b1;
          end
        end
        R_WAIT: if (dat_done) rst <= R_IDLE;
        default: rst <= R_IDLE;
      endcase
    end
  end

  // request queue writers: the requester sends its READ (and PREF) in one
  // cycle each, the write-back engine owns the queue for a whole WB packet
  assign send_rd    = (rst == R_SEND) && !wb_active && !rq_full && !rq_push_wb;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) pf_pend <= 1'b0;
    else if (send_rd && !pf_busy && pf_len > 0) pf_pend <= 1'b1;
    else if (rq_push_pf) pf_pend <= 1'b0;
  assign rq_push_pf = pf_pend && !rq_full && !send_rd;
  assign rq_push_wb = wb_active && wb_cnt != '0 && !rq_full && !pf_pend;

  always_comb begin
    rq_push = send_rd || rq_push_pf || rq_push_wb;
    if (send_rd)
      rq_in = mk_head(MSG_READ, home_of(raddr), raddr, 1, 1'b1, 1'b0, VC_REQ);
    else if (rq_push_pf)
      rq_in = mk_head(MSG_PREF, home_of(raddr), raddr + 1'b1, pf_len, 1'b1, 1'b0, VC_REQ);
    else if (wb_cnt == (FCW+1)'(FLITS_PER_BLK + 1))
      rq_in = mk_head(MSG_WB, home_of(wb_addr), wb_addr, 1, 1'b0, 1'b0, VC_REQ);
    else begin
      rq_in       = '0;
      rq_in.tail  = (wb_cnt == 1);
      rq_in.vc    = VC_W'(VC_REQ);
      rq_in.data  = wb_data[(FLITS_PER_BLK - int'(wb_cnt)) * FLIT_W +: FLIT_W];
    end
  end

  // write-back engine: takes a displaced dirty block from the slice
  assign c_ev_ready = !wb_active;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wb_active <= 1'b0;
      wb_addr   <= '0;
      wb_cnt    <= '0;
      ev_wb     <= 1'b0;
    end else begin
      ev_wb <= 1'b0;
      if (!wb_active && c_ev_valid) begin
        wb_active <= 1'b1;
        wb_addr   <= c_ev_addr;
        wb_cnt    <= (FCW+1)'(FLITS_PER_BLK + 1);
        ev_wb     <= 1'b1;
      end else if (rq_push_wb) begin
        wb_cnt <= wb_cnt - 1'b1;
        if (wb_cnt == 1) wb_active <= 1'b0;
      end
    end
  end
  always_ff @(posedge clk) if (!wb_active && c_ev_valid) wb_data <= c_ev_data;

  // ================================================================ reply side (VC1)
  logic         rp_burst;
  blk_addr_t    rp_addr;
  logic [LEN_W-1:0] rp_left;
  logic [FCW:0] rp_fcnt;
  block_t       rp_blk;
  logic         rp_full;

  assign ej_pop[VC_RESP] = !ej_empty[VC_RESP] && !rp_full;
  assign pf_fill_valid   = rp_full && rp_burst;
  assign pf_fill_addr    = rp_addr;
  assign pf_fill_data    = rp_blk;
  assign pf_last         = (rp_left == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rp_burst        <= 1'b0;
      rp_addr         <= '0;
      rp_left         <= '0;
      rp_fcnt         <= '0;
      rp_full         <= 1'b0;
      core_resp_valid <= 1'b0;
      core_resp_addr  <= '0;
      core_resp_src   <= SRC_MEM;
      dat_done        <= 1'b0;
    end else begin
      core_resp_valid <= 1'b0;
      dat_done        <= 1'b0;
      // hits are answered from the slice
      if (rst == R_LOOK && c_resp_valid && c_resp_hit) begin
        core_resp_valid <= 1'b1;
        core_resp_addr  <= raddr;
        core_resp_src   <= (c_resp_part == PART_PREF) ? SRC_PREF : SRC_VICTIM;
      end
      if (rp_full) begin
        if (!rp_burst) begin
          core_resp_valid <= 1'b1;
          core_resp_addr  <= rp_addr;
          core_resp_src   <= SRC_MEM;
          dat_done        <= 1'b1;
          rp_full         <= 1'b0;
        end else if (c_req_ready) begin
          rp_full <= 1'b0;
          rp_addr <= rp_addr + 1'b1;
        end
      end
      if (ej_pop[VC_RESP]) begin
        if (ej_head[VC_RESP].head) begin
          hdr_t h;
          h = hdr_t'(ej_head[VC_RESP].data);
          rp_burst  <= (h.mtype == MSG_BURST);
          rp_addr   <= h.addr;
          rp_left   <= h.len - 1'b1;
          rp_fcnt   <= '0;
        end else begin
          rp_fcnt <= rp_fcnt + 1'b1;
          if (rp_fcnt == (FCW+1)'(FLITS_PER_BLK - 1)) begin
            rp_fcnt <= '0;
            rp_full <= 1'b1;
          end
        end
      end
      if (rp_full && rp_burst && c_req_ready && rp_left != '0) rp_left <= rp_left - 1'b1;
    end
  end
  always_ff @(posedge clk) begin
    if (ej_pop[VC_RESP] && !ej_head[VC_RESP].head)
      rp_blk[int'(rp_fcnt[FCW-1:0]) * FLIT_W +: FLIT_W] <= ej_head[VC_RESP].data;
    if (rst == R_LOOK && c_resp_valid && c_resp_hit) core_resp_data <= c_resp_data;
    else if (rp_full && !rp_burst)                  core_resp_data <= rp_blk;
  end

  // ================================================================ home engine (VC0)
  typedef enum logic [2:0] {H_IDLE, H_WBDATA, H_WBMEM, H_READ, H_SEND} hstate_t;
  hstate_t            hst;
  msg_t               h_type;
  blk_addr_t          h_addr;
  logic [LEN_W-1:0]   h_len;
  logic [NODE_W-1:0]  h_src;
  logic [BIW-1:0]     h_issued, h_got;
  logic [FCW:0]       h_fcnt;
  logic [BIW+FCW:0]   h_sent;
  block_t             h_buf [PREF_N];
  block_t             h_wb;

  assign ej_pop[VC_REQ] = !ej_empty[VC_REQ] &&
                          (hst == H_IDLE || hst == H_WBDATA);

  always_comb begin
    mem_req_valid = 1'b0;
    mem_req_we    = 1'b0;
    mem_req_addr  = h_addr + blk_addr_t'(h_issued);
    mem_req_wdata = h_wb;
    if (hst == H_WBMEM) begin
      mem_req_valid = 1'b1;
      mem_req_we    = 1'b1;
      mem_req_addr  = h_addr;
    end else if (hst == H_READ && h_issued < BIW'(h_len)) begin
      mem_req_valid = 1'b1;
    end
  end

  // reply flits
  wire   h_burst = (h_type == MSG_PREF);
  wire [BIW+FCW:0] h_total = (BIW+FCW+1)'(h_len) * (BIW+FCW+1)'(FLITS_PER_BLK);
  always_comb begin
    logic [BIW+FCW:0] k;
    k        = h_sent - 1'b1;
    rs_valid = (hst == H_SEND);
    if (h_sent == '0)
      rs_flit = mk_head(h_burst ? MSG_BURST : MSG_DATA, h_src, h_addr, int'(h_len),
                        1'b0, h_burst, VC_RESP);
    else begin
      rs_flit       = '0;
      rs_flit.vc    = VC_W'(VC_RESP);
      rs_flit.burst = h_burst;
      rs_flit.tail  = (h_sent == h_total);
      rs_flit.data  = h_buf[int'(k) / FLITS_PER_BLK][(int'(k) % FLITS_PER_BLK) * FLIT_W +: FLIT_W];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hst      <= H_IDLE;
      h_type   <= MSG_READ;
      h_addr   <= '0;
      h_len    <= '0;
      h_src    <= '0;
      h_issued <= '0;
      h_got    <= '0;
      h_fcnt   <= '0;
      h_sent   <= '0;
    end else begin
      unique case (hst)
        H_IDLE: if (ej_pop[VC_REQ]) begin
          hdr_t h;
          h = hdr_t'(ej_head[VC_REQ].data);
          h_type   <= h.mtype;
          h_addr   <= h.addr;
          h_len    <= h.len;
          h_src    <= NODE_W'(int'(h.src_y) * MESH_X + int'(h.src_x));
          h_issued <= '0;
          h_got    <= '0;
          h_fcnt   <= '0;
          h_sent   <= '0;
          hst      <= (h.mtype == MSG_WB) ? H_WBDATA : H_READ;
        end
        H_WBDATA: if (ej_pop[VC_REQ]) begin
          h_fcnt <= h_fcnt + 1'b1;
          if (ej_head[VC_REQ].tail) hst <= H_WBMEM;
        end
        H_WBMEM: if (mem_req_ready) hst <= H_IDLE;
        H_READ: begin
          if (mem_req_valid && mem_req_ready) h_issued <= h_issued + 1'b1;
          if (mem_resp_valid) begin
            h_got <= h_got + 1'b1;
            if (h_got == BIW'(h_len) - 1'b1) hst <= H_SEND;
          end
        end
        H_SEND: if (rs_take) begin
          h_sent <= h_sent + 1'b1;
          if (h_sent == h_total) hst <= H_IDLE;
        end
        default: hst <= H_IDLE;
      endcase
    end
  end
  always_ff @(posedge clk) begin
    if (hst == H_WBDATA && ej_pop[VC_REQ])
      h_wb[int'(h_fcnt[FCW-1:0]) * FLIT_W +: FLIT_W] <= ej_head[VC_REQ].data;
    if (hst == H_READ && mem_resp_valid)
      h_buf[int'(h_got)] <= mem_resp_data;
  end

  assert property (@(posedge clk) disable iff (!rst_n) core_req_valid && core_req_ready |-> rst == R_IDLE);
  assert property (@(posedge clk) disable iff (!rst_n) (hst == H_READ) |-> h_len != '0 && int'(h_len) <= PREF_N)
    else $error("stlac_node: request length out of range");
endmodule
