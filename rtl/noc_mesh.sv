// noc_mesh: the on-chip network, a MESH_X x MESH_Y 2D mesh of burst-support
// routers with 128-bit links and dimension-order (X then Y) routing.
//
// Router (x,y) has node number y*MESH_X + x. Its east output drives the
// west input of router (x+1,y) and its south output the north input of
// router (x,y+1); credits run the opposite way on every link. Ports on the
// mesh edge are tied off; dimension-order routing never selects them. Port 0
// of every router is brought out for the tile's network interface: inj_* is
// the flit stream into the router with credits coming back on inj_crd,
// ej_* the stream out of it, with credits returned by the interface on
// ej_crd. Every link is one register stage (the router output register).
// The 4x4 size, the link width and the routing follow the evaluated system.
module noc_mesh
  import stlac_pkg::*;
#(
  parameter int DEPTH  = VC_DEPTH,
  parameter int AGE_TH = 16
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic  [NODES-1:0]          inj_valid,
  input  flit_t                      inj_flit [NODES],
  output logic  [NODES-1:0][NVC-1:0] inj_crd,
  output logic  [NODES-1:0]          ej_valid,
  output flit_t                      ej_flit  [NODES],
  input  logic  [NODES-1:0][NVC-1:0] ej_crd,
  output logic  [NODES-1:0]          ev_lock,
  output logic  [NODES-1:0]          ev_age,
  output logic  [NODES-1:0]          ev_stall
);
  logic  [NPORTS-1:0]          r_in_valid  [NODES];
  flit_t                       r_in_flit   [NODES][NPORTS];
  logic  [NPORTS-1:0][NVC-1:0] r_crd_out   [NODES];
  logic  [NPORTS-1:0]          r_out_valid [NODES];
  flit_t                       r_out_flit  [NODES][NPORTS];
  logic  [NPORTS-1:0][NVC-1:0] r_crd_in    [NODES];

  for (genvar y = 0; y < MESH_Y; y++) begin : g_y
    for (genvar x = 0; x < MESH_X; x++) begin : g_x
      localparam int N = y * MESH_X + x;
      localparam int E = y * MESH_X + x + 1;
      localparam int W = y * MESH_X + x - 1;
      localparam int S = (y + 1) * MESH_X + x;
      localparam int U = (y - 1) * MESH_X + x;

      burst_router #(.X(x), .Y(y), .DEPTH(DEPTH), .AGE_TH(AGE_TH)) u_r (
        .clk, .rst_n,
        .in_valid (r_in_valid[N]),  .in_flit (r_in_flit[N]),  .crd_out(r_crd_out[N]),
        .out_valid(r_out_valid[N]), .out_flit(r_out_flit[N]), .crd_in (r_crd_in[N]),
        .ev_lock  (ev_lock[N]), .ev_age(ev_age[N]), .ev_stall(ev_stall[N])
      );

      // local port
      assign r_in_valid[N][P_LOCAL] = inj_valid[N];
      assign r_in_flit[N][P_LOCAL]  = inj_flit[N];
      assign inj_crd[N]             = r_crd_out[N][P_LOCAL];
      assign ej_valid[N]            = r_out_valid[N][P_LOCAL];
      assign ej_flit[N]             = r_out_flit[N][P_LOCAL];
      assign r_crd_in[N][P_LOCAL]   = ej_crd[N];

      // west input / east output pair
      if (x > 0) begin : g_w
        assign r_in_valid[N][P_WEST] = r_out_valid[W][P_EAST];
        assign r_in_flit[N][P_WEST]  = r_out_flit[W][P_EAST];
        assign r_crd_in[N][P_WEST]   = r_crd_out[W][P_EAST];
      end else begin : g_w0
        assign r_in_valid[N][P_WEST] = 1'b0;
        assign r_in_flit[N][P_WEST]  = '0;
        assign r_crd_in[N][P_WEST]   = '0;
      end
      if (x < MESH_X - 1) begin : g_e
        assign r_in_valid[N][P_EAST] = r_out_valid[E][P_WEST];
        assign r_in_flit[N][P_EAST]  = r_out_flit[E][P_WEST];
        assign r_crd_in[N][P_EAST]   = r_crd_out[E][P_WEST];
      end else begin : g_e0
        assign r_in_valid[N][P_EAST] = 1'b0;
        assign r_in_flit[N][P_EAST]  = '0;
        assign r_crd_in[N][P_EAST]   = '0;
      end
      if (y > 0) begin : g_n
        assign r_in_valid[N][P_NORTH] = r_out_valid[U][P_SOUTH];
        assign r_in_flit[N][P_NORTH]  = r_out_flit[U][P_SOUTH];
        assign r_crd_in[N][P_NORTH]   = r_crd_out[U][P_SOUTH];
      end else begin : g_n0
        assign r_in_valid[N][P_NORTH] = 1'b0;
        assign r_in_flit[N][P_NORTH]  = '0;
        assign r_crd_in[N][P_NORTH]   = '0;
      end
      if (y < MESH_Y - 1) begin : g_s
        assign r_in_valid[N][P_SOUTH] = r_out_valid[S][P_NORTH];
        assign r_in_flit[N][P_SOUTH]  = r_out_flit[S][P_NORTH];
        assign r_crd_in[N][P_SOUTH]   = r_crd_out[S][P_NORTH];
      end else begin : g_s0
        assign r_in_valid[N][P_SOUTH] = 1'b0;
        assign r_in_flit[N][P_SOUTH]  = '0;
        assign r_crd_in[N][P_SOUTH]   = '0;
      end
    end
  end
endmodule
