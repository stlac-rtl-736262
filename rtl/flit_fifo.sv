// flit_fifo: small synchronous FIFO of flits, used for the per-VC input
// buffers of the router and the ejection buffers of the network interface.
// Write and read may happen in the same cycle. The head is presented
// combinationally (first-word fall-through). The writer must respect the
// credit count, so a write into a full FIFO is a protocol error and is
// flagged by an assertion. Depth is a parameter (a power of two).
module flit_fifo
  import stlac_pkg::*;
#(
  parameter int DEPTH = VC_DEPTH
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  wr_en,
  input  flit_t wr_flit,
  input  logic  rd_en,
  output flit_t rd_flit,
  output logic  empty,
  output logic  full
);
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  flit_t          mem [DEPTH];
  logic [AW-1:0]  wp, rp;
  logic [AW:0]    cnt;

  assign empty   = (cnt == 0);
  assign full    = (cnt == (AW+1)'(DEPTH));
  assign rd_flit = mem[rp];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp  <= '0;
      rp  <= '0;
      cnt <= '0;
    end else begin
      if (wr_en) wp <= (wp == AW'(DEPTH-1)) ? '0 : wp + 1'b1;
      if (rd_en) rp <= (rp == AW'(DEPTH-1)) ? '0 : rp + 1'b1;
      cnt <= cnt + (AW+1)'(wr_en) - (AW+1)'(rd_en);
    end
  end

  always_ff @(posedge clk) if (wr_en) mem[wp] <= wr_flit;

  assert property (@(posedge clk) disable iff (!rst_n) !(wr_en && full && !rd_en))
    else $error("flit_fifo: write into full buffer");
  assert property (@(posedge clk) disable iff (!rst_n) !(rd_en && empty))
    else $error("flit_fifo: read from empty buffer");
endmodule
