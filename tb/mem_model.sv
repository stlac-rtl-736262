// mem_model: behavioural main-memory model for the testbenches (not part of
// the design). It accepts one block request per cycle and answers reads in
// order after LAT cycles. A block never written reads as init_block(addr),
// a pattern the testbenches can also compute.
module mem_model
  import stlac_pkg::*;
#(
  parameter int LAT = 150
) (
  input  logic      clk,
  input  logic      req_valid,
  output logic      req_ready,
  input  logic      req_we,
  input  blk_addr_t req_addr,
  input  block_t    req_wdata,
  output logic      resp_valid,
  output block_t    resp_data
);
  block_t store [blk_addr_t];
  typedef struct { longint due; block_t data; } rd_t;
  rd_t    pend [$];
  longint now = 0;
  int     n_reads = 0, n_writes = 0;

  function automatic block_t init_block(input blk_addr_t a);
    block_t b;
    for (int i = 0; i < BLOCK_BITS / 32; i++) b[i*32 +: 32] = {a[15:0], 16'(i)} ^ 32'h5a3c_0000;
    return b;
  endfunction

  assign req_ready = 1'b1;

  initial begin
    resp_valid = 1'b0;
    resp_data  = '0;
  end

  always @(posedge clk) begin
    now++;
    resp_valid <= 1'b0;
    if (pend.size() > 0 && pend[0].due <= now) begin
      resp_valid <= 1'b1;
      resp_data  <= pend[0].data;
      void'(pend.pop_front());
    end
    if (req_valid) begin
      if (req_we) begin
        store[req_addr] = req_wdata;
        n_writes++;
      end else begin
        rd_t r;
        r.due  = now + longint'(LAT) - 1;
        r.data = store.exists(req_addr) ? store[req_addr] : init_block(req_addr);
        pend.push_back(r);
        n_reads++;
      end
    end
  end
endmodule
