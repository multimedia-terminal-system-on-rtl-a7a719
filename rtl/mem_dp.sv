// Dual-port word memory for the audio and video input data (data memories 2 and 3).
//
// The same synchronous RAM as mem_sp with two independent bus ports: port 0 is
// on the arbiter, port 1 belongs to the memory loader that fills the memory
// with the media samples. Both ports grant every request at once, write the
// enabled bytes at the clock edge and return read data with rvalid one cycle
// after a read grant. If both ports write the same byte in one cycle, port 0
// wins. The two-port arrangement follows the block diagram (a bus port and a
// loader port); size, latency and the collision rule are this design's
// choices. The default of 1 MiB fills one address window of the arbiter.
module mem_dp
  import soc_pkg::*;
#(
  parameter int unsigned WORDS = 262144
) (
  input  logic     clk,
  input  logic     rst_n,
  input  bus_req_t req0,
  output bus_rsp_t rsp0,
  input  bus_req_t req1,
  output bus_rsp_t rsp1
);

  localparam int unsigned IW = $clog2(WORDS);

  logic [DW-1:0] mem [WORDS];
  logic [IW-1:0] idx0, idx1;
  logic          rvalid0_q, rvalid1_q;
  logic [DW-1:0] rdata0_q, rdata1_q;

  assign idx0 = req0.addr[IW+1:2];
  assign idx1 = req1.addr[IW+1:2];

  always_ff @(posedge clk) begin
    // port 1 first so that port 0 overrides it on a collision
    for (int b = 0; b < BW; b++) begin
      if (req1.req && req1.we && req1.be[b]) mem[idx1][8*b +: 8] <= req1.wdata[8*b +: 8];
      if (req0.req && req0.we && req0.be[b]) mem[idx0][8*b +: 8] <= req0.wdata[8*b +: 8];
    end
    if (req0.req && !req0.we) rdata0_q <= mem[idx0];
    if (req1.req && !req1.we) rdata1_q <= mem[idx1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rvalid0_q <= 1'b0;
      rvalid1_q <= 1'b0;
    end else begin
      rvalid0_q <= req0.req && !req0.we;
      rvalid1_q <= req1.req && !req1.we;
    end
  end

  always_comb begin
    rsp0        = BUS_RSP_IDLE;
    rsp0.gnt    = req0.req;
    rsp0.rvalid = rvalid0_q;
    rsp0.rdata  = rvalid0_q ? rdata0_q : '0;
    rsp1        = BUS_RSP_IDLE;
    rsp1.gnt    = req1.req;
    rsp1.rvalid = rvalid1_q;
    rsp1.rdata  = rvalid1_q ? rdata1_q : '0;
  end

endmodule
