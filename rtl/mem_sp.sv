// Single-port word memory on the SoC bus (data memories 0 and 1, program memories).
//
// A synchronous RAM of WORDS 32-bit words that answers the two-phase bus of
// soc_pkg: it grants every request at once, writes the enabled bytes at the
// clock edge and returns read data with rvalid one cycle after a read grant.
// The address is a byte address inside the memory's window; bits [1:0] are
// ignored and addresses past the last word wrap. The design description names
// these memories but gives neither their size nor their timing: the default of
// 1 MiB fills one address window of the arbiter, and the one-cycle read latency
// is this design's choice. The array is not reset; whatever is read must be
// written first.
module mem_sp
  import soc_pkg::*;
#(
  parameter int unsigned WORDS = 262144
) (
  input  logic     clk,
  input  logic     rst_n,
  input  bus_req_t req,
  output bus_rsp_t rsp
);

  localparam int unsigned IW = $clog2(WORDS);

  logic [DW-1:0] mem [WORDS];
  logic [IW-1:0] idx;
  logic          rvalid_q;
  logic [DW-1:0] rdata_q;

  assign idx = req.addr[IW+1:2];

  always_ff @(posedge clk) begin
    if (req.req && req.we) begin
      for (int b = 0; b < BW; b++)
        if (req.be[b]) mem[idx][8*b +: 8] <= req.wdata[8*b +: 8];
    end
    if (req.req && !req.we) rdata_q <= mem[idx];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rvalid_q <= 1'b0;
    else        rvalid_q <= req.req && !req.we;
  end

  always_comb begin
    rsp        = BUS_RSP_IDLE;
    rsp.gnt    = req.req;
    rsp.rvalid = rvalid_q;
    rsp.rdata  = rvalid_q ? rdata_q : '0;
  end

endmodule
