// Memory loader: fills an input-data memory with media samples after reset.
//
// The audio and video coders read their input from a memory that is filled
// with the samples to be coded before processing starts. This block takes a
// stream of 32-bit words (src_valid/src_ready/src_last) and writes them one
// per cycle into the memory through a bus port, at consecutive word addresses
// starting at START_ADDR. Loading ends after the word flagged src_last or when
// MAX_WORDS words have been written; done then stays high until the next
// reset, and further source words are refused. A word is taken
// (src_ready high) in the cycle the memory grants the write. Loading from a
// configurable start address follows the design description; the streaming
// interface and the word limit are this design's own choices.
module memloader
  import soc_pkg::*;
#(
  parameter logic [AW-1:0] START_ADDR = '0,
  parameter int unsigned   MAX_WORDS  = 262144
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          src_valid,
  input  logic [DW-1:0] src_data,
  input  logic          src_last,
  output logic          src_ready,
  output bus_req_t      mem_req,
  input  bus_rsp_t      mem_rsp,
  output logic          done,
  output logic [31:0]   words_loaded
);

  logic take;

  always_comb begin
    mem_req = BUS_REQ_IDLE;
    if (!done && src_valid) begin
      mem_req.req   = 1'b1;
      mem_req.we    = 1'b1;
      mem_req.addr  = START_ADDR + AW'({words_loaded, 2'b00});
      mem_req.wdata = src_data;
      mem_req.be    = '1;
    end
    take      = mem_req.req && mem_rsp.gnt;
    src_ready = take;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      done         <= 1'b0;
      words_loaded <= '0;
    end else if (take) begin
      words_loaded <= words_loaded + 1'b1;
      if (src_last || words_loaded == 32'(MAX_WORDS - 1)) done <= 1'b1;
    end
  end

endmodule
