// Set-associative read cache with write-through, for the cores' instruction and data ports.
//
// Sits between a core port and the bus, with the same request/grant bus on
// both sides. Configured as the instruction cache (32 kB, direct mapped,
// WAYS = 1) or the data cache (32 kB, 4-way, round-robin replacement), the
// configuration of the DSP cores in the evaluated terminal.
//
// Reads of cacheable addresses are looked up in the cycle of the request. The
// tags are read combinationally. A hit is granted at once and its word
// returns one cycle later, as the bus requires. A miss holds gnt low, which
// stalls the core, while the cache fetches the whole line with LINE_WORDS bus
// reads into the way picked by the set's round-robin pointer. The core's
// request, still held, then hits. Writes go through to the bus (no write
// allocation) and also update the cached word on a hit. Addresses in region
// UNCACHED_REGION (addr[31:20], the multiplexer by default) bypass the cache
// in both directions. If a line fill gets an error answer, the line stays
// invalid and the core's read is answered with err.
//
// Counters: accesses (granted cacheable reads and writes, hits and misses
// alike) and misses (line fills for reads, plus writes that missed when
// WRITE_MISSES is set), the two cache figures of the evaluation: data-cache
// misses count reads and writes, instruction-cache misses only reads. The sizes, the associativity and the
// round-robin replacement follow the evaluated configuration. The line size,
// the write policy, the uncached region and the stall-on-miss behaviour are
// this design's own choices.
module cache
  import soc_pkg::*;
#(
  parameter int unsigned          CACHE_BYTES     = 32768,
  parameter int unsigned          WAYS            = 1,
  parameter int unsigned          LINE_BYTES      = 32,
  parameter bit                   WRITE_MISSES    = 1'b1,   // count write misses as misses
  parameter logic [AW-WIN_BITS-1:0] UNCACHED_REGION = MUX_REGION
) (
  input  logic        clk,
  input  logic        rst_n,
  input  bus_req_t    c_req,      // from the core
  output bus_rsp_t    c_rsp,
  output bus_req_t    m_req,      // to the bus
  input  bus_rsp_t    m_rsp,
  output logic [31:0] access_cnt,
  output logic [31:0] miss_cnt
);

  localparam int unsigned LINE_WORDS = LINE_BYTES / 4;
  localparam int unsigned SETS  = CACHE_BYTES / (LINE_BYTES * WAYS);
  localparam int unsigned OFF_W = $clog2(LINE_BYTES);
  localparam int unsigned WRD_W = $clog2(LINE_WORDS);
  localparam int unsigned IDX_W = $clog2(SETS);
  localparam int unsigned TAG_W = AW - OFF_W - IDX_W;
  localparam int unsigned WAY_W = (WAYS > 1) ? $clog2(WAYS) : 1;
  localparam int unsigned DA_W  = $clog2(WAYS * SETS * LINE_WORDS);

  typedef enum logic [1:0] {C_LOOKUP, C_FILL, C_ERR} state_e;

  logic [TAG_W-1:0] tags  [WAYS][SETS];
  logic [SETS-1:0]  valid [WAYS];
  logic [WAY_W-1:0] rr    [SETS];
  logic [DW-1:0]    data  [WAYS * SETS * LINE_WORDS];

  state_e           state;
  logic [TAG_W-1:0] a_tag;
  logic [IDX_W-1:0] a_idx;
  logic [WRD_W-1:0] a_wrd;
  logic             cacheable, hit;
  logic [WAY_W-1:0] hit_way;

  assign a_tag     = c_req.addr[AW-1 -: TAG_W];
  assign a_idx     = c_req.addr[OFF_W +: IDX_W];
  assign a_wrd     = c_req.addr[2 +: WRD_W];
  assign cacheable = c_req.addr[AW-1:WIN_BITS] != UNCACHED_REGION;

  always_comb begin
    hit     = 1'b0;
    hit_way = '0;
    for (int w = 0; w < WAYS; w++)
      if (valid[w][a_idx] && tags[w][a_idx] == a_tag) begin
        hit     = 1'b1;
        hit_way = WAY_W'(w);
      end
  end

  // line fill bookkeeping
  logic [WRD_W:0]   fill_issued, fill_recv;
  logic             fill_err;
  logic [WAY_W-1:0] fill_way;
  logic [IDX_W-1:0] fill_idx;
  logic [TAG_W-1:0] fill_tag;

  // read return
  logic          hit_rv_q, pass_rd_q, err_rv_q;
  logic [DW-1:0] hit_data_q;

  logic lookup, pass, rd_hit, rd_miss, wr_through, wr_granted;

  assign lookup     = (state == C_LOOKUP) && c_req.req;
  assign pass       = lookup && (!cacheable || c_req.we);
  assign rd_hit     = lookup && cacheable && !c_req.we && hit;
  assign rd_miss    = lookup && cacheable && !c_req.we && !hit;
  assign wr_through = lookup && cacheable && c_req.we;
  assign wr_granted = pass && m_rsp.gnt && c_req.we;

  always_comb begin
    m_req = BUS_REQ_IDLE;
    c_rsp = BUS_RSP_IDLE;
    if (pass) begin
      m_req     = c_req;
      c_rsp.gnt = m_rsp.gnt;
      c_rsp.err = m_rsp.gnt && c_req.we && m_rsp.err;
    end else if (rd_hit) begin
      c_rsp.gnt = 1'b1;
    end else if (state == C_FILL && fill_issued != (WRD_W+1)'(LINE_WORDS)) begin
      m_req.req  = 1'b1;
      m_req.addr = {fill_tag, fill_idx, fill_issued[WRD_W-1:0], 2'b00};
    end else if (state == C_ERR && c_req.req) begin
      c_rsp.gnt = 1'b1;
    end
    // read data of the previous cycle
    if (hit_rv_q) begin
      c_rsp.rvalid = 1'b1;
      c_rsp.rdata  = hit_data_q;
    end else if (pass_rd_q) begin
      c_rsp.rvalid = m_rsp.rvalid;
      c_rsp.err    = m_rsp.err;
      c_rsp.rdata  = m_rsp.rdata;
    end else if (err_rv_q) begin
      c_rsp.rvalid = 1'b1;
      c_rsp.err    = 1'b1;
    end
  end

  function automatic logic [DA_W-1:0] da(input logic [WAY_W-1:0] w, input logic [IDX_W-1:0] i,
                                          input logic [WRD_W-1:0] k);
    return DA_W'((32'(w) * SETS + 32'(i)) * LINE_WORDS + 32'(k));
  endfunction

  // data array: one read or one write per cycle
  always_ff @(posedge clk) begin
    if (rd_hit) hit_data_q <= data[da(hit_way, a_idx, a_wrd)];
    if (state == C_FILL && m_rsp.rvalid)
      data[da(fill_way, fill_idx, fill_recv[WRD_W-1:0])] <= m_rsp.rdata;
    else if (wr_granted && wr_through && hit)
      for (int b = 0; b < BW; b++)
        if (c_req.be[b]) data[da(hit_way, a_idx, a_wrd)][8*b +: 8] <= c_req.wdata[8*b +: 8];
  end

  always_ff @(posedge clk) begin
    if (state == C_FILL && fill_recv == (WRD_W+1)'(LINE_WORDS - 1) && m_rsp.rvalid && !fill_err && !m_rsp.err)
      tags[fill_way][fill_idx] <= fill_tag;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= C_LOOKUP;
      for (int w = 0; w < WAYS; w++) valid[w] <= '0;
      for (int s = 0; s < SETS; s++) rr[s] <= '0;
      fill_issued <= '0;
      fill_recv   <= '0;
      fill_err    <= 1'b0;
      fill_way    <= '0;
      fill_idx    <= '0;
      fill_tag    <= '0;
      hit_rv_q    <= 1'b0;
      pass_rd_q   <= 1'b0;
      err_rv_q    <= 1'b0;
      access_cnt  <= '0;
      miss_cnt    <= '0;
    end else begin
      hit_rv_q  <= rd_hit;
      pass_rd_q <= pass && m_rsp.gnt && !c_req.we;
      err_rv_q  <= (state == C_ERR) && c_req.req;
      if (rd_hit || (wr_through && m_rsp.gnt)) access_cnt <= access_cnt + 1'b1;
      if (rd_miss || (WRITE_MISSES && wr_through && m_rsp.gnt && !hit)) miss_cnt <= miss_cnt + 1'b1;
      unique case (state)
        C_LOOKUP: if (rd_miss) begin
          state       <= C_FILL;
          fill_way    <= (WAYS > 1) ? rr[a_idx] : '0;
          fill_idx    <= a_idx;
          fill_tag    <= a_tag;
          fill_issued <= '0;
          fill_recv   <= '0;
          fill_err    <= 1'b0;
          valid[(WAYS > 1) ? rr[a_idx] : '0][a_idx] <= 1'b0;
        end
        C_FILL: begin
          if (m_req.req && m_rsp.gnt) fill_issued <= fill_issued + 1'b1;
          if (m_rsp.rvalid) begin
            fill_recv <= fill_recv + 1'b1;
            if (m_rsp.err) fill_err <= 1'b1;
            if (fill_recv == (WRD_W+1)'(LINE_WORDS - 1)) begin
              if (fill_err || m_rsp.err) begin
                state <= C_ERR;
              end else begin
                state <= C_LOOKUP;
                valid[fill_way][fill_idx] <= 1'b1;
                if (WAYS > 1) rr[fill_idx] <= WAY_W'((32'(fill_way) + 1) % WAYS);
              end
            end
          end
        end
        C_ERR: if (c_req.req) state <= C_LOOKUP;
        default: state <= C_LOOKUP;
      endcase
    end
  end

  // configuration rules
  initial begin
    assert (LINE_BYTES >= 8 && (LINE_BYTES & (LINE_BYTES - 1)) == 0)
      else $fatal(1, "LINE_BYTES must be a power of two, at least 8");
    assert (SETS >= 2 && (SETS & (SETS - 1)) == 0 && SETS * LINE_BYTES * WAYS == CACHE_BYTES)
      else $fatal(1, "CACHE_BYTES must be WAYS x LINE_BYTES x a power of two");
  end

endmodule
