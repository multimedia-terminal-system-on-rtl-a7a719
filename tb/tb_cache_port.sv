// One cache under test with its bus memory, stimulus and reference model.
//
// The bus memory grants each cycle with probability GNT_PCT, answers one
// cycle after the grant and answers err for every address in region 1. The
// reference model mirrors the tags, valid bits and round-robin pointers to
// predict every hit and miss. The checks cover the read data, the err answers,
// the one-cycle read latency, the number of bus reads (a whole line per fill,
// none on a hit), write-through and the access and miss counters.
module tb_cache_port #(
  parameter int unsigned CACHE_BYTES = 256,
  parameter int unsigned WAYS        = 4,
  parameter int unsigned LINE_BYTES  = 16,
  parameter bit          WRITE_MISSES = 1'b1,
  parameter int unsigned OPS         = 1500,
  parameter int unsigned GNT_PCT     = 70,
  parameter int unsigned SEED        = 1
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output logic done
);
  import soc_pkg::*;

  localparam int unsigned LW    = LINE_BYTES / 4;
  localparam int unsigned SETS  = CACHE_BYTES / (LINE_BYTES * WAYS);
  localparam int unsigned MWORDS = 4 * CACHE_BYTES / 4;   // four times the cache

  bus_req_t c_req, m_req;
  bus_rsp_t c_rsp, m_rsp;
  logic [31:0] access_cnt, miss_cnt;

  cache #(.CACHE_BYTES(CACHE_BYTES), .WAYS(WAYS), .LINE_BYTES(LINE_BYTES), .WRITE_MISSES(WRITE_MISSES)) dut (
    .clk, .rst_n, .c_req, .c_rsp, .m_req, .m_rsp, .access_cnt, .miss_cnt
  );

  // ---------------- bus memory ----------------
  logic [31:0] mem [MWORDS];
  logic        gnt_ok, rv_q, err_q;
  logic [31:0] rd_q;
  int          bus_cached_reads = 0, bus_mux_reads = 0, bus_mux_writes = 0;

  function automatic logic [31:0] mux_word(input logic [31:0] a);
    return a ^ 32'h5A5A_0000;
  endfunction

  always_comb begin
    m_rsp        = BUS_RSP_IDLE;
    m_rsp.gnt    = m_req.req && gnt_ok;
    m_rsp.err    = m_rsp.gnt && m_req.we && m_req.addr[31:20] == 12'h001;
    m_rsp.rvalid = rv_q;
    if (rv_q) begin
      m_rsp.rdata = rd_q;
      m_rsp.err   = err_q;
    end
  end

  always_ff @(posedge clk) begin
    gnt_ok <= $urandom_range(99) < GNT_PCT;
    rv_q   <= m_rsp.gnt && !m_req.we;
    err_q  <= m_req.addr[31:20] == 12'h001;
    if (m_rsp.gnt) begin
      if (m_req.addr[31:20] == MUX_REGION) begin
        if (m_req.we) bus_mux_writes++; else bus_mux_reads++;
        rd_q <= mux_word(m_req.addr);
      end else if (m_req.addr[31:20] == 12'h000) begin
        if (!m_req.we) bus_cached_reads++;
        rd_q <= mem[m_req.addr[2 +: $clog2(MWORDS)]];
        if (m_req.we)
          for (int b = 0; b < 4; b++)
            if (m_req.be[b]) mem[m_req.addr[2 +: $clog2(MWORDS)]][8*b +: 8] <= m_req.wdata[8*b +: 8];
      end else begin
        if (!m_req.we) bus_cached_reads++;
        rd_q <= 32'hDEAD_BEEF;
      end
    end
  end

  // ---------------- reference cache ----------------
  logic [31:0] ref_mem [MWORDS];
  logic [31:0] ref_tag [WAYS][SETS];
  bit          ref_val [WAYS][SETS];
  int          ref_rr  [SETS];
  int          exp_access = 0, exp_miss = 0, exp_fill_reads = 0;

  function automatic int find(input logic [31:0] a);
    int s;
    s = int'((a / LINE_BYTES) % SETS);
    for (int w = 0; w < WAYS; w++)
      if (ref_val[w][s] && ref_tag[w][s] == a / (LINE_BYTES * SETS)) return w;
    return -1;
  endfunction

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: cache %0d-way: %s (time %0t)", WAYS, what, $time);
    end
  endtask

  // one access: drive at the falling edge, hold until granted, check the
  // answer one cycle after the grant
  task automatic access(input bit we, input logic [31:0] a, input logic [31:0] wd,
                        input logic [3:0] be, output logic [31:0] rd, output bit err);
    @(negedge clk);
    c_req = BUS_REQ_IDLE;
    c_req.req = 1'b1; c_req.we = we; c_req.addr = a; c_req.wdata = wd; c_req.be = be;
    #1;
    while (!c_rsp.gnt) begin
      @(negedge clk);
      #1;
    end
    err = we ? c_rsp.err : 1'b0;
    @(negedge clk);
    c_req = BUS_REQ_IDLE;
    #1;
    rd = c_rsp.rdata;
    if (!we) begin
      check(c_rsp.rvalid, "rvalid one cycle after a read grant");
      err = c_rsp.err;
    end else begin
      check(!c_rsp.rvalid, "no rvalid after a write");
    end
  endtask

  initial begin
    logic [31:0] a, wd, rd;
    logic [3:0]  be;
    bit          err;
    int          kind, w, s;
    checks = 0; failures = 0; done = 1'b0;
    c_req = BUS_REQ_IDLE;
    void'($urandom(SEED));
    for (int i = 0; i < MWORDS; i++) begin
      ref_mem[i] = $urandom;
      mem[i]     = ref_mem[i];
    end
    for (int v = 0; v < WAYS; v++)
      for (int t = 0; t < SETS; t++) ref_val[v][t] = 0;
    for (int t = 0; t < SETS; t++) ref_rr[t] = 0;
    @(posedge rst_n);
    for (int n = 0; n < OPS; n++) begin
      kind = $urandom_range(99);
      // mostly a small hot set so that hits, conflicts and evictions all occur
      a = 32'(4 * ((n % 3 == 0) ? $urandom_range(MWORDS - 1) : $urandom_range(LW * SETS * (WAYS + 1) - 1)));
      s = int'((a / LINE_BYTES) % SETS);
      if (kind < 55) begin                           // cached read
        w = find(a);
        if (w < 0) begin
          exp_miss++; exp_fill_reads += LW;
          ref_tag[ref_rr[s]][s] = a / (LINE_BYTES * SETS);
          ref_val[ref_rr[s]][s] = 1;
          ref_rr[s] = (ref_rr[s] + 1) % WAYS;
        end
        exp_access++;
        access(1'b0, a, 32'h0, 4'h0, rd, err);
        check(!err && rd == ref_mem[a / 4], $sformatf("read %h gives %h, expected %h", a, rd, ref_mem[a / 4]));
      end else if (kind < 80) begin                  // cached write
        wd = $urandom; be = 4'($urandom);
        exp_access++;
        if (WRITE_MISSES && find(a) < 0) exp_miss++;
        for (int b = 0; b < 4; b++) if (be[b]) ref_mem[a / 4][8*b +: 8] = wd[8*b +: 8];
        access(1'b1, a, wd, be, rd, err);
        check(!err, "cached write without err");
      end else if (kind < 90) begin                  // uncached region
        a = {MUX_REGION, 20'(4 * $urandom_range(255))};
        if (kind < 86) begin
          access(1'b0, a, 32'h0, 4'h0, rd, err);
          check(!err && rd == mux_word(a), "uncached read passes through");
        end else begin
          access(1'b1, a, $urandom, 4'hF, rd, err);
          check(!err, "uncached write passes through");
        end
      end else begin                                 // region that answers err
        a = 32'h0010_0000 + 32'(4 * $urandom_range(63));
        s = int'((a / LINE_BYTES) % SETS);
        if (kind < 96) begin
          exp_miss++; exp_fill_reads += LW;
          ref_val[ref_rr[s]][s] = 0;
          access(1'b0, a, 32'h0, 4'h0, rd, err);
          check(err, "read of an erroring line answers err");
        end else begin
          exp_access++;
          if (WRITE_MISSES && find(a) < 0) exp_miss++;
          access(1'b1, a, $urandom, 4'hF, rd, err);
          check(err, "write to an erroring region answers err");
        end
      end
    end
    repeat (3) @(negedge clk);
    check(!c_rsp.rvalid, "no rvalid while idle");
    check(access_cnt == 32'(exp_access), $sformatf("access_cnt %0d, expected %0d", access_cnt, exp_access));
    check(miss_cnt == 32'(exp_miss), $sformatf("miss_cnt %0d, expected %0d", miss_cnt, exp_miss));
    check(bus_cached_reads == exp_fill_reads,
          $sformatf("bus reads %0d, expected %0d (whole lines on misses only)", bus_cached_reads, exp_fill_reads));
    check(bus_mux_reads > 0 && bus_mux_writes > 0, "uncached accesses reached the bus");
    check(exp_miss > 10 && exp_access > exp_miss, "hits, misses and evictions occurred");
    for (int i = 0; i < MWORDS; i++)
      if (mem[i] != ref_mem[i]) begin
        check(1'b0, $sformatf("memory word %0d %h, expected %h (write-through)", i, mem[i], ref_mem[i]));
        break;
      end
    check(1'b1, "memory matches after write-through");
    $display("cache %0d-way: %0d accesses, %0d misses", WAYS, exp_access, exp_miss);
    done = 1'b1;
  end
endmodule
