// Self-checking testbench of bus_arbiter.
//
// Six simple slave models answer every granted read one cycle later with
// {slave number, low 24 address bits}, so the returned word shows which slave
// was reached and which displacement it saw. Directed cycles check the address
// decode, the reservation of datamem0/1, the error answer, the fixed priority
// of master 0 on a shared slave (and master 1 getting through once master 0
// is gone), a slave holding gnt low, and the statistics counters against
// counts kept by the testbench.
module tb_bus_arbiter;
  import soc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  bus_req_t m_req [NUM_MASTERS];
  bus_rsp_t m_rsp [NUM_MASTERS];
  bus_req_t s_req [NUM_SLAVES];
  bus_rsp_t s_rsp [NUM_SLAVES];
  logic [31:0] rd_cnt [NUM_MASTERS], wr_cnt [NUM_MASTERS];
  logic [31:0] denied_cnt [NUM_MASTERS], stall_cnt [NUM_MASTERS], mux_denied_cnt [NUM_MASTERS];
  logic [31:0] conflict_cnt;
  logic        s_gnt_en [NUM_SLAVES];

  int checks = 0, failures = 0;

  bus_arbiter dut (.*);

  // slave models
  for (genvar s = 0; s < NUM_SLAVES; s++) begin : g_slv
    logic          rv;
    logic [31:0]   rd;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin rv <= 1'b0; rd <= '0; end
      else begin
        rv <= s_req[s].req && !s_req[s].we && s_gnt_en[s];
        rd <= {8'(s), s_req[s].addr[23:0]};
      end
    end
    always_comb begin
      s_rsp[s]        = BUS_RSP_IDLE;
      s_rsp[s].gnt    = s_req[s].req && s_gnt_en[s];
      s_rsp[s].rvalid = rv;
      s_rsp[s].rdata  = rv ? rd : '0;
    end
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic bus_req_t rd(input logic [31:0] a);
    rd = BUS_REQ_IDLE; rd.req = 1'b1; rd.addr = a;
  endfunction
  function automatic bus_req_t wr(input logic [31:0] a, input logic [31:0] d);
    wr = BUS_REQ_IDLE; wr.req = 1'b1; wr.we = 1'b1; wr.addr = a; wr.wdata = d; wr.be = 4'hF;
  endfunction

  // expected counters
  int e_rd [2] = '{0, 0}, e_wr [2] = '{0, 0}, e_den [2] = '{0, 0}, e_st [2] = '{0, 0}, e_conf = 0, e_mden [2] = '{0, 0};

  initial begin
    repeat (200) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (s_gnt_en[s]) s_gnt_en[s] = 1'b1;
    m_req[0] = BUS_REQ_IDLE; m_req[1] = BUS_REQ_IDLE;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // 1. master 0 reads datamem0, master 1 reads datamem1 in the same cycle
    m_req[0] = rd(32'h0000_1234); m_req[1] = rd(32'h0010_0040);
    #1;
    check(m_rsp[0].gnt && m_rsp[1].gnt, "private memories granted together");
    check(s_req[0].req && s_req[0].addr == 32'h1234, "datamem0 gets displacement");
    check(s_req[1].req && s_req[1].addr == 32'h0040, "datamem1 gets displacement");
    e_rd[0]++; e_rd[1]++;
    @(negedge clk);
    m_req[0] = BUS_REQ_IDLE; m_req[1] = BUS_REQ_IDLE;
    #1;
    check(m_rsp[0].rvalid && m_rsp[0].rdata == 32'h0000_1234 && !m_rsp[0].err, "read data master 0");
    check(m_rsp[1].rvalid && m_rsp[1].rdata == 32'h0100_0040 && !m_rsp[1].err, "read data master 1");
    @(negedge clk);

    // 2. master 1 tries the memory reserved for master 0: error, no slave access
    m_req[1] = rd(32'h0000_0010);
    #1;
    check(m_rsp[1].gnt && !s_req[0].req, "reserved memory refused");
    @(negedge clk);
    m_req[1] = BUS_REQ_IDLE;
    #1;
    check(m_rsp[1].rvalid && m_rsp[1].err, "error answer on reserved read");
    @(negedge clk);

    // 3. unmapped write by master 0
    m_req[0] = wr(32'h0700_0000, 32'h1);
    #1;
    check(m_rsp[0].gnt && m_rsp[0].err, "unmapped write answered with err");
    for (int s = 0; s < NUM_SLAVES; s++) check(!s_req[s].req, "unmapped write reaches no slave");
    @(negedge clk);
    m_req[0] = BUS_REQ_IDLE;

    // 4. both masters write the multiplexer in one cycle: master 0 first
    m_req[0] = wr(32'h0A20_0000, 32'hAAAA_0000); m_req[1] = wr(32'h0A20_1000, 32'hBBBB_0000);
    #1;
    check(m_rsp[0].gnt && !m_rsp[1].gnt, "master 0 wins the arbitrated port");
    check(s_req[S_ARBPORT].wdata == 32'hAAAA_0000 && s_req[S_ARBPORT].addr == 32'h0, "mux sees master 0");
    e_wr[0]++; e_den[1]++; e_st[1]++; e_conf++; e_mden[1]++;
    @(negedge clk);
    m_req[0] = BUS_REQ_IDLE;
    #1;
    check(m_rsp[1].gnt && s_req[S_ARBPORT].wdata == 32'hBBBB_0000 && s_req[S_ARBPORT].addr == 32'h1000,
          "master 1 granted once master 0 is done");
    e_wr[1]++;
    @(negedge clk);
    m_req[1] = BUS_REQ_IDLE;

    // 5. both read shared datamem2 for three cycles: master 1 waits
    m_req[0] = rd(32'h0020_0000); m_req[1] = rd(32'h0020_0100);
    for (int i = 0; i < 3; i++) begin
      #1;
      check(m_rsp[0].gnt && !m_rsp[1].gnt, "priority on datamem2");
      e_rd[0]++; e_den[1]++; e_st[1]++; e_conf++;
      @(negedge clk);
      m_req[0] = rd(32'h0020_0000 + 32'(4 * (i + 1)));
    end
    m_req[0] = BUS_REQ_IDLE;
    #1;
    check(m_rsp[0].rvalid && m_rsp[0].rdata[31:24] == 8'd2, "master 0 read reached datamem2");
    check(m_rsp[1].gnt, "master 1 gets datamem2");
    e_rd[1]++;
    @(negedge clk);
    m_req[1] = BUS_REQ_IDLE;
    #1;
    check(m_rsp[1].rvalid && m_rsp[1].rdata == 32'h0200_0100, "master 1 read data from datamem2");
    @(negedge clk);

    // 6. different shared slaves in one cycle: no conflict
    m_req[0] = wr(32'h0030_0008, 32'h5); m_req[1] = wr(32'h0040_000C, 32'h6);
    #1;
    check(m_rsp[0].gnt && m_rsp[1].gnt && s_req[3].req && s_req[4].req, "datamem3 and datamem4 in parallel");
    e_wr[0]++; e_wr[1]++;
    @(negedge clk);
    m_req[0] = BUS_REQ_IDLE; m_req[1] = BUS_REQ_IDLE;

    // 7. a slave holding gnt low stalls the master (not a denial)
    s_gnt_en[S_ARBPORT] = 1'b0;
    m_req[1] = wr(32'h0A20_1000, 32'h7);
    for (int i = 0; i < 2; i++) begin
      #1; check(!m_rsp[1].gnt, "stalled by the slave"); e_st[1]++;
      @(negedge clk);
    end
    s_gnt_en[S_ARBPORT] = 1'b1;
    #1; check(m_rsp[1].gnt, "granted after slave ready"); e_wr[1]++;
    @(negedge clk);
    m_req[1] = BUS_REQ_IDLE;
    @(negedge clk);

    // statistics
    for (int m = 0; m < 2; m++) begin
      check(rd_cnt[m] == 32'(e_rd[m]), $sformatf("rd_cnt[%0d]=%0d exp %0d", m, rd_cnt[m], e_rd[m]));
      check(wr_cnt[m] == 32'(e_wr[m]), $sformatf("wr_cnt[%0d]=%0d exp %0d", m, wr_cnt[m], e_wr[m]));
      check(denied_cnt[m] == 32'(e_den[m]), $sformatf("denied_cnt[%0d]=%0d exp %0d", m, denied_cnt[m], e_den[m]));
      check(mux_denied_cnt[m] == 32'(e_mden[m]), $sformatf("mux_denied_cnt[%0d]=%0d exp %0d", m, mux_denied_cnt[m], e_mden[m]));
      check(stall_cnt[m] == 32'(e_st[m]), $sformatf("stall_cnt[%0d]=%0d exp %0d", m, stall_cnt[m], e_st[m]));
    end
    check(conflict_cnt == 32'(e_conf), $sformatf("conflict_cnt=%0d exp %0d", conflict_cnt, e_conf));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
