// Bus arbiter of the audio-video terminal SoC.
//
// Connects the two core masters (master 0 = audio coder, master 1 = video
// coder) to six slave ports: datamem0..datamem4 and the arbitrated port that
// carries the multiplexer. A request is routed by its address region
// (addr[31:20]); the slave sees only the displacement inside its 1 MiB window.
// datamem0 is reserved for master 0 and datamem1 for master 1; datamem2..4 and
// the arbitrated port are shared. When both masters request the same shared
// slave in one cycle, master 0 (audio) wins and master 1 is denied and must
// hold its request, which stalls it. A request to an address outside the map,
// or to the other master's reserved memory, is granted at once with err set
// (reads also return err with rvalid and zero data one cycle later).
//
// Handshake (two phases, "access request" then "check for grant"): the master
// raises req with we/addr/wdata/be and holds them until gnt is seen in the
// same cycle. Read data comes back with rvalid exactly one cycle after the
// grant; slaves must answer reads with that fixed latency. The arbiter is
// combinational in the request path and registers only the read-return route.
//
// Statistics, as the design description asks for: per master the granted
// reads and writes, the cycles denied by a collision on a shared slave and the
// cycles stalled for any reason (denied, or the slave holding gnt low), and
// the denials on the arbitrated port alone (the "bus accesses denied" figure,
// conflicts on the shared multiplexer); and the number of cycles in which both
// masters asked for the same shared slave.
// Routing, priority, reservation and the statistics follow the description;
// the address map, the error answer and the counter widths are choices made here.
module bus_arbiter
  import soc_pkg::*;
#(
  parameter int unsigned CNT_W = 32
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  bus_req_t               m_req [NUM_MASTERS],
  output bus_rsp_t               m_rsp [NUM_MASTERS],
  output bus_req_t               s_req [NUM_SLAVES],
  input  bus_rsp_t               s_rsp [NUM_SLAVES],
  output logic [CNT_W-1:0]       rd_cnt     [NUM_MASTERS],
  output logic [CNT_W-1:0]       wr_cnt     [NUM_MASTERS],
  output logic [CNT_W-1:0]       denied_cnt [NUM_MASTERS],
  output logic [CNT_W-1:0]       stall_cnt  [NUM_MASTERS],
  output logic [CNT_W-1:0]       mux_denied_cnt [NUM_MASTERS],
  output logic [CNT_W-1:0]       conflict_cnt
);

  localparam int unsigned SW = $clog2(NUM_SLAVES);

  logic [SW-1:0] sel     [NUM_MASTERS];  // decoded slave of each master
  logic          sel_ok  [NUM_MASTERS];  // address maps to a slave this master may use
  logic          win     [NUM_MASTERS];  // master owns its slave this cycle
  logic          gnt     [NUM_MASTERS];
  logic          denied  [NUM_MASTERS];
  logic          conflict;

  // Address decode
  always_comb begin
    for (int m = 0; m < NUM_MASTERS; m++) begin
      logic [AW-WIN_BITS-1:0] region;
      region    = m_req[m].addr[AW-1:WIN_BITS];
      sel[m]    = '0;
      sel_ok[m] = 1'b0;
      if (region == MUX_REGION) begin
        sel[m]    = SW'(S_ARBPORT);
        sel_ok[m] = 1'b1;
      end else if (region <= (AW-WIN_BITS)'(S_DATAMEM4)) begin
        sel[m] = SW'(region);
        // reserved memories: datamem0 only for master 0, datamem1 only for master 1
        sel_ok[m] = !((region == (AW-WIN_BITS)'(S_DATAMEM0) && m != 0) ||
                      (region == (AW-WIN_BITS)'(S_DATAMEM1) && m != 1));
      end
    end
  end

  // Fixed priority: master 0 first. Master 1 loses only if master 0 wants the same slave.
  always_comb begin
    conflict = m_req[0].req && sel_ok[0] && m_req[1].req && sel_ok[1] && (sel[0] == sel[1]);
    win[0]    = m_req[0].req && sel_ok[0];
    win[1]    = m_req[1].req && sel_ok[1] && !conflict;
    denied[0] = 1'b0;
    denied[1] = conflict;
  end

  // Slave request mux
  always_comb begin
    for (int s = 0; s < NUM_SLAVES; s++) begin
      s_req[s] = BUS_REQ_IDLE;
      for (int m = NUM_MASTERS - 1; m >= 0; m--) begin
        if (win[m] && sel[m] == SW'(s)) begin
          s_req[s]      = m_req[m];
          s_req[s].addr = {{(AW-WIN_BITS){1'b0}}, m_req[m].addr[WIN_BITS-1:0]};
        end
      end
    end
  end

  // Read-return routing: one cycle after a granted read
  logic          pend_rd  [NUM_MASTERS];
  logic          pend_err [NUM_MASTERS];
  logic [SW-1:0] pend_sel [NUM_MASTERS];

  always_comb begin
    for (int m = 0; m < NUM_MASTERS; m++) begin
      gnt[m] = m_req[m].req && (sel_ok[m] ? (win[m] && s_rsp[sel[m]].gnt) : 1'b1);
      m_rsp[m].gnt    = gnt[m];
      m_rsp[m].rvalid = 1'b0;
      m_rsp[m].err    = 1'b0;
      m_rsp[m].rdata  = '0;
      if (pend_rd[m]) begin
        if (pend_err[m]) begin
          m_rsp[m].rvalid = 1'b1;
          m_rsp[m].err    = 1'b1;
        end else begin
          m_rsp[m].rvalid = s_rsp[pend_sel[m]].rvalid;
          m_rsp[m].err    = s_rsp[pend_sel[m]].err;
          m_rsp[m].rdata  = s_rsp[pend_sel[m]].rdata;
        end
      end else if (gnt[m] && !sel_ok[m] && m_req[m].we) begin
        m_rsp[m].err = 1'b1;   // write to an unmapped or reserved address
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int m = 0; m < NUM_MASTERS; m++) begin
        pend_rd[m]    <= 1'b0;
        pend_err[m]   <= 1'b0;
        pend_sel[m]   <= '0;
        rd_cnt[m]     <= '0;
        wr_cnt[m]     <= '0;
        denied_cnt[m] <= '0;
        stall_cnt[m]  <= '0;
        mux_denied_cnt[m] <= '0;
      end
      conflict_cnt <= '0;
    end else begin
      for (int m = 0; m < NUM_MASTERS; m++) begin
        pend_rd[m]  <= gnt[m] && !m_req[m].we;
        pend_err[m] <= !sel_ok[m];
        pend_sel[m] <= sel[m];
        if (gnt[m] && sel_ok[m] && !m_req[m].we) rd_cnt[m] <= rd_cnt[m] + 1'b1;
        if (gnt[m] && sel_ok[m] &&  m_req[m].we) wr_cnt[m] <= wr_cnt[m] + 1'b1;
        if (denied[m])                           denied_cnt[m] <= denied_cnt[m] + 1'b1;
        if (m_req[m].req && !gnt[m])             stall_cnt[m]  <= stall_cnt[m] + 1'b1;
        if (denied[m] && sel[m] == SW'(S_ARBPORT)) mux_denied_cnt[m] <= mux_denied_cnt[m] + 1'b1;
      end
      if (conflict) conflict_cnt <= conflict_cnt + 1'b1;
    end
  end

  // Handshake rules
  for (genvar m = 0; m < NUM_MASTERS; m++) begin : g_chk
    // a master that was not granted keeps its request unchanged
    a_hold: assert property (@(posedge clk) disable iff (!rst_n)
      (m_req[m].req && !gnt[m]) |=> (m_req[m].req && $stable(m_req[m].addr) && $stable(m_req[m].we)))
      else $error("master %0d dropped or changed an ungranted request", m);
  end
  for (genvar s = 0; s < NUM_SLAVES; s++) begin : g_schk
    // read data only in the cycle after a granted read
    a_rvalid: assert property (@(posedge clk) disable iff (!rst_n)
      s_rsp[s].rvalid |-> $past(s_req[s].req && !s_req[s].we && s_rsp[s].gnt))
      else $error("slave %0d returned unrequested read data", s);
  end

endmodule
