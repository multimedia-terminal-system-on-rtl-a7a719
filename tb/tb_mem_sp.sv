// Self-checking testbench of mem_sp.
//
// Writes a pseudo-random pattern with random byte enables into a small
// instance, keeps a reference copy in the testbench and reads every word back,
// checking the data and the one-cycle read latency (rvalid exactly one cycle
// after the grant, never otherwise).
module tb_mem_sp;
  import soc_pkg::*;

  localparam int unsigned WORDS = 64;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  bus_req_t req;
  bus_rsp_t rsp;
  logic [31:0] ref_mem [WORDS];
  int checks = 0, failures = 0;

  mem_sp #(.WORDS(WORDS)) dut (.*);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    req = BUS_REQ_IDLE;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // full-word fill
    for (int i = 0; i < WORDS; i++) begin
      @(negedge clk);
      req = BUS_REQ_IDLE; req.req = 1'b1; req.we = 1'b1;
      req.addr = 32'(4 * i); req.wdata = $urandom; req.be = 4'hF;
      ref_mem[i] = req.wdata;
      #1 check(rsp.gnt, "write granted");
    end
    // partial writes
    for (int n = 0; n < 100; n++) begin
      int i;
      i = $urandom_range(WORDS - 1);
      @(negedge clk);
      req = BUS_REQ_IDLE; req.req = 1'b1; req.we = 1'b1;
      req.addr = 32'(4 * i); req.wdata = $urandom; req.be = 4'($urandom);
      for (int b = 0; b < 4; b++) if (req.be[b]) ref_mem[i][8*b +: 8] = req.wdata[8*b +: 8];
    end
    @(negedge clk);
    req = BUS_REQ_IDLE;
    #1 check(!rsp.rvalid, "no read data after a write");
    // read back
    for (int i = 0; i < WORDS; i++) begin
      @(negedge clk);
      req = BUS_REQ_IDLE; req.req = 1'b1; req.addr = 32'(4 * i);
      #1 check(rsp.gnt, "read granted");
      @(negedge clk);
      req = BUS_REQ_IDLE;
      #1 check(rsp.rvalid && rsp.rdata == ref_mem[i],
               $sformatf("word %0d read %h exp %h", i, rsp.rdata, ref_mem[i]));
      @(negedge clk);
      #1 check(!rsp.rvalid, "rvalid lasts one cycle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
