// Self-checking testbench of mem_dp.
//
// Port 1 fills the lower half and port 0 the upper half of a small instance in
// the same cycles, then both ports write the same words at once (port 0 must
// win, with byte enables honoured), and finally each port reads every word
// while the other reads a different one. A reference copy in the testbench
// gives the expected data; the one-cycle read latency is checked too.
module tb_mem_dp;
  import soc_pkg::*;

  localparam int unsigned WORDS = 64;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  bus_req_t req0, req1;
  bus_rsp_t rsp0, rsp1;
  logic [31:0] ref_mem [WORDS];
  int checks = 0, failures = 0;

  mem_dp #(.WORDS(WORDS)) dut (.*);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic bus_req_t wr(input int i, input logic [31:0] d, input logic [3:0] be);
    wr = BUS_REQ_IDLE; wr.req = 1'b1; wr.we = 1'b1; wr.addr = 32'(4 * i); wr.wdata = d; wr.be = be;
  endfunction
  function automatic bus_req_t rd(input int i);
    rd = BUS_REQ_IDLE; rd.req = 1'b1; rd.addr = 32'(4 * i);
  endfunction

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    req0 = BUS_REQ_IDLE; req1 = BUS_REQ_IDLE;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < WORDS / 2; i++) begin
      @(negedge clk);
      req1 = wr(i, $urandom, 4'hF);
      req0 = wr(i + WORDS / 2, $urandom, 4'hF);
      ref_mem[i] = req1.wdata;
      ref_mem[i + WORDS / 2] = req0.wdata;
      #1 check(rsp0.gnt && rsp1.gnt, "both writes granted");
    end
    // collisions: port 0 wins on the bytes it writes
    for (int i = 0; i < 8; i++) begin
      @(negedge clk);
      req1 = wr(3 * i, $urandom, 4'hF);
      req0 = wr(3 * i, $urandom, 4'($urandom | 1));
      for (int b = 0; b < 4; b++)
        ref_mem[3 * i][8*b +: 8] = req0.be[b] ? req0.wdata[8*b +: 8] : req1.wdata[8*b +: 8];
    end
    @(negedge clk);
    req0 = BUS_REQ_IDLE; req1 = BUS_REQ_IDLE;
    for (int i = 0; i < WORDS; i++) begin
      @(negedge clk);
      req0 = rd(i);
      req1 = rd(WORDS - 1 - i);
      @(negedge clk);
      req0 = BUS_REQ_IDLE; req1 = BUS_REQ_IDLE;
      #1;
      check(rsp0.rvalid && rsp0.rdata == ref_mem[i],
            $sformatf("port 0 word %0d read %h exp %h", i, rsp0.rdata, ref_mem[i]));
      check(rsp1.rvalid && rsp1.rdata == ref_mem[WORDS - 1 - i],
            $sformatf("port 1 word %0d", WORDS - 1 - i));
      @(negedge clk);
      #1 check(!rsp0.rvalid && !rsp1.rvalid, "rvalid lasts one cycle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
