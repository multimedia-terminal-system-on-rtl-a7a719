// Self-checking testbench of memloader.
//
// Two instances: one ends on src_last, one on its MAX_WORDS limit. A bus
// slave model records every write. The source offers words with random gaps;
// the testbench checks that every word lands at START_ADDR + 4*i with all byte
// enables set, that done rises after the last word, and that nothing is
// written or accepted after that.
module tb_memloader;
  import soc_pkg::*;

  localparam logic [31:0] START = 32'h0000_0100;
  localparam int unsigned N     = 20;
  localparam int unsigned LIMIT = 6;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        src_valid [2], src_last [2], src_ready [2], done [2];
  logic [31:0] src_data [2], words_loaded [2];
  bus_req_t    mem_req [2];
  bus_rsp_t    mem_rsp [2];
  logic        slave_ready;

  int checks = 0, failures = 0;
  int nwr [2] = '{0, 0};

  memloader #(.START_ADDR(START), .MAX_WORDS(1024)) dut0 (
    .clk, .rst_n, .src_valid(src_valid[0]), .src_data(src_data[0]), .src_last(src_last[0]),
    .src_ready(src_ready[0]), .mem_req(mem_req[0]), .mem_rsp(mem_rsp[0]),
    .done(done[0]), .words_loaded(words_loaded[0]));
  memloader #(.START_ADDR('0), .MAX_WORDS(LIMIT)) dut1 (
    .clk, .rst_n, .src_valid(src_valid[1]), .src_data(src_data[1]), .src_last(src_last[1]),
    .src_ready(src_ready[1]), .mem_req(mem_req[1]), .mem_rsp(mem_rsp[1]),
    .done(done[1]), .words_loaded(words_loaded[1]));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [31:0] word(input int k, input int i);
    word = 32'hA5000000 ^ (32'(k) << 20) ^ (32'(i) * 32'h9E37);
  endfunction

  // slave models: sometimes not ready, check each granted write
  for (genvar k = 0; k < 2; k++) begin : g_slv
    always_comb begin
      mem_rsp[k]     = BUS_RSP_IDLE;
      mem_rsp[k].gnt = mem_req[k].req && slave_ready;
    end
    always @(posedge clk) if (rst_n && mem_req[k].req && mem_rsp[k].gnt) begin
      check(mem_req[k].we && mem_req[k].be == 4'hF, "full-word write");
      check(mem_req[k].addr == ((k == 0) ? START : 32'h0) + 32'(4 * nwr[k]),
            $sformatf("loader %0d address %h", k, mem_req[k].addr));
      check(mem_req[k].wdata == word(k, nwr[k]), $sformatf("loader %0d data word %0d", k, nwr[k]));
      nwr[k]++;
    end
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // sources
  for (genvar k = 0; k < 2; k++) begin : g_src
    initial begin
      int i;
      i = 0;
      src_valid[k] = 1'b0; src_last[k] = 1'b0; src_data[k] = '0;
      @(posedge rst_n);
      while (i < N) begin
        @(negedge clk);
        src_valid[k] = ($urandom_range(3) != 0);
        src_data[k]  = word(k, i);
        src_last[k]  = (k == 0) && (i == N - 1);
        #1;
        if (src_valid[k] && src_ready[k]) i++;
      end
      @(negedge clk);
      src_valid[k] = 1'b0;
    end
  end

  initial begin
    slave_ready = 1'b1;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    fork
      forever begin @(negedge clk); slave_ready = ($urandom_range(4) != 0); end
    join_none
    repeat (300) @(posedge clk);
    check(done[0] && nwr[0] == N && words_loaded[0] == N, $sformatf("loader 0 wrote %0d words", nwr[0]));
    check(done[1] && nwr[1] == LIMIT && words_loaded[1] == LIMIT,
          $sformatf("loader 1 stopped at its limit after %0d words", nwr[1]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
