// Self-checking testbench of cache.
//
// Runs a small data-cache shape (4-way, round-robin) and a small
// instruction-cache shape (direct mapped, read misses only) side by side, each against its own
// bus memory and reference model (tb_cache_port).
module tb_cache;
  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = ~clk;

  int   c4, f4, c1, f1;
  logic d4, d1;

  tb_cache_port #(.CACHE_BYTES(256), .WAYS(4), .LINE_BYTES(16), .SEED(11)) u_dcache (
    .clk, .rst_n, .checks(c4), .failures(f4), .done(d4));
  tb_cache_port #(.CACHE_BYTES(128), .WAYS(1), .LINE_BYTES(32), .WRITE_MISSES(1'b0), .SEED(12)) u_icache (
    .clk, .rst_n, .checks(c1), .failures(f1), .done(d1));

  initial begin
    repeat (200000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", c4 + c1, f4 + f1 + 1);
    $finish;
  end

  initial begin
    #1 rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (d4 && d1);
    $display("TB_RESULT checks=%0d failures=%0d", c4 + c1, f4 + f1);
    $finish;
  end
endmodule
