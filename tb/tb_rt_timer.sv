// Self-checking testbench of rt_timer.
//
// A 10-cycle instance is enabled for 35 cycles, paused, and enabled again.
// Every cycle the testbench compares activate with its own model: a pulse in
// the first enabled cycle and then every PERIOD cycles, restarting after a
// pause. It also checks the pulse count.
module tb_rt_timer;
  localparam int unsigned PERIOD = 10;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        enable, activate;
  logic [31:0] frame_cnt;
  int checks = 0, failures = 0;
  int since, pulses;

  rt_timer #(.PERIOD(PERIOD)) dut (.*);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference: cycles since enable rose
  initial begin
    enable = 1'b0;
    pulses = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int phase = 0; phase < 2; phase++) begin
      @(negedge clk);
      enable = 1'b1;
      since  = 0;
      repeat (phase == 0 ? 35 : 42) begin
        #1;
        check(activate == (since % PERIOD == 0), $sformatf("activate at cycle %0d", since));
        if (since % PERIOD == 0) pulses++;
        @(negedge clk);
        since++;
      end
      enable = 1'b0;
      repeat (7) begin
        #1 check(!activate, "no pulse while disabled");
        @(negedge clk);
      end
    end
    check(frame_cnt == 32'(pulses), $sformatf("frame_cnt %0d exp %0d", frame_cnt, pulses));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
