// End-to-end testbench of av_terminal_soc at reduced sizes.
//
// Small memories, frame periods of a few hundred cycles, 8 audio bytes and a
// 32-byte video limit, so that eight audio frames run in a few thousand
// cycles. The video period is shorter than the audio period and the video
// frames are large against the limit, so overflow swaps occur; the MUX
// receiver is slow, so frames stay in flight, video writes are held off and
// audio interrupts have to wait. Both cores begin every frame by reading the
// multiplexer status; their timers fire together at the start and again every
// 3500 cycles, so the arbiter has to resolve conflicts on the multiplexer port.
// All checks are in tb_soc_harness.
module tb_av_terminal_soc;
  import soc_pkg::*;

  localparam int AUDIO_BYTES = 8;
  localparam int VIDEO_MAX   = 32;

  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = ~clk;

  logic run, int_audio, int_video, mux_valid, mux_sof, mux_eof, mux_ready;
  logic [7:0] mux_data;
  bus_req_t core_dreq [NUM_MASTERS], core_ireq [NUM_MASTERS], dm4_req;
  bus_rsp_t core_drsp [NUM_MASTERS], core_irsp [NUM_MASTERS], dm4_rsp;
  logic core_activate [NUM_MASTERS];
  logic ld_valid [2], ld_last [2], ld_ready [2], ld_done [2];
  logic [31:0] ld_data [2], ld_words [2];
  logic [31:0] bus_rd_cnt [NUM_MASTERS], bus_wr_cnt [NUM_MASTERS];
  logic [31:0] bus_denied_cnt [NUM_MASTERS], bus_mux_denied_cnt [NUM_MASTERS], bus_stall_cnt [NUM_MASTERS], frames_acquired [NUM_MASTERS];
  logic [31:0] bus_conflict_cnt, mux_frame_cnt, mux_audio_swap_cnt, mux_video_swap_cnt;
  logic [31:0] mux_video_int_cnt, mux_hold_cnt;
  logic [31:0] icache_access_cnt [NUM_MASTERS], icache_miss_cnt [NUM_MASTERS];
  logic [31:0] dcache_access_cnt [NUM_MASTERS], dcache_miss_cnt [NUM_MASTERS];
  int checks, failures, pending_cycles = 0;

  av_terminal_soc #(
    .MEM_WORDS(1024), .PROG_WORDS(64), .AUDIO_PERIOD(700), .VIDEO_PERIOD(500),
    .AUDIO_BYTES(AUDIO_BYTES), .VIDEO_MAX_BYTES(VIDEO_MAX)
  ) dut (.*);

  tb_soc_harness #(
    .AUDIO_BYTES(AUDIO_BYTES), .VIDEO_MAX(VIDEO_MAX), .AIN(8), .VIN(16), .NA(8), .NV(12),
    .VMIN(8), .VSPAN(37), .READY_PCT(25), .NEED_ALL(1'b1)
  ) harness (.*, .bus_side(dut.bus_m_req));

  always @(posedge clk) if (dut.u_mux.audio_pending) pending_cycles++;

  initial begin
    #1 rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
