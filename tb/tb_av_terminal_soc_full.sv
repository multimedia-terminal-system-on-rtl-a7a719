// Full-size testbench of av_terminal_soc: every parameter at its default,
// running the whole case-study workload of the terminal.
//
// 1 MiB memories, 30 ms audio and 40 ms video periods at 250 MHz
// (7,500,000 and 10,000,000 cycles), 24 audio bytes and a 224-byte video
// limit. The loaders fill 28 G.723 frames of 240 16-bit samples (120 words
// each) and 20 QCIF 4:2:0 video frames (176x144x1.5 bytes = 9504 words each,
// 760,320 bytes). The audio core codes a frame every 7.5 million cycles, the
// video core one every 10 million; the run ends after the 28th audio frame
// has been multiplexed, about 203 million cycles (0.81 s of chip time), which
// takes a few minutes of simulation. Video frames code to 100..299 bytes
// against the 224-byte limit, so overflow swaps occur as well. All checks are
// in tb_soc_harness; write hold-off and waiting interrupts need a slow
// stream and are exercised by the reduced-size testbench.
module tb_av_terminal_soc_full;
  import soc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b1;
  always #2 clk = ~clk;   // 250 MHz

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

  av_terminal_soc dut (.*);

  tb_soc_harness #(
    .AUDIO_BYTES(24), .VIDEO_MAX(224), .AIN(120), .VIN(9504), .NA(28), .NV(20),
    .VMIN(100), .VSPAN(200), .READY_PCT(50), .NEED_ALL(1'b0)
  ) harness (.*, .bus_side(dut.bus_m_req));

  always @(posedge clk) if (dut.u_mux.audio_pending) pending_cycles++;

  initial begin
    #1 rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
  end

  initial begin
    repeat (260_000_000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
