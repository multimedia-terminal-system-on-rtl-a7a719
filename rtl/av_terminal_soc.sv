// Audio-video multimedia terminal SoC, everything around the two coder cores.
//
// Two VLIW DSP cores, one coding speech (G.723, master 0) and one coding video
// (H.263, master 1), share a bus arbiter that connects them to four data
// memories and to the audio-video multiplexer. Each core also has its own
// program memory. The cores are not part of this RTL: their data-bus port,
// their program-memory port, their frame-start (activate) inputs and their
// end-of-frame interrupts are ports of this module. Each core's data port
// passes through its data cache (32 kB, 4-way, round-robin) and each program
// port through its instruction cache (32 kB, direct mapped), as in the
// evaluated core configuration. The multiplexer region is not cached.
//
//   arbiter slave 0  datamem0, reserved for the audio core   0x00000000
//   arbiter slave 1  datamem1, reserved for the video core   0x00100000
//   arbiter slave 2  datamem2, audio input samples           0x00200000
//   arbiter slave 3  datamem3, video input samples           0x00300000
//   arbiter slave 4  free shared port, brought out (dm4_*)   0x00400000
//   arbitrated port  multiplexer                             0x0A200000
//
// Before coding starts, two memory loaders fill datamem2 and datamem3 with
// the media samples through the memories' second port (ld_*). Once run is
// high and both loaders are done, two real-time timers pulse the cores'
// activate inputs once per frame period (30 ms audio, 40 ms video at the
// 250 MHz core clock) to emulate real-time acquisition. The cores read their
// samples, write the coded bytes into the multiplexer and raise their
// interrupts; the audio interrupt makes the multiplexer emit one MUX-frame on
// the byte stream mux_*. The arbiter's access statistics and the
// multiplexer's counters are brought out as ports.
//
// The block structure and connections follow the two system diagrams of the
// design description, as do the 30 ms audio period, the 250 MHz clock and the
// multiplexer base address. The memory sizes, the video period, the start
// addresses of the loaders and the run/done start-up sequence are choices made
// here.
module av_terminal_soc
  import soc_pkg::*;
#(
  parameter int unsigned   MEM_WORDS       = 262144,   // each data memory, 32-bit words
  parameter int unsigned   PROG_WORDS      = 262144,   // each program memory, 32-bit words
  parameter int unsigned   AUDIO_PERIOD    = 7500000,  // 30 ms at 250 MHz
  parameter int unsigned   VIDEO_PERIOD    = 10000000, // 40 ms at 250 MHz
  parameter int unsigned   AUDIO_BYTES     = 24,
  parameter int unsigned   VIDEO_MAX_BYTES = 224,
  parameter logic [AW-1:0] AUDIO_START     = '0,       // loader start address in datamem2
  parameter logic [AW-1:0] VIDEO_START     = '0,       // loader start address in datamem3
  parameter int unsigned   ICACHE_BYTES    = 32768,    // per core, direct mapped
  parameter int unsigned   DCACHE_BYTES    = 32768,    // per core
  parameter int unsigned   DCACHE_WAYS     = 4,
  parameter int unsigned   LINE_BYTES      = 32        // both caches
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          run,
  // cores: data bus, program memory, frame start, end-of-frame interrupts
  input  bus_req_t      core_dreq [NUM_MASTERS],
  output bus_rsp_t      core_drsp [NUM_MASTERS],
  input  bus_req_t      core_ireq [NUM_MASTERS],
  output bus_rsp_t      core_irsp [NUM_MASTERS],
  output logic          core_activate [NUM_MASTERS],
  input  logic          int_audio,
  input  logic          int_video,
  // media sample streams for the memory loaders (0 audio, 1 video)
  input  logic          ld_valid [2],
  input  logic [DW-1:0] ld_data  [2],
  input  logic          ld_last  [2],
  output logic          ld_ready [2],
  output logic          ld_done  [2],
  output logic [31:0]   ld_words [2],     // words written by each loader
  // free shared slave port of the arbiter
  output bus_req_t      dm4_req,
  input  bus_rsp_t      dm4_rsp,
  // MUX stream
  output logic          mux_valid,
  output logic [7:0]    mux_data,
  output logic          mux_sof,
  output logic          mux_eof,
  input  logic          mux_ready,
  // statistics
  output logic [31:0]   bus_rd_cnt     [NUM_MASTERS],
  output logic [31:0]   bus_wr_cnt     [NUM_MASTERS],
  output logic [31:0]   bus_denied_cnt [NUM_MASTERS],
  output logic [31:0]   bus_stall_cnt  [NUM_MASTERS],
  output logic [31:0]   bus_mux_denied_cnt [NUM_MASTERS],
  output logic [31:0]   bus_conflict_cnt,
  output logic [31:0]   icache_access_cnt [NUM_MASTERS],
  output logic [31:0]   icache_miss_cnt   [NUM_MASTERS],
  output logic [31:0]   dcache_access_cnt [NUM_MASTERS],
  output logic [31:0]   dcache_miss_cnt   [NUM_MASTERS],
  output logic [31:0]   frames_acquired [NUM_MASTERS],
  output logic [31:0]   mux_frame_cnt,
  output logic [31:0]   mux_audio_swap_cnt,
  output logic [31:0]   mux_video_swap_cnt,
  output logic [31:0]   mux_video_int_cnt,
  output logic [31:0]   mux_hold_cnt
);

  bus_req_t s_req [NUM_SLAVES];
  bus_rsp_t s_rsp [NUM_SLAVES];
  bus_req_t ld_req [2];
  bus_rsp_t ld_rsp [2];
  logic        timers_on;
  bus_req_t bus_m_req [NUM_MASTERS];   // data caches to the arbiter
  bus_rsp_t bus_m_rsp [NUM_MASTERS];
  bus_req_t prog_req [NUM_MASTERS];    // instruction caches to the program memories
  bus_rsp_t prog_rsp [NUM_MASTERS];

  for (genvar m = 0; m < NUM_MASTERS; m++) begin : g_caches
    cache #(.CACHE_BYTES(DCACHE_BYTES), .WAYS(DCACHE_WAYS), .LINE_BYTES(LINE_BYTES)) u_dcache (
      .clk, .rst_n, .c_req(core_dreq[m]), .c_rsp(core_drsp[m]), .m_req(bus_m_req[m]), .m_rsp(bus_m_rsp[m]),
      .access_cnt(dcache_access_cnt[m]), .miss_cnt(dcache_miss_cnt[m]));
    cache #(.CACHE_BYTES(ICACHE_BYTES), .WAYS(1), .LINE_BYTES(LINE_BYTES), .WRITE_MISSES(1'b0)) u_icache (
      .clk, .rst_n, .c_req(core_ireq[m]), .c_rsp(core_irsp[m]), .m_req(prog_req[m]), .m_rsp(prog_rsp[m]),
      .access_cnt(icache_access_cnt[m]), .miss_cnt(icache_miss_cnt[m]));
  end

  bus_arbiter #(.CNT_W(32)) u_arbiter (
    .clk, .rst_n,
    .m_req (bus_m_req), .m_rsp (bus_m_rsp),
    .s_req, .s_rsp,
    .rd_cnt (bus_rd_cnt), .wr_cnt (bus_wr_cnt),
    .denied_cnt (bus_denied_cnt), .stall_cnt (bus_stall_cnt), .mux_denied_cnt (bus_mux_denied_cnt),
    .conflict_cnt (bus_conflict_cnt)
  );

  // reserved data memories
  mem_sp #(.WORDS(MEM_WORDS)) u_datamem0 (.clk, .rst_n, .req(s_req[S_DATAMEM0]), .rsp(s_rsp[S_DATAMEM0]));
  mem_sp #(.WORDS(MEM_WORDS)) u_datamem1 (.clk, .rst_n, .req(s_req[S_DATAMEM1]), .rsp(s_rsp[S_DATAMEM1]));

  // input-data memories with their loaders
  mem_dp #(.WORDS(MEM_WORDS)) u_datamem2 (.clk, .rst_n,
    .req0(s_req[S_DATAMEM2]), .rsp0(s_rsp[S_DATAMEM2]), .req1(ld_req[0]), .rsp1(ld_rsp[0]));
  mem_dp #(.WORDS(MEM_WORDS)) u_datamem3 (.clk, .rst_n,
    .req0(s_req[S_DATAMEM3]), .rsp0(s_rsp[S_DATAMEM3]), .req1(ld_req[1]), .rsp1(ld_rsp[1]));

  memloader #(.START_ADDR(AUDIO_START), .MAX_WORDS(MEM_WORDS)) u_memloader0 (
    .clk, .rst_n, .src_valid(ld_valid[0]), .src_data(ld_data[0]), .src_last(ld_last[0]),
    .src_ready(ld_ready[0]), .mem_req(ld_req[0]), .mem_rsp(ld_rsp[0]),
    .done(ld_done[0]), .words_loaded(ld_words[0]));
  memloader #(.START_ADDR(VIDEO_START), .MAX_WORDS(MEM_WORDS)) u_memloader1 (
    .clk, .rst_n, .src_valid(ld_valid[1]), .src_data(ld_data[1]), .src_last(ld_last[1]),
    .src_ready(ld_ready[1]), .mem_req(ld_req[1]), .mem_rsp(ld_rsp[1]),
    .done(ld_done[1]), .words_loaded(ld_words[1]));

  // free shared port
  assign dm4_req = s_req[S_DATAMEM4];
  assign s_rsp[S_DATAMEM4] = dm4_rsp;

  // multiplexer on the arbitrated port
  av_mux #(.AUDIO_BYTES(AUDIO_BYTES), .VIDEO_MAX_BYTES(VIDEO_MAX_BYTES)) u_mux (
    .clk, .rst_n,
    .req(s_req[S_ARBPORT]), .rsp(s_rsp[S_ARBPORT]),
    .int_audio, .int_video,
    .out_valid(mux_valid), .out_data(mux_data), .out_sof(mux_sof), .out_eof(mux_eof),
    .out_ready(mux_ready),
    .frame_cnt(mux_frame_cnt), .audio_swap_cnt(mux_audio_swap_cnt),
    .video_swap_cnt(mux_video_swap_cnt), .video_int_cnt(mux_video_int_cnt),
    .hold_cnt(mux_hold_cnt)
  );

  // program memories
  mem_sp #(.WORDS(PROG_WORDS)) u_progmem0 (.clk, .rst_n, .req(prog_req[0]), .rsp(prog_rsp[0]));
  mem_sp #(.WORDS(PROG_WORDS)) u_progmem1 (.clk, .rst_n, .req(prog_req[1]), .rsp(prog_rsp[1]));

  // real-time acquisition timers
  assign timers_on = run && ld_done[0] && ld_done[1];

  rt_timer #(.PERIOD(AUDIO_PERIOD)) u_timer0 (
    .clk, .rst_n, .enable(timers_on), .activate(core_activate[0]), .frame_cnt(frames_acquired[0]));
  rt_timer #(.PERIOD(VIDEO_PERIOD)) u_timer1 (
    .clk, .rst_n, .enable(timers_on), .activate(core_activate[1]), .frame_cnt(frames_acquired[1]));

endmodule
