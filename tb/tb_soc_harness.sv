// Test harness around av_terminal_soc, shared by the system testbenches.
//
// Plays everything outside the SoC: the two memory-loader sample streams
// (with random gaps), the two coder cores (tb_core_model), a slave on the
// free datamem4 port and the receiver of the MUX stream, which is throttled
// at random so that frames stay in flight for a while.
//
// The stream checker parses every MUX-frame and checks, against values
// computed from the sample hash alone: the start-of-frame pattern, that the
// size field equals the bytes received, that the table index matches the
// contents, that the audio bytes of the k-th audio frame are those of audio
// frame k, and that the video bytes of all frames, joined, are the coded video
// frames in order with nothing lost or repeated. The run ends once the audio
// core has coded NA frames and the stream is quiet; then the counters of the
// SoC are compared with what the harness saw. Each mechanism it names is
// counted and must have happened at least once.
module tb_soc_harness
  import soc_pkg::*;
  import tb_media_pkg::*;
#(
  parameter int AUDIO_BYTES = 8,
  parameter int VIDEO_MAX   = 32,
  parameter int AIN         = 8,     // input words per audio frame
  parameter int VIN         = 16,    // input words per video frame
  parameter int NA          = 8,     // audio frames to code
  parameter int NV          = 12,    // video frames loaded
  parameter int VMIN        = 8,
  parameter int VSPAN       = 37,
  parameter int READY_PCT   = 30,    // percent of cycles the MUX receiver is ready
  parameter int GAP_MAX     = 2,     // random idle cycles between core accesses
  parameter bit NEED_ALL    = 1'b1   // every mechanism must occur
) (
  input  logic          clk,
  input  logic          rst_n,
  output logic          run,
  output bus_req_t      core_dreq [NUM_MASTERS],
  input  bus_rsp_t      core_drsp [NUM_MASTERS],
  output bus_req_t      core_ireq [NUM_MASTERS],
  input  bus_rsp_t      core_irsp [NUM_MASTERS],
  input  logic          core_activate [NUM_MASTERS],
  output logic          int_audio,
  output logic          int_video,
  output logic          ld_valid [2],
  output logic [DW-1:0] ld_data  [2],
  output logic          ld_last  [2],
  input  logic          ld_ready [2],
  input  logic          ld_done  [2],
  input  logic [31:0]   ld_words [2],
  input  bus_req_t      dm4_req,
  output bus_rsp_t      dm4_rsp,
  input  logic          mux_valid,
  input  logic [7:0]    mux_data,
  input  logic          mux_sof,
  input  logic          mux_eof,
  output logic          mux_ready,
  input  logic [31:0]   bus_rd_cnt     [NUM_MASTERS],
  input  logic [31:0]   bus_wr_cnt     [NUM_MASTERS],
  input  logic [31:0]   bus_denied_cnt [NUM_MASTERS],
  input  logic [31:0]   bus_stall_cnt  [NUM_MASTERS],
  input  logic [31:0]   bus_mux_denied_cnt [NUM_MASTERS],
  input  logic [31:0]   bus_conflict_cnt,
  input  logic [31:0]   icache_access_cnt [NUM_MASTERS],
  input  logic [31:0]   icache_miss_cnt   [NUM_MASTERS],
  input  logic [31:0]   dcache_access_cnt [NUM_MASTERS],
  input  logic [31:0]   dcache_miss_cnt   [NUM_MASTERS],
  input  bus_req_t      bus_side [NUM_MASTERS],    // data caches' requests to the arbiter
  input  logic [31:0]   frames_acquired [NUM_MASTERS],
  input  logic [31:0]   mux_frame_cnt,
  input  logic [31:0]   mux_audio_swap_cnt,
  input  logic [31:0]   mux_video_swap_cnt,
  input  logic [31:0]   mux_video_int_cnt,
  input  logic [31:0]   mux_hold_cnt,
  input  int            pending_cycles,   // cycles with an audio interrupt waiting in the multiplexer
  output int            checks,
  output int            failures
);

  int fr_done [2], core_err [2], res_err [2];

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---- cores ----
  tb_core_model #(.MEDIUM(0), .IN_WORDS(AIN), .MAX_FRAMES(NA), .IN_BASE(32'h0020_0000),
                  .PRIV_BASE(32'h0000_0000), .OTHER_PRIV(32'h0010_0000), .AUDIO_BYTES(AUDIO_BYTES),
                  .TOUCH_SHARED(1'b1), .TRY_RESERVED(1'b0), .GAP_MAX(GAP_MAX)) u_audio_core (
    .clk, .rst_n, .activate(core_activate[0]), .dreq(core_dreq[0]), .drsp(core_drsp[0]),
    .ireq(core_ireq[0]), .irsp(core_irsp[0]), .irq(int_audio),
    .frames_done(fr_done[0]), .errors(core_err[0]), .reserved_errs(res_err[0]));
  tb_core_model #(.MEDIUM(1), .IN_WORDS(VIN), .MAX_FRAMES(NV), .IN_BASE(32'h0030_0000),
                  .PRIV_BASE(32'h0010_0000), .OTHER_PRIV(32'h0000_0000), .VMIN(VMIN), .VSPAN(VSPAN),
                  .TOUCH_SHARED(1'b1), .TRY_RESERVED(1'b1), .GAP_MAX(GAP_MAX)) u_video_core (
    .clk, .rst_n, .activate(core_activate[1]), .dreq(core_dreq[1]), .drsp(core_drsp[1]),
    .ireq(core_ireq[1]), .irsp(core_irsp[1]), .irq(int_video),
    .frames_done(fr_done[1]), .errors(core_err[1]), .reserved_errs(res_err[1]));

  // ---- loader sources ----
  int ld_idx [2];
  for (genvar k = 0; k < 2; k++) begin : g_src
    localparam int TOTAL = (k == 0) ? NA * AIN : NV * VIN;
    always_comb begin
      ld_data[k] = sample(k, ld_idx[k]);
      ld_last[k] = (ld_idx[k] == TOTAL - 1);
    end
    always @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        ld_idx[k]   <= 0;
        ld_valid[k] <= 1'b0;
      end else begin
        if (ld_valid[k] && ld_ready[k]) ld_idx[k] <= ld_idx[k] + 1;
        ld_valid[k] <= ($urandom_range(3) != 0) &&
                       !(ld_idx[k] + ((ld_valid[k] && ld_ready[k]) ? 1 : 0) >= TOTAL);
      end
    end
  end

  // ---- datamem4 slave ----
  logic dm4_rv;
  logic [31:0] dm4_rd;
  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin dm4_rv <= 1'b0; dm4_rd <= '0; end
    else begin
      dm4_rv <= dm4_req.req && !dm4_req.we;
      dm4_rd <= 32'h5EED_0000 | dm4_req.addr[15:0];
    end
  end
  always_comb begin
    dm4_rsp        = BUS_RSP_IDLE;
    dm4_rsp.gnt    = dm4_req.req;
    dm4_rsp.rvalid = dm4_rv;
    dm4_rsp.rdata  = dm4_rv ? dm4_rd : '0;
  end
  int shared_conflicts = 0, mux_conflicts = 0;

  // ---- MUX stream checker ----
  always @(negedge clk) mux_ready <= ($urandom_range(99) < READY_PCT);

  byte unsigned cur [$];
  int a_frames = 0, v_only_frames = 0, av_frames = 0, partial_words = 0;
  int vk = 0, vi = 0;                   // next expected video byte: frame vk, byte vi
  logic [31:0] vdg;
  int frames_seen = 0;

  function automatic logic [7:0] next_video_byte();
    logic [7:0] b;
    b = coded_byte(1, digest(1, vk, VIN), vk, vi);
    vi++;
    if (vi == vlen(vk, VMIN, VSPAN)) begin vi = 0; vk++; end
    return b;
  endfunction

  always @(posedge clk) begin
    if (rst_n && mux_valid && mux_ready) begin
      cur.push_back(mux_data);
      if (mux_eof) begin
        int size, hdr_size, nv, pos;
        logic [31:0] adg;
        bit ok;
        size     = cur.size();
        hdr_size = {cur[3], cur[4]};
        check(cur[0] == MUX_SOF[15:8] && cur[1] == MUX_SOF[7:0], "start of frame");
        check(hdr_size == size, $sformatf("size field %0d, bytes %0d", hdr_size, size));
        pos = MUX_HDR_BYTES;
        ok  = 1'b1;
        if (cur[2] == MT_AUDIO || cur[2] == MT_AUDIO_VIDEO) begin
          adg = digest(0, a_frames, AIN);
          for (int i = 0; i < AUDIO_BYTES; i++)
            if (cur[pos + i] != coded_byte(0, adg, a_frames, i)) ok = 1'b0;
          check(ok, $sformatf("audio bytes of audio frame %0d", a_frames));
          pos += AUDIO_BYTES;
          a_frames++;
        end else begin
          check(cur[2] == MT_VIDEO, $sformatf("table index %0d", cur[2]));
        end
        nv = size - pos;
        if (cur[2] == MT_VIDEO) v_only_frames++;
        if (cur[2] == MT_AUDIO_VIDEO) av_frames++;
        check((cur[2] == MT_AUDIO) == (nv == 0), "table index agrees with the video byte count");
        check(nv <= VIDEO_MAX, "video part within the limit");
        ok = 1'b1;
        for (int i = 0; i < nv; i++) if (cur[pos + i] != next_video_byte()) ok = 1'b0;
        check(ok, $sformatf("video bytes of MUX-frame %0d", frames_seen));
        frames_seen++;
        cur.delete();
      end
    end
  end

  // count partial-word video writes reaching the multiplexer
  always @(posedge clk) begin
    if (rst_n && core_dreq[1].req && core_drsp[1].gnt && core_dreq[1].we &&
        core_dreq[1].addr[31:20] == MUX_REGION && core_dreq[1].be != 4'hF) partial_words++;
    // both data caches on the same shared slave in one cycle
    if (rst_n && bus_side[0].req && bus_side[1].req && bus_side[0].addr[31:20] == bus_side[1].addr[31:20] &&
        (bus_side[0].addr[31:20] inside {12'h002, 12'h003, 12'h004, MUX_REGION})) begin
      shared_conflicts++;
      if (bus_side[0].addr[31:20] == MUX_REGION) mux_conflicts++;
    end
  end

  // ---- sequence and final checks ----
  int quiet;
  initial begin
    checks = 0; failures = 0;
    run = 1'b0;
    @(posedge rst_n);
    @(negedge clk);
    run = 1'b1;
    while (!(ld_done[0] && ld_done[1])) @(negedge clk);
    check(ld_words[0] == NA * AIN && ld_words[1] == NV * VIN, "loaders wrote all samples");
    while (fr_done[0] < NA) @(negedge clk);
    quiet = 0;
    while (quiet < 50) begin
      @(negedge clk);
      quiet = (mux_valid || int_audio) ? 0 : quiet + 1;
    end
    check(core_err[0] == 0 && core_err[1] == 0, "core models saw correct memory contents");
    check(a_frames == NA && mux_audio_swap_cnt == NA, $sformatf("audio frames %0d", a_frames));
    check(mux_frame_cnt == frames_seen, "frame counter");
    check(mux_video_swap_cnt == v_only_frames, "video overflow swaps = video-only frames");
    check(mux_video_int_cnt == fr_done[1], "video interrupts counted");
    check(vk + 1 >= fr_done[1] - 1, $sformatf("video frames carried: %0d of %0d coded", vk, fr_done[1]));
    check(frames_acquired[0] >= NA, "audio timer started every coded frame");
    check(bus_conflict_cnt == 32'(shared_conflicts) && bus_denied_cnt[1] == 32'(shared_conflicts) &&
          bus_denied_cnt[0] == 0, $sformatf("conflicts %0d, seen %0d", bus_conflict_cnt, shared_conflicts));
    check(bus_mux_denied_cnt[1] == 32'(mux_conflicts) && bus_mux_denied_cnt[0] == 0,
          $sformatf("denied multiplexer accesses %0d, seen %0d", bus_mux_denied_cnt[1], mux_conflicts));
    $display("mechanisms: loads %0d/%0d words, audio activations %0d, video activations %0d,",
             ld_words[0], ld_words[1], frames_acquired[0], frames_acquired[1]);
    $display("  bus conflicts %0d (on the multiplexer %0d), denied (video) %0d, stalls %0d/%0d, reserved-memory errors %0d,",
             bus_conflict_cnt, bus_mux_denied_cnt[1], bus_denied_cnt[1], bus_stall_cnt[0], bus_stall_cnt[1], res_err[1]);
    $display("  audio swaps %0d, video overflow swaps %0d, held mux writes %0d, audio irq waiting %0d cycles,",
             mux_audio_swap_cnt, mux_video_swap_cnt, mux_hold_cnt, pending_cycles);
    $display("  MUX-frames %0d (audio only %0d, audio+video %0d, video only %0d), partial video words %0d",
             frames_seen, frames_seen - av_frames - v_only_frames, av_frames, v_only_frames, partial_words);
    $display("  bus reads %0d/%0d, writes %0d/%0d", bus_rd_cnt[0], bus_rd_cnt[1], bus_wr_cnt[0], bus_wr_cnt[1]);
    $display("  I-cache accesses %0d/%0d misses %0d/%0d, D-cache accesses %0d/%0d misses %0d/%0d",
             icache_access_cnt[0], icache_access_cnt[1], icache_miss_cnt[0], icache_miss_cnt[1],
             dcache_access_cnt[0], dcache_access_cnt[1], dcache_miss_cnt[0], dcache_miss_cnt[1]);
    check(ld_done[0] && ld_done[1], "mechanism: memory load");
    check(frames_acquired[0] > 0 && frames_acquired[1] > 0, "mechanism: real-time activation");
    check(av_frames > 0, "mechanism: audio interrupt swap with video");
    check(res_err[1] > 0, "mechanism: reserved-memory protection");
    check(partial_words > 0, "mechanism: partial video word");
    check(bus_rd_cnt[0] > 0 && bus_wr_cnt[0] > 0 && bus_rd_cnt[1] > 0 && bus_wr_cnt[1] > 0,
          "mechanism: bus statistics");
    for (int m = 0; m < 2; m++) begin
      check(icache_miss_cnt[m] > 0 && icache_access_cnt[m] > icache_miss_cnt[m],
            $sformatf("mechanism: instruction cache hits and misses, core %0d", m));
      check(dcache_miss_cnt[m] > 0 && dcache_access_cnt[m] > dcache_miss_cnt[m],
            $sformatf("mechanism: data cache hits and misses, core %0d", m));
    end
    if (NEED_ALL) begin
      check(bus_conflict_cnt > 0 && bus_denied_cnt[1] > 0, "mechanism: shared-slave conflict, audio first");
      check(mux_video_swap_cnt > 0, "mechanism: video overflow swap");
      check(bus_mux_denied_cnt[1] > 0, "mechanism: conflict on the multiplexer port");
      check(mux_hold_cnt > 0, "mechanism: mux write hold-off");
      check(pending_cycles > 0, "mechanism: audio interrupt remembered while busy");
      check(frames_seen - av_frames - v_only_frames > 0, "mechanism: audio-only frame");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
