// Self-checking testbench of av_mux.
//
// The testbench plays both coders on the bus port and keeps its own model of
// what each MUX-frame must contain: the audio field as last written and the
// video bytes in arrival order. Each audio interrupt closes a frame with audio;
// reaching the video limit closes a video-only frame. A collector compares
// every byte leaving the multiplexer (with a randomly throttled out_ready)
// against the expected frames: start of frame, table index, size, audio bytes
// and video bytes, plus the sof/eof markers. Scenarios: audio and video, audio
// only, a video overflow swap, an overflow while the assembler is still busy
// (video writes held off), an audio interrupt that arrives while a frame is
// being sent (remembered), partial-word video writes, the status register and
// the video interrupt counter. When the assembler is idle, the first byte must be
// presented right after the clock edge that samples the interrupt.
module tb_av_mux;
  import soc_pkg::*;

  localparam int unsigned AB = 8;    // audio bytes per frame
  localparam int unsigned VM = 32;   // video limit

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  bus_req_t    req;
  bus_rsp_t    rsp;
  logic        int_audio, int_video;
  logic        out_valid, out_sof, out_eof, out_ready;
  logic [7:0]  out_data;
  logic [31:0] frame_cnt, audio_swap_cnt, video_swap_cnt, video_int_cnt, hold_cnt;

  av_mux #(.AUDIO_BYTES(AB), .VIDEO_MAX_BYTES(VM)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---- reference model ----
  typedef byte unsigned bytes_q[$];
  bytes_q exp_frames [$];
  byte unsigned aud [AB];
  bytes_q vid;
  int frames_rx = 0;
  int pend_seen = 0;     // cycles with a remembered audio interrupt
  always @(posedge clk) if (dut.audio_pending) pend_seen++;
  int throttle = 1;   // 0 free stream, 1 random out_ready, 2 stopped

  function automatic bytes_q make_frame(input bit with_audio);
    bytes_q f;
    int size;
    size = MUX_HDR_BYTES + (with_audio ? AB : 0) + vid.size();
    f.push_back(8'hE1); f.push_back(8'h4D);
    f.push_back(!with_audio ? 8'd2 : (vid.size() != 0 ? 8'd3 : 8'd1));
    f.push_back(8'(size >> 8)); f.push_back(8'(size));
    if (with_audio) for (int i = 0; i < AB; i++) f.push_back(aud[i]);
    foreach (vid[i]) f.push_back(vid[i]);
    return f;
  endfunction

  // ---- bus master ----
  task automatic bus_write(input logic [31:0] addr, input logic [31:0] data, input logic [3:0] be);
    @(negedge clk);
    req = BUS_REQ_IDLE; req.req = 1'b1; req.we = 1'b1; req.addr = addr; req.wdata = data; req.be = be;
    #1;
    while (!rsp.gnt) begin @(negedge clk); #1; end
    @(negedge clk);
    req = BUS_REQ_IDLE;
  endtask

  task automatic write_audio();
    for (int w = 0; w < AB / 4; w++) begin
      logic [31:0] d;
      d = $urandom;
      for (int b = 0; b < 4; b++) aud[4*w + b] = d[8*b +: 8];
      bus_write(32'h0000_0000 + 32'(4 * w), d, 4'hF);
    end
  endtask

  // append video; closes a video-only frame in the model whenever the limit is reached
  task automatic write_video(input int nwords, input logic [3:0] be);
    for (int w = 0; w < nwords; w++) begin
      logic [31:0] d;
      d = $urandom;
      bus_write(32'h0000_1000 + 32'(4 * w), d, be);
      for (int b = 0; b < 4; b++) if (be[b]) vid.push_back(d[8*b +: 8]);
      if (vid.size() > VM - 4) begin
        exp_frames.push_back(make_frame(1'b0));
        vid.delete();
      end
    end
  endtask

  task automatic audio_irq();
    int n0;
    n0 = int'(audio_swap_cnt);
    exp_frames.push_back(make_frame(1'b1));
    vid.delete();
    @(negedge clk); int_audio = 1'b1;
    @(negedge clk); int_audio = 1'b0;
    // wait for the swap before writing the next frame's data
    while (int'(audio_swap_cnt) == n0) @(negedge clk);
  endtask

  task automatic wait_drained();
    while (exp_frames.size() != 0 || out_valid) @(negedge clk);
  endtask

  // ---- collector ----
  bytes_q cur;
  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      check(out_sof == (cur.size() == 0), "sof on the first byte only");
      cur.push_back(out_data);
      if (out_eof) begin
        if (exp_frames.size() == 0) begin
          check(1'b0, "unexpected frame");
        end else begin
          bytes_q e;
          e = exp_frames.pop_front();
          check(cur == e, $sformatf("frame %0d content (%0d bytes, exp %0d)", frames_rx, cur.size(), e.size()));
          if (cur != e) foreach (cur[i]) $display("  byte %0d got %h exp %h", i, cur[i], (i < e.size()) ? e[i] : 8'hxx);
        end
        frames_rx++;
        cur.delete();
      end
    end
  end
  always @(negedge clk) out_ready <= (throttle == 0) ? 1'b1 : (throttle == 1) ? ($urandom_range(2) != 0) : 1'b0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    req = BUS_REQ_IDLE; int_audio = 1'b0; int_video = 1'b0; out_ready = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;

    // 1. audio + video, with a partial last video word; latency with free stream
    throttle = 0;
    write_audio();
    write_video(5, 4'hF);
    write_video(1, 4'b0110);
    @(negedge clk); int_audio = 1'b1;
    exp_frames.push_back(make_frame(1'b1)); vid.delete();
    #1 check(!out_valid, "nothing sent before the interrupt is sampled");
    @(posedge clk); #1;
    check(out_valid && out_sof, "first byte presented right after the edge that samples the interrupt");
    @(negedge clk); int_audio = 1'b0;
    wait_drained();
    throttle = 1;

    // 2. audio only
    write_audio();
    audio_irq();
    wait_drained();

    // 3. video overflow without an audio interrupt, then more audio+video
    write_audio();
    write_video(VM / 4, 4'hF);     // exactly the limit: video-only frame
    write_video(3, 4'hF);
    audio_irq();
    wait_drained();

    // 4. audio interrupt while a frame is still being sent, video writes held off
    write_audio();
    write_video(2, 4'hF);
    throttle = 2;                  // stream stopped: the frame stays in flight
    audio_irq();
    write_audio();
    fork
      write_video(VM / 4 + 2, 4'hF); // fills while the assembler is busy: held off
      begin
        repeat (40) @(negedge clk);
        check(hold_cnt != 0, "video writes were held off while the assembler was busy");
        throttle = 1;
      end
    join
    exp_frames.push_back(make_frame(1'b1)); vid.delete();
    @(negedge clk); int_audio = 1'b1;
    @(negedge clk); int_audio = 1'b0;
    wait_drained();

    // 5. status register and video interrupt counter
    for (int i = 0; i < 3; i++) begin
      @(negedge clk); int_video = 1'b1;
      @(negedge clk); int_video = 1'b0;
    end
    @(negedge clk);
    req = BUS_REQ_IDLE; req.req = 1'b1; req.addr = 32'h0000_2000;
    #1 check(rsp.gnt, "status read granted");
    @(negedge clk);
    req = BUS_REQ_IDLE;
    #1 check(rsp.rvalid && rsp.rdata[31:16] == frame_cnt[15:0] && rsp.rdata[1:0] == 2'b00,
             $sformatf("status word %h", rsp.rdata));
    check(video_int_cnt == 3, "video interrupts counted");
    check(pend_seen != 0, "an audio interrupt arrived while a frame was being sent");

    check(frames_rx == 7 && frame_cnt == 7, $sformatf("frames sent %0d", frames_rx));
    check(audio_swap_cnt == 5, $sformatf("audio swaps %0d", audio_swap_cnt));
    check(video_swap_cnt == 2, $sformatf("video swaps %0d", video_swap_cnt));
    $display("audio swaps %0d, video overflow swaps %0d, held writes %0d",
             audio_swap_cnt, video_swap_cnt, hold_cnt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
