// Audio-video multiplexer: builds H.223-like MUX-frames from coded audio and video.
//
// The two coders write their compressed output into the multiplexer over the
// bus (it sits on the arbiter's arbitrated port). Audio goes into a fixed-size
// audio field of AUDIO_BYTES bytes, addressed byte by byte; video bytes are
// appended, in arrival order, to a video field of up to VIDEO_MAX_BYTES bytes.
// Each field is a ping-pong pair: the coders fill one buffer while the frame
// assembler sends the other, so coding never waits for transmission.
//
// A rising edge on int_audio (the audio coder's end-of-frame interrupt) swaps
// both pairs and sends a frame with the audio field and whatever video has
// arrived. When the video field fills up before the audio interrupt (a late
// audio coder), only the video pair is swapped and a video-only frame is sent,
// so the video buffer never overflows. A swap waits while the previous frame is
// still being sent; video writes to a full buffer are then held off by keeping
// gnt low, which stalls the video coder, and an audio interrupt is remembered
// until the assembler is free. In the cycle of a swap every write is held off.
//
// MUX-frame, one byte per out_valid/out_ready transfer, out_sof on the first
// and out_eof on the last byte:
//   2 bytes  start of frame, MUX_SOF (0xE1, 0x4D)
//   1 byte   MUX table index: 1 audio only, 2 video only, 3 audio and video
//   2 bytes  total MUX-frame size in bytes, header included, big-endian
//   AUDIO_BYTES audio bytes (frames started by the audio interrupt only)
//   N        video bytes, N = number of video bytes received, 0..VIDEO_MAX_BYTES
//
// Register map inside the 1 MiB window (offset bits [13:12]): 0x0000 audio
// field (byte offset = address offset, bytes past AUDIO_BYTES dropped), 0x1000
// video field (any address, enabled bytes appended low lane first), 0x2000
// status, read only: {frames sent[15:0], video bytes in the fill buffer[13:0],
// assembler busy, audio interrupt pending}. Reads answer one cycle after the
// grant; reading the data fields returns zero.
//
// The frame layout (start of frame, table index, size, then audio and video),
// the fixed audio size, the ping-pong buffers swapped by the audio interrupt
// and the swap on a full video buffer follow the design description. The sync
// pattern, the index codes, the byte order, the register map, the separate
// swap of the video pair and the write hold-off are this design's choices.
// Audio bytes that a coder does not write keep their old contents. int_video
// (the video coder's end-of-frame signal) only counts video frames.
module av_mux
  import soc_pkg::*;
#(
  parameter int unsigned AUDIO_BYTES     = 24,
  parameter int unsigned VIDEO_MAX_BYTES = 224
) (
  input  logic        clk,
  input  logic        rst_n,
  // bus slave port (address = displacement in the multiplexer window)
  input  bus_req_t    req,
  output bus_rsp_t    rsp,
  // end-of-frame interrupts of the coders
  input  logic        int_audio,
  input  logic        int_video,
  // MUX stream
  output logic        out_valid,
  output logic [7:0]  out_data,
  output logic        out_sof,
  output logic        out_eof,
  input  logic        out_ready,
  // statistics
  output logic [31:0] frame_cnt,       // MUX-frames sent
  output logic [31:0] audio_swap_cnt,  // swaps started by the audio interrupt
  output logic [31:0] video_swap_cnt,  // swaps started by a full video buffer
  output logic [31:0] video_int_cnt,   // video end-of-frame signals seen
  output logic [31:0] hold_cnt         // cycles a write was held off
);

  localparam int unsigned LW = $clog2(VIDEO_MAX_BYTES + 1);
  localparam int unsigned AW_IDX = (AUDIO_BYTES > 1) ? $clog2(AUDIO_BYTES) : 1;
  localparam int unsigned PW = 16;   // frame byte position / size width

  typedef enum logic [1:0] {TX_IDLE, TX_HDR, TX_AUDIO, TX_VIDEO} tx_state_e;

  initial begin
    assert (VIDEO_MAX_BYTES % 4 == 0 && VIDEO_MAX_BYTES >= 4)
      else $fatal(1, "VIDEO_MAX_BYTES must be a positive multiple of 4");
    assert (MUX_HDR_BYTES + AUDIO_BYTES + VIDEO_MAX_BYTES < 65536)
      else $fatal(1, "MUX-frame size does not fit the 16-bit size field");
  end

  // ping-pong buffers
  logic [7:0]    abuf [2][AUDIO_BYTES];
  logic [7:0]    vbuf [2][VIDEO_MAX_BYTES];
  logic [LW-1:0] vlen [2];
  logic          fa, fv;                 // buffers being filled

  // frame assembler
  tx_state_e     tx_state;
  logic          tx_a, tx_v, tx_has_audio;
  logic [LW-1:0] tx_vlen;
  logic [PW-1:0] tx_pos, tx_size;

  // interrupts
  logic          int_audio_q, int_video_q, audio_pending;
  logic          audio_evt;
  logic          vfull, tx_idle, swap_audio, swap_video, swap_any;

  assign audio_evt  = int_audio && !int_audio_q;
  assign vfull      = vlen[fv] > LW'(VIDEO_MAX_BYTES - 4);
  assign tx_idle    = (tx_state == TX_IDLE);
  assign swap_audio = tx_idle && (audio_evt || audio_pending);
  assign swap_video = tx_idle && !swap_audio && vfull;
  assign swap_any   = swap_audio || swap_video;

  // ---------------- bus side ----------------
  logic [1:0] field;
  logic       is_write, wr_audio, wr_video, hold, granted;
  logic       rd_q;
  logic [DW-1:0] status_q;

  assign field    = req.addr[13:12];
  assign is_write = req.req && req.we;
  assign wr_audio = is_write && field == MUXF_AUDIO;
  assign wr_video = is_write && field == MUXF_VIDEO;
  assign hold     = is_write && (swap_any || (wr_video && vfull));
  assign granted  = req.req && !hold;

  always_comb begin
    rsp        = BUS_RSP_IDLE;
    rsp.gnt    = granted;
    rsp.rvalid = rd_q;
    rsp.rdata  = rd_q ? status_q : '0;
  end

  // ---------------- buffers and swaps ----------------
  always_ff @(posedge clk) begin
    if (granted && wr_audio) begin
      for (int b = 0; b < BW; b++) begin
        logic [11:0] pos;
        pos = {req.addr[11:2], 2'(b)};
        if (req.be[b] && pos < 12'(AUDIO_BYTES))
          abuf[fa][AW_IDX'(pos)] <= req.wdata[8*b +: 8];
      end
    end
    if (granted && wr_video) begin
      logic [LW-1:0] p;
      p = vlen[fv];
      for (int b = 0; b < BW; b++) begin
        if (req.be[b]) begin
          vbuf[fv][p] <= req.wdata[8*b +: 8];
          p = p + 1'b1;
        end
      end
    end
  end

  function automatic logic [2:0] popcount4(input logic [BW-1:0] be);
    popcount4 = '0;
    for (int b = 0; b < BW; b++) popcount4 = popcount4 + 3'(be[b]);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fa <= 1'b0;
      fv <= 1'b0;
      vlen[0] <= '0;
      vlen[1] <= '0;
      int_audio_q    <= 1'b0;
      int_video_q    <= 1'b0;
      audio_pending  <= 1'b0;
      audio_swap_cnt <= '0;
      video_swap_cnt <= '0;
      video_int_cnt  <= '0;
      hold_cnt       <= '0;
      rd_q           <= 1'b0;
      status_q       <= '0;
    end else begin
      int_audio_q <= int_audio;
      int_video_q <= int_video;
      if (int_video && !int_video_q) video_int_cnt <= video_int_cnt + 1'b1;
      if (swap_audio)      audio_pending <= 1'b0;
      else if (audio_evt)  audio_pending <= 1'b1;
      if (hold) hold_cnt <= hold_cnt + 1'b1;

      if (granted && wr_video) vlen[fv] <= vlen[fv] + LW'(popcount4(req.be));

      if (swap_audio) begin
        fa <= !fa;
        fv <= !fv;
        vlen[!fv] <= '0;
        audio_swap_cnt <= audio_swap_cnt + 1'b1;
      end else if (swap_video) begin
        fv <= !fv;
        vlen[!fv] <= '0;
        video_swap_cnt <= video_swap_cnt + 1'b1;
      end

      rd_q     <= granted && !req.we;
      status_q <= '0;
      if (field == MUXF_STATUS)
        status_q <= {frame_cnt[15:0], 14'(vlen[fv]), !tx_idle, audio_pending};
    end
  end

  // ---------------- frame assembler ----------------
  logic       out_fire;
  logic [7:0] mt_index;
  logic [PW-1:0] aoff, voff;

  assign out_fire = out_valid && out_ready;
  assign mt_index = !tx_has_audio ? MT_VIDEO : (tx_vlen != '0 ? MT_AUDIO_VIDEO : MT_AUDIO);
  assign aoff     = tx_pos - PW'(MUX_HDR_BYTES);
  assign voff     = tx_pos - PW'(MUX_HDR_BYTES) - (tx_has_audio ? PW'(AUDIO_BYTES) : '0);

  always_comb begin
    out_valid = !tx_idle;
    out_sof   = !tx_idle && tx_pos == '0;
    out_eof   = !tx_idle && tx_pos == tx_size - 1'b1;
    unique case (tx_state)
      TX_HDR: begin
        unique case (tx_pos[2:0])
          3'd0:    out_data = MUX_SOF[15:8];
          3'd1:    out_data = MUX_SOF[7:0];
          3'd2:    out_data = mt_index;
          3'd3:    out_data = tx_size[15:8];
          default: out_data = tx_size[7:0];
        endcase
      end
      TX_AUDIO: out_data = abuf[tx_a][AW_IDX'(aoff)];
      TX_VIDEO: out_data = vbuf[tx_v][LW'(voff)];
      default:  out_data = '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_state     <= TX_IDLE;
      tx_a         <= 1'b0;
      tx_v         <= 1'b0;
      tx_has_audio <= 1'b0;
      tx_vlen      <= '0;
      tx_pos       <= '0;
      tx_size      <= '0;
      frame_cnt    <= '0;
    end else if (tx_idle) begin
      if (swap_any) begin
        tx_state     <= TX_HDR;
        tx_a         <= fa;
        tx_v         <= fv;
        tx_has_audio <= swap_audio;
        tx_vlen      <= vlen[fv];
        tx_pos       <= '0;
        tx_size      <= PW'(MUX_HDR_BYTES) + (swap_audio ? PW'(AUDIO_BYTES) : '0) + PW'(vlen[fv]);
      end
    end else if (out_fire) begin
      tx_pos <= tx_pos + 1'b1;
      if (tx_pos == tx_size - 1'b1) begin
        tx_state  <= TX_IDLE;
        frame_cnt <= frame_cnt + 1'b1;
      end else if (tx_pos + 1'b1 == PW'(MUX_HDR_BYTES)) begin
        tx_state <= tx_has_audio ? TX_AUDIO : TX_VIDEO;
      end else if (tx_state == TX_AUDIO && aoff + 1'b1 == PW'(AUDIO_BYTES)) begin
        tx_state <= TX_VIDEO;
      end
    end
  end

  // a frame never outgrows its buffers
  a_vlen: assert property (@(posedge clk) disable iff (!rst_n) vlen[fv] <= LW'(VIDEO_MAX_BYTES))
    else $error("video buffer overflow");
  a_stable: assert property (@(posedge clk) disable iff (!rst_n)
    (out_valid && !out_ready) |=> (out_valid && $stable(out_data)))
    else $error("MUX stream changed while stalled");

endmodule
