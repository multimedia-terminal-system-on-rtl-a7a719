// Behavioural model of one coder core, for the system testbenches only.
//
// Stands in for a VLIW DSP core running a coder. It does what the real core
// does on the bus, not its computation: at reset it writes a short program
// into its program memory; on every activate pulse it reads the multiplexer
// status (at once, so two cores started together collide there), fetches
// the program back (checking it), optionally reads a word from the shared datamem4,
// reads the frame's IN_WORDS input words from its input memory, keeps the
// frame digest in its reserved data memory (written and read back), writes the
// coded bytes into the multiplexer and pulses irq. Medium 0 is the audio coder
// (AUDIO_BYTES bytes into the audio field), medium 1 the video coder (a varying
// number of bytes appended to the video field, the last word partly filled).
// If TRY_RESERVED is set, frame 1 also reads the other core's reserved memory
// and must get an error answer. Activate pulses that arrive while a frame is
// being coded are queued. Each bus access holds req until gnt, as the bus
// requires; consecutive accesses are one idle cycle apart, plus up to
// GAP_MAX random idle cycles.
module tb_core_model
  import soc_pkg::*;
  import tb_media_pkg::*;
#(
  parameter int          MEDIUM       = 0,
  parameter int          IN_WORDS     = 8,
  parameter int          MAX_FRAMES   = 8,
  parameter logic [31:0] IN_BASE      = 32'h0020_0000,
  parameter logic [31:0] PRIV_BASE    = 32'h0000_0000,
  parameter logic [31:0] OTHER_PRIV   = 32'h0010_0000,
  parameter int          AUDIO_BYTES  = 8,
  parameter int          VMIN         = 8,
  parameter int          VSPAN        = 33,
  parameter bit          TOUCH_SHARED = 1'b1,
  parameter bit          TRY_RESERVED = 1'b0,
  parameter int          GAP_MAX      = 0      // extra random idle cycles before an access
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     activate,
  output bus_req_t dreq,
  input  bus_rsp_t drsp,
  output bus_req_t ireq,
  input  bus_rsp_t irsp,
  output logic     irq,
  output int       frames_done,
  output int       errors,
  output int       reserved_errs
);

  localparam logic [31:0] MUX_BASE = {MUX_REGION, 20'h0};
  int pending = 0;
  int taken = 0;

  always @(posedge clk) if (rst_n && activate) pending++;

  // one bus access on the program-memory port (iport) or the data port
  bit use_gap = 1'b1;

  task automatic access(input bit iport, input logic we, input logic [31:0] a,
                        input logic [31:0] d, input logic [3:0] be,
                        output logic [31:0] rdata, output logic err);
    bus_req_t r;
    bus_rsp_t s;
    r = BUS_REQ_IDLE; r.req = 1'b1; r.we = we; r.addr = a; r.wdata = d; r.be = be;
    if (use_gap) repeat ($urandom_range(GAP_MAX)) @(negedge clk);
    @(negedge clk);
    if (iport) ireq = r; else dreq = r;
    #1;
    s = iport ? irsp : drsp;
    while (!s.gnt) begin @(negedge clk); #1; s = iport ? irsp : drsp; end
    err = s.err;
    @(negedge clk);
    if (iport) ireq = BUS_REQ_IDLE; else dreq = BUS_REQ_IDLE;
    #1;
    s = iport ? irsp : drsp;
    rdata = s.rdata;
    if (!we) begin
      if (!s.rvalid) begin errors++; $display("core %0d: read data missing", MEDIUM); end
      err = s.err;
    end
  endtask

  function automatic logic [31:0] prog_word(input int i);
    return 32'hC0DE_0000 | (32'(MEDIUM) << 8) | 32'(i);
  endfunction

  initial begin
    logic [31:0] rd, dg, w;
    logic        err;
    int          n;
    dreq = BUS_REQ_IDLE; ireq = BUS_REQ_IDLE; irq = 1'b0;
    frames_done = 0; errors = 0; reserved_errs = 0;
    @(posedge rst_n);
    for (int i = 0; i < 4; i++) access(1'b1, 1'b1, 32'(4 * i), prog_word(i), 4'hF, rd, err);
    forever begin
      while (pending == taken || frames_done >= MAX_FRAMES) @(negedge clk);
      taken++;
      // first access of a frame, without a random gap: read the multiplexer status
      use_gap = 1'b0;
      access(1'b0, 1'b0, MUX_BASE + 32'h2000, '0, '0, rd, err);
      use_gap = 1'b1;
      // instruction fetch
      for (int i = 0; i < 4; i++) begin
        access(1'b1, 1'b0, 32'(4 * i), '0, '0, rd, err);
        if (rd != prog_word(i)) begin errors++; $display("core %0d: program word %0d", MEDIUM, i); end
      end
      if (TOUCH_SHARED) access(1'b0, 1'b0, 32'h0040_0000, '0, '0, rd, err);
      if (TRY_RESERVED && frames_done == 1) begin
        access(1'b0, 1'b0, OTHER_PRIV, '0, '0, rd, err);
        if (err) reserved_errs++;
        else begin errors++; $display("core %0d: reserved memory of the other core readable", MEDIUM); end
      end
      // input frame
      dg = '0;
      for (int i = 0; i < IN_WORDS; i++) begin
        access(1'b0, 1'b0, IN_BASE + 32'(4 * (frames_done * IN_WORDS + i)), '0, '0, rd, err);
        dg = mix(dg, rd, i);
      end
      // working copy in the reserved memory
      access(1'b0, 1'b1, PRIV_BASE + 32'(4 * (frames_done % 64)), dg, 4'hF, rd, err);
      access(1'b0, 1'b0, PRIV_BASE + 32'(4 * (frames_done % 64)), '0, '0, rd, err);
      if (rd != dg || err) begin errors++; $display("core %0d: reserved memory readback", MEDIUM); end
      // coded output
      n = (MEDIUM == 0) ? AUDIO_BYTES : vlen(frames_done, VMIN, VSPAN);
      for (int wi = 0; wi < (n + 3) / 4; wi++) begin
        logic [3:0] be;
        w = '0; be = '0;
        for (int b = 0; b < 4; b++)
          if (4 * wi + b < n) begin
            w[8*b +: 8] = coded_byte(MEDIUM, dg, frames_done, 4 * wi + b);
            be[b] = 1'b1;
          end
        access(1'b0, 1'b1, MUX_BASE + ((MEDIUM == 0) ? 32'h0 : 32'h1000) + 32'(4 * wi), w, be, rd, err);
      end
      // end-of-frame interrupt
      @(negedge clk); irq = 1'b1;
      @(negedge clk); irq = 1'b0;
      frames_done++;
    end
  end

endmodule
