// Shared types and constants of the audio-video terminal SoC.
//
// The on-chip bus is a two-phase request/grant bus: a master drives a request
// (bus_req_t) and keeps it stable until the slave side answers with gnt in the
// same cycle; read data follows exactly one cycle after the grant with rvalid.
// The address map gives each slave a 1 MiB window selected by the address bits
// above bit 19: data memories 0..4 at regions 0..4 (so data starts at address
// 0x00000000, as in the design description) and the multiplexer at region
// 0x0A2, i.e. 0x0A200000-0x0A2FFFFF. The multiplexer base address is the one
// the block diagram prints; the window size, the bus width and the encoding
// of the two-phase handshake are this design's own choices.
package soc_pkg;

  localparam int unsigned AW = 32;        // byte address width
  localparam int unsigned DW = 32;        // data word width
  localparam int unsigned BW = DW / 8;    // byte enables per word
  localparam int unsigned WIN_BITS = 20;  // log2 of one slave window (1 MiB)

  // Slave port numbers of the bus arbiter
  localparam int unsigned NUM_MASTERS = 2;
  localparam int unsigned NUM_SLAVES  = 6;
  localparam int unsigned S_DATAMEM0  = 0;  // reserved for master 0 (audio)
  localparam int unsigned S_DATAMEM1  = 1;  // reserved for master 1 (video)
  localparam int unsigned S_DATAMEM2  = 2;  // shared (audio input data)
  localparam int unsigned S_DATAMEM3  = 3;  // shared (video input data)
  localparam int unsigned S_DATAMEM4  = 4;  // shared, free port
  localparam int unsigned S_ARBPORT   = 5;  // arbitrated port (multiplexer)

  localparam logic [AW-WIN_BITS-1:0] MUX_REGION = 12'h0A2;

  typedef struct packed {
    logic          req;    // access request
    logic          we;     // 1 = write, 0 = read
    logic [AW-1:0] addr;   // byte address (slaves see the displacement only)
    logic [DW-1:0] wdata;
    logic [BW-1:0] be;     // byte enables for writes
  } bus_req_t;

  typedef struct packed {
    logic          gnt;    // request accepted this cycle
    logic          rvalid; // read data valid (one cycle after a read grant)
    logic          err;    // with gnt/rvalid: the address maps to no slave the master may use
    logic [DW-1:0] rdata;
  } bus_rsp_t;

  localparam bus_req_t BUS_REQ_IDLE = '0;
  localparam bus_rsp_t BUS_RSP_IDLE = '0;

  // MUX-frame header fields
  localparam logic [15:0] MUX_SOF = 16'hE14D;  // start-of-frame pattern
  localparam logic [7:0]  MT_AUDIO       = 8'd1;
  localparam logic [7:0]  MT_VIDEO       = 8'd2;
  localparam logic [7:0]  MT_AUDIO_VIDEO = 8'd3;
  localparam int unsigned MUX_HDR_BYTES  = 5;  // 2 SOF + 1 index + 2 size

  // Multiplexer register map (offsets in its window, bits [13:12])
  localparam logic [1:0] MUXF_AUDIO  = 2'd0;  // 0x0000: audio field, byte-addressed
  localparam logic [1:0] MUXF_VIDEO  = 2'd1;  // 0x1000: video field, appended in order
  localparam logic [1:0] MUXF_STATUS = 2'd2;  // 0x2000: status word (read only)

endpackage
