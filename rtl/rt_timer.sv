// Real-time acquisition timer.
//
// Emulates the arrival of media frames in real time: while enable is high it
// raises activate for one cycle every PERIOD cycles, which starts the coding of
// the next frame on the core it is wired to. The first pulse comes in the
// first enabled cycle, so frame k starts k*PERIOD cycles after enable rose.
// Clearing enable stops and rewinds the timer. frame_cnt counts the pulses.
// The default period is the 30 ms audio frame of the G.723 coder at the
// 250 MHz core clock (7,500,000 cycles), both numbers from the design
// description; the video timer is given its period by the instance. The
// first-pulse rule and the counter are this design's choices.
module rt_timer #(
  parameter int unsigned PERIOD = 7500000
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        enable,
  output logic        activate,
  output logic [31:0] frame_cnt
);

  localparam int unsigned CW = (PERIOD > 1) ? $clog2(PERIOD) : 1;

  logic [CW-1:0] count;   // cycles left until the next pulse

  assign activate = enable && (count == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count     <= '0;
      frame_cnt <= '0;
    end else if (!enable) begin
      count <= '0;
    end else begin
      count <= (count == '0) ? CW'(PERIOD - 1) : count - 1'b1;
      if (activate) frame_cnt <= frame_cnt + 1'b1;
    end
  end

endmodule
