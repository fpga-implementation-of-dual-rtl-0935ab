// input_frame_buffer: overlapped-framing buffer of one microphone channel.
//
// Every input sample is shifted into an addressable shift register that is
// FRAME_LEN+GUARD words deep. A frame is the FRAME_LEN most recent samples
// at a frame boundary. Because the shared transform core reads channel 2
// some sample periods after the boundary, new samples keep arriving while a
// frame is being read; since_boundary (samples received since the boundary)
// shifts the read address so that the same frame is seen throughout. The
// GUARD extra stages hold those late samples without losing the oldest
// words of the frame. idx = 0 reads the oldest sample of the frame; the
// result appears on `sample` one clock later (registered read).
//
// Building the buffer from an addressable shift register follows the
// reference design; the guard depth and the offset addressing are this
// implementation's own way of keeping the frame stable.
module input_frame_buffer
  import dasb_pkg::*;
#(
  parameter int unsigned FRAME_LEN = 512,
  parameter int unsigned GUARD     = 32,
  localparam int unsigned IW = $clog2(FRAME_LEN),
  localparam int unsigned DEPTH = FRAME_LEN + GUARD,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,      // only qualifies the guard assertion
  input  logic          in_valid,
  input  sample_t       in_sample,
  input  logic [8:0]    since_boundary,
  input  logic          rd_en,
  input  logic [IW-1:0] idx,
  output sample_t       sample
);

  logic [AW-1:0]       raddr;
  logic [SAMPLE_W-1:0] rdata;

  // Stage 0 is the newest sample; the oldest frame sample sits at
  // FRAME_LEN-1 at the boundary and moves one deeper per new sample.
  assign raddr = AW'(FRAME_LEN - 1 - 32'(idx) + 32'(since_boundary));

  addr_shift_reg #(.WIDTH(SAMPLE_W), .DEPTH(DEPTH)) u_sr (
    .clk      (clk),
    .shift_en (in_valid),
    .din      (in_sample),
    .raddr    (raddr),
    .dout     (rdata)
  );

  always_ff @(posedge clk) begin
    sample <= sample_t'(rdata);
  end

  // A frame read must never reach past the guard stages.
  a_guard: assert property (@(posedge clk) disable iff (!rst_n) rd_en |-> 32'(since_boundary) <= GUARD)
    else $error("input_frame_buffer: frame overwritten before it was read");

endmodule
