// start_pulse_controller: frame timing and sequencing of the shared
// FFT/IFFT core.
//
// The single transform core is used three times per frame period: forward
// transform of channel 1, forward transform of channel 2, and inverse
// transform of the filtered sum. The controller counts input sample strobes
// (in_valid). Once FRAME_LEN samples are in, every HOP-th sample is a frame
// boundary (50% overlap for HOP = FRAME_LEN/2). One clock after the
// boundary sample it pulses fft_start for channel 1; START_GAP sample
// periods after the boundary it pulses fft_start for channel 2, and
// 2*START_GAP periods after it the start of the inverse transform. With
// START_GAP = 10 the three operations of a frame end well inside the 256
// sample periods of a hop, and each starts only after the core has
// delivered the previous result, provided a sample period is at least one
// tenth of a core operation (load + latency + unload, about 5.8k cycles).
//
// With every start pulse a load sequence runs: load_valid is high for
// FRAME_LEN consecutive clocks starting with the pulse, and load_idx counts
// 0..FRAME_LEN-1; the datapath reads its buffers with it. `phase` names the
// operation of the most recent start pulse and is held until the next one,
// so it also tells which operation the core's output belongs to.
// since_boundary counts samples received after the last boundary (it saturates).
// timing_error is a sticky flag set if a start pulse finds the core busy or a
// load still running: it can only happen when the sample period is too short.
//
// The three start pulses spaced ten sample periods apart follow the
// reference design's timing arrangement; the load sequencing and error flag
// are this implementation's.
module start_pulse_controller
  import dasb_pkg::*;
#(
  parameter int unsigned FRAME_LEN = 512,
  parameter int unsigned HOP       = 256,
  parameter int unsigned START_GAP = 10,
  localparam int unsigned IW = $clog2(FRAME_LEN)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic          fft_busy,
  output logic          frame_boundary,
  output logic          fft_start,
  output logic          fft_fwd,
  output phase_t        phase,
  output logic          load_valid,
  output logic [IW-1:0] load_idx,
  output logic [8:0]    since_boundary,
  output logic          timing_error
);

  logic [IW:0]   fill;        // samples received, saturating at FRAME_LEN
  logic [IW-1:0] hop_cnt;     // samples modulo HOP
  logic          started;     // a boundary has occurred
  logic          boundary_now, start2_now, start3_now, start_any;
  logic [8:0]    sb_next;

  always_comb begin
    boundary_now = in_valid && (32'(fill) + 1 >= FRAME_LEN) && (32'(hop_cnt) + 1 == HOP);
    sb_next      = (since_boundary == 9'h1FF) ? since_boundary : since_boundary + 9'd1;
    start2_now   = in_valid && started && !boundary_now && (32'(sb_next) == START_GAP);
    start3_now   = in_valid && started && !boundary_now && (32'(sb_next) == 2 * START_GAP);
    start_any    = boundary_now || start2_now || start3_now;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fill           <= '0;
      hop_cnt        <= '0;
      started        <= 1'b0;
      since_boundary <= '0;
      frame_boundary <= 1'b0;
      fft_start      <= 1'b0;
      fft_fwd        <= 1'b1;
      phase          <= PH_IDLE;
      load_valid     <= 1'b0;
      load_idx       <= '0;
      timing_error   <= 1'b0;
    end else begin
      frame_boundary <= boundary_now;
      fft_start      <= start_any;
      if (in_valid) begin
        if (32'(fill) < FRAME_LEN) fill <= fill + 1'b1;
        hop_cnt        <= (32'(hop_cnt) + 1 == HOP) ? '0 : hop_cnt + 1'b1;
        since_boundary <= boundary_now ? 9'd0 : sb_next;
        if (boundary_now) started <= 1'b1;
      end
      if (boundary_now) begin
        phase   <= PH_FFT1;
        fft_fwd <= 1'b1;
      end else if (start2_now) begin
        phase   <= PH_FFT2;
        fft_fwd <= 1'b1;
      end else if (start3_now) begin
        phase   <= PH_IFFT;
        fft_fwd <= 1'b0;
      end
      // load sequencer
      if (start_any) begin
        load_valid <= 1'b1;
        load_idx   <= '0;
      end else if (load_valid) begin
        if (32'(load_idx) == FRAME_LEN - 1) load_valid <= 1'b0;
        load_idx <= load_idx + 1'b1;
      end
      if (start_any && (fft_busy || load_valid)) timing_error <= 1'b1;
    end
  end

  // Requirement of the timing arrangement: no start while the core works.
  a_no_overlap: assert property (@(posedge clk) disable iff (!rst_n) start_any |-> !fft_busy)
    else $warning("start_pulse_controller: start pulse while the core is busy");

endmodule
