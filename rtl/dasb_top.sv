// dasb_top: dual-microphone delay-and-sum beamformer with one shared
// FFT/IFFT core (the "1-FFT" organisation).
//
// Two microphone channels enter as 16-bit samples on in_valid strobes. Each
// channel is framed (512 samples, 50% overlap) in its input buffer. At every
// frame boundary the controller issues three start pulses to the external
// transform core, ten sample periods apart:
//   1. channel-1 frame, Hamming-windowed, forward transform; each output bin
//      is multiplied by the channel-1 delay-filter coefficient (pre-emphasis
//      included) and stored in the spectrum buffer;
//   2. the same for channel 2; each filtered bin is added to the stored
//      channel-1 bin;
//   3. the summed spectrum, inverse transform; the real part of the result
//      is overlap-added with the previous frame's second half, giving 256
//      output samples in a burst, which the output buffer releases one per
//      input sample strobe.
// The transform core is outside this module: the fft_* ports carry its
// start pulse and direction, a 512-word load stream and a 512-word result
// stream in natural bin order (fft_xk_index). The design expects the core to
// scale its forward transform by 1/512, leave its inverse unscaled, and to
// accept a start only when idle (fft_busy low).
//
// Latency: an output sample leaves the output buffer on the first sample
// strobe after its frame's inverse transform completes, about 2*START_GAP+1
// sample periods after the boundary; the delay through the whole design
// is therefore about one frame plus 21 sample periods.
// Requirement: a sample period must exceed one tenth of a complete core
// operation (start to last output), or timing_error is raised.
//
// The structure, frame sizes, start-pulse schedule and the folding of the
// pre-emphasis into the delay filter follow the reference design; the
// number formats, core interface, buffer organisation and the pipeline
// register placement are this implementation's.
module dasb_top
  import dasb_pkg::*;
#(
  parameter int unsigned FRAME_LEN  = 512,
  parameter int unsigned HOP        = 256,
  parameter int unsigned START_GAP  = 10,
  parameter int unsigned GUARD      = 32,
  parameter int unsigned OUT_DEPTH  = 512,
  parameter real         PREEMPH    = 0.97,
  parameter real         MIC1_DELAY = 0.0,
  parameter real         MIC2_DELAY = 0.0,
  parameter real         MIC1_GAIN  = 1.0,
  parameter real         MIC2_GAIN  = 1.0,
  localparam int unsigned IW = $clog2(FRAME_LEN)
) (
  input  logic          clk,
  input  logic          rst_n,
  // microphone samples
  input  logic          in_valid,
  input  sample_t       mic1,
  input  sample_t       mic2,
  // enhanced output
  output logic          out_valid,
  output sample_t       out_sample,
  // shared FFT/IFFT core
  output logic          fft_start,
  output logic          fft_fwd,
  output logic          fft_xn_valid,
  output cplx_t         fft_xn,
  input  logic          fft_busy,
  input  logic          fft_xk_valid,
  input  logic [IW-1:0] fft_xk_index,
  input  cplx_t         fft_xk,
  // status
  output logic          frame_boundary,
  output logic          timing_error,
  output logic          out_overflow
);

  phase_t        phase;
  logic          load_valid;
  logic [IW-1:0] load_idx;
  logic [8:0]    since_boundary;
  logic          fwd_phase;

  start_pulse_controller #(
    .FRAME_LEN (FRAME_LEN),
    .HOP       (HOP),
    .START_GAP (START_GAP)
  ) u_ctrl (
    .clk            (clk),
    .rst_n          (rst_n),
    .in_valid       (in_valid),
    .fft_busy       (fft_busy),
    .frame_boundary (frame_boundary),
    .fft_start      (fft_start),
    .fft_fwd        (fft_fwd),
    .phase          (phase),
    .load_valid     (load_valid),
    .load_idx       (load_idx),
    .since_boundary (since_boundary),
    .timing_error   (timing_error)
  );

  assign fwd_phase = (phase == PH_FFT1) || (phase == PH_FFT2);

  // ---------------------------------------------------------------- framing
  sample_t frame1, frame2;

  input_frame_buffer #(.FRAME_LEN(FRAME_LEN), .GUARD(GUARD)) u_buf1 (
    .clk            (clk),
    .rst_n          (rst_n),
    .in_valid       (in_valid),
    .in_sample      (mic1),
    .since_boundary (since_boundary),
    .rd_en          (load_valid && fwd_phase),
    .idx            (load_idx),
    .sample         (frame1)
  );

  input_frame_buffer #(.FRAME_LEN(FRAME_LEN), .GUARD(GUARD)) u_buf2 (
    .clk            (clk),
    .rst_n          (rst_n),
    .in_valid       (in_valid),
    .in_sample      (mic2),
    .since_boundary (since_boundary),
    .rd_en          (load_valid && fwd_phase),
    .idx            (load_idx),
    .sample         (frame2)
  );

  // --------------------------------------------------------------- windowing
  logic [IW-1:0] load_idx_d1;
  data_t         win1, win2;

  always_ff @(posedge clk) load_idx_d1 <= load_idx;

  hamming_window #(.FRAME_LEN(FRAME_LEN)) u_win (
    .clk (clk),
    .idx (load_idx_d1),
    .x1  (frame1),
    .x2  (frame2),
    .y1  (win1),
    .y2  (win2)
  );

  // ----------------------------------------------------- spectrum sum buffer
  logic  filt_valid;
  logic [IW-1:0] filt_bin;
  cplx_t filt_y;
  cplx_t spec_rd;

  spectrum_sum_buffer #(.NFFT(FRAME_LEN)) u_spec (
    .clk        (clk),
    .wr_valid   (filt_valid),
    .accumulate (phase == PH_FFT2),
    .wr_data    (filt_y),
    .rd_idx     (load_idx),
    .rd_data    (spec_rd)
  );

  // ------------------------------------------------------ core load stream
  // Forward loads: buffer read (1) + window (2) = 3 clocks after load_idx.
  // Inverse load: spectrum buffer read = 1 clock after load_idx.
  logic [2:0] load_pipe;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) load_pipe <= '0;
    else        load_pipe <= {load_pipe[1:0], load_valid};
  end

  always_comb begin
    if (fwd_phase) begin
      fft_xn_valid = load_pipe[2];
      fft_xn.re    = (phase == PH_FFT2) ? win2 : win1;
      fft_xn.im    = '0;
    end else begin
      fft_xn_valid = load_pipe[0] && (phase == PH_IFFT);
      fft_xn       = spec_rd;
    end
  end

  // ------------------------------------------------------------ delay filter
  delay_filter #(
    .NFFT       (FRAME_LEN),
    .PREEMPH    (PREEMPH),
    .MIC1_DELAY (MIC1_DELAY),
    .MIC2_DELAY (MIC2_DELAY),
    .MIC1_GAIN  (MIC1_GAIN),
    .MIC2_GAIN  (MIC2_GAIN)
  ) u_filt (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (fft_xk_valid && fwd_phase),
    .chan      (phase == PH_FFT2),
    .bin       (fft_xk_index),
    .x         (fft_xk),
    .out_valid (filt_valid),
    .out_bin   (filt_bin),
    .y         (filt_y)
  );

  // ----------------------------------------------------------- overlap-add
  logic    ola_valid;
  sample_t ola_data;

  overlap_add #(.FRAME_LEN(FRAME_LEN)) u_ola (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (fft_xk_valid && (phase == PH_IFFT)),
    .in_idx    (fft_xk_index),
    .in_data   (fft_xk.re),
    .out_valid (ola_valid),
    .out_data  (ola_data)
  );

  // --------------------------------------------------------- output buffer
  output_buffer #(.DEPTH(OUT_DEPTH)) u_out (
    .clk       (clk),
    .rst_n     (rst_n),
    .wr_valid  (ola_valid),
    .wr_data   (ola_data),
    .tick      (in_valid),
    .out_valid (out_valid),
    .out_data  (out_sample),
    .overflow  (out_overflow)
  );

  // The filtered bins reach the spectrum buffer in natural order.
  a_bin_order: assert property (@(posedge clk) disable iff (!rst_n)
    filt_valid && $past(filt_valid) |-> filt_bin == $past(filt_bin) + 1'b1)
    else $error("dasb_top: filtered bins out of order");

endmodule
