// tb_dasb_chirp: the frequency-response check with a modulated chirp and
// asymmetric delay filters. The talker signal s is an up-chirp sweeping
// 0.005 to 0.45 cycles per sample whose amplitude is modulated by a second,
// slower chirp. Microphone 1 receives s, microphone 2 receives 0.8 s
// delayed by 2.5 samples (a fractional delay, generated analytically); the
// beamformer is built with the matching steering parameters. Every output
// sample must lie within TOL LSB of the double-precision reference; the
// timing and mechanism checks are those of tb_dasb_top.
module tb_dasb_chirp;
  import dasb_pkg::*;
  import dasb_ref_pkg::*;

  localparam int N       = 512;
  localparam int HOP     = 256;
  localparam int T_CLK   = 625;
  localparam int NFRAMES = 4;
  localparam int NS      = N + HOP * (NFRAMES - 1) + 300;
  localparam int TOL     = 3;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid;
  sample_t mic1, mic2, out_sample;
  logic out_valid, fft_start, fft_fwd, fft_xn_valid, fft_busy, fft_xk_valid;
  cplx_t fft_xn, fft_xk;
  logic [8:0] fft_xk_index;
  logic frame_boundary, timing_error, out_overflow;
  int overlap_errors, operations;

  dasb_top #(.MIC1_DELAY(0.0), .MIC2_DELAY(2.5), .MIC1_GAIN(1.0), .MIC2_GAIN(0.8)) dut (
    .clk, .rst_n, .in_valid, .mic1, .mic2, .out_valid, .out_sample,
    .fft_start, .fft_fwd, .fft_xn_valid, .fft_xn, .fft_busy,
    .fft_xk_valid, .fft_xk_index, .fft_xk,
    .frame_boundary, .timing_error, .out_overflow
  );

  fft_core_model #(.N(N), .LATENCY(5210)) core (
    .clk, .rst_n, .start(fft_start), .fwd(fft_fwd), .xn_valid(fft_xn_valid), .xn(fft_xn),
    .busy(fft_busy), .xk_valid(fft_xk_valid), .xk_index(fft_xk_index), .xk(fft_xk),
    .overlap_errors, .operations
  );

  int checks = 0, failures = 0;
  rvec_t x1, x2, yref;
  sample_t s1 [NS];
  sample_t s2 [NS];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // ---------------------------------------------------------- stimulus
  function automatic real talker(input real t);
    real ph, env;
    ph  = 0.005 * t + (0.45 - 0.005) * t * t / (2.0 * NS);
    env = 0.6 + 0.4 * $sin(2.0 * PI * (0.001 * t + 0.004 * t * t / (2.0 * NS)));
    return 0.45 * env * $sin(2.0 * PI * ph);
  endfunction

  initial begin
    x1 = new[NS]; x2 = new[NS];
    for (int i = 0; i < NS; i++) begin
      s1[i] = sample_t'($rtoi($floor(talker(real'(i)) * 32768.0 + 0.5)));
      s2[i] = sample_t'($rtoi($floor(0.8 * talker(real'(i) - 2.5) * 32768.0 + 0.5)));
      x1[i] = real'(s1[i]) / 32768.0;
      x2[i] = real'(s2[i]) / 32768.0;
    end
    yref = reference(x1, x2, N, NFRAMES, 0.0, 2.5, 1.0, 0.8, 0.97);
  end

  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    in_valid = 0; mic1 = '0; mic2 = '0;
    repeat (5) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < NS; i++) begin
      repeat (T_CLK - 1) @(posedge clk);
      in_valid <= 1; mic1 <= s1[i]; mic2 <= s2[i];
      @(posedge clk);
      in_valid <= 0;
    end
    repeat (20) @(posedge clk);
    finish_test();
  end

  // ---------------------------------------------------------- output check
  int n_out = 0, max_err = 0;
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      if (n_out < NFRAMES * HOP) begin
        int e, r;
        r = $rtoi($floor(yref[n_out] * 32768.0 + 0.5));
        if (r > 32767) r = 32767;
        if (r < -32768) r = -32768;
        e = int'(out_sample) - r;
        if (e < 0) e = -e;
        if (e > max_err) max_err = e;
        check(e <= TOL, $sformatf("out[%0d] = %0d, reference %0d", n_out, out_sample, r));
      end
      n_out++;
    end
  end

  // ---------------------------------------------------------- timing and mechanisms
  longint last_boundary = -1, last_start = -1;
  int n_boundary = 0, n_start_fft1 = 0, n_start_fft2 = 0, n_start_ifft = 0;
  int n_mode_switch = 0, n_accumulate = 0, n_ola_primed = 0, n_empty_tick = 0;
  int n_bursts = 0, start_in_frame = 0;
  logic prev_fwd = 1, prev_ola = 0;

  always @(posedge clk) if (rst_n) begin
    if (frame_boundary) begin
      n_boundary++;
      if (last_boundary >= 0)
        check(cycle - last_boundary == HOP * T_CLK, "frame boundaries 256 sample periods apart");
      last_boundary = cycle;
      start_in_frame = 0;
    end
    if (fft_start) begin
      start_in_frame++;
      if (start_in_frame > 1)
        check(cycle - last_start == 10 * T_CLK, "start pulses 10 sample periods apart");
      last_start = cycle;
      check(!fft_busy, "start pulse while the core is busy");
      case (start_in_frame)
        1: begin n_start_fft1++; check(fft_fwd && dut.phase == PH_FFT1, "first start is FFT of channel 1"); end
        2: begin n_start_fft2++; check(fft_fwd && dut.phase == PH_FFT2, "second start is FFT of channel 2"); end
        3: begin n_start_ifft++; check(!fft_fwd && dut.phase == PH_IFFT, "third start is the IFFT"); end
        default: check(0, "more than three starts in a frame");
      endcase
    end
    if (fft_fwd != prev_fwd) n_mode_switch++;
    prev_fwd = fft_fwd;
    if (dut.u_spec.wr_valid && dut.u_spec.accumulate) n_accumulate++;
    if (dut.u_ola.out_valid && !prev_ola) begin
      n_bursts++;
      if (dut.u_ola.primed) n_ola_primed++;
    end
    prev_ola = dut.u_ola.out_valid;
    if (in_valid && dut.u_out.count == 0) n_empty_tick++;
  end

  task automatic finish_test();
    check(n_out >= NFRAMES * HOP, $sformatf("%0d output samples, expected at least %0d", n_out, NFRAMES * HOP));
    check(!timing_error, "timing_error raised");
    check(!out_overflow, "output buffer overflow");
    check(overlap_errors == 0, "core started while busy");
    check(operations == 3 * n_boundary, "three core operations per frame");
    check(n_boundary > 0, "mechanism: frame boundary");
    check(n_start_fft1 > 0, "mechanism: start FFT channel 1");
    check(n_start_fft2 > 0, "mechanism: start FFT channel 2");
    check(n_start_ifft > 0, "mechanism: start IFFT");
    check(n_mode_switch > 0, "mechanism: forward/inverse switch");
    check(n_accumulate > 0, "mechanism: spectrum accumulation");
    check(n_ola_primed > 0, "mechanism: overlap-add with stored half");
    check(n_empty_tick > 0, "mechanism: tick with empty output buffer");
    check(n_bursts > 0, "mechanism: overlap-add burst");
    $display("boundaries=%0d starts=%0d/%0d/%0d switches=%0d accum=%0d bursts=%0d primed=%0d empty_ticks=%0d outputs=%0d max_err=%0d LSB",
             n_boundary, n_start_fft1, n_start_fft2, n_start_ifft, n_mode_switch,
             n_accumulate, n_bursts, n_ola_primed, n_empty_tick, n_out, max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    repeat ((NS + 40) * T_CLK) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
