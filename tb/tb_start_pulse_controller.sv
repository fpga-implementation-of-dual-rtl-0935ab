// tb_start_pulse_controller: small frame (16 samples, hop 8, start gap 2),
// one sample every 40 clocks. Checks that the first boundary comes with the
// 16th sample and then every 8th; that each frame gets three start pulses,
// 0, 2 and 4 sample periods after its boundary, in the order
// FFT ch1 / FFT ch2 / IFFT with the matching direction; that each start
// opens a 16-clock load sequence counting 0..15; that since_boundary counts
// samples after the boundary. Then a busy core at a start pulse must raise
// the sticky timing_error.
module tb_start_pulse_controller;
  import dasb_pkg::*;
  localparam int F = 16, H = 8, G = 2, T = 40;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, fft_busy, frame_boundary, fft_start, fft_fwd, load_valid, timing_error;
  phase_t phase;
  logic [3:0] load_idx;
  logic [8:0] since_boundary;
  int checks = 0, failures = 0;

  start_pulse_controller #(.FRAME_LEN(F), .HOP(H), .START_GAP(G)) dut (
    .clk, .rst_n, .in_valid, .fft_busy, .frame_boundary, .fft_start, .fft_fwd, .phase,
    .load_valid, .load_idx, .since_boundary, .timing_error);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int n_samples = 0, starts_in_frame = 0, n_boundaries = 0, load_cnt = 0;
  longint cyc = 0, last_sample_cyc = 0, boundary_cyc = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (frame_boundary) begin
        n_boundaries++;
        check(n_samples >= F && ((n_samples - F) % H) == 0,
              $sformatf("boundary after sample %0d", n_samples));
        check(cyc == last_sample_cyc, "boundary one clock after the sample");
        boundary_cyc = cyc;
        starts_in_frame = 0;
      end
      if (fft_start) begin
        check(cyc == boundary_cyc + longint'(starts_in_frame * G * T),
              $sformatf("start %0d at cycle %0d", starts_in_frame, cyc - boundary_cyc));
        case (starts_in_frame)
          0: check(phase == PH_FFT1 && fft_fwd, "start 1 is FFT ch1");
          1: check(phase == PH_FFT2 && fft_fwd, "start 2 is FFT ch2");
          2: check(phase == PH_IFFT && !fft_fwd, "start 3 is IFFT");
          default: check(0, "extra start");
        endcase
        starts_in_frame++;
        check(load_valid && load_idx == 0, "load begins with the start pulse");
        load_cnt = 0;
      end
      if (load_valid) begin
        check(int'(load_idx) == load_cnt, "load index sequence");
        load_cnt++;
      end else if (load_cnt != 0) begin
        check(load_cnt == F, $sformatf("load length %0d", load_cnt));
        load_cnt = 0;
      end
    end
    if (in_valid) begin n_samples++; last_sample_cyc = cyc + 1; end
  end

  initial begin
    in_valid = 0; fft_busy = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 60; i++) begin
      repeat (T - 1) @(negedge clk);
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      if (n_boundaries > 0)
        check(int'(since_boundary) == ((n_samples - F) % H), "since_boundary");
    end
    check(n_boundaries == 1 + (60 - F) / H, $sformatf("%0d boundaries", n_boundaries));
    check(!timing_error, "no timing error with an idle core");
    // a busy core at the next start pulse
    fft_busy = 1;
    for (int i = 0; i < H; i++) begin
      repeat (T - 1) @(negedge clk);
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
    end
    check(timing_error, "timing_error on a start while busy");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
