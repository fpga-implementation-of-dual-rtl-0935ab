// fft_core_model: behavioural (non-synthesizable) model of the shared
// 512-point FFT/IFFT core the beamformer drives, for simulation only.
//
// Protocol: a one-clock `start` pulse with `fwd` (1 = forward, 0 = inverse)
// begins an operation; the next N words with xn_valid high are the input, in
// order. Exactly LATENCY clocks after the start pulse the result streams
// out, one bin per clock in natural order, with xk_valid and xk_index.
// `busy` is high from the start pulse to the last output word.
// Arithmetic is double precision: the forward transform is scaled by 1/N,
// the inverse is unscaled, and outputs are rounded and saturated to 24 bits.
// A start pulse while busy is counted in `overlap_errors`. rst_n low
// aborts any operation and ignores start pulses.
module fft_core_model
  import dasb_pkg::*;
#(
  parameter int unsigned N       = 512,
  parameter int unsigned LATENCY = 5210,
  localparam int unsigned IW = $clog2(N)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          fwd,
  input  logic          xn_valid,
  input  cplx_t         xn,
  output logic          busy,
  output logic          xk_valid,
  output logic [IW-1:0] xk_index,
  output cplx_t         xk,
  output int            overlap_errors,
  output int            operations
);

  real    in_re [N];
  real    in_im [N];
  real    out_re [N];
  real    out_im [N];
  real    tw_c [N];
  real    tw_s [N];
  int     n_loaded;
  int     cyc;
  int     out_cnt;
  logic   dir_fwd;
  logic   running;

  initial begin
    for (int i = 0; i < int'(N); i++) begin
      tw_c[i] = $cos(2.0 * 3.14159265358979323846 * real'(i) / real'(N));
      tw_s[i] = $sin(2.0 * 3.14159265358979323846 * real'(i) / real'(N));
    end
    busy = 0; xk_valid = 0; xk_index = '0; xk = '0;
    overlap_errors = 0; operations = 0; running = 0; n_loaded = 0; cyc = 0; out_cnt = 0;
    dir_fwd = 1;
  end

  function automatic data_t q24(input real v);
    real r;
    r = $floor(v * 8388608.0 + 0.5);
    if (r > 8388607.0)  r = 8388607.0;
    if (r < -8388608.0) r = -8388608.0;
    return data_t'($rtoi(r));
  endfunction

  task automatic transform();
    real sr, si, c, s, sc;
    int  idx;
    sc = dir_fwd ? 1.0 / real'(N) : 1.0;
    for (int k = 0; k < int'(N); k++) begin
      sr = 0.0; si = 0.0;
      for (int n = 0; n < int'(N); n++) begin
        idx = (k * n) % int'(N);
        c = tw_c[idx];
        s = dir_fwd ? -tw_s[idx] : tw_s[idx];
        sr += in_re[n] * c - in_im[n] * s;
        si += in_re[n] * s + in_im[n] * c;
      end
      out_re[k] = sr * sc;
      out_im[k] = si * sc;
    end
  endtask

  always @(posedge clk) begin
    xk_valid <= 1'b0;
    if (!rst_n) begin
      running = 0;
      busy   <= 1'b0;
    end else if (start) begin
      if (busy) overlap_errors <= overlap_errors + 1;
      dir_fwd  = fwd;
      running  = 1;
      busy    <= 1'b1;
      n_loaded = 0;
      cyc      = 0;
      out_cnt  = 0;
      operations <= operations + 1;
    end else if (running) begin
      cyc = cyc + 1;
      if (xn_valid && n_loaded < int'(N)) begin
        in_re[n_loaded] = real'(xn.re) / 8388608.0;
        in_im[n_loaded] = real'(xn.im) / 8388608.0;
        n_loaded = n_loaded + 1;
      end
      if (cyc == int'(LATENCY) - 1) transform();
      if (cyc >= int'(LATENCY) - 1 && out_cnt < int'(N)) begin
        xk_valid <= 1'b1;
        xk_index <= IW'(out_cnt);
        xk.re    <= q24(out_re[out_cnt]);
        xk.im    <= q24(out_im[out_cnt]);
        out_cnt  = out_cnt + 1;
        if (out_cnt == int'(N)) begin
          running = 0;
          busy   <= 1'b0;
        end
      end
    end
  end

endmodule
