// delay_filter: frequency-domain delay filter of both channels, with the
// pre-emphasis filter folded into its coefficients.
//
// The shared transform core delivers the spectra of the two channels one
// after the other, so a single complex multiplier serves both; `chan`
// selects the coefficient table. For bin k of channel n the coefficient is
//
//   C_n(k) = a_n e^{+j w tau_n} / (a_1^2 + a_2^2)      steering weight
//          * (1 - PREEMPH e^{-j w})                   pre-emphasis, eq. y(i)=x(i)-0.97x(i-1)
//          / 1.08                                     Hamming overlap gain
//
// with w = 2 pi k'/NFFT and k' = k for k <= NFFT/2, k - NFFT above (so the
// filtered spectrum stays conjugate-symmetric); at k = NFFT/2 only the real
// part is kept. tau_n (MICn_DELAY, in samples) and a_n (MICn_GAIN) are the
// near-field delay and attenuation of microphone n relative to the
// reference; the weights satisfy w^H d = 1. Realising the delay filter in
// the frequency domain, merging the pre-emphasis into it and keeping the
// coefficients in a table follow the reference design; the 1/1.08 factor,
// the Q2.16 coefficient format and the rounding are this implementation's.
// The tables are computed at elaboration from the parameters.
//
// Timing: three-stage pipeline (table read, four real products, sums with
// rounding and saturation to 24 bits); out_valid/out_bin/y follow
// in_valid/bin/x by three clocks, one bin per clock.
module delay_filter
  import dasb_pkg::*;
#(
  parameter int unsigned NFFT       = 512,
  parameter real         PREEMPH    = 0.97,
  parameter real         MIC1_DELAY = 0.0,
  parameter real         MIC2_DELAY = 0.0,
  parameter real         MIC1_GAIN  = 1.0,
  parameter real         MIC2_GAIN  = 1.0,
  localparam int unsigned BW = $clog2(NFFT)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic          chan,      // 0: channel 1, 1: channel 2
  input  logic [BW-1:0] bin,
  input  cplx_t         x,
  output logic          out_valid,
  output logic [BW-1:0] out_bin,
  output cplx_t         y
);

  typedef logic [2*COEF_W-1:0] coef_rom_t [2*NFFT];   // {re, im}

  localparam real PI = 3.14159265358979323846;

  function automatic coef_t quant(input real v);
    real s;
    s = $floor(v * real'(1 << COEF_FRAC) + 0.5);
    if (s > 131071.0)  s = 131071.0;
    if (s < -131072.0) s = -131072.0;
    return coef_t'($rtoi(s));
  endfunction

  function automatic coef_rom_t make_coefs();
    coef_rom_t r;
    real norm, g, tau, om, wr, wi, pr, pi_, cr, ci;
    int  kk;
    norm = MIC1_GAIN * MIC1_GAIN + MIC2_GAIN * MIC2_GAIN;
    for (int n = 0; n < 2; n++) begin
      g   = ((n == 0) ? MIC1_GAIN : MIC2_GAIN) / norm;
      tau = (n == 0) ? MIC1_DELAY : MIC2_DELAY;
      for (int k = 0; k < int'(NFFT); k++) begin
        kk  = (k <= int'(NFFT) / 2) ? k : k - int'(NFFT);
        om  = 2.0 * PI * real'(kk) / real'(NFFT);
        wr  = g * $cos(om * tau);
        wi  = g * $sin(om * tau);
        pr  = 1.0 - PREEMPH * $cos(om);
        pi_ = PREEMPH * $sin(om);
        cr  = (wr * pr - wi * pi_) / 1.08;
        ci  = (wr * pi_ + wi * pr) / 1.08;
        if (k == int'(NFFT) / 2) ci = 0.0;
        r[n * int'(NFFT) + k] = {quant(cr), quant(ci)};
      end
    end
    return r;
  endfunction

  localparam coef_rom_t COEF_ROM = make_coefs();

  // Stage 1: table read.
  logic          v1, v2;
  logic [BW-1:0] b1, b2;
  cplx_t         x1;
  cplx_coef_t    c1;

  always_ff @(posedge clk) begin
    x1 <= x;
    c1 <= cplx_coef_t'(COEF_ROM[{chan, bin}]);
    b1 <= bin;
  end

  // Stage 2: four real products.
  localparam int unsigned PW = DATA_W + COEF_W;
  logic signed [PW-1:0] p_rr, p_ii, p_ri, p_ir;

  always_ff @(posedge clk) begin
    p_rr <= x1.re * c1.re;
    p_ii <= x1.im * c1.im;
    p_ri <= x1.re * c1.im;
    p_ir <= x1.im * c1.re;
    b2   <= b1;
  end

  // Stage 3: (a+jb)(c+jd) = (ac-bd) + j(ad+bc), back to Q1.23.
  always_ff @(posedge clk) begin
    y.re    <= sat_data(rshift_round(64'(p_rr) - 64'(p_ii), COEF_FRAC));
    y.im    <= sat_data(rshift_round(64'(p_ri) + 64'(p_ir), COEF_FRAC));
    out_bin <= b2;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1        <= 1'b0;
      v2        <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      v1        <= in_valid;
      v2        <= v1;
      out_valid <= v2;
    end
  end

endmodule
