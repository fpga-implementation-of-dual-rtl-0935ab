// tb_delay_filter: asymmetric steering (channel 2 delayed by 2.5 samples,
// gain 0.8) with the 0.97 pre-emphasis. Random bins of both channels are
// streamed, one per clock; each output must equal the complex product of
// the input and an independently computed, Q2.16-quantised coefficient,
// rounded to Q1.23, exactly three clocks later. A full-scale input checks
// saturation-free behaviour at the largest coefficient.
module tb_delay_filter;
  import dasb_pkg::*;
  localparam int N = 512;
  localparam real PI = 3.14159265358979323846;
  localparam real D1 = 0.0, D2 = 2.5, G1 = 1.0, G2 = 0.8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, chan, out_valid;
  logic [8:0] bin, out_bin;
  cplx_t x, y;
  int checks = 0, failures = 0;

  delay_filter #(.NFFT(N), .MIC1_DELAY(D1), .MIC2_DELAY(D2), .MIC1_GAIN(G1), .MIC2_GAIN(G2)) dut (
    .clk, .rst_n, .in_valid, .chan, .bin, .x, .out_valid, .out_bin, .y);

  function automatic longint qc(input real v);
    return longint'($rtoi($floor(v * 65536.0 + 0.5)));
  endfunction

  // expected {re, im} for channel c, bin k, input (xr, xi)
  function automatic void expect_bin(input int c, input int k, input longint xr, input longint xi,
                                     output longint er, output longint ei);
    real g, tau, om, wr, wi, pr, pim;
    longint cr, ci;
    int kk;
    g   = ((c == 0) ? G1 : G2) / (G1 * G1 + G2 * G2);
    tau = (c == 0) ? D1 : D2;
    kk  = (k <= N / 2) ? k : k - N;
    om  = 2.0 * PI * kk / N;
    wr  = g * $cos(om * tau);  wi = g * $sin(om * tau);
    pr  = 1.0 - 0.97 * $cos(om); pim = 0.97 * $sin(om);
    cr  = qc((wr * pr - wi * pim) / 1.08);
    ci  = (k == N / 2) ? 0 : qc((wr * pim + wi * pr) / 1.08);
    er = (xr * cr - xi * ci + 32768) >>> 16;
    ei = (xr * ci + xi * cr + 32768) >>> 16;
  endfunction

  longint qr [$], qi [$];
  int qb [$];
  int lat_fail = 0;

  initial begin
    longint er, ei;
    in_valid = 0; chan = 0; bin = '0; x = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      in_valid = (i % 7) != 6;
      chan = 1'(i / 700);
      bin  = 9'($urandom);
      if (i < 4) begin bin = 9'(256 * (i % 2)); x.re = 24'sh7FFFFF; x.im = 24'sh800000; end
      else begin x.re = data_t'($urandom); x.im = data_t'($urandom); end
      x.re = x.re >>> 1; x.im = x.im >>> 1;   // spectra never exceed half scale
      if (in_valid) begin
        expect_bin(int'(chan), int'(bin), longint'(x.re), longint'(x.im), er, ei);
        qr.push_back(er); qi.push_back(ei); qb.push_back(int'(bin));
      end
    end
    @(negedge clk); in_valid = 0;
    repeat (6) @(negedge clk);
    checks++;
    if (qr.size() != 0) begin failures++; $display("FAIL: %0d outputs missing", qr.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // latency: out_valid is in_valid delayed by exactly 3 clocks
  logic [2:0] vpipe = '0;
  always @(posedge clk) begin
    vpipe <= {vpipe[1:0], in_valid};
    if (rst_n) begin
      checks++;
      if (out_valid !== vpipe[2]) begin failures++; $display("FAIL: latency"); end
    end
    if (rst_n && out_valid && qr.size() > 0) begin
      checks++;
      if (longint'(y.re) != qr[0] || longint'(y.im) != qi[0] || int'(out_bin) != qb[0]) begin
        failures++;
        if (failures < 10) $display("FAIL: bin %0d y=(%0d,%0d) expected (%0d,%0d)", qb[0], y.re, y.im, qr[0], qi[0]);
      end
      void'(qr.pop_front()); void'(qi.pop_front()); void'(qb.pop_front());
    end
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
