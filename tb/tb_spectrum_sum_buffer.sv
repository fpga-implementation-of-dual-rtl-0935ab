// tb_spectrum_sum_buffer: 16-bin buffer. Pass 1 stores spectrum A, pass 2
// accumulates spectrum B (with gaps between writes, and some bins chosen to
// saturate), then every bin is read back in random order and must equal the
// saturated sum A + B one clock after the read index. Repeated for several
// frames.
module tb_spectrum_sum_buffer;
  import dasb_pkg::*;
  localparam int N = 16;
  logic clk = 0;
  always #5 clk = ~clk;
  logic wr_valid, accumulate;
  cplx_t wr_data, rd_data;
  logic [3:0] rd_idx;
  int checks = 0, failures = 0;
  cplx_t a [N], b [N];

  spectrum_sum_buffer #(.NFFT(N)) dut (.clk, .wr_valid, .accumulate, .wr_data, .rd_idx, .rd_data);

  function automatic longint sat24(input longint v);
    if (v > 8388607) return 8388607;
    if (v < -8388608) return -8388608;
    return v;
  endfunction

  initial begin
    wr_valid = 0; accumulate = 0; wr_data = '0; rd_idx = '0;
    for (int f = 0; f < 5; f++) begin
      for (int k = 0; k < N; k++) begin
        a[k].re = data_t'($urandom); a[k].im = data_t'($urandom);
        b[k].re = data_t'($urandom); b[k].im = data_t'($urandom);
      end
      a[3].re = 24'sh700000; b[3].re = 24'sh700000;     // positive saturation
      a[5].im = 24'sh900000; b[5].im = 24'sh900000;     // negative saturation
      for (int p = 0; p < 2; p++) begin
        for (int k = 0; k < N; k++) begin
          @(negedge clk);
          wr_valid = 1; accumulate = 1'(p); wr_data = (p == 0) ? a[k] : b[k];
          if ((k % 4) == 3) begin @(negedge clk); wr_valid = 0; end
        end
        @(negedge clk); wr_valid = 0;
      end
      accumulate = 0;
      for (int i = 0; i < 2 * N; i++) begin
        int k;
        k = (i < N) ? i : int'($urandom % N);
        @(negedge clk); rd_idx = 4'(k);
        @(negedge clk);
        checks++;
        if (longint'(rd_data.re) != sat24(longint'(a[k].re) + longint'(b[k].re)) ||
            longint'(rd_data.im) != sat24(longint'(a[k].im) + longint'(b[k].im))) begin
          failures++;
          $display("FAIL: frame %0d bin %0d = (%0d,%0d)", f, k, rd_data.re, rd_data.im);
        end
      end
    end
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
