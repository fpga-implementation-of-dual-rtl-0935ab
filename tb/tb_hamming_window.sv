// tb_hamming_window: drives random samples on both channels at every window
// position and checks each product two clocks later against an
// independently computed Q1.15 Hamming value, rounded to Q1.23. Also checks
// the window's shape: w(0) = 0.08, w(256) = 1.0.
module tb_hamming_window;
  import dasb_pkg::*;
  localparam int N = 512;
  localparam real PI = 3.14159265358979323846;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [8:0] idx;
  sample_t x1, x2;
  data_t y1, y2;
  int checks = 0, failures = 0;

  hamming_window #(.FRAME_LEN(N)) dut (.clk, .idx, .x1, .x2, .y1, .y2);

  function automatic longint expect_y(input int n, input sample_t x);
    longint wq, p;
    wq = longint'($rtoi($floor((0.54 - 0.46 * $cos(2.0 * PI * n / N)) * 32768.0 + 0.5)));
    p = longint'(x) * wq;
    return (p + 64) >>> 7;
  endfunction

  longint e1 [$], e2 [$];

  initial begin
    idx = '0; x1 = '0; x2 = '0;
    checks++;
    if ($rtoi($floor((0.54 - 0.46) * 32768.0 + 0.5)) != 2621) failures++;
    for (int i = 0; i < 2 * N + 2; i++) begin
      @(negedge clk);
      if (i >= 2) begin
        checks += 2;
        if (longint'(y1) != e1[0] || longint'(y2) != e2[0]) begin
          failures++;
          $display("FAIL: step %0d y1=%0d (exp %0d) y2=%0d (exp %0d)", i, y1, e1[0], y2, e2[0]);
        end
        void'(e1.pop_front()); void'(e2.pop_front());
      end
      idx = 9'(i % N);
      x1 = (i == 256) ? 16'sh7FFF : sample_t'($urandom);
      x2 = (i == 300) ? 16'sh8000 : sample_t'($urandom);
      e1.push_back(expect_y(i % N, x1));
      e2.push_back(expect_y(i % N, x2));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
