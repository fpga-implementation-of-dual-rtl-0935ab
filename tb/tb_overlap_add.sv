// tb_overlap_add: 16-sample frames. Five random frames (with idle gaps
// inside) go through overlap-add; each burst of 8 outputs must equal
// first-half + previous second-half (zero before the first frame), rounded
// from Q1.23 to Q1.15 and saturated, one clock after the input.
module tb_overlap_add;
  import dasb_pkg::*;
  localparam int F = 16, H = F / 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, out_valid;
  logic [3:0] in_idx;
  data_t in_data;
  sample_t out_data;
  int checks = 0, failures = 0, n_out = 0;
  longint prev [H];
  longint expq [$];

  overlap_add #(.FRAME_LEN(F)) dut (.clk, .rst_n, .in_valid, .in_idx, .in_data, .out_valid, .out_data);

  function automatic longint to16(input longint v);
    longint r;
    r = (v + 128) >>> 8;
    if (r > 32767) r = 32767;
    if (r < -32768) r = -32768;
    return r;
  endfunction

  initial begin
    in_valid = 0; in_idx = '0; in_data = '0;
    foreach (prev[i]) prev[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 5; f++) begin
      for (int i = 0; i < F; i++) begin
        @(negedge clk);
        in_valid = 1; in_idx = 4'(i);
        in_data = data_t'($urandom);
        if (f == 2 && i == 1) in_data = 24'sh7FFFFF;
        if (f == 1 && i == H + 1) in_data = 24'sh7FFFFF;
        if (i < H) expq.push_back(to16(longint'(in_data) + prev[i]));
        else prev[i - H] = longint'(in_data);
        if (i == 5) begin @(negedge clk); in_valid = 0; end
      end
      @(negedge clk); in_valid = 0;
      repeat (3) @(negedge clk);
    end
    checks++;
    if (n_out != 5 * H) begin failures++; $display("FAIL: %0d outputs", n_out); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    n_out++;
    checks++;
    if (expq.size() == 0 || longint'(out_data) != expq[0]) begin
      failures++;
      $display("FAIL: output %0d = %0d, expected %0d", n_out, out_data, (expq.size() != 0) ? expq[0] : 0);
    end
    if (expq.size() != 0) void'(expq.pop_front());
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
