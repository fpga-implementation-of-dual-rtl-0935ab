// tb_input_frame_buffer: a 16-sample frame with a guard of 4 is read oldest
// first while new samples keep arriving; since_boundary is advanced with
// them, and every read must return the frame captured at the boundary, one
// clock after the index.
module tb_input_frame_buffer;
  import dasb_pkg::*;
  localparam int F = 16, G = 4;
  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  logic in_valid, rd_en;
  sample_t in_sample, sample;
  logic [8:0] since_boundary;
  logic [3:0] idx;
  int checks = 0, failures = 0;
  sample_t hist [$];
  sample_t frame [F];

  input_frame_buffer #(.FRAME_LEN(F), .GUARD(G)) dut (
    .clk, .rst_n, .in_valid, .in_sample, .since_boundary, .rd_en, .idx, .sample);

  task automatic push(input sample_t s);
    @(negedge clk);
    in_valid = 1; in_sample = s;
    @(negedge clk);
    in_valid = 0;
    hist.push_back(s);
  endtask

  initial begin
    in_valid = 0; rd_en = 0; idx = '0; since_boundary = '0; in_sample = '0;
    for (int round = 0; round < 6; round++) begin
      // fill until a boundary, then capture the expected frame
      for (int i = 0; i < F / 2 + ((round == 0) ? F / 2 : 0); i++) push(sample_t'($urandom));
      for (int i = 0; i < F; i++) frame[i] = hist[hist.size() - F + i];
      since_boundary = '0;
      for (int i = 0; i < F; i++) begin
        @(negedge clk);
        rd_en = 1; idx = 4'(i);
        if ((i % 5) == 4 && 32'(since_boundary) < G) begin
          // a new sample arrives during the read
          in_valid = 1; in_sample = sample_t'($urandom);
        end
        @(posedge clk);
        if (in_valid) begin
          hist.push_back(in_sample);
          since_boundary <= since_boundary + 1;
        end
        @(negedge clk);
        in_valid = 0;
        checks++;
        if (sample !== frame[i]) begin
          failures++;
          $display("FAIL: round %0d frame[%0d] = %0d, expected %0d", round, i, sample, frame[i]);
        end
      end
      rd_en = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
