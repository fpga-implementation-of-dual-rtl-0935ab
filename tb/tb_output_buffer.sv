// tb_output_buffer: an 8-deep buffer receives bursts of 6 samples at clock
// rate and is drained by a tick every 4 clocks. Outputs must come out in
// order, one clock after a tick, only while samples are waiting; ticks on an
// empty buffer emit nothing. A final burst larger than the free space must
// raise the sticky overflow flag.
module tb_output_buffer;
  import dasb_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic wr_valid, tick, out_valid, overflow;
  sample_t wr_data, out_data;
  int checks = 0, failures = 0, n_empty = 0;
  sample_t model [$];
  int pending = 0;   // samples in the buffer, by the model

  output_buffer #(.DEPTH(8)) dut (.clk, .rst_n, .wr_valid, .wr_data, .tick, .out_valid, .out_data, .overflow);

  logic tick_d = 0;
  always @(posedge clk) tick_d <= tick;

  initial begin
    wr_valid = 0; tick = 0; wr_data = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 400; cyc++) begin
      @(negedge clk);
      tick = (cyc % 4) == 0;
      wr_valid = (cyc % 48) < 6 && cyc < 300;
      wr_data = sample_t'($urandom);
      if (tick && pending == 0) n_empty++;
      @(posedge clk);
      if (tick && pending > 0) pending--;
      if (wr_valid) begin model.push_back(wr_data); pending++; end
    end
    checks += 2;
    if (overflow) begin failures++; $display("FAIL: unexpected overflow"); end
    if (n_empty == 0) begin failures++; $display("FAIL: no tick on an empty buffer"); end
    // overflow: 10 writes without ticks into an empty 8-deep buffer
    @(negedge clk); tick = 0;
    repeat (20) @(negedge clk);
    for (int i = 0; i < 10; i++) begin
      @(negedge clk); wr_valid = 1; wr_data = sample_t'(i);
    end
    @(negedge clk); wr_valid = 0;
    @(negedge clk);
    checks++;
    if (!overflow) begin failures++; $display("FAIL: overflow not flagged"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // every output is the next sample written, and follows a tick by one clock
  always @(posedge clk) if (rst_n) begin
    if (out_valid) begin
      checks++;
      if (!tick_d || model.size() == 0 || out_data !== model[0]) begin
        failures++;
        $display("FAIL: output %0d", out_data);
      end
      if (model.size() != 0) void'(model.pop_front());
    end
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
