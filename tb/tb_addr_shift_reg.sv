// tb_addr_shift_reg: random shifts and reads of a 16-deep, 8-bit addressable
// shift register against a queue model (newest word at address 0).
module tb_addr_shift_reg;
  localparam int W = 8, D = 16;
  logic clk = 0;
  always #5 clk = ~clk;
  logic shift_en;
  logic [W-1:0] din, dout;
  logic [3:0] raddr;
  int checks = 0, failures = 0;
  logic [W-1:0] model [$];

  addr_shift_reg #(.WIDTH(W), .DEPTH(D)) dut (.clk, .shift_en, .din, .raddr, .dout);

  initial begin
    shift_en = 0; din = '0; raddr = '0;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      shift_en = ($urandom % 3) != 0;
      din = W'($urandom);
      if (shift_en) begin
        model.push_front(din);
        if (model.size() > D) void'(model.pop_back());
      end
      @(posedge clk);
      #1;
      for (int a = 0; a < D; a += 6) begin
        raddr = 4'(a);
        #1;
        if (a < model.size()) begin
          checks++;
          if (dout !== model[a]) begin
            failures++;
            $display("FAIL: stage %0d = %h, expected %h", a, dout, model[a]);
          end
        end
      end
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
