// addr_shift_reg: addressable shift register, the storage element behind
// every buffer of the beamformer (input framing, spectrum sum, overlap-add).
//
// On a clock edge with shift_en high, din enters stage 0 and every stage
// moves one place deeper; the word in stage DEPTH-1 is lost. Any stage can
// be read through raddr (0 = newest word) with a combinational read, the
// way an FPGA SRL primitive is read. Building the buffers from addressable
// shift registers follows the reference design; stage contents are not
// reset, since every stage is written before a reader looks at it.
module addr_shift_reg #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned DEPTH = 512,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             shift_en,
  input  logic [WIDTH-1:0] din,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] dout
);

  logic [WIDTH-1:0] stages [DEPTH];

  always_ff @(posedge clk) begin
    if (shift_en) begin
      stages[0] <= din;
      for (int unsigned i = 1; i < DEPTH; i++) stages[i] <= stages[i-1];
    end
  end

  assign dout = (32'(raddr) < DEPTH) ? stages[raddr] : '0;

endmodule
