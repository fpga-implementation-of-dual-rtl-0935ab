// overlap_add: rebuilds the output signal from 50%-overlapped time frames.
//
// The inverse transform delivers each frame's FRAME_LEN samples in order
// (in_idx counts 0..FRAME_LEN-1; only the real part is used). The second
// half of each frame is shifted into an addressable shift register of
// FRAME_LEN/2 words. While the first half of the next frame arrives, sample
// i is added to the stored sample FRAME_LEN/2 + i of the previous frame,
// read from stage FRAME_LEN/2-1-i, and the sum is emitted: a burst of
// FRAME_LEN/2 output samples at clock rate per frame. Before the first
// frame's second half is stored, the stored half counts as zero.
//
// The shift register plus adder structure follows the reference design.
// The 24-bit Q1.23 sum is rounded to a 16-bit Q1.15 output sample with
// saturation (this implementation's choice). out_valid/out_data follow the
// input by one clock.
module overlap_add
  import dasb_pkg::*;
#(
  parameter int unsigned FRAME_LEN = 512,
  localparam int unsigned IW = $clog2(FRAME_LEN),
  localparam int unsigned HALF = FRAME_LEN / 2,
  localparam int unsigned HW = $clog2(HALF)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [IW-1:0] in_idx,
  input  data_t         in_data,
  output logic          out_valid,
  output sample_t       out_data
);

  logic            second_half;
  logic            primed;
  logic [HW-1:0]   raddr;
  logic [DATA_W-1:0] stored_raw;
  data_t           stored;

  assign second_half = in_idx[IW-1];
  assign raddr       = HW'(HALF - 1 - 32'(in_idx[HW-1:0]));
  assign stored      = primed ? data_t'(stored_raw) : '0;

  addr_shift_reg #(.WIDTH(DATA_W), .DEPTH(HALF)) u_sr (
    .clk      (clk),
    .shift_en (in_valid && second_half),
    .din      (in_data),
    .raddr    (raddr),
    .dout     (stored_raw)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      primed    <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid && !second_half;
      if (in_valid && 32'(in_idx) == FRAME_LEN - 1) primed <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    out_data <= sat_sample(rshift_round(64'(in_data) + 64'(stored), DATA_FRAC - (SAMPLE_W - 1)));
  end

endmodule
