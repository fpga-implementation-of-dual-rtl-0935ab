// hamming_window: Hamming weighting of the two channels' frames.
//
// One read-only table holds the FRAME_LEN window values, shared by two
// multipliers, one per channel, as in the reference design. The window is
// the periodic Hamming window w(n) = 0.54 - 0.46 cos(2 pi n / FRAME_LEN),
// stored as unsigned Q1.15 and computed at elaboration. The periodic form
// (this implementation's choice) makes 50%-overlapped windows add up to the
// constant 1.08, which the delay filter divides out again.
//
// Timing: idx, x1 and x2 are registered together with the table read
// (cycle 1); the products, rounded from Q2.30 to the 24-bit Q1.23 format of
// the transform core, appear on y1/y2 two clocks after the inputs.
module hamming_window
  import dasb_pkg::*;
#(
  parameter int unsigned FRAME_LEN = 512,
  parameter int unsigned WIN_W     = 16,
  localparam int unsigned IW = $clog2(FRAME_LEN)
) (
  input  logic          clk,
  input  logic [IW-1:0] idx,
  input  sample_t       x1,
  input  sample_t       x2,
  output data_t         y1,
  output data_t         y2
);

  typedef logic [WIN_W-1:0] win_rom_t [FRAME_LEN];

  function automatic win_rom_t make_window();
    win_rom_t   r;
    real        w;
    for (int n = 0; n < int'(FRAME_LEN); n++) begin
      w = 0.54 - 0.46 * $cos(2.0 * 3.14159265358979323846 * real'(n) / real'(FRAME_LEN));
      r[n] = WIN_W'($rtoi($floor(w * real'(1 << (WIN_W - 1)) + 0.5)));
    end
    return r;
  endfunction

  localparam win_rom_t WIN_ROM = make_window();

  logic [WIN_W-1:0] w_q;
  sample_t          x1_q, x2_q;

  always_ff @(posedge clk) begin
    w_q  <= WIN_ROM[idx];
    x1_q <= x1;
    x2_q <= x2;
  end

  // Q1.15 sample times Q1.(WIN_W-1) window: shift to Q1.23.
  localparam int unsigned SH = SAMPLE_W - 1 + WIN_W - 1 - DATA_FRAC;

  logic signed [SAMPLE_W+WIN_W:0] p1, p2;
  always_comb begin
    p1 = x1_q * $signed({1'b0, w_q});
    p2 = x2_q * $signed({1'b0, w_q});
  end

  always_ff @(posedge clk) begin
    y1 <= sat_data(rshift_round(64'(p1), SH));
    y2 <= sat_data(rshift_round(64'(p2), SH));
  end

endmodule
