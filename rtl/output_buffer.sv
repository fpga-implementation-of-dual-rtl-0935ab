// output_buffer: turns the overlap-add bursts into a uniform-rate output.
//
// Overlap-add delivers FRAME_LEN/2 samples in a burst at clock rate once per
// hop, with long gaps in between. This block queues them in an addressable
// shift register of DEPTH words: a write shifts the sample in at stage 0,
// so the oldest waiting sample is always at stage count-1, where count is
// the number of samples waiting. One sample is emitted on every `tick` (the
// input sample strobe, so output and input rates match); a write and a read
// in the same clock leave count unchanged. While the queue is empty, as
// before the first frame has been processed, a tick emits nothing. A write
// into a full queue is dropped and sets the sticky `overflow` flag.
// out_valid/out_data are registered and appear one clock after the tick.
//
// The reference design names this buffer/output block and its purpose, and
// builds its buffers from addressable shift registers; the queue depth and
// the empty/full behaviour are this implementation's choices.
module output_buffer
  import dasb_pkg::*;
#(
  parameter int unsigned DEPTH = 512,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    wr_valid,
  input  sample_t wr_data,
  input  logic    tick,
  output logic    out_valid,
  output sample_t out_data,
  output logic    overflow
);

  logic [AW:0]         count;
  logic [AW-1:0]       raddr;
  logic [SAMPLE_W-1:0] oldest;
  logic                do_wr, do_rd;

  assign do_rd = tick && (count != 0);
  assign do_wr = wr_valid && (32'(count) < DEPTH);
  assign raddr = AW'(count - 1'b1);

  addr_shift_reg #(.WIDTH(SAMPLE_W), .DEPTH(DEPTH)) u_sr (
    .clk      (clk),
    .shift_en (do_wr),
    .din      (wr_data),
    .raddr    (raddr),
    .dout     (oldest)
  );

  always_ff @(posedge clk) begin
    if (do_rd) out_data <= sample_t'(oldest);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count     <= '0;
      out_valid <= 1'b0;
      overflow  <= 1'b0;
    end else begin
      out_valid <= do_rd;
      count     <= count + (AW+1)'(do_wr) - (AW+1)'(do_rd);
      if (wr_valid && !do_wr) overflow <= 1'b1;
    end
  end

endmodule
