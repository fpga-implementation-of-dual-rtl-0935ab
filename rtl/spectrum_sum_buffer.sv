// spectrum_sum_buffer: holds the delay-filtered spectrum between the
// channel-1 and channel-2 transforms and forms their sum, which the inverse
// transform then reads.
//
// The store is an addressable shift register of NFFT complex words. Bins
// arrive in natural order, one per wr_valid. In the first pass
// (accumulate = 0) each bin is shifted in as it is. In the second pass
// (accumulate = 1) the word leaving the far end is the channel-1 value of
// the same bin, so it is added to the channel-2 value and the sum shifted in;
// after NFFT such writes the register holds Y(k) = H1 X1(k) + H2 X2(k) in
// order. The sum saturates at 24 bits. rd_idx selects a bin for the inverse
// transform; rd_data shows it one clock later. A read is ignored during an
// accumulating write, which uses the read port.
//
// Summing the two filtered spectra follows the reference design; using the
// shift register's far end as the first-pass value is this
// implementation's own way of doing it with an addressable shift register.
module spectrum_sum_buffer
  import dasb_pkg::*;
#(
  parameter int unsigned NFFT = 512,
  localparam int unsigned BW = $clog2(NFFT)
) (
  input  logic          clk,
  input  logic          wr_valid,
  input  logic          accumulate,
  input  cplx_t         wr_data,
  input  logic [BW-1:0] rd_idx,
  output cplx_t         rd_data
);

  logic [BW-1:0]   raddr;
  logic [2*DATA_W-1:0] tail_raw;
  cplx_t           tail, sum, din;

  assign raddr = (wr_valid && accumulate) ? BW'(NFFT - 1) : BW'(NFFT - 1 - 32'(rd_idx));
  assign tail  = cplx_t'(tail_raw);

  always_comb begin
    sum.re = sat_data(64'(tail.re) + 64'(wr_data.re));
    sum.im = sat_data(64'(tail.im) + 64'(wr_data.im));
    din    = accumulate ? sum : wr_data;
  end

  addr_shift_reg #(.WIDTH(2*DATA_W), .DEPTH(NFFT)) u_sr (
    .clk      (clk),
    .shift_en (wr_valid),
    .din      (din),
    .raddr    (raddr),
    .dout     (tail_raw)
  );

  always_ff @(posedge clk) begin
    rd_data <= tail;
  end

endmodule
