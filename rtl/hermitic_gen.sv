// hermitic_gen: builds the Hermitian-symmetric spectrum fed to the IFFT.
//
// DMT is a baseband modulation: for the IFFT output to be real, bin N-k must
// carry the complex conjugate of bin k.  The carriers 0..N/2-1 arrive in
// index order from the mapper; this block passes them on and keeps a copy in
// a buffer of N/2 complex words.  For an index k in N/2..N-1 it ignores its
// data input and returns conj(buffer[N-k]), which was stored while k-N/2
// earlier indices went by.  Bins 0 and N/2 must be real: the imaginary part
// of bin 0 is cleared and bin N/2 is sent as zero (this design's rule).
// Interface: (in_valid, in_idx, in_re, in_im) in, the same index out one
// cycle later.  The index stream must visit 0..N/2-1 before their mirrors.
module hermitic_gen
  import dmt_pkg::*;
#(
  parameter int unsigned LOG2N = N_DFT_LOG2
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       in_valid,
  input  logic [IDX_W-1:0]           in_idx,
  input  logic signed [SAMPLE_W-1:0] in_re,
  input  logic signed [SAMPLE_W-1:0] in_im,
  output logic                       out_valid,
  output logic [IDX_W-1:0]           out_idx,
  output logic signed [SAMPLE_W-1:0] out_re,
  output logic signed [SAMPLE_W-1:0] out_im
);

  localparam int unsigned N  = 1 << LOG2N;
  localparam int unsigned HW = LOG2N - 1;

  logic [2*SAMPLE_W-1:0] half_buf [N/2];
  logic [LOG2N-1:0]      k, mirror;
  logic                  upper;

  assign k      = in_idx[LOG2N-1:0];
  assign upper  = k[LOG2N-1];
  assign mirror = LOG2N'(N) - k;                 // N-k, in 1..N/2 when upper

  always_ff @(posedge clk)
    if (in_valid && !upper) half_buf[k[HW-1:0]] <= {in_re, in_im};

  logic signed [SAMPLE_W-1:0] mr, mi;
  assign {mr, mi} = half_buf[mirror[HW-1:0]];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_idx   <= '0;
      out_re    <= '0;
      out_im    <= '0;
    end else begin
      out_valid <= in_valid;
      out_idx   <= in_idx;
      if (!upper) begin
        out_re <= in_re;
        out_im <= (k == '0) ? '0 : in_im;
      end else if (k == LOG2N'(N / 2)) begin
        out_re <= '0;
        out_im <= '0;
      end else begin
        out_re <= mr;
        out_im <= (mi == SAMPLE_W'(1 << (SAMPLE_W-1))) ? SAMPLE_W'((1 << (SAMPLE_W-1)) - 1) : -mi;
      end
    end
  end

endmodule
