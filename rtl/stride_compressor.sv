// stride_compressor: recognises a region line that is an arithmetic sequence.
//
// Chunk n (0-based, W bits each) must equal base + n * stride modulo 2^W,
// where base is chunk 0 and the stride is chunk 1 - chunk 0, which has to be
// representable as a D-bit two's-complement number. The payload is
// {stride[D-1:0], base[W-1:0]}, W + D bits. The check is done by an adder
// chain (chunk n-1 + stride against chunk n), so the decompressor can rebuild
// any chunk with one multiply-add and keep single-cycle decompression.
// Combinational; N must be at least 2.
//
// The sequence rule C_n = base + (n-1) * delta is the published scheme's; the stride
// width, signed stride and payload order are this design's choices.
module stride_compressor #(
  parameter int unsigned W = 16,
  parameter int unsigned N = 8,
  parameter int unsigned D = 8
) (
  input  logic [N*W-1:0] line_i,
  output logic           ok_o,
  output logic [W+D-1:0] data_o
);

  logic [W-1:0] stride;
  logic         fits;

  assign stride = line_i[W +: W] - line_i[0 +: W];
  // The stride fits when its top W-D+1 bits are all equal (sign extension).
  assign fits = (stride[W-1:D-1] == '0) || (stride[W-1:D-1] == '1);

  always_comb begin
    ok_o = fits;
    for (int unsigned c = 2; c < N; c++)
      if (line_i[c*W +: W] != line_i[(c-1)*W +: W] + stride) ok_o = 1'b0;
  end

  assign data_o = {stride[D-1:0], line_i[0 +: W]};

endmodule
