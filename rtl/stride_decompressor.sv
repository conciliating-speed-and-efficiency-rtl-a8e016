// stride_decompressor: rebuilds a stride-compressed region line.
//
// The payload {stride[D-1:0], base[W-1:0]} gives chunk n = base + n * stride
// (stride sign-extended to W bits, arithmetic modulo 2^W), all N chunks in
// parallel in one combinational step. Inverse of stride_compressor; the
// sequence rule is the published scheme's, the field layout this design's own.
module stride_decompressor #(
  parameter int unsigned W = 16,
  parameter int unsigned N = 8,
  parameter int unsigned D = 8
) (
  input  logic [W+D-1:0] data_i,
  output logic [N*W-1:0] line_o
);

  logic [W-1:0] base;
  logic [W-1:0] stride;

  assign base   = data_i[W-1:0];
  assign stride = W'($signed(data_i[W+D-1:W]));

  for (genvar c = 0; c < N; c++) begin : g_chunk
    assign line_o[c*W +: W] = base + W'(c) * stride;
  end

endmodule
