// region_compressor: multi-compressor for one region line (a SubR_xC_w).
//
// Runs the NUM_SUB sub-compressors of rc_pkg::sub_cfg in parallel on the
// region line (N values of RW bits) and selects, among those that can encode
// it, the one with the smallest compressed size; ties go to the lower
// encoding. When none succeeds the encoding NUM_SUB (all ones) marks the
// region as stored uncompressed, N*RW bits. All sizes are design-time
// constants, so the selection is a priority choice over constant sizes.
//
// Outputs: enc_o (ENC_W bits), size_o (payload bits) and data_o, the payload
// in the low size_o bits with zeros above. Combinational; the enclosing
// compressor registers it.
//
// Selecting the best of several base-delta sub-compressors, with one encoding
// reserved for uncompressed data, follows the published scheme; the particular
// sub-compressor set lives in rc_pkg and is this design's choice.
module region_compressor
  import rc_pkg::*;
#(
  parameter int unsigned RW = 16,
  parameter int unsigned N  = 8,
  localparam int unsigned RB = N * RW,
  localparam int unsigned SW = $clog2(RB + 1)
) (
  input  logic [RB-1:0]    line_i,
  output logic [ENC_W-1:0] enc_o,
  output logic [SW-1:0]    size_o,
  output logic [RB-1:0]    data_o
);

  logic [NUM_SUB-1:0] ok;
  logic [RB-1:0]      sub_data [NUM_SUB];
  logic [SW-1:0]      sub_sz   [NUM_SUB];   // constant payload sizes

  for (genvar s = 0; s < NUM_SUB; s++) begin : g_sub
    localparam sub_cfg_t    CFG = sub_cfg(RW, s);
    localparam int unsigned SZ  = sub_size(RW, N, s);
    assign sub_sz[s] = SW'(SZ);
    if (CFG.kind == SUB_STRIDE) begin : g_stride
      logic [SZ-1:0] d;
      stride_compressor #(.W(RW), .N(N), .D(int'(CFG.d))) u_sub (
        .line_i(line_i), .ok_o(ok[s]), .data_o(d));
      assign sub_data[s] = RB'(d);
    end else begin : g_bd
      localparam int unsigned OW = (SZ == 0) ? 1 : SZ;
      logic [OW-1:0] d;
      bd_compressor #(.W(RW), .N(N), .NI(int'(CFG.ni)), .NE(int'(CFG.ne)), .D(int'(CFG.d))) u_sub (
        .line_i(line_i), .ok_o(ok[s]), .data_o(d));
      if (SZ == 0) begin : g_nodata
        assign sub_data[s] = '0;
      end else begin : g_data
        assign sub_data[s] = RB'(d);
      end
    end
  end

  always_comb begin
    enc_o  = ENC_W'(NUM_SUB);
    size_o = SW'(RB);
    data_o = line_i;
    for (int unsigned s = 0; s < NUM_SUB; s++) begin
      if (ok[s] && sub_sz[s] < size_o) begin
        size_o = sub_sz[s];
        enc_o  = ENC_W'(s);
        data_o = sub_data[s];
      end
    end
  end

endmodule
