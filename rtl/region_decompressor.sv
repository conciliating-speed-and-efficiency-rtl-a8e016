// region_decompressor: rebuilds one region line from its encoding and payload.
//
// Every sub-decompressor of the rc_pkg::sub_cfg set works on the low bits of
// the payload in parallel; the encoding selects which result is used, and
// encoding NUM_SUB passes the N*RW payload bits through as an uncompressed
// region. Payload bits above the selected sub-compressor's size are ignored.
// Combinational: one step, so with the encoding known ahead of the data the
// region is rebuilt within the single cycle the scheme targets.
module region_decompressor
  import rc_pkg::*;
#(
  parameter int unsigned RW = 16,
  parameter int unsigned N  = 8,
  localparam int unsigned RB = N * RW
) (
  input  logic [ENC_W-1:0] enc_i,
  input  logic [RB-1:0]    data_i,
  output logic [RB-1:0]    line_o
);

  logic [RB-1:0] sub_line [NUM_SUB];

  for (genvar s = 0; s < NUM_SUB; s++) begin : g_sub
    localparam sub_cfg_t    CFG = sub_cfg(RW, s);
    localparam int unsigned SZ  = sub_size(RW, N, s);
    if (CFG.kind == SUB_STRIDE) begin : g_stride
      stride_decompressor #(.W(RW), .N(N), .D(int'(CFG.d))) u_sub (
        .data_i(data_i[SZ-1:0]), .line_o(sub_line[s]));
    end else begin : g_bd
      localparam int unsigned OW = (SZ == 0) ? 1 : SZ;
      logic [OW-1:0] d;
      if (SZ == 0) begin : g_nodata
        assign d = '0;
      end else begin : g_data
        assign d = data_i[SZ-1:0];
      end
      bd_decompressor #(.W(RW), .N(N), .NI(int'(CFG.ni)), .NE(int'(CFG.ne)), .D(int'(CFG.d))) u_sub (
        .data_i(d), .line_o(sub_line[s]));
    end
  end

  always_comb begin
    line_o = data_i;
    for (int unsigned s = 0; s < NUM_SUB; s++)
      if (enc_i == ENC_W'(s)) line_o = sub_line[s];
  end

endmodule
