// tb_rc_pair: test harness (not a testbench on its own) holding one
// rc_compressor feeding one rc_decompressor of the same configuration.
//
// Every line offered on valid_i/line_i is remembered; when it comes back out
// of the decompressor the harness compares it, checks that the compressor
// answered after 2 cycles and the decompressor after 3 (encodings in the
// data entry) or 1 (encodings from the tag), and checks that the reported
// size equals the header plus the sum of the payload sizes of the reported
// encodings. It counts checks, failures, returned lines, and the total
// compressed bits, so the caller can compare average sizes.
module tb_rc_pair
  import rc_pkg::*;
#(
  parameter int unsigned CW         = 64,
  parameter int unsigned RW         = 16,
  parameter bit          ENC_IN_TAG = 1'b0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         valid_i,
  input  logic [511:0] line_i,
  output int           checks,
  output int           failures,
  output int           returned,
  output longint       bits
);

  localparam int unsigned R    = CW / RW;
  localparam int unsigned N    = 512 / CW;
  localparam int unsigned HDR  = ENC_IN_TAG ? 0 : R * ENC_W;
  localparam int unsigned OUTW = HDR + 512;
  localparam int unsigned TW   = $clog2(OUTW + 1);

  logic               c_valid, d_valid;
  logic [OUTW-1:0]    c_data;
  logic [TW-1:0]      c_size;
  logic [R*ENC_W-1:0] c_enc;
  logic [511:0]       d_line;

  rc_compressor #(.CW(CW), .RW(RW), .ENC_IN_TAG(ENC_IN_TAG)) u_c (
    .clk_i(clk), .rst_ni(rst_n), .valid_i, .line_i,
    .valid_o(c_valid), .data_o(c_data), .size_o(c_size), .enc_o(c_enc));
  rc_decompressor #(.CW(CW), .RW(RW), .ENC_IN_TAG(ENC_IN_TAG)) u_d (
    .clk_i(clk), .rst_ni(rst_n), .valid_i(c_valid), .data_i(c_data), .enc_i(c_enc),
    .valid_o(d_valid), .line_o(d_line));

  typedef struct { logic [511:0] line; int cyc; } item_t;
  item_t  cq[$], dq[$];
  int     cycle;

  initial begin
    checks = 0; failures = 0; returned = 0; bits = 0; cycle = 0;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL R%0dC%0d tag=%0d: %s", RW, CW, ENC_IN_TAG, what);
    end
  endtask

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n && valid_i) cq.push_back('{line_i, cycle});
  end

  always @(negedge clk) if (rst_n) begin
    item_t it;
    int    s;
    if (c_valid) begin
      it = cq.pop_front();
      check(cycle - it.cyc == 2, "compress latency");
      s = HDR;
      for (int r = 0; r < R; r++) s += sub_size(RW, N, c_enc[r*ENC_W +: ENC_W]);
      check(int'(c_size) == s, "size matches encodings");
      if (!ENC_IN_TAG) check(c_data[R*ENC_W-1:0] == c_enc, "header");
      bits += longint'(c_size);
      dq.push_back('{it.line, cycle});
    end
    if (d_valid) begin
      it = dq.pop_front();
      returned++;
      check(cycle - it.cyc == (ENC_IN_TAG ? 1 : 3), "decompress latency");
      check(d_line == it.line, "round trip");
    end
  end

endmodule
