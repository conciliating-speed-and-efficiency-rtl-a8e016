// tb_rc_compressor: self-checking test of rc_compressor and rc_decompressor
// in both placements of the encodings, R16C64 on 64-byte lines.
//
// Two pipelines run side by side on the same random stream (lines built
// from per-region classes, with idle cycles in between):
//   hdr: encodings in a 12-bit header of the data entry; compressor latency
//        2 cycles, decompressor latency 3 cycles;
//   tag: encodings passed beside the data; compressor 2, decompressor 1.
// Each compressor output is fed straight into its decompressor. Checked for
// every line: the per-region encodings and the total size against the
// reference model, the header bits, the exact latencies, and that the
// decompressed line equals the original.
module tb_rc_compressor;
  import tb_ref_pkg::*;

  int checks = 0, failures = 0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  logic clk = 1'b0, rst_n = 1'b0;
  int   cycle = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic         in_valid;
  line_t        in_line;
  // header placement
  logic         hc_valid, hd_valid;
  logic [523:0] hc_data;
  logic [9:0]   hc_size;
  logic [11:0]  hc_enc;
  line_t        hd_line;
  // tag placement
  logic         tc_valid, td_valid;
  logic [511:0] tc_data;
  logic [9:0]   tc_size;
  logic [11:0]  tc_enc;
  line_t        td_line;

  rc_compressor   #(.ENC_IN_TAG(1'b0)) u_hc (.clk_i(clk), .rst_ni(rst_n), .valid_i(in_valid), .line_i(in_line),
                                             .valid_o(hc_valid), .data_o(hc_data), .size_o(hc_size), .enc_o(hc_enc));
  rc_decompressor #(.ENC_IN_TAG(1'b0)) u_hd (.clk_i(clk), .rst_ni(rst_n), .valid_i(hc_valid), .data_i(hc_data),
                                             .enc_i(12'h0), .valid_o(hd_valid), .line_o(hd_line));
  rc_compressor   #(.ENC_IN_TAG(1'b1)) u_tc (.clk_i(clk), .rst_ni(rst_n), .valid_i(in_valid), .line_i(in_line),
                                             .valid_o(tc_valid), .data_o(tc_data), .size_o(tc_size), .enc_o(tc_enc));
  rc_decompressor #(.ENC_IN_TAG(1'b1)) u_td (.clk_i(clk), .rst_ni(rst_n), .valid_i(tc_valid), .data_i(tc_data),
                                             .enc_i(tc_enc), .valid_o(td_valid), .line_o(td_line));

  typedef struct { line_t line; int cyc; } item_t;
  item_t hq_c[$], tq_c[$], hq_d[$], tq_d[$];
  int n_lines = 0, n_hd = 0, n_td = 0;

  function automatic int exp_size(line_t l, int hdr);
    int s = hdr;
    for (int r = 0; r < 4; r++) s += ref_size(ref_enc(region_of(l, r)));
    return s;
  endfunction

  function automatic logic [11:0] exp_enc(line_t l);
    logic [11:0] e;
    for (int r = 0; r < 4; r++) e[r*3 +: 3] = 3'(ref_enc(region_of(l, r)));
    return e;
  endfunction

  // Monitors sample after the registers settle.
  always @(negedge clk) if (rst_n) begin
    item_t it;
    if (hc_valid) begin
      it = hq_c.pop_front();
      check(cycle - it.cyc == 2, $sformatf("hdr compress latency %0d", cycle - it.cyc));
      check(hc_enc == exp_enc(it.line) && hc_data[11:0] == hc_enc, "hdr encodings");
      check(int'(hc_size) == exp_size(it.line, 12), $sformatf("hdr size %0d", hc_size));
      hq_d.push_back('{it.line, cycle});
    end
    if (tc_valid) begin
      it = tq_c.pop_front();
      check(cycle - it.cyc == 2, "tag compress latency");
      check(tc_enc == exp_enc(it.line), "tag encodings");
      check(int'(tc_size) == exp_size(it.line, 0), $sformatf("tag size %0d", tc_size));
      tq_d.push_back('{it.line, cycle});
    end
    if (hd_valid) begin
      it = hq_d.pop_front();
      n_hd++;
      check(cycle - it.cyc == 3, $sformatf("hdr decompress latency %0d", cycle - it.cyc));
      check(hd_line == it.line, "hdr round trip");
    end
    if (td_valid) begin
      it = tq_d.pop_front();
      n_td++;
      check(cycle - it.cyc == 1, $sformatf("tag decompress latency %0d", cycle - it.cyc));
      check(td_line == it.line, "tag round trip");
    end
  end

  int cls [4];

  initial begin
    in_valid = 1'b0;
    in_line  = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 1500; t++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      for (int r = 0; r < 4; r++) cls[r] = $urandom_range(0, 7);
      in_line = gen_line(cls);
      if (in_valid) begin
        hq_c.push_back('{in_line, cycle});
        tq_c.push_back('{in_line, cycle});
        n_lines++;
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (8) @(negedge clk);
    check(n_hd == n_lines && n_td == n_lines, $sformatf("all %0d lines came back (%0d, %0d)", n_lines, n_hd, n_td));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
