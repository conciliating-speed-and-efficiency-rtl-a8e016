// tb_rc_codec: end-to-end test of the Region-Chunk compression engine at its
// default configuration (R16C64, 64-byte lines, encodings in the data
// entry).
//
// Phase 1 writes lines through the compressor, mostly back to back, and
// keeps each compressed line with its size in a small model of a data
// array. Phase 2 reads the entries back in random order through the
// decompressor, again back to back, and checks every rebuilt line. Checked
// as well: per-region encodings and compressed size against the reference
// model, header bits, latency 2 (compress) and 3 (decompress).
//
// Mechanisms counted, each of which must occur at least once: every one of
// the eight region encodings (zeros, repeated, narrow, two base-delta widths
// with one base, two bases, stride, uncompressed), an all-zero line (header
// only), a line left entirely uncompressed (header plus 512 bits), a line
// whose compressed size fits half a line, and back-to-back lines in both
// directions.
module tb_rc_codec;
  import tb_ref_pkg::*;

  localparam int ENTRIES = 256;

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

  logic         c_valid_i, c_valid_o, d_valid_i, d_valid_o;
  line_t        c_line_i, d_line_o;
  logic [523:0] c_data_o, d_data_i;
  logic [9:0]   c_size_o;
  logic [11:0]  c_enc_o, d_enc_i;

  rc_codec dut (
    .clk_i(clk), .rst_ni(rst_n),
    .c_valid_i, .c_line_i, .c_valid_o, .c_data_o, .c_size_o, .c_enc_o,
    .d_valid_i, .d_data_i, .d_enc_i, .d_valid_o, .d_line_o);

  // Model of the data array: compressed lines and the original for checking.
  logic [523:0] arr_data [ENTRIES];
  line_t        arr_orig [ENTRIES];
  int           arr_size [ENTRIES];

  typedef struct { int idx; int cyc; } item_t;
  item_t cq[$], dq[$];

  int enc_seen [8];
  int n_zero_line = 0, n_raw_line = 0, n_half = 0, n_b2b_c = 0, n_b2b_d = 0, n_back = 0;
  int last_c = -10, last_d = -10;

  always @(negedge clk) if (rst_n) begin
    item_t       it;
    logic [11:0] e;
    int          sz;
    if (c_valid_o) begin
      it = cq.pop_front();
      check(cycle - it.cyc == 2, $sformatf("compress latency %0d", cycle - it.cyc));
      sz = 12;
      for (int r = 0; r < 4; r++) begin
        e[r*3 +: 3] = 3'(ref_enc(region_of(arr_orig[it.idx], r)));
        sz += ref_size(int'(e[r*3 +: 3]));
        enc_seen[e[r*3 +: 3]]++;
      end
      check(c_enc_o == e && c_data_o[11:0] == e, $sformatf("entry %0d encodings", it.idx));
      check(int'(c_size_o) == sz, $sformatf("entry %0d size %0d vs %0d", it.idx, c_size_o, sz));
      if (sz == 12) n_zero_line++;
      if (sz == 524) n_raw_line++;
      if (sz <= 256) n_half++;
      arr_data[it.idx] = c_data_o;
      arr_size[it.idx] = int'(c_size_o);
      // nothing beyond the compressed size may be set
      check(sz == 524 || (c_data_o >> sz) == '0, "clean above size");
    end
    if (d_valid_o) begin
      it = dq.pop_front();
      n_back++;
      check(cycle - it.cyc == 3, $sformatf("decompress latency %0d", cycle - it.cyc));
      check(d_line_o == arr_orig[it.idx], $sformatf("entry %0d read back", it.idx));
    end
  end

  int cls [4];
  int idx;

  initial begin
    c_valid_i = 1'b0; c_line_i = '0;
    d_valid_i = 1'b0; d_data_i = '0; d_enc_i = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // Phase 1: fill the array.
    for (int i = 0; i < ENTRIES; i++) begin
      @(negedge clk);
      if ($urandom_range(0, 7) == 0) begin
        c_valid_i = 1'b0;
        @(negedge clk);
      end
      case (i)
        0: cls = '{0, 0, 0, 0};          // all-zero line
        1: cls = '{7, 7, 7, 7};          // incompressible line
        default: for (int r = 0; r < 4; r++)
                   cls[r] = (r == 3 && $urandom_range(0, 1) == 0) ? $urandom_range(0, 1)
                                                                   : $urandom_range(0, 7);
      endcase
      c_line_i    = gen_line(cls);
      c_valid_i   = 1'b1;
      arr_orig[i] = c_line_i;
      if (last_c == cycle - 1) n_b2b_c++;
      last_c = cycle;
      cq.push_back('{i, cycle});
    end
    @(negedge clk);
    c_valid_i = 1'b0;
    repeat (4) @(negedge clk);
    // Phase 2: read back in random order.
    for (int i = 0; i < 2 * ENTRIES; i++) begin
      @(negedge clk);
      if ($urandom_range(0, 7) == 0) begin
        d_valid_i = 1'b0;
        @(negedge clk);
      end
      idx       = (i < ENTRIES) ? (i * 37) % ENTRIES : $urandom_range(0, ENTRIES - 1);
      d_data_i  = arr_data[idx];
      d_enc_i   = $urandom;   // ignored with the encodings in the data entry
      d_valid_i = 1'b1;
      if (last_d == cycle - 1) n_b2b_d++;
      last_d = cycle;
      dq.push_back('{idx, cycle});
    end
    @(negedge clk);
    d_valid_i = 1'b0;
    repeat (6) @(negedge clk);

    check(n_back == 2 * ENTRIES, $sformatf("%0d reads returned", n_back));
    for (int e = 0; e < 8; e++) begin
      $display("region encoding %0d: %0d", e, enc_seen[e]);
      check(enc_seen[e] > 0, $sformatf("region encoding %0d never used", e));
    end
    $display("all-zero lines %0d, uncompressed lines %0d, lines within half a line %0d", n_zero_line, n_raw_line, n_half);
    $display("back-to-back compressions %0d, back-to-back decompressions %0d", n_b2b_c, n_b2b_d);
    check(n_zero_line > 0, "no all-zero line");
    check(n_raw_line > 0, "no uncompressed line");
    check(n_half > 0, "no line within half a line");
    check(n_b2b_c > 0 && n_b2b_d > 0, "no back-to-back operation");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
