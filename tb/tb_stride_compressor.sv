// tb_stride_compressor: self-checking test of stride_compressor and
// stride_decompressor with 16-bit chunks, 8 per line and an 8-bit stride.
//
// Arithmetic sequences with strides drawn over [-128, 127] must be accepted,
// carry payload {stride, base} and rebuild exactly; the sequence
// 0x31..0x38 (stride 1) is checked explicitly. Sequences with a stride of
// 128 or more, or with one element disturbed, must be rejected.
module tb_stride_compressor;

  int checks = 0, failures = 0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [127:0] line, back;
  logic         ok;
  logic [23:0]  pay;

  stride_compressor   #(.W(16), .N(8), .D(8)) u_c (.line_i(line), .ok_o(ok), .data_o(pay));
  stride_decompressor #(.W(16), .N(8), .D(8)) u_d (.data_i(pay), .line_o(back));

  int base, stride, idx;

  initial begin
    for (int c = 0; c < 8; c++) line[c*16 +: 16] = 16'(16'h31 + c);
    #1;
    check(ok && pay == 24'h01_0031, $sformatf("0x31..0x38 payload %h", pay));
    check(back == line, "0x31..0x38 rebuilt");

    for (int t = 0; t < 600; t++) begin
      base   = $urandom_range(0, 65535);
      stride = (t % 3 == 0) ? $urandom_range(128, 2000) * (($urandom_range(0, 1) == 0) ? 1 : -1)
                            : $urandom_range(0, 255) - 128;
      for (int c = 0; c < 8; c++) line[c*16 +: 16] = 16'(base + c * stride);
      if (t % 7 == 1) begin
        idx = $urandom_range(2, 7);
        line[idx*16 +: 16] = line[idx*16 +: 16] ^ 16'(1 << $urandom_range(0, 15));
      end
      #1;
      if (t % 7 == 1) check(!ok, $sformatf("disturbed sequence rejected t=%0d", t));
      else if (stride >= -128 && stride <= 127) begin
        check(ok, $sformatf("stride %0d accepted", stride));
        check(pay == {8'(stride), 16'(base)}, $sformatf("payload t=%0d", t));
        check(back == line, $sformatf("rebuilt t=%0d", t));
      end else check(!ok, $sformatf("stride %0d rejected", stride));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
