// tb_rc_concat: self-checking test of rc_concat and rc_extract with four
// 128-bit regions behind a 12-bit header.
//
// Random payloads with random sizes (0..128 bits, garbage above each size)
// are packed; the result is compared with a bit-by-bit reference packing,
// the total with HDR + sum of sizes, and rc_extract must return each
// payload's low size bits.
module tb_rc_concat;

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

  logic [127:0] data [4];
  logic [7:0]   size [4];
  logic [523:0] line, expect_line;
  logic [9:0]   total;
  logic [127:0] back [4];
  int           pos;

  rc_concat  #(.R(4), .RB(128), .HDR(12)) u_c (.data_i(data), .size_i(size), .line_o(line), .total_o(total));
  rc_extract #(.R(4), .RB(128), .HDR(12)) u_e (.line_i(line), .size_i(size), .data_o(back));

  initial begin
    for (int t = 0; t < 1000; t++) begin
      for (int r = 0; r < 4; r++) begin
        data[r] = {$urandom, $urandom, $urandom, $urandom};
        case ($urandom_range(0, 3))
          0: size[r] = 8'd0;
          1: size[r] = 8'd128;
          default: size[r] = 8'($urandom_range(0, 128));
        endcase
      end
      #1;
      expect_line = '0;
      pos = 12;
      for (int r = 0; r < 4; r++)
        for (int b = 0; b < int'(size[r]); b++) begin
          expect_line[pos] = data[r][b];
          pos++;
        end
      check(line == expect_line, $sformatf("t=%0d packing", t));
      check(int'(total) == pos, $sformatf("t=%0d total %0d vs %0d", t, total, pos));
      for (int r = 0; r < 4; r++)
        for (int b = 0; b < int'(size[r]); b++)
          if (back[r][b] != data[r][b]) begin
            check(0, $sformatf("t=%0d extract r=%0d bit %0d", t, r, b));
            break;
          end
      checks++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
