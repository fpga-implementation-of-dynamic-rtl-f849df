// tb_weak_key_detect: every one of the 4 weak and 12 semi-weak DES keys must
// be flagged, also with random parity bits (the LSB of each byte); random
// keys and single-bit changes of a weak key in a non-parity position must not
// be.
module tb_weak_key_detect;
  logic [63:0] key;
  logic        is_weak;
  int checks = 0, failures = 0;

  weak_key_detect u_dut (.key, .is_weak);

  localparam logic [63:0] WK [16] = '{
    64'h0101010101010101, 64'hFEFEFEFEFEFEFEFE, 64'hE0E0E0E0F1F1F1F1, 64'h1F1F1F1F0E0E0E0E,
    64'h01FE01FE01FE01FE, 64'hFE01FE01FE01FE01, 64'h1FE01FE00EF10EF1, 64'hE01FE01FF10EF10E,
    64'h01E001E001F101F1, 64'hE001E001F101F101, 64'h1FFE1FFE0EFE0EFE, 64'hFE1FFE1FFE0EFE0E,
    64'h011F011F010E010E, 64'h1F011F010E010E01, 64'hE0FEE0FEF1FEF1FE, 64'hFEE0FEE0FEF1FEF1};

  task automatic expect_flag(input logic exp, input string what);
    #1;
    checks++;
    if (is_weak !== exp) begin
      failures++;
      $display("FAIL %s key %h: flag %b expected %b", what, key, is_weak, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (WK[i]) begin
      key = WK[i];
      expect_flag(1'b1, "weak");
      key = WK[i] ^ ({$urandom, $urandom} & 64'h0101_0101_0101_0101);
      expect_flag(1'b1, "weak, other parity");
      key = WK[i] ^ (64'd2 << (8 * ($urandom % 8)) << ($urandom % 7));
      expect_flag(1'b0, "weak key with one key bit flipped");
    end
    repeat (100) begin
      key = {$urandom, $urandom};
      expect_flag(1'b0, "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
