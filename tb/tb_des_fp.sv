// tb_des_fp: checks the DES final permutation against reference vectors
// computed from the FIPS 46 IP^-1 table, single-bit positions (DES bit 40 must
// land in output bit 1, bit 25 in output bit 64) and that it inverts the
// initial permutation on random blocks.
module tb_des_fp;
  logic [63:0] x, y, back;
  int checks = 0, failures = 0;

  des_fp u_dut (.x(x), .y(y));
  des_ip u_inv (.x(y), .y(back));

  localparam logic [63:0] VEC [4][2] = '{
    '{64'hF2A74DE452E6B438, 64'h14F03D06CA7BE579},
    '{64'h6513270E269E0D37, 64'h5EB7EF2932C64020},
    '{64'h0C5C7FD0A6A3A450, 64'h24A4DC5417AC17A9},
    '{64'hD23F0824128B2F33, 64'h3AFA193CD21B4060}};

  task automatic check(input logic [63:0] got, input logic [63:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (VEC[i]) begin
      x = VEC[i][0]; #1;
      check(y, VEC[i][1], "FP vector");
    end
    x = 64'd1 << (64 - 40); #1;
    check(y, 64'h8000_0000_0000_0000, "FP bit 40 -> 1");
    x = 64'd1 << (64 - 25); #1;
    check(y, 64'h0000_0000_0000_0001, "FP bit 25 -> 64");
    repeat (20) begin
      x = {$urandom, $urandom}; #1;
      check(back, x, "IP(FP(x)) == x");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
