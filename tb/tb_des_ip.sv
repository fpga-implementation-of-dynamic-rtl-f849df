// tb_des_ip: checks the DES initial permutation against reference vectors
// computed from the FIPS 46 IP table, plus single-bit positions (DES bit 58
// must land in output bit 1, DES bit 7 in output bit 64) and that the final
// permutation undoes it on random blocks.
module tb_des_ip;
  logic [63:0] x, y, back;
  int checks = 0, failures = 0;

  des_ip u_dut (.x(x), .y(y));
  des_fp u_inv (.x(y), .y(back));

  localparam logic [63:0] VEC [4][2] = '{
    '{64'hF2A74DE452E6B438, 64'h3DD16E066BEB8433},
    '{64'h6513270E269E0D37, 64'h01A2FDC7209568BE},
    '{64'h0C5C7FD0A6A3A450, 64'h8E8E572478740734},
    '{64'hD23F0824128B2F33, 64'h01934AE221CA66F3}};

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
      check(y, VEC[i][1], "IP vector");
    end
    x = 64'd1 << (64 - 58); #1;       // DES bit 58
    check(y, 64'h8000_0000_0000_0000, "IP bit 58 -> 1");
    x = 64'd1 << (64 - 7); #1;        // DES bit 7
    check(y, 64'h0000_0000_0000_0001, "IP bit 7 -> 64");
    repeat (20) begin
      x = {$urandom, $urandom}; #1;
      check(back, x, "FP(IP(x)) == x");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
