// tb_key_mux: drives four distinct random keys and checks that SEL 00 picks
// the LFSR input a, 01 and 10 the direct inputs b and c, and 11 the chaotic
// input d.
module tb_key_mux;
  logic [63:0] a, b, c, d, y, exp;
  logic [1:0]  sel;
  int checks = 0, failures = 0;

  key_mux u_dut (.a, .b, .c, .d, .sel, .y);

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (25) begin
      a = {$urandom, $urandom}; b = {$urandom, $urandom};
      c = {$urandom, $urandom}; d = {$urandom, $urandom};
      for (int s = 0; s < 4; s++) begin
        sel = 2'(s); #1;
        exp = (s == 0) ? a : (s == 1) ? b : (s == 2) ? c : d;
        checks++;
        if (y !== exp) begin
          failures++;
          $display("FAIL sel=%0d: got %h expected %h", s, y, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
