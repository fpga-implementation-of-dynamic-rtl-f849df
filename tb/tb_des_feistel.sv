// tb_des_feistel: checks one DES round. Vectors (L, R, K -> new R) were
// computed with a reference DES; the new L must always equal the old R. The
// first round of the well-known worked example (key 133457799BBCDFF1,
// plaintext 0123456789ABCDEF: L0=CC00CCFF, R0=F0AAF0AA, K1=1B02EFFC7072 gives
// R1=EF4A6544) is checked as well.
module tb_des_feistel;
  logic [31:0] l_in, r_in, l_out, r_out;
  logic [47:0] subkey;
  int checks = 0, failures = 0;

  des_feistel u_dut (.l_in, .r_in, .subkey, .l_out, .r_out);

  localparam logic [31:0] LV [5] = '{32'h11E20B8F, 32'h6CAD4A26, 32'h1FB17C23, 32'hA09F76B5, 32'hCC00CCFF};
  localparam logic [31:0] RV [5] = '{32'h3D9C1724, 32'h0F21DDB6, 32'hF28C105D, 32'h953F48F1, 32'hF0AAF0AA};
  localparam logic [47:0] KV [5] = '{48'h8D111738F7D9, 48'h90C1D3AC94AF, 48'hA17039263059, 48'h0FD6F29D0DA9, 48'h1B02EFFC7072};
  localparam logic [31:0] OV [5] = '{32'h3C628D73, 32'hA72F0713, 32'hA75FD4AF, 32'h78A0FF52, 32'hEF4A6544};

  task automatic check(input logic [31:0] got, input logic [31:0] exp, input string what);
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
    foreach (LV[i]) begin
      l_in = LV[i]; r_in = RV[i]; subkey = KV[i]; #1;
      check(r_out, OV[i], "new R");
      check(l_out, RV[i], "new L");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
