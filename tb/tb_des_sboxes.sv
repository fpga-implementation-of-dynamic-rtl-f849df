// tb_des_sboxes: checks the eight S-boxes. Reference vectors were computed
// from the FIPS 46 tables; single-group probes check the row/column
// addressing (outer bits select the row) with entries quoted from the
// standard: S1(000000)=14, S1(000001)=0 (row 1, col 0), S1(100000)=4
// (row 2), S8(111111)=11, S5(011011)=9 (row 1, col 13).
module tb_des_sboxes;
  logic [47:0] x;
  logic [31:0] y;
  int checks = 0, failures = 0;

  des_sboxes u_dut (.x(x), .y(y));

  localparam logic [47:0] XV [6] = '{48'h1818892F902B, 48'h95315D9DC9F8, 48'hE8E20ED90475,
                                     48'h36F681E74EF5, 48'h1600099950D8, 48'h6B0D6F03675A};
  localparam logic [31:0] YV [6] = '{32'h1366764A, 32'h800E758F, 32'hA46A50E9,
                                     32'hD24DA429, 32'h70A6BD05, 32'h95E82A80};

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
    foreach (XV[i]) begin
      x = XV[i]; #1;
      check(y, YV[i], "S-box vector");
    end
    x = '0; #1;
    check(y[31:28], 4'd14, "S1(000000)");
    x = 48'b000001 << 42; #1;
    check(y[31:28], 4'd0, "S1(000001)");
    x = 48'b100000 << 42; #1;
    check(y[31:28], 4'd4, "S1(100000)");
    x = 48'b111111; #1;
    check(y[3:0], 4'd11, "S8(111111)");
    x = 48'b011011 << 18; #1;
    check(y[15:12], 4'd9, "S5(011011)");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
