// tb_logistic_key: checks the fixed-point logistic map. Each iteration is
// compared with an in-testbench evaluation of y' = floor(floor(y*(2^64-y)/2^64)
// * 65372 / 2^14) done with 128-bit arithmetic, and the values after one and
// sixteen iterations from three seeds (one zero, replaced by
// 0123456789ABCDEF) with values computed by a separate reference model. It
// also checks that the state holds without step and stays inside (0,1).
module tb_logistic_key;
  logic        clk = 0, rst_n = 0, load = 0, step = 0;
  logic [63:0] seed, y;
  logic [127:0] model, p;
  int checks = 0, failures = 0;

  logistic_key u_dut (.clk, .rst_n, .load, .step, .seed, .y);

  always #5 clk = ~clk;

  localparam logic [63:0] SV  [3] = '{64'hB890B890B890B890, 64'h922766581E27A1C0, 64'h0000000000000000};
  localparam logic [63:0] S1  [3] = '{64'hCD7D7CD2AD27DD7D, 64'hFA390AAF3B1D5E14, 64'h048500F21422D9F0};
  localparam logic [63:0] S16 [3] = '{64'hCD991D3C0D8F6A87, 64'hF40746BCB7FD10D3, 64'h9294A7E0D8000D94};

  task automatic check64(input logic [63:0] got, input logic [63:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seed = 0;
    #12 rst_n = 1;
    foreach (SV[i]) begin
      @(negedge clk); load = 1; seed = SV[i];
      @(negedge clk); load = 0; step = 1;
      @(negedge clk); step = 0;
      check64(y, S1[i], "one iteration");
      @(negedge clk);
      check64(y, S1[i], "hold without step");
      step = 1;
      for (int s = 1; s < 16; s++) begin
        p = {64'd0, y} * (128'd1 << 64) - {64'd0, y} * {64'd0, y};
        model = ((p >> 64) * 128'd65372) >> 14;
        @(negedge clk);
        check64(y, model[63:0], "iteration vs model");
        checks++;
        if (y == 0) begin
          failures++;
          $display("FAIL y left (0,1)");
        end
      end
      step = 0;
      check64(y, S16[i], "16 iterations");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
