// tb_des_core: runs the iterative DES core on reference vectors: the
// well-known worked example (key 133457799BBCDFF1, plaintext
// 0123456789ABCDEF -> 85E813540F0AB405) and three random key/plaintext pairs
// whose ciphertexts were computed with a reference DES. Each vector is
// encrypted and the ciphertext decrypted again; the result and the 17-cycle
// latency from start to done are checked, and the output must hold its value
// after done.
module tb_des_core;
  logic        clk = 0, rst_n = 0, start = 0, mode = 0;
  logic [63:0] din, key, dout;
  logic        busy, done;
  int checks = 0, failures = 0;

  des_core u_dut (.clk, .rst_n, .start, .mode, .din, .key, .dout, .busy, .done);

  always #5 clk = ~clk;

  localparam logic [63:0] KV [4] = '{64'h133457799BBCDFF1, 64'h95E60AF593BD04CF, 64'h3898D190F9EBDACC, 64'h2217BEADDBC496CB};
  localparam logic [63:0] PV [4] = '{64'h0123456789ABCDEF, 64'h0CB1E29C658CDA14, 64'h8E81973E0BECD7B0, 64'h6B4CB2424A23D596};
  localparam logic [63:0] CV [4] = '{64'h85E813540F0AB405, 64'h1BF0BD5F8AA071D0, 64'hACFC8AC2B92B7AD7, 64'hE118CB2E51B2DCDF};

  task automatic check64(input logic [63:0] got, input logic [63:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic run(input logic m, input logic [63:0] d, input logic [63:0] k,
                     input logic [63:0] exp, input string what);
    int cycles;
    @(negedge clk);
    start = 1; mode = m; din = d; key = k;
    @(negedge clk);
    start = 0; din = ~d; key = ~k; mode = ~m;   // inputs are only read at start
    cycles = 1;
    while (!done && cycles < 100) begin
      @(negedge clk);
      cycles++;
    end
    check64(dout, exp, what);
    checks++;
    if (cycles != 17) begin
      failures++;
      $display("FAIL %s latency %0d cycles, expected 17", what, cycles);
    end
    @(negedge clk);
    check64(dout, exp, {what, " held"});
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    din = 0; key = 0;
    #12 rst_n = 1;
    foreach (KV[i]) begin
      run(1'b0, PV[i], KV[i], CV[i], $sformatf("encrypt %0d", i));
      run(1'b1, CV[i], KV[i], PV[i], $sformatf("decrypt %0d", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
