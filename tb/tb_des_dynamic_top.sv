// tb_des_dynamic_top: end-to-end test of DES with dynamic key generation, at
// the default parameters.
//
// Uses the block DIN = CFA111A283810529 and key KEY = B890B890B890B890 with
// every SEL value. Expected ciphertexts were computed with a reference DES
// and reference models of the LFSR (64 steps) and the logistic map (16
// iterations, mu = 3.99 in Q2.14):
//   SEL 00 (LFSR key 0C9DBA46D7F00C9D)  -> 7637B1B67B92E5EF
//   SEL 01 / 10 (the key itself)        -> 8818F6EF72148243
//   SEL 11 (logistic key CD991D3C0D8F6A87) -> 023E4FB37B9099E5
// Each ciphertext is then decrypted with the same KEY and SEL and must give
// DIN back. The latency from en to done is checked (20 + 0, 64 or 16 cycles).
// Further runs: a key whose LFSR result is the weak key 0101010101010101, so
// the generator must skip it once (DES key 8080808080808080); a weak direct
// key E0E0E0E0F1F1F1F1, which must be flagged and, being weak, must turn a
// ciphertext back into the plaintext when encrypting it again; and an en
// pulse while busy, which must be ignored. Every mechanism (each key source,
// encryption, decryption, weak-key retry, weak-key flag, busy) is counted
// and a failure is recorded for any that never occurred.
module tb_des_dynamic_top;
  logic        clk = 0, rst_n = 0, en = 0, mode = 0;
  logic [1:0]  sel = 0;
  logic [63:0] din = 0, key = 0, dout;
  logic        done, busy, weak_key;
  logic [7:0]  key_retries;
  int checks = 0, failures = 0;
  int n_lfsr = 0, n_direct = 0, n_chaos = 0, n_enc = 0, n_dec = 0;
  int n_retry = 0, n_weakflag = 0, n_busy_ignored = 0;

  des_dynamic_top u_dut (.clk, .rst_n, .en, .mode, .sel, .din, .key, .dout, .done,
                         .busy, .weak_key, .key_retries);

  always #5 clk = ~clk;

  localparam logic [63:0] PT  = 64'hCFA111A283810529;
  localparam logic [63:0] KEY = 64'hB890B890B890B890;

  task automatic check64(input logic [63:0] got, input logic [63:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic run(input logic m, input logic [1:0] s, input logic [63:0] d,
                     input logic [63:0] k, input logic [63:0] exp, input int exp_cycles,
                     input string what, input bit poke_en = 0);
    int cycles;
    @(negedge clk);
    en = 1; mode = m; sel = s; din = d; key = k;
    @(negedge clk);
    en = 0; din = ~d; key = ~k; sel = ~s;   // inputs are captured with en
    cycles = 1;
    while (!done && cycles < 1000) begin
      if (poke_en && cycles == 10) begin
        en = 1;                              // must be ignored: busy
        if (busy) n_busy_ignored++;
      end else en = 0;
      @(negedge clk);
      cycles++;
    end
    en = 0;
    check64(dout, exp, what);
    check64(64'(cycles), 64'(exp_cycles), {what, " latency"});
    if (m) n_dec++; else n_enc++;
    case (s)
      2'b00: n_lfsr++;
      2'b11: n_chaos++;
      default: n_direct++;
    endcase
    if (key_retries != 0) n_retry++;
    if (weak_key) n_weakflag++;
    @(negedge clk);
    checks++;
    if (busy) begin
      failures++;
      $display("FAIL %s: still busy after done", what);
    end
  endtask

  task automatic need(input int n, input string what);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end else $display("mechanism %-22s x%0d", what, n);
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #12 rst_n = 1;
    run(0, 2'b00, PT, KEY, 64'h7637B1B67B92E5EF, 84, "LFSR encrypt");
    run(1, 2'b00, 64'h7637B1B67B92E5EF, KEY, PT, 84, "LFSR decrypt");
    run(0, 2'b01, PT, KEY, 64'h8818F6EF72148243, 20, "direct 01 encrypt");
    run(1, 2'b01, 64'h8818F6EF72148243, KEY, PT, 20, "direct 01 decrypt");
    run(0, 2'b10, PT, KEY, 64'h8818F6EF72148243, 20, "direct 10 encrypt");
    run(1, 2'b10, 64'h8818F6EF72148243, KEY, PT, 20, "direct 10 decrypt");
    run(0, 2'b11, PT, KEY, 64'h023E4FB37B9099E5, 36, "logistic encrypt");
    run(1, 2'b11, 64'h023E4FB37B9099E5, KEY, PT, 36, "logistic decrypt", 1);
    // LFSR lands on a weak key after 64 steps: one extra step is taken
    run(0, 2'b00, PT, 64'h1B1B1B1B1B1B1B1A, 64'h296E1DB3B133F69D, 85, "LFSR weak-key retry");
    check64(64'(key_retries), 64'd1, "retry count");
    // weak direct key: flagged, and encrypting twice returns the plaintext
    run(0, 2'b01, 64'h0123456789ABCDEF, 64'hE0E0E0E0F1F1F1F1, 64'hEE600BC06FC9EF23, 20,
        "weak direct encrypt");
    check64(64'(weak_key), 64'd1, "weak flag set");
    run(0, 2'b01, 64'hEE600BC06FC9EF23, 64'hE0E0E0E0F1F1F1F1, 64'h0123456789ABCDEF, 20,
        "weak direct re-encrypt");
    run(0, 2'b01, PT, KEY, 64'h8818F6EF72148243, 20, "direct after weak");
    check64(64'(weak_key), 64'd0, "weak flag cleared");

    need(n_lfsr, "LFSR key");
    need(n_direct, "direct key");
    need(n_chaos, "logistic key");
    need(n_enc, "encryption");
    need(n_dec, "decryption");
    need(n_retry, "weak-key retry");
    need(n_weakflag, "weak-key flag");
    need(n_busy_ignored, "en ignored while busy");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
