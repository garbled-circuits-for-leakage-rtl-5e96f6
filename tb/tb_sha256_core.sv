// tb_sha256_core: checks the SHA-256 core against the published digests of
// "abc" and the empty message, against the reference model on random
// blocks, and checks that done comes 66 cycles after start.
module tb_sha256_core;
  import gc_tb_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [511:0] block = '0;
  logic busy, done;
  logic [255:0] digest;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sha256_core dut (.clk, .rst_n, .start, .block, .busy, .done, .digest);

  task automatic run(input logic [511:0] b, input logic [255:0] exp, input string what);
    int cyc;
    @(negedge clk);
    block = b;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (digest !== exp) begin
      failures++;
      $display("FAIL %s: digest %h expected %h", what, digest, exp);
    end
    checks++;
    if (cyc != 66) begin
      failures++;
      $display("FAIL %s: latency %0d cycles, expected 66", what, cyc);
    end
  endtask

  initial begin
    logic [511:0] b;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run(pad_bytes({24'h616263, 488'b0}, 3), DIGEST_ABC, "abc");
    run(pad_bytes('0, 0), DIGEST_EMPTY, "empty");
    // Reference model agrees with the published vectors.
    checks++;
    if (sha256_ref(pad_bytes({24'h616263, 488'b0}, 3)) !== DIGEST_ABC) begin
      failures++;
      $display("FAIL reference model on abc");
    end
    for (int i = 0; i < 20; i++) begin
      for (int k = 0; k < 16; k++) b[32*k +: 32] = $urandom;
      run(b, sha256_ref(b), "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
