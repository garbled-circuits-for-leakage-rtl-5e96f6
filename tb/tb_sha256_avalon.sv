// tb_sha256_avalon: writes message blocks over the Avalon slave port,
// starts the hash, polls the status word and reads the digest, comparing
// with the published "abc" digest and the reference model.
module tb_sha256_avalon;
  import gc_tb_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, av_write = 1'b0, av_read = 1'b0;
  logic [4:0] av_address = '0;
  logic [31:0] av_writedata = '0, av_readdata;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sha256_avalon dut (.clk, .rst_n, .av_address, .av_write, .av_writedata, .av_read, .av_readdata);

  task automatic wr(input int a, input logic [31:0] d);
    @(negedge clk); av_write = 1'b1; av_address = 5'(a); av_writedata = d;
    @(negedge clk); av_write = 1'b0;
  endtask

  task automatic rd(input int a, output logic [31:0] d);
    @(negedge clk); av_read = 1'b1; av_address = 5'(a);
    #1 d = av_readdata;
    @(negedge clk); av_read = 1'b0;
  endtask

  task automatic hash(input logic [511:0] b, input logic [255:0] exp);
    logic [31:0] d;
    logic [255:0] got;
    int polls = 0;
    for (int i = 0; i < 16; i++) wr(i, b[511 - 32*i -: 32]);
    rd(5, d);
    checks++;
    if (d != b[511 - 160 -: 32]) begin failures++; $display("FAIL message read-back"); end
    wr(16, 32'd1);
    do begin rd(17, d); polls++; end while (d[1] == 1'b0 && polls < 200);
    for (int i = 0; i < 8; i++) begin rd(24 + i, d); got[255 - 32*i -: 32] = d; end
    checks++;
    if (got !== exp) begin failures++; $display("FAIL digest %h expected %h", got, exp); end
  endtask

  initial begin
    logic [511:0] b;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    hash(pad_bytes({24'h616263, 488'b0}, 3), DIGEST_ABC);
    for (int n = 0; n < 5; n++) begin
      for (int k = 0; k < 16; k++) b[32*k +: 32] = $urandom;
      hash(b, sha256_ref(b));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
