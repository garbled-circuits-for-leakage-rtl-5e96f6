// tb_gc_unmask: loads valid output hashes computed with the reference
// model, streams garbled outputs (valid 0-labels, valid 1-labels, tampered
// values, and one output past the table) and checks every decoded bit,
// the fail flag, the result order and the 69-cycle latency.
module tb_gc_unmask;
  import gc_pkg::*;
  import gc_tb_pkg::*;

  localparam int unsigned N = 8;

  logic clk = 1'b0, rst_n = 1'b0, ld_we = 1'b0, clear = 1'b0, z_valid = 1'b0;
  logic [$clog2(N)-1:0] ld_idx = '0;
  logic [255:0] ld_h0 = '0, ld_h1 = '0;
  logic [KEY_W-1:0] r;
  gv_t z_data = '0;
  logic z_ready, res_valid, res_bit, res_fail, any_fail;
  logic [15:0] res_idx;
  gv_t l0 [N];
  gv_t delta;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  gc_unmask #(.N_OUT(N)) dut (.clk, .rst_n, .ld_we, .ld_idx, .ld_h0, .ld_h1, .clear, .r,
                               .z_valid, .z_data, .z_ready, .res_valid, .res_idx, .res_bit, .res_fail, .any_fail);

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic send(input gv_t z, input int j, input bit exp_bit, input bit exp_fail);
    int cyc;
    @(negedge clk);
    while (!z_ready) @(negedge clk);
    z_valid = 1'b1; z_data = z;
    @(negedge clk);
    z_valid = 1'b0;
    cyc = 1;
    while (!res_valid) begin @(negedge clk); cyc++; end
    check(res_idx == 16'(j), "result order");
    check(res_fail == exp_fail, $sformatf("fail flag of output %0d", j));
    if (!exp_fail) check(res_bit == exp_bit, $sformatf("bit of output %0d", j));
    check(cyc == 69, $sformatf("latency %0d", cyc));
  endtask

  initial begin
    bit b;
    r = {$urandom, $urandom, $urandom, $urandom};
    delta = rand_gv(); delta[0] = 1'b1;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int j = 0; j < N; j++) begin
      l0[j] = rand_gv();
      @(negedge clk);
      ld_we = 1'b1; ld_idx = j[$clog2(N)-1:0];
      ld_h0 = out_hash(l0[j], r); ld_h1 = out_hash(l0[j] ^ delta, r);
    end
    @(negedge clk); ld_we = 1'b0;
    for (int pass = 0; pass < 3; pass++) begin
      @(negedge clk); clear = 1'b1; @(negedge clk); clear = 1'b0;
      check(!any_fail, "clear resets any_fail");
      for (int j = 0; j < N; j++) begin
        b = 1'($urandom);
        if (pass == 2 && j == 3) send(l0[j] ^ delta ^ gv_t'(1 << $urandom_range(127)), j, 0, 1);
        else send(b ? l0[j] ^ delta : l0[j], j, b, 0);
      end
      if (pass == 2) check(any_fail, "tampered output flagged");
      else           check(!any_fail, "no fail on valid outputs");
    end
    send(l0[0], N, 0, 1);   // beyond the table
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
