// tb_gc_eval_gate: evaluates random one- and two-input gates and compares
// the result with the reference hash XOR table row; checks the 68-cycle
// latency and that a one-input gate ignores its second input.
module tb_gc_eval_gate;
  import gc_pkg::*;
  import gc_tb_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, two_in = 1'b0;
  gv_t in1 = '0, in2 = '0, row = '0;
  addr_t gate_id = '0;
  logic busy, done;
  gv_t result;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  gc_eval_gate dut (.clk, .rst_n, .start, .two_in, .in1, .in2, .gate_id, .row, .busy, .done, .result);

  initial begin
    gv_t exp;
    int cyc;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 30; i++) begin
      @(negedge clk);
      two_in  = (i % 3) != 0;
      in1     = rand_gv();
      in2     = rand_gv();
      gate_id = addr_t'($urandom);
      row     = (i % 4 == 0) ? '0 : rand_gv();
      exp     = gate_hash(in1, two_in ? in2 : '0, gate_id) ^ row;
      start   = 1'b1;
      @(negedge clk);
      start = 1'b0;
      in2   = rand_gv();          // inputs may change once started
      cyc   = 1;
      while (!done) begin @(negedge clk); cyc++; end
      checks++;
      if (result !== exp) begin failures++; $display("FAIL gate %0d: %h expected %h", i, result, exp); end
      checks++;
      if (cyc != 68) begin failures++; $display("FAIL gate %0d: latency %0d, expected 68", i, cyc); end
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
