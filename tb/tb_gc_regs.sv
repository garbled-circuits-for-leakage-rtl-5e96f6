// tb_gc_regs: drives random register operations into the A/B/C register
// file and compares every register, the store multiplexer and both Eval
// Gate selector outputs with a model kept in the testbench.
module tb_gc_regs;
  import gc_pkg::*;
  import gc_tb_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  reg_op_e op = RO_NONE;
  gv_t mem_data = '0, eval_data = '0;
  reg_sel_e in1_sel = SEL_A, in2_sel = SEL_B, st_sel = SEL_A;
  gv_t eval_in1, eval_in2, st_data, reg_a, reg_b, reg_c;
  gv_t ma, mb, mc;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  gc_regs dut (.clk, .rst_n, .op, .mem_data, .eval_data, .in1_sel, .in2_sel, .st_sel,
               .eval_in1, .eval_in2, .st_data, .reg_a, .reg_b, .reg_c);

  function automatic gv_t sel(reg_sel_e s);
    return s == SEL_A ? ma : s == SEL_B ? mb : mc;
  endfunction

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    ma = '0; mb = '0; mc = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      op        = reg_op_e'($urandom_range(9));
      mem_data  = rand_gv();
      eval_data = rand_gv();
      in1_sel   = reg_sel_e'($urandom_range(2));
      in2_sel   = reg_sel_e'($urandom_range(2));
      st_sel    = reg_sel_e'($urandom_range(2));
      #1;
      check(eval_in1 == sel(in1_sel) && eval_in2 == sel(in2_sel) && st_data == sel(st_sel), "selectors");
      case (op)
        RO_LOAD_A:  ma = mem_data;
        RO_LOAD_B:  mb = mem_data;
        RO_XOR_A:   ma ^= mem_data;
        RO_XOR_B:   mb ^= mem_data;
        RO_XOR_C:   mc ^= mem_data;
        RO_XOR_AB:  ma ^= mb;
        RO_XOR_AC:  ma ^= mc;
        RO_XOR_BC:  mb ^= mc;
        RO_WRITE_C: mc = eval_data;
        default: ;
      endcase
      @(posedge clk); #1;
      check(reg_a == ma && reg_b == mb && reg_c == mc, $sformatf("registers after %s", op.name()));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
