// tb_gc_eval_unit: runs random garbled programs through the evaluation
// unit and a small memory. The generator in gc_tb_pkg garbles every gate,
// so the expected garbled output of every OUT instruction is known; each is
// checked on the z stream (taken with random back-pressure) and in the
// output area of memory. Several programs run back to back to check that a
// new start begins cleanly.
module tb_gc_eval_unit;
  import gc_pkg::*;
  import gc_tb_pkg::*;

  localparam int unsigned DEPTH = 4096;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, z_ready = 1'b0;
  addr_t prog_base = '0, prog_len = '0, out_base = '0;
  logic busy, done, err, z_valid, retire, retire_row_read, u_stall;
  opcode_e retire_op;
  gv_t z_data;
  mem_req_t m_req, h_req;
  mem_rsp_t m_rsp, h_rsp;
  int checks = 0, failures = 0;
  int retired [18];
  int rows_read = 0;

  always #5 clk = ~clk;

  gc_eval_unit dut (.clk, .rst_n, .start, .prog_base, .prog_len, .out_base, .busy, .done, .err,
                    .m_req, .m_rsp, .z_valid, .z_data, .z_ready, .retire, .retire_op, .retire_row_read);
  gc_mem #(.DEPTH(DEPTH), .RD_LAT(6), .WR_LAT(3)) u_mem (.clk, .rst_n, .u_req(m_req), .u_rsp(m_rsp),
                                                        .h_req, .h_rsp, .u_stall);

  assign h_req = '0;

  always @(posedge clk) if (retire) begin
    retired[int'(retire_op)]++;
    if (retire_row_read) rows_read++;
  end

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic run_program(input int n_in, input int n_instr);
    gc_prog_gen g;
    int k;
    g = new(n_in, 16, 64);
    g.generate_prog(n_instr);
    for (int i = 0; i < n_in; i++) u_mem.mem[i] = g.lab(g.in_l0[i], g.in_bit[i]);
    foreach (g.img[a]) u_mem.mem[a] = g.img[a];
    @(negedge clk);
    prog_base = g.prog_base; prog_len = addr_t'(g.prog.size()); out_base = g.out_base;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    k = 0;
    while (!done) begin
      z_ready = ($urandom_range(3) != 0);
      #1;
      if (z_valid && z_ready) begin
        check(k < g.out_l0.size(), "no extra outputs");
        if (k < g.out_l0.size())
          check(z_data == g.lab(g.out_l0[k], g.out_bit[k]), $sformatf("garbled output %0d on z", k));
        k++;
      end
      @(negedge clk);
    end
    check(!err, "no error");
    check(k == g.out_l0.size(), $sformatf("output count %0d of %0d", k, g.out_l0.size()));
    for (int j = 0; j < g.out_l0.size(); j++)
      check(u_mem.mem[g.out_base + addr_t'(j)] == g.lab(g.out_l0[j], g.out_bit[j]),
            $sformatf("garbled output %0d in memory", j));
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    run_program(8, 60);
    run_program(16, 200);
    run_program(4, 120);
    // An undefined opcode stops the run with err.
    u_mem.mem[100] = {96'b0, 5'd31, 27'd0};
    @(negedge clk); prog_base = 100; prog_len = 1; start = 1'b1;
    @(negedge clk); start = 1'b0;
    while (!done) @(negedge clk);
    check(err, "undefined opcode flagged");
    for (int i = 0; i < 18; i++) check(retired[i] > 0, $sformatf("opcode %s exercised", opcode_e'(i)));
    check(rows_read > 0, "garbled-table row read");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
