// tb_gc_control: an instruction-level reference model against the control
// state machine, driving real registers, Eval Gate and memory. Random
// programs over random memory contents (no garbling needed) are run; the
// model predicts every OUT value, the final memory, and the cycles between
// consecutive instructions: XOR2 1, LOAD/XOR1 RD+2, STORE WR+3, EVAL 72
// (+RD+1 when a table row is read), OUT RD+WR+5, plus 1 cycle to pick the
// next instruction from the cached program word or RD+2 to fetch a new one.
module tb_gc_control;
  import gc_pkg::*;
  import gc_tb_pkg::*;

  localparam int unsigned DEPTH = 512, RD = 7, WR = 4;
  localparam addr_t TAB = 64, PROG = 192, OUTB = 400;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  addr_t prog_base = PROG, prog_len = '0, out_base = OUTB;
  logic busy, done, err;
  mem_req_t m_req, h_req;
  mem_rsp_t m_rsp, h_rsp;
  logic u_stall;
  reg_op_e r_op;
  reg_sel_e in1_sel, in2_sel, st_sel;
  gv_t ev_in1, ev_in2, st_data, reg_a, reg_b, reg_c;
  logic e_start, e_two_in, e_busy, e_done;
  addr_t e_gate_id;
  gv_t e_row, e_result;
  logic z_valid, retire, retire_row_read;
  logic z_ready = 1'b1;
  gv_t z_data;
  opcode_e retire_op;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  assign h_req = '0;

  gc_control dut (
    .clk, .rst_n, .start, .prog_base, .prog_len, .out_base, .busy, .done, .err,
    .m_req, .m_rsp, .r_op, .r_in1_sel(in1_sel), .r_in2_sel(in2_sel), .r_st_sel(st_sel),
    .r_in1_pi(ev_in1[0]), .r_in2_pi(ev_in2[0]), .r_st_data(st_data),
    .e_start, .e_two_in, .e_gate_id, .e_row, .e_done,
    .z_valid, .z_data, .z_ready, .retire, .retire_op, .retire_row_read);
  gc_regs u_regs (.clk, .rst_n, .op(r_op), .mem_data(m_rsp.rdata), .eval_data(e_result),
    .in1_sel, .in2_sel, .st_sel, .eval_in1(ev_in1), .eval_in2(ev_in2), .st_data, .reg_a, .reg_b, .reg_c);
  gc_eval_gate u_gate (.clk, .rst_n, .start(e_start), .two_in(e_two_in), .in1(ev_in1), .in2(ev_in2),
    .gate_id(e_gate_id), .row(e_row), .busy(e_busy), .done(e_done), .result(e_result));
  gc_mem #(.DEPTH(DEPTH), .RD_LAT(RD), .WR_LAT(WR)) u_mem (.clk, .rst_n, .u_req(m_req), .u_rsp(m_rsp),
    .h_req, .h_rsp, .u_stall);

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // Model state
  gv_t mm [DEPTH];
  gv_t ma, mb, mc;
  gv_t exp_z [$];
  int  exp_cyc [$];

  function automatic gv_t rsel(int s);
    return s == 0 ? ma : s == 1 ? mb : mc;
  endfunction

  // Executes one instruction on the model, returns its cycle count.
  function automatic int exec(instr_t ins, ref int nout);
    gv_t x, y, row;
    int  i1, i2, two, r;
    case (ins.op)
      OP_LOAD_A:  begin ma = mm[ins.addr]; return RD + 2; end
      OP_LOAD_B:  begin mb = mm[ins.addr]; return RD + 2; end
      OP_XOR_A:   begin ma ^= mm[ins.addr]; return RD + 2; end
      OP_XOR_B:   begin mb ^= mm[ins.addr]; return RD + 2; end
      OP_XOR_C:   begin mc ^= mm[ins.addr]; return RD + 2; end
      OP_STORE_A: begin mm[ins.addr] = ma; return WR + 3; end
      OP_STORE_B: begin mm[ins.addr] = mb; return WR + 3; end
      OP_STORE_C: begin mm[ins.addr] = mc; return WR + 3; end
      OP_XOR_AB:  begin ma ^= mb; return 1; end
      OP_XOR_AC:  begin ma ^= mc; return 1; end
      OP_XOR_BC:  begin mb ^= mc; return 1; end
      OP_OUT: begin
        exp_z.push_back(mm[ins.addr]);
        mm[OUTB + addr_t'(nout)] = mm[ins.addr];
        nout++;
        return RD + WR + 5;
      end
      default: begin
        two = ins.op inside {OP_EVAL_AB, OP_EVAL_AC, OP_EVAL_BC};
        case (ins.op)
          OP_EVAL_A:  begin i1 = 0; i2 = 0; end
          OP_EVAL_B:  begin i1 = 1; i2 = 0; end
          OP_EVAL_C:  begin i1 = 2; i2 = 0; end
          OP_EVAL_AB: begin i1 = 0; i2 = 1; end
          OP_EVAL_AC: begin i1 = 0; i2 = 2; end
          default:    begin i1 = 1; i2 = 2; end
        endcase
        x = rsel(i1); y = two ? rsel(i2) : '0;
        r = two ? {x[0], y[0]} : {1'b0, x[0]};
        row = (r == 0) ? '0 : mm[ins.addr + addr_t'(r - 1)];
        mc = gate_hash(x, y, ins.addr) ^ row;
        return (r == 0) ? 72 : 72 + RD + 1;
      end
    endcase
  endfunction

  int n_rows0 = 0, n_rows = 0;

  initial begin
    int n;
    gv_t init [TAB + 64];
    gv_t fin [DEPTH];
    instr_t prog [];
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 3; t++) begin
      int nout, idx, cyc, k;
      n = 40 + 20 * t;
      prog = new[n];
      for (int a = 0; a < TAB + 64; a++) begin init[a] = rand_gv(); mm[a] = init[a]; end
      ma = '0; mb = '0; mc = '0; nout = 0;
      exp_z.delete(); exp_cyc.delete();
      for (int i = 0; i < n; i++) begin
        int c;
        prog[i].op = opcode_e'($urandom_range(17));
        prog[i].addr = (prog[i].op inside {[OP_EVAL_A:OP_EVAL_BC]}) ? TAB + addr_t'($urandom_range(60))
                                                                   : addr_t'($urandom_range(63));
        c = exec(prog[i], nout);
        if (prog[i].op inside {[OP_EVAL_A:OP_EVAL_BC]}) begin
          if (c == 72) n_rows0++; else n_rows++;
        end
        exp_cyc.push_back(c + ((i % 4 == 0) ? RD + 2 : 1));
      end
      rst_n = 1'b0; @(negedge clk); rst_n = 1'b1;   // registers start at zero, as in the model
      for (int a = 0; a < TAB + 64; a++) u_mem.mem[a] = init[a];
      for (int i = 0; i < n; i += 4) begin
        gv_t w = '0;
        for (int l = 0; l < 4 && i + l < n; l++) w[32*l +: 32] = prog[i + l];
        u_mem.mem[PROG + addr_t'(i / 4)] = w;
      end
      @(negedge clk); prog_len = addr_t'(n); start = 1'b1;
      @(negedge clk); start = 1'b0;
      idx = 0; cyc = 1; k = 0;
      while (!done) begin
        if (z_valid && z_ready) begin
          check(k < exp_z.size() && z_data == exp_z[k], $sformatf("z output %0d", k));
          k++;
        end
        if (retire) begin
          if (idx > 0) check(cyc == exp_cyc[idx], $sformatf("cycles of %s: %0d, expected %0d",
                                                      prog[idx].op.name(), cyc, exp_cyc[idx]));
          check(retire_op == prog[idx].op, "retire order");
          idx++;
          cyc = 0;
        end
        @(negedge clk); cyc++;
      end
      check(idx == n && !err, "all instructions retired");
      check(k == exp_z.size(), "output count");
      for (int a = 0; a < 64; a++) check(u_mem.mem[a] == mm[a], $sformatf("memory word %0d", a));
      for (int j = 0; j < nout; j++) check(u_mem.mem[OUTB + addr_t'(j)] == mm[OUTB + addr_t'(j)], "output area");
    end
    check(n_rows0 > 0 && n_rows > 0, "both row cases exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
