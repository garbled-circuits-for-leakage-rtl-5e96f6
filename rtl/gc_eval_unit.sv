// gc_eval_unit: the stand-alone garbled-circuit evaluation unit.
//
// It joins the control state machine (gc_control), the registers A, B, C
// with their XOR datapath (gc_regs) and the Eval Gate with its SHA-256 core
// (gc_eval_gate), and talks to the memory through one gc_pkg::mem_req_t /
// mem_rsp_t port. Registers cache the garbled inputs and output of a single
// gate so that values are reused without memory traffic. The structure
// follows the design; the interfaces between the parts are this design's.
//
// Interface and timing: see gc_control. The unit evaluates a whole program
// after one start pulse and reports done; garbled outputs go to memory from
// out_base and to the z stream.
module gc_eval_unit
  import gc_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     start,
  input  addr_t    prog_base,
  input  addr_t    prog_len,
  input  addr_t    out_base,
  output logic     busy,
  output logic     done,
  output logic     err,
  output mem_req_t m_req,
  input  mem_rsp_t m_rsp,
  output logic     z_valid,
  output gv_t      z_data,
  input  logic     z_ready,
  output logic     retire,
  output opcode_e  retire_op,
  output logic     retire_row_read
);

  reg_op_e  r_op;
  reg_sel_e in1_sel, in2_sel, st_sel;
  gv_t      ev_in1, ev_in2, st_data, reg_a, reg_b, reg_c;
  logic     e_start, e_two_in, e_busy, e_done;
  addr_t    e_gate_id;
  gv_t      e_row, e_result;

  gc_control u_ctrl (
    .clk, .rst_n, .start, .prog_base, .prog_len, .out_base, .busy, .done, .err,
    .m_req, .m_rsp,
    .r_op, .r_in1_sel(in1_sel), .r_in2_sel(in2_sel), .r_st_sel(st_sel),
    .r_in1_pi(ev_in1[0]), .r_in2_pi(ev_in2[0]), .r_st_data(st_data),
    .e_start, .e_two_in, .e_gate_id, .e_row, .e_done,
    .z_valid, .z_data, .z_ready,
    .retire, .retire_op, .retire_row_read
  );

  gc_regs u_regs (
    .clk, .rst_n, .op(r_op), .mem_data(m_rsp.rdata), .eval_data(e_result),
    .in1_sel, .in2_sel, .st_sel,
    .eval_in1(ev_in1), .eval_in2(ev_in2), .st_data, .reg_a, .reg_b, .reg_c
  );

  gc_eval_gate u_gate (
    .clk, .rst_n, .start(e_start), .two_in(e_two_in), .in1(ev_in1), .in2(ev_in2),
    .gate_id(e_gate_id), .row(e_row), .busy(e_busy), .done(e_done), .result(e_result)
  );

endmodule
