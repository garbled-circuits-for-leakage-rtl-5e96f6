// gc_regs: the three 128-bit garbled-value registers A, B and C, their
// free-XOR datapath and the "(1 or 2) of 3" selector feeding the Eval Gate.
//
// A and B are loaded from memory; C cannot be loaded and takes the output
// of the Eval Gate. XOR gates cost no table: A, B or C is XORed with a
// memory word (one-operand XOR) or A with B, A with C, B with C (two-operand
// XOR, result in A, A and B respectively). All of this follows the design.
// The store multiplexer and the two selector outputs are combinational.
//
// Interface: op (gc_pkg::reg_op_e) takes effect at the clock edge of the
// cycle in which it is presented, using mem_data or eval_data. in1_sel and
// in2_sel choose which registers drive eval_in1 and eval_in2; st_sel chooses
// st_data. Reset clears all three registers.
module gc_regs
  import gc_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  reg_op_e  op,
  input  gv_t      mem_data,
  input  gv_t      eval_data,
  input  reg_sel_e in1_sel,
  input  reg_sel_e in2_sel,
  input  reg_sel_e st_sel,
  output gv_t      eval_in1,
  output gv_t      eval_in2,
  output gv_t      st_data,
  output gv_t      reg_a,
  output gv_t      reg_b,
  output gv_t      reg_c
);

  function automatic gv_t pick(input reg_sel_e s, input gv_t a, input gv_t b, input gv_t c);
    unique case (s)
      SEL_A:   return a;
      SEL_B:   return b;
      default: return c;
    endcase
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      reg_a <= '0;
      reg_b <= '0;
      reg_c <= '0;
    end else begin
      unique case (op)
        RO_LOAD_A:  reg_a <= mem_data;
        RO_LOAD_B:  reg_b <= mem_data;
        RO_XOR_A:   reg_a <= reg_a ^ mem_data;
        RO_XOR_B:   reg_b <= reg_b ^ mem_data;
        RO_XOR_C:   reg_c <= reg_c ^ mem_data;
        RO_XOR_AB:  reg_a <= reg_a ^ reg_b;
        RO_XOR_AC:  reg_a <= reg_a ^ reg_c;
        RO_XOR_BC:  reg_b <= reg_b ^ reg_c;
        RO_WRITE_C: reg_c <= eval_data;
        default: ;
      endcase
    end
  end

  assign eval_in1 = pick(in1_sel, reg_a, reg_b, reg_c);
  assign eval_in2 = pick(in2_sel, reg_a, reg_b, reg_c);
  assign st_data  = pick(st_sel,  reg_a, reg_b, reg_c);

endmodule
