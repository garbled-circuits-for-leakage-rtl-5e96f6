// gc_control: the control state machine of the stand-alone evaluation unit.
//
// It runs a program of one-address instructions (gc_pkg::instr_t) stored in
// memory from prog_base, four per 128-bit word, and keeps the last fetched
// program word so that only every fourth instruction costs a memory read.
// Per instruction class:
//   XOR_AB/AC/BC      one cycle, no memory access;
//   LOAD_x, XOR_x     one memory read, then the register update;
//   STORE_x           one memory write of A, B or C;
//   EVAL_x / EVAL_xy  the garbled-table row selected by the permutation bits
//                     is read from addr + row - 1 only when row != 0, then
//                     the Eval Gate hashes the input(s) and C takes the result;
//   OUT               reads mem[addr], writes it to out_base + k (k counts OUT
//                     instructions) and offers it on the z stream.
// The instruction set and the conditional table read follow the design;
// the packing of the program, the program length register (there is no
// halt instruction) and the output stream are this design's choices.
//
// Interface: pulse start with prog_base, prog_len (instructions) and
// out_base while idle; busy stays high until done pulses. An undefined
// opcode stops the run with err set. The z stream (z_valid, z_data,
// z_ready) holds each garbled output until it is taken. retire pulses as
// each instruction completes, with its opcode and whether a table row was
// read. Timing, in cycles per instruction with RD_LAT and WR_LAT the
// memory's request-to-ack latencies, not counting the one cycle that picks
// the next instruction from the cached program word (or RD_LAT+2 cycles
// when a new program word must be read): XOR2 1; LOAD and XOR1 RD_LAT+2;
// STORE WR_LAT+3; EVAL 72, plus RD_LAT+1 when a table row is read (the
// Eval Gate itself takes 68); OUT RD_LAT+WR_LAT+5 when z is taken at once.
module gc_control
  import gc_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  // run control
  input  logic     start,
  input  addr_t    prog_base,
  input  addr_t    prog_len,
  input  addr_t    out_base,
  output logic     busy,
  output logic     done,
  output logic     err,
  // memory
  output mem_req_t m_req,
  input  mem_rsp_t m_rsp,
  // registers
  output reg_op_e  r_op,
  output reg_sel_e r_in1_sel,
  output reg_sel_e r_in2_sel,
  output reg_sel_e r_st_sel,
  input  logic     r_in1_pi,   // permutation bits of the selected inputs
  input  logic     r_in2_pi,
  input  gv_t      r_st_data,
  // eval gate
  output logic     e_start,
  output logic     e_two_in,
  output addr_t    e_gate_id,
  output gv_t      e_row,
  input  logic     e_done,
  // garbled output stream
  output logic     z_valid,
  output gv_t      z_data,
  input  logic     z_ready,
  // retire trace
  output logic     retire,
  output opcode_e  retire_op,
  output logic     retire_row_read
);

  typedef enum logic [3:0] {
    S_IDLE, S_FETCH, S_FETCH_WAIT, S_DECODE, S_MEM_RD, S_MEM_WR,
    S_ROW_RD, S_EV_START, S_EV_WAIT, S_OUT_RD, S_OUT_WR, S_OUT_Z, S_DONE
  } state_e;

  state_e  state;
  addr_t   pc;
  addr_t   out_idx;
  addr_t   word_addr;
  logic    word_valid;
  gv_t     word_q;
  instr_t  ir;
  logic    row_read;
  instr_t  cur_instr;
  logic [1:0] row;

  // Current instruction from the cached program word.
  always_comb begin
    cur_instr = instr_t'(word_q[INSTR_W*pc[1:0] +: INSTR_W]);
  end

  function automatic logic is_two_in(input opcode_e op);
    return op inside {OP_EVAL_AB, OP_EVAL_AC, OP_EVAL_BC};
  endfunction

  // Selector settings for the decoded instruction.
  always_comb begin
    r_in1_sel = SEL_A;
    r_in2_sel = SEL_B;
    r_st_sel  = SEL_A;
    unique case (ir.op)
      OP_EVAL_B:  r_in1_sel = SEL_B;
      OP_EVAL_C:  r_in1_sel = SEL_C;
      OP_EVAL_AC: r_in2_sel = SEL_C;
      OP_EVAL_BC: begin r_in1_sel = SEL_B; r_in2_sel = SEL_C; end
      OP_STORE_B: r_st_sel  = SEL_B;
      OP_STORE_C: r_st_sel  = SEL_C;
      default: ;
    endcase
  end

  assign row       = gc_row(r_in1_pi, r_in2_pi, is_two_in(ir.op));
  assign e_two_in  = is_two_in(ir.op);
  assign e_gate_id = ir.addr;

  // Register operation in the cycle it takes effect.
  always_comb begin
    r_op = RO_NONE;
    if (state == S_DECODE) begin
      unique case (cur_instr.op)
        OP_XOR_AB: r_op = RO_XOR_AB;
        OP_XOR_AC: r_op = RO_XOR_AC;
        OP_XOR_BC: r_op = RO_XOR_BC;
        default: ;
      endcase
    end else if (state == S_MEM_RD && m_rsp.ack) begin
      unique case (ir.op)
        OP_LOAD_A: r_op = RO_LOAD_A;
        OP_LOAD_B: r_op = RO_LOAD_B;
        OP_XOR_A:  r_op = RO_XOR_A;
        OP_XOR_B:  r_op = RO_XOR_B;
        OP_XOR_C:  r_op = RO_XOR_C;
        default: ;
      endcase
    end else if (state == S_EV_WAIT && e_done) begin
      r_op = RO_WRITE_C;
    end
  end

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state           <= S_IDLE;
      pc              <= '0;
      out_idx         <= '0;
      word_addr       <= '0;
      word_valid      <= 1'b0;
      word_q          <= '0;
      ir              <= '0;
      row_read        <= 1'b0;
      m_req           <= '0;
      e_start         <= 1'b0;
      e_row           <= '0;
      z_valid         <= 1'b0;
      z_data          <= '0;
      done            <= 1'b0;
      err             <= 1'b0;
      retire          <= 1'b0;
      retire_op       <= OP_LOAD_A;
      retire_row_read <= 1'b0;
    end else begin
      done    <= 1'b0;
      retire  <= 1'b0;
      e_start <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (start) begin
            pc         <= '0;
            out_idx    <= '0;
            word_valid <= 1'b0;
            err        <= 1'b0;
            state      <= (prog_len == '0) ? S_DONE : S_FETCH;
          end
        end
        S_FETCH: begin
          if (word_valid && word_addr == prog_base + (pc >> 2)) begin
            state <= S_DECODE;
          end else begin
            word_addr <= prog_base + (pc >> 2);
            m_req     <= '{req: 1'b1, we: 1'b0, addr: prog_base + (pc >> 2), wdata: '0};
            state     <= S_FETCH_WAIT;
          end
        end
        S_FETCH_WAIT: begin
          if (m_rsp.ack) begin
            m_req.req  <= 1'b0;
            word_q     <= m_rsp.rdata;
            word_valid <= 1'b1;
            state      <= S_DECODE;
          end
        end
        S_DECODE: begin
          ir       <= cur_instr;
          row_read <= 1'b0;
          unique case (cur_instr.op)
            OP_XOR_AB, OP_XOR_AC, OP_XOR_BC: begin
              retire_instr(cur_instr.op, 1'b0);
            end
            OP_LOAD_A, OP_LOAD_B, OP_XOR_A, OP_XOR_B, OP_XOR_C: begin
              m_req <= '{req: 1'b1, we: 1'b0, addr: cur_instr.addr, wdata: '0};
              state <= S_MEM_RD;
            end
            OP_STORE_A, OP_STORE_B, OP_STORE_C: begin
              state <= S_MEM_WR;   // store data is selected from ir next cycle
            end
            OP_EVAL_A, OP_EVAL_B, OP_EVAL_C, OP_EVAL_AB, OP_EVAL_AC, OP_EVAL_BC: begin
              state <= S_ROW_RD;   // row is computed from ir next cycle
            end
            OP_OUT: begin
              m_req <= '{req: 1'b1, we: 1'b0, addr: cur_instr.addr, wdata: '0};
              state <= S_OUT_RD;
            end
            default: begin
              err   <= 1'b1;
              state <= S_DONE;
            end
          endcase
        end
        S_MEM_RD: begin
          if (m_rsp.ack) begin
            m_req.req <= 1'b0;
            retire_instr(ir.op, 1'b0);
          end
        end
        S_MEM_WR: begin
          if (!m_req.req) begin
            m_req <= '{req: 1'b1, we: 1'b1, addr: ir.addr, wdata: r_st_data};
          end else if (m_rsp.ack) begin
            m_req.req <= 1'b0;
            retire_instr(ir.op, 1'b0);
          end
        end
        S_ROW_RD: begin
          if (row == 2'd0) begin
            e_row <= '0;
            state <= S_EV_START;
          end else if (!m_req.req) begin
            m_req    <= '{req: 1'b1, we: 1'b0, addr: ir.addr + addr_t'(row) - addr_t'(1), wdata: '0};
            row_read <= 1'b1;
          end else if (m_rsp.ack) begin
            m_req.req <= 1'b0;
            e_row     <= m_rsp.rdata;
            state     <= S_EV_START;
          end
        end
        S_EV_START: begin
          e_start <= 1'b1;
          state   <= S_EV_WAIT;
        end
        S_EV_WAIT: begin
          if (e_done) retire_instr(ir.op, row_read);
        end
        S_OUT_RD: begin
          if (m_rsp.ack) begin
            z_data <= m_rsp.rdata;
            m_req  <= '{req: 1'b0, we: 1'b1, addr: out_base + out_idx, wdata: m_rsp.rdata};
            state  <= S_OUT_WR;
          end
        end
        S_OUT_WR: begin
          if (!m_req.req) begin
            m_req.req <= 1'b1;
          end else if (m_rsp.ack) begin
            m_req.req <= 1'b0;
            out_idx   <= out_idx + addr_t'(1);
            z_valid   <= 1'b1;
            state     <= S_OUT_Z;
          end
        end
        S_OUT_Z: begin
          if (z_ready) begin
            z_valid <= 1'b0;
            retire_instr(ir.op, 1'b0);
          end
        end
        S_DONE: begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // Completes the current instruction and moves to the next one.
  task automatic retire_instr(input opcode_e op, input logic rr);
    retire          <= 1'b1;
    retire_op       <= op;
    retire_row_read <= rr;
    pc              <= pc + addr_t'(1);
    state           <= (pc + addr_t'(1) == prog_len) ? S_DONE : S_FETCH;
  endtask

  // The eval gate is only started when it is idle, and z is held until taken.
  a_z_hold: assert property (@(posedge clk) disable iff (!rst_n)
    (z_valid && !z_ready) |=> (z_valid && $stable(z_data)));

endmodule
