// gc_otp_top: a one-time program (OTP) system built around the stand-alone
// garbled-circuit evaluation unit, with the SHA-256 peripheral of the
// processor-based variant alongside.
//
// MASK: N_X One-Time Memory tokens (otm_token) hold the garbled values of
// the receiver's input bits. A query of token i with bit x_i releases one
// garbled value, which this block writes to memory word i, and a share of r,
// which it XORs into the r register. The sender's garbled inputs, the
// garbled tables and the program are written by the host, the sender's
// inputs at words N_X .. N_X+N_Y-1, so all garbled inputs sit at the lowest
// addresses.
// EVAL: gc_eval_unit runs the program out of gc_mem.
// UNMASK: each garbled output that an OUT instruction produces goes to
// gc_unmask, which checks it against its two valid hashes using r and
// reports 0, 1 or fail.
// The MASK/EVAL/UNMASK split and the data placement follow the design; the
// host-side ports, the memory arbitration and the streaming of outputs into
// UNMASK are this design's choices.
//
// Interface: the host port h_req/h_rsp reaches the memory (an OTM write
// goes first and holds the host off). Token ports load and query the
// tokens; q_done or q_refused answers each query. start/prog_base/prog_len/
// out_base run the program; busy, done and err report. um_* load the valid
// output hashes; res_* report the decoded outputs. The Avalon port reaches
// the SHA-256 peripheral. retire_* and u_stall expose the unit's progress.
module gc_otp_top
  import gc_pkg::*;
#(
  parameter int unsigned N_X       = 128,
  parameter int unsigned N_Y       = 128,
  parameter int unsigned N_OUT     = 128,
  parameter int unsigned MEM_DEPTH = 2**19,
  parameter int unsigned RD_LAT    = 85,
  parameter int unsigned WR_LAT    = 24
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // host memory port
  input  mem_req_t                 h_req,
  output mem_rsp_t                 h_rsp,
  // OTM tokens: loading by the sender, queries by the receiver
  input  logic                     otm_ld,
  input  logic [$clog2(N_X)-1:0]   otm_ld_idx,
  input  gv_t                      otm_ld_x0,
  input  gv_t                      otm_ld_x1,
  input  logic [KEY_W-1:0]         otm_ld_share,
  input  logic                     q_valid,
  input  logic [$clog2(N_X)-1:0]   q_idx,
  input  logic                     q_bit,
  output logic                     q_ready,
  output logic                     q_done,
  output logic                     q_refused,
  output logic                     all_queried,
  // evaluation
  input  logic                     start,
  input  addr_t                    prog_base,
  input  addr_t                    prog_len,
  input  addr_t                    out_base,
  output logic                     busy,
  output logic                     done,
  output logic                     err,
  // output check and decode
  input  logic                     um_ld_we,
  input  logic [$clog2(N_OUT)-1:0] um_ld_idx,
  input  logic [255:0]             um_ld_h0,
  input  logic [255:0]             um_ld_h1,
  input  logic                     um_clear,
  output logic                     res_valid,
  output logic [15:0]              res_idx,
  output logic                     res_bit,
  output logic                     res_fail,
  output logic                     any_fail,
  // SHA-256 peripheral (processor-based variant)
  input  logic [4:0]               av_address,
  input  logic                     av_write,
  input  logic [31:0]              av_writedata,
  input  logic                     av_read,
  output logic [31:0]              av_readdata,
  // progress
  output logic                     retire,
  output opcode_e                  retire_op,
  output logic                     retire_row_read,
  output logic                     u_stall
);

  // ---------------------------------------------------------------- MASK
  logic [N_X-1:0]   tok_ld, tok_q, tok_rel, tok_ref;
  gv_t              tok_val   [N_X];
  logic [KEY_W-1:0] tok_share [N_X];

  for (genvar i = 0; i < N_X; i++) begin : g_otm
    assign tok_ld[i] = otm_ld && (otm_ld_idx == i);
    assign tok_q[i]  = q_valid && q_ready && (q_idx == i);
    otm_token u_tok (
      .clk, .rst_n,
      .ld(tok_ld[i]), .ld_x0(otm_ld_x0), .ld_x1(otm_ld_x1), .ld_share(otm_ld_share),
      .q_valid(tok_q[i]), .q_bit,
      .rel_valid(tok_rel[i]), .rel_value(tok_val[i]), .rel_share(tok_share[i]),
      .rel_refused(tok_ref[i]), .spent()
    );
  end

  // Query sequencing: one query at a time; a released value is written to
  // memory word q_idx before the next query is taken.
  typedef enum logic [1:0] {Q_IDLE, Q_WAIT, Q_WRITE} qstate_e;
  qstate_e          qstate;
  logic [$clog2(N_X)-1:0] q_idx_q;
  logic [KEY_W-1:0] r_acc;
  logic [N_X-1:0]   queried;
  mem_req_t         otm_req, mem_h_req;
  mem_rsp_t         mem_h_rsp;

  assign q_ready     = (qstate == Q_IDLE);
  assign all_queried = &queried;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      qstate    <= Q_IDLE;
      q_idx_q   <= '0;
      r_acc     <= '0;
      queried   <= '0;
      otm_req   <= '0;
      q_done    <= 1'b0;
      q_refused <= 1'b0;
    end else begin
      q_done    <= 1'b0;
      q_refused <= 1'b0;
      unique case (qstate)
        Q_IDLE: if (q_valid) begin
          q_idx_q <= q_idx;
          qstate  <= Q_WAIT;
        end
        Q_WAIT: begin
          if (tok_rel[q_idx_q]) begin
            r_acc            <= r_acc ^ tok_share[q_idx_q];
            queried[q_idx_q] <= 1'b1;
            otm_req          <= '{req: 1'b1, we: 1'b1, addr: addr_t'(q_idx_q), wdata: tok_val[q_idx_q]};
            qstate           <= Q_WRITE;
          end else if (tok_ref[q_idx_q]) begin
            q_refused <= 1'b1;
            qstate    <= Q_IDLE;
          end
        end
        Q_WRITE: if (mem_h_rsp.ack) begin
          otm_req.req <= 1'b0;
          q_done      <= 1'b1;
          qstate      <= Q_IDLE;
        end
        default: qstate <= Q_IDLE;
      endcase
    end
  end

  // The token write owns the memory's host-side port while it is pending.
  assign mem_h_req = otm_req.req ? otm_req : h_req;
  assign h_rsp     = '{ack: mem_h_rsp.ack && !otm_req.req, rdata: mem_h_rsp.rdata};

  // ---------------------------------------------------------------- EVAL
  mem_req_t u_req;
  mem_rsp_t u_rsp;
  logic     z_valid, z_ready;
  gv_t      z_data;

  gc_mem #(.DEPTH(MEM_DEPTH), .RD_LAT(RD_LAT), .WR_LAT(WR_LAT)) u_mem (
    .clk, .rst_n, .u_req, .u_rsp, .h_req(mem_h_req), .h_rsp(mem_h_rsp), .u_stall
  );

  gc_eval_unit u_unit (
    .clk, .rst_n, .start, .prog_base, .prog_len, .out_base, .busy, .done, .err,
    .m_req(u_req), .m_rsp(u_rsp), .z_valid, .z_data, .z_ready,
    .retire, .retire_op, .retire_row_read
  );

  // -------------------------------------------------------------- UNMASK
  gc_unmask #(.N_OUT(N_OUT)) u_unmask (
    .clk, .rst_n, .ld_we(um_ld_we), .ld_idx(um_ld_idx), .ld_h0(um_ld_h0), .ld_h1(um_ld_h1),
    .clear(um_clear), .r(r_acc), .z_valid, .z_data, .z_ready,
    .res_valid, .res_idx, .res_bit, .res_fail, .any_fail
  );

  initial begin
    assert (MEM_DEPTH >= N_X + N_Y) else $error("gc_otp_top: memory too small for the garbled inputs");
  end

  // ------------------------------------------- processor-variant peripheral
  sha256_avalon u_sha_av (
    .clk, .rst_n, .av_address, .av_write, .av_writedata, .av_read, .av_readdata
  );

endmodule
