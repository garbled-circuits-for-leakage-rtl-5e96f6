// gc_eval_gate: evaluates one garbled non-XOR gate with one or two inputs.
//
// Garbled tables use row reduction: a d-input gate has 2^d - 1 stored rows of
// 128 bits; the row is selected by the permutation bits of the garbled
// inputs (gc_pkg::gc_row), and row 0 is implicit and all zeros. The output
// garbled value is the upper 128 bits of SHA-256(in1 || in2 || gate id)
// XORed with the selected row. The gate id is the table address, so equal
// inputs to different gates hash differently. One hash call per gate and the
// (2^d - 1)-row table follow the design; the exact hash input and the use of
// the upper digest half are this design's choices.
//
// Interface: pulse start with two_in, in1, in2 (ignored and hashed as zero
// when two_in is low), gate_id
// and the table row (zero when the row index is 0; the controller fetches it
// from memory before starting). done pulses with result valid 68 cycles after
// the start cycle: one cycle to form the block, the 66-cycle SHA-256 call and
// one cycle for the final XOR.
module gc_eval_gate
  import gc_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  logic  two_in,
  input  gv_t   in1,
  input  gv_t   in2,
  input  addr_t gate_id,
  input  gv_t   row,
  output logic  busy,
  output logic  done,
  output gv_t   result
);

  logic         sha_start, sha_busy, sha_done;
  logic [511:0] blk_q;
  logic [255:0] digest;
  gv_t          row_q;
  logic         pending;

  sha256_core u_sha (
    .clk    (clk),
    .rst_n  (rst_n),
    .start  (sha_start),
    .block  (blk_q),
    .busy   (sha_busy),
    .done   (sha_done),
    .digest (digest)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      blk_q     <= '0;
      row_q     <= '0;
      sha_start <= 1'b0;
      pending   <= 1'b0;
      done      <= 1'b0;
      result    <= '0;
    end else begin
      sha_start <= 1'b0;
      done      <= 1'b0;
      if (start && !pending) begin
        blk_q     <= gate_block(in1, two_in ? in2 : '0, gate_id);
        row_q     <= row;
        sha_start <= 1'b1;
        pending   <= 1'b1;
      end
      if (sha_done && pending) begin
        result  <= digest[255:128] ^ row_q;
        done    <= 1'b1;
        pending <= 1'b0;
      end
    end
  end

  assign busy = pending;

endmodule
