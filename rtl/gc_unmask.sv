// gc_unmask: checks and decodes the garbled outputs of a one-time program.
//
// Each garbled output z_j passes a "hold-off" gate: the unit hashes
// H(z_j || r), where r is the XOR of the shares released by all OTM tokens,
// and compares the digest with the two valid hashes h0_j and h1_j supplied
// with the garbled circuit. It reports z_j = 0 on a match with h0_j, 1 on a
// match with h1_j, and fail otherwise, so a wrong or tampered evaluation is
// detected. The check and decoding rule follow the design; the full 256-bit
// digest comparison, the message layout (gc_pkg::unmask_block) and the
// table load port are this design's choices.
//
// Interface: ld_we writes ld_h0/ld_h1 for output ld_idx. clear restarts the
// output count j at 0 and clears any_fail. z_valid/z_ready/z_data take the
// garbled outputs in order j = 0, 1, ...; an output beyond N_OUT fails.
// res_valid pulses with res_idx, res_bit and res_fail. Timing: res_valid is
// high 69 cycles after the cycle in which z_data was taken (form the block,
// start the hash, 66 cycles of hashing, compare); z_ready is low meanwhile.
module gc_unmask
  import gc_pkg::*;
#(
  parameter int unsigned N_OUT = 128
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     ld_we,
  input  logic [$clog2(N_OUT)-1:0] ld_idx,
  input  logic [255:0]             ld_h0,
  input  logic [255:0]             ld_h1,
  input  logic                     clear,
  input  logic [KEY_W-1:0]         r,
  input  logic                     z_valid,
  input  gv_t                      z_data,
  output logic                     z_ready,
  output logic                     res_valid,
  output logic [15:0]              res_idx,
  output logic                     res_bit,
  output logic                     res_fail,
  output logic                     any_fail
);

  logic [255:0] h0_tab [N_OUT];
  logic [255:0] h1_tab [N_OUT];

  typedef enum logic [1:0] {U_IDLE, U_HASH, U_WAIT} ustate_e;
  ustate_e      state;
  logic [15:0]  j;
  logic [511:0] blk_q;
  logic         sha_start, sha_busy, sha_done;
  logic [255:0] digest;
  logic         in_range;

  sha256_core u_sha (
    .clk, .rst_n, .start(sha_start), .block(blk_q), .busy(sha_busy), .done(sha_done), .digest
  );

  assign z_ready  = (state == U_IDLE) && !clear;
  assign in_range = (j < 16'(N_OUT));

  always_ff @(posedge clk) begin
    if (ld_we) begin
      h0_tab[ld_idx] <= ld_h0;
      h1_tab[ld_idx] <= ld_h1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= U_IDLE;
      j         <= '0;
      blk_q     <= '0;
      sha_start <= 1'b0;
      res_valid <= 1'b0;
      res_idx   <= '0;
      res_bit   <= 1'b0;
      res_fail  <= 1'b0;
      any_fail  <= 1'b0;
    end else begin
      sha_start <= 1'b0;
      res_valid <= 1'b0;
      if (clear) begin
        j        <= '0;
        any_fail <= 1'b0;
        state    <= U_IDLE;
      end else begin
        unique case (state)
          U_IDLE: if (z_valid) begin
            blk_q <= unmask_block(z_data, r);
            state <= U_HASH;
          end
          U_HASH: begin
            sha_start <= 1'b1;
            state     <= U_WAIT;
          end
          U_WAIT: if (sha_done) begin
            res_valid <= 1'b1;
            res_idx   <= j;
            if (in_range && digest == h0_tab[j[$clog2(N_OUT)-1:0]]) begin
              res_bit  <= 1'b0;
              res_fail <= 1'b0;
            end else if (in_range && digest == h1_tab[j[$clog2(N_OUT)-1:0]]) begin
              res_bit  <= 1'b1;
              res_fail <= 1'b0;
            end else begin
              res_bit  <= 1'b0;
              res_fail <= 1'b1;
              any_fail <= 1'b1;
            end
            j     <= j + 16'd1;
            state <= U_IDLE;
          end
          default: state <= U_IDLE;
        endcase
      end
    end
  end

endmodule
