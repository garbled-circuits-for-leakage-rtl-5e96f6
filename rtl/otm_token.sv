// otm_token: one One-Time Memory token of a one-time program.
//
// The token holds the two garbled values of one input bit of the receiver,
// x0 and x1, a share r_i of the secret r (r is the XOR of the shares of all
// tokens) and the one-time bit b. A query with bit x releases x0 or x1,
// together with r_i, and sets b; every later query is refused. Only one of
// the two values can ever leave the token. This behaviour follows the
// design. Here b is a flip-flop; a real token needs a tamper-proof,
// one-time-settable bit, which a flip-flop is not. Loading the secrets, the
// erasure of both values after the query, and reset behaviour are this
// design's choices: reset erases the secrets and leaves the token spent
// until it is loaded, and a token can be loaded only once after reset.
//
// Interface: ld writes x0, x1 and r_share (ignored once loaded). q_valid with
// q_bit queries; one cycle later either rel_valid pulses with rel_value and
// rel_share, or rel_refused pulses. spent shows b.
module otm_token
  import gc_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             ld,
  input  gv_t              ld_x0,
  input  gv_t              ld_x1,
  input  logic [KEY_W-1:0] ld_share,
  input  logic             q_valid,
  input  logic             q_bit,
  output logic             rel_valid,
  output gv_t              rel_value,
  output logic [KEY_W-1:0] rel_share,
  output logic             rel_refused,
  output logic             spent
);

  gv_t              x0_q, x1_q;
  logic [KEY_W-1:0] share_q;
  logic             loaded;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x0_q        <= '0;
      x1_q        <= '0;
      share_q     <= '0;
      loaded      <= 1'b0;
      spent       <= 1'b1;
      rel_valid   <= 1'b0;
      rel_value   <= '0;
      rel_share   <= '0;
      rel_refused <= 1'b0;
    end else begin
      rel_valid   <= 1'b0;
      rel_refused <= 1'b0;
      if (ld && !loaded) begin
        x0_q    <= ld_x0;
        x1_q    <= ld_x1;
        share_q <= ld_share;
        loaded  <= 1'b1;
        spent   <= 1'b0;
      end else if (q_valid) begin
        if (!spent) begin
          rel_valid <= 1'b1;
          rel_value <= q_bit ? x1_q : x0_q;
          rel_share <= share_q;
          spent     <= 1'b1;
          x0_q      <= '0;
          x1_q      <= '0;
          share_q   <= '0;
        end else begin
          rel_refused <= 1'b1;
        end
      end
    end
  end

  // A released value always leaves the token spent.
  a_spent: assert property (@(posedge clk) disable iff (!rst_n) rel_valid |-> spent);

endmodule
