// sha256_core: SHA-256 compression of one 512-bit block, starting from the
// standard initial hash value.
//
// The unit is iterative: one round per clock, 64 rounds, then one cycle for
// the final addition of the initial hash value. The message schedule is kept
// as a 16-word sliding window. Every message the evaluation unit hashes fits
// in one padded block, so the unit does not chain blocks.
//
// Interface: pulse start for one cycle while idle with block[511:0] valid
// (block word 0 in bits [511:480]). done pulses for one cycle when digest
// (word H0 in bits [255:224]) is valid; digest holds until the next start.
// Timing: done is high 66 cycles after the cycle in which start was high,
// the figure the design is built to (the start cycle loads the block, then 64
// rounds and one final addition). The round structure itself is this design's choice.
module sha256_core (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [511:0] block,
  output logic         busy,
  output logic         done,
  output logic [255:0] digest
);

  localparam logic [31:0] K [64] = '{
    32'h428a2f98, 32'h71374491, 32'hb5c0fbcf, 32'he9b5dba5, 32'h3956c25b, 32'h59f111f1, 32'h923f82a4, 32'hab1c5ed5,
    32'hd807aa98, 32'h12835b01, 32'h243185be, 32'h550c7dc3, 32'h72be5d74, 32'h80deb1fe, 32'h9bdc06a7, 32'hc19bf174,
    32'he49b69c1, 32'hefbe4786, 32'h0fc19dc6, 32'h240ca1cc, 32'h2de92c6f, 32'h4a7484aa, 32'h5cb0a9dc, 32'h76f988da,
    32'h983e5152, 32'ha831c66d, 32'hb00327c8, 32'hbf597fc7, 32'hc6e00bf3, 32'hd5a79147, 32'h06ca6351, 32'h14292967,
    32'h27b70a85, 32'h2e1b2138, 32'h4d2c6dfc, 32'h53380d13, 32'h650a7354, 32'h766a0abb, 32'h81c2c92e, 32'h92722c85,
    32'ha2bfe8a1, 32'ha81a664b, 32'hc24b8b70, 32'hc76c51a3, 32'hd192e819, 32'hd6990624, 32'hf40e3585, 32'h106aa070,
    32'h19a4c116, 32'h1e376c08, 32'h2748774c, 32'h34b0bcb5, 32'h391c0cb3, 32'h4ed8aa4a, 32'h5b9cca4f, 32'h682e6ff3,
    32'h748f82ee, 32'h78a5636f, 32'h84c87814, 32'h8cc70208, 32'h90befffa, 32'ha4506ceb, 32'hbef9a3f7, 32'hc67178f2
  };

  localparam logic [255:0] IV = {
    32'h6a09e667, 32'hbb67ae85, 32'h3c6ef372, 32'ha54ff53a,
    32'h510e527f, 32'h9b05688c, 32'h1f83d9ab, 32'h5be0cd19
  };

  typedef enum logic [1:0] {S_IDLE, S_ROUND, S_FINAL} state_e;

  state_e      state;
  logic [5:0]  round;
  logic [31:0] w [16];
  logic [31:0] a, b, c, d, e, f, g, h;

  function automatic logic [31:0] rotr(input logic [31:0] x, input int unsigned n);
    return (x >> n) | (x << (32 - n));
  endfunction

  logic [31:0] s0_w, s1_w, w_next, ch, maj, sig0, sig1, t1, t2;

  always_comb begin
    s0_w   = rotr(w[1], 7) ^ rotr(w[1], 18) ^ (w[1] >> 3);
    s1_w   = rotr(w[14], 17) ^ rotr(w[14], 19) ^ (w[14] >> 10);
    w_next = s1_w + w[9] + s0_w + w[0];
    ch     = (e & f) ^ (~e & g);
    maj    = (a & b) ^ (a & c) ^ (b & c);
    sig0   = rotr(a, 2) ^ rotr(a, 13) ^ rotr(a, 22);
    sig1   = rotr(e, 6) ^ rotr(e, 11) ^ rotr(e, 25);
    t1     = h + sig1 + ch + K[round] + w[0];
    t2     = sig0 + maj;
  end

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      round  <= '0;
      done   <= 1'b0;
      digest <= '0;
      {a, b, c, d, e, f, g, h} <= '0;
      for (int i = 0; i < 16; i++) w[i] <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (start) begin
            for (int i = 0; i < 16; i++) w[i] <= block[511 - 32*i -: 32];
            {a, b, c, d, e, f, g, h} <= IV;
            round <= '0;
            state <= S_ROUND;
          end
        end
        S_ROUND: begin
          h <= g;
          g <= f;
          f <= e;
          e <= d + t1;
          d <= c;
          c <= b;
          b <= a;
          a <= t1 + t2;
          for (int i = 0; i < 15; i++) w[i] <= w[i+1];
          w[15] <= w_next;
          round <= round + 6'd1;
          if (round == 6'd63) state <= S_FINAL;
        end
        S_FINAL: begin
          digest <= {a + IV[255:224], b + IV[223:192], c + IV[191:160], d + IV[159:128],
                     e + IV[127:96],  f + IV[95:64],   g + IV[63:32],   h + IV[31:0]};
          done   <= 1'b1;
          state  <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
