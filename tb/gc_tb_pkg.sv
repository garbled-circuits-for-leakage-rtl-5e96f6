// gc_tb_pkg: reference models shared by the testbenches.
//
// sha256_ref is a plain software model of SHA-256 on one padded 512-bit
// block, checked against the published test vectors for "abc" and the
// empty message. The garbling helpers build what a sender produces: label
// pairs with a global free-XOR offset whose permutation bit is 1, and
// row-reduced garbled tables matching the evaluation rule of the unit.
package gc_tb_pkg;
  import gc_pkg::*;

  localparam logic [255:0] DIGEST_ABC   = 256'hba7816bf8f01cfea414140de5dae2223b00361a396177a9cb410ff61f20015ad;
  localparam logic [255:0] DIGEST_EMPTY = 256'he3b0c44298fc1c149afbf4c8996fb92427ae41e4649b934ca495991b7852b855;

  function automatic logic [31:0] ror(input logic [31:0] x, input int n);
    return (x >> n) | (x << (32 - n));
  endfunction

  function automatic logic [255:0] sha256_ref(input logic [511:0] blk);
    logic [31:0] k [64];
    logic [31:0] w [64];
    logic [31:0] hv [8];
    logic [31:0] v [8];
    logic [31:0] t1, t2;
    logic [255:0] out;
    k = '{32'h428a2f98, 32'h71374491, 32'hb5c0fbcf, 32'he9b5dba5, 32'h3956c25b, 32'h59f111f1, 32'h923f82a4, 32'hab1c5ed5,
          32'hd807aa98, 32'h12835b01, 32'h243185be, 32'h550c7dc3, 32'h72be5d74, 32'h80deb1fe, 32'h9bdc06a7, 32'hc19bf174,
          32'he49b69c1, 32'hefbe4786, 32'h0fc19dc6, 32'h240ca1cc, 32'h2de92c6f, 32'h4a7484aa, 32'h5cb0a9dc, 32'h76f988da,
          32'h983e5152, 32'ha831c66d, 32'hb00327c8, 32'hbf597fc7, 32'hc6e00bf3, 32'hd5a79147, 32'h06ca6351, 32'h14292967,
          32'h27b70a85, 32'h2e1b2138, 32'h4d2c6dfc, 32'h53380d13, 32'h650a7354, 32'h766a0abb, 32'h81c2c92e, 32'h92722c85,
          32'ha2bfe8a1, 32'ha81a664b, 32'hc24b8b70, 32'hc76c51a3, 32'hd192e819, 32'hd6990624, 32'hf40e3585, 32'h106aa070,
          32'h19a4c116, 32'h1e376c08, 32'h2748774c, 32'h34b0bcb5, 32'h391c0cb3, 32'h4ed8aa4a, 32'h5b9cca4f, 32'h682e6ff3,
          32'h748f82ee, 32'h78a5636f, 32'h84c87814, 32'h8cc70208, 32'h90befffa, 32'ha4506ceb, 32'hbef9a3f7, 32'hc67178f2};
    hv = '{32'h6a09e667, 32'hbb67ae85, 32'h3c6ef372, 32'ha54ff53a, 32'h510e527f, 32'h9b05688c, 32'h1f83d9ab, 32'h5be0cd19};
    for (int i = 0; i < 16; i++) w[i] = blk[511 - 32*i -: 32];
    for (int i = 16; i < 64; i++)
      w[i] = (ror(w[i-2], 17) ^ ror(w[i-2], 19) ^ (w[i-2] >> 10)) + w[i-7]
           + (ror(w[i-15], 7) ^ ror(w[i-15], 18) ^ (w[i-15] >> 3)) + w[i-16];
    v = hv;
    for (int i = 0; i < 64; i++) begin
      t1 = v[7] + (ror(v[4], 6) ^ ror(v[4], 11) ^ ror(v[4], 25)) + ((v[4] & v[5]) ^ (~v[4] & v[6])) + k[i] + w[i];
      t2 = (ror(v[0], 2) ^ ror(v[0], 13) ^ ror(v[0], 22)) + ((v[0] & v[1]) ^ (v[0] & v[2]) ^ (v[1] & v[2]));
      v[7] = v[6]; v[6] = v[5]; v[5] = v[4]; v[4] = v[3] + t1;
      v[3] = v[2]; v[2] = v[1]; v[1] = v[0]; v[0] = t1 + t2;
    end
    for (int i = 0; i < 8; i++) out[255 - 32*i -: 32] = hv[i] + v[i];
    return out;
  endfunction

  // Padded block of a message of len bytes, first byte in msg[511:504].
  function automatic logic [511:0] pad_bytes(input logic [511:0] msg, input int len);
    logic [511:0] b;
    b = msg;
    b[511 - 8*len] = 1'b1;
    b[63:0] = 64'(8*len);
    return b;
  endfunction

  function automatic gv_t rand_gv();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  // Reference gate hash: upper half of SHA-256(in1 || in2 || id).
  function automatic gv_t gate_hash(input gv_t in1, input gv_t in2, input addr_t id);
    logic [511:0] b;
    b = '0;
    b[511:384] = in1;
    b[383:256] = in2;
    b[255:224] = {5'b0, id};
    b[223]     = 1'b1;
    b[63:0]    = 64'd288;
    return gv_t'(sha256_ref(b) >> 128);
  endfunction

  // Reference output hash: SHA-256(z || r).
  function automatic logic [255:0] out_hash(input gv_t z, input logic [KEY_W-1:0] r);
    logic [511:0] b;
    b = '0;
    b[511:384] = z;
    b[383:257] = r;
    b[256]     = 1'b1;
    b[63:0]    = 64'd255;
    return sha256_ref(b);
  endfunction

  // Random garbled program generator. It plays the sender: it picks the
  // labels of the inputs, writes a random program that uses every
  // instruction, garbles a random truth table for every non-XOR gate, and
  // tracks the plain bit and the zero label of every register and memory
  // slot, so that the expected garbled and plain outputs are known.
  class gc_prog_gen;
    gv_t   delta;
    int    n_in;
    addr_t work_base, tab_base, prog_base, out_base;
    int    n_work, max_out;
    gv_t   img [addr_t];             // memory image: tables, program
    instr_t prog [$];
    gv_t   in_l0 [];                 // zero label of every input
    bit    in_bit [];                // plain value of every input
    gv_t   out_l0 [$];               // zero label of every output
    bit    out_bit [$];              // plain value of every output
    int    op_count [18];
    int    row_zero, row_read;
    // model state
    gv_t   r_l0 [3];
    bit    r_bit [3];
    bit    r_ok [3];
    gv_t   s_l0 [addr_t];
    bit    s_bit [addr_t];
    addr_t tab_ptr;

    function new(int n_inputs, int work_words, int outputs);
      n_in      = n_inputs;
      n_work    = work_words;
      max_out   = outputs;
      work_base = addr_t'(n_in);
      tab_base  = work_base + addr_t'(n_work);
      delta     = rand_gv();
      delta[0]  = 1'b1;
      in_l0     = new[n_in];
      in_bit    = new[n_in];
      for (int i = 0; i < n_in; i++) begin
        in_l0[i]  = rand_gv();
        in_bit[i] = 1'($urandom);
        s_l0[addr_t'(i)]  = in_l0[i];
        s_bit[addr_t'(i)] = in_bit[i];
      end
      r_ok = '{0, 0, 0};
      tab_ptr = tab_base;
    endfunction

    function automatic gv_t lab(gv_t l0, bit b);
      return b ? (l0 ^ delta) : l0;
    endfunction

    function automatic addr_t pick_slot();
      addr_t keys [$];
      foreach (s_l0[k]) keys.push_back(k);
      return keys[$urandom_range(keys.size() - 1)];
    endfunction

    function automatic void emit(opcode_e op, addr_t a);
      instr_t ins;
      ins.op   = op;
      ins.addr = a;
      prog.push_back(ins);
      op_count[int'(op)]++;
    endfunction

    // Garble a gate with inputs (la0, ba) [and (lb0, bb)], table at tab_ptr.
    function automatic void garble(bit two, gv_t la0, bit ba, gv_t lb0, bit bb);
      bit [3:0] tt = 4'($urandom);
      gv_t h, lc0;
      bit  o;
      int  rows = two ? 4 : 2;
      for (int r = 0; r < rows; r++) begin
        bit ra = two ? r[1] : r[0];
        bit rb = r[0];
        bit va = ra ^ la0[0];
        bit vb = rb ^ lb0[0];
        h = gate_hash(lab(la0, va), two ? lab(lb0, vb) : '0, tab_ptr);
        o = two ? tt[{va, vb}] : tt[va];
        if (r == 0) lc0 = o ? (h ^ delta) : h;
        else        img[tab_ptr + addr_t'(r - 1)] = h ^ lab(lc0, o);
      end
      r_l0[2]  = lc0;
      r_bit[2] = two ? tt[{ba, bb}] : tt[ba];
      r_ok[2]  = 1'b1;
      if (two ? {la0[0] ^ ba, lb0[0] ^ bb} == 2'b00 : (la0[0] ^ ba) == 1'b0) row_zero++;
      else row_read++;
      tab_ptr += addr_t'(rows - 1);
    endfunction

    function automatic void generate_prog(int n_instr);
      int n = 0;
      emit(OP_LOAD_A, pick_slot());
      r_l0[0] = s_l0[prog[0].addr]; r_bit[0] = s_bit[prog[0].addr]; r_ok[0] = 1;
      while (n < n_instr - 1) begin
        int k = $urandom_range(17);
        int ri, rj;
        addr_t a;
        case (k)
          0, 1: begin ri = k; a = pick_slot();
                  emit(opcode_e'(k), a); r_l0[ri] = s_l0[a]; r_bit[ri] = s_bit[a]; r_ok[ri] = 1; n++; end
          2, 3, 4: begin ri = k - 2; if (!r_ok[ri]) continue;
                  a = work_base + addr_t'($urandom_range(n_work - 1));
                  emit(opcode_e'(k), a); s_l0[a] = r_l0[ri]; s_bit[a] = r_bit[ri]; n++; end
          5, 6, 7: begin ri = k - 5; if (!r_ok[ri]) continue; a = pick_slot();
                  emit(opcode_e'(k), a); r_l0[ri] ^= s_l0[a]; r_bit[ri] ^= s_bit[a]; n++; end
          8, 9, 10: begin
                  ri = (k == 10) ? 1 : 0; rj = (k == 8) ? 1 : 2;
                  if (!r_ok[ri] || !r_ok[rj]) continue;
                  emit(opcode_e'(k), '0); r_l0[ri] ^= r_l0[rj]; r_bit[ri] ^= r_bit[rj]; n++; end
          11, 12, 13: begin ri = k - 11; if (!r_ok[ri]) continue;
                  emit(opcode_e'(k), tab_ptr);
                  garble(1'b0, r_l0[ri], r_bit[ri], '0, 1'b0); n++; end
          14, 15, 16: begin
                  ri = (k == 16) ? 1 : 0; rj = (k == 14) ? 1 : 2;
                  if (!r_ok[ri] || !r_ok[rj]) continue;
                  emit(opcode_e'(k), tab_ptr);
                  garble(1'b1, r_l0[ri], r_bit[ri], r_l0[rj], r_bit[rj]); n++; end
          default: begin
                  if (out_l0.size() >= max_out) continue;
                  a = pick_slot(); emit(OP_OUT, a);
                  out_l0.push_back(s_l0[a]); out_bit.push_back(s_bit[a]); n++; end
        endcase
      end
      prog_base = tab_ptr;
      for (int i = 0; i < prog.size(); i++) begin
        addr_t w = prog_base + addr_t'(i / 4);
        gv_t v = img.exists(w) ? img[w] : '0;
        v[32*(i % 4) +: 32] = prog[i];
        img[w] = v;
      end
      out_base = prog_base + addr_t'((prog.size() + 3) / 4);
    endfunction
  endclass

endpackage
