// tb_gc_aes: evaluates a garbled AES-128 encryption as a one-time program
// on the complete system at its default sizes, and checks the ciphertext
// against the FIPS-197 example (key 000102..0f, plaintext 0011..ff,
// ciphertext 69c4e0d86a7b0430d8cdb78070b4c55a).
//
// The testbench compiles AES-128 into the unit's instruction set and
// garbles it as a sender would. Circuit: every S-box (16 per round plus 4
// in each key-schedule step, 200 in all) is the small published circuit of
// Boyar and Peralta: 34 AND gates, garbled, and 94 XOR gates. ShiftRows
// is wiring; MixColumns, AddRoundKey and the key schedule are XORs; constant inversions (the round constants) cost nothing because the
// sender swaps the meaning of the wire's two labels. Registers A, B and C are
// reused when the next gate needs an operand they already hold. The cycle
// count, gate count and memory use are printed at the end.
//
// The receiver's plaintext enters through the 128 OTM tokens, the sender's
// key through memory words 128..255. Tables and program are placed in memory
// directly (the host port would only add write time). UNMASK decodes the
// 128 ciphertext bits, which must match FIPS-197 and the values the compiler
// tracked. The software model of the circuit is also checked against a
// plain AES reference on a random key and plaintext. Every instruction that
// does not start a program word is timed from the retire trace and must take
// exactly the design's cycle count (LOAD/XOR1 87, XOR2 1, STORE 27, EVAL2 72
// or 158 with a table-row read, OUT 114); the averages are printed next to
// the document's stand-alone figures.
module tb_gc_aes;
  import gc_pkg::*;
  import gc_tb_pkg::*;

  localparam int N_X = 128, N_Y = 128;
  localparam logic [127:0] KEY = 128'h000102030405060708090a0b0c0d0e0f;
  localparam logic [127:0] PT  = 128'h00112233445566778899aabbccddeeff;
  localparam logic [127:0] CT  = 128'h69c4e0d86a7b0430d8cdb78070b4c55a;
  localparam addr_t STATE_BASE = 256, SCR_BASE = 8192, TAB_BASE = 8704;

  // ------------------------------------------------------------ AES model
  function automatic logic [7:0] xtime(input logic [7:0] a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  function automatic logic [7:0] gmul(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] p = '0;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= a;
      a = xtime(a);
    end
    return p;
  endfunction

  // S-box: multiplicative inverse in GF(2^8) (a^254), then the affine map.
  function automatic logic [7:0] sbox(input logic [7:0] x);
    logic [7:0] inv = 8'h01, s;
    for (int i = 0; i < 254; i++) inv = gmul(inv, x);
    s = inv ^ {inv[6:0], inv[7]} ^ {inv[5:0], inv[7:6]} ^ {inv[4:0], inv[7:5]} ^ {inv[3:0], inv[7:4]} ^ 8'h63;
    return s;
  endfunction

  logic [7:0] sb [256];

  function automatic logic [31:0] mixcol(input logic [31:0] c);
    logic [7:0] a0 = c[31:24], a1 = c[23:16], a2 = c[15:8], a3 = c[7:0];
    return {xtime(a0) ^ xtime(a1) ^ a1 ^ a2 ^ a3,
            a0 ^ xtime(a1) ^ xtime(a2) ^ a2 ^ a3,
            a0 ^ a1 ^ xtime(a2) ^ xtime(a3) ^ a3,
            xtime(a0) ^ a0 ^ a1 ^ a2 ^ xtime(a3)};
  endfunction

  function automatic logic [7:0] rcon(input int r);
    logic [7:0] v = 8'h01;
    for (int i = 1; i < r; i++) v = xtime(v);
    return v;
  endfunction

  function automatic logic [127:0] aes128_ref(input logic [127:0] key, input logic [127:0] pt);
    logic [7:0] st [16], k [16], t [16];
    logic [7:0] tmp [4];
    for (int i = 0; i < 16; i++) begin st[i] = pt[127-8*i -: 8] ^ key[127-8*i -: 8]; k[i] = key[127-8*i -: 8]; end
    for (int r = 1; r <= 10; r++) begin
      tmp = '{sb[k[13]] ^ rcon(r), sb[k[14]], sb[k[15]], sb[k[12]]};
      for (int i = 0; i < 4; i++) k[i] ^= tmp[i];
      for (int i = 4; i < 16; i++) k[i] ^= k[i-4];
      for (int i = 0; i < 16; i++) t[i] = sb[st[4*(((i/4) + (i%4)) % 4) + (i%4)]];
      if (r < 10)
        for (int c = 0; c < 4; c++) {t[4*c], t[4*c+1], t[4*c+2], t[4*c+3]} = mixcol({t[4*c], t[4*c+1], t[4*c+2], t[4*c+3]});
      for (int i = 0; i < 16; i++) st[i] = t[i] ^ k[i];
    end
    for (int i = 0; i < 16; i++) aes128_ref[127-8*i -: 8] = st[i];
  endfunction

  // ------------------------------------------------------ circuit compiler
  typedef struct {
    addr_t a;     // memory word holding the wire's label
    gv_t   l0;    // label meaning 0
    bit    v;     // plain value, tracked for checking
  } wire_t;

  // S-box circuit, 34 AND and 94 XOR/XNOR gates (the small circuit published by
  // Boyar and Peralta). Wires 0..7 are the input bits, most significant first;
  // gate g drives wire 8+g from wires a and b (op 0 XOR, 1 AND, 2 XNOR); the
  // last 8 gates give the output bits, most significant first.
  typedef struct packed {logic [1:0] op; logic [7:0] a, b;} sg_t;
  localparam sg_t SB_GATES [128] = '{
    '{2'd0, 8'd0, 8'd3}, '{2'd0, 8'd0, 8'd5}, '{2'd0, 8'd0, 8'd6}, '{2'd0, 8'd3, 8'd5}, '{2'd0, 8'd4, 8'd6}, '{2'd0, 8'd8, 8'd12},
    '{2'd0, 8'd1, 8'd2}, '{2'd0, 8'd7, 8'd13}, '{2'd0, 8'd7, 8'd14}, '{2'd0, 8'd13, 8'd14}, '{2'd0, 8'd1, 8'd5}, '{2'd0, 8'd2, 8'd5},
    '{2'd0, 8'd10, 8'd11}, '{2'd0, 8'd13, 8'd18}, '{2'd0, 8'd12, 8'd18}, '{2'd0, 8'd12, 8'd19}, '{2'd0, 8'd16, 8'd23}, '{2'd0, 8'd3, 8'd7},
    '{2'd0, 8'd14, 8'd25}, '{2'd0, 8'd8, 8'd26}, '{2'd0, 8'd6, 8'd7}, '{2'd0, 8'd14, 8'd28}, '{2'd0, 8'd9, 8'd29}, '{2'd0, 8'd9, 8'd17},
    '{2'd0, 8'd27, 8'd24}, '{2'd0, 8'd10, 8'd23}, '{2'd0, 8'd8, 8'd19}, '{2'd1, 8'd20, 8'd13}, '{2'd1, 8'd30, 8'd15}, '{2'd0, 8'd21, 8'd35},
    '{2'd1, 8'd26, 8'd7}, '{2'd0, 8'd38, 8'd35}, '{2'd1, 8'd10, 8'd23}, '{2'd1, 8'd29, 8'd16}, '{2'd0, 8'd33, 8'd40}, '{2'd1, 8'd27, 8'd24},
    '{2'd0, 8'd43, 8'd40}, '{2'd1, 8'd8, 8'd22}, '{2'd1, 8'd11, 8'd34}, '{2'd0, 8'd46, 8'd45}, '{2'd1, 8'd9, 8'd17}, '{2'd0, 8'd48, 8'd45},
    '{2'd0, 8'd37, 8'd36}, '{2'd0, 8'd39, 8'd31}, '{2'd0, 8'd42, 8'd41}, '{2'd0, 8'd44, 8'd49}, '{2'd0, 8'd50, 8'd47}, '{2'd0, 8'd51, 8'd49},
    '{2'd0, 8'd52, 8'd47}, '{2'd0, 8'd53, 8'd32}, '{2'd0, 8'd56, 8'd57}, '{2'd1, 8'd56, 8'd54}, '{2'd0, 8'd55, 8'd59}, '{2'd0, 8'd54, 8'd55},
    '{2'd0, 8'd57, 8'd59}, '{2'd1, 8'd62, 8'd61}, '{2'd1, 8'd60, 8'd58}, '{2'd1, 8'd54, 8'd57}, '{2'd1, 8'd61, 8'd65}, '{2'd0, 8'd61, 8'd59},
    '{2'd1, 8'd55, 8'd56}, '{2'd1, 8'd58, 8'd68}, '{2'd0, 8'd58, 8'd59}, '{2'd0, 8'd55, 8'd63}, '{2'd0, 8'd66, 8'd67}, '{2'd0, 8'd57, 8'd64},
    '{2'd0, 8'd69, 8'd70}, '{2'd0, 8'd72, 8'd74}, '{2'd0, 8'd71, 8'd73}, '{2'd0, 8'd71, 8'd72}, '{2'd0, 8'd73, 8'd74}, '{2'd0, 8'd76, 8'd75},
    '{2'd1, 8'd78, 8'd13}, '{2'd1, 8'd74, 8'd15}, '{2'd1, 8'd73, 8'd7}, '{2'd1, 8'd77, 8'd23}, '{2'd1, 8'd72, 8'd16}, '{2'd1, 8'd71, 8'd24},
    '{2'd1, 8'd76, 8'd22}, '{2'd1, 8'd79, 8'd34}, '{2'd1, 8'd75, 8'd17}, '{2'd1, 8'd78, 8'd20}, '{2'd1, 8'd74, 8'd30}, '{2'd1, 8'd73, 8'd26},
    '{2'd1, 8'd77, 8'd10}, '{2'd1, 8'd72, 8'd29}, '{2'd1, 8'd71, 8'd27}, '{2'd1, 8'd76, 8'd8}, '{2'd1, 8'd79, 8'd11}, '{2'd1, 8'd75, 8'd9},
    '{2'd0, 8'd95, 8'd96}, '{2'd0, 8'd84, 8'd90}, '{2'd0, 8'd80, 8'd82}, '{2'd0, 8'd81, 8'd89}, '{2'd0, 8'd88, 8'd92}, '{2'd0, 8'd83, 8'd95},
    '{2'd0, 8'd96, 8'd103}, '{2'd0, 8'd80, 8'd101}, '{2'd0, 8'd85, 8'd93}, '{2'd0, 8'd86, 8'd87}, '{2'd0, 8'd87, 8'd102}, '{2'd0, 8'd94, 8'd100},
    '{2'd0, 8'd82, 8'd85}, '{2'd0, 8'd84, 8'd98}, '{2'd0, 8'd86, 8'd95}, '{2'd0, 8'd89, 8'd99}, '{2'd0, 8'd90, 8'd98}, '{2'd0, 8'd91, 8'd99},
    '{2'd0, 8'd92, 8'd106}, '{2'd0, 8'd97, 8'd102}, '{2'd0, 8'd98, 8'd99}, '{2'd0, 8'd99, 8'd105}, '{2'd0, 8'd101, 8'd110}, '{2'd0, 8'd116, 8'd100},
    '{2'd0, 8'd113, 8'd107}, '{2'd0, 8'd104, 8'd108}, '{2'd0, 8'd105, 8'd107}, '{2'd0, 8'd106, 8'd108}, '{2'd0, 8'd109, 8'd112}, '{2'd0, 8'd109, 8'd115},
    '{2'd0, 8'd104, 8'd122}, '{2'd2, 8'd114, 8'd124}, '{2'd2, 8'd117, 8'd126}, '{2'd0, 8'd104, 8'd119}, '{2'd0, 8'd118, 8'd120}, '{2'd0, 8'd123, 8'd127},
    '{2'd2, 8'd111, 8'd125}, '{2'd2, 8'd104, 8'd121}
  };

  class aes_compiler;
    gv_t    delta;
    gv_t    img [addr_t];
    instr_t prog [$];
    addr_t  st_ptr, scr_ptr, tab_ptr;
    addr_t  ca, cb, cc;
    bit     ca_ok, cb_ok, cc_ok;
    int     n_gates, n_sbox;

    function new(gv_t d);
      delta = d;
      st_ptr = STATE_BASE; tab_ptr = TAB_BASE;
      ca_ok = 0; cb_ok = 0; cc_ok = 0;
    endfunction

    function automatic gv_t lab(gv_t l0, bit b);
      return b ? (l0 ^ delta) : l0;
    endfunction

    function automatic void emit(opcode_e op, addr_t a);
      instr_t ins;
      ins.op = op; ins.addr = a;
      prog.push_back(ins);
    endfunction

    function automatic addr_t new_state();
      st_ptr++;
      return st_ptr - 1;
    endfunction

    function automatic wire_t inv(wire_t w);
      w.l0 ^= delta;
      w.v = !w.v;
      return w;
    endfunction

    function automatic void wrote(addr_t dst);
      if (ca_ok && ca == dst) ca_ok = 0;
      if (cb_ok && cb == dst) cb_ok = 0;
      if (cc_ok && cc == dst) cc_ok = 0;
    endfunction

    // Two-input garbled gate with truth table tt[{x, y}], output in dst.
    function automatic wire_t gate(wire_t x, wire_t y, logic [3:0] tt, addr_t dst);
      wire_t o;
      wire_t t;
      gv_t h, lc0;
      if (tt[1] == tt[2] && ((ca_ok && ca == y.a) || (cb_ok && cb == x.a))) begin t = x; x = y; y = t; end
      if (!(ca_ok && ca == x.a)) begin emit(OP_LOAD_A, x.a); ca = x.a; ca_ok = 1; end
      if (!(cb_ok && cb == y.a)) begin emit(OP_LOAD_B, y.a); cb = y.a; cb_ok = 1; end
      emit(OP_EVAL_AB, tab_ptr);
      for (int r = 0; r < 4; r++) begin
        bit va = r[1] ^ x.l0[0];
        bit vb = r[0] ^ y.l0[0];
        bit ov = tt[{va, vb}];
        h = gate_hash(lab(x.l0, va), lab(y.l0, vb), tab_ptr);
        if (r == 0) lc0 = ov ? (h ^ delta) : h;
        else        img[tab_ptr + addr_t'(r - 1)] = h ^ lab(lc0, ov);
      end
      tab_ptr += 3;
      emit(OP_STORE_C, dst);
      wrote(dst);
      cc = dst; cc_ok = 1;
      n_gates++;
      o.a = dst; o.l0 = lc0; o.v = tt[{x.v, y.v}];
      return o;
    endfunction

    // XOR of several wires into dst (a single wire is returned as is).
    function automatic wire_t xor_list(wire_t ws [$], addr_t dst);
      wire_t o;
      if (ws.size() == 1) return ws[0];
      o.l0 = '0; o.v = 0;
      if (!(ca_ok && ca == ws[0].a)) emit(OP_LOAD_A, ws[0].a);
      foreach (ws[i]) begin
        if (i > 0) emit(OP_XOR_A, ws[i].a);
        o.l0 ^= ws[i].l0;
        o.v  ^= ws[i].v;
      end
      emit(OP_STORE_A, dst);
      wrote(dst);
      ca = dst; ca_ok = 1;
      o.a = dst;
      return o;
    endfunction

    // XOR of two wires into dst, using register-register XORs where the
    // operands are already held in A and B or C.
    function automatic wire_t xor_two(wire_t x, wire_t y, addr_t dst);
      wire_t o, t;
      if (ca_ok && ca == y.a) begin t = x; x = y; y = t; end
      if (!(ca_ok && ca == x.a)) emit(OP_LOAD_A, x.a);
      if (cb_ok && cb == y.a)      emit(OP_XOR_AB, '0);
      else if (cc_ok && cc == y.a) emit(OP_XOR_AC, '0);
      else                         emit(OP_XOR_A, y.a);
      emit(OP_STORE_A, dst);
      wrote(dst);
      ca = dst; ca_ok = 1;
      o.a = dst; o.l0 = x.l0 ^ y.l0; o.v = x.v ^ y.v;
      return o;
    endfunction

    function automatic wire_t xor2(wire_t x, wire_t y);
      return xor_two(x, y, new_state());
    endfunction

    // S-box on 8 wires (x[0] is the least significant bit), from SB_GATES.
    function automatic void sbox_circ(input wire_t x [8], output wire_t s [8]);
      wire_t w [128+8];
      for (int i = 0; i < 8; i++) w[i] = x[7 - i];
      scr_ptr = SCR_BASE;
      for (int g = 0; g < 128; g++) begin
        wire_t a = w[SB_GATES[g].a], b = w[SB_GATES[g].b];
        addr_t dst;
        if (g >= 120) dst = new_state();
        else begin dst = scr_ptr; scr_ptr++; end
        if (SB_GATES[g].op == 2'd1) w[8 + g] = gate(a, b, 4'b1000, dst);
        else begin
          w[8 + g] = xor_two(a, b, dst);
          if (SB_GATES[g].op == 2'd2) w[8 + g] = inv(w[8 + g]);
        end
      end
      for (int i = 0; i < 8; i++) s[7 - i] = w[128 + i];
      n_sbox++;
    endfunction
  endclass

  // ------------------------------------------------------------- the system
  logic clk = 1'b0, rst_n = 1'b0;
  mem_req_t h_req = '0;
  mem_rsp_t h_rsp;
  logic otm_ld = 1'b0, q_valid = 1'b0, q_bit = 1'b0;
  logic [6:0] otm_ld_idx = '0, q_idx = '0;
  gv_t otm_ld_x0 = '0, otm_ld_x1 = '0;
  logic [KEY_W-1:0] otm_ld_share = '0;
  logic q_ready, q_done, q_refused, all_queried;
  logic start = 1'b0;
  addr_t prog_base = '0, prog_len = '0, out_base = '0;
  logic busy, done, err;
  logic um_ld_we = 1'b0, um_clear = 1'b0;
  logic [6:0] um_ld_idx = '0;
  logic [255:0] um_ld_h0 = '0, um_ld_h1 = '0;
  logic res_valid, res_bit, res_fail, any_fail;
  logic [15:0] res_idx;
  logic [31:0] av_readdata;
  logic retire, retire_row_read, u_stall;
  opcode_e retire_op;
  int checks = 0, failures = 0;
  longint cycles = 0;
  int n_eval = 0, n_rows = 0;
  logic [127:0] ct_hw = '0;
  int n_res = 0, n_bad = 0;

  always #5 clk = ~clk;

  gc_otp_top dut (
    .clk, .rst_n, .h_req, .h_rsp,
    .otm_ld, .otm_ld_idx, .otm_ld_x0, .otm_ld_x1, .otm_ld_share,
    .q_valid, .q_idx, .q_bit, .q_ready, .q_done, .q_refused, .all_queried,
    .start, .prog_base, .prog_len, .out_base, .busy, .done, .err,
    .um_ld_we, .um_ld_idx, .um_ld_h0, .um_ld_h1, .um_clear,
    .res_valid, .res_idx, .res_bit, .res_fail, .any_fail,
    .av_address(5'd0), .av_write(1'b0), .av_writedata(32'd0), .av_read(1'b0), .av_readdata,
    .retire, .retire_op, .retire_row_read, .u_stall
  );

  // Per-instruction timing, taken from the retire trace. Only instructions
  // that are not first in their program word are timed, so that the interval
  // between two retires is one cycle of instruction selection plus the
  // instruction itself, with no word fetch.
  longint now = 0, last_retire = 0;
  int n_retired = 0;
  longint op_cyc [18] = '{default: 0};
  int op_n [18] = '{default: 0};
  int op_bad [18] = '{default: 0};
  int rows_timed = 0;

  function automatic int expected_cycles(opcode_e op, logic rr);
    case (op)
      OP_LOAD_A, OP_LOAD_B, OP_XOR_A, OP_XOR_B, OP_XOR_C: return 87;
      OP_STORE_A, OP_STORE_B, OP_STORE_C:                  return 27;
      OP_XOR_AB, OP_XOR_AC, OP_XOR_BC:                     return 1;
      OP_OUT:                                              return 114;
      default:                                             return rr ? 158 : 72;
    endcase
  endfunction

  always @(posedge clk) begin
    now++;
    if (start) n_retired = 0;
    if (retire && rst_n) begin
      if (n_retired % 4 != 0) begin
        int t;
        t = int'(now - last_retire) - 1;
        op_cyc[retire_op] += t;
        op_n[retire_op]++;
        if (t != expected_cycles(retire_op, retire_row_read)) op_bad[retire_op]++;
        if (retire_op == OP_EVAL_AB && retire_row_read) rows_timed++;
      end
      last_retire = now;
      n_retired++;
    end
    if (busy) cycles++;
    if (retire && retire_op == OP_EVAL_AB) begin n_eval++; if (retire_row_read) n_rows++; end
    if (res_valid) begin
      n_res++;
      if (res_fail) n_bad++;
      ct_hw[127 - int'(res_idx)] = res_bit;
    end
  end

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic host_write(input addr_t a, input gv_t d);
    @(negedge clk);
    h_req = '{req: 1'b1, we: 1'b1, addr: a, wdata: d};
    do @(negedge clk); while (!h_rsp.ack);
    @(negedge clk);
    h_req.req = 1'b0;
  endtask

  // Compiles AES-128 on the given input wires; returns the 128 output wires,
  // ciphertext bit 127-j in out[j].
  function automatic void build_aes(aes_compiler c, input wire_t xin [128], input wire_t kin [128],
                                    output wire_t out [128]);
    wire_t st [16][8], k [16][8], t [16][8], tmp [4][8], sx [8], so [8];
    wire_t ws [$];
    logic [31:0] col;
    for (int i = 0; i < 16; i++)
      for (int b = 0; b < 8; b++) begin
        k[i][b]  = kin[8*i + 7 - b];
        st[i][b] = c.xor2(xin[8*i + 7 - b], k[i][b]);
      end
    for (int r = 1; r <= 10; r++) begin
      // key schedule
      for (int i = 0; i < 4; i++) begin
        sx = k[12 + ((i + 1) % 4)];
        c.sbox_circ(sx, so);
        tmp[i] = so;
      end
      for (int b = 0; b < 8; b++) if (rcon(r)[b]) tmp[0][b] = c.inv(tmp[0][b]);
      for (int i = 0; i < 16; i++)
        for (int b = 0; b < 8; b++)
          k[i][b] = c.xor2(k[i][b], (i < 4) ? tmp[i][b] : k[i-4][b]);
      // SubBytes and ShiftRows
      for (int i = 0; i < 16; i++) begin
        sx = st[4*(((i/4) + (i%4)) % 4) + (i%4)];
        c.sbox_circ(sx, so);
        t[i] = so;
      end
      // MixColumns (linear, found from unit vectors) and AddRoundKey
      for (int cc = 0; cc < 4; cc++)
        for (int ob = 0; ob < 32; ob++) begin
          ws.delete();
          for (int ib = 0; ib < 32; ib++) begin
            col = (r < 10) ? mixcol(32'h1 << ib) : (32'h1 << ib);
            if (col[ob]) ws.push_back(t[4*cc + 3 - ib/8][ib % 8]);
          end
          ws.push_back(k[4*cc + 3 - ob/8][ob % 8]);
          st[4*cc + 3 - ob/8][ob % 8] = c.xor_list(ws, c.new_state());
        end
    end
    for (int j = 0; j < 128; j++) out[j] = st[j/8][7 - j%8];
  endfunction

  initial begin
    aes_compiler c;
    wire_t xin [128], kin [128], out [128];
    gv_t d, xl0 [128];
    logic [KEY_W-1:0] sh, r;
    addr_t pb, ob;
    bit rel;

    for (int v = 0; v < 256; v++) sb[v] = sbox(8'(v));
    check(sb[8'h00] == 8'h63 && sb[8'h53] == 8'hed, "S-box values");
    check(aes128_ref(KEY, PT) == CT, "reference AES on the FIPS-197 example");

    // Software run of the compiled circuit on a random key and plaintext.
    begin
      logic [127:0] rk, rp, got;
      aes_compiler cs;
      d = rand_gv(); d[0] = 1'b1;
      cs = new(d);
      rk = {$urandom, $urandom, $urandom, $urandom};
      rp = {$urandom, $urandom, $urandom, $urandom};
      for (int j = 0; j < 128; j++) begin
        xin[j] = '{a: addr_t'(j), l0: rand_gv(), v: rp[127 - j]};
        kin[j] = '{a: addr_t'(N_X + j), l0: rand_gv(), v: rk[127 - j]};
      end
      build_aes(cs, xin, kin, out);
      for (int j = 0; j < 128; j++) got[127 - j] = out[j].v;
      check(got == aes128_ref(rk, rp), "compiled circuit computes AES on a random input");
    end

    // The garbled circuit for the FIPS-197 example.
    d = rand_gv(); d[0] = 1'b1;
    c = new(d);
    for (int j = 0; j < 128; j++) begin
      xl0[j] = rand_gv();
      xin[j] = '{a: addr_t'(j), l0: xl0[j], v: PT[127 - j]};
      kin[j] = '{a: addr_t'(N_X + j), l0: rand_gv(), v: KEY[127 - j]};
    end
    build_aes(c, xin, kin, out);
    for (int j = 0; j < 128; j++) c.emit(OP_OUT, out[j].a);
    pb = c.tab_ptr;
    ob = pb + addr_t'((c.prog.size() + 3) / 4);
    $display("AES-128 circuit: %0d S-boxes, %0d garbled gates, %0d instructions, %0d memory words used",
             c.n_sbox, c.n_gates, c.prog.size(), int'(ob) + 128);
    check(int'(ob) + 128 <= 2**19, "circuit fits the memory");

    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // Tables and program: placed in memory directly.
    foreach (c.img[a]) dut.u_mem.mem[a[18:0]] = c.img[a];
    for (int i = 0; i < c.prog.size(); i += 4) begin
      gv_t w = '0;
      for (int l = 0; l < 4 && i + l < c.prog.size(); l++) w[32*l +: 32] = c.prog[i + l];
      dut.u_mem.mem[19'(pb + addr_t'(i / 4))] = w;
    end
    // Sender's key labels over the host port.
    for (int j = 0; j < 128; j++) host_write(addr_t'(N_X + j), c.lab(kin[j].l0, kin[j].v));
    // Tokens and shares of r.
    r = '0;
    for (int j = 0; j < 128; j++) begin
      sh = {$urandom, $urandom, $urandom, $urandom};
      r ^= sh;
      @(negedge clk);
      otm_ld = 1'b1; otm_ld_idx = 7'(j);
      otm_ld_x0 = xl0[j]; otm_ld_x1 = xl0[j] ^ c.delta; otm_ld_share = sh;
    end
    @(negedge clk); otm_ld = 1'b0;
    // Valid output hashes.
    for (int j = 0; j < 128; j++) begin
      @(negedge clk);
      um_ld_we = 1'b1; um_ld_idx = 7'(j);
      um_ld_h0 = out_hash(out[j].l0, r); um_ld_h1 = out_hash(out[j].l0 ^ c.delta, r);
    end
    @(negedge clk); um_ld_we = 1'b0;
    um_clear = 1'b1; @(negedge clk); um_clear = 1'b0;
    // Receiver queries the tokens with the plaintext bits.
    for (int j = 0; j < 128; j++) begin
      @(negedge clk);
      while (!q_ready) @(negedge clk);
      q_valid = 1'b1; q_idx = 7'(j); q_bit = PT[127 - j];
      @(negedge clk); q_valid = 1'b0;
      while (!q_done && !q_refused) @(negedge clk);
      check(q_done, "token released");
    end
    check(all_queried, "all tokens queried");
    // Evaluate.
    @(negedge clk);
    prog_base = pb; prog_len = addr_t'(c.prog.size()); out_base = ob; start = 1'b1;
    @(negedge clk); start = 1'b0;
    while (!done) @(negedge clk);
    repeat (100) @(negedge clk);
    check(!err, "no error");
    check(n_res == 128, "128 outputs decoded");
    check(n_bad == 0 && !any_fail, "all outputs valid");
    check(ct_hw == CT, $sformatf("ciphertext %h, expected %h", ct_hw, CT));
    for (int j = 0; j < 128; j++) check(ct_hw[127 - j] == out[j].v, "output matches the circuit model");
    check(n_eval == c.n_gates, "every garbled gate evaluated");
    // Timing per instruction class, next to the document's stand-alone
    // averages (Table 3: LOAD 87.63, XOR1 87.65, XOR2 1.00, STORE 27.15,
    // EVAL2 135.05, OUT 135.09).
    begin
      opcode_e ops [9] = '{OP_LOAD_A, OP_LOAD_B, OP_XOR_A, OP_XOR_AB, OP_XOR_AC,
                           OP_STORE_A, OP_STORE_C, OP_EVAL_AB, OP_OUT};
      foreach (ops[i]) begin
        $display("  %-10s timed %6d, average %7.2f cycles", ops[i].name(), op_n[ops[i]],
                 op_n[ops[i]] ? real'(op_cyc[ops[i]]) / op_n[ops[i]] : 0.0);
        // this circuit rarely finds both XOR operands in A and B
        if (ops[i] != OP_XOR_AB) check(op_n[ops[i]] > 0, $sformatf("%s timed", ops[i].name()));
        check(op_bad[ops[i]] == 0, $sformatf("%s: %0d instructions off the expected cycle count",
                                             ops[i].name(), op_bad[ops[i]]));
      end
      check(op_cyc[OP_EVAL_AB] == longint'(72) * op_n[OP_EVAL_AB] + longint'(86) * rows_timed,
            "EVAL2 time: 72 cycles plus 86 for each table row read");
    end
    $display("evaluation: %0d cycles, %0d gates, %0d table rows read (%0d%%)", cycles, n_eval, n_rows,
             (100 * n_rows) / (n_eval > 0 ? n_eval : 1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
