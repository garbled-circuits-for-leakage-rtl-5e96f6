// tb_gc_otp_top: one complete one-time-program run through the whole
// system at its default sizes (128 receiver inputs in OTM tokens, 128
// sender inputs, 128 output slots, 8 MB memory, full memory latencies).
//
// The testbench plays the sender: it garbles a random program (gc_tb_pkg
// generator), loads the tokens with the label pairs and the shares of r,
// writes the sender's garbled inputs, tables and program over the host
// port, and loads UNMASK with the two valid hashes of every output. It then
// plays the receiver: queries every token with its input bit, tries a
// second query (must be refused), runs the program, and checks each decoded
// output against the plain value the generator tracked. The host reads
// memory during the run to make the unit wait. A second run re-emits the
// stored garbled outputs after one was tampered with; UNMASK must flag
// exactly that one. The processor variant's SHA-256 peripheral hashes one
// block meanwhile. Every mechanism is counted and must occur.
module tb_gc_otp_top;
  import gc_pkg::*;
  import gc_tb_pkg::*;

  localparam int N_X = 128, N_Y = 128, N_OUT = 128;

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
  logic [4:0] av_address = '0;
  logic av_write = 1'b0, av_read = 1'b0;
  logic [31:0] av_writedata = '0, av_readdata;
  logic retire, retire_row_read, u_stall;
  opcode_e retire_op;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_op [18];
  int n_row_read = 0, n_row_zero = 0, n_release = 0, n_refused = 0, n_stall = 0;
  int n_res0 = 0, n_res1 = 0, n_resfail = 0, n_host_rd = 0, n_sha_av = 0;

  always #5 clk = ~clk;

  gc_otp_top dut (
    .clk, .rst_n, .h_req, .h_rsp,
    .otm_ld, .otm_ld_idx, .otm_ld_x0, .otm_ld_x1, .otm_ld_share,
    .q_valid, .q_idx, .q_bit, .q_ready, .q_done, .q_refused, .all_queried,
    .start, .prog_base, .prog_len, .out_base, .busy, .done, .err,
    .um_ld_we, .um_ld_idx, .um_ld_h0, .um_ld_h1, .um_clear,
    .res_valid, .res_idx, .res_bit, .res_fail, .any_fail,
    .av_address, .av_write, .av_writedata, .av_read, .av_readdata,
    .retire, .retire_op, .retire_row_read, .u_stall
  );

  always @(posedge clk) begin
    if (retire) begin
      n_op[int'(retire_op)]++;
      if (retire_op inside {[OP_EVAL_A:OP_EVAL_BC]}) begin
        if (retire_row_read) n_row_read++; else n_row_zero++;
      end
    end
    if (u_stall) n_stall++;
  end

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic host(input bit we, input addr_t a, input gv_t d, output gv_t q);
    @(negedge clk);
    h_req = '{req: 1'b1, we: we, addr: a, wdata: d};
    do @(negedge clk); while (!h_rsp.ack);
    q = h_rsp.rdata;
    @(negedge clk);
    h_req.req = 1'b0;
  endtask

  task automatic query(input int i, input bit b, output bit released);
    @(negedge clk);
    while (!q_ready) @(negedge clk);
    q_valid = 1'b1; q_idx = 7'(i); q_bit = b;
    @(negedge clk);
    q_valid = 1'b0;
    while (!q_done && !q_refused) @(negedge clk);
    released = q_done;
  endtask

  // Collected decoded outputs
  bit got_bit [int];
  bit got_fail [int];
  always @(posedge clk) if (res_valid) begin
    got_bit[int'(res_idx)]  = res_bit;
    got_fail[int'(res_idx)] = res_fail;
    if (res_fail) n_resfail++; else if (res_bit) n_res1++; else n_res0++;
  end

  task automatic run(input addr_t pb, input addr_t pl, input addr_t ob, input bit host_reads, input gv_t peek);
    gv_t q;
    @(negedge clk);
    prog_base = pb; prog_len = pl; out_base = ob; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    if (host_reads) begin
      for (int i = 0; i < 4; i++) begin
        repeat (500) @(negedge clk);
        host(1'b0, addr_t'(N_X), '0, q);
        check(q == peek, "host read during evaluation");
        n_host_rd++;
      end
    end
    while (!done) @(negedge clk);
    check(!err, "run ends without error");
    repeat (80) @(negedge clk);   // let UNMASK finish the last output
  endtask

  initial begin
    gc_prog_gen g;
    gv_t q, yv;
    logic [KEY_W-1:0] sh, r;
    bit rel;
    addr_t tb_prog;
    int n_out;

    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // ---- sender: garble
    g = new(N_X + N_Y, 32, N_OUT);
    g.generate_prog(400);
    n_out = g.out_l0.size();
    $display("program: %0d instructions, %0d outputs, %0d table rows", g.prog.size(), n_out,
             int'(g.prog_base - g.tab_base));

    // ---- sender: OTM tokens
    r = '0;
    for (int i = 0; i < N_X; i++) begin
      sh = {$urandom, $urandom, $urandom, $urandom};
      r ^= sh;
      @(negedge clk);
      otm_ld = 1'b1; otm_ld_idx = 7'(i);
      otm_ld_x0 = g.in_l0[i]; otm_ld_x1 = g.in_l0[i] ^ g.delta; otm_ld_share = sh;
    end
    @(negedge clk); otm_ld = 1'b0;

    // ---- sender: garbled inputs of S, tables and program over the host port
    for (int i = N_X; i < N_X + N_Y; i++) host(1'b1, addr_t'(i), g.lab(g.in_l0[i], g.in_bit[i]), q);
    foreach (g.img[a]) host(1'b1, a, g.img[a], q);

    // ---- sender: valid output hashes
    for (int j = 0; j < n_out; j++) begin
      @(negedge clk);
      um_ld_we = 1'b1; um_ld_idx = 7'(j);
      um_ld_h0 = out_hash(g.out_l0[j], r); um_ld_h1 = out_hash(g.out_l0[j] ^ g.delta, r);
    end
    @(negedge clk); um_ld_we = 1'b0;
    um_clear = 1'b1; @(negedge clk); um_clear = 1'b0;

    // ---- receiver: query every token once, then try one again
    for (int i = 0; i < N_X; i++) begin
      check(!all_queried, "inputs incomplete before the last query");
      query(i, g.in_bit[i], rel);
      check(rel, $sformatf("token %0d released", i));
      if (rel) n_release++;
    end
    check(all_queried, "all tokens queried");
    query(5, ~g.in_bit[5], rel);
    check(!rel, "second query refused");
    if (!rel) n_refused++;
    for (int i = 0; i < 8; i++) begin
      host(1'b0, addr_t'(i), '0, q);
      check(q == g.lab(g.in_l0[i], g.in_bit[i]), $sformatf("garbled input %0d in memory", i));
    end

    // ---- SHA-256 peripheral of the processor variant, while EVAL runs
    fork
      begin
        logic [511:0] b;
        logic [255:0] dg;
        for (int k = 0; k < 16; k++) b[32*k +: 32] = $urandom;
        for (int w = 0; w < 16; w++) begin
          @(negedge clk); av_write = 1'b1; av_address = 5'(w); av_writedata = b[511 - 32*w -: 32];
        end
        @(negedge clk); av_address = 5'd16; av_writedata = 32'd1;
        @(negedge clk); av_write = 1'b0;
        repeat (80) @(negedge clk);
        for (int w = 0; w < 8; w++) begin
          @(negedge clk); av_read = 1'b1; av_address = 5'(24 + w);
          #1 dg[255 - 32*w -: 32] = av_readdata;
        end
        @(negedge clk); av_read = 1'b0;
        check(dg == sha256_ref(b), "SHA-256 peripheral digest");
        n_sha_av++;
      end
      // ---- EVAL + UNMASK
      begin
        yv = g.lab(g.in_l0[N_X], g.in_bit[N_X]);
        run(g.prog_base, addr_t'(g.prog.size()), g.out_base, 1'b1, yv);
      end
    join

    for (int j = 0; j < n_out; j++) begin
      check(got_fail.exists(j) && !got_fail[j], $sformatf("output %0d valid", j));
      check(got_bit.exists(j) && got_bit[j] == g.out_bit[j], $sformatf("output %0d value", j));
      host(1'b0, g.out_base + addr_t'(j), '0, q);
      check(q == g.lab(g.out_l0[j], g.out_bit[j]), $sformatf("garbled output %0d in memory", j));
    end
    check(!any_fail, "no failure on the honest run");

    // ---- tampering: re-emit the stored outputs after corrupting one
    if (n_out >= 3) begin
      tb_prog = g.out_base + addr_t'(n_out);
      for (int j = 0; j < n_out; j += 4) begin
        gv_t w = '0;
        for (int l = 0; l < 4 && j + l < n_out; l++) w[32*l +: 32] = {OP_OUT, g.out_base + addr_t'(j + l)};
        host(1'b1, tb_prog + addr_t'(j / 4), w, q);
      end
      host(1'b0, g.out_base + 2, '0, q);
      host(1'b1, g.out_base + 2, q ^ (gv_t'(1) << 77), q);
      got_bit.delete(); got_fail.delete();
      um_clear = 1'b1; @(negedge clk); um_clear = 1'b0;
      run(tb_prog, addr_t'(n_out), tb_prog + addr_t'(n_out), 1'b0, '0);
      for (int j = 0; j < n_out; j++) begin
        check(got_fail.exists(j) && got_fail[j] == (j == 2), $sformatf("tamper check of output %0d", j));
        if (j != 2) check(got_bit[j] == g.out_bit[j], $sformatf("re-emitted output %0d", j));
      end
      check(any_fail, "tampering flagged");
    end

    // ---- every mechanism happened
    for (int i = 0; i < 18; i++) check(n_op[i] > 0, $sformatf("instruction %s executed", opcode_e'(i)));
    check(n_row_read > 0, "gate with garbled-table row read");
    check(n_row_zero > 0, "gate with implicit zero row");
    check(n_release == N_X, "token releases");
    check(n_refused > 0, "token refusal");
    check(n_stall > 0, "unit waited for host access");
    check(n_host_rd > 0, "host access during evaluation");
    check(n_res0 > 0 && n_res1 > 0, "outputs decoded to 0 and 1");
    check(n_resfail > 0, "output rejected");
    check(n_sha_av > 0, "peripheral hash");
    $display("mechanisms: rows read %0d, zero rows %0d, releases %0d, refusals %0d, stall cycles %0d, out0 %0d, out1 %0d, rejected %0d",
             n_row_read, n_row_zero, n_release, n_refused, n_stall, n_res0, n_res1, n_resfail);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
