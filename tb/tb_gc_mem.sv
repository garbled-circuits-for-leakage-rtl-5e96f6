// tb_gc_mem: random reads and writes from both ports of a small memory,
// compared with a model; checks the read and write latencies, that the
// host port wins when both ask, and that u_stall shows the unit waiting.
module tb_gc_mem;
  import gc_pkg::*;
  import gc_tb_pkg::*;

  localparam int unsigned DEPTH = 64, RD = 9, WR = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  mem_req_t u_req = '0, h_req = '0;
  mem_rsp_t u_rsp, h_rsp;
  logic u_stall;
  gv_t model [DEPTH];
  bit  known [DEPTH];
  int checks = 0, failures = 0, stall_cycles = 0;

  always #5 clk = ~clk;
  always @(posedge clk) if (u_stall) stall_cycles++;

  gc_mem #(.DEPTH(DEPTH), .RD_LAT(RD), .WR_LAT(WR)) dut (.clk, .rst_n, .u_req, .u_rsp, .h_req, .h_rsp, .u_stall);

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // One access on the chosen port; returns the cycles from request to ack.
  task automatic access(input bit host, input bit we, input addr_t a, input gv_t d, output gv_t q, output int cyc);
    mem_req_t r;
    r = '{req: 1'b1, we: we, addr: a, wdata: d};
    @(negedge clk);
    if (host) h_req = r; else u_req = r;
    cyc = 0;
    do begin @(negedge clk); cyc++; end while (!(host ? h_rsp.ack : u_rsp.ack));
    q = host ? h_rsp.rdata : u_rsp.rdata;
    @(negedge clk);   // a clocked requester drops req after the edge that sees ack
    if (host) h_req.req = 1'b0; else u_req.req = 1'b0;
  endtask

  initial begin
    gv_t q, d;
    int cyc;
    addr_t a;
    bit host, we;
    bit h_first;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < DEPTH; i++) known[i] = 0;
    for (int i = 0; i < 200; i++) begin
      host = 1'($urandom); a = addr_t'($urandom_range(DEPTH - 1));
      we = (i < 40) || !known[a] || $urandom_range(1) == 1;
      d = rand_gv();
      access(host, we, a, d, q, cyc);
      check(cyc == (we ? WR : RD), $sformatf("latency %0d for %s", cyc, we ? "write" : "read"));
      if (we) begin model[a] = d; known[a] = 1; end
      else check(q == model[a], "read data");
    end
    // Both ports at once: the host goes first, the unit waits.
    for (int i = 0; i < 5; i++) begin
      @(negedge clk);
      u_req = '{req: 1'b1, we: 1'b0, addr: addr_t'(i), wdata: '0};
      h_req = '{req: 1'b1, we: 1'b1, addr: addr_t'(i), wdata: rand_gv()};
      d = h_req.wdata;
      h_first = 0;
      fork
        begin do @(negedge clk); while (!h_rsp.ack); h_first = !u_rsp.ack; @(negedge clk); h_req.req = 1'b0; end
        begin do @(negedge clk); while (!u_rsp.ack); q = u_rsp.rdata; @(negedge clk); u_req.req = 1'b0; end
      join
      check(h_first, "host served first");
      check(q == d, "unit reads the host's write");
      model[i] = d; known[i] = 1;
    end
    check(stall_cycles > 0, "unit stall seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
