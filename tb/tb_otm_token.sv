// tb_otm_token: loads a token, queries it, and checks that exactly the
// chosen value and the share come out once, that later queries and
// reloads are refused, and that a fresh token starts spent.
module tb_otm_token;
  import gc_pkg::*;
  import gc_tb_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, ld = 1'b0, q_valid = 1'b0, q_bit = 1'b0;
  gv_t ld_x0 = '0, ld_x1 = '0;
  logic [KEY_W-1:0] ld_share = '0;
  logic rel_valid, rel_refused, spent;
  gv_t rel_value;
  logic [KEY_W-1:0] rel_share;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  otm_token dut (.clk, .rst_n, .ld, .ld_x0, .ld_x1, .ld_share, .q_valid, .q_bit,
                 .rel_valid, .rel_value, .rel_share, .rel_refused, .spent);

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic query(input bit b, output bit got, output bit refused);
    @(negedge clk); q_valid = 1'b1; q_bit = b;
    @(negedge clk); q_valid = 1'b0;
    got = rel_valid; refused = rel_refused;
  endtask

  initial begin
    bit got, refused;
    gv_t x0, x1;
    logic [KEY_W-1:0] sh;
    for (int round = 0; round < 8; round++) begin
      rst_n = 1'b0;
      repeat (2) @(negedge clk);
      rst_n = 1'b1;
      check(spent == 1'b1, "blank token is spent");
      query(1'b0, got, refused);
      check(!got && refused, "blank token refuses");
      x0 = rand_gv(); x1 = rand_gv(); sh = {$urandom, $urandom, $urandom, $urandom};
      @(negedge clk); ld = 1'b1; ld_x0 = x0; ld_x1 = x1; ld_share = sh;
      @(negedge clk); ld = 1'b0;
      check(!spent, "loaded token is fresh");
      query(round[0], got, refused);
      check(got && !refused, "first query answered");
      check(rel_value == (round[0] ? x1 : x0), "released value is the chosen one");
      check(rel_share == sh, "released share");
      check(spent, "token spent after query");
      query(~round[0], got, refused);
      check(!got && refused, "second query refused");
      @(negedge clk); ld = 1'b1; ld_x0 = rand_gv(); ld_x1 = rand_gv();
      @(negedge clk); ld = 1'b0;
      query(~round[0], got, refused);
      check(!got && refused, "reload ignored");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
