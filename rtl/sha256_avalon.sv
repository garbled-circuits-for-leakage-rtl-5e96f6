// sha256_avalon: the SHA-256 unit as a memory-mapped peripheral for the
// processor of the system-on-a-programmable-chip variant.
//
// In that variant the processor runs the evaluation in software and hands
// each gate's hash to this peripheral over the Avalon bus; the peripheral
// hashes one 512-bit message block in 66 cycles (sha256_core). The register
// map is this design's choice:
//   word 0..15  write: message block, word 0 is the first 32 bits
//   word 16     write: bit 0 = 1 starts the hash
//   word 17     read:  bit 0 busy, bit 1 digest valid (cleared by start)
//   word 24..31 read:  digest words H0..H7
// Reads return data in the same cycle (read latency 0); there is no wait
// state. Message words read back at 0..15.
module sha256_avalon (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [4:0]  av_address,
  input  logic        av_write,
  input  logic [31:0] av_writedata,
  input  logic        av_read,
  output logic [31:0] av_readdata
);

  logic [31:0]  msg [16];
  logic         start, busy, done, valid;
  logic [255:0] digest;
  logic [511:0] block;

  always_comb begin
    for (int i = 0; i < 16; i++) block[511 - 32*i -: 32] = msg[i];
  end

  sha256_core u_sha (
    .clk, .rst_n, .start, .block, .busy, .done, .digest
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 16; i++) msg[i] <= '0;
      start <= 1'b0;
      valid <= 1'b0;
    end else begin
      start <= 1'b0;
      if (done) valid <= 1'b1;
      if (av_write) begin
        if (av_address < 5'd16) msg[av_address[3:0]] <= av_writedata;
        else if (av_address == 5'd16 && av_writedata[0] && !busy) begin
          start <= 1'b1;
          valid <= 1'b0;
        end
      end
    end
  end

  always_comb begin
    av_readdata = '0;
    if (av_read) begin
      if (av_address < 5'd16)       av_readdata = msg[av_address[3:0]];
      else if (av_address == 5'd17) av_readdata = {30'b0, valid, busy | start};
      else if (av_address >= 5'd24) av_readdata = digest[255 - 32*int'(av_address[2:0]) -: 32];
    end
  end

endmodule
