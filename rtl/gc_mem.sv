// gc_mem: the memory of the evaluation unit, in 128-bit words, shared
// between the unit (port u) and the host I/O side (port h).
//
// It holds the packed program, the garbled tables, the garbled inputs (at
// the lowest addresses), intermediate garbled values and the garbled outputs.
// The design keeps all of these in one slow external memory; this block
// stands in for it with an on-chip array and a fixed access latency, so that
// every access costs what an access to that memory costs on average. The
// default latencies (85 cycles to read, 24 to write, from request to ack)
// are chosen so that LOAD (87 cycles) and STORE (27 cycles) instructions
// take about as long as the averages measured for the stand-alone unit; the real memory's timing
// varies and is not modelled. The default size, 2^19 words, is the 8 MB
// of the design's memory.
//
// Interface: two gc_pkg::mem_req_t / mem_rsp_t ports. A request is held
// until ack; ack is high for one cycle, with rdata for a read. One access
// is served at a time; when both ports wait, the host port goes first.
// Addresses wrap modulo DEPTH.
module gc_mem
  import gc_pkg::*;
#(
  parameter int unsigned DEPTH  = 2**19,
  parameter int unsigned RD_LAT = 85,
  parameter int unsigned WR_LAT = 24
) (
  input  logic     clk,
  input  logic     rst_n,
  input  mem_req_t u_req,
  output mem_rsp_t u_rsp,
  input  mem_req_t h_req,
  output mem_rsp_t h_rsp,
  output logic     u_stall    // unit request waiting because the host port was served
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [GV_W-1:0] mem [DEPTH];

  typedef enum logic {M_IDLE, M_BUSY} mstate_e;
  mstate_e     state;
  logic [15:0] cnt;
  logic        owner_h;          // 1: current access belongs to the host port
  logic        ack_u, ack_h;
  gv_t         rdata_q;
  mem_req_t    cur;

  assign cur   = owner_h ? h_req : u_req;
  assign u_rsp = '{ack: ack_u, rdata: rdata_q};
  assign h_rsp = '{ack: ack_h, rdata: rdata_q};
  assign u_stall = (state == M_BUSY) && owner_h && u_req.req;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= M_IDLE;
      cnt     <= '0;
      owner_h <= 1'b0;
      ack_u   <= 1'b0;
      ack_h   <= 1'b0;
      rdata_q <= '0;
    end else begin
      ack_u   <= 1'b0;
      ack_h   <= 1'b0;
      unique case (state)
        M_IDLE: begin
          // A requester sees ack one cycle before it can drop req.
          if (h_req.req && !ack_h) begin
            owner_h <= 1'b1;
            state   <= M_BUSY;
            cnt     <= 16'((h_req.we ? WR_LAT : RD_LAT) - 2);
          end else if (u_req.req && !ack_u) begin
            owner_h <= 1'b0;
            state   <= M_BUSY;
            cnt     <= 16'((u_req.we ? WR_LAT : RD_LAT) - 2);
          end
        end
        M_BUSY: begin
          if (cnt == '0) begin
            if (cur.we) mem[cur.addr[AW-1:0]] <= cur.wdata;
            else        rdata_q <= mem[cur.addr[AW-1:0]];
            if (owner_h) ack_h <= 1'b1;
            else         ack_u <= 1'b1;
            state <= M_IDLE;
          end else begin
            cnt <= cnt - 16'd1;
          end
        end
        default: state <= M_IDLE;
      endcase
    end
  end

  // Handshake rule: a request stays up and unchanged until its ack.
  a_u_hold: assert property (@(posedge clk) disable iff (!rst_n)
    (u_req.req && !u_rsp.ack) |=> (u_req.req && $stable(u_req.addr) && $stable(u_req.we)));
  a_h_hold: assert property (@(posedge clk) disable iff (!rst_n)
    (h_req.req && !h_rsp.ack) |=> (h_req.req && $stable(h_req.addr) && $stable(h_req.we)));

  initial begin
    assert (RD_LAT >= 2 && WR_LAT >= 2) else $error("gc_mem: latencies must be at least 2");
  end

endmodule
