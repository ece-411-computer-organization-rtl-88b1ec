// cacheline_adaptor: converts a 256-bit cache-line transfer into the four
// 64-bit beats of the physical memory's burst interface and back.
// Line side: rv_pkg line_req_t/line_rsp_t, request held until resp; resp is a
// one-cycle pulse in S_DONE. Burst side: burst_read or burst_write is held
// high for the whole burst; memory answers each beat with burst_resp, and
// the adaptor captures burst_rdata (reads) or moves on to the next
// burst_wdata beat (writes) on each such cycle. Beat 0 is line bits [63:0].
// A read takes the memory latency + 4 beats + 2 cycles (request capture,
// response). The beat width and count are this design's choice.
module cacheline_adaptor
  import rv_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst,
  input  line_req_t             lreq,
  output line_rsp_t             lrsp,
  output logic [31:0]           burst_addr,
  output logic                  burst_read,
  output logic                  burst_write,
  output logic [BURST_BITS-1:0] burst_wdata,
  input  logic [BURST_BITS-1:0] burst_rdata,
  input  logic                  burst_resp
);
  typedef enum logic [1:0] { C_IDLE, C_READ, C_WRITE, C_DONE } state_e;
  state_e state;

  logic [LINE_BITS-1:0] buffer;
  logic [31:0]          addr_q;
  logic [1:0]           beat;

  always_ff @(posedge clk) begin
    if (rst) begin
      state  <= C_IDLE;
      beat   <= '0;
      addr_q <= '0;
      buffer <= '0;
    end else begin
      unique case (state)
        C_IDLE: begin
          beat <= '0;
          if (lreq.read) begin
            addr_q <= lreq.addr;
            state  <= C_READ;
          end else if (lreq.write) begin
            addr_q <= lreq.addr;
            buffer <= lreq.wdata;
            state  <= C_WRITE;
          end
        end
        C_READ: if (burst_resp) begin
          buffer[beat*BURST_BITS +: BURST_BITS] <= burst_rdata;
          beat <= beat + 2'd1;
          if (beat == 2'(BURST_BEATS - 1)) state <= C_DONE;
        end
        C_WRITE: if (burst_resp) begin
          beat <= beat + 2'd1;
          if (beat == 2'(BURST_BEATS - 1)) state <= C_DONE;
        end
        C_DONE: state <= C_IDLE;
        default: state <= C_IDLE;
      endcase
    end
  end

  assign burst_addr  = addr_q;
  assign burst_read  = (state == C_READ);
  assign burst_write = (state == C_WRITE);
  assign burst_wdata = buffer[beat*BURST_BITS +: BURST_BITS];
  assign lrsp.resp   = (state == C_DONE);
  assign lrsp.rdata  = buffer;
endmodule
