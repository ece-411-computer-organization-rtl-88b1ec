// arbiter: shares the one line bus to physical memory between the
// instruction and the data cache. A three-state machine (IDLE, SERVE_I,
// SERVE_D): first come, first served; when both caches ask in the same IDLE
// cycle the data cache, the later pipeline stage, wins. While serving, the
// owner's request is passed to memory and memory's response only to the
// owner; the grant ends with the response. Granting takes one cycle (IDLE
// cycle), so a request waits at least one cycle before memory sees it.
module arbiter
  import rv_pkg::*;
(
  input  logic      clk,
  input  logic      rst,
  input  line_req_t i_req,
  output line_rsp_t i_rsp,
  input  line_req_t d_req,
  output line_rsp_t d_rsp,
  output line_req_t m_req,
  input  line_rsp_t m_rsp
);
  typedef enum logic [1:0] { A_IDLE, A_SERVE_I, A_SERVE_D } state_e;
  state_e state;

  logic i_want, d_want;
  assign i_want = i_req.read || i_req.write;
  assign d_want = d_req.read || d_req.write;

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= A_IDLE;
    end else begin
      unique case (state)
        A_IDLE: begin
          if (d_want)      state <= A_SERVE_D;
          else if (i_want) state <= A_SERVE_I;
        end
        A_SERVE_I: if (m_rsp.resp) state <= A_IDLE;
        A_SERVE_D: if (m_rsp.resp) state <= A_IDLE;
        default: state <= A_IDLE;
      endcase
    end
  end

  always_comb begin
    m_req       = '0;
    i_rsp.rdata = m_rsp.rdata;
    d_rsp.rdata = m_rsp.rdata;
    i_rsp.resp  = 1'b0;
    d_rsp.resp  = 1'b0;
    unique case (state)
      A_SERVE_I: begin m_req = i_req; i_rsp.resp = m_rsp.resp; end
      A_SERVE_D: begin m_req = d_req; d_rsp.resp = m_rsp.resp; end
      default: ;
    endcase
  end
endmodule
