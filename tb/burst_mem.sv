// burst_mem: behavioural model of the physical memory behind the cacheline
// adaptor (not synthesizable). A request (read or write held high) is answered
// after LATENCY idle cycles by four consecutive beats with resp = 1: read
// beats carry 64-bit words of the addressed 32-byte line, lowest first; write
// beats are sampled from wdata in the same cycles. Storage is WORDS x 64 bits,
// addressed modulo its size. `nreq` counts accepted requests.
module burst_mem #(
  parameter int unsigned WORDS   = 16384,
  parameter int unsigned LATENCY = 8
) (
  input  logic        clk,
  input  logic [31:0] addr,
  input  logic        read,
  input  logic        write,
  input  logic [63:0] wdata,
  output logic [63:0] rdata,
  output logic        resp
);
  logic [63:0] mem [WORDS];
  int unsigned wait_cnt = 0;
  int unsigned beat = 0;
  logic        active = 1'b0;
  int unsigned nreq = 0;

  function automatic int unsigned widx(logic [31:0] a, int unsigned b);
    return ((a >> 3) + b) % WORDS;
  endfunction

  always_comb begin
    resp  = active && (wait_cnt == 0);
    rdata = resp ? mem[widx({addr[31:5], 5'b0}, beat)] : 64'h0;
  end

  always @(posedge clk) begin
    if (!active) begin
      if (read || write) begin
        active   <= 1'b1;
        wait_cnt <= LATENCY;
        beat     <= 0;
        nreq     <= nreq + 1;
      end
    end else if (wait_cnt != 0) begin
      wait_cnt <= wait_cnt - 1;
    end else begin
      if (write) mem[widx({addr[31:5], 5'b0}, beat)] <= wdata;
      if (beat == 3) active <= 1'b0;
      beat <= beat + 1;
    end
  end
endmodule
