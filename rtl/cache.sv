// cache: parameterized set-associative, write-back, write-allocate cache with
// a single-cycle hit, used for both L1 caches.
//
// WAYS and SETS must be powers of two and WAYS >= 2 (as the document sets
// out). Lines are 256 bits (32 bytes) and not a parameter. Address split:
// [4:0] byte offset, [4+log2(SETS):5] set index, the rest tag.
//
// CPU side (word interface): hold addr/read/write/wmask/wdata until resp.
// On a hit resp is asserted combinationally in the same cycle, with rdata
// (the addressed 32-bit word) for a read; a write merges wdata under the
// byte mask and marks the line dirty at the clock edge. On a miss the cache
// picks a victim (an invalid way if any, else the tree pseudo-LRU choice),
// writes it back over the line bus if it is dirty (S_WB), reads the missing
// line (S_FILL) and returns to S_IDLE, where the request then hits. A miss
// therefore costs one line read, plus one line write for a dirty victim,
// plus one cycle.
// Memory side: rv_pkg line_req_t/line_rsp_t; the request is held until resp.
// stat_hit / stat_miss pulse once per hit cycle / per miss.
// Write-back with dirty bits and the pseudo-LRU policy are this design's
// choices; the document gives the parameters and the single-cycle hit.
module cache
  import rv_pkg::*;
#(
  parameter int unsigned WAYS = 2,
  parameter int unsigned SETS = 8
) (
  input  logic        clk,
  input  logic        rst,
  // CPU side
  input  logic [31:0] addr,
  input  logic        read,
  input  logic        write,
  input  logic [3:0]  wmask,
  input  logic [31:0] wdata,
  output logic [31:0] rdata,
  output logic        resp,
  // line bus side
  output line_req_t   mreq,
  input  line_rsp_t   mrsp,
  // statistics
  output logic        stat_hit,
  output logic        stat_miss
);
  localparam int unsigned IW = (SETS > 1) ? $clog2(SETS) : 1;
  localparam int unsigned WW = $clog2(WAYS);
  localparam int unsigned TW = 32 - OFFSET_BITS - $clog2(SETS);

  initial begin
    assert (WAYS >= 2 && (WAYS & (WAYS - 1)) == 0) else $error("WAYS must be a power of two >= 2");
    assert ((SETS & (SETS - 1)) == 0) else $error("SETS must be a power of two");
  end

  typedef enum logic [1:0] { S_IDLE, S_WB, S_FILL } state_e;
  state_e state;

  logic [LINE_BITS-1:0] data  [SETS][WAYS];
  logic [TW-1:0]        tags  [SETS][WAYS];
  logic [WAYS-1:0]      valid [SETS];
  logic [WAYS-1:0]      dirty [SETS];
  logic [WAYS-1:0]      plru  [SETS];   // tree bits at heap positions 1..WAYS-1

  logic [IW-1:0]  idx;
  logic [TW-1:0]  tag;
  logic [2:0]     word;
  logic           req;
  logic           hit;
  logic [WW-1:0]  hit_way, victim, victim_q;
  logic           have_invalid;
  logic [WW-1:0]  invalid_way, plru_way;
  logic [LINE_BITS-1:0] hit_line;

  assign idx  = (SETS > 1) ? IW'(addr[OFFSET_BITS +: IW]) : '0;
  assign tag  = addr[31 -: TW];
  assign word = addr[4:2];
  assign req  = read || write;

  always_comb begin
    hit     = 1'b0;
    hit_way = '0;
    for (int w = 0; w < WAYS; w++) begin
      if (valid[idx][w] && tags[idx][w] == tag) begin
        hit     = 1'b1;
        hit_way = WW'(w);
      end
    end
  end

  // victim selection: first invalid way, else follow the PLRU tree
  always_comb begin
    int unsigned n;
    have_invalid = 1'b0;
    invalid_way  = '0;
    for (int w = WAYS - 1; w >= 0; w--) begin
      if (!valid[idx][w]) begin
        have_invalid = 1'b1;
        invalid_way  = WW'(w);
      end
    end
    n = 1;
    plru_way = '0;
    for (int l = 0; l < WW; l++) begin
      plru_way[WW-1-l] = plru[idx][n];
      n = 2 * n + (plru[idx][n] ? 1 : 0);
    end
    victim = have_invalid ? invalid_way : plru_way;
  end

  function automatic logic [WAYS-1:0] plru_touch(logic [WAYS-1:0] bits, logic [WW-1:0] way);
    int unsigned n = 1;
    for (int l = 0; l < WW; l++) begin
      bits[n] = ~way[WW-1-l];      // point away from the way just used
      n = 2 * n + (way[WW-1-l] ? 1 : 0);
    end
    return bits;
  endfunction

  assign hit_line = data[idx][hit_way];
  assign rdata    = hit_line[word*32 +: 32];
  assign resp     = (state == S_IDLE) && req && hit;
  assign stat_hit = resp;

  // line bus request
  always_comb begin
    mreq = '0;
    unique case (state)
      S_WB: begin
        mreq.write = 1'b1;
        mreq.addr  = {tags[idx][victim_q], idx, {OFFSET_BITS{1'b0}}};
        mreq.wdata = data[idx][victim_q];
      end
      S_FILL: begin
        mreq.read = 1'b1;
        mreq.addr = {addr[31:OFFSET_BITS], {OFFSET_BITS{1'b0}}};
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= S_IDLE;
      victim_q  <= '0;
      stat_miss <= 1'b0;
      for (int s = 0; s < SETS; s++) begin
        valid[s] <= '0;
        dirty[s] <= '0;
        plru[s]  <= '0;
      end
    end else begin
      stat_miss <= 1'b0;
      unique case (state)
        S_IDLE: if (req) begin
          if (hit) begin
            plru[idx] <= plru_touch(plru[idx], hit_way);
            if (write) begin
              for (int k = 0; k < 4; k++)
                if (wmask[k]) data[idx][hit_way][word*32 + k*8 +: 8] <= wdata[k*8 +: 8];
              dirty[idx][hit_way] <= 1'b1;
            end
          end else begin
            victim_q  <= victim;
            stat_miss <= 1'b1;
            state     <= (valid[idx][victim] && dirty[idx][victim]) ? S_WB : S_FILL;
          end
        end
        S_WB: if (mrsp.resp) state <= S_FILL;
        S_FILL: if (mrsp.resp) begin
          data[idx][victim_q]  <= mrsp.rdata;
          tags[idx][victim_q]  <= tag;
          valid[idx][victim_q] <= 1'b1;
          dirty[idx][victim_q] <= 1'b0;
          state                <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
