// stt_cache: L1 cache built from reduced-retention STTRAM, with the 2-bit
// per-block retention monitor counter that keeps data from being lost.
//
// Organisation (the design's numbers): 16 KB, 4-way set associative, 64-byte
// blocks, i.e. 64 sets of 4 blocks. Reduced-retention cells hold a block only
// for a limited time after it was written (75 us for the data cache and 10 ms for
// the instruction cache in the design). Each block therefore carries a 2-bit
// monitor counter. It is cleared when the block is filled or written and counts
// up, saturating at 3, on every retention tick (one tick per quarter of the
// retention time, from retention_timer). A counter at 3 means the retention time
// is about to elapse: a scanner that visits one block per idle cycle then writes
// the block back to the next level if it is dirty and invalidates it. A later
// access simply misses and refetches the block.
//
// This design's choices, where the design gives only the function: write-back,
// write-allocate; round-robin replacement per set, preferring an invalid way;
// word (32-bit) accesses only; no pipelining: one request at a time, a hit
// taking the request cycle and the lookup cycle that acks it. The scanner takes priority over a new
// request when the block under it is due, so a busy core cannot starve it; it
// visits all 256 blocks in far less than a quarter of the retention time.
//
// Interfaces: core side is the eba_pkg word bus (req held until a one-cycle ack;
// a hit is acked in the cycle after it is taken). Next-level side moves whole
// blocks: mem_req with mem_we/mem_addr (block aligned)/mem_wdata held until a
// one-cycle mem_ack, with mem_rdata valid in that cycle. The pulses hit, miss,
// ret_wb (retention write-back) and ret_inv (retention invalidate of a clean
// block) report the mechanisms.
module stt_cache
  import eba_pkg::*;
#(
  parameter int unsigned SIZE_BYTES  = 16384,
  parameter int unsigned WAYS        = 4,
  parameter int unsigned BLOCK_BYTES = 64
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       ret_tick,
  // core side
  input  bus_req_t                   cpu_req,
  output bus_rsp_t                   cpu_rsp,
  // next level
  output logic                       mem_req,
  output logic                       mem_we,
  output logic [AW-1:0]              mem_addr,
  output logic [BLOCK_BYTES*8-1:0]   mem_wdata,
  input  logic                       mem_ack,
  input  logic [BLOCK_BYTES*8-1:0]   mem_rdata,
  // mechanism pulses
  output logic                       hit,
  output logic                       miss,
  output logic                       ret_wb,
  output logic                       ret_inv
);

  localparam int unsigned SETS  = SIZE_BYTES / (WAYS * BLOCK_BYTES);
  localparam int unsigned LINES = SETS * WAYS;
  localparam int unsigned OW    = $clog2(BLOCK_BYTES);      // byte offset bits
  localparam int unsigned SW    = $clog2(SETS);             // set index bits
  localparam int unsigned WYW   = $clog2(WAYS);
  localparam int unsigned LW    = $clog2(LINES);
  localparam int unsigned TW    = AW - SW - OW;
  localparam int unsigned BB    = BLOCK_BYTES * 8;

  typedef enum logic [2:0] {C_IDLE, C_LOOKUP, C_WB, C_FILL, C_RWB} cstate_e;

  cstate_e          st_q;
  logic [BB-1:0]    data_q  [LINES];
  logic [TW-1:0]    tag_q   [LINES];
  logic [LINES-1:0] valid_q, dirty_q;
  logic [1:0]       rcnt_q  [LINES];
  logic [WYW-1:0]   rr_q    [SETS];
  logic [LW-1:0]    scan_q;
  logic [LW-1:0]    victim_q;
  logic             retry_q;    // lookup after a refill, not a first lookup

  // Address fields of the request under service (held stable by the master).
  logic [SW-1:0]     set_idx;
  logic [TW-1:0]     tag_in;
  logic [OW-3:0]     word_idx;
  assign set_idx  = cpu_req.addr[OW +: SW];
  assign tag_in   = cpu_req.addr[AW-1 -: TW];
  assign word_idx = cpu_req.addr[OW-1:2];

  // Tag compare over the ways of the set.
  logic           hit_c;
  logic [WYW-1:0] hit_way;
  logic           inv_found;
  logic [WYW-1:0] inv_way;
  always_comb begin
    hit_c     = 1'b0;
    hit_way   = '0;
    inv_found = 1'b0;
    inv_way   = '0;
    for (int w = 0; w < WAYS; w++) begin
      if (valid_q[{set_idx, WYW'(w)}] && tag_q[{set_idx, WYW'(w)}] == tag_in) begin
        hit_c   = 1'b1;
        hit_way = WYW'(w);
      end
      if (!valid_q[{set_idx, WYW'(w)}] && !inv_found) begin
        inv_found = 1'b1;
        inv_way   = WYW'(w);
      end
    end
  end

  logic [LW-1:0] hit_line, new_victim;
  assign hit_line   = {set_idx, hit_way};
  assign new_victim = {set_idx, inv_found ? inv_way : rr_q[set_idx]};

  logic scan_due;
  assign scan_due = valid_q[scan_q] && (rcnt_q[scan_q] == 2'd3);

  logic do_hit, do_write, do_fill, do_rwb_done, do_rinv, do_wb_done;
  assign do_hit      = (st_q == C_LOOKUP) && hit_c;
  assign do_write    = do_hit && cpu_req.we;
  assign do_fill     = (st_q == C_FILL) && mem_ack;
  assign do_wb_done  = (st_q == C_WB) && mem_ack;
  assign do_rwb_done = (st_q == C_RWB) && mem_ack;
  assign do_rinv     = (st_q == C_IDLE) && scan_due && !dirty_q[scan_q];

  // Controller.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q     <= C_IDLE;
      scan_q   <= '0;
      victim_q <= '0;
      retry_q  <= 1'b0;
    end else begin
      if (st_q == C_IDLE)                retry_q <= 1'b0;
      if (st_q == C_FILL && mem_ack)     retry_q <= 1'b1;
      unique case (st_q)
        C_IDLE: begin
          if (scan_due && dirty_q[scan_q]) begin
            st_q <= C_RWB;
          end else begin
            scan_q <= scan_q + 1'b1;
            if (cpu_req.req && !scan_due) st_q <= C_LOOKUP;
          end
        end
        C_LOOKUP: begin
          if (hit_c) st_q <= C_IDLE;
          else begin
            victim_q <= new_victim;
            st_q     <= (valid_q[new_victim] && dirty_q[new_victim]) ? C_WB : C_FILL;
          end
        end
        C_WB:   if (mem_ack) st_q <= C_FILL;
        C_FILL: if (mem_ack) st_q <= C_LOOKUP;
        C_RWB:  if (mem_ack) begin st_q <= C_IDLE; scan_q <= scan_q + 1'b1; end
        default: st_q <= C_IDLE;
      endcase
    end
  end

  // Block state: valid, dirty, monitor counters, replacement pointers.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q <= '0;
      dirty_q <= '0;
      for (int l = 0; l < LINES; l++) rcnt_q[l] <= 2'd0;
      for (int s = 0; s < SETS; s++)  rr_q[s]   <= '0;
    end else begin
      if (ret_tick)
        for (int l = 0; l < LINES; l++)
          if (valid_q[l] && rcnt_q[l] != 2'd3) rcnt_q[l] <= rcnt_q[l] + 2'd1;
      if (do_write) begin
        dirty_q[hit_line] <= 1'b1;
        rcnt_q[hit_line]  <= 2'd0;
      end
      if (do_wb_done) begin
        valid_q[victim_q] <= 1'b0;
        dirty_q[victim_q] <= 1'b0;
      end
      if (do_fill) begin
        valid_q[victim_q] <= 1'b1;
        dirty_q[victim_q] <= 1'b0;
        rcnt_q[victim_q]  <= 2'd0;
        rr_q[victim_q[LW-1 -: SW]] <= victim_q[WYW-1:0] + 1'b1;
      end
      if (do_rwb_done || do_rinv) begin
        valid_q[scan_q] <= 1'b0;
        dirty_q[scan_q] <= 1'b0;
      end
    end
  end

  // Data and tag arrays (not reset).
  always_ff @(posedge clk) begin
    if (do_write) data_q[hit_line][word_idx*32 +: 32] <= cpu_req.wdata;
    if (do_fill) begin
      data_q[victim_q] <= mem_rdata;
      tag_q[victim_q]  <= tag_in;
    end
  end

  // Core side response.
  assign cpu_rsp.ack   = do_hit;
  assign cpu_rsp.rdata = data_q[hit_line][word_idx*32 +: 32];

  // Next-level side.
  always_comb begin
    mem_req   = 1'b0;
    mem_we    = 1'b0;
    mem_addr  = '0;
    mem_wdata = data_q[victim_q];
    unique case (st_q)
      C_WB: begin
        mem_req  = 1'b1;
        mem_we   = 1'b1;
        mem_addr = {tag_q[victim_q], victim_q[LW-1 -: SW], OW'(0)};
      end
      C_FILL: begin
        mem_req  = 1'b1;
        mem_addr = {tag_in, set_idx, OW'(0)};
      end
      C_RWB: begin
        mem_req   = 1'b1;
        mem_we    = 1'b1;
        mem_addr  = {tag_q[scan_q], scan_q[LW-1 -: SW], OW'(0)};
        mem_wdata = data_q[scan_q];
      end
      default: ;
    endcase
  end

  assign hit     = do_hit && !retry_q;
  assign miss    = (st_q == C_LOOKUP) && !hit_c;
  assign ret_wb  = do_rwb_done;
  assign ret_inv = do_rinv;

endmodule
