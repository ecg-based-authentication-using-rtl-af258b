// seg_buffer: the dedicated segmentation buffer, a 4 KB scratch memory that the
// core reaches with ordinary loads and stores, so that the data of the
// segmentation step's buffer-shift loop stays next to the core instead of
// travelling through the cache hierarchy.
//
// The 4 KB size is the design's, and so are the access times it reports for the
// STTRAM array, 0.250 ns to read and 0.988 ns to write: at the 2.1 GHz base
// clock (476 ps) a read fits in one cycle and a write needs three, which are the
// defaults of RD_CYCLES and WR_CYCLES. The organisation (1024 words of 32 bits,
// one port, word-aligned byte addresses) is this design's choice.
// Interface: the word bus of eba_pkg. A request is answered with a one-cycle ack
// RD_CYCLES (load) or WR_CYCLES (store) cycles after the cycle it is first seen;
// read data is valid with ack and the store takes effect with it. Address bits
// above the buffer range are ignored (the enclosing address decoder selects the
// buffer). The 100 us retention of the STTRAM cells is a physical property of
// the array and is not modelled: this array keeps its contents.
module seg_buffer
  import eba_pkg::*;
#(
  parameter int unsigned SIZE_BYTES = 4096,
  parameter int unsigned RD_CYCLES  = 1,
  parameter int unsigned WR_CYCLES  = 3
) (
  input  logic     clk,
  input  logic     rst_n,
  input  bus_req_t bus_req,
  output bus_rsp_t bus_rsp
);

  localparam int unsigned WORDS = SIZE_BYTES / 4;
  localparam int unsigned IW    = $clog2(WORDS);

  logic [DW-1:0] mem [WORDS];
  logic          ack_q;
  logic [DW-1:0] rdata_q;
  logic [IW-1:0] idx;
  logic [1:0]    wait_q;
  logic          fire;

  assign idx  = bus_req.addr[IW+1:2];
  // the access completes once it has been seen for its number of cycles
  assign fire = bus_req.req && !ack_q &&
                (32'(wait_q) + 1 >= (bus_req.we ? WR_CYCLES : RD_CYCLES));

  // Data array: no reset, written only by stores.
  always_ff @(posedge clk) begin
    if (fire) begin
      if (bus_req.we) mem[idx] <= bus_req.wdata;
      else            rdata_q  <= mem[idx];
    end
  end

  // A request answered in this cycle is not taken again (the master moves on
  // in the cycle after ack).
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ack_q  <= 1'b0;
      wait_q <= '0;
    end else begin
      ack_q <= fire;
      if (fire || ack_q || !bus_req.req) wait_q <= '0;
      else                               wait_q <= wait_q + 1'b1;
    end
  end

  assign bus_rsp.ack   = ack_q;
  assign bus_rsp.rdata = rdata_q;

endmodule
