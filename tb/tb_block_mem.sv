// tb_block_mem: behavioural model of the next memory level (main memory) seen
// by a cache: 64-byte blocks, one request at a time, a one-cycle ack after a
// fixed latency. Blocks never written hold a pattern derived from the address
// (word at byte address a = a ^ SEED). Testbenches read and write words
// directly with get_word/put_word, e.g. to place an ECG record in memory.
module tb_block_mem #(
  parameter int unsigned LAT  = 4,
  parameter logic [31:0] SEED = 32'h5A5A_0000
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         req,
  input  logic         we,
  input  logic [31:0]  addr,
  input  logic [511:0] wdata,
  output logic         ack,
  output logic [511:0] rdata
);
  logic [511:0] mem [int unsigned];
  int           wcnt;
  int           n_reads, n_writes;

  function automatic logic [511:0] get_block(input logic [31:0] a);
    logic [511:0] b;
    if (mem.exists(a)) return mem[a];
    for (int w = 0; w < 16; w++) b[w*32 +: 32] = (a + 32'(4 * w)) ^ SEED;
    return b;
  endfunction

  function automatic logic [31:0] get_word(input logic [31:0] a);
    logic [511:0] b;
    b = get_block({a[31:6], 6'd0});
    return b[a[5:2]*32 +: 32];
  endfunction

  function automatic void put_word(input logic [31:0] a, input logic [31:0] d);
    logic [511:0] b;
    b = get_block({a[31:6], 6'd0});
    b[a[5:2]*32 +: 32] = d;
    mem[{a[31:6], 6'd0}] = b;
  endfunction

  always @(posedge clk) begin
    if (!rst_n) begin
      wcnt     <= 0;
      ack      <= 1'b0;
      n_reads  <= 0;
      n_writes <= 0;
    end else begin
      ack <= 1'b0;
      if (req && !ack) begin
        if (wcnt == int'(LAT) - 1) begin
          wcnt <= 0;
          ack  <= 1'b1;
          if (we) begin mem[addr] = wdata; n_writes <= n_writes + 1; end
          else    begin rdata <= get_block(addr); n_reads <= n_reads + 1; end
        end else wcnt <= wcnt + 1;
      end
    end
  end
endmodule
