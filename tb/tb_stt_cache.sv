// tb_stt_cache: self-checking testbench of the reduced-retention cache.
// Next level: a block memory model with a fixed latency whose untouched blocks
// hold a pattern derived from the address. Checks:
//  1. random loads and stores over a region four times the cache size return
//     the data of a word-level shadow model (hits, misses, dirty evictions);
//  2. a hit is answered in one cycle;
//  3. after three retention ticks every block is due: dirty blocks are written
//     back (the next level then equals the shadow) and all blocks are dropped,
//     so the next access to each of them misses;
//  4. a store clears the block's monitor counter: a block rewritten between
//     ticks survives four ticks, a block written only before them does not.
module tb_stt_cache;
  import eba_pkg::*;

  localparam int unsigned BB  = 512;
  localparam int unsigned LAT = 3;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic          ret_tick;
  bus_req_t      creq;
  bus_rsp_t      crsp;
  logic          mem_req, mem_we, mem_ack;
  logic [31:0]   mem_addr;
  logic [BB-1:0] mem_wdata, mem_rdata;
  logic          hit, miss, ret_wb, ret_inv;

  stt_cache dut (.clk, .rst_n, .ret_tick, .cpu_req(creq), .cpu_rsp(crsp),
                 .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_ack, .mem_rdata,
                 .hit, .miss, .ret_wb, .ret_inv);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [31:0] pattern(input logic [31:0] waddr);
    return waddr ^ 32'hA5C3_0000;
  endfunction

  // next-level memory model
  logic [BB-1:0] bmem [int unsigned];
  int            wcnt;
  logic          mack;
  function automatic logic [BB-1:0] bget(input logic [31:0] a);
    logic [BB-1:0] b;
    if (bmem.exists(a)) return bmem[a];
    for (int w = 0; w < 16; w++) b[w*32 +: 32] = pattern(a + 32'(4 * w));
    return b;
  endfunction
  always_ff @(posedge clk) begin
    if (!rst_n) begin wcnt <= 0; mack <= 1'b0; end
    else begin
      mack <= 1'b0;
      if (mem_req && !mack) begin
        if (wcnt == LAT - 1) begin
          wcnt <= 0;
          mack <= 1'b1;
          if (mem_we) bmem[mem_addr] = mem_wdata;
          else        mem_rdata <= bget(mem_addr);
        end else wcnt <= wcnt + 1;
      end
    end
  end
  assign mem_ack = mack;

  // mechanism counters (pulses are stable in the middle of the cycle)
  int n_hit, n_miss, n_wb, n_inv;
  always @(negedge clk) if (rst_n) begin
    n_hit  += int'(hit);
    n_miss += int'(miss);
    n_wb   += int'(ret_wb);
    n_inv  += int'(ret_inv);
  end

  logic [31:0] shadow [int unsigned];
  function automatic logic [31:0] sget(input logic [31:0] a);
    return shadow.exists(a) ? shadow[a] : pattern(a);
  endfunction

  task automatic access(input bit we, input logic [31:0] a, input logic [31:0] wd,
                        output logic [31:0] rd, output int lat);
    @(negedge clk);
    creq.req = 1; creq.we = we; creq.addr = a; creq.wdata = wd;
    lat = 0;
    do begin @(negedge clk); lat++; end while (!crsp.ack);
    rd = crsp.rdata;
    @(posedge clk);
    #1 creq = '0;
    if (we) shadow[a] = wd;
  endtask

  task automatic load_check(input logic [31:0] a);
    logic [31:0] rd;
    int lat;
    access(0, a, 0, rd, lat);
    check(rd == sget(a), $sformatf("load %h = %h, expected %h", a, rd, sget(a)));
  endtask

  task automatic store(input logic [31:0] a, input logic [31:0] d);
    logic [31:0] rd;
    int lat;
    access(1, a, d, rd, lat);
  endtask

  task automatic tick();
    @(negedge clk) ret_tick = 1;
    @(negedge clk) ret_tick = 0;
  endtask

  initial begin
    logic [31:0] rd, a;
    int lat, h0, m0, wb0, inv0;
    creq = '0; ret_tick = 0;
    n_hit = 0; n_miss = 0; n_wb = 0; n_inv = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // 1. random traffic over 64 KB
    for (int k = 0; k < 4000; k++) begin
      a = 32'h0040_0000 + 32'($urandom_range(16383) * 4);
      if ($urandom_range(2) == 0) store(a, $urandom);
      else load_check(a);
    end
    $display("random: hits=%0d misses=%0d", n_hit, n_miss);
    check(n_hit > 500 && n_miss > 500, "random traffic both hits and misses");
    check(n_hit + n_miss == 4000, "one hit or miss per access");
    check(n_wb == 0 && n_inv == 0, "no retention activity without ticks");

    // 2. hit latency
    load_check(32'h0050_0000);
    access(0, 32'h0050_0004, 0, rd, lat);
    check(lat == 1, $sformatf("hit answered after %0d cycles", lat));
    check(rd == sget(32'h0050_0004), "hit data");

    // 3. three ticks: everything due, dirty blocks written back
    for (int i = 0; i < 32; i++) store(32'h0060_0000 + 32'(i * 64), 32'(i) * 32'h0101_0101);
    for (int i = 0; i < 32; i++) load_check(32'h0070_0000 + 32'(i * 64));
    wb0 = n_wb; inv0 = n_inv;
    tick(); tick(); tick();
    repeat (800) @(negedge clk);
    $display("retention: write-backs=%0d invalidations=%0d", n_wb - wb0, n_inv - inv0);
    check(n_wb - wb0 >= 32, "dirty blocks written back on retention");
    check(n_inv - inv0 >= 32, "clean blocks dropped on retention");
    check(n_wb - wb0 + n_inv - inv0 == 256, "every block of a full cache handled once");
    foreach (shadow[x]) begin
      logic [BB-1:0] b;
      b = bget({x[31:6], 6'd0});
      check(b[x[5:2]*32 +: 32] == shadow[x], $sformatf("next level holds %h for %h", shadow[x], x));
    end
    m0 = n_miss;
    for (int i = 0; i < 32; i++) load_check(32'h0060_0000 + 32'(i * 64));
    check(n_miss - m0 == 32, "dropped blocks miss afterwards");

    // 4. a store refreshes a block
    store(32'h0080_0000, 32'h1111_1111);   // refreshed below
    store(32'h0080_1000, 32'h2222_2222);   // not refreshed
    tick(); tick();
    store(32'h0080_0000, 32'h3333_3333);
    tick(); tick();
    repeat (800) @(negedge clk);
    h0 = n_hit; m0 = n_miss;
    load_check(32'h0080_0000);
    check(n_hit - h0 == 1 && n_miss == m0, "refreshed block still cached");
    h0 = n_hit; m0 = n_miss;
    load_check(32'h0080_1000);
    check(n_miss - m0 == 1, "block past its retention refetched");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
