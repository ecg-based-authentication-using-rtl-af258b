// tb_seg_buffer: self-checking testbench of the segmentation buffer.
// Random word stores and loads over the whole 4 KB are checked against a shadow
// array; a load must be answered one cycle and a store three cycles after it is
// presented (0.250 ns and 0.988 ns at 2.1 GHz), and the full address range must
// hold distinct data (no aliasing).
module tb_seg_buffer;
  import eba_pkg::*;

  localparam int unsigned WORDS = 1024;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  bus_req_t breq;
  bus_rsp_t brsp;
  seg_buffer dut (.clk, .rst_n, .bus_req(breq), .bus_rsp(brsp));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [31:0] shadow [WORDS];

  task automatic access(input bit we, input int idx, input logic [31:0] wd, output logic [31:0] rd);
    int lat;
    @(negedge clk);
    breq.req = 1; breq.we = we; breq.addr = 32'h1000_0000 + 32'(idx * 4); breq.wdata = wd;
    lat = 0;
    do begin @(posedge clk); #1 lat++; end while (!brsp.ack);
    rd = brsp.rdata;
    check(lat == (we ? 3 : 1), $sformatf("%s answered after %0d cycles", we ? "store" : "load", lat));
    @(negedge clk);
    breq = '0;
  endtask

  initial begin
    logic [31:0] rd;
    breq = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < WORDS; i++) begin
      shadow[i] = $urandom;
      access(1, i, shadow[i], rd);
    end
    for (int i = 0; i < WORDS; i++) begin
      access(0, i, 0, rd);
      check(rd == shadow[i], $sformatf("word %0d read %h expected %h", i, rd, shadow[i]));
    end
    for (int k = 0; k < 2000; k++) begin
      int i;
      i = $urandom_range(WORDS - 1);
      if ($urandom_range(1)) begin
        shadow[i] = $urandom;
        access(1, i, shadow[i], rd);
      end else begin
        access(0, i, 0, rd);
        check(rd == shadow[i], $sformatf("word %0d read %h expected %h", i, rd, shadow[i]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
