// tb_exec_mux: self-checking testbench of the execution-order multiplexer.
// A decode-side source sends numbered instructions; two backend models accept
// them with random back-pressure, keep them in flight for a random time and
// report idle when empty. The select input flips every few hundred cycles. The
// checks: every instruction arrives exactly once and in program order, never at
// a backend while the other still holds instructions, and at the backend
// requested by the select that was in force; the select flips only after the
// old backend drained; the out-of-order backend is powered exactly when it is in
// use or still busy.
module tb_exec_mux;
  import eba_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  exec_sel_e   sel, cur_sel;
  logic        dec_valid, dec_ready;
  logic [31:0] dec_instr;
  logic        ooo_valid, ooo_ready, ooo_idle, ooo_pwr_en;
  logic [31:0] ooo_instr;
  logic        io_valid, io_ready, io_idle;
  logic [31:0] io_instr;
  logic        switch_pulse;

  exec_mux dut (.clk, .rst_n, .sel, .dec_valid, .dec_instr, .dec_ready,
                .ooo_valid, .ooo_instr, .ooo_ready, .ooo_idle, .ooo_pwr_en,
                .io_valid, .io_instr, .io_ready, .io_idle, .cur_sel, .switch_pulse);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int ooo_fly, io_fly;              // instructions in flight per backend
  int next_send, next_expect;
  int switches, sel_changes;
  exec_sel_e sel_prev;

  assign ooo_idle = (ooo_fly == 0);
  assign io_idle  = (io_fly == 0);

  // All stimulus changes at the falling edge; one time unit later the values
  // that the next rising edge will see are captured and accounted for.
  logic        s_ooo_hs, s_io_hs, s_sw, s_dec_hs;
  logic [31:0] s_ooo_instr, s_io_instr;
  exec_sel_e   s_cur;
  always @(negedge clk) if (rst_n) begin
    // effects of the rising edge that just passed
    if (s_ooo_hs) begin
      check(s_ooo_instr == 32'(next_expect), $sformatf("OoO got %0d, expected %0d", s_ooo_instr, next_expect));
      check(io_fly == 0, "OoO dispatch while in-order stage busy");
      check(s_cur == SEL_OOO, "OoO dispatch while in-order selected");
      next_expect++;
    end
    if (s_io_hs) begin
      check(s_io_instr == 32'(next_expect), $sformatf("IO got %0d, expected %0d", s_io_instr, next_expect));
      check(ooo_fly == 0, "in-order dispatch while OoO busy");
      check(s_cur == SEL_INORDER, "in-order dispatch while OoO selected");
      next_expect++;
    end
    if (s_sw) begin
      switches++;
      check((s_cur == SEL_OOO) ? ooo_fly == 0 : io_fly == 0, "switch before drain");
    end
    // backend models and source
    ooo_fly = ooo_fly + (s_ooo_hs ? 1 : 0) - ((ooo_fly > 0 && $urandom_range(3) == 0) ? 1 : 0);
    io_fly  = io_fly + (s_io_hs ? 1 : 0) - ((io_fly > 0 && $urandom_range(1) == 0) ? 1 : 0);
    ooo_ready = ($urandom_range(3) != 0) && ooo_fly < 8;
    io_ready  = ($urandom_range(1) != 0) && io_fly < 2;
    if (s_dec_hs) begin
      next_send++;
      dec_instr = 32'(next_send);
    end
    dec_valid = 1'b1;
    #1;
    s_ooo_hs    = ooo_valid && ooo_ready;
    s_io_hs     = io_valid && io_ready;
    s_dec_hs    = dec_valid && dec_ready;
    s_sw        = switch_pulse;
    s_cur       = cur_sel;
    s_ooo_instr = ooo_instr;
    s_io_instr  = io_instr;
    check(!(ooo_valid && io_valid), "both backends offered an instruction");
    check(ooo_pwr_en == (cur_sel == SEL_OOO || ooo_fly != 0), "OoO power enable");
  end

  initial begin
    ooo_fly = 0; io_fly = 0; next_send = 0; next_expect = 0; switches = 0; sel_changes = 0;
    dec_valid = 0; dec_instr = 0; ooo_ready = 0; io_ready = 0;
    s_ooo_hs = 0; s_io_hs = 0; s_dec_hs = 0; s_sw = 0; s_cur = SEL_OOO; s_ooo_instr = 0; s_io_instr = 0;
    sel = SEL_OOO;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 40; k++) begin
      repeat (50 + $urandom_range(200)) @(negedge clk);
      sel_prev = sel;
      sel = (k % 2 == 0) ? SEL_INORDER : SEL_OOO;  // before the capture
      if (sel != sel_prev) sel_changes++;
    end
    repeat (100) @(negedge clk);
    check(cur_sel == sel, "select settled");
    check(switches == sel_changes, $sformatf("%0d switches for %0d select changes", switches, sel_changes));
    check(next_expect > 1000, $sformatf("%0d instructions dispatched", next_expect));
    check(next_expect == next_send, "every accepted instruction reached a backend");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
