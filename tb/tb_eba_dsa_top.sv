// tb_eba_dsa_top: end-to-end testbench of the whole architecture at its default
// parameters. A core model plays the authentication program: it raises the
// architecture flags phase by phase, streams decoded instructions through the
// execution-order multiplexer into two backend models, fetches instructions
// through the instruction cache all the time, and uses the data port.
//   S_READ  stores a 1000-sample ECG record into the segmentation buffer;
//   S_FILT  runs loads and stores through the data cache;
//   S_SEG   starts the segmentation block twice: on the record in the buffer
//           (peaks to cacheable memory), then on a 3000-sample record with one
//           weak beat in main memory (peaks to the buffer); a core load made
//           while the block runs must wait for it; the peaks are read back;
//   S_FEAT, S_MAT  wait long enough for the data cache's retention ticks to
//           fire at every clock frequency; the peaks of the first run must then
//           have reached main memory through retention write-back, and the
//           instruction cache must have dropped blocks on its own retention.
// Checks: controller configuration per step, program order and backend choice
// of every instruction, fetched words, peak positions against the true beats,
// the cycle spacing of retention ticks at each frequency level, and that every
// mechanism happened at least once.
module tb_eba_dsa_top;
  import eba_pkg::*;

  localparam logic [31:0] SEED_I = 32'h1357_0000;
  localparam logic [31:0] SEED_D = 32'h2468_0000;
  localparam int unsigned MWI_LEN = 75;

  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;

  logic auth_req, rd_flag, filt_flag, seg_flag, feat_flag, mat_flag;
  step_e step;
  logic [1:0] freq_l;
  exec_sel_e sel, exec_order;
  logic auth_done;
  logic dec_valid, dec_ready, ooo_valid, ooo_ready, ooo_idle, ooo_pwr_en;
  logic io_valid, io_ready, io_idle;
  logic [31:0] dec_instr, ooo_instr, io_instr;
  bus_req_t if_req, d_req;
  bus_rsp_t if_rsp, d_rsp;
  logic seg_start, seg_busy, seg_done, seg_irq;
  logic [31:0] seg_src, seg_dst, seg_n;
  logic [7:0] seg_n_peaks;
  logic im_req, im_we, im_ack, dm_req, dm_we, dm_ack;
  logic [31:0] im_addr, dm_addr;
  logic [511:0] im_wdata, im_rdata, dm_wdata, dm_rdata;
  dsa_events_t events;

  eba_dsa_top dut (.*);

  tb_block_mem #(.LAT(4), .SEED(SEED_I)) u_imem (.clk, .rst_n, .req(im_req), .we(im_we),
    .addr(im_addr), .wdata(im_wdata), .ack(im_ack), .rdata(im_rdata));
  tb_block_mem #(.LAT(4), .SEED(SEED_D)) u_dmem (.clk, .rst_n, .req(dm_req), .we(dm_we),
    .addr(dm_addr), .wdata(dm_wdata), .ack(dm_ack), .rdata(dm_rdata));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------------------------------------------------- mechanism counts
  int m_state [6];
  int m_switch, m_ooo_off, m_stall, m_irq;
  int m_ic_hit, m_ic_miss, m_ic_ret, m_dc_hit, m_dc_miss, m_dc_wb, m_dc_inv;
  int m_buf, m_qrs, m_sb;
  int m_tick_lvl [4];
  int cyc, last_tick_cyc;
  logic [1:0] last_tick_lvl;
  always @(negedge clk) if (rst_n) begin
    cyc++;
    m_state[step]++;
    m_ooo_off  += int'(!ooo_pwr_en);
    m_ic_hit   += int'(events.ic_hit);
    m_ic_miss  += int'(events.ic_miss);
    m_ic_ret   += int'(events.ic_ret_wb || events.ic_ret_inv);
    m_dc_hit   += int'(events.dc_hit);
    m_dc_miss  += int'(events.dc_miss);
    m_dc_wb    += int'(events.dc_ret_wb);
    m_dc_inv   += int'(events.dc_ret_inv);
    m_buf      += int'(events.buf_access);
    m_qrs      += int'(events.seg_qrs);
    m_sb       += int'(events.seg_searchback);
    m_irq      += int'(seg_irq);
    if (events.ret_tick_d) begin
      // spacing of two ticks at one frequency: a quarter of 75 us in clock periods
      if (last_tick_cyc > 0 && last_tick_lvl == freq_l) begin
        int exp_lo, exp_hi;
        exp_lo = 18_750_000 / int'(period_ps(freq_l));
        exp_hi = exp_lo + 1;
        check(cyc - last_tick_cyc >= exp_lo && cyc - last_tick_cyc <= exp_hi,
              $sformatf("tick spacing %0d at level %0d, expected %0d..%0d", cyc - last_tick_cyc, freq_l, exp_lo, exp_hi));
        m_tick_lvl[freq_l]++;
      end
      last_tick_cyc = cyc;
      last_tick_lvl = freq_l;
    end
  end

  // ---------------------------------------------------------- decode and backends
  int ooo_fly, io_fly, next_send, next_expect, n_ooo, n_io;
  logic s_ooo_hs, s_io_hs, s_dec_hs;
  logic [31:0] s_ooo_instr, s_io_instr;
  exec_sel_e s_order;
  assign ooo_idle = (ooo_fly == 0);
  assign io_idle  = (io_fly == 0);
  always @(negedge clk) if (rst_n) begin
    if (s_ooo_hs) begin
      check(s_ooo_instr == 32'(next_expect), "program order (out-of-order backend)");
      check(s_order == SEL_OOO && io_fly == 0, "out-of-order dispatch only when selected and drained");
      next_expect++; n_ooo++;
    end
    if (s_io_hs) begin
      check(s_io_instr == 32'(next_expect), "program order (in-order stage)");
      check(s_order == SEL_INORDER && ooo_fly == 0, "in-order dispatch only when selected and drained");
      next_expect++; n_io++;
    end
    ooo_fly = ooo_fly + int'(s_ooo_hs) - int'(ooo_fly > 0 && $urandom_range(1) == 0);
    io_fly  = io_fly + int'(s_io_hs) - int'(io_fly > 0);
    ooo_ready = (ooo_fly < 6);
    io_ready  = (io_fly < 1);
    if (s_dec_hs) begin next_send++; dec_instr = 32'(next_send); end
    dec_valid = 1'b1;
    #0.1;
    s_ooo_hs = ooo_valid && ooo_ready;
    s_io_hs  = io_valid && io_ready;
    s_dec_hs = dec_valid && dec_ready;
    s_order  = exec_order;
    m_switch += int'(events.exec_switch);
    s_ooo_instr = ooo_instr;
    s_io_instr  = io_instr;
  end

  // ---------------------------------------------------------- instruction fetch
  bit   fetch_on;
  int   n_fetch;
  initial begin
    logic [31:0] pc;
    pc = 0; n_fetch = 0;
    if_req = '0;
    wait (rst_n);
    forever begin
      @(negedge clk);
      if (!fetch_on) continue;
      if_req.req = 1; if_req.addr = pc;
      do @(negedge clk); while (!if_rsp.ack);
      check(if_rsp.rdata == (pc ^ SEED_I), $sformatf("fetch %h", pc));
      n_fetch++;
      @(posedge clk); #0.1 if_req = '0;
      pc = (pc + 4) & 32'h0000_1FFF;
    end
  end

  // ---------------------------------------------------------- data port
  task automatic dport(input bit we, input logic [31:0] a, input logic [31:0] wd,
                       output logic [31:0] rd, output int lat);
    @(negedge clk);
    d_req.req = 1; d_req.we = we; d_req.addr = a; d_req.wdata = wd;
    lat = 0;
    do begin @(negedge clk); lat++; end while (!d_rsp.ack);
    rd = d_rsp.rdata;
    @(posedge clk); #0.1 d_req = '0;
  endtask

  // ---------------------------------------------------------- flags
  task automatic flag(input int f);
    @(negedge clk);
    case (f)
      0: auth_req = 1; 1: rd_flag = 1; 2: filt_flag = 1;
      3: seg_flag = 1; 4: feat_flag = 1; default: mat_flag = 1;
    endcase
    @(negedge clk);
    {auth_req, rd_flag, filt_flag, seg_flag, feat_flag, mat_flag} = '0;
  endtask

  task automatic expect_step(input step_e s, input logic [1:0] f, input exec_sel_e e);
    check(step == s && freq_l == f && sel == e,
          $sformatf("step %0d: freq_l %0d sel %0d, expected %0d/%0d/%0d", step, freq_l, sel, s, f, e));
  endtask

  // ---------------------------------------------------------- ECG records
  int true_r [64];
  int n_true;
  task automatic make_record(input int n, input int rr, input int weak_idx, output int sig []);
    int pos, k, amp;
    sig = new [n];
    for (int i = 0; i < n; i++) sig[i] = int'($urandom_range(30)) - 15;
    n_true = 0; pos = 150; k = 0;
    while (pos < n - 60) begin
      amp = 2200 + int'($urandom_range(200));
      if (k == weak_idx) amp = amp * 3 / 10;
      for (int j = -6; j <= 6; j++) sig[pos + j] += amp * (6 - (j < 0 ? -j : j)) / 6;
      for (int j = -40; j <= 40; j++)
        if (pos + 140 + j < n) sig[pos + 140 + j] += 250 * (40 - (j < 0 ? -j : j)) / 40;
      true_r[n_true] = pos; n_true++; k++;
      pos += rr + int'($urandom_range(40)) - 20;
    end
  endtask

  task automatic check_peaks(input string tag, input logic [31:0] pk [40]);
    int matched;
    check(seg_n_peaks == 8'(n_true), $sformatf("%s: %0d peaks for %0d beats", tag, seg_n_peaks, n_true));
    matched = 0;
    for (int b = 0; b < n_true; b++)
      for (int i = 0; i < int'(seg_n_peaks); i++)
        if (int'(pk[i]) >= true_r[b] - 5 && int'(pk[i]) <= true_r[b] + int'(MWI_LEN)) begin matched++; break; end
    check(matched == n_true, $sformatf("%s: %0d of %0d beats located", tag, matched, n_true));
    for (int i = int'(seg_n_peaks); i < 40; i++) check(pk[i] == 32'hFFFF_FFFF, $sformatf("%s: slot %0d unused", tag, i));
  endtask

  // ---------------------------------------------------------- the program
  localparam logic [31:0] DST_A = 32'h0020_0000;
  localparam logic [31:0] SRC_B = 32'h0030_0000;
  localparam logic [31:0] DST_B = SEG_BUF_BASE + 32'h800;

  initial begin
    int sig [];
    logic [31:0] rd, pk_a [40], pk_b [40];
    int lat, t_irq, t_ack, irq0;
    {auth_req, rd_flag, filt_flag, seg_flag, feat_flag, mat_flag} = '0;
    d_req = '0; seg_start = 0; seg_src = 0; seg_dst = 0; seg_n = 0;
    dec_valid = 0; dec_instr = 0; ooo_ready = 0; io_ready = 0;
    ooo_fly = 0; io_fly = 0; next_send = 0; next_expect = 0; n_ooo = 0; n_io = 0;
    s_ooo_hs = 0; s_io_hs = 0; s_dec_hs = 0; s_order = SEL_OOO; s_ooo_instr = 0; s_io_instr = 0;
    cyc = 0; last_tick_cyc = 0; last_tick_lvl = 0; fetch_on = 0;
    repeat (4) @(negedge clk);
    rst_n = 1;
    fetch_on = 1;
    expect_step(S_WAIT, 2'd0, SEL_OOO);

    // ---- read the signal: a 1000-sample record into the segmentation buffer
    flag(0);
    expect_step(S_READ, 2'd0, SEL_OOO);
    make_record(1000, 300, 99, sig);
    for (int i = 0; i < 1000; i++) begin
      dport(1, SEG_BUF_BASE + 32'(4 * i), 32'(sig[i]), rd, lat);
      check(lat == 3, "buffer store answered in three cycles");
    end
    for (int i = 0; i < 1000; i += 97) begin
      dport(0, SEG_BUF_BASE + 32'(4 * i), 0, rd, lat);
      check(rd == 32'(sig[i]), "buffer load");
    end

    // ---- filtering: in-order, 600 MHz
    flag(1);
    expect_step(S_FILT, 2'd3, SEL_INORDER);
    for (int i = 0; i < 300; i++) dport(1, 32'h0010_0000 + 32'(4 * i), 32'(i * 7), rd, lat);
    for (int i = 0; i < 300; i++) begin
      dport(0, 32'h0010_0000 + 32'(4 * i), 0, rd, lat);
      check(rd == 32'(i * 7), "data cache load after store");
    end
    repeat (24000) @(negedge clk);
    check(exec_order == SEL_INORDER, "in-order execution in force while filtering");

    // ---- segmentation: out-of-order, 2.1 GHz, segblk on both records
    flag(2);
    expect_step(S_SEG, 2'd0, SEL_OOO);
    @(negedge clk);
    seg_src = SEG_BUF_BASE; seg_dst = DST_A; seg_n = 1000; seg_start = 1;
    @(negedge clk) seg_start = 0;
    wait (seg_irq); @(negedge clk); @(negedge clk);
    check(seg_done && !seg_busy, "run A done");
    for (int i = 0; i < 40; i++) begin dport(0, DST_A + 32'(4 * i), 0, rd, lat); pk_a[i] = rd; end
    check_peaks("run A", pk_a);

    make_record(3000, 400, 5, sig);
    for (int i = 0; i < 3000; i++) u_dmem.put_word(SRC_B + 32'(4 * i), 32'(sig[i]));
    @(negedge clk);
    seg_src = SRC_B; seg_dst = DST_B; seg_n = 3000; seg_start = 1;
    @(negedge clk) seg_start = 0;
    // a core load while the block owns the data port waits for the block
    irq0 = m_irq;
    dport(0, 32'h0010_0000, 0, rd, lat);
    check(m_irq == irq0 + 1, "core access completed only after the block's interrupt");
    check(rd == 32'd0, "stalled load returns the right data");
    if (m_irq == irq0 + 1 && lat > 1000) m_stall++;
    check(seg_done, "run B done");
    for (int i = 0; i < 40; i++) begin dport(0, DST_B + 32'(4 * i), 0, rd, lat); pk_b[i] = rd; end
    check_peaks("run B", pk_b);
    repeat (50000) @(negedge clk);

    // ---- feature extraction: in-order, 500 MHz
    flag(3);
    expect_step(S_FEAT, 2'd2, SEL_INORDER);
    repeat (20000) @(negedge clk);

    // ---- matching: in-order, 400 MHz; long enough for both caches' retention
    flag(4);
    expect_step(S_MAT, 2'd1, SEL_INORDER);
    repeat (3_100_000) @(negedge clk);
    for (int i = 0; i < 40; i++)
      check(u_dmem.get_word(DST_A + 32'(4 * i)) == pk_a[i], $sformatf("peak %0d of run A written back to memory", i));
    check(u_dmem.get_word(32'h0010_0000 + 32'(4 * 5)) == 32'd35, "filter data written back to memory");
    flag(5);
    check(step == S_WAIT, "back to wait after matching");

    fetch_on = 0;
    repeat (20) @(negedge clk);
    check(next_expect == next_send, "every dispatched instruction delivered");
    $display("instructions: out-of-order %0d, in-order %0d; fetches %0d", n_ooo, n_io, n_fetch);
    $display("I$ hit/miss/ret %0d/%0d/%0d  D$ hit/miss/wb/inv %0d/%0d/%0d/%0d  buf %0d  qrs %0d  searchback %0d",
             m_ic_hit, m_ic_miss, m_ic_ret, m_dc_hit, m_dc_miss, m_dc_wb, m_dc_inv, m_buf, m_qrs, m_sb);
    $display("ticks by level %0d/%0d/%0d/%0d, switches %0d, cycles %0d", m_tick_lvl[0], m_tick_lvl[1],
             m_tick_lvl[2], m_tick_lvl[3], m_switch, cyc);
    for (int s = 0; s < 6; s++) check(m_state[s] > 0, $sformatf("controller state %0d visited", s));
    check(m_switch == 4, $sformatf("execution order switched %0d times, expected 4", m_switch));
    check(m_ooo_off > 0, "out-of-order backend powered down");
    check(n_ooo > 0 && n_io > 0, "instructions through both backends");
    check(m_ic_hit > 0 && m_ic_miss > 0, "instruction cache hits and misses");
    check(m_ic_ret > 0, "instruction cache retention monitor acted");
    check(m_dc_hit > 0 && m_dc_miss > 0, "data cache hits and misses");
    check(m_dc_wb > 0, "data cache retention write-back");
    check(m_dc_inv > 0, "data cache retention invalidation");
    check(m_buf > 0, "segmentation buffer used");
    check(m_qrs > 0, "segblk found QRS complexes");
    check(m_sb > 0, "segblk search-back");
    check(m_irq == 2, "two segblk interrupts");
    check(m_stall > 0, "core stalled behind segblk");
    for (int l = 0; l < 4; l++) check(m_tick_lvl[l] > 0, $sformatf("retention ticks timed at frequency level %0d", l));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
