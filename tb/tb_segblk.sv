// tb_segblk: self-checking testbench of the segmentation block.
// It synthesises ECG-like records (sharp R spikes on a noisy baseline with a
// wide T wave, one beat deliberately weak so that search-back is needed), keeps
// them in a word memory with a fixed response latency, runs the block, and
// compares the R indices it writes with (a) a plain software model of the same
// Pan-Tompkins arithmetic written here, and (b) the true spike positions within
// a tolerance. It also checks that the run time depends only on the record
// length: two different records of equal length must take the same number of
// cycles, and that number must follow the per-sample cost of the block.
module tb_segblk;
  import eba_pkg::*;

  localparam int unsigned FS        = 500;
  localparam int unsigned N         = 8000;
  localparam int unsigned MAX_PEAKS = 40;
  localparam int unsigned MWI_LEN   = FS * 150 / 1000;
  localparam int unsigned REFRACT   = FS / 5;
  localparam int unsigned INIT      = 2 * FS;
  localparam int unsigned DELAY     = 2;
  localparam int unsigned LAT       = 2;       // memory response latency
  localparam logic [31:0] SRC = 32'h0000_0000;
  localparam logic [31:0] DST = 32'h0001_0000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        start;
  logic        busy, done, irq, qrs_pulse, sb_pulse;
  logic [7:0]  n_peaks;
  bus_req_t    breq;
  bus_rsp_t    brsp;

  segblk dut (
    .clk, .rst_n, .start, .src_ptr(SRC), .dst_ptr(DST), .n_samples(N),
    .busy, .done, .irq, .n_peaks, .qrs_pulse, .searchback_pulse(sb_pulse),
    .bus_req(breq), .bus_rsp(brsp)
  );

  // Word memory: samples at SRC, results at DST.
  logic [31:0] smem [N];
  logic [31:0] rmem [64];
  int          wait_cnt;
  logic        ack_q;
  always_ff @(posedge clk) begin
    if (!rst_n) wait_cnt <= 0;
    ack_q <= 1'b0;
    if (breq.req && !ack_q) begin
      if (wait_cnt == LAT - 1) begin
        ack_q    <= 1'b1;
        wait_cnt <= 0;
        if (breq.we) rmem[(breq.addr - DST) >> 2] <= breq.wdata;
        else         brsp.rdata <= smem[(breq.addr - SRC) >> 2];
      end else wait_cnt <= wait_cnt + 1;
    end
  end
  assign brsp.ack = ack_q;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ------------------------------------------------------------ stimulus
  int true_r [64];
  int n_true;
  int weak_beat;

  task automatic make_record(input int seed_rr, input int weak_idx);
    int pos, k, amp;
    int sig [N];
    for (int i = 0; i < N; i++) sig[i] = int'($urandom_range(30)) - 15;
    n_true = 0;
    pos = 170;
    k = 0;
    while (pos < N - 60) begin
      amp = 2200 + int'($urandom_range(200));
      if (k == weak_idx) amp = amp * 21 / 50;
      for (int j = -6; j <= 6; j++) sig[pos + j] += amp * (6 - (j < 0 ? -j : j)) / 6;
      for (int j = -40; j <= 40; j++)
        if (pos + 140 + j < N) sig[pos + 140 + j] += 250 * (40 - (j < 0 ? -j : j)) / 40;
      true_r[n_true] = pos;
      n_true++;
      k++;
      pos += seed_rr + int'($urandom_range(40)) - 20;
    end
    for (int i = 0; i < N; i++) smem[i] = 32'(sig[i]);
  endtask

  // ------------------------------------------------------- reference model
  longint ref_pk [64];
  int     ref_n;
  int     ref_sb;

  function automatic longint sx(input logic [31:0] w);
    return longint'($signed(w[15:0]));
  endfunction

  task automatic run_ref();
    longint m [N];
    longint lmax, lsum, spki, npki, thr1, thr2, recip;
    longint rr1 [8], rr2 [8];
    longint s1, s2, avg2, last, cand_pk, cand_loc, loc, pk, q, rr;
    bit have, rr_init, cand_v, is_pk, outside, tq, tsb;
    int L;
    // one pass of derivative, squaring and integration
    L = (N > INIT) ? INIT : N;
    for (int pass = 0; pass < 2; pass++) begin
      int len;
      len = pass == 0 ? L : N;
      for (int n = 0; n < len; n++) begin
        longint d, acc;
        d = 2 * sx(smem[n]) + (n >= 1 ? sx(smem[n-1]) : 0)
            - (n >= 3 ? sx(smem[n-3]) : 0) - 2 * (n >= 4 ? sx(smem[n-4]) : 0);
        d = d >>> 3;
        acc = 0;
        for (int j = 0; j < MWI_LEN; j++) begin
          longint dj;
          int t;
          t = n - j;
          if (t < 0) continue;
          dj = 2 * sx(smem[t]) + (t >= 1 ? sx(smem[t-1]) : 0)
               - (t >= 3 ? sx(smem[t-3]) : 0) - 2 * (t >= 4 ? sx(smem[t-4]) : 0);
          dj = dj >>> 3;
          acc += dj * dj;
        end
        m[n] = acc;
      end
      if (pass == 0) begin
        lmax = 0; lsum = 0;
        for (int n = 0; n < L; n++) begin
          if (m[n] > lmax) lmax = m[n];
          lsum += m[n];
        end
        recip = (longint'(1) << 20) / INIT;
        spki = (lmax * 85) >> 8;
        npki = ((lsum >> 1) * recip) >> 20;
      end
    end
    for (int i = 0; i < 8; i++) begin rr1[i] = FS; rr2[i] = FS; end
    s1 = 8 * FS; s2 = 8 * FS;
    have = 0; rr_init = 0; cand_v = 0; last = 0; ref_n = 0; ref_sb = 0; cand_pk = 0; cand_loc = 0;
    for (int n = 2; n < N; n++) begin
      thr1 = (spki > npki) ? npki + ((spki - npki) >> 2) : npki;
      thr2 = thr1 >> 1;
      avg2 = s2 >> 3;
      is_pk = (m[n-1] > m[n-2]) && (m[n-1] >= m[n]);
      pk = m[n-1];
      loc = n - 1;
      outside = !have || (loc - last > REFRACT);
      tq = is_pk && pk > thr1 && outside;
      tsb = !tq && have && cand_v && ((n - last) > ((avg2 * 425) >> 8));
      if (is_pk && !tq && outside) begin
        npki = (pk >> 3) + npki - (npki >> 3);
        if (pk > thr2 && (!cand_v || pk > cand_pk)) begin
          cand_v = 1; cand_pk = pk; cand_loc = loc;
        end
      end
      if (tq || tsb) begin
        q = tq ? loc : cand_loc;
        if (tq) spki = (pk >> 3) + spki - (spki >> 3);
        else begin spki = (cand_pk >> 2) + spki - (spki >> 2); ref_sb++; end
        cand_v = 0;
        if (have && !rr_init) begin
          rr = q - last;
          for (int i = 0; i < 8; i++) begin rr1[i] = rr; rr2[i] = rr; end
          s1 = 8 * rr; s2 = 8 * rr;
          rr_init = 1;
        end else if (have) begin
          rr = q - last;
          s1 = s1 + rr - rr1[7];
          for (int i = 7; i > 0; i--) rr1[i] = rr1[i-1];
          rr1[0] = rr;
          if (rr > ((avg2 * 235) >> 8) && rr < ((avg2 * 297) >> 8)) begin
            s2 = s2 + rr - rr2[7];
            for (int i = 7; i > 0; i--) rr2[i] = rr2[i-1];
            rr2[0] = rr;
          end
        end
        last = q; have = 1;
        if (ref_n < MAX_PEAKS) begin
          ref_pk[ref_n] = (q > DELAY) ? q - DELAY : 0;
          ref_n++;
        end
      end
    end
  endtask

  // ------------------------------------------------------------ run
  int sb_count;
  always_ff @(posedge clk) if (!rst_n) sb_count <= 0; else if (sb_pulse) sb_count <= sb_count + 1;

  task automatic run_dut(output int cycles);
    int c;
    for (int i = 0; i < 64; i++) rmem[i] = 32'hDEAD_BEEF;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    c = 1;
    while (!irq) begin @(negedge clk); c++; end
    cycles = c;
    @(negedge clk);
  endtask

  task automatic compare(input string tag);
    int matched;
    check(done, {tag, ": done set"});
    check(n_peaks == 8'(ref_n), $sformatf("%s: peak count %0d, model %0d", tag, n_peaks, ref_n));
    for (int i = 0; i < MAX_PEAKS; i++) begin
      if (i < ref_n)
        check(rmem[i] == 32'(ref_pk[i]), $sformatf("%s: peak %0d = %0d, model %0d", tag, i, rmem[i], ref_pk[i]));
      else
        check(rmem[i] == 32'hFFFF_FFFF, $sformatf("%s: unused slot %0d = %h", tag, i, rmem[i]));
    end
    check(rmem[MAX_PEAKS] == 32'hDEAD_BEEF, {tag, ": nothing written past MAX_PEAKS"});
    // every true beat found: the reported index lies on the rising edge or the
    // plateau of the integrated waveform, i.e. within MWI_LEN samples after R
    matched = 0;
    for (int b = 0; b < n_true; b++)
      for (int i = 0; i < n_peaks; i++)
        if (int'(rmem[i]) >= true_r[b] - 5 && int'(rmem[i]) <= true_r[b] + int'(MWI_LEN)) begin matched++; break; end
    check(matched == n_true && n_peaks == 8'(n_true),
          $sformatf("%s: %0d of %0d true beats found, %0d reported", tag, matched, n_true, n_peaks));
  endtask

  int cyc_a, cyc_b, cyc_c, sb_base;
  initial begin
    start = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // record A: regular rhythm, one weak beat (search-back)
    make_record(400, 12);
    run_ref();
    run_dut(cyc_a);
    compare("A");
    check(ref_sb > 0 && sb_count == ref_sb, $sformatf("A: search-back used %0d times, model %0d", sb_count, ref_sb));
    sb_base = sb_count;
    // record B: faster rhythm, no weak beat
    make_record(330, 99);
    run_ref();
    run_dut(cyc_b);
    compare("B");
    check(sb_count - sb_base == ref_sb, $sformatf("B: search-back %0d, model %0d", sb_count - sb_base, ref_sb));
    // record C: flat line, no beats at all
    for (int i = 0; i < N; i++) smem[i] = 32'(int'($urandom_range(10)) - 5);
    n_true = 0;
    run_ref();
    run_dut(cyc_c);
    check(n_peaks == 8'(ref_n), $sformatf("C: %0d peaks, model %0d", n_peaks, ref_n));
    // constant timing: (INIT + N) samples at LAT+1+3 cycles, MAX_PEAKS writes at
    // LAT+1, one cycle to take start
    $display("cycles A=%0d B=%0d C=%0d", cyc_a, cyc_b, cyc_c);
    check(cyc_a == cyc_b && cyc_b == cyc_c, "run time independent of the signal");
    check(cyc_a == (INIT + N) * (LAT + 1 + 3) + MAX_PEAKS * (LAT + 1) + 1,
          $sformatf("run time %0d cycles matches the per-sample cost", cyc_a));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
