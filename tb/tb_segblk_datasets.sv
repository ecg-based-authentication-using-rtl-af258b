// tb_segblk_datasets: the segmentation block on records shaped like the three
// ECG databases the architecture was evaluated with, one block instance per
// sample rate, all running side by side.
//
//   set  rate     record                         beats in record
//   0    500 Hz   20 s, a whole short recording  about 25
//   1    1000 Hz  40 s excerpt                   about 50 (more than MAX_PEAKS)
//   2    5000 Hz  40 s excerpt of a long session about 50 (more than MAX_PEAKS)
//
// Set 0 uses segblk at its default parameters. Sets 1 and 2 set FS to the
// record's rate, and the window, refractory period and learning length follow
// from it. Each record is synthetic: R spikes about 24 ms wide, a broad T wave
// 280 ms later, small white noise, and an RR interval of 0.8 s +/- 40 ms. The
// sixth beat is weak (30 % amplitude), so the detector must recover it by
// search-back.
//
// Checks per set:
//   * n_peaks is min(beats, MAX_PEAKS);
//   * each reported index lies within [R - 10 ms, R + window] of the matching
//     true R-peak, in order;
//   * unused slots hold all-ones;
//   * at least one search-back happened;
//   * the run takes exactly
//     (2 s of samples + N) * (LAT + 4) + MAX_PEAKS * (LAT + 1) + 1 cycles.
module tb_segblk_datasets;
  import eba_pkg::*;

  localparam int unsigned LAT       = 2;
  localparam int unsigned MAX_PEAKS = 40;
  localparam int          NSET      = 3;
  localparam int unsigned FS_OF [NSET] = '{500, 1000, 5000};
  localparam int unsigned N_OF  [NSET] = '{10_000, 40_000, 200_000};

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [NSET-1:0] set_done;

  for (genvar g = 0; g < NSET; g++) begin : g_set
    localparam int unsigned FS      = FS_OF[g];
    localparam int unsigned N       = N_OF[g];
    localparam int unsigned MWI_LEN = FS * 150 / 1000;
    localparam int unsigned INIT    = 2 * FS;
    localparam logic [31:0] SRC     = 32'h0000_0000;
    localparam logic [31:0] DST     = 32'h0100_0000;

    logic       start = 1'b0;
    logic       busy, done, irq, qrs_pulse, sb_pulse;
    logic [7:0] n_peaks;
    bus_req_t   breq;
    bus_rsp_t   brsp;

    if (g == 0) begin : g_dut
      // the block exactly as built, every parameter at its default
      segblk dut (
        .clk, .rst_n, .start, .src_ptr(SRC), .dst_ptr(DST), .n_samples(N),
        .busy, .done, .irq, .n_peaks, .qrs_pulse, .searchback_pulse(sb_pulse),
        .bus_req(breq), .bus_rsp(brsp)
      );
    end else begin : g_dut
      segblk #(.FS(FS)) dut (
        .clk, .rst_n, .start, .src_ptr(SRC), .dst_ptr(DST), .n_samples(N),
        .busy, .done, .irq, .n_peaks, .qrs_pulse, .searchback_pulse(sb_pulse),
        .bus_req(breq), .bus_rsp(brsp)
      );
    end

    // word memory with a fixed latency: samples at SRC, results at DST
    logic [31:0] smem [N];
    logic [31:0] rmem [MAX_PEAKS];
    int          wait_cnt;
    logic        ack_q;
    always @(posedge clk) begin
      ack_q <= 1'b0;
      if (!rst_n) wait_cnt <= 0;
      else if (breq.req && !ack_q) begin
        if (wait_cnt == LAT - 1) begin
          ack_q    <= 1'b1;
          wait_cnt <= 0;
          if (breq.we) rmem[(breq.addr - DST) >> 2] <= breq.wdata;
          else         brsp.rdata <= smem[(breq.addr - SRC) >> 2];
        end else wait_cnt <= wait_cnt + 1;
      end
    end
    assign brsp.ack = ack_q;

    int sb_count = 0;
    always @(negedge clk) if (sb_pulse) sb_count++;

    int true_r [64];
    int n_true;

    task automatic make_record();
      int pos, k, amp, hw, tw, toff;
      int sig [];
      sig  = new[N];
      hw   = FS * 12 / 1000;      // spike half width, 12 ms
      tw   = FS * 80 / 1000;      // T-wave half width, 80 ms
      toff = FS * 280 / 1000;     // R to T, 280 ms
      for (int i = 0; i < N; i++) sig[i] = int'($urandom_range(30)) - 15;
      n_true = 0;
      pos    = FS * 340 / 1000;
      k      = 0;
      while (pos < int'(N) - hw - 1 && n_true < 64) begin
        amp = 2200 + int'($urandom_range(200));
        if (k == 5) amp = amp * 3 / 10;
        for (int j = -hw; j <= hw; j++)
          sig[pos + j] += amp * (hw - (j < 0 ? -j : j)) / hw;
        for (int j = -tw; j <= tw; j++)
          if (pos + toff + j < int'(N))
            sig[pos + toff + j] += 250 * (tw - (j < 0 ? -j : j)) / tw;
        true_r[n_true] = pos;
        n_true++;
        k++;
        pos += FS * 4 / 5 + int'($urandom_range(FS * 80 / 1000)) - int'(FS * 40 / 1000);
      end
      for (int i = 0; i < int'(N); i++) smem[i] = 32'(sig[i]);
    endtask

    initial begin
      longint cyc, expect_cyc;
      int     want, lo, hi;
      set_done[g] = 1'b0;
      make_record();
      wait (rst_n);
      @(negedge clk);
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      cyc = 1;
      while (!irq) begin @(negedge clk); cyc++; end
      expect_cyc = longint'(INIT + N) * (LAT + 4) + longint'(MAX_PEAKS) * (LAT + 1) + 1;
      check(cyc == expect_cyc,
            $sformatf("set %0d: %0d cycles, expected %0d", g, cyc, expect_cyc));
      @(negedge clk);
      want = n_true < int'(MAX_PEAKS) ? n_true : int'(MAX_PEAKS);
      check(int'(n_peaks) == want,
            $sformatf("set %0d (%0d Hz): %0d peaks, expected %0d", g, FS, n_peaks, want));
      for (int i = 0; i < int'(MAX_PEAKS); i++) begin
        if (i < want) begin
          lo = true_r[i] - int'(FS / 100);
          hi = true_r[i] + int'(MWI_LEN);
          check(int'(rmem[i]) >= lo && int'(rmem[i]) <= hi,
                $sformatf("set %0d: beat %0d at %0d, true R at %0d", g, i, rmem[i], true_r[i]));
        end else begin
          check(rmem[i] == 32'hFFFF_FFFF, $sformatf("set %0d: slot %0d not empty", g, i));
        end
      end
      check(sb_count >= 1, $sformatf("set %0d: no search-back", g));
      $display("set %0d: %0d Hz, %0d samples, %0d beats, %0d found, %0d search-back, %0d cycles",
               g, FS, N, n_true, n_peaks, sb_count, cyc);
      set_done[g] = 1'b1;
    end
  end

  initial begin
    repeat (4) @(negedge clk);
    rst_n = 1'b1;
    wait (&set_done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog
  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
