// segblk: custom segmentation block, a tightly coupled accelerator that finds
// the R-peaks of a filtered ECG record so that the signal can be cut into
// fixed-length beats around them.
//
// The design gives the five functions of the block and their order:
//   1) initialisation of the RR averages (and of the detection thresholds),
//   2) the Pan-Tompkins derivative filter,
//   3) squaring of the derivative,
//   4) moving-window integration,
//   5) peak detection.
// The insides follow the published Pan-Tompkins QRS detector and are this
// design's choice in every detail:
//   derivative   d[n]  = (2x[n] + x[n-1] - x[n-3] - 2x[n-4]) / 8
//   squaring     s[n]  = d[n]^2
//   integration  m[n]  = sum of s over the last MWI_LEN samples (150 ms); the
//                        sum is not divided by MWI_LEN, all thresholds are in the
//                        same unscaled units
//   peak         m[n-1] is a peak when m[n-1] > m[n-2] and m[n-1] >= m[n]
//   learning     a first pass over the first INIT_SAMPLES samples (2 s) sets
//                SPKI to one third of the largest integrated value and NPKI to
//                half of their mean; both RR averages start at FS samples (1 s)
//                and are re-seeded (all eight history slots) with the first RR
//                interval measured in the detection pass
//   detection    second pass over all samples. THR1 = NPKI + (SPKI-NPKI)/4,
//                THR2 = THR1/2. A peak above THR1 that lies more than REFRACT
//                samples (200 ms) after the last QRS is a QRS and updates
//                SPKI = PEAK/8 + 7SPKI/8; a peak inside the refractory period
//                is ignored; any other peak updates NPKI the same way and, if
//                above THR2, is kept as the search-back candidate (the largest
//                one). THR1 stays at NPKI should NPKI ever exceed SPKI. When no
//                QRS has been found for RR_MISSED = 1.66 RR_AVG2 samples, the
//                candidate is taken as a QRS with SPKI = PEAK/4 + 3SPKI/4.
//   RR averages  RR_AVG1: mean of the 8 latest RR intervals; RR_AVG2: mean of
//                the 8 latest intervals within 92%..116% of RR_AVG2. An
//                interval is held in 16 bits and saturates there.
// The reported R index is the location of the integrated peak less DELAY
// samples (the derivative's delay), saturating at 0.
//
// Interface: pointer-based, as in the design. The core supplies src_ptr (byte
// address of n_samples words, each a signed SAMPLE_W-bit sample in its low bits),
// dst_ptr and a one-cycle start. The block masters the eba_pkg word bus (shared
// with the core's data cache and the segmentation buffer), reads every sample of
// each pass once, and at the end writes exactly MAX_PEAKS words at dst_ptr: the
// R indices in order, then 32'hFFFF_FFFF in unused slots. It then raises irq for
// one cycle (the core's wake-up interrupt) and holds done until the next start;
// n_peaks gives the count.
//
// Timing: constant for a given record length and memory latency, independent of
// the signal. Every sample takes its bus read plus 3 cycles, whether or not a
// peak is found, and the write-back is always MAX_PEAKS words: the constant-time
// property the design asks of each algorithm step is kept in hardware.
module segblk
  import eba_pkg::*;
#(
  parameter int unsigned FS           = 500,             // sample rate (Hz)
  parameter int unsigned SAMPLE_W     = 16,
  parameter int unsigned MWI_LEN      = FS * 150 / 1000, // 150 ms window
  parameter int unsigned REFRACT      = FS / 5,          // 200 ms
  parameter int unsigned INIT_SAMPLES = 2 * FS,          // 2 s learning
  parameter int unsigned MAX_PEAKS    = 40,
  parameter int unsigned DELAY        = 2
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic [AW-1:0]   src_ptr,
  input  logic [AW-1:0]   dst_ptr,
  input  logic [31:0]     n_samples,
  output logic            busy,
  output logic            done,
  output logic            irq,
  output logic [7:0]      n_peaks,
  output logic            qrs_pulse,        // a QRS was accepted this cycle
  output logic            searchback_pulse, // ... through search-back
  output bus_req_t        bus_req,
  input  bus_rsp_t        bus_rsp
);

  localparam int unsigned DW_D  = SAMPLE_W + 1;                // derivative
  localparam int unsigned SQ_W  = 2 * DW_D;                    // square
  localparam int unsigned SUM_W = SQ_W + $clog2(MWI_LEN + 1);  // window sum
  localparam int unsigned RR_W  = 16;
  localparam int unsigned PK_W  = $clog2(MAX_PEAKS + 1);
  localparam longint unsigned RECIP = (64'd1 << 20) / 64'(INIT_SAMPLES);

  typedef enum logic [2:0] {G_IDLE, G_FETCH, G_DERIV, G_SQ, G_PEAK, G_WRITE, G_DONE} gstate_e;

  gstate_e st_q;
  logic    learn_q;                     // 1: learning pass, 0: detection pass
  logic [AW-1:0] src_q, dst_q;
  logic [31:0]   n_q, idx_q, limit;
  logic [PK_W-1:0] wr_q;

  // Signal path registers.
  logic signed [SAMPLE_W-1:0] x_q, xh_q [4];   // x[n], x[n-1..n-4]
  logic signed [DW_D-1:0]     d_q;
  logic        [SQ_W-1:0]     win_q [MWI_LEN];
  logic        [SUM_W-1:0]    sum_q, m1_q, m2_q;

  // Detection state.
  logic [SUM_W-1:0] spki_q, npki_q, lmax_q;
  logic [63:0]      lsum_q;
  logic [31:0]      last_q;
  logic             have_q;
  logic             rr_init_q;         // RR averages seeded from a measured interval
  logic             cand_v_q;
  logic [SUM_W-1:0] cand_pk_q;
  logic [31:0]      cand_loc_q;
  logic [RR_W-1:0]  rr1_q [8], rr2_q [8];
  logic [RR_W+2:0]  rs1_q, rs2_q;
  logic [31:0]      peaks_q [MAX_PEAKS];
  logic [PK_W-1:0]  npk_q;

  assign limit = (learn_q && n_q > INIT_SAMPLES) ? INIT_SAMPLES : n_q;

  // ---------------------------------------------------------------- datapath
  logic signed [DW_D+2:0] dsum;
  assign dsum = (DW_D+3)'(2 * x_q) + (DW_D+3)'(xh_q[0]) - (DW_D+3)'(xh_q[2]) - (DW_D+3)'(2 * xh_q[3]);

  logic [SQ_W-1:0] sq;
  assign sq = SQ_W'(d_q * d_q);

  // Thresholds and RR limits.
  logic [SUM_W-1:0] thr1, thr2;
  assign thr1 = (spki_q > npki_q) ? npki_q + ((spki_q - npki_q) >> 2) : npki_q;
  assign thr2 = thr1 >> 1;

  logic [RR_W-1:0]  avg2;
  logic [RR_W+9:0]  rr_low, rr_high, rr_missed;
  assign avg2      = RR_W'(rs2_q >> 3);
  assign rr_low    = ((RR_W+10)'(avg2) * 235) >> 8;
  assign rr_high   = ((RR_W+10)'(avg2) * 297) >> 8;
  assign rr_missed = ((RR_W+10)'(avg2) * 425) >> 8;

  // Peak classification in G_PEAK (detection pass).
  logic             is_peak, outside_ref, take_qrs, take_sb, any_qrs;
  logic [SUM_W-1:0] pk;
  logic [31:0]      loc, q_loc, rr;
  assign is_peak     = (idx_q >= 32'd2) && (m1_q > m2_q) && (m1_q >= sum_q);
  assign pk          = m1_q;
  assign loc         = idx_q - 32'd1;
  assign outside_ref = !have_q || ((loc - last_q) > REFRACT);
  assign take_qrs    = (st_q == G_PEAK) && !learn_q && is_peak && (pk > thr1) && outside_ref;
  assign take_sb     = (st_q == G_PEAK) && !learn_q && !take_qrs && have_q && cand_v_q &&
                       ((idx_q - last_q) > rr_missed);
  assign any_qrs     = take_qrs || take_sb;
  assign q_loc       = take_qrs ? loc : cand_loc_q;
  assign rr          = q_loc - last_q;
  // RR interval as kept in the averages, saturated to RR_W bits (a gap of more
  // than 65535 samples counts as the largest interval, not a short one)
  logic [RR_W-1:0]  rr_s;
  assign rr_s = (rr > 32'((64'd1 << RR_W) - 1)) ? '1 : rr[RR_W-1:0];

  // ------------------------------------------------------------ controller
  logic last_sample;
  assign last_sample = (idx_q + 32'd1 >= limit);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q    <= G_IDLE;
      learn_q <= 1'b0;
      src_q   <= '0;
      dst_q   <= '0;
      n_q     <= '0;
      idx_q   <= '0;
      wr_q    <= '0;
    end else begin
      unique case (st_q)
        G_IDLE: if (start) begin
          src_q   <= src_ptr;
          dst_q   <= dst_ptr;
          n_q     <= n_samples;
          idx_q   <= '0;
          learn_q <= 1'b1;
          st_q    <= (n_samples == 0) ? G_WRITE : G_FETCH;
          wr_q    <= '0;
        end
        G_FETCH: if (bus_rsp.ack) st_q <= G_DERIV;
        G_DERIV: st_q <= G_SQ;
        G_SQ:    st_q <= G_PEAK;
        G_PEAK: begin
          if (!last_sample) begin
            idx_q <= idx_q + 32'd1;
            st_q  <= G_FETCH;
          end else if (learn_q) begin
            learn_q <= 1'b0;
            idx_q   <= '0;
            st_q    <= G_FETCH;
          end else begin
            st_q <= G_WRITE;
          end
        end
        G_WRITE: if (bus_rsp.ack) begin
          if (wr_q == PK_W'(MAX_PEAKS - 1)) st_q <= G_DONE;
          wr_q <= wr_q + 1'b1;
        end
        G_DONE:  st_q <= G_IDLE;
        default: st_q <= G_IDLE;
      endcase
    end
  end

  // Start of a pass: clear the filter history (at start, and when the learning
  // pass ends).
  logic pass_start;
  assign pass_start = (st_q == G_IDLE && start) || (st_q == G_PEAK && last_sample && learn_q);

  // ----------------------------------------------------------- signal path
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_q   <= '0;
      d_q   <= '0;
      sum_q <= '0;
      m1_q  <= '0;
      m2_q  <= '0;
      for (int i = 0; i < 4; i++)       xh_q[i]  <= '0;
      for (int i = 0; i < MWI_LEN; i++) win_q[i] <= '0;
    end else if (pass_start) begin
      x_q   <= '0;
      d_q   <= '0;
      sum_q <= '0;
      m1_q  <= '0;
      m2_q  <= '0;
      for (int i = 0; i < 4; i++)       xh_q[i]  <= '0;
      for (int i = 0; i < MWI_LEN; i++) win_q[i] <= '0;
    end else begin
      if (st_q == G_FETCH && bus_rsp.ack) begin
        x_q <= bus_rsp.rdata[SAMPLE_W-1:0];
        xh_q[0] <= x_q;
        for (int i = 1; i < 4; i++) xh_q[i] <= xh_q[i-1];
      end
      if (st_q == G_DERIV) d_q <= DW_D'(dsum >>> 3);
      if (st_q == G_SQ) begin
        win_q[0] <= sq;
        for (int i = 1; i < MWI_LEN; i++) win_q[i] <= win_q[i-1];
        sum_q <= sum_q + SUM_W'(sq) - SUM_W'(win_q[MWI_LEN-1]);
        m2_q  <= m1_q;
        m1_q  <= sum_q;
      end
    end
  end

  // -------------------------------------------------- learning and detection
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      spki_q     <= '0;
      npki_q     <= '0;
      lmax_q     <= '0;
      lsum_q     <= '0;
      rr_init_q  <= 1'b0;
      last_q     <= '0;
      have_q     <= 1'b0;
      cand_v_q   <= 1'b0;
      cand_pk_q  <= '0;
      cand_loc_q <= '0;
      rs1_q      <= '0;
      rs2_q      <= '0;
      npk_q      <= '0;
      for (int i = 0; i < 8; i++) begin rr1_q[i] <= '0; rr2_q[i] <= '0; end
      for (int i = 0; i < MAX_PEAKS; i++) peaks_q[i] <= '1;
    end else if (st_q == G_IDLE && start) begin
      // 1) initialisation of the RR averages
      lmax_q   <= '0;
      lsum_q   <= '0;
      have_q   <= 1'b0;
      rr_init_q <= 1'b0;
      cand_v_q <= 1'b0;
      npk_q    <= '0;
      for (int i = 0; i < 8; i++) begin rr1_q[i] <= RR_W'(FS); rr2_q[i] <= RR_W'(FS); end
      rs1_q    <= (RR_W+3)'(8 * FS);
      rs2_q    <= (RR_W+3)'(8 * FS);
      for (int i = 0; i < MAX_PEAKS; i++) peaks_q[i] <= '1;
    end else if (st_q == G_PEAK && learn_q) begin
      if (sum_q > lmax_q) lmax_q <= sum_q;
      lsum_q <= lsum_q + 64'(sum_q);
      if (last_sample) begin
        spki_q <= SUM_W'(((sum_q > lmax_q ? 64'(sum_q) : 64'(lmax_q)) * 85) >> 8);
        npki_q <= SUM_W'((((lsum_q + 64'(sum_q)) >> 1) * RECIP) >> 20);
      end
    end else if (st_q == G_PEAK) begin
      // Noise peak: level update and search-back candidate.
      if (is_peak && !take_qrs && outside_ref) begin
        npki_q <= (pk >> 3) + npki_q - (npki_q >> 3);
        if (pk > thr2 && (!cand_v_q || pk > cand_pk_q)) begin
          cand_v_q   <= 1'b1;
          cand_pk_q  <= pk;
          cand_loc_q <= loc;
        end
      end
      if (any_qrs) begin
        if (take_qrs) spki_q <= (pk >> 3) + spki_q - (spki_q >> 3);
        else          spki_q <= (cand_pk_q >> 2) + spki_q - (spki_q >> 2);
        cand_v_q <= 1'b0;
        if (have_q && !rr_init_q) begin
          // first measured interval seeds both RR averages
          for (int i = 0; i < 8; i++) begin rr1_q[i] <= rr_s; rr2_q[i] <= rr_s; end
          rs1_q     <= (RR_W+3)'(rr_s) << 3;
          rs2_q     <= (RR_W+3)'(rr_s) << 3;
          rr_init_q <= 1'b1;
        end else if (have_q) begin
          rr1_q[0] <= rr_s;
          for (int i = 1; i < 8; i++) rr1_q[i] <= rr1_q[i-1];
          rs1_q <= rs1_q + (RR_W+3)'(rr_s) - (RR_W+3)'(rr1_q[7]);
          if ((RR_W+10)'(rr_s) > rr_low && (RR_W+10)'(rr_s) < rr_high) begin
            rr2_q[0] <= rr_s;
            for (int i = 1; i < 8; i++) rr2_q[i] <= rr2_q[i-1];
            rs2_q <= rs2_q + (RR_W+3)'(rr_s) - (RR_W+3)'(rr2_q[7]);
          end
        end
        last_q <= q_loc;
        have_q <= 1'b1;
        if (npk_q < PK_W'(MAX_PEAKS)) begin
          peaks_q[npk_q] <= (q_loc > DELAY) ? q_loc - DELAY : 32'd0;
          npk_q          <= npk_q + 1'b1;
        end
      end
    end
  end

  // ---------------------------------------------------------------- bus
  always_comb begin
    bus_req       = '0;
    bus_req.addr  = src_q + (idx_q << 2);
    if (st_q == G_FETCH) begin
      bus_req.req = 1'b1;
    end else if (st_q == G_WRITE) begin
      bus_req.req   = 1'b1;
      bus_req.we    = 1'b1;
      bus_req.addr  = dst_q + (AW'(wr_q) << 2);
      bus_req.wdata = peaks_q[wr_q];
    end
  end

  // ---------------------------------------------------------------- status
  logic done_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                    done_q <= 1'b0;
    else if (st_q == G_IDLE && start) done_q <= 1'b0;
    else if (st_q == G_DONE)       done_q <= 1'b1;
  end

  assign busy             = (st_q != G_IDLE);
  assign done             = done_q;
  assign irq              = (st_q == G_DONE);
  assign n_peaks          = 8'(npk_q);
  assign qrs_pulse        = any_qrs;
  assign searchback_pulse = take_sb;

  // The master holds its request stable until it is acknowledged.
  property p_hold;
    @(posedge clk) disable iff (!rst_n) (bus_req.req && !bus_rsp.ack) |=> $stable(bus_req);
  endproperty
  a_hold: assert property (p_hold);

endmodule
