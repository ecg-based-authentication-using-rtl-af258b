// eba_dsa_top: the timing-aware domain-specific architecture for ECG biometric
// authentication, around an out-of-order core that is not part of this RTL.
//
// What it holds, and how it is wired:
//  * arch_ctrl, the architecture controller. The authentication program raises
//    one flag at the end of each phase; the controller answers with the
//    frequency level (freq_l, to the clock generator) and the execution order
//    (sel) of the step configuration table, so that every step takes about as
//    long as segmentation.
//  * exec_mux, between decode and the two backends: it steers decoded
//    instructions to the out-of-order backend or to the in-order execute stage
//    as sel asks, switching only when the old backend has drained, and drops
//    ooo_pwr_en so the out-of-order backend can be shut down when unused.
//  * two stt_cache instances, 16 KB 4-way with 64-byte blocks: the instruction
//    cache (10 ms retention) on the fetch port and the data cache (75 us
//    retention) on the data port. A retention_timer per cache turns the clock
//    period of the current frequency level into real time and ticks each cache's
//    2-bit per-block monitor counters every quarter retention time.
//  * seg_buffer, the 4 KB segmentation buffer, mapped at SEG_BUF_BASE in the
//    data address space and reached by ordinary loads and stores.
//  * segblk, the custom segmentation block. It is started by the core with
//    pointers, shares the data port (cache and buffer) with the core, and ends
//    with an interrupt. While it runs it owns the data port; a core request made
//    meanwhile waits (the design lets the core sleep until the interrupt).
//
// The core (fetch, decode, both backends), the clock generator that applies
// freq_l, and main memory are outside: their signals are the ports. The address
// map, the sharing of the data port and the port list are this design's choices.
// All ports follow the eba_pkg word bus (req held until a one-cycle ack) or the
// caches' block interface. Everything runs on one clock; a frequency change is
// only reported on freq_l.
module eba_dsa_top
  import eba_pkg::*;
#(
  parameter longint unsigned DC_RETENTION_PS = 64'd75_000_000,      // 75 us
  parameter longint unsigned IC_RETENTION_PS = 64'd10_000_000_000   // 10 ms
) (
  input  logic          clk,
  input  logic          rst_n,
  // architecture flags from the authentication program
  input  logic          auth_req,
  input  logic          rd_flag,
  input  logic          filt_flag,
  input  logic          seg_flag,
  input  logic          feat_flag,
  input  logic          mat_flag,
  output step_e         step,
  output logic [1:0]    freq_l,
  output exec_sel_e     sel,
  output logic          auth_done,
  // decode stage and backends
  input  logic          dec_valid,
  input  logic [31:0]   dec_instr,
  output logic          dec_ready,
  output logic          ooo_valid,
  output logic [31:0]   ooo_instr,
  input  logic          ooo_ready,
  input  logic          ooo_idle,
  output logic          ooo_pwr_en,
  output exec_sel_e     exec_order,   // order in force (lags sel while draining)
  output logic          io_valid,
  output logic [31:0]   io_instr,
  input  logic          io_ready,
  input  logic          io_idle,
  // core instruction fetch and data ports
  input  bus_req_t      if_req,
  output bus_rsp_t      if_rsp,
  input  bus_req_t      d_req,
  output bus_rsp_t      d_rsp,
  // segmentation block control (register-file operands of the core)
  input  logic          seg_start,
  input  logic [31:0]   seg_src,
  input  logic [31:0]   seg_dst,
  input  logic [31:0]   seg_n,
  output logic          seg_busy,
  output logic          seg_done,
  output logic          seg_irq,
  output logic [7:0]    seg_n_peaks,
  // next level of the memory hierarchy, instruction side
  output logic          im_req,
  output logic          im_we,
  output logic [31:0]   im_addr,
  output logic [511:0]  im_wdata,
  input  logic          im_ack,
  input  logic [511:0]  im_rdata,
  // next level, data side
  output logic          dm_req,
  output logic          dm_we,
  output logic [31:0]   dm_addr,
  output logic [511:0]  dm_wdata,
  input  logic          dm_ack,
  input  logic [511:0]  dm_rdata,
  // event pulses
  output dsa_events_t   events
);

  // ------------------------------------------------ architecture controller
  arch_ctrl u_ctrl (
    .clk, .rst_n, .auth_req, .rd_flag, .filt_flag, .seg_flag, .feat_flag, .mat_flag,
    .state(step), .freq_l, .sel, .auth_done
  );

  // ------------------------------------------------ execution-order mux
  exec_mux #(.IW(32)) u_mux (
    .clk, .rst_n, .sel,
    .dec_valid, .dec_instr, .dec_ready,
    .ooo_valid, .ooo_instr, .ooo_ready, .ooo_idle, .ooo_pwr_en,
    .io_valid, .io_instr, .io_ready, .io_idle,
    .cur_sel(exec_order), .switch_pulse(events.exec_switch)
  );

  // ------------------------------------------------ retention time bases
  logic tick_i, tick_d;
  retention_timer #(.RETENTION_PS(IC_RETENTION_PS)) u_ret_i (.clk, .rst_n, .freq_l, .tick(tick_i));
  retention_timer #(.RETENTION_PS(DC_RETENTION_PS)) u_ret_d (.clk, .rst_n, .freq_l, .tick(tick_d));

  // ------------------------------------------------ instruction cache
  stt_cache u_icache (
    .clk, .rst_n, .ret_tick(tick_i),
    .cpu_req(if_req), .cpu_rsp(if_rsp),
    .mem_req(im_req), .mem_we(im_we), .mem_addr(im_addr), .mem_wdata(im_wdata),
    .mem_ack(im_ack), .mem_rdata(im_rdata),
    .hit(events.ic_hit), .miss(events.ic_miss),
    .ret_wb(events.ic_ret_wb), .ret_inv(events.ic_ret_inv)
  );

  // ------------------------------------------------ data port sharing
  bus_req_t sb_req, m_req, buf_req, dc_req;
  bus_rsp_t sb_rsp, m_rsp, buf_rsp, dc_rsp;
  logic     to_buf;

  // segblk owns the data port while it runs; the core's request waits.
  assign m_req  = seg_busy ? sb_req : d_req;
  assign to_buf = (m_req.addr[AW-1:12] == SEG_BUF_BASE[AW-1:12]);

  always_comb begin
    buf_req     = m_req;
    dc_req      = m_req;
    buf_req.req = m_req.req && to_buf;
    dc_req.req  = m_req.req && !to_buf;
  end

  assign m_rsp = to_buf ? buf_rsp : dc_rsp;

  always_comb begin
    sb_rsp     = m_rsp;
    d_rsp      = m_rsp;
    sb_rsp.ack = m_rsp.ack && seg_busy;
    d_rsp.ack  = m_rsp.ack && !seg_busy;
  end

  assign events.buf_access = buf_rsp.ack;

  // ------------------------------------------------ segmentation buffer
  seg_buffer #(.SIZE_BYTES(4096)) u_buf (.clk, .rst_n, .bus_req(buf_req), .bus_rsp(buf_rsp));

  // ------------------------------------------------ data cache
  stt_cache u_dcache (
    .clk, .rst_n, .ret_tick(tick_d),
    .cpu_req(dc_req), .cpu_rsp(dc_rsp),
    .mem_req(dm_req), .mem_we(dm_we), .mem_addr(dm_addr), .mem_wdata(dm_wdata),
    .mem_ack(dm_ack), .mem_rdata(dm_rdata),
    .hit(events.dc_hit), .miss(events.dc_miss),
    .ret_wb(events.dc_ret_wb), .ret_inv(events.dc_ret_inv)
  );

  // ------------------------------------------------ segmentation block
  segblk u_segblk (
    .clk, .rst_n, .start(seg_start),
    .src_ptr(seg_src), .dst_ptr(seg_dst), .n_samples(seg_n),
    .busy(seg_busy), .done(seg_done), .irq(seg_irq), .n_peaks(seg_n_peaks),
    .qrs_pulse(events.seg_qrs), .searchback_pulse(events.seg_searchback),
    .bus_req(sb_req), .bus_rsp(sb_rsp)
  );

  assign events.ret_tick_i = tick_i;
  assign events.ret_tick_d = tick_d;

endmodule
