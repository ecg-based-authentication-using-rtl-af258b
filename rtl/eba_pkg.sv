// eba_pkg: types and constants shared by the ECG-authentication domain-specific
// architecture. It holds the step encoding of the architecture controller, the
// per-step configuration table (frequency level and execution order), the
// clock period of each frequency level (used to measure retention time in real
// time while the clock is scaled), and the word-bus request/response structs that
// the core data port, the segmentation block, the segmentation buffer and the
// caches share.
//
// Word bus protocol (this design's choice): a master raises req with we/addr/wdata
// and holds them stable until the slave answers with a one-cycle ack; on a read,
// rdata is valid in the ack cycle. One request is outstanding at a time.
package eba_pkg;

  localparam int unsigned AW = 32;   // byte address width
  localparam int unsigned DW = 32;   // word width

  // States of the architecture controller.
  typedef enum logic [2:0] {
    S_WAIT = 3'd0,
    S_READ = 3'd1,
    S_FILT = 3'd2,
    S_SEG  = 3'd3,
    S_FEAT = 3'd4,
    S_MAT  = 3'd5
  } step_e;

  // Execution-order select: out-of-order = 1, in-order = 0.
  typedef enum logic {
    SEL_INORDER = 1'b0,
    SEL_OOO     = 1'b1
  } exec_sel_e;

  // Frequency level IDs of the step configuration table.
  localparam logic [1:0] FREQ_L_2100 = 2'd0;  // base, 2.1 GHz
  localparam logic [1:0] FREQ_L_400  = 2'd1;  // 400 MHz
  localparam logic [1:0] FREQ_L_500  = 2'd2;  // 500 MHz
  localparam logic [1:0] FREQ_L_600  = 2'd3;  // 600 MHz

  // Clock period of each frequency level in picoseconds (1e6 / MHz, rounded).
  function automatic logic [15:0] period_ps(input logic [1:0] freq_l);
    case (freq_l)
      FREQ_L_2100: return 16'd476;
      FREQ_L_400:  return 16'd2500;
      FREQ_L_500:  return 16'd2000;
      default:     return 16'd1667;
    endcase
  endfunction

  typedef struct packed {
    logic          req;
    logic          we;
    logic [AW-1:0] addr;
    logic [DW-1:0] wdata;
  } bus_req_t;

  typedef struct packed {
    logic          ack;
    logic [DW-1:0] rdata;
  } bus_rsp_t;

  // Base address of the segmentation buffer in the data address space (this
  // design's choice); the buffer decodes the 4 KB from here.
  localparam logic [AW-1:0] SEG_BUF_BASE = 32'h1000_0000;

  // One-cycle event pulses of the architecture, brought out for monitoring.
  typedef struct packed {
    logic ic_hit, ic_miss, ic_ret_wb, ic_ret_inv;
    logic dc_hit, dc_miss, dc_ret_wb, dc_ret_inv;
    logic ret_tick_i, ret_tick_d;   // quarter-retention ticks (I-cache, D-cache)
    logic buf_access;               // a segmentation-buffer access completed
    logic seg_qrs, seg_searchback;  // segblk accepted a QRS / used search-back
    logic exec_switch;              // execution order switched
  } dsa_events_t;

endpackage
