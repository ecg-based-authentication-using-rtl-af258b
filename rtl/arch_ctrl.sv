// arch_ctrl: the architecture controller of the EBA domain-specific architecture.
//
// A six-state Moore machine with one state per phase of the authentication
// program: S_WAIT (idle, other software may run), S_READ (reading the ECG signal),
// and one state for each algorithm step, S_FILT, S_SEG, S_FEAT and S_MAT. The
// program raises a single-bit architecture flag when a phase completes (auth_req
// to leave S_WAIT, then rd, filt, seg, feat, mat); each flag moves the machine to
// the next phase, and a flag that does not belong to the current state is
// ignored. In every state the registered outputs configure the core for that
// phase as in the step configuration table:
//
//   step          frequency   freq_l  execution     sel
//   filtering     600 MHz     3       in-order      0
//   segmentation  2.1 GHz     0       out-of-order  1
//   feature ext.  500 MHz     2       in-order      0
//   matching      400 MHz     1       in-order      0
//
// S_WAIT and S_READ use the base configuration (2.1 GHz, out-of-order); that is
// this design's choice, the configuration table lists only the four steps.
// freq_l goes to the clock generator, sel to the execution-order multiplexer.
// The outputs change in the cycle after the flag (one register stage). The state
// is also brought out, and auth_done is high with the mat flag that ends a run.
module arch_ctrl
  import eba_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       auth_req,   // start of an authentication
  input  logic       rd_flag,    // signal read complete
  input  logic       filt_flag,  // filtering complete
  input  logic       seg_flag,   // segmentation complete
  input  logic       feat_flag,  // feature extraction complete
  input  logic       mat_flag,   // matching complete
  output step_e      state,
  output logic [1:0] freq_l,
  output exec_sel_e  sel,
  output logic       auth_done
);

  step_e state_q, state_d;

  always_comb begin
    state_d = state_q;
    unique case (state_q)
      S_WAIT: if (auth_req)  state_d = S_READ;
      S_READ: if (rd_flag)   state_d = S_FILT;
      S_FILT: if (filt_flag) state_d = S_SEG;
      S_SEG:  if (seg_flag)  state_d = S_FEAT;
      S_FEAT: if (feat_flag) state_d = S_MAT;
      S_MAT:  if (mat_flag)  state_d = S_WAIT;
      default:               state_d = S_WAIT;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state_q <= S_WAIT;
    else        state_q <= state_d;
  end

  always_comb begin
    unique case (state_q)
      S_FILT:  begin freq_l = FREQ_L_600;  sel = SEL_INORDER; end
      S_SEG:   begin freq_l = FREQ_L_2100; sel = SEL_OOO;     end
      S_FEAT:  begin freq_l = FREQ_L_500;  sel = SEL_INORDER; end
      S_MAT:   begin freq_l = FREQ_L_400;  sel = SEL_INORDER; end
      default: begin freq_l = FREQ_L_2100; sel = SEL_OOO;     end
    endcase
  end

  assign state     = state_q;
  assign auth_done = (state_q == S_MAT) && mat_flag;

endmodule
