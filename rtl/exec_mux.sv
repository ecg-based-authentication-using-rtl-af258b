// exec_mux: the execution-order multiplexer that sits after the decode stage.
// Every decoded instruction passes through it; depending on the select signal
// from the architecture controller it goes to the out-of-order backend
// (sel = SEL_OOO) or to the in-order execute stage (sel = SEL_INORDER), as in
// the composite-core style of the design.
//
// Switching is this design's choice of mechanism: when sel changes, dispatch
// stops until the backend in use reports idle (its instructions have drained),
// and only then does the steering flip, so the two backends never hold
// instructions of the same program at once and program order is kept. While the
// in-order path is in use and the out-of-order backend is idle, ooo_pwr_en is
// low so that the backend can be shut down, as the design does for every step
// but segmentation.
//
// Interface: valid/ready handshake on the decode side and on each backend side;
// the payload is passed through unchanged. Switching costs at least one cycle
// after the old backend is idle; switch_pulse marks the cycle the select flips.
module exec_mux
  import eba_pkg::*;
#(
  parameter int unsigned IW = 32   // width of a decoded instruction
) (
  input  logic          clk,
  input  logic          rst_n,
  input  exec_sel_e     sel,
  // decode side
  input  logic          dec_valid,
  input  logic [IW-1:0] dec_instr,
  output logic          dec_ready,
  // out-of-order backend
  output logic          ooo_valid,
  output logic [IW-1:0] ooo_instr,
  input  logic          ooo_ready,
  input  logic          ooo_idle,
  output logic          ooo_pwr_en,
  // in-order execute stage
  output logic          io_valid,
  output logic [IW-1:0] io_instr,
  input  logic          io_ready,
  input  logic          io_idle,
  // status
  output exec_sel_e     cur_sel,
  output logic          switch_pulse
);

  exec_sel_e cur_q;
  logic      pending, cur_idle;

  assign pending  = (sel != cur_q);
  assign cur_idle = (cur_q == SEL_OOO) ? ooo_idle : io_idle;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                   cur_q <= SEL_OOO;
    else if (pending && cur_idle) cur_q <= sel;
  end

  assign switch_pulse = pending && cur_idle;

  // Steering: hold dispatch while a switch is pending.
  assign ooo_valid = dec_valid && !pending && (cur_q == SEL_OOO);
  assign io_valid  = dec_valid && !pending && (cur_q == SEL_INORDER);
  assign ooo_instr = dec_instr;
  assign io_instr  = dec_instr;
  assign dec_ready = !pending && ((cur_q == SEL_OOO) ? ooo_ready : io_ready);

  assign ooo_pwr_en = (cur_q == SEL_OOO) || !ooo_idle;
  assign cur_sel    = cur_q;

endmodule
