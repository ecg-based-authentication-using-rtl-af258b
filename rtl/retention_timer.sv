// retention_timer: measures the retention time of an STTRAM cache in real time
// while the core clock is scaled. Each cycle it adds the clock period of the
// current frequency level (eba_pkg::period_ps) to a picosecond accumulator; when
// the accumulator reaches one quarter of the retention time it emits a one-cycle
// tick and subtracts the quarter, so the remainder is carried and no time is
// lost at a frequency change. The cache's 2-bit per-block monitor counters count
// these ticks. Interface: freq_l in, tick out; the first tick follows
// RETENTION_PS/4 of simulated time after reset. The quarter-period resolution is
// this design's choice, matching a 2-bit counter.
module retention_timer
  import eba_pkg::*;
#(
  parameter longint unsigned RETENTION_PS = 64'd75_000_000   // 75 us
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [1:0] freq_l,
  output logic       tick
);

  localparam longint unsigned QUARTER = RETENTION_PS / 4;
  localparam int unsigned     ACC_W   = $clog2(QUARTER + 65536) + 1;

  logic [ACC_W-1:0] acc_q, acc_sum;

  assign acc_sum = acc_q + ACC_W'(period_ps(freq_l));
  assign tick    = (acc_sum >= ACC_W'(QUARTER));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    acc_q <= '0;
    else if (tick) acc_q <= acc_sum - ACC_W'(QUARTER);
    else           acc_q <= acc_sum;
  end

endmodule
