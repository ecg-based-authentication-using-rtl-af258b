// tb_arch_ctrl: self-checking testbench of the architecture controller.
// It walks the controller through complete authentications, checks the state
// and the per-step configuration (frequency level and execution order, as in
// the constant-timing configuration table) in every phase, checks that flags of
// other phases are ignored, and checks the one-cycle response to a flag.
module tb_arch_ctrl;
  import eba_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic auth_req, rd_flag, filt_flag, seg_flag, feat_flag, mat_flag;
  step_e      state;
  logic [1:0] freq_l;
  exec_sel_e  sel;
  logic       auth_done;

  arch_ctrl dut (.clk, .rst_n, .auth_req, .rd_flag, .filt_flag, .seg_flag,
                 .feat_flag, .mat_flag, .state, .freq_l, .sel, .auth_done);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // expected configuration, written from the table
  task automatic expect_cfg(input step_e s);
    logic [1:0] f;
    exec_sel_e  e;
    case (s)
      S_FILT:  begin f = 2'd3; e = SEL_INORDER; end
      S_SEG:   begin f = 2'd0; e = SEL_OOO;     end
      S_FEAT:  begin f = 2'd2; e = SEL_INORDER; end
      S_MAT:   begin f = 2'd1; e = SEL_INORDER; end
      default: begin f = 2'd0; e = SEL_OOO;     end
    endcase
    check(state == s, $sformatf("state %0d, expected %0d", state, s));
    check(freq_l == f, $sformatf("state %0d: freq_l %0d, expected %0d", s, freq_l, f));
    check(sel == e, $sformatf("state %0d: sel %0d, expected %0d", s, sel, e));
  endtask

  task automatic clear();
    {auth_req, rd_flag, filt_flag, seg_flag, feat_flag, mat_flag} = '0;
  endtask

  // raise one flag (index 0..5) for one cycle
  task automatic pulse(input int f, output bit done_seen);
    @(negedge clk);
    clear();
    case (f)
      0: auth_req = 1; 1: rd_flag = 1; 2: filt_flag = 1;
      3: seg_flag = 1; 4: feat_flag = 1; default: mat_flag = 1;
    endcase
    #1 done_seen = auth_done;
    @(negedge clk);
    clear();
  endtask

  step_e order [6] = '{S_WAIT, S_READ, S_FILT, S_SEG, S_FEAT, S_MAT};

  initial begin
    bit d;
    clear();
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    expect_cfg(S_WAIT);
    for (int run = 0; run < 3; run++) begin
      for (int st = 0; st < 6; st++) begin
        // a wrong flag leaves the state alone
        for (int f = 0; f < 6; f++) if (f != st) begin
          pulse(f, d);
          expect_cfg(order[st]);
          check(!d, "no auth_done on a wrong flag");
        end
        // several cycles without a flag: configuration held
        repeat (3) @(negedge clk);
        expect_cfg(order[st]);
        // the right flag: next state one cycle later
        pulse(st, d);
        expect_cfg(order[(st + 1) % 6]);
        check(d == (st == 5), "auth_done only with the matching flag");
      end
    end
    // reset in the middle of a run returns to S_WAIT
    pulse(0, d); pulse(1, d); pulse(2, d);
    expect_cfg(S_SEG);
    rst_n = 0; @(negedge clk); rst_n = 1; @(negedge clk);
    expect_cfg(S_WAIT);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
