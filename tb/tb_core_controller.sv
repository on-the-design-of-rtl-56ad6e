// tb_core_controller: drives the controller through time steps with and without
// learning and checks the state sequence IDLE, DWNLD, COMP, LEAK, FIRE, UPLD,
// LEARN, the one-cycle control strobes and the cycles spent in each state.
module tb_core_controller;
  import nash_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start, valid_spike, xbar_last, learn_valid, learn_done;
  ctrl_state_e state;
  logic load, run, leak_en, fire_en, upload, learn_start, step_done;

  core_controller dut (.clk, .rst_n, .start, .valid_spike, .xbar_last, .learn_valid,
                       .learn_done, .state, .load, .run, .leak_en, .fire_en, .upload,
                       .learn_start, .step_done);

  task automatic check(bit c, string m);
    checks++; if (!c) begin failures++; $display("FAIL %s (state %s)", m, state.name()); end
  endtask

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic one_step(int comp_cycles, bit learn, int learn_cycles);
    @(negedge clk); check(state == CS_IDLE, "idle");
    start = 1; @(negedge clk); start = 0;
    check(state == CS_DWNLD, "dwnld");
    repeat (2) begin @(negedge clk); check(state == CS_DWNLD, "wait in dwnld"); end
    valid_spike = 1; #1 check(load, "load strobe"); @(negedge clk); valid_spike = 0;
    for (int c = 0; c < comp_cycles; c++) begin
      check(state == CS_COMP && run, "comp");
      xbar_last = (c == comp_cycles - 1);
      @(negedge clk);
    end
    xbar_last = 0;
    check(state == CS_LEAK && leak_en, "leak"); @(negedge clk);
    check(state == CS_FIRE && fire_en, "fire"); @(negedge clk);
    check(state == CS_UPLD && upload, "upload"); learn_valid = learn; @(negedge clk);
    check(state == CS_LEARN, "learn state");
    check(learn_start == learn, "learn_start strobe");
    if (learn) begin
      @(negedge clk);
      for (int c = 0; c < learn_cycles; c++) begin
        check(state == CS_LEARN && !learn_start, "learning");
        learn_done = (c == learn_cycles - 1);
        @(negedge clk);
      end
      learn_done = 0;
    end else @(negedge clk);
    check(state == CS_IDLE, "back to idle");
    learn_valid = 0;
  endtask

  int dones = 0;
  always @(posedge clk) if (step_done) dones++;

  initial begin
    start = 0; valid_spike = 0; xbar_last = 0; learn_valid = 0; learn_done = 0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    one_step(1, 0, 0);
    one_step(5, 0, 0);
    one_step(3, 1, 6);
    one_step(2, 1, 1);
    repeat (2) @(negedge clk);
    check(dones == 4, "step_done per step");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
