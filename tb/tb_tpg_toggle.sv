// tb_tpg_toggle -- self-checking testbench of tpg_toggle (the CNT counter).
//
// Drives random load/adv/en for two instances (INIT=0 and INIT=1) and
// compares q with a reference bit updated in the testbench: load presets to
// INIT, adv&en toggles, anything else holds. Also checks the reset value.
module tb_tpg_toggle;
  logic clk = 0, rst_n = 0;
  logic load = 0, adv = 0, en = 0;
  logic q0, q1, ref0, ref1;
  int   checks = 0, failures = 0, toggles = 0;

  always #5 clk = ~clk;

  tpg_toggle #(.INIT(1'b0)) dut0 (.clk, .rst_n, .load, .adv, .en, .q(q0));
  tpg_toggle #(.INIT(1'b1)) dut1 (.clk, .rst_n, .load, .adv, .en, .q(q1));

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk);
    check(q0 == 1'b0 && q1 == 1'b1, "reset values");
    rst_n = 1;
    ref0 = 1'b0; ref1 = 1'b1;
    for (int k = 0; k < 500; k++) begin
      load = ($urandom_range(0, 15) == 0);
      adv  = ($urandom_range(0, 3) != 0);
      en   = ($urandom_range(0, 2) != 0);
      @(posedge clk);
      if (load) begin ref0 = 1'b0; ref1 = 1'b1; end
      else if (adv && en) begin ref0 = ~ref0; ref1 = ~ref1; toggles++; end
      @(negedge clk);
      check(q0 == ref0, $sformatf("INIT=0 q=%b expected %b", q0, ref0));
      check(q1 == ref1, $sformatf("INIT=1 q=%b expected %b", q1, ref1));
    end
    check(toggles > 100, "enough toggles exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
