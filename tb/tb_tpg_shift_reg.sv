// tb_tpg_shift_reg -- self-checking testbench of tpg_shift_reg, the
// (2n-1)-stage register.
//
// A 5-line instance (9 stages) is driven with random adv/si/scan_en/
// scan_in/load. The testbench keeps its own 9-bit model of the stages and
// checks y (Y_i = stage 2i) and scan_out (last stage) every cycle, plus the
// preset pattern (even stages 0, odd stages 1) after reset and load.
module tb_tpg_shift_reg;
  localparam int N = 5;
  localparam int L = 2 * N - 1;

  logic clk = 0, rst_n = 0;
  logic load = 0, adv = 0, si = 0, scan_en = 0, scan_in = 0;
  logic scan_out;
  logic [N-1:0] y;
  logic [L-1:0] model;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  tpg_shift_reg #(.N(N)) dut (.clk, .rst_n, .load, .adv, .si, .scan_en, .scan_in, .scan_out, .y);

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  function automatic logic [L-1:0] preset();
    logic [L-1:0] p;
    for (int j = 0; j < L; j++) p[j] = (j % 2 == 1);
    return p;
  endfunction

  task automatic compare();
    logic [N-1:0] exp_y;
    for (int i = 0; i < N; i++) exp_y[i] = model[2*i];
    check(y == exp_y, $sformatf("y=%b expected %b", y, exp_y));
    check(scan_out == model[L-1], "scan_out");
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk);
    model = preset();
    compare();
    check(y == '0, "first vector all zeros");
    rst_n = 1;
    for (int k = 0; k < 600; k++) begin
      load    = ($urandom_range(0, 40) == 0);
      adv     = ($urandom_range(0, 3) != 0);
      scan_en = ($urandom_range(0, 5) == 0);
      si      = 1'($urandom);
      scan_in = 1'($urandom);
      @(posedge clk);
      if (load) model = preset();
      else if (scan_en) model = {model[L-2:0], scan_in};
      else if (adv) model = {model[L-2:0], si};
      @(negedge clk);
      compare();
    end
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
