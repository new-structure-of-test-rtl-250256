// tb_sr_tpg -- self-checking testbench of sr_tpg, the (2n-1)-SR generator.
//
// Runs a 4-line MAFM and a 4-line XMAFM generator plus an 8-line pair, and
// checks for each:
//   * every vector of the 4-line sequences against a reference table (two
//     hex strings, one digit per vector, bit i = line I_i) worked out by hand
//     from the counter/decoder rules, outside the RTL;
//   * the sequence length: busy high for exactly 8n+1 / 12n+3 clocks, eot
//     high on the last vector only;
//   * fault coverage by the maximum aggressor model (xtalk_cov_pkg): every
//     line is a victim for Pg0, Ng1, Dr, Df (MAFM) or all eight faults (XMAFM);
//   * a restart gives the same sequence again, and scan_en freezes the
//     counters while the register shifts scan_in.
module tb_sr_tpg;
  import tpg_pkg::*;
  import xtalk_cov_pkg::*;

  localparam string REF_MAFM4  = "0e0d0b071e2d4b870f1f2f4f8e1d2b478";
  localparam string REF_XMAFM4 = "0f0e0d0b071e2d4b871f2f4f8f0f1f2f4f8e1d2b478e0d0b070";

  logic clk = 0, rst_n = 0;
  logic start = 0, scan_en = 0, scan_in = 0;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  logic [3:0] y_m4, y_x4;
  logic [7:0] y_m8, y_x8;
  logic       busy_m4, busy_x4, busy_m8, busy_x8;
  logic       eot_m4, eot_x4, eot_m8, eot_x8;
  logic       so_m4, so_x4, so_m8, so_x8, en_m4, en_x4, en_m8, en_x8;

  sr_tpg #(.N(4), .SEQ(SEQ_MAFM)) dut_m4 (.clk, .rst_n, .start, .scan_en, .scan_in,
    .scan_out(so_m4), .y(y_m4), .busy(busy_m4), .eot(eot_m4), .en_dbg(en_m4));
  sr_tpg #(.N(4), .SEQ(SEQ_XMAFM)) dut_x4 (.clk, .rst_n, .start, .scan_en, .scan_in,
    .scan_out(so_x4), .y(y_x4), .busy(busy_x4), .eot(eot_x4), .en_dbg(en_x4));
  sr_tpg #(.N(8), .SEQ(SEQ_MAFM)) dut_m8 (.clk, .rst_n, .start, .scan_en, .scan_in,
    .scan_out(so_m8), .y(y_m8), .busy(busy_m8), .eot(eot_m8), .en_dbg(en_m8));
  sr_tpg #(.N(8), .SEQ(SEQ_XMAFM)) dut_x8 (.clk, .rst_n, .start, .scan_en, .scan_in,
    .scan_out(so_x8), .y(y_x8), .busy(busy_x8), .eot(eot_x8), .en_dbg(en_x8));

  xtalk_cov #(4) cov_m4 = new();
  xtalk_cov #(4) cov_x4 = new();
  xtalk_cov #(8) cov_m8 = new();
  xtalk_cov #(8) cov_x8 = new();

  function automatic logic [3:0] hexdig(string s, int i);
    int c = int'(s[i]);
    return (c >= int'("a")) ? 4'(c - int'("a") + 10) : 4'(c - int'("0"));
  endfunction

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  // Vector index of each generator while busy.
  int t_m4, t_x4, t_m8, t_x8;
  int busy_cnt_m4, busy_cnt_x4, busy_cnt_m8, busy_cnt_x8;
  int eot_cnt_m4, eot_cnt_x4, eot_cnt_m8, eot_cnt_x8;

  always @(negedge clk) begin
    if (busy_m4) begin
      check(y_m4 == hexdig(REF_MAFM4, t_m4), $sformatf("MAFM n=4 vector %0d: %b", t_m4, y_m4));
      check(eot_m4 == (t_m4 == 32), $sformatf("MAFM n=4 eot at %0d", t_m4));
      cov_m4.add(y_m4); t_m4++; busy_cnt_m4++; eot_cnt_m4 += int'(eot_m4);
    end
    if (busy_x4) begin
      check(y_x4 == hexdig(REF_XMAFM4, t_x4), $sformatf("XMAFM n=4 vector %0d: %b", t_x4, y_x4));
      check(eot_x4 == (t_x4 == 50), $sformatf("XMAFM n=4 eot at %0d", t_x4));
      cov_x4.add(y_x4); t_x4++; busy_cnt_x4++; eot_cnt_x4 += int'(eot_x4);
    end
    if (busy_m8) begin
      check(eot_m8 == (t_m8 == 64), $sformatf("MAFM n=8 eot at %0d", t_m8));
      cov_m8.add(y_m8); t_m8++; busy_cnt_m8++;
    end
    if (busy_x8) begin
      check(eot_x8 == (t_x8 == 98), $sformatf("XMAFM n=8 eot at %0d", t_x8));
      cov_x8.add(y_x8); t_x8++; busy_cnt_x8++;
    end
  end

  task automatic restart();
    t_m4 = 0; t_x4 = 0; t_m8 = 0; t_x8 = 0;
    busy_cnt_m4 = 0; busy_cnt_x4 = 0; busy_cnt_m8 = 0; busy_cnt_x8 = 0;
    eot_cnt_m4 = 0; eot_cnt_x4 = 0;
    cov_m4.clear(); cov_x4.clear(); cov_m8.clear(); cov_x8.clear();
    @(posedge clk); start <= 1;
    @(posedge clk); start <= 0;
  endtask

  task automatic run_and_check(int pass);
    restart();
    repeat (120) @(posedge clk);
    @(negedge clk);
    check(busy_cnt_m4 == 33, $sformatf("pass %0d MAFM n=4 length %0d", pass, busy_cnt_m4));
    check(busy_cnt_x4 == 51, $sformatf("pass %0d XMAFM n=4 length %0d", pass, busy_cnt_x4));
    check(busy_cnt_m8 == 65, $sformatf("pass %0d MAFM n=8 length %0d", pass, busy_cnt_m8));
    check(busy_cnt_x8 == 99, $sformatf("pass %0d XMAFM n=8 length %0d", pass, busy_cnt_x8));
    check(eot_cnt_m4 == 1 && eot_cnt_x4 == 1, "single eot per sequence");
    check(cov_m4.missed(MAFM_FAULTS) == 0,  "MAFM n=4 coverage");
    check(cov_x4.missed(XMAFM_FAULTS) == 0, "XMAFM n=4 coverage");
    check(cov_m8.missed(MAFM_FAULTS) == 0,  "MAFM n=8 coverage");
    check(cov_x8.missed(XMAFM_FAULTS) == 0, "XMAFM n=8 coverage");
    // after the sequence: idle, last vector held, eot still high
    check(!busy_m4 && eot_m4 && y_m4 == hexdig(REF_MAFM4, 32), "MAFM n=4 holds last vector");
    check(!busy_x4 && eot_x4 && y_x4 == hexdig(REF_XMAFM4, 50), "XMAFM n=4 holds last vector");
  endtask

  initial begin
    t_m4 = 0; t_x4 = 0; t_m8 = 0; t_x8 = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (2) @(posedge clk);
    @(negedge clk);
    check(!busy_m4 && y_m4 == 4'h0 && !eot_m4, "idle after reset");
    run_and_check(0);
    run_and_check(1);

    // Scan, with the generator idle after its sequence: shift a known
    // pattern through the 7-stage register of the 4-line generator; the
    // counters must not move.
    @(negedge clk);
    scan_en = 1;
    for (int k = 0; k < 7; k++) begin
      scan_in = logic'(k == 0 || k == 2 || k == 3);   // first bit in ends deepest
      @(negedge clk);
    end
    // stage j holds bit shifted in at step 6-j: stages 6,4,3 set
    // -> Y_0=stage0=0, Y_1=stage2=0, Y_2=stage4=1, Y_3=stage6=1
    check(y_m4 == 4'b1100, $sformatf("scan load MAFM n=4: %b", y_m4));
    check(so_m4 == 1'b1, "scan_out shows last stage");
    check(eot_m4 && eot_x4, "counters frozen at the last vector during scan");
    check(!busy_m4, "scan does not start the generator");
    scan_en = 0; scan_in = 0;
    repeat (3) @(posedge clk);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
