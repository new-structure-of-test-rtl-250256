// tb_xtalk_tpg_top -- end-to-end testbench of xtalk_tpg_top.
//
// Two tops side by side, a 6-line MAFM one and a 5-line XMAFM one, share the
// control inputs. The test
//   1. runs the bus in functional mode (bus = func_data),
//   2. switches to test mode and starts a sequence; the bus is watched by a
//      fault-coverage monitor (xtalk_cov_pkg) and must cover every fault of
//      the model on every line; busy must last exactly 8n+1 / 12n+3 clocks
//      and eot must mark the last vector only,
//   3. checks the generator holds its last vector after the sequence,
//   4. restarts and compares the second sequence vector by vector with the
//      first,
//   5. shifts a pattern through the register as a scan path and reads it
//      back at scan_out, 2n-1 clocks later,
//   6. switches back to functional mode in the middle of a sequence.
// Each mechanism (CNT hold on EN=0, seen on the en_dbg output; TPC1 advance, end of test, restart,
// scan shift, mode switch both ways) is counted and must have happened.
module tb_xtalk_tpg_top;
  import tpg_pkg::*;
  import xtalk_cov_pkg::*;

  localparam int NM = 6;
  localparam int NX = 5;
  localparam int MM = 8 * NM + 1;   // 49
  localparam int MX = 12 * NX + 3;  // 63

  logic clk = 0, rst_n = 0;
  logic test_mode = 0, start = 0, scan_en = 0, scan_in = 0;
  logic [NM-1:0] func_m, bus_m;
  logic [NX-1:0] func_x, bus_x;
  logic so_m, so_x, busy_m, busy_x, eot_m, eot_x, en_m, en_x;
  int checks = 0, failures = 0;

  // mechanism counters
  int n_hold = 0, n_tpc1_adv = 0, n_eot = 0, n_restart = 0, n_scan = 0;
  int n_to_test = 0, n_to_func = 0;

  always #5 clk = ~clk;

  xtalk_tpg_top #(.N(NM), .SEQ(SEQ_MAFM)) dut_m (.clk, .rst_n, .test_mode, .start,
    .scan_en, .scan_in, .scan_out(so_m), .func_data(func_m), .bus_out(bus_m),
    .busy(busy_m), .eot(eot_m), .en_dbg(en_m));
  xtalk_tpg_top #(.N(NX), .SEQ(SEQ_XMAFM)) dut_x (.clk, .rst_n, .test_mode, .start,
    .scan_en, .scan_in, .scan_out(so_x), .func_data(func_x), .bus_out(bus_x),
    .busy(busy_x), .eot(eot_x), .en_dbg(en_x));

  xtalk_cov #(NM) cov_m = new();
  xtalk_cov #(NX) cov_x = new();

  logic [NM-1:0] seq_m [MM];
  logic [NX-1:0] seq_x [MX];
  int t_m, t_x, len_m, len_x, eots_m, eots_x;
  bit record, compare;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  // bus monitor, sampled mid-cycle
  always @(negedge clk) begin
    if (busy_m && !scan_en) begin
      if (test_mode) begin
        cov_m.add(bus_m);
        if (record)  seq_m[t_m] = bus_m;
        if (compare) check(bus_m == seq_m[t_m], $sformatf("MAFM repeat vector %0d", t_m));
      end
      check(eot_m == (t_m == MM - 1), $sformatf("MAFM eot at vector %0d", t_m));
      if (!en_m && t_m != MM - 1) n_hold++;
      t_m++; len_m++; eots_m += int'(eot_m);
    end
    if (busy_x && !scan_en) begin
      if (test_mode) begin
        cov_x.add(bus_x);
        if (record)  seq_x[t_x] = bus_x;
        if (compare) check(bus_x == seq_x[t_x], $sformatf("XMAFM repeat vector %0d", t_x));
      end
      check(eot_x == (t_x == MX - 1), $sformatf("XMAFM eot at vector %0d", t_x));
      if (!en_x && t_x != MX - 1) n_hold++;
      t_x++; len_x++; eots_x += int'(eot_x);
    end
    if (!test_mode) begin
      check(bus_m == func_m && bus_x == func_x, "functional mode passes func_data");
    end
  end

  // TPC1 advances: TPC0 wraps every n vectors (MAFM), so each vector index
  // that is a non-zero multiple of n is one TPC1 step; reaching eot proves
  // the steps took place.
  always @(negedge clk)
    if (busy_m && !scan_en && t_m > 0 && (t_m % NM) == 0) n_tpc1_adv++;

  task automatic start_seq();
    t_m = 0; t_x = 0; len_m = 0; len_x = 0; eots_m = 0; eots_x = 0;
    cov_m.clear(); cov_x.clear();
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
  endtask

  task automatic finish_seq(string tag);
    repeat (MX + 5) @(negedge clk);
    check(len_m == MM, $sformatf("%s MAFM length %0d", tag, len_m));
    check(len_x == MX, $sformatf("%s XMAFM length %0d", tag, len_x));
    check(eots_m == 1 && eots_x == 1, $sformatf("%s one eot each", tag));
    check(cov_m.missed(MAFM_FAULTS) == 0, $sformatf("%s MAFM fault coverage", tag));
    check(cov_x.missed(XMAFM_FAULTS) == 0, $sformatf("%s XMAFM fault coverage", tag));
    check(!busy_m && eot_m && bus_m == seq_m[MM-1], $sformatf("%s MAFM holds last vector", tag));
    check(!busy_x && eot_x && bus_x == seq_x[MX-1], $sformatf("%s XMAFM holds last vector", tag));
    if (eot_m && eot_x) n_eot++;
  endtask

  initial begin
    func_m = '0; func_x = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // 1. functional traffic
    for (int k = 0; k < 20; k++) begin
      func_m = NM'($urandom); func_x = NX'($urandom);
      @(negedge clk);
    end

    // 2. test mode, first sequence
    test_mode = 1; n_to_test++;
    record = 1; compare = 0;
    start_seq();
    finish_seq("first");

    // 4. restart and compare
    record = 0; compare = 1;
    start_seq(); n_restart++;
    finish_seq("second");
    compare = 0;

    // 5. scan path: 2n-1 = 11 stages (MAFM), 9 stages (XMAFM); a bit set on
    //    scan_in before clock k is on scan_out after clock k+2n-2
    begin
      logic [63:0] pat;
      logic [63:0] got_m, got_x;
      pat = {$urandom, $urandom};
      got_m = '0; got_x = '0;
      scan_en = 1;
      for (int k = 0; k < 40; k++) begin
        scan_in = pat[k];
        @(negedge clk);
        got_m[k] = so_m;
        got_x[k] = so_x;
        n_scan++;
      end
      scan_en = 0;
      for (int k = 2*NM - 2; k < 40; k++)
        check(got_m[k] == pat[k - (2*NM - 2)], $sformatf("MAFM scan_out bit %0d", k));
      for (int k = 2*NX - 2; k < 40; k++)
        check(got_x[k] == pat[k - (2*NX - 2)], $sformatf("XMAFM scan_out bit %0d", k));
    end

    // 6. mode switch in the middle of a sequence
    start_seq();
    repeat (10) @(negedge clk);
    test_mode = 0; n_to_func++;
    repeat (5) begin
      func_m = NM'($urandom); func_x = NX'($urandom);
      @(negedge clk);
    end
    test_mode = 1; n_to_test++;
    repeat (MX) @(negedge clk);
    check(!busy_m && !busy_x, "sequences ended after the switch");

    // every mechanism must have happened
    check(n_hold > 0,      "EN=0 hold of CNT observed");
    check(n_tpc1_adv > 0,  "TPC1 advance observed");
    check(n_eot >= 2,      "end of test observed");
    check(n_restart > 0,   "restart observed");
    check(n_scan > 0,      "scan shift observed");
    check(n_to_test > 0 && n_to_func > 0, "mode switches observed");
    $display("mechanisms: holds=%0d tpc1_adv=%0d eot=%0d restart=%0d scan=%0d to_test=%0d to_func=%0d",
             n_hold, n_tpc1_adv, n_eot, n_restart, n_scan, n_to_test, n_to_func);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
