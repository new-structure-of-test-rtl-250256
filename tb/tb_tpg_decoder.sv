// tb_tpg_decoder -- self-checking testbench of tpg_decoder.
//
// Sweeps every <TPC1,TPC0> combination of four decoders and compares en and
// eot with the decoding tables written out literally for n = 4 (the worked
// examples: vector t = TPC1*mod + TPC0, EN=0 at the listed vectors) and for
// n = 6 (the general rules evaluated by hand). Values after the last vector
// are don't-care in the published design and are not checked.
module tb_tpg_decoder;
  import tpg_pkg::*;

  int checks = 0, failures = 0;

  logic [1:0] m4_0; logic [3:0] m4_1; logic m4_en, m4_eot;
  logic [2:0] x4_0; logic [2:0] x4_1; logic x4_en, x4_eot;
  logic [2:0] m6_0; logic [3:0] m6_1; logic m6_en, m6_eot;
  logic [3:0] x6_0; logic [2:0] x6_1; logic x6_en, x6_eot;

  tpg_decoder #(.N(4), .SEQ(SEQ_MAFM))  d_m4 (.tpc0(m4_0), .tpc1(m4_1), .en(m4_en), .eot(m4_eot));
  tpg_decoder #(.N(4), .SEQ(SEQ_XMAFM)) d_x4 (.tpc0(x4_0), .tpc1(x4_1), .en(x4_en), .eot(x4_eot));
  tpg_decoder #(.N(6), .SEQ(SEQ_MAFM))  d_m6 (.tpc0(m6_0), .tpc1(m6_1), .en(m6_en), .eot(m6_eot));
  tpg_decoder #(.N(6), .SEQ(SEQ_XMAFM)) d_x6 (.tpc0(x6_0), .tpc1(x6_1), .en(x6_en), .eot(x6_eot));

  // Vectors (t) at which EN = 0.
  int hold_m4[$] = '{0, 6, 8, 16, 17, 23, 25};
  int hold_x4[$] = '{1, 2, 8, 10, 16, 17, 26, 27, 33, 35, 41, 42};
  int hold_m6[$] = '{0, 10, 12, 24, 25, 35, 37};
  int hold_x6[$] = '{1, 2, 12, 14, 24, 25, 38, 39, 49, 51, 61, 62};

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic bit member(int q[$], int v);
    foreach (q[i]) if (q[i] == v) return 1;
    return 0;
  endfunction

  initial begin
    int zeros;
    // MAFM n=4: mod 4, last vector 32
    zeros = 0;
    for (int t = 0; t <= 32; t++) begin
      m4_1 = 4'(t / 4); m4_0 = 2'(t % 4);
      #1;
      check(m4_en == !member(hold_m4, t), $sformatf("MAFM n=4 en at t=%0d", t));
      check(m4_eot == (t == 32), $sformatf("MAFM n=4 eot at t=%0d", t));
      zeros += int'(!m4_en);
    end
    check(zeros == 7, "MAFM n=4 seven holds");
    // XMAFM n=4: mod 8, last vector 50
    for (int t = 0; t <= 50; t++) begin
      x4_1 = 3'(t / 8); x4_0 = 3'(t % 8);
      #1;
      check(x4_en == !member(hold_x4, t), $sformatf("XMAFM n=4 en at t=%0d", t));
      check(x4_eot == (t == 50), $sformatf("XMAFM n=4 eot at t=%0d", t));
    end
    // MAFM n=6: mod 6, last vector 48
    for (int t = 0; t <= 48; t++) begin
      m6_1 = 4'(t / 6); m6_0 = 3'(t % 6);
      #1;
      check(m6_en == !member(hold_m6, t), $sformatf("MAFM n=6 en at t=%0d", t));
      check(m6_eot == (t == 48), $sformatf("MAFM n=6 eot at t=%0d", t));
    end
    // XMAFM n=6: mod 12, last vector 74
    for (int t = 0; t <= 74; t++) begin
      x6_1 = 3'(t / 12); x6_0 = 4'(t % 12);
      #1;
      check(x6_en == !member(hold_x6, t), $sformatf("XMAFM n=6 en at t=%0d", t));
      check(x6_eot == (t == 74), $sformatf("XMAFM n=6 eot at t=%0d", t));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
