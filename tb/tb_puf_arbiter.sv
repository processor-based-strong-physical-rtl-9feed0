// tb_puf_arbiter -- checks the dual-trigger arbiter model: rising and falling
// races won by either input, a trigger input that does not move (output
// holds), and the metastability window (inputs closer than T_META give both
// outcomes over many trials, inputs further apart give the deterministic one).
`timescale 1ps/1ps
module tb_puf_arbiter;

  logic c0, c1, w;          // ideal arbiter
  logic m0, m1, wm;         // arbiter with a 4 ps window
  int checks = 0, failures = 0;

  puf_arbiter #(.T_META(0)) dut  (.from_core0(c0), .from_core1(c1), .win0(w));
  puf_arbiter #(.T_META(4)) dutm (.from_core0(m0), .from_core1(m1), .win0(wm));

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // One race on the ideal arbiter: both inputs go to `lvl`, c0 after d0 ps
  // and c1 after d1 ps.
  task automatic race(input logic lvl, input int d0, input int d1);
    fork
      begin #(d0); c0 = lvl; end
      begin #(d1); c1 = lvl; end
    join
    #50;
  endtask

  task automatic race_m(input logic lvl, input int d0, input int d1);
    fork
      begin #(d0); m0 = lvl; end
      begin #(d1); m1 = lvl; end
    join
    #50;
  endtask

  initial begin
    #10000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ones, zeros;
    c0 = 0; c1 = 0; m0 = 0; m1 = 0;
    #100;
    race(1, 10, 20); check(w == 1'b1, "rise, core0 first");
    race(0, 10, 20); check(w == 1'b1, "fall, core0 first");
    race(1, 20, 10); check(w == 1'b0, "rise, core1 first");
    race(0, 25, 12); check(w == 1'b0, "fall, core1 first");
    race(1, 5, 6);   check(w == 1'b1, "rise, core0 first by 1 ps");
    race(0, 7, 6);   check(w == 1'b0, "fall, core1 first by 1 ps");
    // No transition on the trigger side: the output holds.
    c0 = 1; #50; c0 = 0; #50;
    check(w == 1'b0, "hold without trigger");
    race(1, 3, 30);  check(w == 1'b1, "rise after hold");
    c0 = 0; #50; c0 = 1; #50;
    check(w == 1'b1, "hold without trigger (2)");
    c0 = 1; c1 = 1; #50;

    // Metastability window: 2 ps apart -> random; 10 ps apart -> resolved.
    ones = 0; zeros = 0;
    for (int n = 0; n < 200; n++) begin
      race_m(1, 10, 12);
      if (wm) ones++; else zeros++;
      race_m(0, 12, 10);
      if (wm) ones++; else zeros++;
    end
    check(ones > 20 && zeros > 20, $sformatf("window gives both outcomes (%0d/%0d)", ones, zeros));
    for (int n = 0; n < 20; n++) begin
      race_m(1, 10, 20); check(wm == 1'b1, "outside window, core0 first");
      race_m(0, 20, 10); check(wm == 1'b0, "outside window, core1 first");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
