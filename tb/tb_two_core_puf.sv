// tb_two_core_puf -- end-to-end test of the two-core PUF on a small
// population of simulated chips that share one set of inputs.
//
// Each chip is a two_core_puf whose two adders get their own gate delays:
//   u_fast0   Core1 20% slower on every gate  -> every response bit 1
//   u_fast1   Core0 20% slower on every gate  -> every response bit 0
//   u_aged    u_fast0 after aging: XOR1 of Core0's full adder J 100 ps slower
//   g_pv[k]   random process variation (+/-20% per gate, seeded)
// Checked: adder results, the query latency (srp_valid five cycles after the
// edge that samples start, four adds), all-ones / all-zeros responses of the
// biased chips, that aging flips exactly the targeted bit, repeatability of a
// noise-free chip, that chips differ (inter-chip Hamming distance), XOR
// obfuscation against the chip's own plain responses, and the aging vectors
// with the stress duty of every gate of the aged core (full adders in the
// mask: XOR1 and NAND1 always high, XOR2, NAND2, NAND3 half the time; others:
// XOR1 half, XOR2 never, NAND1 always). Each mechanism must occur at least
// once: rise-phase and fall-phase captures, discarded double transitions,
// XOR half fills, aging cycles.
`timescale 1ps/1ps
module tb_two_core_puf;
  import puf_pkg::*;

  localparam int W      = 32;
  localparam int NPV    = 3;
  localparam int J      = 9;        // full adder aged in u_aged
  localparam int PERIOD = 2000;     // ps
  localparam int NQ     = 60;

  // Process variation. A palette of NPAL full-adder delay records, each gate
  // nominal x (100 +/- spread)% drawn by a linear congruential generator;
  // every full adder of a core then takes one palette entry chosen by the
  // core's seed. (A small palette keeps the number of distinct full-adder
  // parameterisations, and so the build time, small.)
  localparam int NPAL = 16;

  function automatic fa_delay_t palette(input int idx, input int spread);
    int unsigned x;
    int v [5];
    int nom [5];
    nom = '{20, 20, 10, 10, 10};
    x = 32'(idx) * 32'd2654435761 + 32'd12345;
    for (int g = 0; g < 5; g++) begin
      x = x * 32'd1664525 + 32'd1013904223;
      v[g] = nom[g] * (100 + int'((x >> 8) % (2 * spread + 1)) - spread) / 100;
    end
    return '{xor1: 8'(v[0]), xor2: 8'(v[1]), nand1: 8'(v[2]),
             nand2: 8'(v[3]), nand3: 8'(v[4])};
  endfunction

  // Delays of one core: scale% of nominal on every gate when spread = 0,
  // otherwise palette entries picked pseudo-randomly from `seed`.
  function automatic fa_delay_t [W-1:0] pv(input int unsigned seed,
                                           input int scale, input int spread);
    fa_delay_t [W-1:0] d;
    int unsigned x;
    x = seed;
    for (int i = 0; i < W; i++) begin
      x = x * 32'd1664525 + 32'd1013904223;
      if (spread == 0)
        d[i] = '{xor1: 8'(20 * scale / 100), xor2: 8'(20 * scale / 100),
                 nand1: 8'(10 * scale / 100), nand2: 8'(10 * scale / 100),
                 nand3: 8'(10 * scale / 100)};
      else
        d[i] = palette(int'((x >> 12) % NPAL), spread);
    end
    return d;
  endfunction

  function automatic fa_delay_t [W-1:0] age_xor1(input fa_delay_t [W-1:0] d,
                                                 input int j, input int extra);
    fa_delay_t [W-1:0] r;
    r = d;
    r[j].xor1 = 8'(int'(d[j].xor1) + extra);
    return r;
  endfunction

  localparam fa_delay_t [W-1:0] NOM    = pv(1, 100, 0);
  localparam fa_delay_t [W-1:0] SLOW20 = pv(1, 120, 0);

  logic clk = 0, rst_n, start, xor_en, age_en;
  logic [W-1:0] challenge_a, challenge_b, age_mask0, age_mask1;

  typedef struct packed {
    logic busy, aging, srp_valid;
    logic [W-1:0] srp, alu_sum0, alu_sum1;
  } chip_out_t;

  chip_out_t o_fast0, o_fast1, o_aged;
  chip_out_t o_pv [NPV];

  `define CHIP(inst, D0, D1, TM, o) \
    two_core_puf #(.WIDTH(W), .DLY_CORE0(D0), .DLY_CORE1(D1), .T_META(TM)) inst ( \
      .clk, .rst_n, .start, .challenge_a, .challenge_b, .xor_en, .age_en, \
      .age_mask0, .age_mask1, .busy(o.busy), .aging(o.aging), .srp(o.srp), \
      .srp_valid(o.srp_valid), .alu_sum0(o.alu_sum0), .alu_sum1(o.alu_sum1));

  `CHIP(u_fast0, NOM, SLOW20, 0, o_fast0)
  `CHIP(u_fast1, SLOW20, NOM, 0, o_fast1)
  `CHIP(u_aged, age_xor1(NOM, J, 100), SLOW20, 0, o_aged)
  for (genvar k = 0; k < NPV; k++) begin : g_pv
    `CHIP(u_chip, pv(101 + 1000 * k, 100, 20), pv(202 + 1000 * k, 100, 20), 0, o_pv[k])
  end

  always #(PERIOD / 2) clk = ~clk;

  int checks = 0, failures = 0;

  // A random W-bit value.
  function automatic logic [W-1:0] rnd();
    logic [W-1:0] v = '0;
    for (int i = 0; i < W; i += 32) v = (v << 32) | W'($urandom);
    return v;
  endfunction
  int n_rise = 0, n_fall = 0, n_glitch = 0, n_xor_half = 0, n_age = 0;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #(PERIOD * 5000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Count double transitions (0->1->0 or 1->0->1) on Core0's sum bits of
  // chip g_pv[0] within one clock cycle: the arbiter decision on those bits
  // must be discarded by the valid-output selection.
  logic [W-1:0] prev_sum, edge1, edge2;
  always @(g_pv[0].u_chip.u_core0_adder.sum) begin
    logic [W-1:0] ch;
    ch       = g_pv[0].u_chip.u_core0_adder.sum ^ prev_sum;
    edge2   |= edge1 & ch;
    edge1   |= ch;
    prev_sum = g_pv[0].u_chip.u_core0_adder.sum;
  end
  always @(posedge clk) begin
    if (g_pv[0].u_chip.u_seq.capture) n_glitch += $countones(edge2);
    edge1 <= '0;
    edge2 <= '0;
  end

  // Count bits loaded in each phase of chip g_pv[0].
  always @(posedge clk) begin
    if (g_pv[0].u_chip.u_seq.capture) begin
      if (g_pv[0].u_chip.u_seq.phase == PH_RISE)
        n_rise += $countones(g_pv[0].u_chip.u_core0_adder.sum);
      else
        n_fall += $countones(~g_pv[0].u_chip.u_core0_adder.sum);
    end
  end

  // One plain or XOR query on all chips. Returns the cycles from the edge
  // that samples start to the edge after which srp_valid is set.
  task automatic query(input logic [W-1:0] a, input logic [W-1:0] b, output int lat);
    challenge_a = a; challenge_b = b; start = 1;
    @(posedge clk); #1;
    start = 0; lat = 0;
    while (o_pv[0].busy) begin
      @(posedge clk); #1;
      lat++;
    end
  endtask

  int hd_sum, hd_pairs;
  logic [W-1:0] qa [NQ], qb [NQ];
  logic [W-1:0] r1 [NPV], r2 [NPV];

  initial begin
    int lat;
    logic [W-1:0] a, b, first [NPV];
    rst_n = 0; start = 0; xor_en = 0; age_en = 0;
    challenge_a = '0; challenge_b = '0; age_mask0 = '0; age_mask1 = '0;
    prev_sum = '0; edge1 = '0; edge2 = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;

    // --- plain queries -----------------------------------------------------
    hd_sum = 0; hd_pairs = 0;
    for (int q = 0; q < NQ; q++) begin
      qa[q] = rnd(); qb[q] = rnd();
      if (q == 0) begin qa[q] = W'(1) << J; qb[q] = '0; end
      query(qa[q], qb[q], lat);
      check(lat == 5, $sformatf("latency %0d cycles", lat));
      check(o_pv[0].srp_valid, "srp_valid after plain query");
      check(o_pv[0].alu_sum0 == qa[q] + qb[q] && o_pv[0].alu_sum1 == qa[q] + qb[q],
            "adder results");
      check(o_fast0.srp == '1, $sformatf("core1-slow chip gives all ones: %h", o_fast0.srp));
      check(o_fast1.srp == '0, $sformatf("core0-slow chip gives all zeros: %h", o_fast1.srp));
      if (q == 0)
        check(o_aged.srp == ~(W'(1) << J),
              $sformatf("aging flips only bit %0d: %h", J, o_aged.srp));
      for (int k = 0; k < NPV; k++) first[k] = o_pv[k].srp;
      for (int k = 0; k < NPV; k++)
        for (int m = k + 1; m < NPV; m++) begin
          hd_sum += $countones(first[k] ^ first[m]);
          hd_pairs++;
        end
      // Repeat: a noise-free chip must answer identically.
      query(qa[q], qb[q], lat);
      for (int k = 0; k < NPV; k++)
        check(o_pv[k].srp == first[k], $sformatf("chip %0d repeatable", k));
    end
    $display("mean inter-chip Hamming distance: %0d.%02d bits of %0d",
             hd_sum / hd_pairs, (hd_sum * 100 / hd_pairs) % 100, W);
    check(hd_sum > 0, "chips differ");
    check(hd_sum < hd_pairs * W, "chips are not complements");

    // --- XOR obfuscation ---------------------------------------------------
    a = rnd(); b = rnd();
    query(a, b, lat);
    for (int k = 0; k < NPV; k++) r1[k] = o_pv[k].srp;
    query(b, a ^ W'(32'h5a5a_0f0f), lat);
    for (int k = 0; k < NPV; k++) r2[k] = o_pv[k].srp;
    xor_en = 1;
    query(a, b, lat);
    check(!o_pv[0].srp_valid, "XOR mode: not valid after one query");
    n_xor_half++;
    query(b, a ^ W'(32'h5a5a_0f0f), lat);
    n_xor_half++;
    check(o_pv[0].srp_valid, "XOR mode: valid after two queries");
    for (int k = 0; k < NPV; k++)
      check(o_pv[k].srp == {r2[k][W/2-1:0] ^ r2[k][W-1:W/2], r1[k][W/2-1:0] ^ r1[k][W-1:W/2]},
            $sformatf("XOR response chip %0d", k));
    xor_en = 0;

    // --- aging mode --------------------------------------------------------
    age_mask0 = W'(32'h0000_0205); age_mask1 = '0; age_en = 1;
    @(posedge clk); #1;
    begin
      int hi [W][5];
      int ncyc;
      fa_gates_t [W-1:0] gs;
      for (int i = 0; i < W; i++) for (int g = 0; g < 5; g++) hi[i][g] = 0;
      ncyc = 0;
      for (int n = 0; n < 40; n++) begin
        check(o_pv[0].aging, "aging flag");
        #(PERIOD - 2);                 // sample at the end of the cycle
        gs = g_pv[0].u_chip.u_core0_adder.gates;
        if (n % 2 == 0) check(o_pv[0].alu_sum0 == '0, "vector 1 sum");
        else            check(o_pv[0].alu_sum0 == age_mask0, "vector 2 sum");
        for (int i = 0; i < W; i++) begin
          hi[i][0] += gs[i].xor1;  hi[i][1] += gs[i].xor2;
          hi[i][2] += gs[i].nand1; hi[i][3] += gs[i].nand2;
          hi[i][4] += gs[i].nand3;
        end
        ncyc++; n_age++;
        @(posedge clk); #1;
      end
      age_en = 0;
      for (int i = 0; i < W; i++) begin
        if (age_mask0[i])
          check(hi[i][0] == ncyc && hi[i][1] == ncyc / 2 && hi[i][2] == ncyc &&
                hi[i][3] == ncyc / 2 && hi[i][4] == ncyc / 2,
                $sformatf("duty of aged FA %0d", i));
        else
          check(hi[i][0] == ncyc / 2 && hi[i][1] == 0 && hi[i][2] == ncyc &&
                hi[i][3] == ncyc / 2 && hi[i][4] == ncyc / 2,
                $sformatf("duty of unaged FA %0d", i));
      end
    end
    repeat (3) @(posedge clk);
    #1 check(!o_pv[0].busy && !o_pv[0].aging, "idle after aging");

    $display("mechanisms: rise captures %0d, fall captures %0d, discarded double transitions %0d, XOR half fills %0d, aging cycles %0d",
             n_rise, n_fall, n_glitch, n_xor_half, n_age);
    check(n_rise > 0, "rise-phase captures happened");
    check(n_fall > 0, "fall-phase captures happened");
    check(n_glitch > 0, "double transitions happened");
    check(n_xor_half > 0, "XOR half fills happened");
    check(n_age > 0, "aging cycles happened");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
